// digit_mux_tb: checks the display multiplexer on random and corner bytes.
// For each byte both selections are applied; the expected character is
// looked up in "0123456789ABCDEF" by the upper or lower nibble.
module digit_mux_tb;
  import daq_pkg::*;
  logic [7:0] sample;
  digit_sel_t sel;
  logic [7:0] ascii;
  int checks = 0, failures = 0;
  string digits = "0123456789ABCDEF";

  digit_mux dut (.sample(sample), .sel(sel), .ascii(ascii));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_byte(input logic [7:0] v);
    sample = v;
    sel = DIGIT_MSB; #1;
    checks++;
    if (ascii !== digits[v / 16]) begin
      failures++;
      $display("FAIL %h MSB: got %h", v, ascii);
    end
    sel = DIGIT_LSB; #1;
    checks++;
    if (ascii !== digits[v % 16]) begin
      failures++;
      $display("FAIL %h LSB: got %h", v, ascii);
    end
  endtask

  initial begin
    try_byte(8'h3F);   // the monitoring threshold
    try_byte(8'h00);
    try_byte(8'hFF);
    try_byte(8'hA5);
    for (int i = 0; i < 200; i++) try_byte(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
