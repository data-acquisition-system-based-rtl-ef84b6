// threshold_cmp_tb: checks the LED comparator against the rule
// "LED on when the sample is greater than 3F hex".
// All 256 sample values are presented in random order with a valid strobe;
// one clock later the LED must match. Between strobes the sample input is
// changed and the LED must hold. Reset must turn the LED off.
module threshold_cmp_tb;
  logic       clk = 0;
  logic       rst;
  logic [7:0] sample;
  logic       sample_valid;
  logic       led;
  int checks = 0, failures = 0;

  threshold_cmp dut (.clk(clk), .rst(rst), .sample(sample),
                     .sample_valid(sample_valid), .led(led));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic present(input logic [7:0] v);
    logic expect_on;
    expect_on = (int'(v) >= 64);   // 3F hex = 63
    @(negedge clk);
    sample = v; sample_valid = 1'b1;
    @(negedge clk);
    sample_valid = 1'b0;
    checks++;
    if (led !== expect_on) begin
      failures++;
      $display("FAIL sample %h: led=%0b", v, led);
    end
    // input changes without a strobe: LED holds
    sample = ~v;
    @(negedge clk);
    checks++;
    if (led !== expect_on) begin
      failures++;
      $display("FAIL hold after %h: led=%0b", v, led);
    end
  endtask

  initial begin
    logic [7:0] order [256];
    rst = 1; sample = 8'hFF; sample_valid = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    checks++;
    if (led !== 1'b0) begin failures++; $display("FAIL led on after reset"); end
    // boundary: 1.24 V reads 3F (off), one step above turns it on
    present(8'h3F);
    present(8'h40);
    present(8'h3E);
    for (int i = 0; i < 256; i++) order[i] = 8'(i);
    for (int i = 255; i > 0; i--) begin
      int j; logic [7:0] t;
      j = $urandom_range(i, 0);
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
    for (int i = 0; i < 256; i++) present(order[i]);
    // reset while on
    present(8'hC0);
    rst = 1; @(negedge clk); rst = 0;
    checks++;
    if (led !== 1'b0) begin failures++; $display("FAIL reset did not clear led"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
