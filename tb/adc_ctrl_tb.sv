// adc_ctrl_tb: runs the ADC0809 sequencer against a behavioural converter.
//
// The eight analog inputs get random voltages; the testbench picks a random
// channel for every conversion. Checked for each conversion:
//   * the result equals the code the converter model computes from the
//     voltage, min(255, mV * 256 / 5000), worked out here independently;
//   * ALE comes before START, with the address already on A,B,C and equal
//     to the requested channel; ALE and START are one clock each;
//   * OE rises only when EOC is high, and not before 72 clocks after START
//     fell;
//   * dout_valid comes 74 clocks after START fell when the converter
//     finishes in time (72-clock wait + 2 clocks of OE; 75 when EOC rises
//     on the last clock of the wait and is seen one clock later), and
//     later, but still correct, when the converter is slowed down so that
//     the controller must wait for EOC.
// With run = 0 the controller must go idle after the current conversion.
module adc_ctrl_tb;
  logic        clk = 0;
  logic        rst, run;
  logic [2:0]  ch, addr;
  logic        ale, start, oe, eoc;
  logic [7:0]  adc_data, dout;
  logic        dout_valid, busy;
  logic [12:0] vin_mv [8];
  logic [7:0]  extra_clks;
  logic [2:0]  latched_ch;
  int unsigned conversions;

  int checks = 0, failures = 0;
  int cycle = 0;
  int t_start_fall = -1, t_ale = -1, t_start_rise = -1, t_valid = -1;
  int slow_waits = 0, fast_convs = 0;
  logic start_q = 0;

  adc_ctrl dut (
    .clk(clk), .rst(rst), .run(run), .ch(ch),
    .addr(addr), .ale(ale), .start(start), .oe(oe), .eoc(eoc),
    .adc_data(adc_data), .dout(dout), .dout_valid(dout_valid), .busy(busy));

  adc0809_model adc (
    .clk(clk), .vin_mv(vin_mv), .extra_clks(extra_clks),
    .addr(addr), .ale(ale), .start(start), .oe(oe), .eoc(eoc), .data(adc_data),
    .latched_ch(latched_ch), .conversions(conversions));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] expected_code(input logic [12:0] mv);
    int c;
    c = int'(mv) * 256 / 5000;
    if (c > 255) c = 255;
    return 8'(c);
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  // pin protocol monitor
  always @(posedge clk) begin
    cycle   <= cycle + 1;
    start_q <= start;
    if (!rst) begin
      if (ale) begin
        t_ale <= cycle;
        checks++;
        if (addr != ch) fail($sformatf("address %0d at ALE, requested %0d", addr, ch));
      end
      if (start && !start_q) begin
        t_start_rise <= cycle;
        checks++;
        if (t_ale < 0 || cycle - t_ale != 1) fail("START not right after ALE");
      end
      if (!start && start_q) begin
        t_start_fall <= cycle;
        checks++;
        if (cycle - t_start_rise != 1) fail("START pulse not one clock");
      end
      if (dout_valid) t_valid <= cycle;
      if (oe) begin
        checks++;
        if (!eoc) fail("OE while EOC low");
        if (cycle - t_start_fall < 72) fail("OE before 72 clocks");
      end
    end
  end

  task automatic one_conversion(input logic [7:0] extra);
    logic [2:0] c;
    int lat;
    c = 3'($urandom);
    extra_clks = extra;
    // take a channel while idle / between conversions
    ch = c;
    @(posedge clk iff dout_valid);
    @(negedge clk);
    // both times are taken by the monitor, one clock after the DUT edge
    lat = t_valid - t_start_fall;
    checks++;
    if (dout != expected_code(vin_mv[c]))
      fail($sformatf("ch %0d: dout %h expected %h", c, dout, expected_code(vin_mv[c])));
    checks++;
    if (extra == 0) begin
      fast_convs++;
      // 74, or 75 when the converter's 8-clock cycle made EOC rise on the
      // very last clock of the wait
      if (lat != 74 && lat != 75) fail($sformatf("latency %0d, expected 74", lat));
    end else begin
      if (lat <= 74) fail($sformatf("slow converter: latency %0d not extended", lat));
      else slow_waits++;
    end
  endtask

  initial begin
    rst = 1; run = 0; ch = 0; extra_clks = 0;
    for (int i = 0; i < 8; i++) vin_mv[i] = 13'($urandom_range(5000, 0));
    vin_mv[3] = 13'd1240;   // 1.24 V -> 3F
    vin_mv[6] = 13'd5000;   // full scale
    repeat (4) @(posedge clk);
    rst = 0;
    // idle until run
    repeat (10) @(posedge clk);
    checks++;
    if (busy || ale || start) fail("not idle with run = 0");
    // ch is sampled when the conversion starts; keep it fixed per conversion
    @(negedge clk);
    run = 1;
    for (int n = 0; n < 24; n++) begin
      one_conversion((n % 6 == 5) ? 8'(20 + n) : 8'd0);
    end
    for (int n = 0; n < 8; n++) begin
      vin_mv[n] = 13'($urandom_range(5000, 0));
    end
    for (int n = 0; n < 8; n++) begin
      one_conversion(8'd0);
    end
    // stop
    run = 0;
    repeat (200) @(posedge clk);
    checks++;
    if (busy) fail("still busy after run = 0");
    checks++;
    if (slow_waits == 0 || fast_convs == 0) fail("EOC wait not exercised");
    $display("fast conversions %0d, EOC waits %0d, converter conversions %0d",
             fast_convs, slow_waits, conversions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
