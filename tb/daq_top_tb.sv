// daq_top_tb: end-to-end test of the data acquisition and monitoring system
// at its default parameters (500 kHz clock timings: 15 ms LCD power-up,
// 72-clock ADC wait), with behavioural models of the ADC0809 and the LCD.
//
// Scenario:
//   1. fixed channel 0: the input voltage steps through 1.00 V, 1.30 V,
//      1.24 V, 1.25 V, 5.00 V and 0 V. For each step the testbench waits
//      until the LCD shows the new code and checks the LED (on above 3F).
//   2. the converter is slowed down for a few conversions, so the
//      controller has to wait for EOC beyond its 72 clocks.
//   3. scan mode: eight different voltages on IN0..IN7; the channel address
//      must step 0,1,..,7,0,.. and every result must match its channel.
// Checked on every conversion: the result equals min(255, mV*256/5000) of
// the channel that was addressed at ALE (at the voltage of ALE time or of
// the end of the conversion, when the test changed it in between); the LED one clock later equals
// (result > 3F); the conversion period is 79 clocks (80 when EOC is seen
// one clock late, longer with the slowed converter).
// Checked on every LCD update: line 1 starts with the two hex digits of
// the value the controller took, and that value is one of the two newest
// results. The LCD model must report no timing or busy violation.
// Mechanisms counted (each must happen): conversions, EOC waits, LED on,
// LED off, channel wrap in scan mode, fixed-channel conversions, LCD
// clear during init, LCD updates, results replaced while the LCD was busy.
module daq_top_tb;
  logic        clk = 0;
  logic        rst, scan_en;
  logic [2:0]  fixed_ch;
  logic [2:0]  adc_addr;
  logic        adc_ale, adc_start, adc_oe, adc_eoc;
  logic [7:0]  adc_data;
  logic        lcd_rs, lcd_rw, lcd_e;
  logic [7:0]  lcd_d;
  logic        led;
  logic [7:0]  sample, lcd_shown;
  logic        sample_valid, lcd_ready, lcd_update_done, adc_busy, lcd_busy;

  logic [12:0] vin_mv [8];
  logic [7:0]  extra_clks;
  logic [2:0]  latched_ch;
  int unsigned conversions;
  logic [7:0]  line1 [16];
  int unsigned violations, n_cmd, n_data, n_clear;
  logic        display_on, two_line_8bit;

  int checks = 0, failures = 0;
  int cycle = 0;
  string digits = "0123456789ABCDEF";

  // mechanism counters
  int n_conv = 0, n_eoc_wait = 0, n_led_on = 0, n_led_off = 0, n_wrap = 0;
  int n_fixed = 0, n_update = 0, n_replaced = 0;

  daq_top dut (
    .clk(clk), .rst(rst), .scan_en(scan_en), .fixed_ch(fixed_ch),
    .adc_addr(adc_addr), .adc_ale(adc_ale), .adc_start(adc_start), .adc_oe(adc_oe),
    .adc_eoc(adc_eoc), .adc_data(adc_data),
    .lcd_rs(lcd_rs), .lcd_rw(lcd_rw), .lcd_e(lcd_e), .lcd_d(lcd_d),
    .led(led), .sample(sample), .sample_valid(sample_valid), .lcd_ready(lcd_ready),
    .lcd_shown(lcd_shown), .lcd_update_done(lcd_update_done),
    .adc_busy(adc_busy), .lcd_busy(lcd_busy));

  adc0809_model adc (
    .clk(clk), .vin_mv(vin_mv), .extra_clks(extra_clks),
    .addr(adc_addr), .ale(adc_ale), .start(adc_start), .oe(adc_oe),
    .eoc(adc_eoc), .data(adc_data), .latched_ch(latched_ch), .conversions(conversions));

  lcd_model lcdm (
    .clk(clk), .rs(lcd_rs), .rw(lcd_rw), .e(lcd_e), .d(lcd_d),
    .line1(line1), .violations(violations), .n_cmd(n_cmd), .n_data(n_data),
    .n_clear(n_clear), .display_on(display_on), .two_line_8bit(two_line_8bit));

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] code_of(input logic [12:0] mv);
    int c;
    c = int'(mv) * 256 / 5000;
    return (c > 255) ? 8'hFF : 8'(c);
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  // ---------------------------------------------------------------- monitor
  logic [2:0]  ale_ch = '0;
  logic [12:0] ale_mv = '0;
  logic        have_ch = 1'b0;
  logic [2:0]  prev_ch = '0;
  logic        prev_scan = 1'b0;
  logic [7:0]  last [2] = '{default: 8'h00};
  logic        led_check = 1'b0;
  logic [7:0]  led_value = '0;
  int          t_last_valid = -1;
  logic [7:0]  conv_extra = '0;
  logic        led_q = 1'b0;
  logic [2:0]  fixed_q = '0;
  int          fixed_age = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    led_q <= led;
    fixed_q <= fixed_ch;
    fixed_age <= (fixed_ch != fixed_q) ? 0 : fixed_age + 1;
    if (extra_clks != 0) conv_extra <= extra_clks;
    if (!rst) begin
      if (adc_ale) begin
        // channel sequence in scan mode
        if (have_ch && scan_en && prev_scan) begin
          checks++;
          if (adc_addr != 3'(prev_ch + 1)) fail($sformatf("scan went %0d -> %0d", prev_ch, adc_addr));
          if (adc_addr == 0) n_wrap++;
        end
        if (!scan_en && !prev_scan && fixed_age > 2) begin
          checks++;
          if (adc_addr != fixed_ch) fail("fixed channel not used");
        end
        have_ch   <= 1'b1;
        prev_ch   <= adc_addr;
        prev_scan <= scan_en;
        ale_ch    <= adc_addr;
        ale_mv    <= vin_mv[adc_addr];
        conv_extra <= extra_clks;
      end
      if (led_check) begin
        checks++;
        if (led !== (led_value > 8'h3F)) fail($sformatf("LED %0b for %h", led, led_value));
        if (led && !led_q) n_led_on++;
        if (!led && led_q) n_led_off++;
      end
      led_check <= 1'b0;
      if (sample_valid) begin
        n_conv++;
        if (!scan_en) n_fixed++;
        if (conv_extra != 0) n_eoc_wait++;
        checks++;
        // the input may have been changed during the conversion
        if (sample != code_of(ale_mv) && sample != code_of(vin_mv[ale_ch]))
          fail($sformatf("ch %0d: sample %h expected %h", ale_ch, sample, code_of(ale_mv)));
        if (t_last_valid >= 0 && conv_extra == 0) begin
          checks++;
          if (cycle - t_last_valid != 79 && cycle - t_last_valid != 80)
            fail($sformatf("conversion period %0d", cycle - t_last_valid));
        end
        t_last_valid <= cycle;
        if (lcd_busy) n_replaced++;
        last[1]   <= last[0];
        last[0]   <= sample;
        led_check <= 1'b1;
        led_value <= sample;
      end
      if (lcd_update_done) begin
        n_update++;
        checks++;
        if (line1[0] !== digits[lcd_shown / 16] || line1[1] !== digits[lcd_shown % 16])
          fail($sformatf("LCD shows %c%c, controller value %h", line1[0], line1[1], lcd_shown));
        checks++;
        if (lcd_shown != last[0] && lcd_shown != last[1])
          fail($sformatf("LCD value %h is not a recent result", lcd_shown));
      end
    end
  end

  // wait until the display shows the code of mv and check the LED
  task automatic show_level(input logic [12:0] mv);
    logic [7:0] c;
    c = code_of(mv);
    vin_mv[fixed_ch] = mv;
    fork
      begin
        do @(posedge clk iff lcd_update_done); while (lcd_shown != c);
      end
      begin
        repeat (2000) @(posedge clk);
        fail($sformatf("display never showed %h", c));
      end
    join_any
    disable fork;
    @(negedge clk);
    checks++;
    if (line1[0] !== digits[c / 16] || line1[1] !== digits[c % 16])
      fail($sformatf("display %c%c for %h", line1[0], line1[1], c));
    checks++;
    if (led !== (c > 8'h3F)) fail($sformatf("LED %0b with %h on display", led, c));
    $display("%0d mV -> %c%c, LED %s", mv, line1[0], line1[1], led ? "on" : "off");
  endtask

  initial begin
    rst = 1; scan_en = 0; fixed_ch = 3'd0; extra_clks = 0;
    for (int i = 0; i < 8; i++) vin_mv[i] = 13'd0;
    vin_mv[0] = 13'd1000;
    repeat (4) @(negedge clk);
    rst = 0;
    @(posedge clk iff lcd_ready);
    checks++;
    if (n_clear != 1 || !display_on || !two_line_8bit) fail("LCD init incomplete");

    // 1. fixed channel, levels around the 3F threshold
    show_level(13'd1000);   // 33h, off
    show_level(13'd1300);   // 42h, on
    show_level(13'd1240);   // 3Fh, off
    show_level(13'd1250);   // 40h, on
    show_level(13'd5000);   // FFh, on
    show_level(13'd0);      // 00h, off
    fixed_ch = 3'd5;
    show_level(13'd2500);   // 80h on channel 5

    // 2. slow converter: EOC comes after the 72-clock wait
    extra_clks = 8'd25;
    show_level(13'd700);
    repeat (3) @(posedge clk iff sample_valid);
    extra_clks = 8'd0;

    // 3. scan all eight channels
    for (int i = 0; i < 8; i++) vin_mv[i] = 13'(300 + 600 * i);
    scan_en = 1'b1;
    repeat (20) @(posedge clk iff sample_valid);
    scan_en = 1'b0;
    show_level(13'd4000);

    repeat (200) @(posedge clk);
    checks++;
    if (violations != 0) fail($sformatf("%0d LCD timing violations", violations));
    $display("conversions %0d, EOC waits %0d, LED on %0d, LED off %0d, scan wraps %0d",
             n_conv, n_eoc_wait, n_led_on, n_led_off, n_wrap);
    $display("fixed-channel conversions %0d, LCD clears %0d, LCD updates %0d, replaced while busy %0d",
             n_fixed, n_clear, n_update, n_replaced);
    checks++; if (n_conv == 0)     fail("no conversion");
    checks++; if (n_eoc_wait == 0) fail("no EOC wait");
    checks++; if (n_led_on == 0)   fail("LED never turned on");
    checks++; if (n_led_off == 0)  fail("LED never turned off");
    checks++; if (n_wrap == 0)     fail("scan never wrapped");
    checks++; if (n_fixed == 0)    fail("no fixed-channel conversion");
    checks++; if (n_clear == 0)    fail("LCD never cleared");
    checks++; if (n_update == 0)   fail("LCD never updated");
    checks++; if (n_replaced == 0) fail("no result arrived while the LCD was busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
