// daq_sweep_tb: the monitoring use case end to end. A supply voltage on one
// ADC input is swept from 0 V to 5 V in 10 mV steps, with the whole system
// at its default parameters. At every step the testbench waits for the
// LCD to show the new value and checks:
//   * the two characters on line 1 are the hex digits of
//     min(255, mV*256/5000) (computed here);
//   * the LED is on exactly when that code is above 3F;
//   * the displayed code never decreases while the voltage rises.
// At the end, the LED must have switched on exactly once, at the first
// step whose code is 40h (1.25 V), and every one of the 256 codes that the
// sweep produces must have been displayed.
module daq_sweep_tb;
  logic        clk = 0;
  logic        rst;
  logic [2:0]  adc_addr;
  logic        adc_ale, adc_start, adc_oe, adc_eoc;
  logic [7:0]  adc_data;
  logic        lcd_rs, lcd_rw, lcd_e;
  logic [7:0]  lcd_d;
  logic        led;
  logic [7:0]  sample, lcd_shown;
  logic        sample_valid, lcd_ready, lcd_update_done, adc_busy, lcd_busy;

  logic [12:0] vin_mv [8];
  logic [2:0]  latched_ch;
  int unsigned conversions;
  logic [7:0]  line1 [16];
  int unsigned violations, n_cmd, n_data, n_clear;
  logic        display_on, two_line_8bit;

  localparam logic [2:0] CH = 3'd2;   // the monitored input

  int checks = 0, failures = 0;
  string digits = "0123456789ABCDEF";
  bit seen [256];
  int led_on_mv = -1, led_switches = 0;

  daq_top dut (
    .clk(clk), .rst(rst), .scan_en(1'b0), .fixed_ch(CH),
    .adc_addr(adc_addr), .adc_ale(adc_ale), .adc_start(adc_start), .adc_oe(adc_oe),
    .adc_eoc(adc_eoc), .adc_data(adc_data),
    .lcd_rs(lcd_rs), .lcd_rw(lcd_rw), .lcd_e(lcd_e), .lcd_d(lcd_d),
    .led(led), .sample(sample), .sample_valid(sample_valid), .lcd_ready(lcd_ready),
    .lcd_shown(lcd_shown), .lcd_update_done(lcd_update_done),
    .adc_busy(adc_busy), .lcd_busy(lcd_busy));

  adc0809_model adc (
    .clk(clk), .vin_mv(vin_mv), .extra_clks(8'd0),
    .addr(adc_addr), .ale(adc_ale), .start(adc_start), .oe(adc_oe),
    .eoc(adc_eoc), .data(adc_data), .latched_ch(latched_ch), .conversions(conversions));

  lcd_model lcdm (
    .clk(clk), .rs(lcd_rs), .rw(lcd_rw), .e(lcd_e), .d(lcd_d),
    .line1(line1), .violations(violations), .n_cmd(n_cmd), .n_data(n_data),
    .n_clear(n_clear), .display_on(display_on), .two_line_8bit(two_line_8bit));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] code_of(input int mv);
    int c;
    c = mv * 256 / 5000;
    return (c > 255) ? 8'hFF : 8'(c);
  endfunction

  initial begin
    logic [7:0] c, prev_shown;
    logic       prev_led;
    bit         ok;
    rst = 1;
    for (int i = 0; i < 8; i++) vin_mv[i] = 13'd2500;
    vin_mv[CH] = 13'd0;
    repeat (4) @(negedge clk);
    rst = 0;
    @(posedge clk iff lcd_ready);
    prev_shown = 8'h00;
    prev_led   = 1'b0;
    for (int mv = 0; mv <= 5000; mv += 10) begin
      vin_mv[CH] = 13'(mv);
      c = code_of(mv);
      // the first updates after the change may still carry older results
      ok = 0;
      for (int k = 0; k < 6 && !ok; k++) begin
        @(posedge clk iff lcd_update_done);
        ok = (lcd_shown == c);
      end
      @(negedge clk);
      checks++;
      if (!ok || line1[0] !== digits[c / 16] || line1[1] !== digits[c % 16]) begin
        failures++;
        $display("FAIL %0d mV: LCD %c%c, expected %02h", mv, line1[0], line1[1], c);
      end
      checks++;
      if (led !== (c > 8'h3F)) begin
        failures++;
        $display("FAIL %0d mV: LED %0b for %02h", mv, led, c);
      end
      checks++;
      if (lcd_shown < prev_shown) begin
        failures++;
        $display("FAIL %0d mV: display went down", mv);
      end
      if (led && !prev_led) begin
        led_switches++;
        if (led_on_mv < 0) led_on_mv = mv;
      end
      seen[lcd_shown] = 1;
      prev_shown = lcd_shown;
      prev_led   = led;
    end
    checks++;
    if (led_switches != 1 || led_on_mv != 1250) begin
      failures++;
      $display("FAIL LED switched on %0d times, first at %0d mV", led_switches, led_on_mv);
    end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (!seen[i]) begin
        failures++;
        $display("FAIL code %02h never displayed", i);
      end
    end
    checks++;
    if (violations != 0) begin
      failures++;
      $display("FAIL %0d LCD timing violations", violations);
    end
    $display("LED switched on at %0d mV; %0d conversions", led_on_mv, conversions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
