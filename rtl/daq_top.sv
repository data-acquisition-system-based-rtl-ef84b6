// daq_top: FPGA data acquisition and monitoring system.
//
// An ADC0809 converts an analog voltage (0..5 V) into an 8-bit value. This
// top level runs the converter continuously, shows every result on a 16x2
// character LCD as two hexadecimal digits, and lights an LED while the
// result is above 3F hex (about 1.24 V), a simple over-level monitor.
//
// Data path:
//   chan_addr_gen -> ch -> adc_ctrl <-> ADC0809 pins
//   adc_ctrl.dout/dout_valid -> threshold_cmp -> led
//                            -> lcd_ctrl (digit_mux, hex2ascii) -> LCD pins
// adc_ctrl's dout_valid also steps the channel counter, so in scan mode
// successive conversions read channels 0..7 in turn; with scan_en = 0 the
// converter keeps reading fixed_ch. Conversions repeat every 79 clocks at
// the defaults; an LCD update takes about 3 x 23 clocks, so the display
// shows the newest sample whenever it is free, while the LED follows every
// sample.
//
// From the system: the ADC0809 pin sequence and 72-clock wait, the MSB/LSB
// split, the multiplexer, hex-to-ASCII conversion, the LCD, and the 3F hex
// comparison driving an LED. This design's choices: continuous free-running
// conversion, the fixed/scan channel select, that the ADC0809 CLOCK pin is
// fed from the same clock as clk (which the parameters' cycle counts
// assume, 500 kHz), and the LCD timing values.
//
// Interface: clk, rst (synchronous, active high); scan_en, fixed_ch[2:0];
// ADC0809 pins adc_addr (A,B,C), adc_ale, adc_start, adc_oe, adc_eoc,
// adc_data; LCD pins lcd_rs, lcd_rw (constant 0: the LCD is only
// written), lcd_e, lcd_d; led; and for observation
// sample[7:0] with sample_valid (each conversion result), lcd_ready,
// lcd_shown[7:0] (value the display holds or is being updated to) and
// lcd_update_done (strobe when an update has finished), adc_busy and
// lcd_busy.
module daq_top
  import daq_pkg::*;
#(
  parameter int unsigned N_CH        = ADC_CHANNELS,
  parameter int unsigned CONV_CLKS   = ADC_CONV_CLKS,
  parameter logic [7:0]  THRESHOLD   = LED_THRESHOLD,
  parameter int unsigned T_POWERUP   = 7500,
  parameter int unsigned T_EXEC      = 20,
  parameter int unsigned T_CLEAR     = 820
) (
  input  logic       clk,
  input  logic       rst,
  // channel selection
  input  logic       scan_en,
  input  logic [2:0] fixed_ch,
  // ADC0809
  output logic [2:0] adc_addr,
  output logic       adc_ale,
  output logic       adc_start,
  output logic       adc_oe,
  input  logic       adc_eoc,
  input  logic [7:0] adc_data,
  // LCD
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_e,
  output logic [7:0] lcd_d,
  // monitor LED
  output logic       led,
  // observation
  output logic [7:0] sample,
  output logic       sample_valid,
  output logic       lcd_ready,
  output logic [7:0] lcd_shown,
  output logic       lcd_update_done,
  output logic       adc_busy,
  output logic       lcd_busy
);

  logic [2:0] ch;
  lcd_pins_t  lcd;

  chan_addr_gen #(
    .N_CH (N_CH),
    .AW   (3)
  ) u_chan (
    .clk      (clk),
    .rst      (rst),
    .scan_en  (scan_en),
    .fixed_ch (fixed_ch),
    .advance  (sample_valid),
    .addr     (ch)
  );

  adc_ctrl #(
    .CONV_CLKS (CONV_CLKS)
  ) u_adc (
    .clk        (clk),
    .rst        (rst),
    .run        (1'b1),
    .ch         (ch),
    .addr       (adc_addr),
    .ale        (adc_ale),
    .start      (adc_start),
    .oe         (adc_oe),
    .eoc        (adc_eoc),
    .adc_data   (adc_data),
    .dout       (sample),
    .dout_valid (sample_valid),
    .busy       (adc_busy)
  );

  threshold_cmp #(
    .THRESHOLD (THRESHOLD)
  ) u_cmp (
    .clk          (clk),
    .rst          (rst),
    .sample       (sample),
    .sample_valid (sample_valid),
    .led          (led)
  );

  lcd_ctrl #(
    .T_POWERUP (T_POWERUP),
    .T_EXEC    (T_EXEC),
    .T_CLEAR   (T_CLEAR)
  ) u_lcd (
    .clk          (clk),
    .rst          (rst),
    .sample       (sample),
    .sample_valid (sample_valid),
    .lcd          (lcd),
    .ready        (lcd_ready),
    .busy         (lcd_busy),
    .shown        (lcd_shown),
    .update_done  (lcd_update_done)
  );

  assign lcd_rs = lcd.rs;
  assign lcd_rw = lcd.rw;
  assign lcd_e  = lcd.e;
  assign lcd_d  = lcd.d;

endmodule
