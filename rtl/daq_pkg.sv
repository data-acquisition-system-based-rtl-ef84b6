// daq_pkg: constants and types shared by the data acquisition design.
//
// The design samples an analog voltage with an ADC0809 (8-bit, 8-channel
// converter), shows the 8-bit result as two hexadecimal ASCII digits on a
// 16x2 character LCD and lights an LED when the result is above 3F hex
// (about 1.24 V with a 5 V reference).
//
// What is here:
//   * the monitoring threshold 3F hex, and the ADC channel count (8);
//   * the 72-clock conversion wait (8 clocks of start synchronisation plus
//     64 clocks of conversion, 8 clocks per bit);
//   * LCD command codes. The display is an HD44780-style controller with an
//     8-bit bus; the command set and its power-on sequence are standard for
//     that controller and are this design's choice, not part of the
//     system description;
//   * a digit-select enum and the LCD pin bundle as a packed struct.
package daq_pkg;

  // ADC0809
  localparam int unsigned ADC_CHANNELS  = 8;     // 8-channel analog multiplexer
  localparam int unsigned ADC_CONV_CLKS = 72;    // worst case START-fall -> data ready

  // Monitoring threshold: LED on when sample > 3F hex
  localparam logic [7:0] LED_THRESHOLD = 8'h3F;

  // LCD commands (HD44780 instruction set, 8-bit interface)
  localparam logic [7:0] LCD_FUNC_SET_8BIT_2LINE = 8'h38;
  localparam logic [7:0] LCD_DISPLAY_ON          = 8'h0C;
  localparam logic [7:0] LCD_CLEAR               = 8'h01;
  localparam logic [7:0] LCD_ENTRY_INC           = 8'h06;
  localparam logic [7:0] LCD_SET_DDRAM_LINE1     = 8'h80;

  // Which nibble of a sample is shown
  typedef enum logic {
    DIGIT_MSB = 1'b0,   // bits 7..4, shown first (left)
    DIGIT_LSB = 1'b1    // bits 3..0, shown second (right)
  } digit_sel_t;

  // LCD write-side pins. RW is kept for completeness: this design only writes.
  typedef struct packed {
    logic       rs;   // 0 = command register, 1 = data register
    logic       rw;   // 0 = write, 1 = read
    logic       e;    // enable strobe, data taken on its falling edge
    logic [7:0] d;    // data bus D7..D0
  } lcd_pins_t;

endpackage
