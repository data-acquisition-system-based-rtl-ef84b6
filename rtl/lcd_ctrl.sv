// lcd_ctrl: drives a 16x2 character LCD over its 8-bit parallel write bus
// (RS, R/W, E, D7..D0) and shows the latest ADC sample on it as two
// hexadecimal ASCII digits at the left of the first line.
//
// How it works. One FSM runs a write engine and a step sequencer.
//   Write engine, one bus write (the write cycle of the LCD timing diagram):
//     SETUP  RS and D are driven, E low, for T_AS clocks (address set-up);
//     EHIGH  E high for T_PW clocks (enable pulse width; data is valid the
//            whole time, so data set-up before the falling edge is met);
//     HOLD   E low, RS and D held, for T_AH clocks (address/data hold);
//     EXEC   wait for the LCD to execute: T_EXEC clocks, or T_CLEAR
//            clocks after the clear-display command.
//   Step sequencer:
//     power-up wait of T_POWERUP clocks, then the init commands 38h
//     (8-bit bus, 2 lines), 0Ch (display on), 01h (clear), 06h (entry
//     increment); then READY. Whenever a sample is pending it is copied to
//     the display register and three writes follow: command 80h (cursor to
//     line 1, column 0), the MSB digit and the LSB digit (RS = 1). The
//     digits come from the display multiplexer (digit_mux) fed by the
//     display register, so they cannot change during an update.
//   A sample arriving while an update is in progress replaces the pending
//   one; the display always catches up to the newest sample (the
//   in-between one is dropped). R/W is always 0: the LCD is never read,
//   which is why the controller waits fixed times instead of polling the
//   busy flag.
//
// From the system: the pin set and its meaning (RS selects command or data
// register, R/W = 0 writes, E enables), the write-cycle order of the timing
// diagram, and showing the hex sample as ASCII characters. This design's
// choices: the HD44780 command codes and init order, all timing values,
// the display position, and the update/drop policy. The default timings
// assume a 500 kHz clock (2 us per clock, the ADC0809's typical clock):
// 15 ms power-up, 40 us per command, 1.64 ms for clear; the three bus
// phases need only one clock each at that rate.
//
// Interface: clk, rst (synchronous, active high), sample[7:0] with a
// one-cycle sample_valid strobe; lcd (RS, RW, E, D as a packed struct);
// ready (init finished), busy (an update or init is running), shown[7:0]
// (the value on the display) and update_done (one-cycle strobe after the
// second digit of an update has executed).
module lcd_ctrl
  import daq_pkg::*;
#(
  parameter int unsigned T_POWERUP = 7500,
  parameter int unsigned T_AS      = 1,
  parameter int unsigned T_PW      = 1,
  parameter int unsigned T_AH      = 1,
  parameter int unsigned T_EXEC    = 20,
  parameter int unsigned T_CLEAR   = 820
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] sample,
  input  logic       sample_valid,
  output lcd_pins_t  lcd,
  output logic       ready,
  output logic       busy,
  output logic [7:0] shown,
  output logic       update_done
);

  typedef enum logic [2:0] {
    P_POWERUP, P_SETUP, P_EHIGH, P_HOLD, P_EXEC, P_IDLE
  } phase_t;

  // Steps: 0..3 init commands, 4 cursor home, 5 MSB digit, 6 LSB digit
  localparam logic [2:0] STEP_LAST_INIT = 3'd3;
  localparam logic [2:0] STEP_CURSOR    = 3'd4;
  localparam logic [2:0] STEP_MSB       = 3'd5;
  localparam logic [2:0] STEP_LSB       = 3'd6;

  localparam int unsigned TMAX = (T_POWERUP > T_CLEAR) ? T_POWERUP : T_CLEAR;
  localparam int unsigned TW   = $clog2(TMAX + 2);

  phase_t        phase;
  logic [2:0]    step;
  logic [TW-1:0] cnt;
  logic          pending;
  logic [7:0]    pend_val;
  logic [7:0]    disp_val;
  logic          init_done;

  // Byte and register select of the current step
  digit_sel_t digit_sel;
  logic [7:0] digit_ascii;
  logic [7:0] step_byte;
  logic       step_rs;

  assign digit_sel = (step == STEP_MSB) ? DIGIT_MSB : DIGIT_LSB;

  digit_mux u_digit_mux (
    .sample (disp_val),
    .sel    (digit_sel),
    .ascii  (digit_ascii)
  );

  always_comb begin
    step_rs = 1'b0;
    unique case (step)
      3'd0:        step_byte = LCD_FUNC_SET_8BIT_2LINE;
      3'd1:        step_byte = LCD_DISPLAY_ON;
      3'd2:        step_byte = LCD_CLEAR;
      3'd3:        step_byte = LCD_ENTRY_INC;
      STEP_CURSOR: step_byte = LCD_SET_DDRAM_LINE1;
      default: begin
        step_byte = digit_ascii;
        step_rs   = 1'b1;
      end
    endcase
  end

  // Wait after a write: clear needs the long time
  logic [TW-1:0] exec_clks;
  assign exec_clks = (!lcd.rs && lcd.d == LCD_CLEAR) ? TW'(T_CLEAR) : TW'(T_EXEC);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase       <= P_POWERUP;
      step        <= '0;
      cnt         <= '0;
      pending     <= 1'b0;
      pend_val    <= '0;
      disp_val    <= '0;
      init_done   <= 1'b0;
      lcd         <= '0;
      update_done <= 1'b0;
    end else begin
      update_done <= 1'b0;
      cnt         <= cnt + 1'b1;

      // newest sample wins
      if (sample_valid) begin
        pending  <= 1'b1;
        pend_val <= sample;
      end

      unique case (phase)
        P_POWERUP: begin
          if (cnt == TW'(T_POWERUP - 1)) begin
            step  <= '0;
            cnt   <= '0;
            phase <= P_SETUP;
          end
        end
        P_SETUP: begin
          lcd.rs <= step_rs;
          lcd.rw <= 1'b0;
          lcd.d  <= step_byte;
          if (cnt == TW'(T_AS)) begin   // first clock loads RS/D, then T_AS clocks
            lcd.e <= 1'b1;
            cnt   <= '0;
            phase <= P_EHIGH;
          end
        end
        P_EHIGH: begin
          if (cnt == TW'(T_PW - 1)) begin
            lcd.e <= 1'b0;
            cnt   <= '0;
            phase <= P_HOLD;
          end
        end
        P_HOLD: begin
          if (cnt == TW'(T_AH - 1)) begin
            cnt   <= '0;
            phase <= P_EXEC;
          end
        end
        P_EXEC: begin
          if (cnt == exec_clks - 1'b1) begin
            cnt <= '0;
            if (step == STEP_LAST_INIT) begin
              init_done <= 1'b1;
              phase     <= P_IDLE;
            end else if (step == STEP_LSB) begin
              update_done <= 1'b1;
              phase       <= P_IDLE;
            end else begin
              step  <= step + 1'b1;
              phase <= P_SETUP;
            end
          end
        end
        P_IDLE: begin
          cnt <= '0;
          if (pending && !sample_valid) begin
            pending  <= 1'b0;
            disp_val <= pend_val;
            step     <= STEP_CURSOR;
            phase    <= P_SETUP;
          end
        end
        default: phase <= P_POWERUP;
      endcase
    end
  end

  assign ready = init_done;
  assign busy  = (phase != P_IDLE);
  assign shown = disp_val;

  // The LCD is only written, and E never rises while RS/D are being changed
  a_write_only: assert property (@(posedge clk) disable iff (rst) !lcd.rw);
  a_e_stable:   assert property (@(posedge clk) disable iff (rst)
                                 lcd.e |-> ($stable(lcd.d) && $stable(lcd.rs)));

endmodule
