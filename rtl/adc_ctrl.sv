// adc_ctrl: conversion sequencer for an ADC0809 8-bit, 8-channel A/D converter.
//
// One conversion follows the converter's own protocol:
//   1. SETUP  - the 3-bit channel address (ch) is copied to the A,B,C pins
//               and held there for SETUP_CLKS clocks (address setup time);
//   2. ALE    - ALE is pulsed high for ALE_CLKS clocks, clocking the address
//               into the converter's multiplexer address latch;
//   3. START  - START is pulsed high for START_CLKS clocks; the converter
//               clears on the rising edge and begins on the falling edge;
//   4. CONV   - the sequencer waits CONV_CLKS clocks after START falls
//               (72 = up to 8 clocks until the converter's 8-clock cycle
//               begins, plus 8 bits x 8 clocks) and then until EOC is high;
//   5. READ   - OE (output enable) is held high for OE_CLKS clocks; the data
//               bus is sampled on the last of them into dout, with a
//               one-cycle dout_valid strobe.
// After READ one spare clock (DONE) and one IDLE clock follow; with run = 1
// the next conversion then starts, taking its address from ch.
//
// The pin sequence (address, ALE, START, EOC, OE) and the 72-clock wait are
// the system's. The pulse widths, the address setup time, using both the
// 72-clock count and EOC, and the free-running repetition are this design's
// choices. It assumes the ADC is clocked from the same clock as clk (the
// 72-clock figure only means something then).
//
// Interface: clk, rst (synchronous, active high), run, ch[2:0], eoc and
// adc_data[7:0] from the converter; addr[2:0], ale, start, oe to the
// converter; dout[7:0], dout_valid, busy to the rest of the design.
// At the defaults one conversion takes 1 (IDLE) + 1 + 1 + 1 + 72 + 2 + 1
// (DONE) = 79 clocks when EOC is already high at the end of the wait;
// dout_valid comes 78 clocks after the IDLE clock that took ch, and 74
// clocks after START fell.
module adc_ctrl
  import daq_pkg::*;
#(
  parameter int unsigned SETUP_CLKS = 1,
  parameter int unsigned ALE_CLKS   = 1,
  parameter int unsigned START_CLKS = 1,
  parameter int unsigned CONV_CLKS  = ADC_CONV_CLKS,
  parameter int unsigned OE_CLKS    = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       run,
  input  logic [2:0] ch,
  // ADC0809 side
  output logic [2:0] addr,
  output logic       ale,
  output logic       start,
  output logic       oe,
  input  logic       eoc,
  input  logic [7:0] adc_data,
  // result
  output logic [7:0] dout,
  output logic       dout_valid,
  output logic       busy
);

  typedef enum logic [2:0] {
    S_IDLE, S_SETUP, S_ALE, S_START, S_CONV, S_READ, S_DONE
  } state_t;

  localparam int unsigned CW = $clog2(CONV_CLKS + SETUP_CLKS + ALE_CLKS + START_CLKS + OE_CLKS + 2);

  state_t        state;
  logic [CW-1:0] cnt;    // clocks spent in the current state

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      cnt        <= '0;
      addr       <= '0;
      ale        <= 1'b0;
      start      <= 1'b0;
      oe         <= 1'b0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      cnt        <= cnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          if (run) begin
            addr  <= ch;
            cnt   <= '0;
            state <= S_SETUP;
          end
        end
        S_SETUP: begin
          if (cnt == CW'(SETUP_CLKS - 1)) begin
            ale   <= 1'b1;
            cnt   <= '0;
            state <= S_ALE;
          end
        end
        S_ALE: begin
          if (cnt == CW'(ALE_CLKS - 1)) begin
            ale   <= 1'b0;
            start <= 1'b1;
            cnt   <= '0;
            state <= S_START;
          end
        end
        S_START: begin
          if (cnt == CW'(START_CLKS - 1)) begin
            start <= 1'b0;
            cnt   <= '0;
            state <= S_CONV;
          end
        end
        S_CONV: begin
          // cnt counts clocks since START fell; hold once the wait is over
          if (cnt >= CW'(CONV_CLKS - 1)) begin
            cnt <= cnt;
            if (eoc) begin
              oe    <= 1'b1;
              cnt   <= '0;
              state <= S_READ;
            end
          end
        end
        S_READ: begin
          if (cnt == CW'(OE_CLKS - 1)) begin
            dout       <= adc_data;
            dout_valid <= 1'b1;
            oe         <= 1'b0;
            cnt        <= '0;
            state      <= S_DONE;
          end
        end
        S_DONE: begin
          // one spare clock, so a channel counter stepped by dout_valid
          // has settled before IDLE samples ch again
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Protocol rules of the converter interface
  a_ale_start_excl: assert property (@(posedge clk) disable iff (rst) !(ale && start));
  a_oe_not_converting: assert property (@(posedge clk) disable iff (rst) oe |-> !(ale || start));

endmodule
