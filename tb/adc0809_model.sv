// adc0809_model: behavioural model of the ADC0809 8-bit, 8-channel
// successive-approximation converter, for simulation only.
//
// Analog inputs IN0..IN7 are given as millivolts (vin_mv). The model
// follows the converter's timing: the channel address (A,B,C) is latched
// while ALE is high; a rising START edge clears the converter and EOC drops
// at the next boundary of its 8-clock cycle; after START falls the
// conversion begins at the next 8-clock boundary (0..7 clocks) and takes
// 64 clocks (8 per bit), plus extra_clks when a test wants a slow
// converter. Then the result is latched and EOC rises. The output bus
// drives the result while OE is high and 00h otherwise (a two-state
// stand-in for tri-state).
// Result code = min(255, vin_mv * 256 / VREF_MV).
// It is clocked by clk, the same clock as the controller.
module adc0809_model #(
  parameter int unsigned VREF_MV = 5000
) (
  input  logic        clk,
  input  logic [12:0] vin_mv [8],
  input  logic [7:0]  extra_clks,
  input  logic [2:0]  addr,
  input  logic        ale,
  input  logic        start,
  input  logic        oe,
  output logic        eoc,
  output logic [7:0]  data,
  // observation for testbenches
  output logic [2:0]  latched_ch,
  output int unsigned conversions
);

  typedef enum logic [1:0] {M_IDLE, M_HELD, M_SYNC, M_CONV} mstate_t;

  mstate_t     st       = M_IDLE;
  logic [2:0]  phase    = '0;
  logic        start_q  = 1'b0;
  logic        eoc_drop = 1'b0;
  int unsigned cnt      = 0;
  logic [7:0]  result   = '0;
  logic [2:0]  conv_ch  = '0;

  initial begin
    eoc         = 1'b1;
    latched_ch  = '0;
    conversions = 0;
  end

  function automatic logic [7:0] code_of(input logic [12:0] mv);
    int unsigned c;
    c = (int'(mv) * 256) / VREF_MV;
    return (c > 255) ? 8'hFF : 8'(c);
  endfunction

  always @(posedge clk) begin
    phase   <= phase + 1'b1;
    start_q <= start;
    if (ale) latched_ch <= addr;

    if (start && !start_q) eoc_drop <= 1'b1;
    if (eoc_drop && phase == 3'd7) begin
      eoc      <= 1'b0;
      eoc_drop <= 1'b0;
    end

    if (start) begin
      st <= M_HELD;
    end else begin
      case (st)
        M_HELD: begin
          conv_ch <= latched_ch;
          cnt     <= 0;
          st      <= (phase == 3'd7) ? M_CONV : M_SYNC;
        end
        M_SYNC: if (phase == 3'd7) st <= M_CONV;
        M_CONV: begin
          cnt <= cnt + 1;
          if (cnt == 63 + int'(extra_clks)) begin
            result      <= code_of(vin_mv[conv_ch]);
            eoc         <= 1'b1;
            eoc_drop    <= 1'b0;
            conversions <= conversions + 1;
            st          <= M_IDLE;
          end
        end
        default: ;
      endcase
    end
  end

  assign data = oe ? result : 8'h00;

endmodule
