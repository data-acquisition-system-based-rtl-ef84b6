// chan_addr_gen: address generator for the ADC's analog input multiplexer.
//
// In scan mode (scan_en = 1) it is a binary counter that steps through the
// channels 0, 1, ..., N_CH-1, 0, ... one step per completed conversion
// (advance strobe), the cyclic scan the system names as the simplest way to
// address the multiplexer. With scan_en = 0 it holds the channel given on
// fixed_ch, which is how a single monitored input (the power supply) is
// read. The fixed-channel input, reset to channel 0 and the counter width
// are this design's choices.
//
// Interface: clk, rst (synchronous, active high), scan_en, fixed_ch,
// advance (one-cycle strobe); addr is registered and changes one clock
// after advance (scan mode) or after fixed_ch changes (fixed mode).
module chan_addr_gen #(
  parameter int unsigned N_CH = 8,
  parameter int unsigned AW   = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          scan_en,
  input  logic [AW-1:0] fixed_ch,
  input  logic          advance,
  output logic [AW-1:0] addr
);

  localparam logic [AW-1:0] LAST = AW'(N_CH - 1);

  always_ff @(posedge clk) begin
    if (rst)
      addr <= '0;
    else if (!scan_en)
      addr <= fixed_ch;
    else if (advance)
      addr <= (addr >= LAST) ? '0 : addr + 1'b1;
  end

endmodule
