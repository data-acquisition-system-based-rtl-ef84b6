// digit_mux: the display multiplexer. It splits an 8-bit sample into its
// most significant and least significant 4-bit halves and passes the one
// chosen by sel, converted to ASCII, to the LCD data path.
//
// The split into an MSB nibble and an LSB nibble followed by a multiplexer
// is the system's structure; selecting the nibble before the hex-to-ASCII
// conversion, so that only one converter is needed, is this design's choice.
//
// Interface: sample[7:0], sel (DIGIT_MSB / DIGIT_LSB) in; ascii[7:0] out.
// Combinational.
module digit_mux
  import daq_pkg::*;
(
  input  logic [7:0]  sample,
  input  digit_sel_t  sel,
  output logic [7:0]  ascii
);

  logic [3:0] nibble;

  always_comb begin
    unique case (sel)
      DIGIT_MSB: nibble = sample[7:4];
      DIGIT_LSB: nibble = sample[3:0];
    endcase
  end

  hex2ascii u_hex2ascii (
    .nibble (nibble),
    .ascii  (ascii)
  );

endmodule
