// hex2ascii: converts one hexadecimal digit to the ASCII code of its character.
//
// The LCD shows characters, so each 4-bit half of an ADC sample is turned into
// the code of '0'..'9' (30..39 hex) or 'A'..'F' (41..46 hex), the upper-case
// letters of the standard ASCII table. The choice of upper case is this
// design's; the conversion itself is the system's.
//
// Interface: nibble[3:0] in, ascii[7:0] out. Purely combinational, no clock.
module hex2ascii (
  input  logic [3:0] nibble,
  output logic [7:0] ascii
);

  always_comb begin
    if (nibble < 4'd10)
      ascii = 8'h30 + {4'h0, nibble};          // '0' + n
    else
      ascii = 8'h41 + {4'h0, nibble} - 8'd10;  // 'A' + (n - 10)
  end

endmodule
