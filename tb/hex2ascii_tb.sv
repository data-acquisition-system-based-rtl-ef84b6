// hex2ascii_tb: exhaustive check of the hex-digit to ASCII converter.
// Every nibble 0..F is applied; the expected code is the character at that
// position of the string "0123456789ABCDEF", so the reference does not share
// the arithmetic of the design.
module hex2ascii_tb;
  logic [3:0] nibble;
  logic [7:0] ascii;
  int checks = 0, failures = 0;
  string digits = "0123456789ABCDEF";

  hex2ascii dut (.nibble(nibble), .ascii(ascii));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      nibble = 4'(i);
      #1;
      checks++;
      if (ascii !== digits[i]) begin
        failures++;
        $display("FAIL nibble %h: got %h expected %h", nibble, ascii, digits[i]);
      end
    end
    // two codes printed in the ASCII table: '0' = 30h, 'F' = 46h
    nibble = 4'h0; #1; checks++; if (ascii != 8'h30) failures++;
    nibble = 4'hF; #1; checks++; if (ascii != 8'h46) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
