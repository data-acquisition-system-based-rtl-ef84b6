// lcd_model: behavioural model of a 16x2 character LCD with an HD44780-style
// controller on an 8-bit write bus, for simulation only.
//
// It executes the write-side instructions a driver uses here: clear (01h),
// entry mode (04h-07h, increment bit), display on/off (08h-0Fh), function
// set (20h-3Fh) and set DDRAM address (80h-FFh); data writes store a
// character at the address counter and step it. Line 1 (addresses 00h-0Fh)
// is brought out as line1.
//
// It also checks the bus timing, counted in clk periods, and counts each
// breach in violations:
//   RS and D stable for at least TAS clocks before E rises; RS, D stable
//   while E is high and for TAH clocks after E falls; E high at least TPW
//   clocks; R/W low (write) when E rises; no E pulse before POWERUP clocks
//   have passed or while the previous instruction is still executing
//   (EXEC clocks, CLEAR clocks after clear). The first two clocks are
//   ignored: the driver's pins are undefined until it has been reset.
module lcd_model #(
  parameter int unsigned TAS     = 1,
  parameter int unsigned TPW     = 1,
  parameter int unsigned TAH     = 1,
  parameter int unsigned EXEC    = 20,
  parameter int unsigned CLEAR   = 820,
  parameter int unsigned POWERUP = 7500
) (
  input  logic        clk,
  input  logic        rs,
  input  logic        rw,
  input  logic        e,
  input  logic [7:0]  d,
  output logic [7:0]  line1 [16],
  output int unsigned violations,
  output int unsigned n_cmd,
  output int unsigned n_data,
  output int unsigned n_clear,
  output logic        display_on,
  output logic        two_line_8bit
);

  logic [7:0]  ddram [128];
  logic [6:0]  ac        = '0;
  logic        inc       = 1'b1;
  logic        e_q       = 1'b0;
  logic        rs_q      = 1'b0;
  logic [7:0]  d_q       = '0;
  int unsigned stable    = 0;
  int unsigned width     = 0;
  int unsigned hold_left = 0;
  int unsigned busy      = 0;
  int unsigned age       = 0;

  initial begin
    for (int i = 0; i < 128; i++) ddram[i] = 8'h20;
    violations    = 0;
    n_cmd         = 0;
    n_data        = 0;
    n_clear       = 0;
    display_on    = 1'b0;
    two_line_8bit = 1'b0;
  end

  always_comb for (int i = 0; i < 16; i++) line1[i] = ddram[i];

  always @(posedge clk) begin
    automatic logic changed = (rs != rs_q) || (d != d_q);
    e_q  <= e;
    rs_q <= rs;
    d_q  <= d;
    age  <= age + 1;
    if (busy > 0) busy <= busy - 1;
    stable <= changed ? 1 : stable + 1;
    if (hold_left > 0 && age >= 2) begin
      hold_left <= hold_left - 1;
      if (changed) begin
        violations <= violations + 1;
        $display("lcd_model: RS/D changed within hold time");
      end
    end

    if (age < 2) begin
      // pins are undefined until the driver has seen its first reset clock
    end else if (e && !e_q) begin
      width <= 1;
      if (stable < TAS || changed) begin
        violations <= violations + 1;
        $display("lcd_model: address set-up too short (%0d)", stable);
      end
      if (rw) begin
        violations <= violations + 1;
        $display("lcd_model: read cycle not expected");
      end
      if (busy > 0 || age < POWERUP) begin
        violations <= violations + 1;
        $display("lcd_model: E pulse while busy (busy=%0d age=%0d)", busy, age);
      end
    end else if (e && e_q) begin
      width <= width + 1;
      if (changed) begin
        violations <= violations + 1;
        $display("lcd_model: RS/D changed while E high");
      end
    end else if (!e && e_q) begin
      // falling edge of E: the write takes place
      if (width < TPW) begin
        violations <= violations + 1;
        $display("lcd_model: E pulse too short");
      end
      hold_left <= TAH;
      if (changed) violations <= violations + 1;
      if (rs_q) begin
        ddram[ac] <= d_q;
        ac        <= inc ? ac + 1'b1 : ac - 1'b1;
        n_data    <= n_data + 1;
        busy      <= EXEC;
      end else begin
        n_cmd <= n_cmd + 1;
        busy  <= EXEC;
        if (d_q == 8'h01) begin
          for (int i = 0; i < 128; i++) ddram[i] <= 8'h20;
          ac      <= '0;
          n_clear <= n_clear + 1;
          busy    <= CLEAR;
        end else if (d_q[7]) begin
          ac <= d_q[6:0];
        end else if (d_q[7:5] == 3'b001) begin
          two_line_8bit <= d_q[4] && d_q[3];
        end else if (d_q[7:3] == 5'b00001) begin
          display_on <= d_q[2];
        end else if (d_q[7:2] == 6'b000001) begin
          inc <= d_q[1];
        end
      end
    end
  end

endmodule
