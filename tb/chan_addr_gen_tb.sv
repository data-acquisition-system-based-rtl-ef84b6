// chan_addr_gen_tb: checks the ADC channel address generator.
// Scan mode: after reset the address is 0 and each advance strobe steps it
// 0,1,...,7,0,...; clocks without a strobe leave it alone. Fixed mode: the
// address follows fixed_ch one clock later and advance strobes are ignored.
// The reference is a plain integer modulo 8.
module chan_addr_gen_tb;
  logic       clk = 0;
  logic       rst, scan_en, advance;
  logic [2:0] fixed_ch, addr;
  int checks = 0, failures = 0;
  int expected;
  int wraps = 0;

  chan_addr_gen dut (.clk(clk), .rst(rst), .scan_en(scan_en),
                     .fixed_ch(fixed_ch), .advance(advance), .addr(addr));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_addr(input int e, input string what);
    checks++;
    if (int'(addr) != e) begin
      failures++;
      $display("FAIL %s: addr=%0d expected %0d", what, addr, e);
    end
  endtask

  initial begin
    rst = 1; scan_en = 1; advance = 0; fixed_ch = 3'd5;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    expected = 0;
    expect_addr(expected, "after reset");
    for (int i = 0; i < 40; i++) begin
      advance = 1'b1;
      @(negedge clk);
      advance = 1'b0;
      expected = (expected + 1) % 8;
      if (expected == 0) wraps++;
      expect_addr(expected, "scan step");
      repeat ($urandom_range(3, 0)) @(negedge clk);
      expect_addr(expected, "scan idle");
    end
    checks++;
    if (wraps < 2) begin failures++; $display("FAIL scan never wrapped"); end
    // fixed channel
    scan_en = 1'b0;
    for (int i = 0; i < 20; i++) begin
      fixed_ch = 3'($urandom);
      advance  = 1'($urandom);
      @(negedge clk);
      expect_addr(int'(fixed_ch), "fixed");
    end
    advance = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
