// lcd_ctrl_tb: runs the LCD controller against a behavioural 16x2 LCD that
// checks the write-cycle timing and busy times.
//
// Shortened timings (power-up 60, command 6, clear 40 clocks) keep the run
// short; the LCD model uses the same minimums and counts any breach.
// Checked:
//   * the init writes are 38h, 0Ch, 01h, 06h as commands, then ready;
//   * each update writes 80h (command), the MSB digit and the LSB digit
//     (data), and the first two characters of line 1 are then the hex
//     digits of the sample, looked up in "0123456789ABCDEF";
//   * an update takes 2 + 3 x (1 + T_AS + T_PW + T_AH + T_EXEC) clocks from
//     the sample strobe to update_done;
//   * samples arriving during an update: only the newest is shown next;
//   * a sample given before init has finished is shown after init;
//   * no timing violation in the LCD model.
module lcd_ctrl_tb;
  import daq_pkg::*;
  localparam int unsigned PWR = 60, EXE = 6, CLR = 40;
  localparam int unsigned W = 1 + 1 + 1 + 1 + EXE;   // one bus write

  logic       clk = 0;
  logic       rst;
  logic [7:0] sample;
  logic       sample_valid;
  lcd_pins_t  lcd;
  logic       ready, busy, update_done;
  logic [7:0] shown;
  logic [7:0] line1 [16];
  int unsigned violations, n_cmd, n_data, n_clear;
  logic        display_on, two_line_8bit;

  int checks = 0, failures = 0;
  int cycle = 0;
  logic [8:0] wlog [$];   // {rs, d} of every write, at E falling
  logic e_q = 0;
  int drops = 0;
  string digits = "0123456789ABCDEF";

  lcd_ctrl #(.T_POWERUP(PWR), .T_EXEC(EXE), .T_CLEAR(CLR)) dut (
    .clk(clk), .rst(rst), .sample(sample), .sample_valid(sample_valid),
    .lcd(lcd), .ready(ready), .busy(busy), .shown(shown), .update_done(update_done));

  lcd_model #(.TAS(1), .TPW(1), .TAH(1), .EXEC(EXE), .CLEAR(CLR), .POWERUP(PWR)) lcdm (
    .clk(clk), .rs(lcd.rs), .rw(lcd.rw), .e(lcd.e), .d(lcd.d),
    .line1(line1), .violations(violations), .n_cmd(n_cmd), .n_data(n_data),
    .n_clear(n_clear), .display_on(display_on), .two_line_8bit(two_line_8bit));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    e_q   <= lcd.e;
    if (!rst && e_q && !lcd.e) wlog.push_back({lcd.rs, lcd.d});
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  task automatic expect_write(input logic rs, input logic [7:0] d, input string what);
    logic [8:0] w;
    checks++;
    if (wlog.size() == 0) begin
      fail({what, ": no write"});
      return;
    end
    w = wlog.pop_front();
    if (w !== {rs, d}) fail($sformatf("%s: write rs=%0b d=%h, expected rs=%0b d=%h",
                                      what, w[8], w[7:0], rs, d));
  endtask

  task automatic expect_display(input logic [7:0] v);
    expect_write(1'b0, 8'h80, "cursor");
    expect_write(1'b1, digits[v / 16], "MSB digit");
    expect_write(1'b1, digits[v % 16], "LSB digit");
    checks++;
    if (line1[0] !== digits[v / 16] || line1[1] !== digits[v % 16])
      fail($sformatf("display shows %c%c, expected %02h", line1[0], line1[1], v));
    checks++;
    if (line1[2] !== 8'h20) fail("rest of line not blank");
  endtask

  task automatic strobe(input logic [7:0] v);
    @(negedge clk);
    sample = v; sample_valid = 1'b1;
    @(negedge clk);
    sample_valid = 1'b0;
  endtask

  initial begin
    int t0, lat;
    logic [7:0] v;
    rst = 1; sample = 0; sample_valid = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // a sample before the display is ready
    strobe(8'h5A);
    @(posedge clk iff ready);
    expect_write(1'b0, 8'h38, "function set");
    expect_write(1'b0, 8'h0C, "display on");
    expect_write(1'b0, 8'h01, "clear");
    expect_write(1'b0, 8'h06, "entry mode");
    checks++;
    if (!display_on || !two_line_8bit || n_clear != 1) fail("LCD not initialised");
    @(posedge clk iff update_done);
    @(negedge clk);
    expect_display(8'h5A);

    // single updates with latency check
    for (int i = 0; i < 20; i++) begin
      v = (i == 0) ? 8'h3F : 8'($urandom);
      @(negedge clk);
      sample = v; sample_valid = 1'b1;
      t0 = cycle;
      @(negedge clk);
      sample_valid = 1'b0;
      @(posedge clk iff update_done);
      lat = cycle - t0;
      @(negedge clk);
      checks++;
      if (lat != 2 + 3 * W) fail($sformatf("update took %0d clocks, expected %0d", lat, 2 + 3 * W));
      expect_display(v);
      repeat ($urandom_range(5, 0)) @(negedge clk);
    end

    // bursts: several samples during one update, the newest is shown next
    for (int i = 0; i < 5; i++) begin
      logic [7:0] first, mid, last;
      first = 8'($urandom); mid = 8'($urandom); last = 8'($urandom);
      strobe(first);
      repeat (3) @(negedge clk);
      strobe(mid);          // arrives while 'first' is being written
      repeat (W) @(negedge clk);
      strobe(last);         // replaces 'mid' before it was taken
      drops++;
      @(posedge clk iff update_done);
      @(negedge clk);
      expect_display(first);
      @(posedge clk iff update_done);
      @(negedge clk);
      expect_display(last);
      checks++;
      if (shown != last) fail("shown value wrong");
    end
    repeat (3 * W + 5) @(negedge clk);
    checks++;
    if (busy || wlog.size() != 0) fail("extra writes after the last update");
    checks++;
    if (violations != 0) fail($sformatf("%0d LCD timing violations", violations));
    $display("updates with dropped samples: %0d", drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
