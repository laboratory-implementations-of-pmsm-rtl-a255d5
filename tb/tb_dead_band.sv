// tb_dead_band: self-checking test of dead_band.
//
// Drives the comparison input with random high/low stretches of 20..80
// clocks for several random RED/FED settings (1..13) and checks every output
// each clock against the window rules of db_checker.  It also checks that the
// original PWM Q is the compare input delayed by one clock.
module tb_dead_band;
  logic clk = 1'b0, rst_n = 1'b1, cmp = 1'b0;
  initial #1 rst_n = 1'b0;   // a real reset edge at the start
  logic [3:0] red = 4'd4, fed = 4'd4;
  logic [4:0] q;
  logic done_red, done_fed;
  logic en = 1'b0;
  int checks = 0, failures = 0;
  logic cmp_d;

  always #5 clk = ~clk;

  dead_band dut (.clk, .rst_n, .cmp, .red, .fed, .q, .done_red, .done_fed);
  db_checker chk (.clk, .en, .q, .q_n(~q), .done_red, .done_fed, .red(int'(red)), .fed(int'(fed)));

  // Q is cmp registered
  always @(posedge clk) cmp_d <= cmp;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (q[0] !== cmp_d) begin failures++; $display("Q %0b exp %0b", q[0], cmp_d); end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < 8; s++) begin
      en  <= 1'b0;
      red <= 4'($urandom_range(1, 13));
      fed <= 4'($urandom_range(1, 13));
      for (int p = 0; p < 40; p++) begin
        cmp <= 1'b1;
        repeat ($urandom_range(20, 80)) @(posedge clk);
        cmp <= 1'b0;
        repeat ($urandom_range(20, 80)) @(posedge clk);
        if (p == 1) en <= 1'b1;
      end
    end
    checks   += chk.checks;
    failures += chk.failures;
    checks++;
    if (chk.rises < 300) begin failures++; $display("too few pulses: %0d", chk.rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
