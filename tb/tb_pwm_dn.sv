// tb_pwm_dn: self-checking test of pwm_dn at its default width (N = 12).
//
// For several random duty values D (64..4032) and dead-band settings it
// checks: the done pulse repeats every 2^N clocks; Q is high for exactly
// 2^N - D clocks of each period; Q falls 2^N+1-D clocks after done (the counter
// drops below D); and every dead-band output each clock (db_checker).  A new
// start strobe reloads D mid-run.
module tb_pwm_dn;
  localparam int N = 12;
  localparam int P = 1 << N;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  initial #1 rst_n = 1'b0;   // a real reset edge at the start
  logic [N-1:0] duty = '0;
  logic [3:0] red = 4'd4, fed = 4'd4;
  logic [4:0] q, q_n;
  logic done, done_red, done_fed;
  logic en = 1'b0;
  int checks = 0, failures = 0;
  int cur_d = 0;
  int since_done = -1, high_cnt = 0, periods = 0;
  logic q0_prev = 1'b0;

  always #5 clk = ~clk;

  pwm_dn dut (.clk, .rst_n, .start, .duty, .red, .fed, .q, .q_n,
                       .done, .done_red, .done_fed);
  db_checker chk (.clk, .en, .q, .q_n, .done_red, .done_fed, .red(int'(red)), .fed(int'(fed)));

  always @(negedge clk) if (rst_n) begin
    if (since_done >= 0) since_done++;
    if (!q[0] && q0_prev && en) begin
      checks++;
      if (since_done != P + 1 - cur_d) begin
        failures++; $display("Q fell %0d clocks after done, exp %0d", since_done, P + 1 - cur_d);
      end
    end
    if (done) begin
      if (since_done >= 0 && en) begin
        checks += 2;
        if (since_done != P) begin failures++; $display("period %0d exp %0d", since_done, P); end
        if (high_cnt != P - cur_d) begin failures++; $display("Q high %0d exp %0d", high_cnt, P - cur_d); end
        periods++;
      end
      since_done = 0;
      high_cnt = 0;
    end
    if (q[0]) high_cnt++;
    q0_prev = q[0];
  end

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures);
    $finish;
  end

  task automatic load(int d, int r, int f);
    @(posedge clk);
    start <= 1'b1; duty <= N'(d); red <= 4'(r); fed <= 4'(f);
    @(posedge clk);
    start <= 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < 10; s++) begin
      en <= 1'b0;
      // load right after a done pulse so the period in progress is clean
      @(negedge clk iff done);
      cur_d = $urandom_range(64, P - 64);
      load(cur_d, $urandom_range(1, 13), $urandom_range(1, 13));
      @(negedge clk iff done);
      en <= 1'b1;
      repeat (3) @(negedge clk iff done);
    end
    checks   += chk.checks;
    failures += chk.failures;
    checks++;
    if (periods < 25) begin failures++; $display("only %0d periods checked", periods); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
