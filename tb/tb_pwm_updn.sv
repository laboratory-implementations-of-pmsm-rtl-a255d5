// tb_pwm_updn: self-checking test of pwm_updn at its default width (N = 12).
//
// For clock dividers 0, 1 and 3 and random duty values D (64..4032) it
// checks: done rises every 2*(2^N-1)*(div+1) clocks and stays high for div+1
// clocks; Q is high for (2*(2^N-1-D)+1)*(div+1) clocks per period; Q rises
// (D-1)*(div+1)+1 clocks after done; and every dead-band output each clock
// (db_checker).
module tb_pwm_updn;
  localparam int N = 12;
  localparam int M = (1 << N) - 1;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  initial #1 rst_n = 1'b0;   // a real reset edge at the start
  logic [N-1:0] duty = '0;
  logic [3:0] red = 4'd4, fed = 4'd4;
  logic [7:0] clk_div = 8'd0;
  logic [4:0] q, q_n;
  logic done, done_red, done_fed;
  logic en = 1'b0;
  int checks = 0, failures = 0;
  int cur_d = 0, div = 0;
  int since_done = -1, high_cnt = 0, periods = 0, done_len = 0;
  logic q0_prev = 1'b0, done_prev = 1'b0;

  always #5 clk = ~clk;

  pwm_updn dut (.clk, .rst_n, .start, .duty, .red, .fed, .clk_div, .q, .q_n,
                         .done, .done_red, .done_fed);
  db_checker chk (.clk, .en, .q, .q_n, .done_red, .done_fed, .red(int'(red)), .fed(int'(fed)));

  always @(negedge clk) if (rst_n) begin
    if (since_done >= 0) since_done++;
    if (done) done_len++;
    if (!done && done_prev && en) begin
      checks++;
      if (done_len != div + 1) begin failures++; $display("done high %0d exp %0d", done_len, div + 1); end
    end
    if (!done) done_len = 0;
    if (q[0] && !q0_prev && en) begin
      checks++;
      if (since_done != (cur_d - 1) * (div + 1) + 1) begin
        failures++; $display("Q rose %0d after done, exp %0d", since_done, (cur_d - 1) * (div + 1) + 1);
      end
    end
    if (done && !done_prev) begin
      if (since_done >= 0 && en) begin
        checks += 2;
        if (since_done != 2 * M * (div + 1)) begin
          failures++; $display("period %0d exp %0d", since_done, 2 * M * (div + 1));
        end
        if (high_cnt != (2 * (M - cur_d) + 1) * (div + 1)) begin
          failures++; $display("Q high %0d exp %0d", high_cnt, (2 * (M - cur_d) + 1) * (div + 1));
        end
        periods++;
      end
      since_done = 0;
      high_cnt = 0;
    end
    if (q[0]) high_cnt++;
    q0_prev = q[0];
    done_prev = done;
  end

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < 9; s++) begin
      en <= 1'b0;
      @(negedge clk iff (done && !done_prev));
      div     = (s < 3) ? 0 : (s < 6) ? 1 : 3;
      clk_div <= 8'(div);
      cur_d   = $urandom_range(64, M - 64);
      @(posedge clk);
      start <= 1'b1; duty <= N'(cur_d);
      red <= 4'($urandom_range(1, 13)); fed <= 4'($urandom_range(1, 13));
      @(posedge clk);
      start <= 1'b0;
      @(negedge clk iff (done && !done_prev));
      since_done = 0; high_cnt = 0;
      en <= 1'b1;
      repeat (2) @(negedge clk iff (done && !done_prev));
    end
    checks   += chk.checks;
    failures += chk.failures;
    checks++;
    if (periods < 15) begin failures++; $display("only %0d periods checked", periods); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
