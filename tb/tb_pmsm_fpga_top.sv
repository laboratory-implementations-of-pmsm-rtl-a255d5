// tb_pmsm_fpga_top: end-to-end test of pmsm_fpga_top at its default
// parameters (12-bit PWM, RED = FED = 4, 24 MHz).
//
// An AD7276 interface model answers the ADC reads and a Hall generator turns
// an ideal rotor.  The test walks the PWM chain through its three carrier
// modes and the constant-duty source and checks, per PWM period:
//   * exactly one ADC frame is read per period (the done -> OR -> ADC loop);
//   * the gate PWM's high time equals the value the ADC delivered
//     (2^N - D for the up and down carriers, 2*(2^N-1-D)+1 for up/down), or
//     the constant 2048 when the constant source is selected;
//   * the period is 4096 / 4096 / 8190 clocks;
//   * every dead-band output each clock (db_checker, 4-clock delays).
// Meanwhile the observer sees 59.86 Hz Hall signals and must report
// 376 rad/s, then a 1005 rad/s phase that saturates its 12-bit speed output.
// Each mechanism is counted and a failure is counted for any that never
// happened: start pulse, ADC frames, duty reloads, each PWM mode, constant
// duty, rising and falling dead-band delays, Hall transitions, speed
// updates, sector clamping and speed saturation.
module tb_pmsm_fpga_top;
  localparam int P  = 4096;
  localparam int M  = 4095;
  localparam int L1 = 66825;   // 59.86 Hz Hall signals at 24 MHz
  localparam int L2 = 25000;   // 1005 rad/s

  logic clk = 1'b0, pll_locked = 1'b1, rst_n = 1'b1;
  initial begin   // a real reset edge at the start
    #1 rst_n = 1'b0;
    pll_locked = 1'b0;
  end
  logic [1:0] pwm_mode = 2'd0;
  logic duty_from_const = 1'b0;
  logic adc_sdata, adc_sclk, adc_cs_n;
  logic [11:0] adc_value, code = 12'd1000;
  logic [4:0] gate_q, gate_q_n;
  logic [2:0] pwm_done;
  logic [2:0] hall = 3'b100;
  logic signed [11:0] so_sin, so_cos;
  logic [11:0] so_wr, so_freq;
  logic [2:0] so_trans;
  logic so_done;
  logic db_en = 1'b0;
  int checks = 0, failures = 0;

  always #20.833 clk = ~clk;   // 24 MHz

  pmsm_fpga_top dut (.*);
  ad7276_model adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .code(code), .sdata(adc_sdata));
  db_checker chk (.clk, .en(db_en), .q(gate_q), .q_n(gate_q_n), .done_red(pwm_done[1]),
                  .done_fed(pwm_done[0]), .red(4), .fed(4));

  // ------------------------------------------------ mechanism counters
  int n_frames = 0, n_reload = 0, n_const = 0;
  int n_mode[3] = '{0, 0, 0};
  int n_trans = 0, n_so_done = 0, n_clamp = 0, n_sat = 0, n_start = 0;

  // sector clamping seen from outside: while the rotor turns, the rotated
  // sin/cos outputs stand still for many clocks only when the estimate is
  // held at a sector bound (at these speeds they change every few tens of
  // clocks otherwise)
  logic signed [11:0] sin_last = '0, cos_last = '0;
  int still = 0;
  always @(posedge clk) if (rst_n) begin
    if (|so_trans) n_trans++;
    if (so_done) n_so_done++;
    if (so_wr == 12'd2047) n_sat++;
    if (so_sin == sin_last && so_cos == cos_last && so_wr != 0 && so_trans == 0) still++;
    else still = 0;
    if (still == 1000) n_clamp++;
    sin_last <= so_sin;
    cos_last <= so_cos;
  end

  // ------------------------------------------------ per-period measurement
  int since_done = -1, high_cnt = 0, frames_in_period = 0, meas_periods = 0;
  int exp_high = -1, exp_period = -1;
  logic done_prev = 1'b0, cs_prev = 1'b1;
  int frame_code_q[$];

  always @(negedge clk) begin
    if (since_done >= 0) since_done++;
    if (!adc_cs_n && cs_prev) begin
      n_frames++;
      frames_in_period++;
      if (!done_prev) n_start++;       // a read not launched by a period end
    end
    if (adc_cs_n && !cs_prev) n_reload++;
    if (pwm_done[2] && !done_prev) begin
      if (exp_high >= 0 && since_done >= 0) begin
        checks += 3;
        if (high_cnt != exp_high) begin
          failures++; $display("mode %0d: high %0d exp %0d", pwm_mode, high_cnt, exp_high);
        end
        if (since_done != exp_period) begin
          failures++; $display("mode %0d: period %0d exp %0d", pwm_mode, since_done, exp_period);
        end
        if (frames_in_period != 1) begin
          failures++; $display("%0d ADC frames in one PWM period", frames_in_period);
        end
        meas_periods++;
      end
      since_done = 0;
      high_cnt = 0;
      frames_in_period = 0;
    end
    if (gate_q[0]) high_cnt++;
    done_prev = pwm_done[2];
    cs_prev = adc_cs_n;
  end

  // ------------------------------------------------ Hall generator
  int sector = 0;
  bit hall_run = 1'b0;
  int hall_L = L1;
  int hall_edges = 0;
  initial begin
    forever begin
      @(negedge clk iff hall_run);
      repeat (hall_L - 1) @(negedge clk);
      sector = (sector + 1) % 6;
      case (sector)
        0: hall = 3'b100; 1: hall = 3'b110; 2: hall = 3'b010;
        3: hall = 3'b011; 4: hall = 3'b001; default: hall = 3'b101;
      endcase
      hall_edges++;
    end
  end

  initial begin : watchdog
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk.checks, failures + chk.failures);
    $finish;
  end

  // wait for the next PWM period boundary, then step past the monitors
  task automatic wait_done();
    @(posedge pwm_done[2]);
    @(negedge clk);
    #1;
  endtask

  // run one mode for `n` measured periods with ADC code `c`
  task automatic run_mode(int mode, bit use_const, int c, int n);
    int d;
    db_en = 1'b0;
    exp_high = -1;
    wait_done();
    // the frame of this period already started: the new code is read at
    // the next boundary and is the duty of the period after it
    pwm_mode = 2'(mode);
    duty_from_const = use_const;
    code = 12'(c);
    d = use_const ? 2048 : c;
    wait_done();
    wait_done();
    checks++;
    if (adc_value != 12'(c)) begin failures++; $display("ADC read %0d exp %0d", adc_value, c); end
    exp_high   = (mode >= 2) ? 2 * (M - d) + 1 : P - d;
    exp_period = (mode >= 2) ? 2 * M : P;
    db_en = 1'b1;
    repeat (n) begin
      wait_done();
      if (use_const) n_const++; else n_mode[mode > 2 ? 2 : mode]++;
    end
    db_en = 1'b0;
    exp_high = -1;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    repeat (20) @(posedge clk);
    checks += 2;
    if (n_frames != 0) begin failures++; $display("ADC read before PLL lock"); end
    if (gate_q !== 5'b0) begin failures++; $display("gates active before PLL lock"); end
    pll_locked <= 1'b1;
    repeat (12) @(posedge clk);
    checks++;
    if (n_frames != 1) begin failures++; $display("start pulse did not launch one ADC read (%0d)", n_frames); end
    hall_run = 1'b1;

    run_mode(0, 1'b0, $urandom_range(100, 3900), 4);   // up counter
    run_mode(1, 1'b0, $urandom_range(100, 3900), 4);   // down counter
    run_mode(2, 1'b0, $urandom_range(100, 3900), 3);   // up/down counter
    run_mode(0, 1'b1, $urandom_range(100, 3900), 3);   // constant duty
    run_mode(3, 1'b0, $urandom_range(100, 3900), 2);   // mode 3 is up/down too

    // observer at 59.86 Hz: at least four full sectors measured
    wait (hall_edges >= 5);
    repeat (10) @(negedge clk);
    checks++;
    if ((so_wr >> 2) != 12'd376) begin failures++; $display("speed %0d rad/s, exp 376", so_wr >> 2); end
    checks++;
    if (so_freq < 12'd238 || so_freq > 12'd240) begin
      failures++; $display("frequency %0d/4 Hz, exp 59.86", so_freq);
    end
    hall_L = L2;
    wait (hall_edges >= 8);
    repeat (10) @(negedge clk);
    checks++;
    if (so_wr != 12'd2047) begin failures++; $display("speed not saturated at 1005 rad/s: %0d", so_wr); end
    // slow down: the estimate runs ahead and is held at the sector bounds
    hall_L = 80000;
    wait (hall_edges >= 10);
    repeat (10) @(negedge clk);

    checks += 13;
    if (n_start != 1)       begin failures++; $display("reads from the start pulse: %0d", n_start); end
    if (n_frames < 10)      begin failures++; $display("ADC frames: %0d", n_frames); end
    if (n_reload < 10)      begin failures++; $display("duty reloads: %0d", n_reload); end
    if (n_mode[0] == 0)     begin failures++; $display("up mode never ran"); end
    if (n_mode[1] == 0)     begin failures++; $display("down mode never ran"); end
    if (n_mode[2] == 0)     begin failures++; $display("up/down mode never ran"); end
    if (n_const == 0)       begin failures++; $display("constant duty never used"); end
    if (chk.rises == 0)     begin failures++; $display("no rising dead-band delay seen"); end
    if (chk.falls == 0)     begin failures++; $display("no falling dead-band delay seen"); end
    if (n_trans != hall_edges) begin failures++; $display("transitions %0d for %0d edges", n_trans, hall_edges); end
    if (n_so_done != hall_edges - 1) begin failures++; $display("speed updates %0d for %0d edges", n_so_done, hall_edges); end
    if (n_clamp == 0)       begin failures++; $display("sector clamp never happened"); end
    if (n_sat == 0)         begin failures++; $display("speed saturation never happened"); end
    $display("start=%0d frames=%0d reloads=%0d up=%0d dn=%0d updn=%0d const=%0d db_rises=%0d db_falls=%0d trans=%0d so_done=%0d clamp=%0d sat=%0d periods=%0d",
             n_start, n_frames, n_reload, n_mode[0], n_mode[1], n_mode[2], n_const, chk.rises,
             chk.falls, n_trans, n_so_done, n_clamp, n_sat, meas_periods);
    checks   += chk.checks;
    failures += chk.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
