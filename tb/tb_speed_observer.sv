// tb_speed_observer: self-checking test of speed_observer.
//
// A Hall pattern generator turns an ideal rotor forward at constant speed,
// advancing one 60-degree sector every L clocks (sector centres 0, pi/3, ...
// for states 100, 110, 010, 011, 001, 101).  Checked against real-valued
// arithmetic worked out here:
//   * before start: the sector-centre initial conditions for all six states,
//     speed zero;
//   * each edge: the matching transition strobe, the exact sin/cos of the
//     edge angle two clocks after the Hall change, and the done pulse;
//   * speed: w = (pi/3)*24e6/L on the 12-bit Q10.2 output (within one LSB,
//     saturating at 511.75) and f = w/(2pi); the 59.86 Hz case of the
//     original experiment must read 376 rad/s in its integer part;
//   * between edges: sin/cos of theta_rh against the ideal rotation from the
//     edge angle at the measured speed, allowing one fixed-point LSB of
//     truncation per integration step, and never outside the sector bounds;
//   * sin/cos of theta_r against the 26-degree rotation of the internal
//     estimate, within one output LSB;
//   * an invalid Hall state (111) freezes the angle.
module tb_speed_observer;
  import pmsm_pkg::*;

  localparam real F    = 24.0e6;
  localparam real PI   = 3.14159265358979323846;
  localparam real LSB  = 1.0 / 16777216.0;
  localparam real PHI  = 26.0 * PI / 180.0;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  initial #1 rst_n = 1'b0;   // a real reset edge at the start
  logic [2:0] hall = 3'b100;
  logic signed [11:0] sin_out, cos_out;
  logic [11:0] wr_out, freq_out;
  logic [2:0] trans;
  logic done;
  angle_t sin_rh, cos_rh;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  speed_observer dut (.clk, .rst_n, .start, .hall, .sin_out, .cos_out, .wr_out,
                      .freq_out, .trans, .done, .sin_rh, .cos_rh);

  function automatic logic [2:0] sector_hall(int j);
    case (((j % 6) + 6) % 6)
      0: return 3'b100;
      1: return 3'b110;
      2: return 3'b010;
      3: return 3'b011;
      4: return 3'b001;
      default: return 3'b101;
    endcase
  endfunction

  function automatic real to_r(angle_t v);
    return real'(v) * LSB;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic expect_near(string what, real got, real exp, real tol);
    checks++;
    if (absr(got - exp) > tol) begin
      failures++;
      $display("%s: got %f exp %f (tol %g) at %0t", what, got, exp, tol, $time);
    end
  endtask

  function automatic real sat_q11(real v);
    if (v > 2047.0 / 2048.0) return 2047.0 / 2048.0;
    if (v < -1.0) return -1.0;
    return v;
  endfunction

  // ---- output rotation check, every clock (sin_out lags the estimate by one)
  real s_prev = 0.0, c_prev = 1.0;
  bit  rot_en = 1'b0;
  always @(negedge clk) begin
    if (rot_en) begin
      expect_near("sin(theta_r)", real'(sin_out) / 2048.0,
                  sat_q11(s_prev * $cos(PHI) + c_prev * $sin(PHI)), 1.5 / 2048.0);
      expect_near("cos(theta_r)", real'(cos_out) / 2048.0,
                  sat_q11(c_prev * $cos(PHI) - s_prev * $sin(PHI)), 1.5 / 2048.0);
    end
    s_prev = to_r(sin_rh);
    c_prev = to_r(cos_rh);
  end

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   sector;
  int   edges = 0, dones = 0, saturations = 0, clamps = 0;
  real  w_meas = 0.0;       // speed the observer should be using
  int   L_last = 0;         // length of the sector just completed

  // run `n` sectors of L clocks each, checking every clock
  task automatic run_sectors(int n, int L);
    for (int e = 0; e < n; e++) begin
      logic [2:0] h_old, h_new;
      real th_edge, w_prev;
      bounds_t b;
      h_old = sector_hall(sector);
      sector++;
      h_new = sector_hall(sector);
      th_edge = PI / 6.0 + real'(sector - 1) * PI / 3.0;
      @(negedge clk);
      hall = h_new;
      // edge registered at the next clock, detected one clock later
      @(negedge clk);
      @(negedge clk);
      checks++;
      if (trans != {h_old[2] ^ h_new[2], h_old[1] ^ h_new[1], h_old[0] ^ h_new[0]}) begin
        failures++; $display("trans %b for %b -> %b", trans, h_old, h_new);
      end
      expect_near("sin(edge)", to_r(sin_rh), $sin(th_edge), 1.0e-7);
      expect_near("cos(edge)", to_r(cos_rh), $cos(th_edge), 1.0e-7);
      if (edges > 0) begin
        checks++;
        if (!done) begin failures++; $display("no done pulse two clocks after the edge"); end
        dones += done;
      end else begin
        checks++;
        if (done) begin failures++; $display("done on the arming edge"); end
      end
      w_prev = w_meas;
      if (edges > 0) w_meas = (PI / 3.0) * F / real'(L_last);
      L_last = L;
      edges++;
      // speed outputs settle one clock after the edge values
      @(negedge clk);
      if (edges > 1) begin
        real wq, fq;
        wq = w_meas * 4.0;  if (wq > 2047.0) begin wq = 2047.0; saturations++; end
        fq = w_meas / (2.0 * PI) * 4.0; if (fq > 2047.0) fq = 2047.0;
        expect_near("wr_out", real'(wr_out), wq, 1.01);
        expect_near("freq_out", real'(freq_out), fq, 1.01);
      end
      // between edges: ideal rotation at the measured speed
      b = hall_bounds(h_new);
      for (int k = 2; k < L - 2; k++) begin
        real th, ds, dc;
        @(negedge clk);
        // k-th step after the edge load; the first uses the previous speed
        th = th_edge + (w_prev + real'(k - 1) * w_meas) / F;
        ds = $sin(th); dc = $cos(th);
        checks++;
        if (sin_rh > b.max_s || sin_rh < b.min_s || cos_rh > b.max_c || cos_rh < b.min_c) begin
          failures++; $display("estimate outside sector bounds");
        end
        if (sin_rh == b.max_s || sin_rh == b.min_s || cos_rh == b.max_c || cos_rh == b.min_c)
          clamps++;
        // compare only while the ideal angle is inside the sector
        if (th < th_edge + PI / 3.0 - 0.01 && (k % 97) == 0) begin
          expect_near("sin(theta_rh)", to_r(sin_rh), ds, 1.2 * real'(k) * LSB + 2.0e-4);
          expect_near("cos(theta_rh)", to_r(cos_rh), dc, 1.2 * real'(k) * LSB + 2.0e-4);
        end
      end
    end
  endtask

  initial begin
    int j0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // initial conditions for every valid state, before start
    for (int j = 0; j < 6; j++) begin
      @(negedge clk);
      hall = sector_hall(j);
      repeat (3) @(negedge clk);
      expect_near("initial sin", to_r(sin_rh), $sin(real'(j) * PI / 3.0), 1.0e-7);
      expect_near("initial cos", to_r(cos_rh), $cos(real'(j) * PI / 3.0), 1.0e-7);
      checks++;
      if (wr_out != 0 || trans != 0 || done) begin failures++; $display("activity before start"); end
    end
    j0 = $urandom_range(0, 5);
    sector = j0;
    @(negedge clk);
    hall = sector_hall(j0);
    repeat (3) @(negedge clk);
    rot_en = 1'b1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (100) @(negedge clk);
    // 59.86 Hz Hall signals: 24e6 / (6 * 59.86) = 66825 clocks per sector
    run_sectors(8, 66825);
    checks++;
    if ((wr_out >> 2) != 12'd376) begin failures++; $display("59.86 Hz reads %0d rad/s", wr_out >> 2); end
    run_sectors(7, 47000);
    run_sectors(6, 80000);
    run_sectors(5, 25000);           // 1005 rad/s: above the 12-bit output range
    // invalid state freezes the estimate
    begin
      angle_t s0, c0;
      @(negedge clk);
      hall = 3'b111;
      repeat (3) @(negedge clk);
      s0 = sin_rh; c0 = cos_rh;
      repeat (200) @(negedge clk);
      checks++;
      if (sin_rh != s0 || cos_rh != c0) begin failures++; $display("estimate moved in state 111"); end
    end
    checks += 3;
    if (dones != edges - 1) begin failures++; $display("%0d done pulses for %0d edges", dones, edges); end
    if (saturations == 0) begin failures++; $display("speed saturation never exercised"); end
    if (clamps == 0) begin failures++; $display("sector clamp never exercised"); end
    $display("edges=%0d dones=%0d clamps=%0d saturations=%0d", edges, dones, clamps, saturations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
