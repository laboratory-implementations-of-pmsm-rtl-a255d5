// tb_speed_observer_m: the speed observer at different speed fraction widths.
//
// The speed w is held with m = WR_F fraction bits; a coarse w makes the
// integrated angle drift between Hall edges.  Eight observers with m = 4, 8,
// ..., 32 see the same ideal 59.86 Hz Hall signals (66825 clocks per sector
// at 24 MHz).  For each one the test
//   * checks that the 12-bit speed output reads 376 rad/s in its integer part
//     and that the frequency output reads 59.75..60 Hz,
//   * compares the full-precision speed register with the exact speed
//     (pi/3) * 24e6 / 66825 = 376.0979 rad/s: the error must stay within one
//     LSB, 2^-m, plus the 2^-30 rounding of pi/3 scaled by f_clk/count
//     (3.3e-7 rad/s), and must not grow as m grows;
//   * prints, for information, the mean absolute error of sin(theta_rh)
//     against the ideal rotor angle, which at these speeds is set by the
//     24-bit angle precision rather than by m.
// The speed error falls from about 0.04 rad/s at m = 4 to below 1e-6 from m = 16,
// the trend of the original bench measurement (whose absolute numbers came
// from a real motor and a scope and are not reproduced here).  The speed
// register is read through the hierarchy.
module tb_speed_observer_m;
  import pmsm_pkg::*;

  localparam int  NM  = 8;
  localparam int  L   = 66825;
  localparam real F   = 24.0e6;
  localparam real PI  = 3.14159265358979323846;
  localparam real LSB = 1.0 / 16777216.0;

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  initial #1 rst_n = 1'b0;   // a real reset edge at the start
  logic [2:0] hall = 3'b100;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic signed [11:0] sin_out [NM], cos_out [NM];
  logic [11:0] wr_out [NM], freq_out [NM];
  logic [2:0]  trans [NM];
  logic        done [NM];
  angle_t      sin_rh [NM], cos_rh [NM];
  real         wr_r [NM];

  for (genvar i = 0; i < NM; i++) begin : g_m
    speed_observer #(.WR_F(4 * (i + 1))) dut (
      .clk, .rst_n, .start, .hall,
      .sin_out (sin_out[i]), .cos_out (cos_out[i]), .wr_out (wr_out[i]),
      .freq_out (freq_out[i]), .trans (trans[i]), .done (done[i]),
      .sin_rh (sin_rh[i]), .cos_rh (cos_rh[i]));
    // the full-precision speed register, in rad/s
    always @(negedge clk) wr_r[i] = real'(dut.wr) / (2.0 ** (4 * (i + 1)));
  end

  function automatic logic [2:0] sector_hall(int j);
    case (j % 6)
      0: return 3'b100;
      1: return 3'b110;
      2: return 3'b010;
      3: return 3'b011;
      4: return 3'b001;
      default: return 3'b101;
    endcase
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real err_sum [NM];
  int  n_err = 0;

  initial begin
    automatic int sector = 0;
    automatic real w = (PI / 3.0) * F / real'(L);
    for (int i = 0; i < NM; i++) err_sum[i] = 0.0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (100) @(negedge clk);
    for (int e = 0; e < 7; e++) begin
      real th_edge;
      sector++;
      hall = sector_hall(sector);
      th_edge = PI / 6.0 + real'(sector - 1) * PI / 3.0;
      for (int k = 0; k < L - 1; k++) begin
        @(negedge clk);
        // from the third edge on every observer has its speed: sample the
        // angle; the edge load lands two clocks after the Hall change
        if (e >= 2 && k >= 2 && k % 64 == 0 && k < L - 200) begin
          real th;
          th = th_edge + real'(k - 1) * w / F;
          for (int i = 0; i < NM; i++)
            err_sum[i] += absr(real'(sin_rh[i]) * LSB - $sin(th));
          n_err++;
        end
      end
      @(negedge clk);
    end
    repeat (4) @(negedge clk);
    for (int i = 0; i < NM; i++) begin
      real mean, werr, bound;
      mean  = err_sum[i] / real'(n_err);
      werr  = absr(wr_r[i] - w);
      bound = 1.0 / (2.0 ** (4 * (i + 1)));
      $display("m = %2d: w = %.9f rad/s (error %e, bound %e), outputs %0d/4 rad/s %0d/4 Hz, mean |sin error| %e",
               4 * (i + 1), wr_r[i], werr, bound, wr_out[i], freq_out[i], mean);
      checks += 4;
      if ((wr_out[i] >> 2) != 12'd376) begin
        failures++; $display("m = %0d reads %0d rad/s", 4 * (i + 1), wr_out[i] >> 2);
      end
      if (freq_out[i] < 12'd239 || freq_out[i] > 12'd240) begin
        failures++; $display("m = %0d frequency %0d/4 Hz", 4 * (i + 1), freq_out[i]);
      end
      // truncation of w to m bits, plus the rounding of pi/3 to 30 bits
      if (werr > bound + 3.5e-7) begin
        failures++; $display("m = %0d speed error %e above %e", 4 * (i + 1), werr, bound);
      end
      if (i > 0 && werr > absr(wr_r[i - 1] - w) + 3.5e-7) begin
        failures++; $display("speed error grew from m = %0d to m = %0d", 4 * i, 4 * (i + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
