// speed_observer: hybrid speed and position observer for three Hall sensors.
//
// Three Hall sensors 120 degrees apart split each electrical turn into six
// sectors, so they alone give the rotor angle to within 60 degrees.  The
// observer fills in between the edges:
//   * Speed.  A counter measures the clocks between consecutive sensor edges.
//     Each edge is pi/3 of electrical angle, so w = (pi/3) * f_clk / count
//     (rad/s, WR_F fraction bits).  The first edge after start only arms the
//     measurement, because the time before it is not a whole sector.
//   * Angle.  sin/cos of the Hall angle theta_rh are integrated every clock
//     with the last speed, d/dt [cos; sin] = w * [-sin; cos], one forward
//     Euler step of w*Ts per clock.  At every edge the estimate is reset to
//     the exact sin/cos of that edge, and between edges it is clamped to the
//     current sector's range (tables in pmsm_pkg).  At start, before any edge,
//     it sits at the centre of the sector the sensors report, with w = 0.
//   * Offset.  The rotor angle is theta_r = theta_rh + phi_h, the mounting
//     offset of the sensors; sin/cos of theta_r come from the angle-sum
//     identities with constant cos(phi_h), sin(phi_h) (26 degrees default).
// Outputs are narrowed as on the original board: w and f = w/(2*pi) to 12
// bits with 2 fraction bits (Q10.2, saturating at 511.75), sin/cos of
// theta_r to 12 bits with 11 fraction bits (Q1.11, saturating).  The speed
// outputs keep the signed format of the original bus; as the speed is never
// negative their top bit is always 0.  WR_F may be set from 4 to 32.
// The algorithm, the tables, the 24-bit angle and speed fractions and the
// 26-degree offset follow the design this RTL implements.  Own choices:
// the counter saturates rather than wraps, the divisor is the exact number
// of clocks between edges, pi/3 is held to 30 bits, Ts to 48 fraction bits,
// invalid Hall states (000, 111) freeze the angle, and the divide is a
// single-cycle combinational divider.
//
// Timing: hall is registered once; an edge is seen one clock after it
// arrives, w and `done` follow one clock later, and the angle steps use
// the new w from the clock after that.  `trans` = {Ta, Tb, Tc} pulses for one
// clock per edge.  `start` (a level or pulse) moves the block from its
// initial-condition state into tracking; rst_n (asynchronous, active low)
// returns it there.
module speed_observer
  import pmsm_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 24_000_000,
  parameter int unsigned CNT_W   = 24,
  parameter int unsigned WR_I    = 11,
  parameter int unsigned WR_F    = 24,
  parameter int unsigned TS_F    = 48,
  parameter int          COS_PHI = 15079262,    // cos(26 deg) * 2^24
  parameter int          SIN_PHI = 7354647      // sin(26 deg) * 2^24
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [2:0]         hall,       // {ha, hb, hc}
  output logic signed [11:0] sin_out,    // sin(theta_r), Q1.11
  output logic signed [11:0] cos_out,    // cos(theta_r), Q1.11
  output logic        [11:0] wr_out,     // w, rad/s, Q10.2
  output logic        [11:0] freq_out,   // w/(2pi), Hz, Q10.2
  output logic [2:0]         trans,      // {Ta, Tb, Tc}
  output logic               done,
  output angle_t             sin_rh,     // sin(theta_rh), Q2.24
  output angle_t             cos_rh      // cos(theta_rh), Q2.24
);

  localparam int unsigned WR_W  = WR_I + WR_F;
  localparam int unsigned WTS_W = 40;
  // pi/3 with 30 fraction bits
  localparam longint unsigned PI3_Q30 = 64'd1124419809;
  // (pi/3) * f_clk with WR_F fraction bits: the numerator of the speed divide
  localparam longint unsigned K_W  = (WR_F <= 30) ? (PI3_Q30 * 64'(CLK_HZ)) >> (30 - WR_F)
                                                  : (PI3_Q30 * 64'(CLK_HZ)) << (WR_F - 30);
  // Ts = 1/f_clk with TS_F fraction bits
  localparam longint unsigned TS_K = ((64'd1 << TS_F) + 64'(CLK_HZ / 2)) / 64'(CLK_HZ);
  // 1/(2pi) with 24 fraction bits
  localparam longint unsigned INV2PI_Q24 = 64'd2670177;

  // ------------------------------------------------------------- state
  logic              running, armed;
  hall_t             h_reg, h_pre;
  logic [CNT_W-1:0]  cnt;
  logic [WR_W-1:0]   wr;
  logic [WTS_W-1:0]  wts;          // w*Ts, TS_F fraction bits
  angle_t            s_int, c_int;

  // ------------------------------------------------- combinational terms
  logic [2:0]        t;
  logic              edge_seen;
  sincos_t           tp;
  logic              tp_found;
  bounds_t           bnd;
  logic [63:0]       quot;
  logic [WR_W-1:0]   wr_next;
  logic [WR_W+63:0]  wts_full;     // w * round(2^TS_F / f_clk), WR_F+TS_F fraction bits
  angle_t            s_step, c_step;

  assign t         = running ? (h_reg ^ h_pre) : 3'b000;
  assign edge_seen = (t != 3'b000);
  assign bnd       = hall_bounds(h_reg);

  always_comb tp = hall_transition(t, h_reg, tp_found);

  // speed divide: clocks between edges = cnt + 1
  assign quot    = K_W / 64'({1'b0, cnt} + 1'b1);
  assign wr_next = (quot > 64'({WR_W{1'b1}})) ? {WR_W{1'b1}} : quot[WR_W-1:0];

  assign wts_full = (WR_W+64)'(wr) * (WR_W+64)'(TS_K);

  // one Euler step of the rotation, then clamp to the sector
  function automatic angle_t clamp(input angle_t v, input angle_t lo, input angle_t hi);
    if (v >= hi)      return hi;
    else if (v <= lo) return lo;
    else              return v;
  endfunction

  always_comb begin
    logic signed [WTS_W+ANG_FRAC+2:0] ds, dc;
    ds = $signed({1'b0, wts}) * c_int;     // sin' =  w cos
    dc = $signed({1'b0, wts}) * s_int;     // cos' = -w sin
    s_step = clamp(s_int + angle_t'(ds >>> TS_F), bnd.min_s, bnd.max_s);
    c_step = clamp(c_int - angle_t'(dc >>> TS_F), bnd.min_c, bnd.max_c);
  end

  // ---------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      armed   <= 1'b0;
      h_reg   <= '0;
      h_pre   <= '0;
      cnt     <= '0;
      wr      <= '0;
      wts     <= '0;
      s_int   <= ANG_ZERO;
      c_int   <= ANG_ONE;
      done    <= 1'b0;
      trans   <= '0;
    end else begin
      h_reg <= hall;
      h_pre <= h_reg;
      trans <= t;
      done  <= 1'b0;
      wts   <= WTS_W'(wts_full >> WR_F);

      if (!running) begin
        // initial conditions: sector centre, speed zero
        s_int   <= hall_initial(h_reg).s;
        c_int   <= hall_initial(h_reg).c;
        wr      <= '0;
        cnt     <= '0;
        armed   <= 1'b0;
        running <= start;
      end else if (edge_seen && hall_valid(h_reg)) begin
        cnt   <= '0;
        armed <= 1'b1;
        if (armed) begin
          wr   <= wr_next;
          done <= 1'b1;
        end
        if (tp_found) begin
          s_int <= tp.s;
          c_int <= tp.c;
        end
      end else begin
        if (cnt != '1) cnt <= cnt + 1'b1;
        if (hall_valid(h_reg)) begin
          s_int <= s_step;
          c_int <= c_step;
        end
      end
    end
  end

  assign sin_rh = s_int;
  assign cos_rh = c_int;

  // ----------------------------------------------- offset and narrowing
  function automatic logic signed [11:0] to_q1_11(input logic signed [63:0] v_q24);
    logic signed [63:0] v;
    v = v_q24 >>> (ANG_FRAC - 11);
    if (v > 64'sd2047)       return 12'sd2047;
    else if (v < -64'sd2048) return -12'sd2048;
    else                     return v[11:0];
  endfunction

  function automatic logic [11:0] to_q10_2(input logic [63:0] v, input int unsigned frac);
    logic [63:0] r;
    r = v >> (frac - 2);
    return (r > 64'd2047) ? 12'd2047 : r[11:0];
  endfunction

  logic signed [63:0] sin_r, cos_r;
  always_comb begin
    sin_r = (64'(s_int) * 64'(COS_PHI) + 64'(c_int) * 64'(SIN_PHI)) >>> ANG_FRAC;
    cos_r = (64'(c_int) * 64'(COS_PHI) - 64'(s_int) * 64'(SIN_PHI)) >>> ANG_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sin_out  <= '0;
      cos_out  <= '0;
      wr_out   <= '0;
      freq_out <= '0;
    end else begin
      sin_out  <= to_q1_11(sin_r);
      cos_out  <= to_q1_11(cos_r);
      wr_out   <= to_q10_2(64'(wr), WR_F);
      freq_out <= to_q10_2(64'(wr) * INV2PI_Q24, WR_F + 24);
    end
  end

endmodule
