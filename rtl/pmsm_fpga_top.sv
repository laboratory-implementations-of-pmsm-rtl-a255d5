// pmsm_fpga_top: FPGA logic of a PMSM control board - ADC-driven PWM with
// dead band, and a Hall-sensor hybrid speed/position observer.
//
// PWM chain.  After the PLL locks, start_pulse fires once.  That pulse, OR-ed
// with the PWM generator's period-done pulse, starts an AD7276 read; the
// reader's done pulse loads the new 12-bit word into the PWM generator as its
// duty compare value D, together with the dead-band counts RED and FED.  So
// once started the loop samples the ADC once per PWM period and keeps itself
// running.  Three carrier shapes are built side by side - up counter, down
// counter and up/down (center-aligned) - and `pwm_mode` chooses which one
// drives the gate outputs and closes the loop (0 up, 1 down, 2 or 3
// up/down).  `duty_from_const` replaces the ADC word by the constant
// TEST_DUTY, as the board's constants block allowed for testing.
//
// Observer.  speed_observer gets the same start pulse, OR-ed with its own
// done pulse, and the three Hall inputs; it reports speed, frequency and
// sin/cos of the rotor angle.  Its full-precision internal angle outputs are
// left unconnected here: only the 12-bit rotated sin/cos leave the chip.
//
// The PLL itself is outside this module: `clk` is its clock output (24 MHz on
// the original board) and `pll_locked` its LOCKED flag, which also holds all
// blocks in reset while low.  The constants (RED, FED, PULSE_WIDTH, CLK_DIV,
// TEST_DUTY) are parameters; their defaults are those of the board, the 4-clock
// dead time giving about 167 ns at 24 MHz.  The three-way mode selection and
// the duty source switch as ports are choices of this design.
module pmsm_fpga_top
  import pmsm_pkg::*;
#(
  parameter int unsigned N            = 12,          // PWM counter width
  parameter logic [3:0]  RED          = 4'd4,        // rising-edge delay, clocks
  parameter logic [3:0]  FED          = 4'd4,        // falling-edge delay, clocks
  parameter logic [2:0]  PULSE_WIDTH  = 3'd4,        // start pulse, clocks
  parameter logic [2:0]  CLK_DIV      = 3'd1,        // ADC SCLK half period - 1
  parameter logic [7:0]  PWM_CLK_DIV  = 8'd0,        // up/down carrier divider
  parameter logic [11:0] TEST_DUTY    = 12'd2048,    // constant duty for tests
  parameter int unsigned CLK_HZ       = 24_000_000
) (
  input  logic               clk,
  input  logic               pll_locked,
  input  logic               rst_n,
  // PWM
  input  logic [1:0]         pwm_mode,
  input  logic               duty_from_const,
  input  logic               adc_sdata,
  output logic               adc_sclk,
  output logic               adc_cs_n,
  output logic [11:0]        adc_value,
  output logic [4:0]         gate_q,       // {Q4,Q3,Q2,Q1,Q}
  output logic [4:0]         gate_q_n,
  output logic [2:0]         pwm_done,     // {done, done_red, done_fed}
  // speed observer
  input  logic [2:0]         hall,         // {ha, hb, hc}
  output logic signed [11:0] so_sin,
  output logic signed [11:0] so_cos,
  output logic [11:0]        so_wr,
  output logic [11:0]        so_freq,
  output logic [2:0]         so_trans,
  output logic               so_done
);

  typedef enum logic [1:0] {MODE_UP = 2'd0, MODE_DN = 2'd1, MODE_UPDN = 2'd2} pwm_mode_t;

  logic rst_sys_n;
  logic start;
  logic adc_start, adc_done;
  logic [N-1:0] duty;

  logic [4:0] q_up, q_dn, q_ud, qn_up, qn_dn, qn_ud;
  logic [2:0] d_up, d_dn, d_ud;
  logic       done_sel;

  assign rst_sys_n = rst_n & pll_locked;

  start_pulse #(.W(3)) u_start (
    .clk    (clk),
    .rst_n  (rst_sys_n),
    .locked (pll_locked),
    .width  (PULSE_WIDTH),
    .pulse  (start)
  );

  // OR gate: first start from start_pulse, afterwards one read per PWM period
  assign adc_start = start | done_sel;

  adc_ad7276_reader #(.CLKDIV_W(3), .FRAME_BITS(16), .DATA_W(12)) u_adc (
    .clk     (clk),
    .rst_n   (rst_sys_n),
    .start   (adc_start),
    .clk_div (CLK_DIV),
    .sdata   (adc_sdata),
    .value   (adc_value),
    .sclk    (adc_sclk),
    .cs_n    (adc_cs_n),
    .done    (adc_done)
  );

  assign duty = duty_from_const ? N'(TEST_DUTY) : N'(adc_value);

  pwm_up #(.N(N)) u_pwm_up (
    .clk (clk), .rst_n (rst_sys_n), .start (adc_done), .duty (duty),
    .red (RED), .fed (FED), .q (q_up), .q_n (qn_up),
    .done (d_up[2]), .done_red (d_up[1]), .done_fed (d_up[0])
  );

  pwm_dn #(.N(N)) u_pwm_dn (
    .clk (clk), .rst_n (rst_sys_n), .start (adc_done), .duty (duty),
    .red (RED), .fed (FED), .q (q_dn), .q_n (qn_dn),
    .done (d_dn[2]), .done_red (d_dn[1]), .done_fed (d_dn[0])
  );

  pwm_updn #(.N(N), .DIV_W(8)) u_pwm_updn (
    .clk (clk), .rst_n (rst_sys_n), .start (adc_done), .duty (duty),
    .red (RED), .fed (FED), .clk_div (PWM_CLK_DIV), .q (q_ud), .q_n (qn_ud),
    .done (d_ud[2]), .done_red (d_ud[1]), .done_fed (d_ud[0])
  );

  always_comb begin
    unique case (pwm_mode)
      MODE_UP: begin gate_q = q_up; gate_q_n = qn_up; pwm_done = d_up; end
      MODE_DN: begin gate_q = q_dn; gate_q_n = qn_dn; pwm_done = d_dn; end
      default: begin gate_q = q_ud; gate_q_n = qn_ud; pwm_done = d_ud; end
    endcase
  end

  assign done_sel = pwm_done[2];

  // ------------------------------------------------------ speed observer
  logic   so_start;

  assign so_start = start | so_done;     // same start procedure, own OR gate

  speed_observer #(.CLK_HZ(CLK_HZ)) u_so (
    .clk      (clk),
    .rst_n    (rst_sys_n),
    .start    (so_start),
    .hall     (hall),
    .sin_out  (so_sin),
    .cos_out  (so_cos),
    .wr_out   (so_wr),
    .freq_out (so_freq),
    .trans    (so_trans),
    .done     (so_done),
    .sin_rh   (),
    .cos_rh   ()
  );

endmodule
