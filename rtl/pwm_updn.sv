// pwm_updn: center-aligned PWM generator with an up/down carrier and dead band.
//
// An N-bit counter climbs from 0 to 2^N-1 and falls back to 0, one step every
// clk_div+1 clocks, so the carrier period is 2*(2^N-1)*(clk_div+1) clocks
// (8190 clocks = 341 us at 24 MHz for N = 12, clk_div = 0).  The original PWM
// Q is high while counter >= D, a pulse centred on the top of the triangle
// that lasts 2*(2^N-1-D)+1 steps.  dead_band derives Q1..Q4 from it.
//
// Interface: `start` latches duty, red and fed (usable at any time).  `done`
// is set on the step at which the counter turns upward at 0 and cleared on
// the next step, so it is high for clk_div+1 clocks once per period.
// q = {Q4,Q3,Q2,Q1,Q}, q_n its complement.  rst_n is asynchronous, active
// low; the counter leaves reset at 0 counting up, with D = 0.
//
// The counter, the registered compare and the dead-band counters follow the
// original up/down-counter PWM program; the reset values, and the divider
// being a separate input rather than the ADC's clock divider constant, are
// this design's choices.
module pwm_updn #(
  parameter int unsigned N     = 12,
  parameter int unsigned DIV_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [N-1:0]     duty,
  input  logic [3:0]       red,
  input  logic [3:0]       fed,
  input  logic [DIV_W-1:0] clk_div,
  output logic [4:0]       q,
  output logic [4:0]       q_n,
  output logic             done,
  output logic             done_red,
  output logic             done_fed
);

  typedef enum logic {DOWN = 1'b0, UP = 1'b1} dir_t;

  logic [N-1:0]     cnt, duty_r;
  logic [DIV_W-1:0] div_cnt;
  logic [3:0]       red_r, fed_r;
  dir_t             dir;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      div_cnt <= '0;
      dir     <= UP;
      done    <= 1'b0;
      duty_r  <= '0;
      red_r   <= '0;
      fed_r   <= '0;
    end else begin
      if (div_cnt == clk_div) begin
        div_cnt <= '0;
        done    <= 1'b0;
        if (dir == UP) begin
          if (cnt == '1) begin
            dir <= DOWN;
            cnt <= cnt - 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end else begin
          if (cnt == '0) begin
            dir  <= UP;
            done <= 1'b1;
            cnt  <= cnt + 1'b1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
      if (start) begin
        duty_r <= duty;
        red_r  <= red;
        fed_r  <= fed;
      end
    end
  end

  dead_band u_db (
    .clk      (clk),
    .rst_n    (rst_n),
    .cmp      (cnt >= duty_r),
    .red      (red_r),
    .fed      (fed_r),
    .q        (q),
    .done_red (done_red),
    .done_fed (done_fed)
  );

  assign q_n = ~q;

endmodule
