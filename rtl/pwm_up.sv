// pwm_up: edge-aligned PWM generator with an up-counting carrier and dead band.
//
// An N-bit counter runs 0, 1, ..., 2^N-1 and wraps to 0, so the carrier
// period is 2^N clocks (4096 clocks = 170.7 us at 24 MHz for N = 12).  The
// original PWM Q is high while counter >= D, i.e. for 2^N - D clocks of each
// period.  The dead_band block derives the delayed and complementary outputs
// Q1..Q4 from it (see dead_band.sv).
//
// Interface: `start` latches duty, red and fed; they are used from the next
// clock on and can be reloaded at any time.  `done` is high for the one clock
// after the counter wraps (one pulse per period).  q = {Q4,Q3,Q2,Q1,Q},
// q_n its complement.  rst_n is asynchronous, active low; after reset D = 0,
// so Q stays high until the first start loads a duty.
//
// The counter, the registered compare and the dead-band counters follow the
// original up-counter PWM program; the reset values and the registering of
// the previous Q for edge detection are this design's choices.
module pwm_up #(
  parameter int unsigned N = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] duty,
  input  logic [3:0]   red,
  input  logic [3:0]   fed,
  output logic [4:0]   q,
  output logic [4:0]   q_n,
  output logic         done,
  output logic         done_red,
  output logic         done_fed
);

  logic [N-1:0] cnt, duty_r;
  logic [3:0]   red_r, fed_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      done   <= 1'b0;
      duty_r <= '0;
      red_r  <= '0;
      fed_r  <= '0;
    end else begin
      done <= (cnt == '1);
      cnt  <= cnt + 1'b1;              // wraps from 2^N-1 to 0
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
