// dead_band: rising- and falling-edge delay counters of the PWM generators.
//
// The carrier comparison `cmp` (counter >= duty) is registered into the
// original PWM Q.  Each edge of Q restarts two 4-bit counters: a rising edge
// enables the rising-edge counter (Red_Count) and a falling edge enables the
// falling-edge counter (Fed_Count); both counters are cleared at either edge.
// Red_Count stops when it reaches RED; Fed_Count stops one count past FED.
// From them come the delayed and complementary outputs:
//   Q1 = cmp | (Fed_Count <= FED)  - Q with its falling edge stretched
//   Q2 = (Red_Count >= RED)        - Q with its rising edge delayed
//   Q3 = Q1 & Q2 (one clock later)
//   Q4 = (Fed_Count >= FED)        - complement of Q, rising edge delayed
// With t the clock on which Q changes, and pulses and gaps longer than the
// delays: Q2 rises at t+RED+2 and falls at t+2; Q4 rises at t+FED+2 and
// falls at t+2; Q1 rises with Q and falls at t+FED+4.  So Q2/Q4 are a
// complementary pair with RED clocks of dead time before Q2 turns on and FED
// clocks before Q4 turns on.  done_red is low for RED+1 clocks from t+2 after
// a rising edge, done_fed for FED+1 clocks from t+2 after a falling edge.
// This is the counter scheme of the PWM programs the design follows; the
// registered-previous-Q edge detector is used for all three carrier shapes.
// FED must stay below 15 so that the stopped count FED+1 fits in 4 bits.
//
// Interface: all outputs are registers updated on clk; rst_n is asynchronous
// and active low.  q = {Q4, Q3, Q2, Q1, Q}.  done_red / done_fed are high
// while the respective counter is idle.
module dead_band (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmp,
  input  logic [3:0] red,
  input  logic [3:0] fed,
  output logic [4:0] q,
  output logic       done_red,
  output logic       done_fed
);

  logic       q_orig, q_prev;
  logic       red_en, fed_en;
  logic [3:0] red_cnt, fed_cnt;
  logic       q1, q2, q3, q4;
  logic       rise, fall;

  assign rise = q_orig & ~q_prev;
  assign fall = ~q_orig & q_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_orig   <= 1'b0;
      q_prev   <= 1'b0;
      red_en   <= 1'b0;
      fed_en   <= 1'b0;
      red_cnt  <= '0;
      fed_cnt  <= '0;
      q1       <= 1'b0;
      q2       <= 1'b0;
      q3       <= 1'b0;
      q4       <= 1'b0;
      done_red <= 1'b0;
      done_fed <= 1'b0;
    end else begin
      q_orig   <= cmp;
      q_prev   <= q_orig;
      done_red <= ~red_en;
      done_fed <= ~fed_en;

      if (rise || fall) begin
        red_en  <= rise;
        fed_en  <= fall;
        red_cnt <= '0;
        fed_cnt <= '0;
      end else begin
        // rising-edge counter: stops exactly at RED
        if (red_cnt >= red)  red_en  <= 1'b0;
        else if (red_en)     red_cnt <= red_cnt + 4'd1;
        // falling-edge counter: the stop takes effect one count later
        if (fed_en)          fed_cnt <= fed_cnt + 4'd1;
        if (fed_cnt >= fed)  fed_en  <= 1'b0;
      end

      q1 <= cmp | (fed_cnt <= fed);
      q2 <= (red_cnt >= red);
      q3 <= q1 & q2;
      q4 <= (fed_cnt >= fed);
    end
  end

  assign q = {q4, q3, q2, q1, q_orig};

endmodule
