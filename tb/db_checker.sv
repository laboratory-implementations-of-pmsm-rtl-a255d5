// db_checker: reference check of the dead-band outputs of a PWM generator.
//
// Sampled on the falling clock edge.  From the history of the original PWM
// Q (h[k] = Q k clocks ago) the expected outputs are, for pulses and gaps
// longer than RED+3 and FED+3 clocks:
//   Q1 = OR  of h[0 .. FED+3]        (falling edge held FED+3 clocks)
//   Q2 = AND of h[2 .. RED+2]        (rising edge delayed RED+2, falling 2)
//   Q4 = AND of ~h[2 .. FED+2]       (complement, rising edge delayed)
//   Q3 = Q1 & Q2 of the clock before
//   done_red low for RED+1 clocks starting 2 clocks after a rise of Q,
//   done_fed low for FED+1 clocks starting 2 clocks after a fall of Q.
// Checks run only while `en` is high; the history must be 40 clocks deep
// when `en` rises.  It also counts rising/falling edges of Q.
module db_checker (
  input  logic       clk,
  input  logic       en,
  input  logic [4:0] q,
  input  logic [4:0] q_n,
  input  logic       done_red,
  input  logic       done_fed,
  input  int         red,
  input  int         fed
);
  int checks = 0, failures = 0, rises = 0, falls = 0;
  logic [63:0] h = '0;
  logic q1_prev = 1'b0, q2_prev = 1'b0;

  function automatic logic or_range(logic [63:0] v, int lo, int hi);
    logic r = 1'b0;
    for (int k = lo; k <= hi; k++) r |= v[k];
    return r;
  endfunction
  function automatic logic and_range(logic [63:0] v, int lo, int hi);
    logic r = 1'b1;
    for (int k = lo; k <= hi; k++) r &= v[k];
    return r;
  endfunction

  always @(negedge clk) begin
    logic [63:0] hn;
    logic [63:0] rise_v, fall_v;
    logic e1, e2, e3, e4, edr, edf;
    hn = {h[62:0], q[0]};
    if (hn[0] && !hn[1]) rises++;
    if (!hn[0] && hn[1]) falls++;
    if (en) begin
      for (int k = 0; k < 62; k++) begin
        rise_v[k] = hn[k] & ~hn[k+1];
        fall_v[k] = ~hn[k] & hn[k+1];
      end
      rise_v[63:62] = '0; fall_v[63:62] = '0;
      e1  = or_range(hn, 0, fed + 3);
      e2  = and_range(hn, 2, red + 2);
      e4  = and_range(~hn, 2, fed + 2);
      e3  = q1_prev & q2_prev;
      edr = ~or_range(rise_v, 2, red + 2);
      edf = ~or_range(fall_v, 2, fed + 2);
      checks += 7;
      if (q[1] !== e1) begin failures++; $display("db_checker: Q1 %0b exp %0b at %0t", q[1], e1, $time); end
      if (q[2] !== e2) begin failures++; $display("db_checker: Q2 %0b exp %0b at %0t", q[2], e2, $time); end
      if (q[3] !== e3) begin failures++; $display("db_checker: Q3 %0b exp %0b at %0t", q[3], e3, $time); end
      if (q[4] !== e4) begin failures++; $display("db_checker: Q4 %0b exp %0b at %0t", q[4], e4, $time); end
      if (q_n !== ~q)  begin failures++; $display("db_checker: q_n not complement at %0t", $time); end
      if (done_red !== edr) begin failures++; $display("db_checker: done_red %0b exp %0b at %0t", done_red, edr, $time); end
      if (done_fed !== edf) begin failures++; $display("db_checker: done_fed %0b exp %0b at %0t", done_fed, edf, $time); end
    end
    q1_prev = q[1];
    q2_prev = q[2];
    h = hn;
  end
endmodule
