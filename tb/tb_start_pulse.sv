// tb_start_pulse: self-checking test of start_pulse.
//
// For every width 0..7, and for lock arriving after random delays, it checks
// that no pulse appears before lock, that exactly one pulse of max(width,1)
// clocks follows, starting one clock after lock is seen, and that no second
// pulse appears while lock stays high or after lock toggles.
module tb_start_pulse;
  logic clk = 1'b0, rst_n = 1'b1, locked = 1'b0, pulse;
  initial #1 rst_n = 1'b0;   // a real reset edge at the start
  logic [2:0] width = '0;
  int checks = 0, failures = 0;
  int pulses = 0, len = 0, last_len = 0;
  logic pulse_prev = 1'b0;

  always #5 clk = ~clk;

  start_pulse dut (.clk, .rst_n, .locked, .width, .pulse);

  always @(negedge clk) begin
    if (pulse) len++;
    if (pulse && !pulse_prev) pulses++;
    if (!pulse && pulse_prev) begin last_len = len; len = 0; end
    pulse_prev = pulse;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 8; w++) begin
      int d;
      rst_n <= 1'b0; locked <= 1'b0; width <= 3'(w);
      repeat (2) @(posedge clk);
      rst_n <= 1'b1;
      pulses = 0; len = 0;
      d = $urandom_range(0, 20);
      repeat (d) @(posedge clk);
      #1;
      checks++;
      if (pulses != 0 || pulse) begin failures++; $display("pulse before lock"); end
      @(negedge clk);
      locked = 1'b1;
      @(posedge clk); #1;            // lock seen at this edge
      checks++;
      if (!pulse) begin failures++; $display("pulse did not start one clock after lock"); end
      repeat (30) @(posedge clk);
      locked <= 1'b0;
      repeat (3) @(posedge clk);
      locked <= 1'b1;
      repeat (10) @(posedge clk);
      #1;
      checks += 2;
      if (pulses != 1) begin failures++; $display("%0d pulses for width %0d", pulses, w); end
      if (last_len != ((w == 0) ? 1 : w)) begin failures++; $display("length %0d for width %0d", last_len, w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
