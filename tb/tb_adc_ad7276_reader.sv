// tb_adc_ad7276_reader: self-checking test of adc_ad7276_reader against the
// AD7276 interface model.
//
// For clock dividers 0..7 and random 12-bit codes (plus all-zeros and
// all-ones) it starts a read and checks the returned word, the start-to-done
// time of 2*16*(clk_div+1)+2 clocks, exactly 16 SCLK falling edges per frame,
// the SCLK half period of clk_div+1 clocks, CS high again at done, and that
// a start pulse during a frame is ignored.
module tb_adc_ad7276_reader;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  initial #1 rst_n = 1'b0;   // a real reset edge at the start
  logic [2:0] clk_div = 3'd0;
  logic sdata, sclk, cs_n, done;
  logic [11:0] value, code = '0;
  int checks = 0, failures = 0;
  int half_min = 1 << 30, half_max = 0, half_len = 0;
  logic sclk_prev = 1'b1;

  always #5 clk = ~clk;

  adc_ad7276_reader dut (.clk, .rst_n, .start, .clk_div, .sdata, .value, .sclk, .cs_n, .done);
  ad7276_model adc (.cs_n, .sclk, .code, .sdata);

  // measure SCLK half periods inside a frame
  // (the stretch from CS falling to the first SCLK edge is not counted)
  bit first_edge = 1'b1;
  always @(negedge clk) begin
    if (!cs_n) begin
      half_len++;
      if (sclk != sclk_prev) begin
        if (!first_edge) begin
          if (half_len < half_min) half_min = half_len;
          if (half_len > half_max) half_max = half_len;
        end
        first_edge = 1'b0;
        half_len = 0;
      end
    end else begin
      half_len = 0;
      first_edge = 1'b1;
    end
    sclk_prev = sclk;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_one(int div, logic [11:0] c, bit extra_start);
    int t;
    clk_div <= 3'(div);
    code    <= c;
    half_min = 1 << 30; half_max = 0;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    t = 1;
    if (extra_start) begin
      repeat (5) @(posedge clk);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      t += 6;
    end
    #1;
    while (!done) begin @(posedge clk); #1; t++; end
    checks += 5;
    if (value !== c) begin failures++; $display("value %h exp %h", value, c); end
    if (t != 2 * 16 * (div + 1) + 2) begin failures++; $display("latency %0d exp %0d (div %0d)", t, 2 * 16 * (div + 1) + 2, div); end
    if (adc.sclk_falls != 16) begin failures++; $display("sclk falls %0d", adc.sclk_falls); end
    if (half_min != div + 1 || half_max != div + 1) begin
      failures++; $display("sclk half period %0d..%0d exp %0d", half_min, half_max, div + 1);
    end
    if (!cs_n) begin failures++; $display("cs_n still low at done"); end
    // done is one clock
    @(posedge clk); #1;
    checks++;
    if (done) begin failures++; $display("done longer than one clock"); end
  endtask

  initial begin
    int frames0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    checks += 2;
    if (!cs_n || !sclk) begin failures++; $display("bus not idle after reset"); end
    if (adc.frames != 0) begin failures++; $display("frame without start"); end
    read_one(0, 12'h000, 0);
    read_one(0, 12'hFFF, 0);
    read_one(1, 12'hA5C, 1);
    for (int i = 0; i < 40; i++) read_one(i % 8, 12'($urandom), (i % 5) == 0);
    frames0 = adc.frames;
    repeat (20) @(posedge clk);
    checks++;
    if (adc.frames != frames0) begin failures++; $display("spurious frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
