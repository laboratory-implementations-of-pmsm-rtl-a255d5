// start_pulse: one-shot start pulse released once the PLL has locked.
//
// After reset the block waits for `locked`.  The first clock it sees it high
// it raises `pulse` and keeps it high for `width` clocks (a width of 0 is
// treated as 1); afterwards it stays low until the next reset.  The pulse
// kicks off the first ADC conversion of the PWM chain and the speed observer;
// later cycles are kept going by the blocks' own done pulses.  The delay of
// one clock after lock and the width-0 rule are choices of this design.
//
// Interface: registered output; rst_n asynchronous, active low.
module start_pulse #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         locked,
  input  logic [W-1:0] width,
  output logic         pulse
);

  typedef enum logic [1:0] {WAIT_LOCK, HIGH, FIRED} state_t;

  state_t       state;
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= WAIT_LOCK;
      cnt   <= '0;
      pulse <= 1'b0;
    end else begin
      unique case (state)
        WAIT_LOCK: if (locked) begin
          state <= HIGH;
          pulse <= 1'b1;
          cnt   <= W'(1);
        end
        HIGH: begin
          if (cnt >= width) begin
            pulse <= 1'b0;
            state <= FIRED;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: pulse <= 1'b0;
      endcase
    end
  end

endmodule
