// adc_ad7276_reader: serial read of one AD7276 12-bit conversion.
//
// A start pulse pulls CS low, which starts the conversion and puts the first
// bit of the frame on SDATA.  The reader then runs FRAME_BITS SCLK cycles;
// each SCLK half period lasts clk_div+1 clocks, so SCLK = f_clk/(2*(clk_div+1)).
// SDATA is sampled at the clock edge that drives SCLK low, i.e. just before
// the ADC shifts out its next bit on that falling edge.  The AD7276 frame is
// two leading zeros, D11..D0 MSB first and two trailing zeros; after the last
// SCLK rising edge CS returns high, the 12-bit word appears on `value` and
// `done` pulses for one clock.  The frame format comes from the converter's
// data sheet; the ports are those of the ADC block of the board's PWM chain,
// and the sequencing is this design's own.
//
// Timing: start -> done = 2*FRAME_BITS*(clk_div+1) + 2 clocks
// (66 clocks for clk_div = 1).  Start pulses during a frame are ignored.
// SCLK idles high and CS idles high.  rst_n is asynchronous, active low.
module adc_ad7276_reader #(
  parameter int unsigned CLKDIV_W   = 3,
  parameter int unsigned FRAME_BITS = 16,
  parameter int unsigned DATA_W     = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [CLKDIV_W-1:0] clk_div,
  input  logic                sdata,
  output logic [DATA_W-1:0]   value,
  output logic                sclk,
  output logic                cs_n,
  output logic                done
);

  localparam int unsigned LEAD = 2;   // leading zeros before D11
  localparam int unsigned BW   = $clog2(FRAME_BITS + 1);

  typedef enum logic [1:0] {IDLE, XFER, FINISH} state_t;

  state_t                  state;
  logic [CLKDIV_W-1:0]     div_cnt;
  logic [BW-1:0]           bit_cnt;
  logic [DATA_W-1:0]       shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      div_cnt <= '0;
      bit_cnt <= '0;
      shreg   <= '0;
      value   <= '0;
      sclk    <= 1'b1;
      cs_n    <= 1'b1;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          sclk <= 1'b1;
          if (start) begin
            cs_n    <= 1'b0;
            div_cnt <= '0;
            bit_cnt <= '0;
            state   <= XFER;
          end
        end
        XFER: begin
          if (div_cnt == clk_div) begin
            div_cnt <= '0;
            if (sclk) begin
              // falling edge of SCLK: take the bit the ADC is presenting
              if (bit_cnt >= BW'(LEAD) && bit_cnt < BW'(LEAD + DATA_W))
                shreg <= {shreg[DATA_W-2:0], sdata};
              bit_cnt <= bit_cnt + 1'b1;
              sclk    <= 1'b0;
            end else begin
              sclk <= 1'b1;
              if (bit_cnt == BW'(FRAME_BITS)) state <= FINISH;
            end
          end else begin
            div_cnt <= div_cnt + 1'b1;
          end
        end
        FINISH: begin
          cs_n  <= 1'b1;
          value <= shreg;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Bus rule: SCLK only moves while CS is low.
  a_sclk_idle_high: assert property (@(posedge clk) cs_n |-> sclk);

endmodule
