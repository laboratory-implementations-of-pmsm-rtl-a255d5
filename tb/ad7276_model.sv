// ad7276_model: behavioural model of the serial interface of an AD7276
// 12-bit ADC (not synthesizable, test use only).
//
// The falling edge of CS samples `code` (the value the analog input would
// convert to) and puts the first frame bit on SDATA; every falling edge of
// SCLK while CS is low presents the next bit after T_DO.  The 16-bit frame is
// two zeros, D11..D0 MSB first, two zeros.  SDATA reads 0 while CS is high
// (the real pin is three-stated).  `frames` counts CS falling edges and
// `sclk_falls` the SCLK falling edges of the last frame.
module ad7276_model #(
  parameter realtime T_DO = 2ns
) (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic [11:0] code,
  output logic        sdata
);
  logic [15:0] frame = '0;
  int idx = 0;
  int frames = 0;
  int sclk_falls = 0;

  initial sdata = 1'b0;

  always @(negedge cs_n) begin
    frame = {2'b00, code, 2'b00};
    idx = 0;
    frames++;
    sclk_falls = 0;
    sdata <= #(T_DO) frame[15];
  end

  always @(negedge sclk) if (!cs_n) begin
    idx++;
    sclk_falls++;
    sdata <= #(T_DO) (idx < 16) ? frame[15 - idx] : 1'b0;
  end

  always @(posedge cs_n) sdata <= #(T_DO) 1'b0;
endmodule
