// adc_model: behavioural model of a serial ADC for simulation only.
//
// When chip select falls it takes `sample` (ADC_BITS wide) and sends a
// FRAME_BITS-bit frame, leading zeros first, MSB first: the first bit is
// driven when chip select falls and each following bit after a falling SCLK
// edge, so the reader samples on rising edges. `frames` counts completed
// chip-select periods.
module adc_model #(
  parameter int FRAME_BITS = 16,
  parameter int ADC_BITS   = 12
) (
  input  logic                cs_n,
  input  logic                sclk,
  input  logic [ADC_BITS-1:0] sample,
  output logic                miso,
  output int                  frames
);
  logic [FRAME_BITS-1:0] frame;
  logic                  active;

  initial begin
    miso   = 1'b0;
    frames = 0;
    frame  = '0;
    active = 1'b0;
  end

  always @(negedge cs_n) begin
    active = 1'b1;
    frame = FRAME_BITS'(sample);
    miso  = frame[FRAME_BITS-1];
  end

  always @(negedge sclk) begin
    if (!cs_n) begin
      frame = {frame[FRAME_BITS-2:0], 1'b0};
      miso  = frame[FRAME_BITS-1];
    end
  end

  always @(posedge cs_n) if (active) begin
    active = 1'b0;
    frames++;
  end
endmodule
