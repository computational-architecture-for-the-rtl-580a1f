// qcnn_af_top: inference engine for a quantized 1-D CNN that classifies
// two-second ECG segments (500 samples at 250 samples/s) as atrial
// fibrillation or not.
//
// Structure (after the block diagram of the design): external_hardware reads
// the ADC over SPI and fills input_ecg_mem, which holds two segments so one
// is acquired while the other is processed. When a segment is complete the
// control_fsm runs all seven layers (4 convolution + max-pool, 3 fully
// connected) on the one operations_module, fetching weights and biases in
// order from param_bram and moving activations between the two memories of
// layer_buffer. pool_relu applies the activation and the stride-2 pooling
// on the way into the buffer, and hard_limit turns the last output into the
// class bit (inverted sign bit).
//
// Interface: SPI pins to the ADC; a write port to load the 9385 parameters
// (the order is described in param_bram); `acq_enable` starts sampling.
// Each completed inference pulses `result_valid` with `af_detected` and the
// raw 22-bit `score`. `overrun` is a sticky flag set when a segment
// completes while the previous one is still being processed (that segment
// is skipped). One inference takes 34,717 clock cycles
// (1.36 ms at 25.5 MHz; 1.0 s at the 34.6 kHz operating clock).
module qcnn_af_top
  import qcnn_pkg::*;
#(
  parameter int SAMPLE_DIV = 138,
  parameter int SCLK_HALF  = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // ADC
  input  logic                acq_enable,
  output logic                spi_cs_n,
  output logic                spi_sclk,
  input  logic                spi_miso,
  // parameter load
  input  logic                prm_wr_en,
  input  logic [PARAM_AW-1:0] prm_wr_addr,
  input  word_t               prm_wr_data,
  // result
  output logic                busy,
  output logic                ecg_bank,     // bank holding the segment in use
  output logic                result_valid,
  output logic                af_detected,
  output word_t               score,
  output logic                overrun
);

  logic                sample_valid;
  word_t               sample_data;
  logic                seg_ready;
  logic                start, done;
  logic                prm_rd_en, ecg_rd_en, in_rd_en, in_sel;
  logic [PARAM_AW-1:0] prm_addr;
  logic [8:0]          ecg_addr;
  logic [BUF_AW-1:0]   in_addr;
  word_t               prm_data, ecg_data, in_data, acc_data, y;
  word_t               x_in, wr_data;
  logic                y_valid, wr_valid;
  beat_t               s1, s2, s3;

  external_hardware #(
    .SAMPLE_DIV (SAMPLE_DIV),
    .SCLK_HALF  (SCLK_HALF)
  ) u_ext (
    .clk, .rst_n,
    .enable       (acq_enable),
    .spi_cs_n, .spi_sclk, .spi_miso,
    .sample_valid,
    .sample_data
  );

  input_ecg_mem u_ecg (
    .clk, .rst_n,
    .wr_valid  (sample_valid),
    .wr_data   (sample_data),
    .seg_ready,
    .rd_bank   (ecg_bank),
    .rd_en     (ecg_rd_en),
    .rd_addr   (ecg_addr),
    .rd_data   (ecg_data)
  );

  assign start = seg_ready && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 overrun <= 1'b0;
    else if (seg_ready && busy) overrun <= 1'b1;
  end

  control_fsm u_ctrl (
    .clk, .rst_n,
    .start, .busy, .done,
    .prm_rd_en, .prm_addr,
    .ecg_rd_en, .ecg_addr,
    .in_rd_en, .in_sel, .in_addr,
    .s1, .s2, .s3
  );

  param_bram u_prm (
    .clk,
    .wr_en   (prm_wr_en),
    .wr_addr (prm_wr_addr),
    .wr_data (prm_wr_data),
    .rd_en   (prm_rd_en),
    .rd_addr (prm_addr),
    .rd_data (prm_data)
  );

  layer_buffer u_buf (
    .clk, .rst_n,
    .in_rd_en, .in_sel, .in_addr, .in_data,
    .acc_rd_en (s1.valid && s1.acc_rd),
    .acc_sel   (s1.dst),
    .acc_addr  (s1.acc_addr),
    .acc_data,
    .wr_en     (wr_valid),
    .wr_sel    (s3.dst),
    .wr_addr   (s3.wr_addr),
    .wr_data
  );

  assign x_in = s1.x_ecg ? ecg_data : in_data;

  operations_module u_ops (
    .clk, .rst_n,
    .w_shift    (s1.valid && s1.w_shift),
    .w_clr      (s1.w_clr),
    .w_in       (prm_data),
    .x_shift    (s1.valid && s1.x_shift),
    .x_in,
    .bias_load  (s1.valid && s1.bias_ld),
    .bias_in    (prm_data),
    .capture    (s2.valid && s2.capture),
    .first      (s2.first),
    .use_fb     (s2.fb),
    .add_bias   (s2.last),
    .partial_in (acc_data),
    .y,
    .y_valid
  );

  pool_relu u_pool (
    .clk, .rst_n,
    .in_valid  (s3.valid && s3.wr && y_valid),
    .in_data   (y),
    .relu      (s3.relu),
    .pool      (s3.pool),
    .odd       (s3.odd),
    .out_valid (wr_valid),
    .out_data  (wr_data)
  );

  hard_limit u_hl (
    .clk, .rst_n,
    .in_valid  (s3.valid && s3.final_out && y_valid),
    .score_in  (y),
    .class_out (af_detected),
    .score,
    .out_valid (result_valid)
  );

endmodule
