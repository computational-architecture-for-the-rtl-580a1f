// operations_module: the single compute engine used for every layer.
//
// A LANES-wide (27) systolic multiply-accumulate array, after the data-flow
// figure of the design: a weight shift chain and an input shift chain of
// LANES registers each, one multiplier per lane (input register x weight
// register), an adder chain summing the lane products, a bias register, and
// an output adder whose bias term is selected by a mux (Sel = `add_bias`).
//
// Convolution mode: the controller first shifts the K kernel weights into the
// weight chain (the first shift clears the remaining lanes to zero), then
// streams the input channel through the input chain, one sample per cycle.
// Once K samples are in, every cycle holds one full window and the sum is one
// output point. Partial sums of earlier input channels are read back from the
// layer buffer (`partial_in`) and added, so the finished point is accumulated
// in the buffer; the bias is added only on the last input channel.
// Dot-product (fully connected) mode: weights and inputs shift together in
// chunks of up to LANES pairs; each chunk's sum is added to the previous
// chunk's result held in the output register (`use_fb`).
//
// Timing: shift signals act at the clock edge; `capture` registers
// y = sat(partial + sum + (add_bias ? bias : 0)) at the edge, using the chain
// contents before that edge, so a shift and a capture of the previous window
// can happen in the same cycle. `y_valid` is high the cycle after a capture.
// Products are truncated by FRAC_W bits; the widths are this design's choice.
module operations_module
  import qcnn_pkg::*;
#(
  parameter int LANES_P = LANES
) (
  input  logic  clk,
  input  logic  rst_n,
  // weight chain
  input  logic  w_shift,
  input  logic  w_clr,      // with w_shift: lane 0 loads, other lanes clear
  input  word_t w_in,
  // input chain
  input  logic  x_shift,
  input  word_t x_in,
  // bias register
  input  logic  bias_load,
  input  word_t bias_in,
  // output
  input  logic  capture,
  input  logic  first,      // partial term is zero
  input  logic  use_fb,     // partial term is the previous y
  input  logic  add_bias,   // Sel of the bias mux
  input  word_t partial_in, // partial sum read from the layer buffer
  output word_t y,
  output logic  y_valid
);

  word_t w_reg [LANES_P];
  word_t x_reg [LANES_P];
  word_t bias_q;
  acc_t  prod  [LANES_P];
  acc_t  chain;
  acc_t  partial, total;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < LANES_P; j++) begin
        w_reg[j] <= '0;
        x_reg[j] <= '0;
      end
      bias_q <= '0;
    end else begin
      if (w_shift) begin
        w_reg[0] <= w_in;
        for (int j = 1; j < LANES_P; j++) w_reg[j] <= w_clr ? '0 : w_reg[j-1];
      end
      if (x_shift) begin
        x_reg[0] <= x_in;
        for (int j = 1; j < LANES_P; j++) x_reg[j] <= x_reg[j-1];
      end
      if (bias_load) bias_q <= bias_in;
    end
  end

  // lane multipliers and the adder chain
  always_comb begin
    chain = '0;
    for (int j = 0; j < LANES_P; j++) begin
      prod[j] = (acc_t'(x_reg[j]) * acc_t'(w_reg[j])) >>> FRAC_W;
      chain   = chain + prod[j];
    end
    partial = first ? '0 : (use_fb ? acc_t'(y) : acc_t'(partial_in));
    total   = partial + chain + (add_bias ? acc_t'(bias_q) : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= capture;
      if (capture) y <= sat(total);
    end
  end

endmodule
