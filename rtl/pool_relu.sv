// pool_relu: activation and stride-2 max pooling applied to finished layer
// outputs on their way into the layer buffer.
//
// The network pools every convolution output pair with stride 2; this block
// does it on the fly while the outputs of the last input channel pass stream
// out of the operations module. The activation is a ReLU, an assumption of
// this design (the document names no hidden-layer activation); the
// controller can switch it off per layer.
//
// Interface: `in_valid`/`in_data` is one result per cycle at most. With
// `pool` low the (optionally rectified) value passes straight to the output
// in the same cycle (used for partial sums and fully connected outputs).
// With `pool` high, an element with `odd` low is held in a register and the
// element with `odd` high produces max(held, current) at the output in its
// own cycle. The output is combinational; it is written at the next edge.
module pool_relu
  import qcnn_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t in_data,
  input  logic  relu,
  input  logic  pool,
  input  logic  odd,
  output logic  out_valid,
  output word_t out_data
);

  word_t act, held;

  always_comb begin
    act = (relu && in_data < 0) ? '0 : in_data;
    if (!pool) begin
      out_valid = in_valid;
      out_data  = act;
    end else begin
      out_valid = in_valid && odd;
      out_data  = (held > act) ? held : act;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        held <= '0;
    else if (in_valid && pool && !odd) held <= act;
  end

endmodule
