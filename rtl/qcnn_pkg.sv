// qcnn_pkg: shared constants, types and the layer table of the quantized
// atrial-fibrillation CNN accelerator.
//
// The network (four convolution + max-pool stages, three fully connected
// layers, 9385 parameters, 500-sample input) and the 22-bit word length follow
// the document. The number of fraction bits, the accumulator width, the
// buffer map and the order in which parameters sit in the parameter memory
// are choices of this design.
//
// Fixed-point format: every stored value (sample, weight, bias, activation) is
// a signed DATA_W-bit two's complement number with FRAC_W fraction bits.
// A product is shifted right by FRAC_W (truncation, i.e. rounding toward minus
// infinity), summed at ACC_W bits, and a value written back to a memory is
// saturated to DATA_W bits.
package qcnn_pkg;

  localparam int DATA_W       = 22;    // quantization chosen in the document
  localparam int FRAC_W       = 14;    // assumed
  localparam int ACC_W        = 2*DATA_W;
  localparam int LANES        = 27;    // multipliers / adders / registers of the array
  localparam int N_LAYERS     = 7;     // conv1..conv4, fc1..fc3
  localparam int SEG_LEN      = 500;   // samples per ECG segment
  localparam int PARAM_DEPTH  = 9385;  // total parameters of the network
  localparam int BUF_DEPTH    = 2048;  // words per layer-buffer memory
  localparam int BUF_AW       = $clog2(BUF_DEPTH);
  localparam int PARAM_AW     = $clog2(PARAM_DEPTH);
  localparam int SCRATCH_BASE = 1536;  // partial sums of the filter in flight
  localparam int DRAIN        = 3;     // idle cycles between two layers

  typedef logic signed [DATA_W-1:0] word_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // One layer of the network. For a convolution: k = kernel length,
  // cin/cout = input/output channels, lin = input length, lout = output length
  // before pooling. For a fully connected layer: cin = inputs, cout = neurons.
  typedef struct packed {
    logic        is_fc;
    logic        relu;   // activation applied to the final outputs
    logic        pool;   // stride-2 max pooling after the layer
    logic [5:0]  k;
    logic [9:0]  cin;
    logic [9:0]  cout;
    logic [9:0]  lin;
    logic [9:0]  lout;
  } layer_cfg_t;

  // Table 1 of the network description.
  function automatic layer_cfg_t layer_cfg(input logic [2:0] l);
    layer_cfg_t c;
    c = '0;
    c.relu = 1'b1;
    unique case (l)
      3'd0: begin c.k = 6'd27; c.cin = 10'd1;   c.cout = 10'd3;  c.lin = 10'd500; c.lout = 10'd474; c.pool = 1'b1; end
      3'd1: begin c.k = 6'd14; c.cin = 10'd3;   c.cout = 10'd10; c.lin = 10'd237; c.lout = 10'd224; c.pool = 1'b1; end
      3'd2: begin c.k = 6'd3;  c.cin = 10'd10;  c.cout = 10'd10; c.lin = 10'd112; c.lout = 10'd110; c.pool = 1'b1; end
      3'd3: begin c.k = 6'd4;  c.cin = 10'd10;  c.cout = 10'd10; c.lin = 10'd55;  c.lout = 10'd52;  c.pool = 1'b1; end
      3'd4: begin c.is_fc = 1'b1; c.cin = 10'd260; c.cout = 10'd30; end
      3'd5: begin c.is_fc = 1'b1; c.cin = 10'd30;  c.cout = 10'd10; end
      default: begin c.is_fc = 1'b1; c.cin = 10'd10; c.cout = 10'd1; c.relu = 1'b0; end
    endcase
    return c;
  endfunction

  // Saturate an accumulator value to a stored word.
  function automatic word_t sat(input acc_t a);
    acc_t maxv, minv;
    maxv = acc_t'((64'sd1 <<< (DATA_W-1)) - 1);
    minv = -acc_t'(64'sd1 <<< (DATA_W-1));
    if (a > maxv)      return word_t'(maxv);
    else if (a < minv) return word_t'(minv);
    else               return word_t'(a);
  endfunction

  // Control word that travels down the three-stage datapath pipeline with each
  // issued beat (stage 0 = memory address, 1 = shift, 2 = capture, 3 = write).
  typedef struct packed {
    logic              valid;
    logic              bias_ld;    // stage 1: bias register <= parameter word
    logic              w_shift;    // stage 1: shift the weight chain
    logic              w_clr;      // stage 1: clear the rest of the weight chain
    logic              x_shift;    // stage 1: shift the input chain
    logic              x_ecg;      // stage 1: input word comes from the ECG memory
    logic              capture;    // stage 2: capture the array sum
    logic              first;      // stage 2: no earlier partial sum
    logic              fb;         // stage 2: partial sum is the previous result
    logic              last;       // stage 2: add the bias (Sel of the output mux)
    logic              acc_rd;     // stage 1: read partial sum from the buffer
    logic [BUF_AW-1:0] acc_addr;
    logic              wr;         // stage 3: write the result
    logic [BUF_AW-1:0] wr_addr;
    logic              dst;        // destination buffer memory (0 = A, 1 = B)
    logic              relu;
    logic              pool;
    logic              odd;        // second element of a pooling pair
    logic              final_out;  // result of the last layer
  } beat_t;

endpackage
