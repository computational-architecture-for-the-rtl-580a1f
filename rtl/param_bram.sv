// param_bram: parameter memory holding every weight and bias of the network
// (9385 words of DATA_W bits).
//
// One synchronous read port (data one cycle after `rd_en`) and one write
// port used to load the parameters before operation. The document stores
// the parameters in FPGA block RAM; how they are loaded is not given, so
// the write port is this design's choice. Parameters are stored in the exact
// order the controller consumes them, layer after layer: for each output
// filter or neuron its bias first, then its weights (convolution: input
// channel by channel, kernel tap 0 first; fully connected: input 0 first).
module param_bram
  import qcnn_pkg::*;
#(
  parameter int DEPTH = PARAM_DEPTH,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  word_t         wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output word_t         rd_data
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && 32'(wr_addr) < DEPTH) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= (32'(rd_addr) < DEPTH) ? mem[rd_addr] : '0;
  end

endmodule
