// layer_buffer: the pair of memories that carry results from one layer to
// the next.
//
// Two memories (A = 0, B = 1) of DEPTH words each. While a layer runs, one
// of them is its source (read through the `in_*` port) and the other its
// destination: partial sums are read back through the `acc_*` port and
// results are written through the `wr_*` port. The next layer swaps the two,
// so the outputs of one layer are read as the inputs of the next, as the
// document describes. Each memory has one synchronous read port and one
// write port; the two read ports of this block are steered to the memory
// named by their select, and data returns one cycle after the request.
// Both reads addressing the same memory in one cycle is illegal (asserted).
// Reads see the memory contents before a write in the same cycle.
module layer_buffer
  import qcnn_pkg::*;
#(
  parameter int DEPTH = BUF_DEPTH,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // source (layer input) read port
  input  logic          in_rd_en,
  input  logic          in_sel,
  input  logic [AW-1:0] in_addr,
  output word_t         in_data,
  // destination (partial sum) read port
  input  logic          acc_rd_en,
  input  logic          acc_sel,
  input  logic [AW-1:0] acc_addr,
  output word_t         acc_data,
  // destination write port
  input  logic          wr_en,
  input  logic          wr_sel,
  input  logic [AW-1:0] wr_addr,
  input  word_t         wr_data
);

  word_t         rdata [2];
  logic          in_sel_q, acc_sel_q;

  for (genvar m = 0; m < 2; m++) begin : g_mem
    word_t         mem [DEPTH];
    logic          re;
    logic [AW-1:0] ra;
    always_comb begin
      re = (in_rd_en && in_sel == 1'(m)) || (acc_rd_en && acc_sel == 1'(m));
      ra = (in_rd_en && in_sel == 1'(m)) ? in_addr : acc_addr;
    end
    always_ff @(posedge clk) begin
      if (wr_en && wr_sel == 1'(m)) mem[wr_addr] <= wr_data;
      if (re) rdata[m] <= mem[ra];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sel_q  <= 1'b0;
      acc_sel_q <= 1'b0;
    end else begin
      if (in_rd_en)  in_sel_q  <= in_sel;
      if (acc_rd_en) acc_sel_q <= acc_sel;
    end
  end

  assign in_data  = rdata[in_sel_q];
  assign acc_data = rdata[acc_sel_q];

  a_one_read_per_memory: assert property (@(posedge clk) disable iff (!rst_n)
    (in_rd_en && acc_rd_en) |-> (in_sel != acc_sel));

endmodule
