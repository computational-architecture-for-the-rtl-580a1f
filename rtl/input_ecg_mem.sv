// input_ecg_mem: double-buffered ECG segment memory.
//
// Two banks of SEG_LEN (500) samples. Incoming samples (`wr_valid`) fill one
// bank in order; when the bank holds a whole segment it becomes the read
// bank, `seg_ready` pulses for one cycle, and filling continues in the other
// bank. So a new segment is acquired while the previous one is processed, as
// the document describes. Reads (`rd_en`, `rd_addr`) always address the most
// recently completed bank and return data one cycle later. Until a first
// segment completes, the read bank is bank 1 (contents undefined). A segment
// that completes while the previous one is still being processed switches
// the read bank underneath it; the controller flags that case.
module input_ecg_mem
  import qcnn_pkg::*;
#(
  parameter int LEN = SEG_LEN,
  parameter int AW  = $clog2(LEN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_valid,
  input  word_t         wr_data,
  output logic          seg_ready,
  output logic          rd_bank,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output word_t         rd_data
);

  word_t         rdata [2];
  logic          rd_bank_q;
  logic          wr_bank;
  logic [AW-1:0] wr_ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank   <= 1'b0;
      rd_bank   <= 1'b1;
      wr_ptr    <= '0;
      seg_ready <= 1'b0;
    end else begin
      seg_ready <= 1'b0;
      if (wr_valid) begin
        if (32'(wr_ptr) == LEN - 1) begin
          wr_ptr    <= '0;
          wr_bank   <= ~wr_bank;
          rd_bank   <= wr_bank;
          seg_ready <= 1'b1;
        end else begin
          wr_ptr <= wr_ptr + 1'b1;
        end
      end
    end
  end

  for (genvar k = 0; k < 2; k++) begin : g_bank
    word_t mem [LEN];
    always_ff @(posedge clk) begin
      if (wr_valid && wr_bank == 1'(k))  mem[wr_ptr] <= wr_data;
      if (rd_en && rd_bank == 1'(k))     rdata[k] <= mem[rd_addr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rd_bank_q <= 1'b1;
    else if (rd_en) rd_bank_q <= rd_bank;
  end
  assign rd_data = rdata[rd_bank_q];

endmodule
