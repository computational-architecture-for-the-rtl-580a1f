// tb_layer_buffer: writes random words into both memories, then reads them
// back through the input port and the partial-sum port with the roles of the
// two memories alternating, checking data, the one-cycle latency and that
// writing one memory while both are read leaves the read data intact.
module tb_layer_buffer;
  import qcnn_pkg::*;

  localparam int AW = BUF_AW;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_rd_en = 0, in_sel = 0, acc_rd_en = 0, acc_sel = 0, wr_en = 0, wr_sel = 0;
  logic [AW-1:0] in_addr = '0, acc_addr = '0, wr_addr = '0;
  word_t in_data, acc_data, wr_data = '0;
  int checks = 0, failures = 0;
  int model [2][BUF_DEPTH];

  always #5 clk = ~clk;
  layer_buffer dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int a, c, m, v;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int mm = 0; mm < 2; mm++)
      for (int i = 0; i < BUF_DEPTH; i++) begin
        @(negedge clk);
        model[mm][i] = int'($urandom_range(0, 4194303)) - 2097152;
        wr_en = 1; wr_sel = 1'(mm); wr_addr = AW'(i); wr_data = word_t'(model[mm][i]);
      end
    @(negedge clk) wr_en = 0;
    for (int t = 0; t < 2000; t++) begin
      m = t % 2;               // source memory alternates like successive layers
      a = int'($urandom_range(0, BUF_DEPTH-1));
      c = int'($urandom_range(0, BUF_DEPTH-1));
      in_rd_en = 1; in_sel = 1'(m); in_addr = AW'(a);
      acc_rd_en = 1'($urandom); acc_sel = 1'(1 - m); acc_addr = AW'(c);
      // write the destination memory in the same cycle
      wr_en = 1; wr_sel = 1'(1 - m);
      wr_addr = AW'(int'($urandom_range(0, BUF_DEPTH-1)));
      v = int'($urandom_range(0, 4194303)) - 2097152;
      wr_data = word_t'(v);
      @(negedge clk);
      check("input port", int'(in_data), model[m][a]);
      if (acc_rd_en) check("partial port", int'(acc_data), model[1-m][c]);
      model[1-m][wr_addr] = v;
      in_rd_en = 0; acc_rd_en = 0; wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
