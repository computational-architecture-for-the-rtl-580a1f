// tb_param_bram: fills all 9385 words with random values, reads them back in
// random order and checks the one-cycle read latency and that a write does
// not disturb other addresses.
module tb_param_bram;
  import qcnn_pkg::*;

  localparam int AW = $clog2(PARAM_DEPTH);
  logic clk = 1'b0;
  logic wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  word_t wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  int model [PARAM_DEPTH];

  always #5 clk = ~clk;
  param_bram dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int a;
    for (int i = 0; i < PARAM_DEPTH; i++) begin
      @(negedge clk);
      model[i] = int'($urandom_range(0, 4194303)) - 2097152;
      wr_en = 1; wr_addr = AW'(i); wr_data = word_t'(model[i]);
    end
    @(negedge clk) wr_en = 0;
    for (int t = 0; t < 3000; t++) begin
      a = int'($urandom_range(0, PARAM_DEPTH-1));
      rd_en = 1; rd_addr = AW'(a);
      // simultaneous write elsewhere
      wr_en = 1; wr_addr = AW'((a + 1) % PARAM_DEPTH);
      model[(a + 1) % PARAM_DEPTH] = int'($urandom_range(0, 4194303)) - 2097152;
      wr_data = word_t'(model[(a + 1) % PARAM_DEPTH]);
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      check($sformatf("read %0d", a), int'(rd_data), model[a]);
      @(negedge clk);
      check("data held without rd_en", int'(rd_data), model[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
