// tb_pool_relu: checks pass-through, ReLU and stride-2 max pooling against a
// model of pairs of random values, including negative pairs and idle cycles
// between the two members of a pair.
module tb_pool_relu;
  import qcnn_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 0, relu = 0, pool = 0, odd = 0;
  word_t in_data = '0, out_data;
  logic  out_valid;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;
  pool_relu dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic int r(int v, bit en);
    return (en && v < 0) ? 0 : v;
  endfunction

  initial begin
    int a, b, e;
    bit en;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // pass-through and relu without pooling
    for (int t = 0; t < 50; t++) begin
      @(negedge clk);
      a = int'($urandom_range(0, 4000000)) - 2000000;
      en = 1'($urandom);
      in_valid = 1; pool = 0; relu = en; odd = 1'($urandom); in_data = word_t'(a);
      #1;
      check("pass valid", int'(out_valid), 1);
      check("pass data", int'(out_data), r(a, en));
    end
    // pooling pairs
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      a = int'($urandom_range(0, 4000000)) - 2000000;
      b = int'($urandom_range(0, 4000000)) - 2000000;
      en = 1'($urandom);
      in_valid = 1; pool = 1; relu = en; odd = 0; in_data = word_t'(a);
      #1 check("even gives no output", int'(out_valid), 0);
      if ($urandom_range(0, 1)) begin
        @(negedge clk) in_valid = 0;
        #1 check("idle gives no output", int'(out_valid), 0);
      end
      @(negedge clk);
      in_valid = 1; odd = 1; in_data = word_t'(b);
      e = r(a, en) > r(b, en) ? r(a, en) : r(b, en);
      #1;
      check("odd valid", int'(out_valid), 1);
      check("pooled", int'(out_data), e);
    end
    @(negedge clk) in_valid = 0;
    #1 check("no valid when idle", int'(out_valid), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
