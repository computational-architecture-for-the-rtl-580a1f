// tb_hard_limit: the class bit must be 1 for scores >= 0 and 0 for negative
// scores (including the extremes and zero), registered one cycle after the
// input is marked valid and held while no new result arrives.
module tb_hard_limit;
  import qcnn_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 0, class_out, out_valid;
  word_t score_in = '0, score;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;
  hard_limit dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic apply(int v);
    bit prev;
    @(negedge clk);
    in_valid = 1; score_in = word_t'(v);
    @(negedge clk);
    in_valid = 0;
    check("valid", int'(out_valid), 1);
    check($sformatf("class of %0d", v), int'(class_out), v >= 0);
    check("score", int'(score), v);
    prev = class_out;
    score_in = word_t'(-v - 1);
    @(negedge clk);
    check("valid drops", int'(out_valid), 0);
    check("class held", int'(class_out), int'(prev));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    apply(0); apply(-1); apply(1); apply(2097151); apply(-2097152);
    for (int t = 0; t < 100; t++) apply(int'($urandom_range(0, 4194303)) - 2097152);
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
