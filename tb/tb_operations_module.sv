// tb_operations_module: self-checking test of the 27-lane systolic MAC array.
//
// Convolution mode: random kernel lengths 1..27, random weights, samples,
// bias and partial sums; every window's output is compared with a direct
// sliding-window sum computed here, and must appear one cycle after its
// capture. Dot-product mode: a random-length vector is fed in chunks of up to
// 27 pairs with the previous result fed back, the bias added on the last
// chunk, and the result compared with the direct dot product.
module tb_operations_module;
  import qcnn_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  w_shift = 0, w_clr = 0, x_shift = 0, bias_load = 0;
  logic  capture = 0, first = 0, use_fb = 0, add_bias = 0;
  word_t w_in = '0, x_in = '0, bias_in = '0, partial_in = '0, y;
  logic  y_valid;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  operations_module dut (.*);

  function automatic longint mq(int a, int b);
    return (longint'(a) * longint'(b)) >>> FRAC_W;
  endfunction
  function automatic int satw(longint v);
    if (v > 2097151)  return 2097151;
    if (v < -2097152) return -2097152;
    return int'(v);
  endfunction
  function automatic int rnd(int mag);
    return int'($urandom_range(0, 2*mag)) - mag;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic idle();
    w_shift = 0; x_shift = 0; bias_load = 0; capture = 0; w_clr = 0;
  endtask

  // convolution of one channel
  task automatic conv_run(int k, int len, bit with_bias, bit first_pass);
    int w [27];
    int x [64];
    int p [64];
    int bias, exp;
    longint s;
    bias = rnd(200000);
    for (int i = 0; i < k; i++) w[i] = rnd(8192);
    for (int i = 0; i < len; i++) begin x[i] = rnd(40000); p[i] = rnd(100000); end
    @(negedge clk);
    bias_in = word_t'(bias); bias_load = 1;
    @(negedge clk); idle();
    for (int i = 0; i < k; i++) begin
      w_shift = 1; w_clr = (i == 0); w_in = word_t'(w[i]);
      @(negedge clk);
    end
    idle();
    for (int i = 0; i <= len; i++) begin
      // capture the window completed by the previous shift
      capture = (i >= k);
      first = first_pass; use_fb = 0; add_bias = with_bias;
      if (i >= k) partial_in = word_t'(p[i-k]);
      x_shift = (i < len); x_in = (i < len) ? word_t'(x[i]) : '0;
      @(negedge clk);
      if (i >= k) begin
        s = 0;
        for (int m = 0; m < k; m++) s += mq(x[i-k+m], w[m]);
        exp = satw((first_pass ? 0 : longint'(p[i-k])) + s + (with_bias ? bias : 0));
        check("y_valid", int'(y_valid), 1);
        check($sformatf("conv k=%0d n=%0d", k, i-k), int'(y), exp);
      end
      idle();
    end
    @(negedge clk);
    check("y_valid low", int'(y_valid), 0);
  endtask

  // dot product in chunks of up to 27 with feedback
  task automatic fc_run(int n);
    int w [300];
    int x [300];
    int bias, exp, cl;
    longint s;
    bias = rnd(200000);
    for (int i = 0; i < n; i++) begin w[i] = rnd(8192); x[i] = rnd(40000); end
    @(negedge clk);
    bias_in = word_t'(bias); bias_load = 1;
    @(negedge clk); idle();
    exp = 0;
    for (int q = 0; q*27 < n; q++) begin
      cl = (n - q*27 > 27) ? 27 : n - q*27;
      for (int e = 0; e < cl; e++) begin
        w_shift = 1; x_shift = 1; w_clr = (e == 0);
        w_in = word_t'(w[q*27+e]); x_in = word_t'(x[q*27+e]);
        @(negedge clk);
        idle();
      end
      s = 0;
      for (int e = 0; e < cl; e++) s += mq(x[q*27+e], w[q*27+e]);
      exp = satw((q == 0 ? 0 : longint'(exp)) + s + ((q+1)*27 >= n ? bias : 0));
      capture = 1; first = (q == 0); use_fb = (q != 0); add_bias = ((q+1)*27 >= n);
      partial_in = word_t'(rnd(1000000)); // must be ignored
      @(negedge clk);
      idle();
    end
    check($sformatf("fc n=%0d", n), int'(y), exp);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    conv_run(27, 60, 1, 1);
    conv_run(14, 40, 0, 0);
    conv_run(3, 20, 1, 0);
    conv_run(4, 20, 0, 1);
    for (int t = 0; t < 6; t++) conv_run(int'($urandom_range(1, 27)), int'($urandom_range(28, 60)), 1'($urandom), 1'($urandom));
    fc_run(260);
    fc_run(30);
    fc_run(10);
    fc_run(27);
    for (int t = 0; t < 4; t++) fc_run(int'($urandom_range(1, 300)));
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
