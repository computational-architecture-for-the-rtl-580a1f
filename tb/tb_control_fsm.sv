// tb_control_fsm: checks the beat stream of the sequencer for one inference
// against counts and address sequences derived here from the network table:
// parameters read once each in address order, ECG samples read in order for
// every first-layer pass, the number of captures, partial-sum read-backs and
// scratch writes, the order and place of every finished output (pooled
// convolution outputs channel-major, neuron outputs), the alternation of
// the destination buffer, exactly one final result, and the cycle count.
module tb_control_fsm;
  import qcnn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 0;
  logic busy, done, prm_rd_en, ecg_rd_en, in_rd_en, in_sel;
  logic [PARAM_AW-1:0] prm_addr;
  logic [8:0] ecg_addr;
  logic [BUF_AW-1:0] in_addr;
  beat_t s1, s2, s3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  control_fsm dut (.*);

  int K [4]  = '{27, 14, 3, 4};
  int CI [4] = '{1, 3, 10, 10};
  int CO [4] = '{3, 10, 10, 10};
  int LI [4] = '{500, 237, 112, 55};
  int FI [3] = '{260, 30, 10};
  int FO [3] = '{30, 10, 1};

  int exp_addr [$];
  int exp_dst [$];
  int n_prm = 0, prm_err = 0, n_ecg = 0, ecg_err = 0, n_cap = 0, n_accrd = 0, n_scr = 0;
  int n_final = 0, n_out = 0, out_err = 0, busy_cycles = 0, n_in = 0;

  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    if (prm_rd_en) begin
      if (int'(prm_addr) != n_prm) prm_err++;
      n_prm++;
    end
    if (ecg_rd_en) begin
      if (int'(ecg_addr) != n_ecg % 500) ecg_err++;
      n_ecg++;
    end
    if (in_rd_en) n_in++;
    if (s2.valid && s2.capture) n_cap++;
    if (s1.valid && s1.acc_rd) n_accrd++;
    if (s3.valid && s3.wr && !s3.last) n_scr++;
    if (s3.valid && s3.final_out) n_final++;
    if (s3.valid && s3.wr && s3.last && (!s3.pool || s3.odd)) begin
      if (n_out >= exp_addr.size() || int'(s3.wr_addr) != exp_addr[n_out] || int'(s3.dst) != exp_dst[n_out]) begin
        if (out_err < 5) $display("output %0d at %0d/%0d", n_out, s3.dst, s3.wr_addr);
        out_err++;
      end
      n_out++;
    end
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int caps, accrd, scr, cyc, lo;
    caps = 0; accrd = 0; scr = 0; cyc = 0;
    for (int l = 0; l < 4; l++) begin
      lo = LI[l] - K[l] + 1;
      caps  += CO[l] * CI[l] * lo;
      accrd += CO[l] * (CI[l] - 1) * lo;
      scr   += CO[l] * (CI[l] - 1) * lo;
      cyc   += CO[l] * (1 + CI[l] * (K[l] + LI[l]));
      for (int a = 0; a < CO[l] * (lo / 2); a++) begin exp_addr.push_back(a); exp_dst.push_back(l % 2); end
    end
    for (int l = 0; l < 3; l++) begin
      caps += FO[l] * ((FI[l] + 26) / 27);
      cyc  += FO[l] * (1 + FI[l]);
      for (int a = 0; a < FO[l]; a++) begin exp_addr.push_back(a); exp_dst.push_back((l + 4) % 2); end
    end
    cyc += 7 * DRAIN + 1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check("idle", int'(busy), 0);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(negedge clk);
    repeat (5) @(negedge clk);
    check("parameters read", n_prm, PARAM_DEPTH);
    check("parameter order errors", prm_err, 0);
    check("ECG reads", n_ecg, 3 * 500);
    check("ECG order errors", ecg_err, 0);
    check("buffer input reads", n_in, 10*3*237 + 10*10*112 + 10*10*55 + 30*260 + 10*30 + 10);
    check("captures", n_cap, caps);
    check("partial reads", n_accrd, accrd);
    check("scratch writes", n_scr, scr);
    check("finished outputs", n_out, exp_addr.size());
    check("output place errors", out_err, 0);
    check("final result", n_final, 1);
    check("cycles", busy_cycles, cyc);
    check("idle again", int'(busy), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
