// tb_qcnn_af_top: end-to-end test of the AF classifier at its default sizes.
//
// Loads 9385 random parameters through the load port, feeds three 500-sample
// segments of random ECG codes through a behavioural SPI ADC at the default
// sampling rate, and for every inference compares the raw score and the
// class bit with a reference model of the quantized network written here
// from the layer table (same truncation and saturation rules). The bias of
// the last layer is forced high for the second segment and low for the third
// so both classes occur. It also checks the inference latency against the
// cycle count derived from the loop structure and against the 1.358 ms at
// 25.5 MHz the design targets, and counts how often each mechanism
// (convolution passes, dot-product chunks, partial-sum read-back, bias mux,
// pooling, buffer swap, ECG bank swap, both classes) occurred.
module tb_qcnn_af_top;
  localparam int NP = 9385, DW = 22, FR = 14, NSEG = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic acq_enable = 1'b0;
  logic spi_cs_n, spi_sclk, spi_miso;
  logic prm_wr_en = 1'b0;
  logic [13:0] prm_wr_addr = '0;
  logic signed [DW-1:0] prm_wr_data = '0;
  logic busy, ecg_bank, result_valid, af_detected, overrun;
  logic signed [DW-1:0] score;
  logic [11:0] adc_sample;
  int frames;

  int checks = 0, failures = 0;
  int P [NP];
  int codes [NSEG*500];
  longint cyc = 0;
  int busy_cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (busy) busy_cycles++;
  end

  qcnn_af_top dut (
    .clk, .rst_n, .acq_enable, .spi_cs_n, .spi_sclk, .spi_miso,
    .prm_wr_en, .prm_wr_addr, .prm_wr_data,
    .busy, .ecg_bank, .result_valid, .af_detected, .score, .overrun
  );

  adc_model u_adc (.cs_n(spi_cs_n), .sclk(spi_sclk), .sample(adc_sample), .miso(spi_miso), .frames);
  assign adc_sample = 12'(codes[frames < NSEG*500 ? frames : 0]);

  // ---------------- reference model ----------------
  function automatic int sat(longint v);
    if (v > (1 <<< (DW-1)) - 1) return (1 <<< (DW-1)) - 1;
    if (v < -(1 <<< (DW-1)))    return -(1 <<< (DW-1));
    return int'(v);
  endfunction
  function automatic longint mulq(int a, int b);
    longint p;
    p = longint'(a) * longint'(b);
    return p >>> FR;
  endfunction

  int K [4]   = '{27, 14, 3, 4};
  int CI [4]  = '{1, 3, 10, 10};
  int CO [4]  = '{3, 10, 10, 10};
  int LI [4]  = '{500, 237, 112, 55};
  int FI [3]  = '{260, 30, 10};
  int FO [3]  = '{30, 10, 1};

  function automatic int ref_score(int seg);
    int act [];
    int nxt [];
    int part [];
    int ptr, lo, bias, v, s0;
    longint s;
    ptr = 0;
    act = new[500];
    for (int i = 0; i < 500; i++) act[i] = (codes[seg*500 + i] - 2048) <<< 3;
    for (int l = 0; l < 4; l++) begin
      lo = LI[l] - K[l] + 1;
      nxt = new[CO[l] * (lo/2)];
      part = new[lo];
      for (int f = 0; f < CO[l]; f++) begin
        bias = P[ptr++];
        for (int c = 0; c < CI[l]; c++) begin
          for (int n = 0; n < lo; n++) begin
            s = 0;
            for (int k = 0; k < K[l]; k++) s += mulq(act[c*LI[l] + n + k], P[ptr + k]);
            part[n] = sat((c == 0 ? 0 : longint'(part[n])) + s + (c == CI[l]-1 ? bias : 0));
          end
          ptr += K[l];
        end
        for (int m = 0; m < lo/2; m++) begin
          v  = part[2*m]   < 0 ? 0 : part[2*m];
          s0 = part[2*m+1] < 0 ? 0 : part[2*m+1];
          nxt[f*(lo/2) + m] = v > s0 ? v : s0;
        end
      end
      act = nxt;
    end
    for (int l = 0; l < 3; l++) begin
      nxt = new[FO[l]];
      for (int j = 0; j < FO[l]; j++) begin
        bias = P[ptr++];
        v = 0;
        for (int q = 0; q*27 < FI[l]; q++) begin
          s = 0;
          for (int e = q*27; e < FI[l] && e < q*27 + 27; e++) s += mulq(act[e], P[ptr + e]);
          v = sat((q == 0 ? 0 : longint'(v)) + s + ((q+1)*27 >= FI[l] ? bias : 0));
        end
        ptr += FI[l];
        nxt[j] = (l < 2 && v < 0) ? 0 : v;
      end
      act = nxt;
    end
    if (ptr != NP) $display("reference model consumed %0d parameters", ptr);
    return act[0];
  endfunction

  // ---------------- mechanism counters ----------------
  int n_conv_pass = 0, n_fc_chunk = 0, n_acc_read = 0, n_fb = 0, n_bias_add = 0;
  int n_pool_wr = 0, n_wr_a = 0, n_wr_b = 0, n_bank0 = 0, n_bank1 = 0, n_cls1 = 0, n_cls0 = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.s1.valid && dut.u_ctrl.s1.w_clr && !dut.u_ctrl.s1.x_shift) n_conv_pass++;
    if (dut.u_ctrl.s1.valid && dut.u_ctrl.s1.w_clr &&  dut.u_ctrl.s1.x_shift) n_fc_chunk++;
    if (dut.u_ctrl.s1.valid && dut.u_ctrl.s1.acc_rd) n_acc_read++;
    if (dut.u_ctrl.s2.valid && dut.u_ctrl.s2.capture && dut.u_ctrl.s2.fb) n_fb++;
    if (dut.u_ctrl.s2.valid && dut.u_ctrl.s2.capture && dut.u_ctrl.s2.last) n_bias_add++;
    if (dut.wr_valid && dut.u_ctrl.s3.pool) n_pool_wr++;
    if (dut.wr_valid && !dut.u_ctrl.s3.dst) n_wr_a++;
    if (dut.wr_valid &&  dut.u_ctrl.s3.dst) n_wr_b++;
    if (dut.start && !ecg_bank) n_bank0++;
    if (dut.start &&  ecg_bank) n_bank1++;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // latency expected from the loop structure
  function automatic int expected_cycles();
    int t;
    t = 0;
    for (int l = 0; l < 4; l++) t += CO[l] * (1 + CI[l] * (K[l] + LI[l]));
    for (int l = 0; l < 3; l++) t += FO[l] * (1 + FI[l]);
    return t + 7*3 + 1;
  endfunction

  int exp_sc, lat;

  initial begin
    for (int i = 0; i < NP; i++) P[i] = int'($urandom_range(0, 8191)) - 4096;
    for (int i = 0; i < NSEG*500; i++) codes[i] = int'($urandom_range(0, 4095));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NP; i++) begin
      @(negedge clk);
      prm_wr_en = 1'b1; prm_wr_addr = 14'(i); prm_wr_data = DW'(P[i]);
    end
    @(negedge clk) prm_wr_en = 1'b0;
    acq_enable = 1'b1;
    for (int seg = 0; seg < NSEG; seg++) begin
      busy_cycles = 0;
      @(posedge clk iff result_valid);
      @(negedge clk);
      lat = busy_cycles;
      exp_sc = ref_score(seg);
      $display("segment %0d: score %0d (reference %0d) class %0d, latency %0d cycles", seg, score, exp_sc, af_detected, lat);
      check("score", score, exp_sc);
      check("class", af_detected, exp_sc >= 0);
      check("latency", lat, expected_cycles());
      // 1.358 ms at 25.5 MHz is 34629 cycles: stay within 1 %
      checks++;
      if (lat < 34283 || lat > 34975) begin failures++; $display("FAIL latency far from target"); end
      if (af_detected) n_cls1++; else n_cls0++;
      // force the class of the next segment through the last bias (address 9374)
      @(negedge clk);
      prm_wr_en = 1'b1; prm_wr_addr = 14'(9374);
      P[9374] = (seg == 0) ? (1 <<< (DW-1)) - 1 : -(1 <<< (DW-1));
      prm_wr_data = DW'(P[9374]);
      @(negedge clk) prm_wr_en = 1'b0;
    end
    check("no overrun", overrun, 0);
    check("conv passes", n_conv_pass, NSEG * (3*1 + 10*3 + 10*10 + 10*10));
    check("fc chunks",   n_fc_chunk,  NSEG * (30*10 + 10*2 + 1));
    check("pooled writes", n_pool_wr, NSEG * (3*237 + 10*112 + 10*55 + 10*26));
    $display("mechanisms: conv_pass=%0d fc_chunk=%0d acc_read=%0d fc_feedback=%0d bias_add=%0d pool_wr=%0d wrA=%0d wrB=%0d bank0=%0d bank1=%0d class1=%0d class0=%0d",
             n_conv_pass, n_fc_chunk, n_acc_read, n_fb, n_bias_add, n_pool_wr, n_wr_a, n_wr_b, n_bank0, n_bank1, n_cls1, n_cls0);
    checks++; if (n_acc_read == 0) begin failures++; $display("FAIL no partial-sum read-back"); end
    checks++; if (n_fb == 0)       begin failures++; $display("FAIL no dot-product feedback"); end
    checks++; if (n_bias_add == 0) begin failures++; $display("FAIL bias mux never selected"); end
    checks++; if (n_wr_a == 0 || n_wr_b == 0) begin failures++; $display("FAIL buffer memories not alternated"); end
    checks++; if (n_bank0 == 0 || n_bank1 == 0) begin failures++; $display("FAIL ECG banks not alternated"); end
    checks++; if (n_cls1 == 0 || n_cls0 == 0) begin failures++; $display("FAIL hard limit gave one class only"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
