// tb_qcnn_af_overrun: runs the top level with segments arriving faster than
// inferences finish (40 clocks per sample, so a segment every 20,000 cycles
// against 34,717 cycles per inference). Checks that the overrun flag stays
// low until a segment completes during an inference, that the segment that
// arrives while busy is skipped and the next one is processed, and that every
// started inference delivers a result.
module tb_qcnn_af_overrun;
  localparam int DIV = 40, SEG = 500 * DIV;

  logic clk = 1'b0, rst_n = 1'b0;
  logic acq_enable = 1'b0;
  logic spi_cs_n, spi_sclk, spi_miso;
  logic prm_wr_en = 1'b0;
  logic [13:0] prm_wr_addr = '0;
  logic [21:0] prm_wr_data = '0;
  logic busy, ecg_bank, result_valid, af_detected, overrun;
  logic [21:0] score;
  logic [11:0] adc_sample;
  int frames;
  int checks = 0, failures = 0, starts = 0, results = 0, bank1_starts = 0;
  logic busy_q = 1'b0;

  always #5 clk = ~clk;

  qcnn_af_top #(.SAMPLE_DIV(DIV)) dut (
    .clk, .rst_n, .acq_enable, .spi_cs_n, .spi_sclk, .spi_miso,
    .prm_wr_en, .prm_wr_addr, .prm_wr_data,
    .busy, .ecg_bank, .result_valid, .af_detected, .score, .overrun
  );
  adc_model u_adc (.cs_n(spi_cs_n), .sclk(spi_sclk), .sample(adc_sample), .miso(spi_miso), .frames);
  assign adc_sample = 12'(frames * 37);

  always @(posedge clk) if (rst_n) begin
    busy_q <= busy;
    if (busy && !busy_q) begin
      starts++;
      if (ecg_bank) bank1_starts++;
    end
    if (result_valid) results++;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 9385; i++) begin
      @(negedge clk);
      prm_wr_en = 1'b1; prm_wr_addr = 14'(i); prm_wr_data = 22'($urandom_range(0, 8191) - 4096);
    end
    @(negedge clk) prm_wr_en = 1'b0;
    acq_enable = 1'b1;
    // first segment done at about 1*SEG, second (while busy) at 2*SEG
    repeat (SEG + SEG/2) @(negedge clk);
    check("no overrun yet", int'(overrun), 0);
    check("one inference started", starts, 1);
    repeat (SEG) @(negedge clk);
    check("overrun flagged", int'(overrun), 1);
    check("busy segment skipped", starts, 1);
    // third segment starts the second inference; fifth the third
    repeat (4 * SEG + 8000) @(negedge clk);
    check("inferences started", starts, 3);
    check("results delivered", results, 3);
    check("only even segments (bank 0) processed", bank1_starts, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
