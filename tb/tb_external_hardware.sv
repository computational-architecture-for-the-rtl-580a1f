// tb_external_hardware: runs the SPI reader against the behavioural ADC at
// the default rate (138 clocks per sample, 250 samples/s at 34.6 kHz) and
// checks each delivered sample value, the sample spacing, one chip-select
// frame per sample with 16 SCLK pulses, and that nothing is read while
// disabled.
module tb_external_hardware;
  import qcnn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, enable = 0;
  logic spi_cs_n, spi_sclk, spi_miso, sample_valid;
  word_t sample_data;
  logic [11:0] adc_sample;
  int frames;
  int checks = 0, failures = 0;
  int codes [64];
  int nsamp = 0, sclk_pulses = 0;
  longint cyc = 0, last_t = -1;

  always #5 clk = ~clk;
  external_hardware dut (.*);
  adc_model u_adc (.cs_n(spi_cs_n), .sclk(spi_sclk), .sample(adc_sample), .miso(spi_miso), .frames);
  assign adc_sample = 12'(codes[frames % 64]);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  always @(posedge spi_sclk) sclk_pulses++;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && sample_valid) begin
      check($sformatf("sample %0d", nsamp), sample_data, (codes[nsamp % 64] - 2048) * 8);
      if (last_t >= 0) check("sample spacing", cyc - last_t, 138);
      check("frames per sample", frames, nsamp + 1);
      check("sclk pulses", sclk_pulses, 16 * (nsamp + 1));
      last_t = cyc;
      nsamp++;
    end
  end

  initial begin
    foreach (codes[i]) codes[i] = int'($urandom_range(0, 4095));
    codes[0] = 0; codes[1] = 4095; codes[2] = 2048;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (500) @(posedge clk);
    check("idle while disabled", nsamp, 0);
    check("cs high while disabled", spi_cs_n, 1);
    enable = 1;
    wait (nsamp == 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
