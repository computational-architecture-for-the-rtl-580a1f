// tb_input_ecg_mem: writes three 500-sample segments with gaps between
// samples, checks that `seg_ready` pulses once per segment, that the read
// bank alternates, and that while the next segment is being written the
// completed one reads back unchanged.
module tb_input_ecg_mem;
  import qcnn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_valid = 0, seg_ready, rd_bank, rd_en = 0;
  word_t wr_data = '0, rd_data;
  logic [8:0] rd_addr = '0;
  int checks = 0, failures = 0, ready_count = 0;
  int seg [3][SEG_LEN];

  always #5 clk = ~clk;
  input_ecg_mem dut (.*);

  always @(posedge clk) if (rst_n && seg_ready) ready_count++;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int a;
    bit bank_prev;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 3; s++) begin
      for (int i = 0; i < SEG_LEN; i++) begin
        @(negedge clk);
        seg[s][i] = int'($urandom_range(0, 4194303)) - 2097152;
        wr_valid = 1; wr_data = word_t'(seg[s][i]);
        // read back the previous segment while this one is written
        if (s > 0) begin
          a = int'($urandom_range(0, SEG_LEN-1));
          rd_en = 1; rd_addr = 9'(a);
        end
        @(negedge clk);
        wr_valid = 0; rd_en = 0;
        if (s > 0) check("previous segment", int'(rd_data), seg[s-1][a]);
        if (i < SEG_LEN - 1) check("no early ready", int'(seg_ready), 0);
        else begin
          check("ready pulse", int'(seg_ready), 1);
          check("read bank", int'(rd_bank), s % 2);
        end
      end
    end
    for (int i = 0; i < SEG_LEN; i++) begin
      @(negedge clk) rd_en = 1; rd_addr = 9'(i);
      @(negedge clk) rd_en = 0;
      check("last segment", int'(rd_data), seg[2][i]);
    end
    check("ready count", ready_count, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
