// hard_limit: output stage of the classifier.
//
// The sigmoid of the trained network is replaced by a hard limit,
// f(x) = 1 for x >= 0 and 0 for x < 0, built, as in the document, as an
// inverter on the sign bit of the last fully connected output. This block
// registers that bit and the raw score when the controller marks the final
// result (`in_valid`); `class_out` = 1 means the score is >= 0, taken here as
// "atrial fibrillation" (the document does not say which class is the
// positive one). Outputs change one cycle after `in_valid` and hold until the
// next result; `out_valid` pulses for that one cycle.
module hard_limit
  import qcnn_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t score_in,
  output logic  class_out,
  output word_t score,
  output logic  out_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      class_out <= 1'b0;
      score     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        class_out <= ~score_in[DATA_W-1];
        score     <= score_in;
      end
    end
  end

endmodule
