// control_fsm: sequencer that runs the whole network on one operations module.
//
// For every layer of the table in qcnn_pkg it walks the loops of that layer
// and issues one "beat" per clock cycle. Stage 0 of a beat addresses the
// parameter memory and the input (ECG memory or source layer buffer); the
// beat's control word (beat_t) then travels down three registers, s1..s3,
// that drive the datapath: s1 shifts the operations module's chains, loads
// the bias and reads a partial sum, s2 captures the array sum, s3 writes the
// result through pool_relu into the destination buffer or, for the last
// layer, into the hard-limit stage.
//
// Loop order (parameters are read strictly in address order):
//   convolution: for each filter: 1 bias beat; for each input channel:
//                K weight beats, then one beat per input sample; the window
//                is full from sample K-1 on and yields one output per beat.
//   fully connected: for each neuron: 1 bias beat; the inputs in chunks of
//                up to LANES, one beat per (weight, input) pair.
// After each layer DRAIN idle cycles let the pipeline empty before the two
// layer buffers swap roles. Layer l reads buffer (l-1) mod 2 and writes
// buffer l mod 2; layer 0 reads the ECG memory. Pooled outputs of filter f
// go to f*(lout/2)+m (so the flattened vector is channel-major); partial sums
// of the filter in flight sit at SCRATCH_BASE+n.
// Timing: `start` is sampled in IDLE; `busy` is high from the next cycle
// until `done`, which pulses once the last result is registered.
// The document describes this block only by its duties; the loop order and
// pipeline are this design's own.
module control_fsm
  import qcnn_pkg::*;
#(
  parameter int LANES_P   = LANES,
  parameter int SCRATCH_P = SCRATCH_BASE,
  parameter int DRAIN_P   = DRAIN
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                done,
  // stage 0: memory addresses
  output logic                prm_rd_en,
  output logic [PARAM_AW-1:0] prm_addr,
  output logic                ecg_rd_en,
  output logic [8:0]          ecg_addr,
  output logic                in_rd_en,
  output logic                in_sel,
  output logic [BUF_AW-1:0]   in_addr,
  // pipelined control words
  output beat_t               s1,
  output beat_t               s2,
  output beat_t               s3
);

  typedef enum logic [2:0] {IDLE, BIAS, WLOAD, STREAM, FCB, DRAIN_S, DONE_S} state_t;

  state_t              state;
  logic [2:0]          layer;
  logic [9:0]          o, p, b;
  logic [PARAM_AW-1:0] ptr;
  logic [3:0]          dcnt;
  layer_cfg_t          cfg;
  beat_t               b0;
  logic [9:0]          n, cl, idx, half;
  logic                conv_capture, fc_chunk_end, fc_last;

  always_comb begin
    cfg          = layer_cfg(layer);
    n            = b - 10'(cfg.k) + 10'd1;
    half         = {1'b0, cfg.lout[9:1]};
    idx          = 10'(p * 10'(LANES_P)) + b;
    cl           = (cfg.cin - 10'(p * 10'(LANES_P)) > 10'(LANES_P)) ? 10'(LANES_P)
                                                              : cfg.cin - 10'(p * 10'(LANES_P));
    conv_capture = b >= 10'(cfg.k) - 10'd1;
    fc_chunk_end = b == cl - 10'd1;
    fc_last      = idx == cfg.cin - 10'd1;

    b0        = '0;
    prm_rd_en = 1'b0;
    ecg_rd_en = 1'b0;
    in_rd_en  = 1'b0;
    prm_addr  = ptr;
    ecg_addr  = b[8:0];
    in_sel    = ~layer[0];
    in_addr   = BUF_AW'(p * cfg.lin + b);
    b0.dst    = layer[0];
    unique case (state)
      BIAS: begin
        b0.valid   = 1'b1;
        b0.bias_ld = 1'b1;
        prm_rd_en  = 1'b1;
      end
      WLOAD: begin
        b0.valid   = 1'b1;
        b0.w_shift = 1'b1;
        b0.w_clr   = (b == '0);
        prm_rd_en  = 1'b1;
      end
      STREAM: begin
        b0.valid    = 1'b1;
        b0.x_shift  = 1'b1;
        b0.x_ecg    = (layer == '0);
        ecg_rd_en   = (layer == '0);
        in_rd_en    = (layer != '0);
        b0.capture  = conv_capture;
        b0.first    = (p == '0);
        b0.last     = (p == cfg.cin - 10'd1);
        b0.acc_rd   = conv_capture && (p != '0);
        b0.acc_addr = BUF_AW'(SCRATCH_P) + BUF_AW'(n);
        b0.wr       = conv_capture;
        b0.wr_addr  = b0.last ? BUF_AW'(o * half + 10'(n >> 1)) : BUF_AW'(SCRATCH_P) + BUF_AW'(n);
        b0.relu     = b0.last && cfg.relu;
        b0.pool     = b0.last && cfg.pool;
        b0.odd      = n[0];
      end
      FCB: begin
        b0.valid     = 1'b1;
        b0.w_shift   = 1'b1;
        b0.w_clr     = (b == '0);
        b0.x_shift   = 1'b1;
        prm_rd_en    = 1'b1;
        in_rd_en     = 1'b1;
        in_addr      = BUF_AW'(idx);
        b0.capture   = fc_chunk_end;
        b0.first     = (p == '0);
        b0.fb        = (p != '0);
        b0.last      = fc_last;
        b0.wr        = fc_chunk_end && fc_last;
        b0.wr_addr   = BUF_AW'(o);
        b0.relu      = cfg.relu;
        b0.final_out = fc_chunk_end && fc_last && (layer == 3'(N_LAYERS-1));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      layer <= '0;
      o     <= '0;
      p     <= '0;
      b     <= '0;
      ptr   <= '0;
      dcnt  <= '0;
      s1    <= '0;
      s2    <= '0;
      s3    <= '0;
    end else begin
      s1 <= b0;
      s2 <= s1;
      s3 <= s2;
      unique case (state)
        IDLE: if (start) begin
          layer <= '0;
          o     <= '0;
          p     <= '0;
          b     <= '0;
          ptr   <= '0;
          state <= BIAS;
        end
        BIAS: begin
          ptr   <= ptr + 1'b1;
          b     <= '0;
          p     <= '0;
          state <= cfg.is_fc ? FCB : WLOAD;
        end
        WLOAD: begin
          ptr <= ptr + 1'b1;
          if (b == 10'(cfg.k) - 10'd1) begin
            b     <= '0;
            state <= STREAM;
          end else b <= b + 1'b1;
        end
        STREAM: begin
          if (b == cfg.lin - 10'd1) begin
            b <= '0;
            if (p == cfg.cin - 10'd1) begin
              p <= '0;
              if (o == cfg.cout - 10'd1) begin
                o     <= '0;
                dcnt  <= '0;
                state <= DRAIN_S;
              end else begin
                o     <= o + 1'b1;
                state <= BIAS;
              end
            end else begin
              p     <= p + 1'b1;
              state <= WLOAD;
            end
          end else b <= b + 1'b1;
        end
        FCB: begin
          ptr <= ptr + 1'b1;
          if (fc_chunk_end) begin
            b <= '0;
            if (fc_last) begin
              p <= '0;
              if (o == cfg.cout - 10'd1) begin
                o     <= '0;
                dcnt  <= '0;
                state <= DRAIN_S;
              end else begin
                o     <= o + 1'b1;
                state <= BIAS;
              end
            end else p <= p + 1'b1;
          end else b <= b + 1'b1;
        end
        DRAIN_S: begin
          if (32'(dcnt) == DRAIN_P - 1) begin
            if (layer == 3'(N_LAYERS-1)) state <= DONE_S;
            else begin
              layer <= layer + 1'b1;
              state <= BIAS;
            end
          end else dcnt <= dcnt + 1'b1;
        end
        DONE_S: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);
  assign done = (state == DONE_S);

endmodule
