// external_hardware: SPI front end that acquires the ECG from an external ADC.
//
// Every SAMPLE_DIV clock cycles (138 cycles = 250 samples/s at the 34.6 kHz
// operating clock) it runs one SPI read: chip select low, FRAME_BITS clock
// pulses of SCLK_HALF cycles per half period (SCLK idles low, MISO sampled
// on the rising edge, MSB first), chip select high. The last ADC_BITS bits
// received are the unsigned (offset-binary) sample. It is re-centred around
// zero and shifted left by IN_SHIFT to become a signed fixed-point word,
// delivered with a one-cycle `sample_valid` pulse. The input memory groups
// the samples into segments of 500.
//
// The document gives the sampling rate, the segment length and that the link
// is SPI; the ADC, its frame format, the SPI mode and the sample scaling are
// assumptions of this design (the defaults fit a 12-bit converter sending
// four leading zeros in a 16-bit frame). With IN_SHIFT = 3 the three lowest
// bits of `sample_data` are always zero; they are kept so that the sample is
// a plain fixed-point word like every other value in the datapath.
module external_hardware
  import qcnn_pkg::*;
#(
  parameter int SAMPLE_DIV = 138,
  parameter int SCLK_HALF  = 1,
  parameter int FRAME_BITS = 16,
  parameter int ADC_BITS   = 12,
  parameter int IN_SHIFT   = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  output logic  spi_cs_n,
  output logic  spi_sclk,
  input  logic  spi_miso,
  output logic  sample_valid,
  output word_t sample_data
);

  typedef enum logic [1:0] {S_WAIT, S_LOW, S_HIGH, S_END} spi_state_t;

  spi_state_t                  state;
  logic [$clog2(SAMPLE_DIV):0] tick_cnt;
  logic [$clog2(SCLK_HALF+1):0] half_cnt;
  logic [$clog2(FRAME_BITS):0] bit_cnt;
  logic [ADC_BITS-1:0]         shreg;   // last ADC_BITS bits of the frame
  logic                        tick;
  logic signed [DATA_W-1:0]    centred;

  // sample-rate timer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tick_cnt <= '0;
    else if (!enable || 32'(tick_cnt) == SAMPLE_DIV - 1) tick_cnt <= '0;
    else tick_cnt <= tick_cnt + 1'b1;
  end
  assign tick = enable && 32'(tick_cnt) == SAMPLE_DIV - 1;

  always_comb begin
    centred = DATA_W'(signed'({1'b0, shreg})) - DATA_W'(signed'(1 << (ADC_BITS-1)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_WAIT;
      spi_cs_n     <= 1'b1;
      spi_sclk     <= 1'b0;
      half_cnt     <= '0;
      bit_cnt      <= '0;
      shreg        <= '0;
      sample_valid <= 1'b0;
      sample_data  <= '0;
    end else begin
      sample_valid <= 1'b0;
      unique case (state)
        S_WAIT: if (tick) begin
          spi_cs_n <= 1'b0;
          half_cnt <= '0;
          bit_cnt  <= '0;
          state    <= S_LOW;
        end
        S_LOW: begin
          if (32'(half_cnt) == SCLK_HALF - 1) begin
            half_cnt <= '0;
            spi_sclk <= 1'b1;                       // rising edge: sample MISO
            shreg    <= {shreg[ADC_BITS-2:0], spi_miso};
            state    <= S_HIGH;
          end else half_cnt <= half_cnt + 1'b1;
        end
        S_HIGH: begin
          if (32'(half_cnt) == SCLK_HALF - 1) begin
            half_cnt <= '0;
            spi_sclk <= 1'b0;
            if (32'(bit_cnt) == FRAME_BITS - 1) state <= S_END;
            else begin
              bit_cnt <= bit_cnt + 1'b1;
              state   <= S_LOW;
            end
          end else half_cnt <= half_cnt + 1'b1;
        end
        S_END: begin
          spi_cs_n     <= 1'b1;
          sample_valid <= 1'b1;
          sample_data  <= centred <<< IN_SHIFT;
          state        <= S_WAIT;
        end
        default: state <= S_WAIT;
      endcase
    end
  end

endmodule
