// phase_accumulator: numerically controlled phase source of the mixer.
//
// An ACC_W-bit register adds the frequency control word freq_word once per
// accepted sample (sample_en high) and wraps around modulo 2^ACC_W, so the
// carrier frequency is f = freq_word / 2^ACC_W times the sample rate.  The
// accumulator is truncated to its B_C most significant bits, the phase
// precision the oscillator needs, and a B_C-bit phase offset (the theta(k)
// term of the carrier phase w0*k + theta(k), e.g. from a carrier recovery
// loop) is added modulo one turn:
//   phase = acc[ACC_W-1 -: B_C] + phase_offset
// The phase output is combinational from the register and the offset, so the
// sample presented together with sample_en sees acc(k) and the register then
// moves on to acc(k+1) = acc(k) + freq_word.  wrapped pulses for one cycle
// after an update that carried out of the accumulator (one carrier period
// completed).  Reset clears the accumulator.
//
// Accumulation and truncation to B_C bits follow the described
// architecture; ACC_W, the offset input, the sample enable and the wrap flag
// are this design's own choices.
module phase_accumulator #(
  parameter int unsigned ACC_W = 32,  // accumulator word-length
  parameter int unsigned B_C   = 17   // phase word-length after truncation
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample_en,
  input  logic [ACC_W-1:0] freq_word,
  input  logic [B_C-1:0]   phase_offset,
  output logic [B_C-1:0]   phase,
  output logic             wrapped
);

  logic [ACC_W-1:0] acc;
  logic [ACC_W:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, freq_word};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      wrapped <= 1'b0;
    end else begin
      wrapped <= sample_en & sum[ACC_W];
      if (sample_en) acc <= sum[ACC_W-1:0];
    end
  end

  assign phase = acc[ACC_W-1 -: B_C] + phase_offset;

  initial assert (B_C <= ACC_W) else $error("B_C must not exceed ACC_W");

endmodule
