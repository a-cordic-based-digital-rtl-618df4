// cordic_quadrature_mixer: CORDIC-based digital quadrature mixer (top).
//
// Mixes the A/D samples with a numerically controlled carrier.  Instead of a
// sine/cosine table followed by multipliers, a CORDIC rotator rotates the
// input vector directly by the carrier phase, so carrier generation and
// mixing are one shift-and-add array:
//   (i_out, q_out) = K * S * rotate((x_in, y_in), phase(k))
//   phase(k)       = trunc_B_C(acc(k)) + phase_offset,  acc(k+1) = acc(k) + freq_word
// With a real input (y_in = 0), i_out ~ r(k) cos(phase) and q_out ~ r(k)
// sin(phase); with a complex input it is a single-sideband complex mixer.
// A positive freq_word turns the vector counter-clockwise; for a
// down-conversion by f use freq_word = 2^ACC_W - f (i.e. -f).  K ~ 1.6468 is the
// CORDIC gain and S = 2^(N_C-L-HEADROOM) the output scale; both are left in
// the result, since a constant mixer gain is acceptable.  HEADROOM = 2 (the
// default) accepts any complex input; HEADROOM = 1 is enough for a real
// input, or a complex one of magnitude below 2^(L-1), and gives one more
// guard bit (the per-modulation sizes have N_C = L + 1 and need it).
//
// Defaults are the L = 10 word-lengths that give an output error bound of
// 0.5 input LSB after gain normalisation: B_C = 17 phase bits, n = 12
// stages, N_C = 16 bit rotation datapath.  Smaller configurations (L = 4 ..
// 9, or the per-modulation sizes) are obtained by setting the parameters.
//
// Rotator forms: FOLD = 1 (default) uses the parallel array cordic_rotator,
// combinational (PIPELINED = 0) or registered after every stage
// (PIPELINED = 1).  FOLD > 1 uses cordic_rotator_iterative, which reuses
// ceil(n/FOLD) stages FOLD times: less hardware for applications that need
// only 1/FOLD of the full sample rate.
//
// Interface and timing: a sample is taken when in_valid and in_ready are both
// high (in_ready is always high for FOLD = 1; with FOLD > 1 it is low for
// FOLD-1 cycles after each accepted sample).  Holding in_valid low spaces the
// samples out and also holds the carrier phase, which advances once per
// accepted sample.  The outputs are registered: out_valid, i_out and q_out
// appear LATENCY cycles after the sample was accepted: 1 (combinational
// rotator), N_STAGES + 1 (PIPELINED = 1) or FOLD (FOLD > 1).  i_out and q_out
// are meaningful only while out_valid is high.  phase_offset is sampled
// together with the sample it applies to.  Reset (rst_n, asynchronous, active
// low) clears the phase and the outputs.
//
// The architecture (phase accumulator truncated to B_C bits feeding an
// n-stage CORDIC circular rotator with N_C-bit datapath, no gain correction)
// follows the described design, as does the idea of iterating the CORDIC for
// slow applications; the accumulator width, the valid/ready handshake, the
// phase offset port, the output register, the pipelining option and the
// structure of the iterative form are this design's own choices.
module cordic_quadrature_mixer #(
  parameter int unsigned L         = 10,  // input (A/D) word-length
  parameter int unsigned B_C       = 17,  // phase word-length
  parameter int unsigned N_STAGES  = 12,  // number of CORDIC stages n
  parameter int unsigned N_C       = 16,  // rotation datapath / output word-length
  parameter int unsigned ACC_W     = 32,  // phase accumulator word-length
  parameter bit          PIPELINED = 1'b0,  // parallel rotator only
  parameter int unsigned FOLD      = 1,     // >1: iterative rotator, 1 sample per FOLD cycles
  parameter int unsigned HEADROOM  = 2,     // integer bits above the input in the datapath
  localparam int unsigned LATENCY  = (FOLD > 1) ? FOLD : PIPELINED ? N_STAGES + 1 : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,      // low while the iterative rotator is busy
  input  logic signed [L-1:0]   x_in,          // in-phase (or real) input r(k)
  input  logic signed [L-1:0]   y_in,          // quadrature input, 0 for a real input
  input  logic [ACC_W-1:0]      freq_word,     // carrier frequency control word
  input  logic [B_C-1:0]        phase_offset,  // carrier phase offset theta(k)
  output logic                  out_valid,
  output logic signed [N_C-1:0] i_out,
  output logic signed [N_C-1:0] q_out,
  output logic                  phase_wrapped  // a carrier period ended
);

  logic [B_C-1:0]        phase;
  logic signed [N_C-1:0] x_rot, y_rot;
  logic                  accept;

  phase_accumulator #(
    .ACC_W(ACC_W),
    .B_C  (B_C)
  ) u_phase_accumulator (
    .clk         (clk),
    .rst_n       (rst_n),
    .sample_en   (accept),
    .freq_word   (freq_word),
    .phase_offset(phase_offset),
    .phase       (phase),
    .wrapped     (phase_wrapped)
  );

  assign accept = in_valid & in_ready;

  if (FOLD > 1) begin : g_iterative
    logic rot_valid;

    cordic_rotator_iterative #(
      .L       (L),
      .B_C     (B_C),
      .N_STAGES(N_STAGES),
      .N_C     (N_C),
      .FOLD    (FOLD),
      .HEADROOM(HEADROOM)
    ) u_rotator (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .in_ready (in_ready),
      .x_in     (x_in),
      .y_in     (y_in),
      .phase    (phase),
      .out_valid(rot_valid),
      .x_out    (x_rot),
      .y_out    (y_rot)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= rot_valid;
    end
  end else begin : g_parallel
    logic [LATENCY-1:0] valid_sr;

    assign in_ready = 1'b1;

    cordic_rotator #(
      .L        (L),
      .B_C      (B_C),
      .N_STAGES (N_STAGES),
      .N_C      (N_C),
      .PIPELINED(PIPELINED),
      .HEADROOM (HEADROOM)
    ) u_rotator (
      .clk  (clk),
      .rst_n(rst_n),
      .x_in (x_in),
      .y_in (y_in),
      .phase(phase),
      .x_out(x_rot),
      .y_out(y_rot)
    );

    // valid follows the data through the rotator pipeline and the output register
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) valid_sr <= '0;
      else        valid_sr <= LATENCY'({valid_sr, in_valid});
    end
    assign out_valid = valid_sr[LATENCY-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_out <= '0;
      q_out <= '0;
    end else begin
      i_out <= x_rot;
      q_out <= y_rot;
    end
  end

endmodule
