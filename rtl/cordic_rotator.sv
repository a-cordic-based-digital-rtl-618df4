// cordic_rotator: CORDIC circular rotator in rotation mode.
//
// Rotates the complex sample (x_in + j y_in) by the binary-angle phase
// (2^B_C = one full turn, read as counter-clockwise):
//   x_out ~ K * S * (x_in cos(phi) - y_in sin(phi))
//   y_out ~ K * S * (x_in sin(phi) + y_in cos(phi))
// with K ~ 1.6468 the CORDIC gain and S = 2^(N_C-L-HEADROOM) the placement
// of the input in the N_C-bit datapath (see cordic_angle_rotation).  For a real
// input (y_in = 0) the two outputs are the in-phase and quadrature products
// r cos(phi) and r sin(phi) of a quadrature mixer.
//
// It is the parallel (unrolled) arrangement: the angle computation block
// turns the phase into one direction bit per stage and the angle rotation
// block applies the multiplexer pre-rotation and N_STAGES shift-and-add
// stages.  The full input range [-pi, pi) is covered because the +/-90 degree
// pre-rotation brings the residual into [-pi/2, pi/2), inside the
// convergence range of the stages (about +/-99.9 degrees).
//
// Timing: PIPELINED = 0 gives a purely combinational rotator (the form whose
// critical path runs through all stages).  PIPELINED = 1 registers both
// blocks after every stage and gives a latency of N_STAGES cycles at one
// sample per cycle.  clk and rst_n are used only when pipelined.
module cordic_rotator #(
  parameter int unsigned L         = 10,
  parameter int unsigned B_C       = 17,
  parameter int unsigned N_STAGES  = 12,
  parameter int unsigned N_C       = 16,
  parameter bit          PIPELINED = 1'b0,
  parameter int unsigned HEADROOM  = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [L-1:0]   x_in,
  input  logic signed [L-1:0]   y_in,
  input  logic [B_C-1:0]        phase,
  output logic signed [N_C-1:0] x_out,
  output logic signed [N_C-1:0] y_out
);

  logic                d_pre;
  logic [N_STAGES-1:0] d;

  cordic_angle_computation #(
    .B_C      (B_C),
    .N_STAGES (N_STAGES),
    .PIPELINED(PIPELINED)
  ) u_angle_computation (
    .clk  (clk),
    .rst_n(rst_n),
    .phase(phase),
    .d_pre(d_pre),
    .d    (d)
  );

  cordic_angle_rotation #(
    .L        (L),
    .N_C      (N_C),
    .N_STAGES (N_STAGES),
    .PIPELINED(PIPELINED),
    .HEADROOM (HEADROOM)
  ) u_angle_rotation (
    .clk  (clk),
    .rst_n(rst_n),
    .x_in (x_in),
    .y_in (y_in),
    .d_pre(d_pre),
    .d    (d),
    .x_out(x_out),
    .y_out(y_out)
  );

endmodule
