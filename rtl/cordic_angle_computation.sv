// cordic_angle_computation: angle computation block of the CORDIC rotator.
//
// Takes the B_C-bit carrier phase (a binary angle, 2^B_C = one turn) and
// produces the rotation direction of every CORDIC stage.  A direction bit is
// 1 when the residual angle is >= 0 (rotate counter-clockwise) and is simply
// the inverted msb of the residual angle, as in the msb taps of the block
// diagram.
//
//   d_pre  : direction of the initial +/-90 degree multiplexer rotation,
//            taken from the msb of the phase itself (phase read as signed,
//            i.e. in [-pi, pi)).
//   d[0]   : direction of the 2^-0 stage (+/-45 degrees).
//   d[i]   : direction of the 2^-i stage, i = 1 .. N_STAGES-1.
//
// Subtracting 90 or 45 degrees from a residual that lies in the right range
// only inverts one bit of the binary angle, so the first two residuals
// (after the pre-rotation and after the 45 degree stage) cost no adder, and
// the residual after the last stage is never needed.  Only N_STAGES-2
// add/subtract units remain, each working on B_C-2 bits (B_C-3 magnitude bits
// and a sign, since the residual is below pi/4 from the 2^-1 stage on).  The
// elementary angles atan(2^-i) are constants rounded to B_C bits
// (cordic_pkg::elem_angle), so each adder adds or subtracts a fixed value.
//
// Timing: with PIPELINED = 0 the block is combinational (clk, rst_n unused).
// With PIPELINED = 1 a register follows the pre-rotation and every stage up to
// N_STAGES-2, so d[i] comes out i+1 cycles after the phase; this matches the
// registers of cordic_angle_rotation with the same setting.
//
// The stage structure, the msb-driven directions and the adder count follow
// the described architecture; the binary-angle bit tricks, the rounding of the
// elementary angles and the optional pipeline registers are this design's own
// choices.
module cordic_angle_computation
  import cordic_pkg::*;
#(
  parameter int unsigned B_C       = 17,  // phase word-length
  parameter int unsigned N_STAGES  = 12,  // number of elementary rotations n
  parameter bit          PIPELINED = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [B_C-1:0]      phase,
  output logic                d_pre,
  output logic [N_STAGES-1:0] d
);

  localparam int unsigned ZW = B_C - 2;  // residual width from the 2^-1 stage on

  // residual after the +/-90 degree pre-rotation, in [-pi/2, pi/2)
  logic [B_C-2:0] z0_c, z0;
  // residuals at the input of stages 1 .. N_STAGES-1 (index 0 unused)
  logic [ZW-1:0]  z   [N_STAGES];
  logic [ZW-1:0]  z_c [N_STAGES];

  assign d_pre = ~phase[B_C-1];
  // z -/+ 2^(B_C-2) for z >= 0 / z < 0 reduces to inverting bit B_C-2
  assign z0_c  = {~phase[B_C-2], phase[B_C-3:0]};
  assign d[0]  = ~z0[B_C-2];
  // z0 -/+ 2^(B_C-3) likewise reduces to inverting bit B_C-3
  assign z_c[1] = {~z0[B_C-3], z0[B_C-4:0]};
  assign z_c[0] = '0;
  assign z[0]   = '0;

  for (genvar i = 1; i < N_STAGES - 1; i++) begin : g_add
    localparam logic [ZW-1:0] ANGLE = ZW'(elem_angle(i, B_C));
    assign z_c[i+1] = d[i] ? z[i] - ANGLE : z[i] + ANGLE;
  end

  for (genvar i = 1; i < N_STAGES; i++) begin : g_dir
    assign d[i] = ~z[i][ZW-1];
  end

  if (PIPELINED) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        z0 <= '0;
        for (int i = 1; i < N_STAGES; i++) z[i] <= '0;
      end else begin
        z0 <= z0_c;
        for (int i = 1; i < N_STAGES; i++) z[i] <= z_c[i];
      end
    end
  end else begin : g_comb
    assign z0 = z0_c;
    for (genvar i = 1; i < N_STAGES; i++) begin : g_wire
      assign z[i] = z_c[i];
    end
  end

endmodule
