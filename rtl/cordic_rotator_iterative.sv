// cordic_rotator_iterative: folded CORDIC rotator for lower sample rates.
//
// Does the same rotation as cordic_rotator (same directions, same shift-and-
// add arithmetic, bit-identical results) but with only
// S = ceil(N_STAGES / FOLD) stages of hardware, reused in FOLD passes.  In
// pass p the hardware stage j performs elementary rotation i = p*S + j, so
// its shift amount and its elementary angle are selected by the pass number
// (a barrel shifter per operand and a small constant table instead of
// hard-wired shifts).  Throughput is one sample every FOLD cycles: at half
// the sample rate (FOLD = 2) roughly half of the stage adders remain.
//
//   cycle t           : start (in_valid & in_ready): +/-90 degree
//                       pre-rotation and pass 0 on the new sample
//   cycles t+1..t+FOLD-1 : passes 1 .. FOLD-1 on the registered state
//   cycle t+FOLD-1    : out_valid, x_out/y_out show the final result
//                       (combinational from the last pass)
// in_ready is low while passes 1 .. FOLD-1 run.  For FOLD = 1 use
// cordic_rotator.
//
// Unlike the parallel angle computation block, the residual angle is kept in
// B_C-1 bits and every stage (including the 45 degree one) uses the angle
// adder, because the same adder serves different stages in different passes.
//
// The idea of trading speed for area by iterating the CORDIC follows the
// described architecture; the pass schedule, the handshake and the
// structure are this design's own.
module cordic_rotator_iterative
  import cordic_pkg::*;
#(
  parameter int unsigned L        = 10,
  parameter int unsigned B_C      = 17,
  parameter int unsigned N_STAGES = 12,
  parameter int unsigned N_C      = 16,
  parameter int unsigned FOLD     = 2,
  parameter int unsigned HEADROOM = 2,    // integer bits above the input, see cordic_angle_rotation
  localparam int unsigned S       = (N_STAGES + FOLD - 1) / FOLD,
  localparam int unsigned PW      = (FOLD > 1) ? $clog2(FOLD) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [L-1:0]   x_in,
  input  logic signed [L-1:0]   y_in,
  input  logic [B_C-1:0]        phase,
  output logic                  out_valid,
  output logic signed [N_C-1:0] x_out,
  output logic signed [N_C-1:0] y_out
);

  localparam int FRAC = int'(N_C) - int'(L) - int'(HEADROOM);
  localparam int ZW   = B_C - 1;

  typedef logic [N_STAGES-1:0][ZW-1:0] angle_table_t;

  function automatic angle_table_t angle_table();
    angle_table_t t;
    for (int i = 0; i < N_STAGES; i++) t[i] = ZW'(elem_angle(i, B_C));
    return t;
  endfunction

  localparam angle_table_t ANGLE = angle_table();

  logic                  busy;
  logic [PW-1:0]         pass_q;
  logic signed [N_C-1:0] x_q, y_q;
  logic signed [ZW-1:0]  z_q;
  logic                  start;

  logic signed [N_C-1:0] x_ext, y_ext, xp, yp;
  logic signed [ZW-1:0]  zp;
  logic [PW-1:0]         pass;
  // stage chain of one pass (packed, index j = input of stage j)
  logic [S:0][N_C-1:0]   xs, ys;
  logic [S:0][ZW-1:0]    zs;

  assign in_ready = ~busy;
  assign start    = in_valid & in_ready;

  if (FRAC >= 0) begin : g_guard
    assign x_ext = N_C'(x_in) <<< FRAC;
    assign y_ext = N_C'(y_in) <<< FRAC;
  end else begin : g_drop
    logic signed [L-1:0] x_sh, y_sh;
    assign x_sh  = x_in >>> (-FRAC);
    assign y_sh  = y_in >>> (-FRAC);
    assign x_ext = N_C'(x_sh);
    assign y_ext = N_C'(y_sh);
  end

  // pre-rotation by +/-90 degrees; residual phase -/+ pi/2 in B_C-1 bits
  assign xp = phase[B_C-1] ? y_ext : -y_ext;
  assign yp = phase[B_C-1] ? -x_ext : x_ext;
  assign zp = {~phase[B_C-2], phase[B_C-3:0]};

  // one pass: S stages, stage j doing elementary rotation pass*S + j
  assign pass  = start ? '0 : pass_q;
  assign xs[0] = start ? xp : x_q;
  assign ys[0] = start ? yp : y_q;
  assign zs[0] = start ? zp : z_q;

  for (genvar j = 0; j < S; j++) begin : g_stage
    int unsigned idx;
    assign idx = int'(pass) * S + j;
    always_comb begin
      if (idx < N_STAGES) begin
        if (!zs[j][ZW-1]) begin
          xs[j+1] = $signed(xs[j]) - ($signed(ys[j]) >>> idx);
          ys[j+1] = $signed(ys[j]) + ($signed(xs[j]) >>> idx);
          zs[j+1] = zs[j] - ANGLE[idx];
        end else begin
          xs[j+1] = $signed(xs[j]) + ($signed(ys[j]) >>> idx);
          ys[j+1] = $signed(ys[j]) - ($signed(xs[j]) >>> idx);
          zs[j+1] = zs[j] + ANGLE[idx];
        end
      end else begin
        xs[j+1] = xs[j];
        ys[j+1] = ys[j];
        zs[j+1] = zs[j];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      pass_q <= '0;
      x_q    <= '0;
      y_q    <= '0;
      z_q    <= '0;
    end else if (start || busy) begin
      x_q    <= xs[S];
      y_q    <= ys[S];
      z_q    <= zs[S];
      pass_q <= pass + 1'b1;
      busy   <= (int'(pass) + 1 < FOLD);
    end
  end

  assign out_valid = (busy && int'(pass_q) == FOLD - 1) || (start && FOLD == 1);
  assign x_out     = $signed(xs[S]);
  assign y_out     = $signed(ys[S]);

endmodule
