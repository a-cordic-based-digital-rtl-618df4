// cordic_angle_rotation: angle rotation block of the CORDIC rotator.
//
// Rotates the vector (x_in, y_in) under control of the direction bits made by
// cordic_angle_computation:
//   pre-rotation (multiplexer): d_pre = 1 : (x, y) -> (-y,  x)   (+90 deg)
//                               d_pre = 0 : (x, y) -> ( y, -x)   (-90 deg)
//   stage i, i = 0 .. N_STAGES-1, shift by 2^-i (hard-wired arithmetic shift):
//                               d[i] = 1 : x' = x - (y >>> i), y' = y + (x >>> i)
//                               d[i] = 0 : x' = x + (y >>> i), y' = y - (x >>> i)
// That is 2 x N_STAGES add/subtract units of N_C bits.  The result is the
// input rotated by the angle the directions encode and scaled by the CORDIC
// gain K = prod_i sqrt(1 + 2^-2i) (about 1.6468); the gain is not removed,
// since a constant mixer gain is acceptable.
//
// Number format: the L-bit two's complement input is placed in the N_C-bit
// datapath with HEADROOM bits above it and N_C-L-HEADROOM fraction (guard)
// bits below it.  HEADROOM = 2 (default) is safe for any input: the gain
// times sqrt(2) for a full-scale complex input stays below 4.  HEADROOM = 1
// suffices for a real input, or a complex one whose magnitude stays below
// 2^(L-1), since the gain is below 2; it buys one more guard bit.  If
// N_C < L+HEADROOM the low input bits are dropped instead.  Shifted operands
// are truncated (floor).  Outputs are N_C-bit two's complement; an output unit
// is 2^-(N_C-L-HEADROOM) of an input unit.
//
// Timing: with PIPELINED = 0 the block is combinational (clk and rst_n are
// then unused).  With PIPELINED = 1 a
// register follows the pre-rotation and each of stages 0 .. N_STAGES-2, so the
// result appears N_STAGES cycles after the input; d[i] is expected i+1 cycles
// after the input, as cordic_angle_computation delivers it.
//
// The multiplexer pre-rotation, the shift-and-add stages and the word-length
// N_C follow the described architecture; the placement of the input in the
// datapath, truncation and the optional pipeline registers are this design's
// own choices.
module cordic_angle_rotation #(
  parameter int unsigned L         = 10,  // input word-length
  parameter int unsigned N_C       = 16,  // rotation datapath word-length
  parameter int unsigned N_STAGES  = 12,  // number of elementary rotations n
  parameter bit          PIPELINED = 1'b0,
  parameter int unsigned HEADROOM  = 2    // integer bits above the input
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [L-1:0]   x_in,
  input  logic signed [L-1:0]   y_in,
  input  logic                  d_pre,
  input  logic [N_STAGES-1:0]   d,
  output logic signed [N_C-1:0] x_out,
  output logic signed [N_C-1:0] y_out
);

  localparam int FRAC = int'(N_C) - int'(L) - int'(HEADROOM);

  logic signed [N_C-1:0] x_ext, y_ext;
  logic signed [N_C-1:0] xp, yp;

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

  // +/-90 degree rotation by multiplexing and negation
  assign xp = d_pre ? -y_ext : y_ext;
  assign yp = d_pre ? x_ext : -x_ext;

  // Each stage: xs/ys are its inputs (after the optional register), xr/yr
  // its outputs.
  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    logic signed [N_C-1:0] xa, ya;  // value handed over by the previous stage
    logic signed [N_C-1:0] xs, ys;
    logic signed [N_C-1:0] xr, yr;

    if (i == 0) begin : g_first
      assign xa = xp;
      assign ya = yp;
    end else begin : g_next
      assign xa = g_stage[i-1].xr;
      assign ya = g_stage[i-1].yr;
    end

    if (PIPELINED) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          xs <= '0;
          ys <= '0;
        end else begin
          xs <= xa;
          ys <= ya;
        end
      end
    end else begin : g_wire
      assign xs = xa;
      assign ys = ya;
    end

    always_comb begin
      if (d[i]) begin
        xr = xs - (ys >>> i);
        yr = ys + (xs >>> i);
      end else begin
        xr = xs + (ys >>> i);
        yr = ys - (xs >>> i);
      end
    end
  end

  assign x_out = g_stage[N_STAGES-1].xr;
  assign y_out = g_stage[N_STAGES-1].yr;

endmodule
