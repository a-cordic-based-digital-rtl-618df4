// tb_cordic_rotator: rotates random complex samples by random phases and
// checks the result two ways:
//   * bit-exact against the integer reference model (directions from the
//     full-width residual angle, then the shift-and-add rotation);
//   * against the exact rotation in reals: after dividing by the CORDIC gain
//     and the datapath scale, the error must stay within the error bound the
//     word-lengths are chosen for, measured in input LSBs.
// Every quadrant, and so both pre-rotation directions, is exercised.  The
// pipelined form is checked for a latency of exactly N_STAGES cycles.
module tb_cordic_rotator;
  import tb_cordic_ref_pkg::*;

  localparam int L = 10, B = 17, N = 12, NC = 16;
  // error bound in input LSBs after normalisation by the mixer gain
  localparam real ERR_BOUND = 0.5;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int quad_hits [4];
  real max_err = 0.0;

  logic signed [L-1:0]  x, y, xp, yp;
  logic [B-1:0]         ph, php;
  logic signed [NC-1:0] xo, yo, xo_p, yo_p;

  cordic_rotator dut (
    .clk(clk), .rst_n(rst_n), .x_in(x), .y_in(y), .phase(ph), .x_out(xo), .y_out(yo));
  cordic_rotator #(.PIPELINED(1'b1)) dut_p (
    .clk(clk), .rst_n(rst_n), .x_in(xp), .y_in(yp), .phase(php), .x_out(xo_p), .y_out(yo_p));

  task automatic check_one(longint xi, longint yi, longint p, longint gx, longint gy, string tag);
    bit dpre; bit [63:0] d; longint res, ex, ey;
    real ix, iy, g, e;
    ref_dirs(p, B, N, dpre, d, res);
    ref_rot_dirs(xi, yi, dpre, d, L, NC, N, ex, ey);
    checks++;
    if (gx != ex || gy != ey) begin
      failures++;
      if (failures < 10) $display("FAIL %s exact: x=%0d y=%0d ph=%0d got (%0d,%0d) exp (%0d,%0d)",
                                  tag, xi, yi, p, gx, gy, ex, ey);
    end
    ideal_rot(real'(xi), real'(yi), p, B, L, NC, N, ix, iy);
    g = cordic_gain(N) * (2.0 ** (NC - L - 2));
    e = (real'(gx) - ix) / g; if (e < 0) e = -e;
    if (e > max_err) max_err = e;
    checks++;
    if (e > ERR_BOUND) begin failures++; if (failures < 10) $display("FAIL %s x error %f", tag, e); end
    e = (real'(gy) - iy) / g; if (e < 0) e = -e;
    if (e > max_err) max_err = e;
    checks++;
    if (e > ERR_BOUND) begin failures++; if (failures < 10) $display("FAIL %s y error %f", tag, e); end
  endtask

  longint hx [0:N];
  longint hy [0:N];
  longint hp [0:N];
  bit     hv [0:N];

  initial begin
    rst_n = 1'b0;
    x = '0; y = '0; ph = '0; xp = '0; yp = '0; php = '0;
    for (int i = 0; i < 4; i++) quad_hits[i] = 0;
    for (int i = 0; i <= N; i++) hv[i] = 1'b0;
    #12 rst_n = 1'b1;
    for (int k = 0; k < 20000; k++) begin
      x = L'($urandom); y = L'($urandom); ph = B'($urandom);
      if (k % 3 == 0) y = '0;  // real input, as in a real-IF mixer
      if (k < 4) begin x = {1'b1, {(L-1){1'b0}}}; y = {1'b1, {(L-1){1'b0}}}; end
      quad_hits[ph[B-1 -: 2]]++;
      #1;
      check_one(longint'(x), longint'(y), longint'(ph), longint'(xo), longint'(yo), "comb");
    end
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      for (int j = N; j > 0; j--) begin hx[j] = hx[j-1]; hy[j] = hy[j-1]; hp[j] = hp[j-1]; hv[j] = hv[j-1]; end
      hx[0] = longint'($signed(L'($urandom)));
      hy[0] = longint'($signed(L'($urandom)));
      hp[0] = longint'(B'($urandom));
      hv[0] = 1'b1;
      xp = L'(hx[0]); yp = L'(hy[0]); php = B'(hp[0]);
      #1;
      if (hv[N]) check_one(hx[N], hy[N], hp[N], longint'(xo_p), longint'(yo_p), "pipe");
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (quad_hits[i] == 0) begin failures++; $display("FAIL quadrant %0d never exercised", i); end
    end
    $display("max normalised error %f input LSB (bound %f)", max_err, ERR_BOUND);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
