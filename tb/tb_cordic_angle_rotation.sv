// tb_cordic_angle_rotation: drives the angle rotation block with random
// input vectors and random direction bits and compares both outputs with the
// bit-exact integer reference (tb_cordic_ref_pkg::ref_rot_dirs).  Covers the
// default sizes, a size where the datapath is narrower than L + 2 (input
// bits dropped), the same size with a single headroom bit, extreme inputs, and the pipelined form, whose result must
// appear exactly N_STAGES cycles after the input.
module tb_cordic_angle_rotation;
  import tb_cordic_ref_pkg::*;

  localparam int L  = 10, NC  = 16, N  = 12;
  localparam int L2 = 5,  NC2 = 6,  N2 = 6;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [L-1:0]   x, y, xp, yp;
  logic                  dpre, dpre_p;
  logic [N-1:0]          d, d_p;
  logic signed [NC-1:0]  xo, yo, xo_p, yo_p;
  logic signed [L2-1:0]  x2, y2;
  logic                  dpre2;
  logic [N2-1:0]         d2;
  logic signed [NC2-1:0] xo2, yo2;
  logic signed [NC2-1:0] xo3, yo3;

  cordic_angle_rotation #(.L(L), .N_C(NC), .N_STAGES(N)) dut (
    .clk(clk), .rst_n(rst_n), .x_in(x), .y_in(y), .d_pre(dpre), .d(d),
    .x_out(xo), .y_out(yo));
  cordic_angle_rotation #(.L(L2), .N_C(NC2), .N_STAGES(N2)) dut2 (
    .clk(clk), .rst_n(rst_n), .x_in(x2), .y_in(y2), .d_pre(dpre2), .d(d2),
    .x_out(xo2), .y_out(yo2));
  // one headroom bit: same inputs as dut2, inputs kept below half scale in
  // magnitude so that nothing overflows
  cordic_angle_rotation #(.L(L2), .N_C(NC2), .N_STAGES(N2), .HEADROOM(1)) dut3 (
    .clk(clk), .rst_n(rst_n), .x_in(x2 >>> 1), .y_in(y2 >>> 1), .d_pre(dpre2), .d(d2),
    .x_out(xo3), .y_out(yo3));
  cordic_angle_rotation #(.L(L), .N_C(NC), .N_STAGES(N), .PIPELINED(1'b1)) dut_p (
    .clk(clk), .rst_n(rst_n), .x_in(xp), .y_in(yp), .d_pre(dpre_p), .d(d_p),
    .x_out(xo_p), .y_out(yo_p));

  task automatic cmp(string tag, longint gx, longint gy, longint ex, longint ey);
    checks++;
    if (gx != ex || gy != ey) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got (%0d,%0d) expected (%0d,%0d)", tag, gx, gy, ex, ey);
    end
  endtask

  // pipelined stimulus history: input k, directions for stage i applied i+1 cycles later
  longint     hx [0:N];
  longint     hy [0:N];
  bit         hpre [0:N];
  bit [63:0]  hd [0:N];
  bit         hv [0:N];

  initial begin
    longint ex, ey;
    bit [63:0] dd;
    rst_n = 1'b0;
    x = '0; y = '0; dpre = 1'b0; d = '0;
    x2 = '0; y2 = '0; dpre2 = 1'b0; d2 = '0;
    xp = '0; yp = '0; dpre_p = 1'b0; d_p = '0;
    for (int i = 0; i <= N; i++) hv[i] = 1'b0;
    #12 rst_n = 1'b1;
    for (int k = 0; k < 5000; k++) begin
      x = L'($urandom); y = L'($urandom); dpre = 1'($urandom); d = N'($urandom);
      if (k < 8) begin  // extremes of the input range
        x = (k[0]) ? {1'b1, {(L-1){1'b0}}} : {1'b0, {(L-1){1'b1}}};
        y = (k[1]) ? {1'b1, {(L-1){1'b0}}} : {1'b0, {(L-1){1'b1}}};
      end
      x2 = L2'($urandom); y2 = L2'($urandom); dpre2 = 1'($urandom); d2 = N2'($urandom);
      #1;
      ref_rot_dirs(longint'(x), longint'(y), dpre, 64'(d), L, NC, N, ex, ey);
      cmp("default", longint'(xo), longint'(yo), ex, ey);
      ref_rot_dirs(longint'(x2), longint'(y2), dpre2, 64'(d2), L2, NC2, N2, ex, ey);
      cmp("narrow", longint'(xo2), longint'(yo2), ex, ey);
      ref_rot_dirs(longint'(x2 >>> 1), longint'(y2 >>> 1), dpre2, 64'(d2), L2, NC2, N2, ex, ey, 1);
      cmp("headroom 1", longint'(xo3), longint'(yo3), ex, ey);
      #1;
    end
    // pipelined: present input k with d_pre, and stage i's direction bit
    // belonging to the input of i+1 cycles ago
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      for (int j = N; j > 0; j--) begin
        hx[j] = hx[j-1]; hy[j] = hy[j-1]; hpre[j] = hpre[j-1]; hd[j] = hd[j-1]; hv[j] = hv[j-1];
      end
      hx[0] = longint'($signed(L'($urandom)));
      hy[0] = longint'($signed(L'($urandom)));
      hpre[0] = 1'($urandom);
      hd[0] = {$urandom, $urandom};
      hv[0] = 1'b1;
      xp = L'(hx[0]); yp = L'(hy[0]); dpre_p = hpre[0];
      for (int i = 0; i < N; i++) d_p[i] = hd[i+1][i];
      #1;
      // output now belongs to the input of N cycles ago (its last stage
      // uses the present d_p[N-1], which is that input's direction)
      if (hv[N]) begin
        dd = hd[N];
        ref_rot_dirs(hx[N], hy[N], hpre[N], dd, L, NC, N, ex, ey);
        cmp("pipelined", longint'(xo_p), longint'(yo_p), ex, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
