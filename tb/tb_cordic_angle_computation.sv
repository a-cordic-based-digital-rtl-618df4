// tb_cordic_angle_computation: checks the direction bits of the angle
// computation block against a full-width integer reference
// (tb_cordic_ref_pkg::ref_dirs) for every phase of a small phase word and for
// random phases at the default sizes, in the combinational and in the
// pipelined form (where d[i] must come i+1 cycles after the phase).  It also
// checks that the angle the directions encode matches the phase to within
// the last elementary angle plus rounding.
module tb_cordic_angle_computation;
  import tb_cordic_ref_pkg::*;

  localparam int B  = 17;
  localparam int N  = 12;
  localparam int BS = 10;  // small phase word, exhaustive
  localparam int NS = 7;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [B-1:0]  ph;
  logic          dpre;
  logic [N-1:0]  d;
  logic [BS-1:0] ph_s;
  logic          dpre_s;
  logic [NS-1:0] d_s;
  logic [B-1:0]  ph_p;
  logic          dpre_p;
  logic [N-1:0]  d_p;

  cordic_angle_computation #(.B_C(B), .N_STAGES(N)) dut (
    .clk(clk), .rst_n(rst_n), .phase(ph), .d_pre(dpre), .d(d));
  cordic_angle_computation #(.B_C(BS), .N_STAGES(NS)) dut_s (
    .clk(clk), .rst_n(rst_n), .phase(ph_s), .d_pre(dpre_s), .d(d_s));
  cordic_angle_computation #(.B_C(B), .N_STAGES(N), .PIPELINED(1'b1)) dut_p (
    .clk(clk), .rst_n(rst_n), .phase(ph_p), .d_pre(dpre_p), .d(d_p));

  task automatic check_dirs(longint phase, int bw, int n, bit got_pre, bit [63:0] got);
    bit e_pre; bit [63:0] e_d; longint res; bit [63:0] mask;
    ref_dirs(phase, bw, n, e_pre, e_d, res);
    mask = (64'd1 << n) - 1;
    checks++;
    if (got_pre !== e_pre || (got & mask) !== (e_d & mask)) begin
      failures++;
      if (failures < 10)
        $display("FAIL B=%0d phase=%0d: d_pre=%0b d=%b, expected %0b %b",
                 bw, phase, got_pre, got & mask, e_pre, e_d & mask);
    end
    // residual angle bound: |phase - encoded angle| <= atan(2^-(n-1)) + n
    checks++;
    if (res > elem(n - 1, bw) + n || -res > elem(n - 1, bw) + n) begin
      failures++;
      $display("FAIL residual %0d too large for phase %0d", res, phase);
    end
  endtask

  // pipelined: d_p[i] is checked i+1 cycles after the phase was applied
  longint hist [0:N+1];
  bit      hist_ok [0:N+1];

  initial begin
    rst_n = 1'b0;
    ph = '0; ph_s = '0; ph_p = '0;
    for (int i = 0; i <= N + 1; i++) hist_ok[i] = 1'b0;
    #12 rst_n = 1'b1;
    // exhaustive small configuration
    for (int p = 0; p < (1 << BS); p++) begin
      ph_s = BS'(p);
      #1;
      check_dirs(p, BS, NS, dpre_s, 64'(d_s));
    end
    // random phases, default configuration, combinational
    for (int k = 0; k < 4000; k++) begin
      ph = B'($urandom);
      if (k < 4) ph = (k == 0) ? '0 : (k == 1) ? {1'b1, {(B-1){1'b0}}} :
                      (k == 2) ? {1'b0, {(B-1){1'b1}}} : '1;
      #1;
      check_dirs(longint'(ph), B, N, dpre, 64'(d));
    end
    // pipelined form
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      // d_pre is combinational from the present phase; d[i] from i+1 cycles back
      for (int i = N + 1; i > 0; i--) begin hist[i] = hist[i-1]; hist_ok[i] = hist_ok[i-1]; end
      ph_p = B'($urandom);
      hist[0] = longint'(ph_p); hist_ok[0] = 1'b1;
      #1;
      begin
        bit e_pre; bit [63:0] e_d; longint res;
        ref_dirs(hist[0], B, N, e_pre, e_d, res);
        checks++;
        if (dpre_p !== e_pre) begin failures++; $display("FAIL pipelined d_pre"); end
        for (int i = 0; i < N; i++) begin
          if (hist_ok[i+1]) begin
            ref_dirs(hist[i+1], B, N, e_pre, e_d, res);
            checks++;
            if (d_p[i] !== e_d[i]) begin
              failures++;
              if (failures < 10) $display("FAIL pipelined d[%0d] at k=%0d", i, k);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
