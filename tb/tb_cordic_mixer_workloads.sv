// tb_cordic_mixer_workloads: runs the mixer at each word-length
// configuration it is meant for.
//
// Part A, precision configurations (L / B_C / n / N_C = 4/10/6/9 ...
// 10/17/12/16): random full-scale complex samples are rotated by random
// phases (freq_word = 0, the phase is set through phase_offset).  After
// dividing by the mixer gain, every output must lie within 0.5 input LSB of
// the exact rotation by the same quantised phase.
// Part B, demodulator configurations (QPSK 5/7/6/6, QAM16 6/8/7/7, QAM64
// 7/9/8/8): random symbols on a square constellation are put on a complex
// carrier, quantised to L bits, and brought back to baseband by the mixer
// running at the negative carrier frequency.  The constellation is scaled
// so that the complex input magnitude stays below 2^(L-1), which lets these
// instances use one headroom bit (HEADROOM = 1), as N_C = L + 1 requires.  Every symbol must be decided
// correctly (nearest constellation point); the output SNR is reported.
module tb_cordic_mixer_workloads;
  import tb_cordic_ref_pkg::*;

  localparam int ACC_W = 32;
  localparam int NSAMP = 4000;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit run = 1'b0;

  task automatic fail(string m);
    failures++;
    if (failures < 12) $display("FAIL %s", m);
  endtask

  // ---- part A: error bound ------------------------------------------------
  `define PREC_HARNESS(NAME, LL, BB, NN, NCC)                                               \
    logic signed [LL-1:0]  NAME``_x, NAME``_y;                                               \
    logic [BB-1:0]         NAME``_ph;                                                        \
    logic signed [NCC-1:0] NAME``_i, NAME``_q;                                               \
    logic                  NAME``_ov, NAME``_rdy, NAME``_w;                                  \
    real                   NAME``_max = 0.0;                                                 \
    int                    NAME``_n = 0;                                                     \
    cordic_quadrature_mixer #(.L(LL), .B_C(BB), .N_STAGES(NN), .N_C(NCC)) NAME (             \
      .clk(clk), .rst_n(rst_n), .in_valid(run), .in_ready(NAME``_rdy),                       \
      .x_in(NAME``_x), .y_in(NAME``_y), .freq_word('0), .phase_offset(NAME``_ph),            \
      .out_valid(NAME``_ov), .i_out(NAME``_i), .q_out(NAME``_q), .phase_wrapped(NAME``_w));  \
    always @(negedge clk) begin                                                              \
      real ix, iy, g, e;                                                                     \
      if (rst_n && NAME``_ov) begin                                                          \
        ideal_rot(real'(NAME``_x), real'(NAME``_y), longint'(NAME``_ph), BB, LL, NCC, NN, ix, iy); \
        g = cordic_gain(NN) * (2.0 ** (NCC - LL - 2));                                       \
        e = (real'(NAME``_i) - ix) / g; if (e < 0) e = -e;                                   \
        if (e > NAME``_max) NAME``_max = e;                                                  \
        e = (real'(NAME``_q) - iy) / g; if (e < 0) e = -e;                                   \
        if (e > NAME``_max) NAME``_max = e;                                                  \
        NAME``_n++;                                                                          \
      end                                                                                    \
      NAME``_x  = LL'($urandom);                                                             \
      NAME``_y  = LL'($urandom);                                                             \
      NAME``_ph = BB'($urandom);                                                             \
    end

  `PREC_HARNESS(p4, 4, 10, 6, 9)
  `PREC_HARNESS(p5, 5, 11, 7, 10)
  `PREC_HARNESS(p6, 6, 12, 8, 11)
  `PREC_HARNESS(p7, 7, 13, 9, 13)
  `PREC_HARNESS(p8, 8, 14, 10, 14)
  `PREC_HARNESS(p9, 9, 15, 11, 15)
  `PREC_HARNESS(p10, 10, 17, 12, 16)

  // ---- part B: symbol down-conversion ---------------------------------------
  // carrier: w = 2*pi*FW/2^ACC_W with FW = 2^ACC_W * 3/37 (not a divisor of the
  // sample rate, so all carrier phases occur); the mixer runs at -FW
  localparam longint FW = (64'd1 << ACC_W) * 3 / 37;

  `define DEMOD_HARNESS(NAME, LL, BB, NN, NCC, MM, SCALE)                                    \
    logic signed [LL-1:0]  NAME``_x, NAME``_y;                                               \
    logic signed [NCC-1:0] NAME``_i, NAME``_q;                                               \
    logic                  NAME``_ov, NAME``_rdy, NAME``_w;                                  \
    int                    NAME``_si [$];                                                    \
    int                    NAME``_sq [$];                                                    \
    int                    NAME``_k = 0, NAME``_err = 0, NAME``_n = 0;                       \
    real                   NAME``_sig = 0.0, NAME``_noise = 0.0;                             \
    cordic_quadrature_mixer #(.L(LL), .B_C(BB), .N_STAGES(NN), .N_C(NCC), .HEADROOM(1)) NAME ( \
      .clk(clk), .rst_n(rst_n), .in_valid(run), .in_ready(NAME``_rdy),                       \
      .x_in(NAME``_x), .y_in(NAME``_y), .freq_word(ACC_W'((64'd1 << ACC_W) - FW)),           \
      .phase_offset('0), .out_valid(NAME``_ov), .i_out(NAME``_i), .q_out(NAME``_q),          \
      .phase_wrapped(NAME``_w));                                                             \
    always @(negedge clk) begin                                                              \
      int si, sq, di, dq; real g, ri, rq, c, s, ph;                                          \
      if (rst_n && NAME``_ov) begin                                                          \
        si = NAME``_si.pop_front(); sq = NAME``_sq.pop_front();                              \
        g  = cordic_gain(NN) * (2.0 ** (NCC - LL - 1)) * SCALE;                              \
        ri = real'(NAME``_i) / g; rq = real'(NAME``_q) / g;                                  \
        /* nearest odd integer within the constellation */                                  \
        di = 2 * int'($floor(ri / 2.0)) + 1;                                              \
        dq = 2 * int'($floor(rq / 2.0)) + 1;                                              \
        if (di > MM - 1) di = MM - 1; if (di < 1 - MM) di = 1 - MM;                          \
        if (dq > MM - 1) dq = MM - 1; if (dq < 1 - MM) dq = 1 - MM;                          \
        if (di != si || dq != sq) NAME``_err++;                                              \
        NAME``_sig   += real'(si * si + sq * sq);                                            \
        NAME``_noise += (ri - si) * (ri - si) + (rq - sq) * (rq - sq);                       \
        NAME``_n++;                                                                          \
      end                                                                                    \
      if (run) begin                                                                         \
        si = 2 * int'($urandom % MM) - (MM - 1);                                             \
        sq = 2 * int'($urandom % MM) - (MM - 1);                                             \
        NAME``_si.push_back(si); NAME``_sq.push_back(sq);                                    \
        ph = 2.0 * PI * real'(FW) / (2.0 ** ACC_W) * real'(NAME``_k);                        \
        c = $cos(ph); s = $sin(ph);                                                          \
        NAME``_x = LL'(int'($floor(SCALE * (si * c - sq * s) + 0.5)));                       \
        NAME``_y = LL'(int'($floor(SCALE * (si * s + sq * c) + 0.5)));                       \
        NAME``_k++;                                                                          \
      end                                                                                    \
    end

  // SCALE: largest step keeping the constellation corner magnitude inside
  // L bits: (M-1)*sqrt(2)*SCALE <= 2^(L-1) - 1
  `DEMOD_HARNESS(qpsk, 5, 7, 6, 6, 2, 10.0)
  `DEMOD_HARNESS(qam16, 6, 8, 7, 7, 4, 7.0)
  `DEMOD_HARNESS(qam64, 7, 9, 8, 8, 8, 6.0)

  `define PREC_REPORT(NAME, LL)                                                              \
    $display("L=%0d: %0d samples, max normalised error %f input LSB", LL, NAME``_n, NAME``_max); \
    checks++; if (NAME``_n < NSAMP - 2) fail(`"NAME too few outputs`");                      \
    checks++; if (NAME``_max > 0.5) fail($sformatf(`"NAME error %f above 0.5`", NAME``_max));

  `define DEMOD_REPORT(NAME)                                                                 \
    $display(`"NAME: %0d symbols, %0d errors, output SNR %f dB`", NAME``_n, NAME``_err,       \
             10.0 * $log10(NAME``_sig / NAME``_noise));                                      \
    checks++; if (NAME``_n < NSAMP - 2) fail(`"NAME too few symbols`");                      \
    checks++; if (NAME``_err != 0) fail(`"NAME symbol errors`");

  initial begin
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run = 1'b1;
    repeat (NSAMP) @(negedge clk);
    run = 1'b0;
    repeat (3) @(negedge clk);
    `PREC_REPORT(p4, 4)
    `PREC_REPORT(p5, 5)
    `PREC_REPORT(p6, 6)
    `PREC_REPORT(p7, 7)
    `PREC_REPORT(p8, 8)
    `PREC_REPORT(p9, 9)
    `PREC_REPORT(p10, 10)
    `DEMOD_REPORT(qpsk)
    `DEMOD_REPORT(qam16)
    `DEMOD_REPORT(qam64)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMP + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
