// tb_cordic_quadrature_mixer: end-to-end test of the quadrature mixer with
// every parameter at its default (L = 10, B_C = 17, n = 12, N_C = 16), next to
// a pipelined instance and an iterative (FOLD = 2) instance with the same
// word-lengths.  The iterative one gets its own random samples, offered
// whatever in_ready says, and is checked in the same way (latency FOLD, a
// sample refused while in_ready is low).
//
// Part 1 streams random real and complex samples with random gaps in
// in_valid, random frequency words and phase offsets.  A model of the phase
// accumulator and the integer CORDIC reference predict every output
// bit-exactly; the normalised error against an exact rotation must stay
// below 0.5 input LSB; out_valid must come exactly LATENCY cycles after
// in_valid (1, or N_STAGES + 1 when pipelined).
// Part 2 down-converts a real carrier r(k) = A cos(w k + p) with
// freq_word = -w and checks that the mixer output is the constant baseband
// vector K*S*(A/2)exp(j(p + phase at start)) plus a 2w image that averages out.
// Mechanisms counted (each must occur): sample gaps that hold the phase,
// accumulator wrap-arounds, both pre-rotation directions, non-zero phase
// offsets, complex inputs, pipelined outputs, iterative outputs and samples
// held back by in_ready.
module tb_cordic_quadrature_mixer;
  import tb_cordic_ref_pkg::*;

  localparam int L = 10, B = 17, N = 12, NC = 16, ACC_W = 32;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                 in_valid;
  logic signed [L-1:0]  x_in, y_in;
  logic [ACC_W-1:0]     freq_word;
  logic [B-1:0]         phase_offset;
  logic                 out_valid, out_valid_p;
  logic signed [NC-1:0] i_out, q_out, i_out_p, q_out_p;
  logic                 wrapped, wrapped_p;
  logic                 in_ready, in_ready_p;
  // iterative instance
  logic                 in_valid_f, in_ready_f, out_valid_f, wrapped_f;
  logic signed [L-1:0]  x_f, y_f;
  logic signed [NC-1:0] i_out_f, q_out_f;

  cordic_quadrature_mixer dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .x_in(x_in), .y_in(y_in),
    .freq_word(freq_word), .phase_offset(phase_offset),
    .out_valid(out_valid), .i_out(i_out), .q_out(q_out), .phase_wrapped(wrapped));

  cordic_quadrature_mixer #(.PIPELINED(1'b1)) dut_p (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready_p), .x_in(x_in), .y_in(y_in),
    .freq_word(freq_word), .phase_offset(phase_offset),
    .out_valid(out_valid_p), .i_out(i_out_p), .q_out(q_out_p), .phase_wrapped(wrapped_p));

  cordic_quadrature_mixer #(.FOLD(2)) dut_f (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid_f), .in_ready(in_ready_f), .x_in(x_f), .y_in(y_f),
    .freq_word(freq_word), .phase_offset(phase_offset),
    .out_valid(out_valid_f), .i_out(i_out_f), .q_out(q_out_f), .phase_wrapped(wrapped_f));

  int checks = 0, failures = 0;
  int n_gap = 0, n_wrap = 0, n_pre_pos = 0, n_pre_neg = 0, n_offset = 0, n_complex = 0;
  int n_out = 0, n_out_p = 0, n_out_f = 0, n_held = 0;
  real max_err = 0.0;

  typedef struct { longint x; longint y; longint ph; int cyc; } sample_t;
  sample_t q0 [$];
  sample_t q1 [$];
  sample_t q2 [$];
  longint unsigned acc_f = 0;

  longint unsigned acc_m = 0;
  int cycle = 0;
  bit checking = 1'b1;
  // part 2 accumulators
  real sum_i = 0.0, sum_q = 0.0;
  int  n_sum = 0;
  bit  summing = 1'b0;

  function automatic void fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL %s", msg);
  endfunction

  task automatic check_out(ref sample_t q [$], input longint gi, input longint gq,
                           input int lat, input string tag);
    sample_t s; bit dpre; bit [63:0] d; longint res, ex, ey; real ix, iy, g, e;
    if (q.size() == 0) begin fail({tag, ": output without input"}); return; end
    s = q.pop_front();
    checks++;
    if (cycle - s.cyc != lat) fail($sformatf("%s latency %0d, expected %0d", tag, cycle - s.cyc, lat));
    if (!checking) return;
    ref_dirs(s.ph, B, N, dpre, d, res);
    ref_rot_dirs(s.x, s.y, dpre, d, L, NC, N, ex, ey);
    checks++;
    if (gi != ex || gq != ey)
      fail($sformatf("%s sample x=%0d y=%0d ph=%0d: got (%0d,%0d) expected (%0d,%0d)",
                     tag, s.x, s.y, s.ph, gi, gq, ex, ey));
    ideal_rot(real'(s.x), real'(s.y), s.ph, B, L, NC, N, ix, iy);
    g = cordic_gain(N) * (2.0 ** (NC - L - 2));
    e = (real'(gi) - ix) / g; if (e < 0) e = -e; if (e > max_err) max_err = e;
    checks++; if (e > 0.5) fail($sformatf("%s I error %f", tag, e));
    e = (real'(gq) - iy) / g; if (e < 0) e = -e; if (e > max_err) max_err = e;
    checks++; if (e > 0.5) fail($sformatf("%s Q error %f", tag, e));
  endtask

  // observe outputs after each rising edge
  always @(posedge clk) begin
    #2;
    if (rst_n) begin
      cycle++;
      if (wrapped) n_wrap++;
      checks++;
      if (wrapped != wrapped_p) fail("phase_wrapped differs between instances");
      if (out_valid) begin
        n_out++;
        check_out(q0, longint'(i_out), longint'(q_out), 1, "comb");
        if (summing) begin sum_i += real'(i_out); sum_q += real'(q_out); n_sum++; end
      end
      if (out_valid_p) begin
        n_out_p++;
        check_out(q1, longint'(i_out_p), longint'(q_out_p), N + 1, "pipe");
      end
      if (out_valid_f) begin
        n_out_f++;
        check_out(q2, longint'(i_out_f), longint'(q_out_f), 2, "iterative");
      end
    end
  end

  // apply one input cycle (called after the negative edge)
  task automatic drive(bit v, longint xv, longint yv);
    sample_t s; longint ph;
    in_valid = v;
    x_in = L'(xv);
    y_in = L'(yv);
    in_valid_f = ($urandom % 4) != 0;
    x_f = L'($urandom);
    y_f = L'($urandom);
    #1;
    checks++;
    if (!in_ready || !in_ready_p) fail("parallel mixer not ready");
    if (in_valid_f && !in_ready_f) n_held++;
    if (in_valid_f && in_ready_f) begin
      s.x = longint'(x_f); s.y = longint'(y_f); s.cyc = cycle;
      s.ph = (longint'(acc_f >> (ACC_W - B)) + longint'(phase_offset)) & ((64'd1 << B) - 1);
      q2.push_back(s);
      acc_f = (acc_f + longint'(freq_word)) & ((64'd1 << ACC_W) - 1);
    end
    if (v) begin
      ph = (longint'(acc_m >> (ACC_W - B)) + longint'(phase_offset)) & ((64'd1 << B) - 1);
      s.x = xv; s.y = yv; s.ph = ph; s.cyc = cycle;
      q0.push_back(s);
      q1.push_back(s);
      if (signed_phase(ph, B) >= 0) n_pre_pos++; else n_pre_neg++;
      if (phase_offset != 0) n_offset++;
      if (yv != 0) n_complex++;
      acc_m = (acc_m + longint'(freq_word)) & ((64'd1 << ACC_W) - 1);
    end else begin
      n_gap++;
    end
  endtask

  initial begin
    real amp, w, p0, phs;
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0; y_in = '0; freq_word = '0; phase_offset = '0;
    in_valid_f = 1'b0; x_f = '0; y_f = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // part 1: random stream
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      if (k % 500 == 0) freq_word = $urandom;
      phase_offset = (k % 7 == 0) ? B'($urandom) : '0;
      drive(($urandom % 5) != 0, longint'($signed(L'($urandom))),
            (k % 2 == 0) ? 0 : longint'($signed(L'($urandom))));
    end
    // drain
    @(negedge clk); in_valid = 1'b0; in_valid_f = 1'b0;
    repeat (N + 4) @(negedge clk);

    // part 2: down-convert a real carrier at w = 2*pi*f/2^ACC_W, f = 2^ACC_W/64
    amp = 400.0;
    p0 = 0.3;
    w = 2.0 * PI / 64.0;
    freq_word = ACC_W'((64'd1 << ACC_W) - (64'd1 << (ACC_W - 6)));  // -f
    phase_offset = '0;
    // carrier phase at the first sample of part 2, left behind by part 1
    phs = 2.0 * PI * real'(acc_m >> (ACC_W - B)) / (2.0 ** B);
    for (int k = 0; k < 64 * 8; k++) begin
      @(negedge clk);
      summing = 1'b1;
      // acc_m at this sample gives the carrier phase -w*k' (k' = samples taken so far)
      drive(1'b1, longint'($floor(amp * $cos(w * real'(k) + p0) + 0.5)), 0);
    end
    @(negedge clk); in_valid = 1'b0; in_valid_f = 1'b0;
    repeat (N + 4) @(negedge clk);
    begin
      real g, ei, mi, mq, ang, dang;
      g = cordic_gain(N) * (2.0 ** (NC - L - 2));
      mi = sum_i / n_sum / g;
      mq = sum_q / n_sum / g;
      ei = $sqrt(mi * mi + mq * mq);
      checks++;
      if (n_sum != 64 * 8) fail($sformatf("part 2 sample count %0d", n_sum));
      checks++;
      // baseband magnitude A/2 (the image at 2w cancels over whole periods)
      if (ei < amp / 2.0 - 1.0 || ei > amp / 2.0 + 1.0)
        fail($sformatf("baseband magnitude %f, expected %f", ei, amp / 2.0));
      // baseband angle p0 + phs: r e^{j(phs - w k)} keeps the e^{+j(w k + p0)} half of the cosine
      ang = $atan2(mq, mi);
      dang = ang - (p0 + phs);
      while (dang > PI) dang -= 2.0 * PI;
      while (dang < -PI) dang += 2.0 * PI;
      checks++;
      if (dang > 0.01 || dang < -0.01) fail($sformatf("baseband angle off by %f rad", dang));
      $display("down-conversion: baseband (%f, %f), magnitude %f (expected %f)", mi, mq, ei, amp / 2.0);
    end

    // mechanism coverage
    $display("gaps=%0d wraps=%0d pre+90=%0d pre-90=%0d offsets=%0d complex=%0d outputs=%0d pipelined=%0d iterative=%0d held=%0d",
             n_gap, n_wrap, n_pre_pos, n_pre_neg, n_offset, n_complex, n_out, n_out_p, n_out_f, n_held);
    checks++; if (n_gap == 0)     fail("no sample gap");
    checks++; if (n_wrap == 0)    fail("no accumulator wrap");
    checks++; if (n_pre_pos == 0) fail("no +90 pre-rotation");
    checks++; if (n_pre_neg == 0) fail("no -90 pre-rotation");
    checks++; if (n_offset == 0)  fail("no phase offset");
    checks++; if (n_complex == 0) fail("no complex input");
    checks++; if (n_out_p == 0)   fail("no pipelined output");
    checks++; if (n_out_f == 0)   fail("no iterative output");
    checks++; if (n_held == 0)    fail("in_ready never held a sample back");
    checks++; if (q2.size() != 0) fail("iterative inputs and outputs do not match up");
    checks++; if (q0.size() != 0 || q1.size() != 0 || n_out != n_out_p) fail("inputs and outputs do not match up");
    $display("max normalised error %f input LSB", max_err);
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
