// tb_cordic_rotator_iterative: drives the folded rotator with a random
// stream that keeps in_valid high most of the time and honours in_ready.
// Each result is compared bit-exactly with the integer reference model (the
// same answer the parallel rotator gives) and the timing is checked: the
// result comes FOLD-1 cycles after the sample is accepted, and a new sample
// is accepted at most once every FOLD cycles.  Instances: FOLD = 2 at the
// default word-lengths, FOLD = 3, and FOLD = 5 with 12 stages (last pass only
// partly used) at the QPSK word-lengths of 5/7/6/6 with 12 stages.
module tb_cordic_rotator_iterative;
  import tb_cordic_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  task automatic fail(string m);
    failures++;
    if (failures < 12) $display("FAIL %s", m);
  endtask

  typedef struct { longint x; longint y; longint ph; int cyc; } s_t;

  // one harness per configuration
  `define ITER_HARNESS(NAME, LL, BB, NN, NCC, FF)                                         \
    logic                  NAME``_v, NAME``_rdy, NAME``_ov;                                \
    logic signed [LL-1:0]  NAME``_x, NAME``_y;                                             \
    logic [BB-1:0]         NAME``_ph;                                                      \
    logic signed [NCC-1:0] NAME``_xo, NAME``_yo;                                           \
    s_t                    NAME``_q [$];                                                   \
    int                    NAME``_last = -100, NAME``_n = 0;                               \
    cordic_rotator_iterative #(.L(LL), .B_C(BB), .N_STAGES(NN), .N_C(NCC), .FOLD(FF)) NAME ( \
      .clk(clk), .rst_n(rst_n), .in_valid(NAME``_v), .in_ready(NAME``_rdy),                \
      .x_in(NAME``_x), .y_in(NAME``_y), .phase(NAME``_ph),                                 \
      .out_valid(NAME``_ov), .x_out(NAME``_xo), .y_out(NAME``_yo));                        \
    always @(negedge clk) if (rst_n) begin                                                 \
      s_t s; bit dp; bit [63:0] d; longint r, ex, ey;                                      \
      /* output of the present cycle */                                                    \
      if (NAME``_ov) begin                                                                 \
        checks++;                                                                          \
        if (NAME``_q.size() == 0) fail(`"NAME output without input`");                     \
        else begin                                                                         \
          s = NAME``_q.pop_front();                                                        \
          if (cycle - s.cyc != FF - 1) fail($sformatf(`"NAME latency %0d`", cycle - s.cyc)); \
          ref_dirs(s.ph, BB, NN, dp, d, r);                                                \
          ref_rot_dirs(s.x, s.y, dp, d, LL, NCC, NN, ex, ey);                              \
          checks++;                                                                        \
          if (longint'(NAME``_xo) != ex || longint'(NAME``_yo) != ey)                      \
            fail($sformatf(`"NAME got (%0d,%0d) expected (%0d,%0d)`",                      \
                           NAME``_xo, NAME``_yo, ex, ey));                                 \
          NAME``_n++;                                                                      \
        end                                                                                \
      end                                                                                  \
      /* accepted this cycle? */                                                           \
      if (NAME``_v && NAME``_rdy) begin                                                    \
        checks++;                                                                          \
        if (cycle - NAME``_last < FF) fail(`"NAME accepted too early`");                   \
        NAME``_last = cycle;                                                               \
        s.x = longint'(NAME``_x); s.y = longint'(NAME``_y); s.ph = longint'(NAME``_ph);    \
        s.cyc = cycle;                                                                     \
        NAME``_q.push_back(s);                                                             \
      end                                                                                  \
    end                                                                                    \
    always @(posedge clk) begin                                                            \
      #1;                                                                                  \
      NAME``_v  = ($urandom % 8) != 0;                                                     \
      NAME``_x  = LL'($urandom);                                                           \
      NAME``_y  = LL'($urandom);                                                           \
      NAME``_ph = BB'($urandom);                                                           \
    end

  `ITER_HARNESS(u2, 10, 17, 12, 16, 2)
  `ITER_HARNESS(u3, 10, 17, 12, 16, 3)
  `ITER_HARNESS(u5, 5, 7, 12, 6, 5)

  always @(posedge clk) if (rst_n) cycle++;

  initial begin
    rst_n = 1'b0;
    u2_v = 1'b0; u3_v = 1'b0; u5_v = 1'b0;
    u2_x = '0; u2_y = '0; u2_ph = '0;
    u3_x = '0; u3_y = '0; u3_ph = '0;
    u5_x = '0; u5_y = '0; u5_ph = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (6000) @(negedge clk);
    $display("results: FOLD2 %0d, FOLD3 %0d, FOLD5 %0d", u2_n, u3_n, u5_n);
    checks++;
    // near full throughput: at least 1/FOLD of the cycles minus the idle gaps
    if (u2_n < 6000 / 2 * 3 / 4 || u3_n < 6000 / 3 * 3 / 4 || u5_n < 6000 / 5 * 3 / 4)
      fail("throughput too low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
