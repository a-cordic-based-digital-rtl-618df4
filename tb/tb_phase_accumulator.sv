// tb_phase_accumulator: runs the phase accumulator with random frequency
// words, random phase offsets and a random sample enable, and compares the
// truncated, offset phase and the wrap flag every cycle with a 64-bit integer
// model of the accumulator.  Checks that the phase holds while sample_en is
// low and that wrap-arounds occur and are flagged.
module tb_phase_accumulator;

  localparam int ACC_W = 32, B = 17;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             en;
  logic [ACC_W-1:0] fw;
  logic [B-1:0]     off;
  logic [B-1:0]     phase;
  logic             wrapped;

  always #5 clk = ~clk;

  phase_accumulator dut (
    .clk(clk), .rst_n(rst_n), .sample_en(en), .freq_word(fw),
    .phase_offset(off), .phase(phase), .wrapped(wrapped));

  int checks = 0, failures = 0, wraps = 0, holds = 0;
  longint unsigned acc_m = 0;
  bit exp_wrap = 1'b0;

  initial begin
    longint unsigned expected;
    rst_n = 1'b0; en = 1'b0; fw = '0; off = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      // check state reached by the previous edge
      expected = ((acc_m >> (ACC_W - B)) + longint'(off)) & ((64'd1 << B) - 1);
      checks++;
      if (longint'(phase) != expected || wrapped != exp_wrap) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d phase=%0d exp=%0d wrapped=%0b exp=%0b",
                                    k, phase, expected, wrapped, exp_wrap);
      end
      // new stimulus; phase check after the offset changes combinationally
      en  = ($urandom % 4) != 0;
      fw  = (k < 10000) ? $urandom : ($urandom >> ($urandom % 24));
      off = (k % 5 == 0) ? B'($urandom) : '0;
      #1;
      expected = ((acc_m >> (ACC_W - B)) + longint'(off)) & ((64'd1 << B) - 1);
      checks++;
      if (longint'(phase) != expected) begin
        failures++;
        if (failures < 10) $display("FAIL offset k=%0d phase=%0d exp=%0d", k, phase, expected);
      end
      // model the coming edge
      exp_wrap = en && ((acc_m + longint'(fw)) >= (64'd1 << ACC_W));
      if (exp_wrap) wraps++;
      if (!en) holds++;
      if (en) acc_m = (acc_m + longint'(fw)) & ((64'd1 << ACC_W) - 1);
    end
    checks++;
    if (wraps == 0 || holds == 0) begin failures++; $display("FAIL wraps=%0d holds=%0d", wraps, holds); end
    $display("wraps=%0d holds=%0d", wraps, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (25000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
