// tb_dbf_mode_decision: checks the skip / weak / strong decision per line.
// Lines p3..q3 are drawn from a mix of smooth, stepped and random patterns so
// that every Eq_cnt value and both outcomes of every alpha/beta comparison
// occur. Expected values, computed here:
//   Eq_cnt = number of the seven neighbouring pairs with |difference| <= 2;
//   loop mode: bS != 0 and (|p0-q0| < alpha, |p1-p0| < beta, |q1-q0| < beta
//   or forced) -> strong when bS = 4, else weak; otherwise skip;
//   post mode (not forced): Eq_cnt >= t2 strong, >= t3 weak, else skip;
//   enable = 0 always skips.
// Combinational unit: outputs are sampled 1 ns after the inputs change.
//
// The reference model in this testbench is written independently of the RTL;
// the stimulus and the checked properties are this design's own choices.
`timescale 1ns/1ps
module tb_dbf_mode_decision;
  import dbf_pkg::*;
  int checks = 0, failures = 0;
  pix_t       p [4], q [4];
  logic       enable, post, force_filter;
  logic [2:0] bs, t2, t3, eq_cnt;
  logic [7:0] alpha;
  logic [4:0] beta;
  fmode_e     mode;
  int         seen_eq [8], seen_mode [2][3];

  dbf_mode_decision #(.EQ_THR(2)) dut (.p, .q, .enable, .post, .bs, .alpha, .beta,
                                       .force_filter, .t2, .t3, .mode, .eq_cnt);

  initial begin
    #1s;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int iabs(int v); return (v < 0) ? -v : v; endfunction

  initial begin
    repeat (20000) begin
      int v[8], eq, em, base, kind;
      kind = $urandom_range(0, 3);
      base = $urandom_range(20, 230);
      for (int i = 0; i < 8; i++) begin
        case (kind)
          0: v[i] = base + int'($urandom_range(0, 4)) - 2;
          1: v[i] = base + ((i >= 4) ? 12 : 0) + int'($urandom_range(0, 2)) - 1;
          2: v[i] = base + int'($urandom_range(0, 8)) - 4;
          default: v[i] = $urandom_range(0, 255);
        endcase
        if (v[i] < 0) v[i] = 0;
        if (v[i] > 255) v[i] = 255;
      end
      for (int i = 0; i < 4; i++) begin p[i] = 8'(v[3-i]); q[i] = 8'(v[4+i]); end
      enable = ($urandom_range(0, 7) != 0);
      post = 1'($urandom); force_filter = ($urandom_range(0, 3) == 0);
      bs = 3'($urandom_range(0, 4));
      alpha = 8'($urandom_range(0, 40)); beta = 5'($urandom_range(0, 18));
      t2 = 3'($urandom_range(4, 7)); t3 = 3'($urandom_range(1, 4));
      #1;
      eq = 0;
      for (int i = 0; i < 7; i++) if (iabs(v[i] - v[i+1]) <= 2) eq++;
      em = 0;
      if (!enable) em = 0;
      else if (post && !force_filter) em = (eq >= t2) ? 2 : (eq >= t3) ? 1 : 0;
      else if (bs != 0 && (force_filter || (iabs(v[3] - v[4]) < alpha &&
               iabs(v[2] - v[3]) < beta && iabs(v[5] - v[4]) < beta)))
        em = (bs == 4) ? 2 : 1;
      checks += 2;
      seen_eq[eq]++;
      seen_mode[post && !force_filter][em]++;
      if (int'(eq_cnt) != eq) begin failures++; $display("FAIL eq_cnt %0d expected %0d", eq_cnt, eq); end
      if (int'(mode) != em) begin
        failures++;
        $display("FAIL mode %0d expected %0d (post %0d force %0d bs %0d eq %0d)", mode, em, post, force_filter, bs, eq);
      end
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (seen_eq[i] == 0) begin failures++; $display("FAIL Eq_cnt %0d never seen", i); end
    end
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (seen_mode[m][i] == 0) begin failures++; $display("FAIL post %0d mode %0d never seen", m, i); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
