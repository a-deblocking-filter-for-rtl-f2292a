// tb_dbf_bs: checks the boundary-strength derivation.
// Random pairs of 4x4-block syntax (intra flags, non-zero coefficients,
// reference index, motion vectors close to the +-4 quarter-sample limit) and
// the MB-edge flag go in; the expected bS is computed here from the H.264
// rules (4: intra on an MB edge, 3: intra, 2: coefficients, 1: different
// reference or a motion-vector component differing by 4 or more, else 0).
// Directed cases hit each rule and both sides of the motion-vector limit.
// Combinational unit: outputs are sampled 1 ns after the inputs change.
//
// The reference model in this testbench is written independently of the RTL;
// the stimulus and the checked properties are this design's own choices.
`timescale 1ns/1ps
module tb_dbf_bs;
  import dbf_pkg::*;
  int checks = 0, failures = 0;
  logic     mb_edge, intra_p, intra_q;
  blkinfo_t info_p, info_q;
  logic [2:0] bs;
  int seen [5];

  dbf_bs dut (.mb_edge, .intra_p, .intra_q, .info_p, .info_q, .bs);

  initial begin
    #1s;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int expect_bs();
    int dx, dy;
    dx = int'(info_p.mvx) - int'(info_q.mvx);
    dy = int'(info_p.mvy) - int'(info_q.mvy);
    if (intra_p || intra_q) return mb_edge ? 4 : 3;
    if (info_p.nz || info_q.nz) return 2;
    if (info_p.ref_idx != info_q.ref_idx) return 1;
    if (dx >= 4 || dx <= -4 || dy >= 4 || dy <= -4) return 1;
    return 0;
  endfunction

  task automatic check();
    int e;
    #1;
    e = expect_bs();
    checks++;
    seen[e]++;
    if (int'(bs) != e) begin
      failures++;
      $display("FAIL bs %0d expected %0d (edge %0d intra %0d/%0d nz %0d/%0d ref %0d/%0d mv %0d,%0d/%0d,%0d)",
               bs, e, mb_edge, intra_p, intra_q, info_p.nz, info_q.nz, info_p.ref_idx, info_q.ref_idx,
               info_p.mvx, info_p.mvy, info_q.mvx, info_q.mvy);
    end
  endtask

  initial begin
    // directed: motion-vector limit on both sides, both signs, large values
    for (int d = -5; d <= 5; d++) begin
      mb_edge = 0; intra_p = 0; intra_q = 0; info_p = '0; info_q = '0;
      info_p.mvx = 12'(d + 1000); info_q.mvx = 12'sd1000; check();
      info_p.mvx = '0; info_p.mvy = 12'(d - 2000); info_q.mvx = '0; info_q.mvy = -12'sd2000; check();
    end
    repeat (5000) begin
      mb_edge = 1'($urandom); intra_p = ($urandom_range(0, 5) == 0); intra_q = ($urandom_range(0, 5) == 0);
      info_p.nz = ($urandom_range(0, 3) == 0); info_q.nz = ($urandom_range(0, 3) == 0);
      info_p.ref_idx = 4'($urandom_range(0, 1)); info_q.ref_idx = ($urandom_range(0, 1) == 0) ? info_p.ref_idx : 4'($urandom);
      info_p.mvx = 12'($urandom); info_p.mvy = 12'($urandom);
      info_q.mvx = 12'(int'(info_p.mvx) + int'($urandom_range(0, 10)) - 5);
      info_q.mvy = 12'(int'(info_p.mvy) + int'($urandom_range(0, 10)) - 5);
      check();
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL bS %0d never produced", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
