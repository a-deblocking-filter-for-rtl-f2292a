// tb_dbf_threshold: checks the alpha / beta / tc0 look-up of the edge filter.
// Random QP pairs, filter offsets and bS values go in; the expected indexA,
// alpha (indexA), beta (indexB) and tc0 (bS, indexA) come from tables typed
// into this testbench from the H.264 standard and an independent
// computation of indexA/B = Clip3(0, 51, ((qp_p + qp_q + 1) >> 1) + offset).
// The corners (QP 0 and 51, offsets -12 / +12) are always included.
// Combinational unit: values are sampled 1 ns after the inputs change.
//
// The reference model in this testbench is written independently of the RTL;
// the stimulus and the checked properties are this design's own choices.
`timescale 1ns/1ps
module tb_dbf_threshold;
  int checks = 0, failures = 0;
  logic [5:0]        qp_p, qp_q, index_a;
  logic signed [4:0] offset_a, offset_b;
  logic [2:0]        bs;
  logic [7:0]        alpha;
  logic [4:0]        beta, tc0;

  dbf_threshold dut (.qp_p, .qp_q, .offset_a, .offset_b, .bs, .index_a, .alpha, .beta, .tc0);

  int ALPHA[52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,
                    32,36,40,45,50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
  int BETA [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,
                    9,9,10,10,11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
  int TC [3][52] = '{
    '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13},
    '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,5,5,6,7,8,8,10,11,12,13,15,17},
    '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13,14,16,18,20,23,25}};

  initial begin
    #1s;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int clip51(int v); return (v < 0) ? 0 : (v > 51) ? 51 : v; endfunction

  task automatic one(int a, int b, int oa, int ob, int s);
    int av, ia, ib, et;
    qp_p = 6'(a); qp_q = 6'(b); offset_a = 5'(oa); offset_b = 5'(ob); bs = 3'(s);
    #1;
    av = (a + b + 1) >> 1;
    ia = clip51(av + oa); ib = clip51(av + ob);
    et = (s >= 1 && s <= 3) ? TC[s-1][ia] : 0;
    checks += 4;
    if (int'(index_a) != ia) begin failures++; $display("FAIL indexA qp %0d/%0d off %0d: %0d != %0d", a, b, oa, index_a, ia); end
    if (int'(alpha) != ALPHA[ia]) begin failures++; $display("FAIL alpha idx %0d: %0d != %0d", ia, alpha, ALPHA[ia]); end
    if (int'(beta) != BETA[ib]) begin failures++; $display("FAIL beta idx %0d: %0d != %0d", ib, beta, BETA[ib]); end
    if (int'(tc0) != et) begin failures++; $display("FAIL tc0 bs %0d idx %0d: %0d != %0d", s, ia, tc0, et); end
  endtask

  initial begin
    foreach (ALPHA[i]) for (int s = 0; s <= 4; s++) one(i, i, 0, 0, s);
    one(0, 0, -12, -12, 1); one(51, 51, 12, 12, 3); one(0, 51, 12, -12, 2); one(51, 0, -12, 12, 4);
    repeat (3000)
      one($urandom_range(0, 51), $urandom_range(0, 51), int'($urandom_range(0, 24)) - 12,
          int'($urandom_range(0, 24)) - 12, $urandom_range(0, 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
