// tb_dbf_edge_filter: checks the pixel arithmetic of the edge filter.
// Random lines p3..q3 (smooth, stepped, noisy and full-range) are filtered in
// every mode: loop weak (bS 1..3 tc0 from the standard table, luma and
// chroma), strong (luma and chroma), post weak (modified default mode with
// the [2 -4 4 -2] kernel) and skip. The expected line is computed here from
// the H.264 equations and the modified MPEG-4 default-mode equations.
// Combinational unit: outputs are sampled 1 ns after the inputs change.
//
// The reference model in this testbench is written independently of the RTL;
// the stimulus and the checked properties are this design's own choices.
`timescale 1ns/1ps
module tb_dbf_edge_filter;
  import dbf_pkg::*;
  int checks = 0, failures = 0;
  pix_t       p [4], q [4], p_out [4], q_out [4];
  fmode_e     mode;
  logic       post, chroma;
  logic [7:0] alpha;
  logic [4:0] beta, tc0;
  logic [5:0] qp_post;
  int         changed [4];

  dbf_edge_filter dut (.p, .q, .mode, .post, .chroma, .alpha, .beta, .tc0, .qp_post, .p_out, .q_out);

  initial begin
    #1s;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int c3(int lo, int hi, int v); return (v < lo) ? lo : (v > hi) ? hi : v; endfunction
  function automatic int iabs(int v); return (v < 0) ? -v : v; endfunction

  initial begin
    repeat (30000) begin
      int v[8], e[8], base, kind, p0, p1, p2, p3, q0, q1, q2, q3, al, be, t0, tc, dl, ap, aq;
      int a0, a1, a2, m, a0n, d, lim, md;
      kind = $urandom_range(0, 3);
      base = $urandom_range(10, 245);
      for (int i = 0; i < 8; i++) begin
        case (kind)
          0: v[i] = base + int'($urandom_range(0, 6)) - 3;
          1: v[i] = base + ((i >= 4) ? int'($urandom_range(0, 30)) - 15 : 0) + int'($urandom_range(0, 2)) - 1;
          2: v[i] = base + int'($urandom_range(0, 20)) - 10;
          default: v[i] = $urandom_range(0, 255);
        endcase
        v[i] = c3(0, 255, v[i]);
      end
      for (int i = 0; i < 4; i++) begin p[i] = 8'(v[3-i]); q[i] = 8'(v[4+i]); end
      md = $urandom_range(0, 3);
      post = (md == 3); chroma = 1'($urandom);
      mode = (md == 0) ? FM_SKIP : (md == 2) ? FM_STRONG : FM_WEAK;
      al = $urandom_range(4, 255); be = $urandom_range(2, 18); t0 = $urandom_range(0, 25);
      alpha = 8'(al); beta = 5'(be); tc0 = 5'(t0); qp_post = 6'($urandom_range(0, 51));
      #1;
      p3 = v[0]; p2 = v[1]; p1 = v[2]; p0 = v[3]; q0 = v[4]; q1 = v[5]; q2 = v[6]; q3 = v[7];
      e = v;
      ap = iabs(p2 - p0); aq = iabs(q2 - q0);
      if (md == 1) begin
        tc = chroma ? t0 + 1 : t0 + (ap < be) + (aq < be);
        dl = c3(-tc, tc, (4*(q0 - p0) + (p1 - q1) + 4) >>> 3);
        e[3] = c3(0, 255, p0 + dl); e[4] = c3(0, 255, q0 - dl);
        if (!chroma && ap < be) e[2] = p1 + c3(-t0, t0, (p2 + ((p0 + q0 + 1) >> 1) - 2*p1) >>> 1);
        if (!chroma && aq < be) e[5] = q1 + c3(-t0, t0, (q2 + ((p0 + q0 + 1) >> 1) - 2*q1) >>> 1);
      end else if (md == 2) begin
        if (!chroma && ap < be && iabs(p0 - q0) < (al >> 2) + 2) begin
          e[3] = (p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 4) >> 3;
          e[2] = (p2 + p1 + p0 + q0 + 2) >> 2;
          e[1] = (2*p3 + 3*p2 + p1 + p0 + q0 + 4) >> 3;
        end else e[3] = (2*p1 + p0 + q1 + 2) >> 2;
        if (!chroma && aq < be && iabs(p0 - q0) < (al >> 2) + 2) begin
          e[4] = (q2 + 2*q1 + 2*q0 + 2*p0 + p1 + 4) >> 3;
          e[5] = (q2 + q1 + q0 + p0 + 2) >> 2;
          e[6] = (2*q3 + 3*q2 + q1 + q0 + p0 + 4) >> 3;
        end else e[4] = (2*q1 + q0 + p1 + 2) >> 2;
      end else if (md == 3) begin
        a0 = (2*p1 - 4*p0 + 4*q0 - 2*q1 + 4) >>> 3;
        a1 = (2*p3 - 4*p2 + 4*p1 - 2*p0 + 4) >>> 3;
        a2 = (2*q0 - 4*q1 + 4*q2 - 2*q3 + 4) >>> 3;
        if (iabs(a0) < qp_post) begin
          m = iabs(a0);
          if (iabs(a1) < m) m = iabs(a1);
          if (iabs(a2) < m) m = iabs(a2);
          a0n = (a0 < 0) ? -m : m;
          d = (4*(a0n - a0) + 4) >>> 3;
          lim = (p0 - q0) / 2;
          d = (lim >= 0) ? c3(0, lim, d) : c3(lim, 0, d);
          e[3] = c3(0, 255, p0 - d); e[4] = c3(0, 255, q0 + d);
        end
      end
      for (int i = 0; i < 8; i++) begin
        int got;
        got = (i < 4) ? int'(p_out[3-i]) : int'(q_out[i-4]);
        checks++;
        if (got != e[i]) begin
          failures++;
          if (failures < 10) $display("FAIL mode %0d post %0d chroma %0d pixel %0d: got %0d expected %0d",
                                      mode, post, chroma, i, got, e[i]);
        end
      end
      if (e[3] != v[3]) changed[md]++;
    end
    for (int i = 1; i < 4; i++) begin
      checks++;
      if (changed[i] == 0) begin failures++; $display("FAIL mode %0d never changed a pixel", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
