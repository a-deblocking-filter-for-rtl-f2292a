// tb_dbf_pixel_buffer: checks the four-block pixel buffer against a pixel
// array model kept in this testbench.
// Each cycle random line writes (P and Q ports, row or column orientation),
// word writes and line reads are applied. The model stores pixel [slot][row]
// [column]; a column line is pixels (0..3, idx), a row line pixels (idx,
// 0..3); writes land at the clock edge in the order P, Q, word, so the word
// port wins a collision, then Q. Reads are checked combinationally before the
// edge, the block view after it. Reset must clear the buffer.
//
// The reference model in this testbench is written independently of the RTL;
// the stimulus and the checked properties are this design's own choices.
`timescale 1ns/1ps
module tb_dbf_pixel_buffer;
  import dbf_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] rp_slot, rq_slot, rp_idx, rq_idx, wp_slot, wq_slot, wp_idx, wq_idx, ww_slot, ww_idx;
  logic       rp_vert, rq_vert, wp_en, wq_en, wp_vert, wq_vert, ww_en;
  pix_t       rp_line [4], rq_line [4], wp_line [4], wq_line [4];
  cop_t       ww_data;
  blk_t       blocks [4];
  int         model [4][4][4];       // slot, row, column
  int         n_collide;

  dbf_pixel_buffer dut (.clk, .rst_n, .rp_slot, .rq_slot, .rp_idx, .rq_idx, .rp_vert, .rq_vert,
                        .rp_line, .rq_line, .wp_en, .wq_en, .wp_slot, .wq_slot, .wp_idx, .wq_idx,
                        .wp_vert, .wq_vert, .wp_line, .wq_line, .ww_en, .ww_slot, .ww_idx, .ww_data,
                        .blocks);

  initial begin
    #10ms;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic chk_line(string nm, logic [1:0] s, logic [1:0] i, logic v, pix_t l [4]);
    for (int k = 0; k < 4; k++) begin
      int e;
      e = v ? model[s][i][k] : model[s][k][i];
      checks++;
      if (int'(l[k]) != e) begin
        failures++;
        $display("FAIL %s read slot %0d idx %0d vert %0d pixel %0d: %0d != %0d", nm, s, i, v, k, l[k], e);
      end
    end
  endtask

  task automatic model_line(logic [1:0] s, logic [1:0] i, logic v, pix_t l [4]);
    for (int k = 0; k < 4; k++)
      if (v) model[s][i][k] = l[k]; else model[s][k][i] = l[k];
  endtask

  initial begin
    wp_en = 0; wq_en = 0; ww_en = 0;
    {rp_slot, rq_slot, rp_idx, rq_idx, rp_vert, rq_vert} = '0;
    {wp_slot, wq_slot, wp_idx, wq_idx, wp_vert, wq_vert, ww_slot, ww_idx, ww_data} = '0;
    for (int k = 0; k < 4; k++) begin wp_line[k] = 0; wq_line[k] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 4; s++) for (int w = 0; w < 4; w++) begin
      checks++;
      if (blocks[s][w] != '0) begin failures++; $display("FAIL not cleared by reset"); end
    end
    for (int s = 0; s < 4; s++) for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) model[s][r][c] = 0;
    repeat (4000) begin
      rp_slot = 2'($urandom); rq_slot = 2'($urandom); rp_idx = 2'($urandom); rq_idx = 2'($urandom);
      rp_vert = 1'($urandom); rq_vert = 1'($urandom);
      wp_en = 1'($urandom); wq_en = 1'($urandom); ww_en = ($urandom_range(0, 2) == 0);
      wp_slot = 2'($urandom); wq_slot = ($urandom_range(0, 3) == 0) ? wp_slot : 2'($urandom);
      wp_idx = 2'($urandom); wq_idx = 2'($urandom); wp_vert = 1'($urandom); wq_vert = 1'($urandom);
      ww_slot = ($urandom_range(0, 3) == 0) ? wq_slot : 2'($urandom); ww_idx = 2'($urandom);
      ww_data = $urandom;
      for (int k = 0; k < 4; k++) begin wp_line[k] = 8'($urandom); wq_line[k] = 8'($urandom); end
      #1;
      chk_line("P", rp_slot, rp_idx, rp_vert, rp_line);
      chk_line("Q", rq_slot, rq_idx, rq_vert, rq_line);
      if (wq_en && ww_en && wq_slot == ww_slot) n_collide++;
      if (wp_en) model_line(wp_slot, wp_idx, wp_vert, wp_line);
      if (wq_en) model_line(wq_slot, wq_idx, wq_vert, wq_line);
      if (ww_en) for (int r = 0; r < 4; r++) model[ww_slot][r][ww_idx] = ww_data[8*r +: 8];
      @(posedge clk); #1;
      for (int s = 0; s < 4; s++) for (int w = 0; w < 4; w++) for (int r = 0; r < 4; r++) begin
        checks++;
        if (int'(blocks[s][w][8*r +: 8]) != model[s][r][w]) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d word %0d row %0d: %0d != %0d", s, w, r,
                                      blocks[s][w][8*r +: 8], model[s][r][w]);
        end
      end
    end
    checks++;
    if (n_collide == 0) begin failures++; $display("FAIL no write collision exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
