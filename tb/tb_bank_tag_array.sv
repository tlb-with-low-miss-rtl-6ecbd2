// tb_bank_tag_array - random test of the bank tags (8 of them here) against a reference
// model: ASID search, current-bank tracking, victim choice (invalid tag
// first, then first LRU=0 tag, else bank 0 with all LRU bits cleared),
// select / alloc / clear-current / clear-all.
module tb_bank_tag_array;
  import tlb_pkg::*;

  // 8 banks for 32 ASIDs, so that valid banks must be reused as victims
  localparam int NB = 8;
  localparam int IW = $clog2(NB);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  asid_t asid;
  logic  select, alloc, clr_cur, clr_all;
  logic  cur_any, asid_hit;
  logic [IW-1:0] cur_idx, asid_idx, victim_idx;
  logic [NB-1:0] cur_vec;

  bank_tag_array #(.NUM_BANKS(NB)) dut (.*);

  int checks = 0, failures = 0;
  bank_tag_t m [NB];
  int n_victim_valid = 0, n_found = 0, n_wrap = 0;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    {select, alloc, clr_cur, clr_all} = '0;
    asid = '0;
    foreach (m[i]) m[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int r, e_cur, e_hit, e_vic;
      bit allset;
      @(negedge clk);
      {select, alloc, clr_cur, clr_all} = '0;
      asid = asid_t'($urandom);
      #1;
      e_cur = -1; e_hit = -1; e_vic = -1; allset = 1;
      for (int b = 0; b < NB; b++) begin
        if (e_cur < 0 && m[b].current) e_cur = b;
        if (e_hit < 0 && m[b].valid && m[b].task_tag == asid) e_hit = b;
        if (e_vic < 0 && !m[b].valid) e_vic = b;
        if (!m[b].valid || !m[b].lru) allset = 0;
      end
      for (int b = 0; b < NB; b++) if (e_vic < 0 && !m[b].lru) e_vic = b;
      if (e_vic < 0) e_vic = 0;
      chk(cur_any == (e_cur >= 0) && (e_cur < 0 || cur_idx == IW'(e_cur)), "current bank");
      chk(asid_hit == (e_hit >= 0) && (e_hit < 0 || asid_idx == IW'(e_hit)), "asid search");
      chk(victim_idx == IW'(e_vic), $sformatf("victim %0d vs %0d", victim_idx, e_vic));
      r = $urandom_range(0, 99);
      if (r < 3) clr_all = 1;
      else if (r < 30) clr_cur = 1;
      else if (r < 65 && e_cur < 0) begin
        if (e_hit >= 0) select = 1; else alloc = 1;
      end
      @(posedge clk);
      if (clr_all) foreach (m[b]) begin m[b].valid = 0; m[b].current = 0; end
      else if (clr_cur) foreach (m[b]) m[b].current = 0;
      else if (select) begin m[e_hit].current = 1; m[e_hit].lru = 1; n_found++; end
      else if (alloc) begin
        if (m[e_vic].valid) n_victim_valid++;
        if (allset) begin foreach (m[b]) m[b].lru = 0; n_wrap++; end
        m[e_vic] = '{task_tag: asid, current: 1'b1, valid: 1'b1, lru: 1'b1};
      end
    end
    chk(n_found > 0 && n_victim_valid > 0 && n_wrap > 0, "coverage");
    $display("found=%0d victim_valid=%0d wraps=%0d", n_found, n_victim_valid, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
