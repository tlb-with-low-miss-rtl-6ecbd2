// tb_tlb_bank - random test of one 32-entry TLB bank against a reference
// model of its 1-bit LRU policy (invalid entry first, then first LRU=0
// entry; all LRU bits cleared when every one is set at a replacement).
// Lookups are checked every cycle; tags come from a small pool so that hits,
// misses, replacements and clears all occur often.
module tb_tlb_bank;
  import tlb_pkg::*;

  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  tlb_cmd_t cmd;
  vpn_t     vpn;
  ppn_t     wr_ppn;
  logic     hit;
  ppn_t     hit_ppn;

  tlb_bank #(.ENTRIES(N)) dut (.*);

  int checks = 0, failures = 0;
  logic m_valid [N], m_lru [N];
  vpn_t m_tag [N];
  ppn_t m_ppa [N];
  int   n_lru_wrap = 0, n_hits = 0;

  function automatic int m_lookup(vpn_t v);
    for (int i = 0; i < N; i++) if (m_valid[i] && m_tag[i] == v) return i;
    return -1;
  endfunction

  function automatic int m_victim(output bit wrap);
    wrap = 0;
    for (int i = 0; i < N; i++) if (!m_valid[i]) return i;
    for (int i = 0; i < N; i++) if (!m_lru[i]) return i;
    wrap = 1;
    return 0;
  endfunction

  initial begin
    cmd = CMD_NONE; vpn = '0; wr_ppn = '0;
    for (int i = 0; i < N; i++) begin m_valid[i] = 0; m_lru[i] = 0; m_tag[i] = 0; m_ppa[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      int r, idx;
      bit wrap;
      @(negedge clk);
      cmd    = CMD_NONE;
      vpn    = vpn_t'($urandom_range(0, 47) * 37);
      wr_ppn = ppn_t'($urandom);
      r = $urandom_range(0, 199);
      if (r < 60)       cmd.search_va = 1;
      else if (r < 120) cmd.lru_replace = (m_lookup(vpn) < 0);
      else if (r < 121) cmd.clr_valid = 1;
      else if (r < 123) cmd.clr_lru_bit = 1;
      #1;
      idx = m_lookup(vpn);
      checks++;
      if (hit !== (idx >= 0) || (idx >= 0 && hit_ppn !== m_ppa[idx])) begin
        failures++;
        $display("FAIL lookup %h: hit=%b ppn=%h model idx=%0d", vpn, hit, hit_ppn, idx);
      end
      if (idx >= 0) n_hits++;
      @(posedge clk);
      // update the model as the bank does on this edge
      if (cmd.clr_valid)   for (int i = 0; i < N; i++) m_valid[i] = 0;
      if (cmd.clr_lru_bit) for (int i = 0; i < N; i++) m_lru[i] = 0;
      if (cmd.search_va && idx >= 0) m_lru[idx] = 1;
      if (cmd.lru_replace) begin
        int v;
        v = m_victim(wrap);
        if (wrap) begin
          for (int i = 0; i < N; i++) m_lru[i] = 0;
          n_lru_wrap++;
        end
        m_valid[v] = 1; m_lru[v] = 1; m_tag[v] = vpn; m_ppa[v] = wr_ppn;
      end
    end
    checks++;
    if (n_lru_wrap == 0 || n_hits == 0) begin
      failures++;
      $display("FAIL coverage: wraps=%0d hits=%0d", n_lru_wrap, n_hits);
    end
    $display("lru wraps=%0d hits=%0d", n_lru_wrap, n_hits);
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
