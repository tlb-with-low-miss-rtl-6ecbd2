// tb_tlb_ctrl_top - end-to-end test of the banked TLB controller at its
// default sizes (32 banks x 32 entries, 18-entry SP prefetch buffer).
//
// The environment is modelled here: a processor that sends virtual addresses
// and context switches, an OS that sends clear-TLB requests and ASIDs, and a
// page-table walker that answers demand misses and PFE prefetch requests on
// the PTE channel. Page tables are a hash of (ASID, VPN, epoch); a clear-TLB
// bumps the epoch, so a stale translation left in the TLB would be caught.
// Every PA is compared with the page table. Directed phases check the key
// property: after switching away from a task and back, its pages still hit.
// Each mechanism (bank hit, prefetch-buffer hit, demand miss, bank found by
// ASID, new bank given out, bank victim reuse, entry LRU replacement,
// prefetch fetch, context switch, clear-all, clear-current) is counted and
// must occur at least once. Handshake acks come after random delays. On a
// bank hit with no prefetch fetch in progress, TLB_hit_req and PA_req must
// rise two clock edges after VA_req.
module tb_tlb_ctrl_top;
  import tlb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic VA_req = 0, VA_ack; logic [31:0] VA_data = '0;
  logic PTE_req = 0, PTE_ack; logic [31:0] PTE_data = '0;
  logic clr_TLB_req = 0, clr_TLB_data = 0, clr_TLB_ack;
  logic ASID_req = 0, ASID_ack; logic [4:0] ASID_data = '0;
  logic CMW_req = 0, CMW_data = 0, CMW_ack;
  logic PA_req, PA_ack = 0; logic [31:0] PA_data;
  logic PFE_req, PFE_data, PFE_ack = 0; logic [16:0] PFE_vpn;
  logic TLB_hit_req, TLB_hit_data, TLB_hit_ack = 0;

  tlb_ctrl_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- page tables ----------------
  int unsigned epoch [32];
  logic [4:0]  cur_asid;
  function automatic logic [16:0] walk(logic [4:0] asid, logic [16:0] vpn);
    logic [31:0] h;
    h = (32'(vpn) * 32'h9E3779B1) ^ (32'(asid) * 32'h85EBCA77) ^ (epoch[asid] * 32'hC2B2AE3D);
    return h[28:12];
  endfunction

  task automatic rdelay();
    repeat ($urandom_range(0, 2)) @(posedge clk);
  endtask

  // ---------------- PTE driver: demand and prefetch ----------------
  logic [16:0] pte_q [$];
  logic [16:0] cur_vpn;
  int n_pfe = 0, n_demand = 0;
  initial forever begin
    @(posedge clk);
    if (pte_q.size() > 0) begin
      logic [16:0] v;
      v = pte_q.pop_front();
      rdelay();
      PTE_data <= {walk(cur_asid, v), 15'h1234};
      PTE_req  <= 1;
      do @(posedge clk); while (!PTE_ack);
      PTE_req  <= 0;
      do @(posedge clk); while (PTE_ack);
    end
  end

  // PFE responder: acknowledge, then queue the wanted page for the walker
  initial forever begin
    @(posedge clk);
    if (rst_n && PFE_req) begin
      check(PFE_data == 1'b1, "PFE data is 1");
      pte_q.push_back(PFE_vpn);
      n_pfe++;
      rdelay();
      PFE_ack <= 1;
      do @(posedge clk); while (PFE_req);
      PFE_ack <= 0;
    end
  end

  // TLB_hit receiver: on a miss the walker is asked for the demand PTE
  logic last_hit; int n_hitmsg = 0;
  initial forever begin
    @(posedge clk);
    if (rst_n && TLB_hit_req) begin
      last_hit = TLB_hit_data;
      n_hitmsg++;
      if (!TLB_hit_data) begin
        pte_q.push_back(cur_vpn);
        n_demand++;
      end
      rdelay();
      TLB_hit_ack <= 1;
      do @(posedge clk); while (TLB_hit_req);
      TLB_hit_ack <= 0;
    end
  end

  // PA receiver
  logic [31:0] last_pa; int n_pamsg = 0;
  initial forever begin
    @(posedge clk);
    if (rst_n && PA_req) begin
      last_pa = PA_data;
      n_pamsg++;
      rdelay();
      PA_ack <= 1;
      do @(posedge clk); while (PA_req);
      PA_ack <= 0;
    end
  end

  // ASID sender: one ASID after reset and after each context switch
  logic asid_pending = 0;
  initial forever begin
    @(posedge clk);
    if (asid_pending) begin
      rdelay();
      ASID_data <= cur_asid;
      ASID_req  <= 1;
      do @(posedge clk); while (!ASID_ack);
      ASID_req  <= 0;
      asid_pending = 0;
      do @(posedge clk); while (ASID_ack);
    end
  end

  // ---------------- processor / OS operations ----------------
  task automatic translate(logic [31:0] va, output logic hit);
    int hm, pm;
    hm = n_hitmsg; pm = n_pamsg;
    cur_vpn = va[31:15];
    @(posedge clk);
    VA_data <= va;
    VA_req  <= 1;
    do @(posedge clk); while (!VA_ack);
    VA_req <= 0;
    do @(posedge clk); while (VA_ack);
    check(n_hitmsg == hm + 1, "one TLB_hit message per VA");
    check(n_pamsg == pm + 1, "one PA message per VA");
    check(last_pa == {walk(cur_asid, va[31:15]), va[14:0]},
          $sformatf("PA for asid %0d va %h: got %h", cur_asid, va, last_pa));
    hit = last_hit;
  endtask

  task automatic ctx_switch(logic [4:0] asid);
    @(posedge clk);
    CMW_data <= 1; CMW_req <= 1;
    do @(posedge clk); while (!CMW_ack);
    CMW_req <= 0;
    do @(posedge clk); while (CMW_ack);
    cur_asid = asid;
    asid_pending = 1;
  endtask

  task automatic clear_tlb(logic all);
    // the OS changes page tables, then tells the TLB
    if (all) foreach (epoch[i]) epoch[i]++;
    else epoch[cur_asid]++;
    @(posedge clk);
    clr_TLB_data <= all; clr_TLB_req <= 1;
    do @(posedge clk); while (!clr_TLB_ack);
    clr_TLB_req <= 0;
    do @(posedge clk); while (clr_TLB_ack);
  endtask

  // ---------------- mechanism counters (observed inside the design) --------
  logic [31:0] bank_all_lru;
  for (genvar b = 0; b < 32; b++) begin : g_obs
    assign bank_all_lru[b] = dut.u_mem.g_bank[b].u_bank.all_lru_set;
  end
  int c_bank_hit = 0, c_pb_hit = 0, c_miss = 0, c_found = 0, c_alloc = 0;
  int c_victim = 0, c_lru_repl = 0, c_pf = 0, c_ctx = 0, c_clr_all = 0, c_clr_cur = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.op_search && dut.u_cu.st == dut.u_cu.S_EVAL) c_bank_hit++;
    if (dut.pb_take) c_pb_hit++;
    if (dut.u_cu.st == dut.u_cu.S_FILL) c_miss++;
    if (dut.op_select && dut.asid_found) c_found++;
    if (dut.op_select && !dut.asid_found) begin
      c_alloc++;
      if (dut.u_mem.u_tags.tags[dut.u_mem.victim_idx].valid) c_victim++;
    end
    if (dut.op_fill && dut.u_mem.u_tags.cur_any && bank_all_lru[dut.u_mem.u_tags.cur_idx]) c_lru_repl++;
    if (dut.pb_wr) c_pf++;
    if (dut.op_ctx) c_ctx++;
    if (dut.op_flush_all) c_clr_all++;
    if (dut.op_flush_cur) c_clr_cur++;
  end

  // latency of a bank hit: clock edges from VA_req first seen high to
  // TLB_hit_req and PA_req first seen high
  int cyc = 0, t_va = -1, lat_min = 1000, lat_max = -1, n_lat = 0;
  logic va_q = 0, hr_q = 0, pf_seen = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && VA_req && !va_q) begin t_va = cyc; pf_seen = 0; end
    if (dut.pf_busy) pf_seen = 1;   // a prefetch fetch in progress delays the VA
    if (rst_n && TLB_hit_req && !hr_q && TLB_hit_data && dut.mem_hit && t_va >= 0 && !pf_seen) begin
      check(PA_req, "TLB_hit and PA requests rise together on a bank hit");
      if (cyc - t_va < lat_min) lat_min = cyc - t_va;
      if (cyc - t_va > lat_max) lat_max = cyc - t_va;
      n_lat++;
    end
    va_q = VA_req; hr_q = TLB_hit_req;
  end

  function automatic logic [31:0] mkva(logic [16:0] vpn);
    return {vpn, 15'($urandom)};
  endfunction

  localparam int NB = 32;   // banks of the default configuration
  localparam int NE = 32;   // entries per bank

  initial begin
    logic h;
    int   hits;
    foreach (epoch[i]) epoch[i] = 0;
    cur_asid = 5'd1;
    cur_vpn  = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    asid_pending = 1;        // the first VA after reset needs the ASID

    // 1. first access: no current bank -> miss, a new bank for ASID 1
    translate(mkva(17'h100), h);
    check(h == 0, "first VA after reset misses");
    // let the SP window fill, then walk through it: prefetch-buffer hits
    repeat (400) @(posedge clk);
    for (int k = 1; k <= 9; k++) begin
      translate(mkva(17'h100 + 17'(k)), h);
      check(h == 1, $sformatf("page +%0d served from the prefetch buffer", k));
    end
    for (int k = 1; k <= 8; k++) begin
      translate(mkva(17'h100 - 17'(k)), h);
      check(h == 1, $sformatf("page -%0d served from the prefetch buffer", k));
    end
    // the same pages again: now in the current bank
    translate(mkva(17'h100), h);
    check(h == 1, "demand-filled page hits in the bank");
    translate(mkva(17'h105), h);
    check(h == 1, "moved page hits in the bank");

    // 2. switch to ASID 2, touch other pages, then back to ASID 1
    ctx_switch(5'd2);
    translate(mkva(17'h4000), h);
    check(h == 0, "first VA after a context switch misses");
    translate(mkva(17'h100), h);    // same VPN, other address space
    check(h == 0, "ASID 2 does not see ASID 1's page");
    ctx_switch(5'd1);
    translate(mkva(17'h0FF), h);    // needs the ASID: reported as a miss
    check(h == 0, "first VA after switching back is a miss");
    hits = 0;
    for (int k = -8; k <= 9; k++) begin
      translate(mkva(17'h100 + 17'(k)), h);
      hits += int'(h);
    end
    check(hits == 18, $sformatf("ASID 1's pages kept across switches: %0d/18 hit", hits));

    // 3. more pages than a bank holds: entry LRU replacement
    for (int k = 0; k < NE + 8; k++) translate(mkva(17'h8000 + 17'(k * 64)), h);

    // 4. clear the current bank only, then everything
    clear_tlb(1'b0);
    translate(mkva(17'h100), h);
    check(h == 0, "page misses after clearing the current bank");
    ctx_switch(5'd2);
    translate(mkva(17'h4000), h);
    check(h == 0, "first VA after switch misses");
    translate(mkva(17'h4000), h);
    check(h == 1, "ASID 2 page hits");
    clear_tlb(1'b1);
    translate(mkva(17'h4000), h);
    check(h == 0, "page misses after clearing every bank");

    // 5. more address spaces than banks... with 32 banks and 5-bit ASIDs every
    // ASID keeps its own bank; run through all 32 tasks, then revisit
    for (int a = 0; a < 32; a++) begin
      ctx_switch(5'(a));
      translate(mkva(17'(a * 3 + 7)), h);
      translate(mkva(17'(a * 3 + 7)), h);
      check(h == 1, "page hits right after its fill");
    end
    for (int a = 0; a < 32; a++) begin
      ctx_switch(5'(a));
      translate(mkva(17'h1F000), h);
      translate(mkva(17'(a * 3 + 7)), h);
      check(h == 1, $sformatf("task %0d finds its bank again", a));
    end

    // 6. random mix
    for (int n = 0; n < 300; n++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 3)       ctx_switch(5'($urandom_range(0, 31)));
      else if (r < 4)  clear_tlb(1'($urandom_range(0, 1)));
      else             translate(mkva(17'h2000 + 17'($urandom_range(0, 60))), h);
    end
    repeat (50) @(posedge clk);

    check(c_bank_hit > 0, "bank hits happened");
    check(c_pb_hit > 0, "prefetch-buffer hits happened");
    check(c_miss > 0, "demand misses happened");
    check(c_found > 0, "bank found again by ASID");
    check(c_alloc > 0, "new bank given out");
    check(c_lru_repl > 0, "entry replacement with all LRU bits set");
    check(c_pf > 0, "prefetch fetches happened");
    check(c_ctx > 0, "context switches happened");
    check(c_clr_all > 0, "clear-all happened");
    check(c_clr_cur > 0, "clear-current happened");
    check(n_demand > 0 && n_pfe > 0, "walker served demand and prefetch PTEs");
    check(n_lat > 0 && lat_min == 2 && lat_max == 2, $sformatf("bank-hit latency %0d..%0d edges", lat_min, lat_max));
    $display("mechanisms: bank_hit=%0d pb_hit=%0d miss=%0d bank_found=%0d bank_new=%0d bank_victim_valid=%0d lru_clear_replace=%0d prefetch=%0d ctx=%0d clr_all=%0d clr_cur=%0d",
             c_bank_hit, c_pb_hit, c_miss, c_found, c_alloc, c_victim, c_lru_repl, c_pf, c_ctx, c_clr_all, c_clr_cur);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
