// tlb_env - behavioural model of the TLB controller's environment, shared by
// the multi-task testbenches: processor (VA, context switch), OS (ASID,
// clear-TLB) and page-table walker (answers demand misses after TLB_hit '0'
// and PFE prefetch requests, both on the PTE channel). Page tables are a hash
// of (ASID, VPN, epoch); clear_tlb bumps the epoch as the OS would after
// changing mappings. translate() checks every PA against the page table and
// returns the TLB_hit value. Receivers acknowledge after 0..2 cycles and
// ignore the design's outputs while rst_n is low.
module tlb_env (
  input  logic        clk,
  input  logic        rst_n,
  output logic        VA_req,
  output logic [31:0] VA_data,
  input  logic        VA_ack,
  output logic        PTE_req,
  output logic [31:0] PTE_data,
  input  logic        PTE_ack,
  output logic        clr_TLB_req,
  output logic        clr_TLB_data,
  input  logic        clr_TLB_ack,
  output logic        ASID_req,
  output logic [4:0]  ASID_data,
  input  logic        ASID_ack,
  output logic        CMW_req,
  output logic        CMW_data,
  input  logic        CMW_ack,
  input  logic        PA_req,
  input  logic [31:0] PA_data,
  output logic        PA_ack,
  input  logic        PFE_req,
  input  logic        PFE_data,
  input  logic [16:0] PFE_vpn,
  output logic        PFE_ack,
  input  logic        TLB_hit_req,
  input  logic        TLB_hit_data,
  output logic        TLB_hit_ack
);

  int checks = 0, failures = 0;
  int n_pfe = 0, n_demand = 0, n_va = 0, n_miss = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int unsigned epoch [32];
  logic [4:0]  cur_asid = '0;
  logic [16:0] cur_vpn = '0;
  logic        asid_pending = 0;
  logic [16:0] pte_q [$];

  initial begin
    foreach (epoch[i]) epoch[i] = 0;
    {VA_req, PTE_req, clr_TLB_req, ASID_req, CMW_req, PA_ack, PFE_ack, TLB_hit_ack} = '0;
    {VA_data, PTE_data, ASID_data, clr_TLB_data, CMW_data} = '0;
  end

  function automatic logic [16:0] walk(logic [4:0] asid, logic [16:0] vpn);
    logic [31:0] h;
    h = (32'(vpn) * 32'h9E3779B1) ^ (32'(asid) * 32'h85EBCA77) ^ (epoch[asid] * 32'hC2B2AE3D);
    return h[28:12];
  endfunction

  task automatic rdelay();
    repeat ($urandom_range(0, 2)) @(posedge clk);
  endtask

  // PTE driver
  initial forever begin
    @(posedge clk);
    if (pte_q.size() > 0) begin
      logic [16:0] v;
      v = pte_q.pop_front();
      rdelay();
      PTE_data <= {walk(cur_asid, v), 15'h0};
      PTE_req  <= 1;
      do @(posedge clk); while (!PTE_ack);
      PTE_req  <= 0;
      do @(posedge clk); while (PTE_ack);
    end
  end

  // PFE receiver
  initial forever begin
    @(posedge clk);
    if (rst_n && PFE_req) begin
      pte_q.push_back(PFE_vpn);
      n_pfe++;
      rdelay();
      PFE_ack <= 1;
      do @(posedge clk); while (PFE_req);
      PFE_ack <= 0;
    end
  end

  // TLB_hit receiver
  logic last_hit = 0;
  int   n_hitmsg = 0;
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
  logic [31:0] last_pa = '0;
  int          n_pamsg = 0;
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

  // ASID sender
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

  // first ASID after reset
  task automatic start(logic [4:0] asid);
    cur_asid = asid;
    asid_pending = 1;
  endtask

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
    check(n_hitmsg == hm + 1 && n_pamsg == pm + 1, "one TLB_hit and one PA per VA");
    check(last_pa == {walk(cur_asid, va[31:15]), va[14:0]},
          $sformatf("PA for asid %0d va %h: got %h exp %h epoch %0d", cur_asid, va, last_pa, walk(cur_asid, va[31:15]), epoch[cur_asid]));
    hit = last_hit;
    n_va++;
    if (!hit) n_miss++;
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
    if (all) foreach (epoch[i]) epoch[i]++;
    else epoch[cur_asid]++;
    @(posedge clk);
    clr_TLB_data <= all; clr_TLB_req <= 1;
    do @(posedge clk); while (!clr_TLB_ack);
    clr_TLB_req <= 0;
    do @(posedge clk); while (clr_TLB_ack);
  endtask

endmodule
