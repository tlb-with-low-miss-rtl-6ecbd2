// tb_control_unit - directed test of the control unit with the TLB memory,
// prefetch buffer and prefetch unit replaced by levels set by the test.
// For each case of the controller algorithm it checks the handshake messages
// (TLB_hit value, PA, whether ASID and PTE are taken) and the operations
// issued (select, search, fill and its data, take, flushes, prefetch start and
// stop), and that prefetching is only allowed while the unit is idle.
module tb_control_unit;
  import tlb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clr_req = 0, clr_data = 0, clr_ack;
  logic cmw_req = 0, cmw_data = 0, cmw_ack;
  logic va_req = 0, va_ack;
  logic asid_req = 0, asid_ack; asid_t asid_data = '0;
  logic pte_req = 0, pte_ack; logic [31:0] pte_data = '0;
  logic pa_req, pa_ack = 0; logic [31:0] pa_data;
  logic hit_req, hit_data, hit_ack = 0;
  logic mem_cur_any = 0, mem_hit = 0;
  asid_t mem_asid; ppn_t mem_fill_ppn;
  logic op_flush_all, op_flush_cur, op_ctx, op_select, op_search, op_fill;
  logic pb_hit = 0; ppn_t pb_ppn = '0;
  logic pb_flush, pb_take, pf_start, pf_stop, pf_allow, pf_busy = 0;
  logic [31:0] pa_in = '0; logic pa_valid = 1;
  logic dem_valid; ppn_t dem_ppn;

  control_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // operation counters
  int n_all, n_cur, n_ctx, n_sel, n_search, n_fill, n_take, n_pbf, n_start, n_stop;
  ppn_t last_fill;
  always @(posedge clk) if (rst_n) begin
    n_all += int'(op_flush_all); n_cur += int'(op_flush_cur); n_ctx += int'(op_ctx);
    n_sel += int'(op_select); n_search += int'(op_search); n_take += int'(pb_take);
    n_pbf += int'(pb_flush); n_start += int'(pf_start); n_stop += int'(pf_stop);
    if (op_fill) begin n_fill++; last_fill = mem_fill_ppn; end
  end
  task automatic zero();
    {n_all, n_cur, n_ctx, n_sel, n_search, n_fill, n_take, n_pbf, n_start, n_stop} = '0;
  endtask

  // environment receivers
  int n_hit = 0, n_pa = 0; logic last_hit; logic [31:0] last_pa;
  initial forever begin
    @(posedge clk);
    if (hit_req) begin
      last_hit = hit_data; n_hit++;
      hit_ack <= 1; do @(posedge clk); while (hit_req); hit_ack <= 0;
    end
  end
  initial forever begin
    @(posedge clk);
    if (pa_req) begin
      last_pa = pa_data; n_pa++;
      repeat (2) @(posedge clk);
      pa_ack <= 1; do @(posedge clk); while (pa_req); pa_ack <= 0;
    end
  end

  // offer a value on a pull channel of the unit; `taken` tells if it was used
  task automatic offer_asid(asid_t a);
    asid_data <= a; asid_req <= 1;
    do @(posedge clk); while (!asid_ack);
    asid_req <= 0; do @(posedge clk); while (asid_ack);
  endtask
  task automatic offer_pte(logic [31:0] p);
    pte_data <= p; pte_req <= 1;
    do @(posedge clk); while (!pte_ack);
    pte_req <= 0; do @(posedge clk); while (pte_ack);
  endtask

  task automatic send_va(logic need_asid, logic need_pte, logic [31:0] pte);
    @(posedge clk);
    va_req <= 1;
    fork
      if (need_asid) offer_asid(5'd21);
      if (need_pte) begin
        wait (n_hit > 0 && !last_hit);
        offer_pte(pte);
      end
    join
    do @(posedge clk); while (!va_ack);
    va_req <= 0; do @(posedge clk); while (va_ack);
  endtask

  task automatic send_clr(input logic d);
    @(posedge clk); clr_data <= d; clr_req <= 1;
    do @(posedge clk); while (!clr_ack);
    clr_req <= 0; do @(posedge clk); while (clr_ack);
    repeat (2) @(posedge clk);
  endtask
  task automatic send_cmw(input logic d);
    @(posedge clk); cmw_data <= d; cmw_req <= 1;
    do @(posedge clk); while (!cmw_ack);
    cmw_req <= 0; do @(posedge clk); while (cmw_ack);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    zero();
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    chk(pf_allow, "prefetch allowed while idle");

    // case 1: no current bank -> miss, ASID taken, select, PTE, fill, PA
    zero(); n_hit = 0; n_pa = 0; mem_cur_any = 0; mem_hit = 0; pa_in = 32'hA5A5_0001;
    send_va(1, 1, {17'h1ABCD, 15'h0});
    chk(n_hit == 1 && last_hit == 0, "no bank: TLB_hit 0");
    chk(mem_asid == 5'd21, "ASID taken");
    chk(n_sel == 1 && n_fill == 1 && last_fill == 17'h1ABCD, "select then fill with the PTE frame");
    chk(n_start == 1 && n_pbf == 1, "prefetch window started");
    chk(n_pa == 1 && last_pa == 32'hA5A5_0001, "PA sent");

    // case: bank hit -> TLB_hit 1 + PA, search, nothing else
    zero(); n_hit = 0; n_pa = 0; mem_cur_any = 1; mem_hit = 1; pa_in = 32'h1234_5678;
    send_va(0, 0, '0);
    chk(n_hit == 1 && last_hit == 1 && n_pa == 1 && last_pa == 32'h1234_5678, "hit: TLB_hit 1 and PA");
    chk(n_search == 1 && n_fill == 0 && n_start == 0 && n_sel == 0, "hit: only a search");

    // case: prefetch-buffer hit -> moved into bank
    zero(); n_hit = 0; n_pa = 0; mem_hit = 0; pb_hit = 1; pb_ppn = 17'h0F0F0; pa_in = 32'h0BAD_F00D;
    send_va(0, 0, '0);
    chk(n_hit == 1 && last_hit == 1 && n_pa == 1 && last_pa == 32'h0BAD_F00D, "pb hit: TLB_hit 1 and PA");
    chk(n_fill == 1 && last_fill == 17'h0F0F0 && n_take == 1 && n_start == 0, "pb hit: moved into the bank");

    // case: miss everywhere -> TLB_hit 0, PTE, fill, PA, new window
    zero(); n_hit = 0; n_pa = 0; pb_hit = 0; pa_in = 32'h7777_0000;
    send_va(0, 1, {17'h00042, 15'h1});
    chk(n_hit == 1 && last_hit == 0, "miss: TLB_hit 0");
    chk(n_fill == 1 && last_fill == 17'h00042 && n_start == 1 && n_sel == 0, "miss: fill and new window");
    chk(n_pa == 1 && last_pa == 32'h7777_0000, "miss: PA sent");

    // clear-TLB and context switch
    zero(); send_clr(1'b1);
    chk(n_all == 1 && n_cur == 0 && n_pbf == 1 && n_stop == 1, "clear all");
    zero(); send_clr(1'b0);
    chk(n_all == 0 && n_cur == 1 && n_pbf == 1 && n_stop == 1, "clear current");
    zero(); send_cmw(1'b1);
    chk(n_ctx == 1 && n_pbf == 1 && n_stop == 1, "context switch");
    zero(); send_cmw(1'b0);
    chk(n_ctx == 0 && n_pbf == 0, "CMW '0' does nothing");

    // a busy prefetch holds requests back; a pending request blocks prefetch
    pf_busy = 1; mem_hit = 1;
    @(posedge clk); va_req <= 1;
    repeat (2) @(posedge clk);
    chk(!pf_allow, "no prefetch while a VA waits");
    repeat (20) @(posedge clk);
    chk(!va_ack, "VA waits for the prefetch");
    pf_busy = 0;
    do @(posedge clk); while (!va_ack);
    va_req <= 0; do @(posedge clk); while (va_ack);
    repeat (2) @(posedge clk);
    chk(pf_allow, "prefetch allowed again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
