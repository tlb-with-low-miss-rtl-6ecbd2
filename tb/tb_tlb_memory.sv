// tb_tlb_memory - directed test of the banked TLB store at its default size
// (32 banks x 32 entries): a bank per ASID, translations kept across context
// switches, one address space not seeing another's pages, clearing the
// current bank or every bank, bank reuse by ASID search, and all 1024
// translations (32 ASIDs x 32 pages) held at once.
module tb_tlb_memory;
  import tlb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  vpn_t  vpn = '0;
  asid_t asid = '0;
  ppn_t  fill_ppn = '0;
  logic  op_flush_all = 0, op_flush_cur = 0, op_ctx = 0, op_select = 0, op_search = 0, op_fill = 0;
  logic  cur_any, asid_found, hit;
  ppn_t  hit_ppn;

  tlb_memory dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic ppn_t f(asid_t a, vpn_t v);
    return ppn_t'((32'(v) * 32'd2654435761) ^ (32'(a) << 11));
  endfunction

  task automatic pulse(ref logic op);
    @(negedge clk); op = 1; @(negedge clk); op = 0;
  endtask

  task automatic enter(asid_t a, output bit found);
    @(negedge clk);
    asid = a; #1; found = asid_found;
    pulse(op_ctx);
    @(negedge clk); op_select = 1; @(negedge clk); op_select = 0;
  endtask

  task automatic fill(vpn_t v);
    @(negedge clk);
    vpn = v; fill_ppn = f(asid, v); op_fill = 1;
    @(negedge clk); op_fill = 0;
  endtask

  task automatic look(vpn_t v, bit exp_hit, string s);
    @(negedge clk);
    vpn = v; #1;
    chk(hit == exp_hit && (!exp_hit || hit_ppn == f(asid, v)),
        $sformatf("%s: vpn %h hit=%b ppn=%h", s, v, hit, hit_ppn));
  endtask

  initial begin
    bit fnd;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!cur_any, "no current bank after reset");
    // ASID 3 gets a bank and 32 pages
    enter(5'd3, fnd);
    chk(!fnd && cur_any, "ASID 3 is new and now current");
    for (int k = 0; k < 32; k++) fill(vpn_t'(k * 5));
    for (int k = 0; k < 32; k++) look(vpn_t'(k * 5), 1, "ASID 3 page");
    look(vpn_t'(1), 0, "absent page");
    // ASID 9: same VPNs must miss, then fill some
    enter(5'd9, fnd);
    chk(!fnd, "ASID 9 is new");
    look(vpn_t'(0), 0, "ASID 9 does not see ASID 3");
    for (int k = 0; k < 4; k++) fill(vpn_t'(k * 5));
    for (int k = 0; k < 4; k++) look(vpn_t'(k * 5), 1, "ASID 9 page");
    // back to ASID 3: bank found again, all pages still there
    enter(5'd3, fnd);
    chk(fnd, "ASID 3 bank found by ASID");
    for (int k = 0; k < 32; k++) look(vpn_t'(k * 5), 1, "ASID 3 page after switch");
    // a 33rd page replaces one (all LRU bits set -> cleared, entry 0 reused)
    fill(vpn_t'(999));
    look(vpn_t'(999), 1, "new page after replacement");
    look(vpn_t'(0), 0, "entry 0 was the victim");
    // clear current bank (ASID 3) only
    pulse(op_flush_cur);
    look(vpn_t'(5), 0, "ASID 3 cleared");
    enter(5'd9, fnd);
    look(vpn_t'(5), 1, "ASID 9 untouched by clearing ASID 3");
    // clear every bank
    pulse(op_flush_all);
    look(vpn_t'(5), 0, "ASID 9 cleared by clear-all");
    chk(cur_any, "clearing keeps the current bank");
    // full capacity: 32 address spaces x 32 pages = 1024 translations
    for (int a = 0; a < 32; a++) begin
      enter(asid_t'(a), fnd);
      for (int k = 0; k < 32; k++) fill(vpn_t'(a * 64 + k));
    end
    for (int a = 31; a >= 0; a--) begin
      enter(asid_t'(a), fnd);
      chk(fnd, $sformatf("ASID %0d has a bank", a));
      for (int k = 0; k < 32; k++) look(vpn_t'(a * 64 + k), 1, "all 1024 translations held");
      look(vpn_t'(((a + 1) % 32) * 64), 0, "other ASID's page not visible");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
