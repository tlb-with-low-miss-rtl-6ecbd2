// tb_tlb_bank_reuse - bank replacement when there are more address spaces
// than banks. With the default 32 banks and 5-bit ASIDs every ASID can keep
// a bank, so this test builds the controller with 4 banks. Tasks 0..3 fill
// the four banks; task 4 then needs a bank: all bank LRU bits are set, so
// they are cleared and bank 0 (task 0) is reused. Task 1 still finds its
// pages; task 0 has lost them and gets the next bank whose LRU bit is 0
// (bank 2, task 2); task 3 keeps its pages, task 2 has lost its own.
module tb_tlb_bank_reuse;
  import tlb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic VA_req, VA_ack, PTE_req, PTE_ack, clr_TLB_req, clr_TLB_data, clr_TLB_ack;
  logic ASID_req, ASID_ack, CMW_req, CMW_data, CMW_ack, PA_req, PA_ack;
  logic PFE_req, PFE_data, PFE_ack, TLB_hit_req, TLB_hit_data, TLB_hit_ack;
  logic [31:0] VA_data, PTE_data, PA_data;
  logic [4:0]  ASID_data;
  logic [16:0] PFE_vpn;

  tlb_ctrl_top #(.NUM_BANKS(4)) dut (.*);
  tlb_env env (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  int c_victim = 0;
  always @(posedge clk) if (rst_n && dut.op_select && !dut.asid_found &&
                            dut.u_mem.u_tags.tags[dut.u_mem.victim_idx].valid) c_victim++;

  // visit task t: the first VA (ASID fetch) always misses; then probe its
  // page 5 and report whether it was still held
  task automatic visit(int t, bit first, output bit kept);
    logic h;
    if (first) env.start(5'(t)); else env.ctx_switch(5'(t));
    env.translate({17'(t * 100 + 50), 15'h0}, h);
    chk(h == 0, $sformatf("task %0d: first VA after the switch misses", t));
    env.translate({17'(t * 100 + 5), 15'h10}, h);
    kept = h;
    for (int p = 0; p < 8; p++) env.translate({17'(t * 100 + p), 15'($urandom)}, h);
  endtask

  initial begin
    bit k;
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) visit(t, t == 0, k);
    chk(c_victim == 0, "four tasks fit in four banks");
    visit(4, 0, k);
    chk(c_victim == 1, "fifth task reuses a valid bank");
    visit(1, 0, k); chk(k,  "task 1 kept its bank");
    visit(0, 0, k); chk(!k, "task 0 lost its bank to task 4");
    chk(c_victim == 2, "task 0 reuses another bank");
    visit(3, 0, k); chk(k,  "task 3 kept its bank");
    visit(2, 0, k); chk(!k, "task 2 lost its bank to task 0");
    repeat (20) @(posedge clk);
    checks += env.checks; failures += env.failures;
    $display("bank reuses: %0d", c_victim);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
