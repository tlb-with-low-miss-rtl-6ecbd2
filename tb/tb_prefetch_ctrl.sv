// tb_prefetch_ctrl - test of the sequential-prefetch control unit with a
// modelled 18-slot buffer and page-table walker. Checks the fetch order
// V+1..V+9, V-1..V-8, then V+10 for a freed slot; that each fetch is a PFE
// handshake with data '1' followed by a PTE handshake whose frame number is
// written to the buffer; that nothing is fetched while `allow` is low or the
// buffer is full; and that `stop` ends the window.
module tb_prefetch_ctrl;
  import tlb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, stop = 0, allow = 0, pb_has_empty;
  vpn_t base_vpn = '0;
  logic pfe_req, pfe_data, pfe_ack = 0;
  vpn_t pfe_vpn;
  logic pte_req = 0, pte_ack;
  logic [31:0] pte_data = '0;
  logic pb_wr, busy;
  vpn_t pb_wr_vpn;
  ppn_t pb_wr_ppn;

  prefetch_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  function automatic ppn_t f(vpn_t v); return ppn_t'(v ^ 17'h15A5A); endfunction

  int   used = 0;           // modelled buffer occupancy
  vpn_t got [$];
  assign pb_has_empty = (used < 18);

  // walker: answer PFE, then deliver the PTE
  initial forever begin
    @(posedge clk);
    if (pfe_req) begin
      vpn_t v;
      v = pfe_vpn;
      chk(pfe_data == 1'b1, "PFE data is 1");
      chk(allow, "fetch only while allowed");
      pfe_ack <= 1;
      do @(posedge clk); while (pfe_req);
      pfe_ack <= 0;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      pte_data <= {f(v), 15'h7FFF};
      pte_req  <= 1;
      do @(posedge clk); while (!pte_ack);
      pte_req <= 0;
      do @(posedge clk); while (pte_ack);
    end
  end
  always @(posedge clk) if (rst_n && pb_wr) begin
    chk(pb_wr_ppn == f(pb_wr_vpn), "buffer gets the PTE's frame number");
    got.push_back(pb_wr_vpn);
    used++;
  end

  initial begin
    vpn_t V;
    V = 17'h1FFFC;   // near the top: the window wraps around
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    chk(got.size() == 0, "idle without a window");
    @(negedge clk); base_vpn = V; start = 1; @(negedge clk); start = 0;
    repeat (30) @(posedge clk);
    chk(got.size() == 0, "nothing fetched while not allowed");
    allow = 1;
    wait (got.size() == 17);
    repeat (200) @(posedge clk);
    chk(got.size() == 18 && !pb_has_empty, "stops when the buffer is full");
    for (int k = 1; k <= 9; k++) chk(got[k-1] == V + vpn_t'(k), $sformatf("fetch %0d is V+%0d", k, k));
    for (int k = 1; k <= 8; k++) chk(got[8+k] == V - vpn_t'(k), $sformatf("fetch %0d is V-%0d", 9+k, k));
    chk(got[17] == V + vpn_t'(10), "18th slot gets V+10");
    // a slot is freed: next sequential page
    @(negedge clk); used--;
    wait (got.size() == 19);
    chk(got[18] == V + vpn_t'(11), "freed slot gets V+11");
    // stop: freed slots stay empty
    wait (!busy);
    @(negedge clk); stop = 1; @(negedge clk); stop = 0; used = 0;
    repeat (100) @(posedge clk);
    chk(got.size() == 19, "no fetch after stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
