// tb_prefetch_buffer - test of the 18-entry prefetch buffer: fill to full,
// lookups, writes ignored when full, take (move-out) frees a slot that the
// next write reuses, flush empties it.
module tb_prefetch_buffer;
  import tlb_pkg::*;

  localparam int N = 18;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  vpn_t vpn = '0, wr_vpn = '0;
  ppn_t wr_ppn = '0, hit_ppn;
  logic hit, flush = 0, take = 0, wr = 0, has_empty;

  prefetch_buffer #(.ENTRIES(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  function automatic ppn_t f(vpn_t v); return ppn_t'(v * 7 + 3); endfunction

  task automatic write(vpn_t v);
    @(negedge clk); wr = 1; wr_vpn = v; wr_ppn = f(v);
    @(negedge clk); wr = 0;
  endtask
  task automatic look(vpn_t v, bit e, string s);
    @(negedge clk); vpn = v; #1;
    chk(hit == e && (!e || hit_ppn == f(v)), $sformatf("%s vpn %h", s, v));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(has_empty, "empty after reset");
    for (int k = 0; k < N; k++) write(vpn_t'(100 + k));
    @(negedge clk);
    chk(!has_empty, "full after 18 writes");
    for (int k = 0; k < N; k++) look(vpn_t'(100 + k), 1, "stored");
    write(vpn_t'(500));
    look(vpn_t'(500), 0, "write ignored when full");
    // take entry 105
    @(negedge clk); vpn = vpn_t'(105); take = 1; @(negedge clk); take = 0;
    look(vpn_t'(105), 0, "taken entry gone");
    chk(has_empty, "slot free after take");
    write(vpn_t'(600));
    look(vpn_t'(600), 1, "free slot reused");
    chk(!has_empty, "full again");
    look(vpn_t'(104), 1, "others kept");
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    for (int k = 0; k < N; k++) look(vpn_t'(100 + k), 0, "flushed");
    chk(has_empty, "empty after flush");
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
