// tb_pa_gen - random test of the physical address generator: source
// priority (bank, then prefetch buffer, then walked PTE) and
// PA = {PPN, VA[14:0]}.
module tb_pa_gen;
  import tlb_pkg::*;

  logic [31:0] va, pa;
  logic        bank_hit, pb_hit, pte_valid, valid;
  ppn_t        bank_ppn, pb_ppn, walk_ppn;

  pa_gen dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [16:0] e;
      logic ev;
      va = $urandom; bank_ppn = ppn_t'($urandom); pb_ppn = ppn_t'($urandom); walk_ppn = ppn_t'($urandom);
      {bank_hit, pb_hit, pte_valid} = 3'($urandom);
      #1;
      ev = bank_hit | pb_hit | pte_valid;
      e  = bank_hit ? bank_ppn : pb_hit ? pb_ppn : walk_ppn;
      checks++;
      if (valid !== ev || (ev && pa !== {e, va[14:0]})) begin
        failures++;
        $display("FAIL va %h pa %h", va, pa);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
