// pa_gen - physical address generator.
//
// Picks the physical page number of the hit translation and joins it with
// the page offset of the virtual address: PA = {PPN, VA[OFFSET_W-1:0]}.
// Sources, highest priority first: the current TLB bank, the prefetch
// buffer, and a translation just read from the page table (`pte_valid`, used
// on a miss). `valid` says whether any source applies. Purely combinational.
// Choosing between bank and prefetch-buffer PPNs and concatenating the
// offset is the original generator's function; the third source and the
// priority order are this design's choice.
module pa_gen
  import tlb_pkg::*;
(
  input  logic [VA_W-1:0] va,
  input  logic            bank_hit,
  input  ppn_t            bank_ppn,
  input  logic            pb_hit,
  input  ppn_t            pb_ppn,
  input  logic            pte_valid,
  input  ppn_t            walk_ppn,
  output logic [VA_W-1:0] pa,
  output logic            valid
);

  ppn_t ppn;

  always_comb begin
    valid = 1'b1;
    if (bank_hit)       ppn = bank_ppn;
    else if (pb_hit)    ppn = pb_ppn;
    else if (pte_valid) ppn = walk_ppn;
    else begin
      ppn   = '0;
      valid = 1'b0;
    end
    pa = {ppn, va[OFFSET_W-1:0]};
  end

endmodule
