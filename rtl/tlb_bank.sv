// tlb_bank - one fully associative TLB bank (a CAM of ENTRIES translations).
//
// Every entry holds {valid, lru, tag(VPN), ppa(PPN)}. The VPN on `vpn` is
// compared with all valid tags at once; `hit`/`hit_ppn` are combinational.
// The bank obeys a 4-bit command (one clock cycle per command):
//   clr_valid   - clear the valid bit of every entry (bank flush)
//   clr_lru_bit - clear the LRU bit of every entry
//   search_va   - a lookup the controller acts on: the hit entry's LRU bit is set
//   lru_replace - write {vpn, wr_ppn} into the victim entry and set its LRU bit
// Replacement is the 1-bit LRU scheme of the original controller: all LRU
// bits start cleared, a hit or a fill sets the entry's bit, an entry whose
// bit is 0 is replaced first, and when every bit is set and a replacement is
// needed all bits are cleared. Choosing an invalid entry before any valid one,
// and taking the lowest-numbered candidate, is this design's own choice.
// Synchronous, active-low reset clears all valid and LRU bits.
module tlb_bank
  import tlb_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic     clk,
  input  logic     rst_n,
  input  tlb_cmd_t cmd,
  input  vpn_t     vpn,      // lookup / fill tag
  input  ppn_t     wr_ppn,   // fill data for lru_replace
  output logic     hit,
  output ppn_t     hit_ppn
);

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  tlb_entry_t entry [ENTRIES];

  logic [IDX_W-1:0] hit_idx;
  logic [IDX_W-1:0] victim_idx;
  logic             all_lru_set;

  // Parallel tag match (the CAM search).
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    hit_ppn = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (!hit && entry[i].valid && entry[i].tag == vpn) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(i);
        hit_ppn = entry[i].ppa;
      end
    end
  end

  // Victim: first invalid entry, else first entry whose LRU bit is 0.
  always_comb begin
    logic found;
    found       = 1'b0;
    victim_idx  = '0;
    all_lru_set = 1'b1;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (!found && !entry[i].valid) begin
        found      = 1'b1;
        victim_idx = IDX_W'(i);
      end
      if (entry[i].valid && !entry[i].lru) all_lru_set = 1'b0;
      if (!entry[i].valid) all_lru_set = 1'b0;
    end
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (!found && !entry[i].lru) begin
        found      = 1'b1;
        victim_idx = IDX_W'(i);
      end
    end
    // every LRU bit set: they are all cleared and entry 0 becomes the victim
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        entry[i] <= '0;
      end
    end else begin
      if (cmd.clr_valid) begin
        for (int unsigned i = 0; i < ENTRIES; i++) entry[i].valid <= 1'b0;
      end
      if (cmd.clr_lru_bit) begin
        for (int unsigned i = 0; i < ENTRIES; i++) entry[i].lru <= 1'b0;
      end
      if (cmd.search_va && hit) begin
        entry[hit_idx].lru <= 1'b1;
      end
      if (cmd.lru_replace) begin
        if (all_lru_set) begin
          for (int unsigned i = 0; i < ENTRIES; i++) entry[i].lru <= 1'b0;
        end
        entry[victim_idx] <= '{valid: 1'b1, lru: 1'b1, tag: vpn, ppa: wr_ppn};
      end
    end
  end

endmodule
