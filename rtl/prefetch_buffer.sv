// prefetch_buffer - small fully associative store of prefetched translations.
//
// It is looked up with the same VPN as the TLB banks, in parallel with them
// (`hit`, `hit_ppn` combinational). Operations, one clock each:
//   flush - invalidate every slot (context switch, clear-TLB, new SP window)
//   take  - invalidate the slot that hits; the translation moves into the
//           current TLB bank, which leaves an empty slot for the prefetcher
//   wr    - store {wr_vpn, wr_ppn} in the lowest empty slot (ignored if full)
// `has_empty` tells the prefetch control unit that a slot is free. The
// 18 entries match the 18-page sequential-prefetch window; the slot order
// is this design's choice.
module prefetch_buffer
  import tlb_pkg::*;
#(
  parameter int unsigned ENTRIES = 18
) (
  input  logic clk,
  input  logic rst_n,
  input  vpn_t vpn,
  output logic hit,
  output ppn_t hit_ppn,
  input  logic flush,
  input  logic take,
  input  logic wr,
  input  vpn_t wr_vpn,
  input  ppn_t wr_ppn,
  output logic has_empty
);

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  typedef struct packed {
    logic valid;
    vpn_t vpn;
    ppn_t ppn;
  } pb_entry_t;

  pb_entry_t        slot [ENTRIES];
  logic [IDX_W-1:0] hit_idx, free_idx;

  always_comb begin
    hit       = 1'b0;
    hit_idx   = '0;
    hit_ppn   = '0;
    has_empty = 1'b0;
    free_idx  = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (!hit && slot[i].valid && slot[i].vpn == vpn) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(i);
        hit_ppn = slot[i].ppn;
      end
      if (!has_empty && !slot[i].valid) begin
        has_empty = 1'b1;
        free_idx  = IDX_W'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < ENTRIES; i++) slot[i] <= '0;
    end else if (flush) begin
      for (int unsigned i = 0; i < ENTRIES; i++) slot[i].valid <= 1'b0;
    end else begin
      if (take && hit) slot[hit_idx].valid <= 1'b0;
      if (wr && has_empty) slot[free_idx] <= '{valid: 1'b1, vpn: wr_vpn, ppn: wr_ppn};
    end
  end

endmodule
