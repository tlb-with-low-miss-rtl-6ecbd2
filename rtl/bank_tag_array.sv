// bank_tag_array - the bank tags of the banked TLB, one register per bank.
//
// Each tag is {task_tag (ASID), current, valid, lru}. The current bit marks
// the bank that holds the running task's translations; at most one is set.
// Combinational outputs:
//   cur_any/cur_idx     - whether a bank is current, and which
//   asid_hit/asid_idx   - a valid tag whose task tag equals `asid`
//   victim_idx          - bank to reuse: first invalid tag, else first tag
//                         whose LRU bit is 0, else bank 0
// Single-cycle operations (at most one per cycle):
//   select   - make bank asid_idx current and mark it used (asid_hit must be 1)
//   alloc    - give bank victim_idx to `asid`: task tag written, current,
//              valid and LRU set; when every valid tag already has its LRU bit
//              set, the other LRU bits are cleared (1-bit LRU, as for entries)
//   clr_cur  - clear every current bit (context switch)
//   clr_all  - clear every valid and current bit
// Searching the tags associatively with the ASID, and the victim order, follow
// the original mechanism; the priority among candidates is this design's own.
module bank_tag_array
  import tlb_pkg::*;
#(
  parameter int unsigned NUM_BANKS = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  asid_t                        asid,
  input  logic                         select,
  input  logic                         alloc,
  input  logic                         clr_cur,
  input  logic                         clr_all,
  output logic                         cur_any,
  output logic [$clog2(NUM_BANKS)-1:0] cur_idx,
  output logic                         asid_hit,
  output logic [$clog2(NUM_BANKS)-1:0] asid_idx,
  output logic [$clog2(NUM_BANKS)-1:0] victim_idx,
  output logic [NUM_BANKS-1:0]         cur_vec
);

  localparam int unsigned IDX_W = $clog2(NUM_BANKS);

  bank_tag_t tags [NUM_BANKS];
  logic      all_lru_set;

  always_comb begin
    logic vfound;
    cur_any     = 1'b0;
    cur_idx     = '0;
    asid_hit    = 1'b0;
    asid_idx    = '0;
    vfound      = 1'b0;
    victim_idx  = '0;
    all_lru_set = 1'b1;
    for (int unsigned b = 0; b < NUM_BANKS; b++) begin
      cur_vec[b] = tags[b].current;
      if (!cur_any && tags[b].current) begin
        cur_any = 1'b1;
        cur_idx = IDX_W'(b);
      end
      if (!asid_hit && tags[b].valid && tags[b].task_tag == asid) begin
        asid_hit = 1'b1;
        asid_idx = IDX_W'(b);
      end
      if (!vfound && !tags[b].valid) begin
        vfound     = 1'b1;
        victim_idx = IDX_W'(b);
      end
      if (!tags[b].valid || !tags[b].lru) all_lru_set = 1'b0;
    end
    for (int unsigned b = 0; b < NUM_BANKS; b++) begin
      if (!vfound && !tags[b].lru) begin
        vfound     = 1'b1;
        victim_idx = IDX_W'(b);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned b = 0; b < NUM_BANKS; b++) tags[b] <= '0;
    end else if (clr_all) begin
      for (int unsigned b = 0; b < NUM_BANKS; b++) begin
        tags[b].valid   <= 1'b0;
        tags[b].current <= 1'b0;
      end
    end else if (clr_cur) begin
      for (int unsigned b = 0; b < NUM_BANKS; b++) tags[b].current <= 1'b0;
    end else if (select) begin
      tags[asid_idx].current <= 1'b1;
      tags[asid_idx].lru     <= 1'b1;
    end else if (alloc) begin
      if (all_lru_set) begin
        for (int unsigned b = 0; b < NUM_BANKS; b++) tags[b].lru <= 1'b0;
      end
      tags[victim_idx] <= '{task_tag: asid, current: 1'b1, valid: 1'b1, lru: 1'b1};
    end
  end

endmodule
