// tlb_memory - the TLB store: NUM_BANKS banks of BANK_ENTRIES translations
// plus one bank tag per bank.
//
// The VPN goes to every bank at once. Each bank reports its own hit; the
// translation used is the one whose bank has both its current bit and its hit
// set (select = current AND hit), so translations of other address spaces
// stay in their banks untouched across context switches.
// Operations (single-cycle pulses from the control unit, at most one a cycle):
//   op_flush_all - clear the valid bits of every bank (clear-TLB, data '1')
//   op_flush_cur - clear the valid bits of the current bank (data '0')
//   op_ctx       - clear all current bits (context switch)
//   op_select    - after a context switch: if `asid` is in a valid bank tag,
//                  make that bank current; else take the victim bank, clear
//                  its entries and LRU bits and give it to `asid`
//   op_search    - a lookup the controller uses: LRU bit of the hit entry set
//   op_fill      - write {vpn, fill_ppn} into the current bank (1-bit LRU)
// Lookup outputs (cur_any, hit, hit_ppn, asid_found) are combinational.
// The bank/tag organisation and sizes follow the original design; building
// the bank memories from flip-flops instead of CAM macros is this design's
// choice.
module tlb_memory
  import tlb_pkg::*;
#(
  parameter int unsigned NUM_BANKS    = 32,
  parameter int unsigned BANK_ENTRIES = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  vpn_t  vpn,
  input  asid_t asid,
  input  ppn_t  fill_ppn,
  input  logic  op_flush_all,
  input  logic  op_flush_cur,
  input  logic  op_ctx,
  input  logic  op_select,
  input  logic  op_search,
  input  logic  op_fill,
  output logic  cur_any,
  output logic  asid_found,
  output logic  hit,
  output ppn_t  hit_ppn
);

  localparam int unsigned IDX_W = $clog2(NUM_BANKS);

  logic [IDX_W-1:0]     cur_idx, asid_idx, victim_idx;
  logic [NUM_BANKS-1:0] cur_vec;
  logic [NUM_BANKS-1:0] bank_hit;
  ppn_t                 bank_ppn [NUM_BANKS];
  tlb_cmd_t             bank_cmd [NUM_BANKS];

  bank_tag_array #(.NUM_BANKS(NUM_BANKS)) u_tags (
    .clk, .rst_n, .asid,
    .select (op_select &&  asid_found),
    .alloc  (op_select && !asid_found),
    .clr_cur(op_ctx),
    .clr_all(1'b0),
    .cur_any, .cur_idx,
    .asid_hit(asid_found), .asid_idx,
    .victim_idx, .cur_vec
  );

  // Command routing: bank-wide commands go to the current bank (or to the
  // victim bank when a new address space is given a bank).
  always_comb begin
    for (int unsigned b = 0; b < NUM_BANKS; b++) begin
      bank_cmd[b] = CMD_NONE;
      if (op_flush_all) bank_cmd[b].clr_valid = 1'b1;
      if (cur_vec[b]) begin
        bank_cmd[b].clr_valid   = bank_cmd[b].clr_valid | op_flush_cur;
        bank_cmd[b].search_va   = op_search;
        bank_cmd[b].lru_replace = op_fill;
      end
      if (op_select && !asid_found && victim_idx == IDX_W'(b)) begin
        bank_cmd[b].clr_valid   = 1'b1;
        bank_cmd[b].clr_lru_bit = 1'b1;
      end
    end
  end

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    tlb_bank #(.ENTRIES(BANK_ENTRIES)) u_bank (
      .clk, .rst_n,
      .cmd    (bank_cmd[b]),
      .vpn,
      .wr_ppn (fill_ppn),
      .hit    (bank_hit[b]),
      .hit_ppn(bank_ppn[b])
    );
  end

  // select signal = current bit AND bank hit
  always_comb begin
    hit     = 1'b0;
    hit_ppn = '0;
    for (int unsigned b = 0; b < NUM_BANKS; b++) begin
      if (cur_vec[b] && bank_hit[b]) begin
        hit     = 1'b1;
        hit_ppn = bank_ppn[b];
      end
    end
  end

endmodule
