// tlb_pkg - shared sizes and record types of the banked TLB controller.
//
// The TLB keeps one bank of translations per address space instead of an
// address-space tag in every entry. The record layouts follow the entry,
// bank-tag, TLB-command and hit-channel formats of the original controller:
//   TLB entry  : valid[35] lru[34] tag[33:17] ppa[16:0]   (17-bit VPN/PPN)
//   bank tag   : asid[7:3] current[2] valid[1] lru[0]
//   TLB command: clr_valid[3] clr_lru_bit[2] search_va[1] lru_replace[0]
// The 17-bit page numbers and the 15-bit offset give a 32-KB page on a
// 32-bit address. The 32 x 32 organisation, the 5-bit ASID and the
// sequential-prefetch window (-8 .. +9 pages, 18-entry buffer) are the
// original sizes. The handshake channel widths follow the 8-channel interface
// of the controller.
package tlb_pkg;

  localparam int unsigned VA_W       = 32;   // virtual / physical address
  localparam int unsigned VPN_W      = 17;   // virtual page number  VA[31:15]
  localparam int unsigned PPN_W      = 17;   // physical page number PA[31:15]
  localparam int unsigned OFFSET_W   = VA_W - VPN_W;  // 15 -> 32-KB pages
  localparam int unsigned ASID_W     = 5;
  localparam int unsigned PTE_W      = 32;

  typedef logic [VPN_W-1:0]  vpn_t;
  typedef logic [PPN_W-1:0]  ppn_t;
  typedef logic [ASID_W-1:0] asid_t;

  // One TLB entry (36 bits, field order as packed: valid is bit 35).
  typedef struct packed {
    logic valid;
    logic lru;
    vpn_t tag;
    ppn_t ppa;
  } tlb_entry_t;

  // One bank tag (8 bits: asid[7:3] current[2] valid[1] lru[0]).
  typedef struct packed {
    asid_t task_tag;
    logic  current;
    logic  valid;
    logic  lru;
  } bank_tag_t;

  // 4-bit command from the control unit to a TLB bank.
  typedef struct packed {
    logic clr_valid;    // clear all valid bits of the bank
    logic clr_lru_bit;  // clear all LRU bits of the bank
    logic search_va;    // look the VPN up (sets the LRU bit of the hit entry)
    logic lru_replace;  // write a translation into the LRU victim entry
  } tlb_cmd_t;

  localparam tlb_cmd_t CMD_NONE = '0;

  // PTE layout used on the PTE channel: the page frame number sits where
  // it sits in the physical address; the low bits are flags the TLB ignores.
  function automatic ppn_t pte_ppn(logic [PTE_W-1:0] pte);
    return pte[PTE_W-1 -: PPN_W];
  endfunction

endpackage
