// tlb_ctrl_top - banked TLB controller with low context-switch miss rate.
//
// Instead of an ASID tag in every entry, translations of each address space
// live in their own bank: NUM_BANKS banks of BANK_ENTRIES entries, each bank
// with a tag {ASID, current, valid, lru}. A context switch only clears the
// current bits, so returning tasks find their bank intact. A small
// sequential-prefetch (SP) buffer, searched in parallel with the banks,
// removes compulsory misses around a missed page.
// Parts: tlb_memory (banks + bank tags), prefetch_buffer, prefetch_ctrl,
// control_unit, pa_gen.
// Interface: eight 4-phase bundled-data channels (req/data/ack):
//   in : VA (32), PTE (32), clr_TLB (1), ASID (5), CMW (1)
//   out: PA (32), PFE (1, plus the wanted VPN on PFE_vpn), TLB_hit (1)
// PA = {PPN(17), VA[14:0]} (32-KB pages). A PTE carries the frame number in
// bits [31:15]; bits [14:0] are not interpreted.
// Timing: all channels are sampled on clk; a bank hit returns TLB_hit and PA
// a few cycles after VA_req plus the environment's ack delays (see README).
// The organisation, sizes, channels and algorithm follow the original
// asynchronous design; the clocked realisation, the PFE_vpn port, the PTE
// layout and the reset are this design's own.
module tlb_ctrl_top
  import tlb_pkg::*;
#(
  parameter int unsigned NUM_BANKS    = 32,
  parameter int unsigned BANK_ENTRIES = 32,
  parameter int unsigned PB_ENTRIES   = 18,
  parameter int unsigned SP_AHEAD     = 9,
  parameter int unsigned SP_BEHIND    = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // VA channel
  input  logic             VA_req,
  input  logic [VA_W-1:0]  VA_data,
  output logic             VA_ack,
  // PTE channel
  input  logic             PTE_req,
  input  logic [PTE_W-1:0] PTE_data,
  output logic             PTE_ack,
  // clr_TLB channel
  input  logic             clr_TLB_req,
  input  logic             clr_TLB_data,
  output logic             clr_TLB_ack,
  // ASID channel
  input  logic             ASID_req,
  input  logic [ASID_W-1:0] ASID_data,
  output logic             ASID_ack,
  // CMW (context switch) channel
  input  logic             CMW_req,
  input  logic             CMW_data,
  output logic             CMW_ack,
  // PA channel
  output logic             PA_req,
  output logic [VA_W-1:0]  PA_data,
  input  logic             PA_ack,
  // PFE (prefetch entry) channel
  output logic             PFE_req,
  output logic             PFE_data,
  output logic [VPN_W-1:0] PFE_vpn,
  input  logic             PFE_ack,
  // TLB_hit channel
  output logic             TLB_hit_req,
  output logic             TLB_hit_data,
  input  logic             TLB_hit_ack
);

  vpn_t  vpn;
  asid_t mem_asid;
  ppn_t  mem_fill_ppn, mem_ppn, pb_ppn, dem_ppn, pb_wr_ppn;
  vpn_t  pb_wr_vpn;
  logic  mem_cur_any, mem_hit, asid_found;
  logic  op_flush_all, op_flush_cur, op_ctx, op_select, op_search, op_fill;
  logic  pb_hit, pb_flush, pb_take, pb_wr, pb_has_empty;
  logic  pf_start, pf_stop, pf_allow, pf_busy;
  logic  cu_pte_ack, pf_pte_ack;
  logic  dem_valid, pa_valid;
  logic [VA_W-1:0] pa_w;

  assign vpn = VA_data[VA_W-1 -: VPN_W];

  tlb_memory #(.NUM_BANKS(NUM_BANKS), .BANK_ENTRIES(BANK_ENTRIES)) u_mem (
    .clk, .rst_n, .vpn, .asid(mem_asid), .fill_ppn(mem_fill_ppn),
    .op_flush_all, .op_flush_cur, .op_ctx, .op_select, .op_search, .op_fill,
    .cur_any(mem_cur_any), .asid_found, .hit(mem_hit), .hit_ppn(mem_ppn)
  );

  prefetch_buffer #(.ENTRIES(PB_ENTRIES)) u_pb (
    .clk, .rst_n, .vpn, .hit(pb_hit), .hit_ppn(pb_ppn),
    .flush(pb_flush), .take(pb_take),
    .wr(pb_wr), .wr_vpn(pb_wr_vpn), .wr_ppn(pb_wr_ppn), .has_empty(pb_has_empty)
  );

  prefetch_ctrl #(.AHEAD(SP_AHEAD), .BEHIND(SP_BEHIND)) u_pf (
    .clk, .rst_n, .start(pf_start), .base_vpn(vpn), .stop(pf_stop),
    .allow(pf_allow), .pb_has_empty,
    .pfe_req(PFE_req), .pfe_data(PFE_data), .pfe_vpn(PFE_vpn), .pfe_ack(PFE_ack),
    .pte_req(PTE_req), .pte_data(PTE_data), .pte_ack(pf_pte_ack),
    .pb_wr, .pb_wr_vpn, .pb_wr_ppn, .busy(pf_busy)
  );

  pa_gen u_pagen (
    .va(VA_data), .bank_hit(mem_hit), .bank_ppn(mem_ppn),
    .pb_hit, .pb_ppn, .pte_valid(dem_valid), .walk_ppn(dem_ppn),
    .pa(pa_w), .valid(pa_valid)
  );

  control_unit u_cu (
    .clk, .rst_n,
    .clr_req(clr_TLB_req), .clr_data(clr_TLB_data), .clr_ack(clr_TLB_ack),
    .cmw_req(CMW_req), .cmw_data(CMW_data), .cmw_ack(CMW_ack),
    .va_req(VA_req), .va_ack(VA_ack),
    .asid_req(ASID_req), .asid_data(ASID_data), .asid_ack(ASID_ack),
    .pte_req(PTE_req), .pte_data(PTE_data), .pte_ack(cu_pte_ack),
    .pa_req(PA_req), .pa_data(PA_data), .pa_ack(PA_ack),
    .hit_req(TLB_hit_req), .hit_data(TLB_hit_data), .hit_ack(TLB_hit_ack),
    .mem_cur_any, .mem_hit, .mem_asid, .mem_fill_ppn,
    .op_flush_all, .op_flush_cur, .op_ctx, .op_select, .op_search, .op_fill,
    .pb_hit, .pb_ppn, .pb_flush, .pb_take,
    .pf_start, .pf_stop, .pf_allow, .pf_busy,
    .pa_in(pa_w), .pa_valid, .dem_valid, .dem_ppn
  );

  // The PTE channel is shared: the prefetcher uses it only while the control
  // unit is idle, so at most one of the two acks is ever high.
  assign PTE_ack = cu_pte_ack | pf_pte_ack;

  a_pte_ack_excl: assert property (@(posedge clk) disable iff (!rst_n) !(cu_pte_ack && pf_pte_ack));
  // bundled-data rule on the outputs: data held while req waits for ack
  a_pa_stable: assert property (@(posedge clk) disable iff (!rst_n)
                               (PA_req && !PA_ack) |=> $stable(PA_data));

  wire unused_asid_found = asid_found;

endmodule
