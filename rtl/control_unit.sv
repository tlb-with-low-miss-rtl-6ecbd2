// control_unit - control unit (CU) of the banked TLB controller.
//
// It serves the environment's channels and sequences the TLB memory, the
// prefetch buffer and the prefetch control unit. The channels carry the
// requests one at a time, in this priority: clear-TLB, context switch (CMW),
// virtual address (VA).
//   clr_TLB  data '1': clear every bank; '0': clear the current bank. The
//            prefetch buffer is flushed and the prefetch window ended.
//   CMW      data '1': context switch - clear all current bits, flush the
//            prefetch buffer. Data '0' is acknowledged with no action.
//   VA       (the VA itself goes straight to the TLB memory) translated as follows (VA_ack is held until the whole
//            translation is over, so VA_data stays valid throughout):
//     no current bank  -> TLB_hit '0', and concurrently the ASID is taken
//                         from the ASID channel; the bank whose tag holds
//                         that ASID becomes current, or a victim bank is
//                         flushed and given to it. The PTE is then taken
//                         from the PTE channel, stored, PA sent, SP window
//                         started at this page.
//     current bank hit -> TLB_hit '1' and PA, concurrently.
//     prefetch hit     -> entry moved into the current bank, TLB_hit '1'
//                         and PA; the freed slot is refilled by prefetching.
//     miss             -> TLB_hit '0'; PTE taken; entry stored; PA sent;
//                         new SP window started at this page.
// Prefetch fetches run only while no request waits (`pf_allow`), and a
// started fetch is finished before the next request is served.
// This follows the original controller algorithm. Sending the PA after a
// miss (once the walked PTE is stored), the channel priority, and running the
// handshakes from a clock (inputs assumed synchronous to clk) are this
// design's choices.
module control_unit
  import tlb_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // clr_TLB channel
  input  logic             clr_req,
  input  logic             clr_data,
  output logic             clr_ack,
  // CMW (context switch) channel
  input  logic             cmw_req,
  input  logic             cmw_data,
  output logic             cmw_ack,
  // VA channel
  input  logic             va_req,
  output logic             va_ack,
  // ASID channel
  input  logic             asid_req,
  input  asid_t            asid_data,
  output logic             asid_ack,
  // PTE channel (demand fetches)
  input  logic             pte_req,
  input  logic [PTE_W-1:0] pte_data,
  output logic             pte_ack,
  // PA channel
  output logic             pa_req,
  output logic [VA_W-1:0]  pa_data,
  input  logic             pa_ack,
  // TLB_hit channel
  output logic             hit_req,
  output logic             hit_data,
  input  logic             hit_ack,
  // TLB memory
  input  logic             mem_cur_any,
  input  logic             mem_hit,
  output asid_t            mem_asid,
  output ppn_t             mem_fill_ppn,
  output logic             op_flush_all,
  output logic             op_flush_cur,
  output logic             op_ctx,
  output logic             op_select,
  output logic             op_search,
  output logic             op_fill,
  // prefetch buffer
  input  logic             pb_hit,
  input  ppn_t             pb_ppn,
  output logic             pb_flush,
  output logic             pb_take,
  // prefetch control unit
  output logic             pf_start,
  output logic             pf_stop,
  output logic             pf_allow,
  input  logic             pf_busy,
  // PA generator
  input  logic [VA_W-1:0]  pa_in,
  input  logic             pa_valid,
  output logic             dem_valid,
  output ppn_t             dem_ppn
);

  typedef enum logic [3:0] {
    S_IDLE, S_CLR, S_CMW, S_EVAL, S_NB_WAIT, S_NB_SEL, S_MISS_HIT,
    S_PTE, S_FILL, S_PA, S_HITPA, S_VACK
  } cu_state_e;

  cu_state_e        st;
  logic             clr_got, clr_done, clr_q;
  logic             cmw_got, cmw_done, cmw_q;
  logic             asid_done;
  logic             pte_done;
  logic [PTE_W-1:0] pte_q;
  logic             hit_start, hit_din, hit_done;
  logic             pa_start, pa_done;
  logic             hit_fin, pa_fin, asid_fin;

  // ---- channel ends ----------------------------------------------------
  hs_pull #(.W(1)) u_clr (
    .clk, .rst_n, .en(st == S_CLR), .req(clr_req), .din(clr_data),
    .ack(clr_ack), .data(clr_q), .got(clr_got), .done(clr_done)
  );
  hs_pull #(.W(1)) u_cmw (
    .clk, .rst_n, .en(st == S_CMW), .req(cmw_req), .din(cmw_data),
    .ack(cmw_ack), .data(cmw_q), .got(cmw_got), .done(cmw_done)
  );
  hs_pull #(.W(ASID_W)) u_asid (
    .clk, .rst_n, .en(st == S_NB_WAIT && !asid_fin), .req(asid_req), .din(asid_data),
    .ack(asid_ack), .data(mem_asid), .got(), .done(asid_done)
  );
  hs_pull #(.W(PTE_W)) u_pte (
    .clk, .rst_n, .en(st == S_PTE), .req(pte_req), .din(pte_data),
    .ack(pte_ack), .data(pte_q), .got(), .done(pte_done)
  );
  hs_push #(.W(1)) u_hit (
    .clk, .rst_n, .start(hit_start), .din(hit_din),
    .req(hit_req), .data(hit_data), .ack(hit_ack), .busy(), .done(hit_done)
  );
  hs_push #(.W(VA_W)) u_pa (
    .clk, .rst_n, .start(pa_start), .din(pa_in),
    .req(pa_req), .data(pa_data), .ack(pa_ack), .busy(), .done(pa_done)
  );

  assign dem_ppn   = pte_ppn(pte_q);
  assign dem_valid = (st == S_FILL);
  assign pf_allow  = (st == S_IDLE) && !clr_req && !cmw_req && !va_req;

  // ---- per-state actions (combinational) -------------------------------
  always_comb begin
    op_flush_all = 1'b0;
    op_flush_cur = 1'b0;
    op_ctx       = 1'b0;
    op_select    = 1'b0;
    op_search    = 1'b0;
    op_fill      = 1'b0;
    mem_fill_ppn = dem_ppn;
    pb_flush     = 1'b0;
    pb_take      = 1'b0;
    pf_start     = 1'b0;
    pf_stop      = 1'b0;
    hit_start    = 1'b0;
    hit_din      = 1'b0;
    pa_start     = 1'b0;
    unique case (st)
      S_CLR: if (clr_got) begin
        op_flush_all = clr_q;
        op_flush_cur = !clr_q;
        pb_flush     = 1'b1;
        pf_stop      = 1'b1;
      end
      S_CMW: if (cmw_got && cmw_q) begin
        op_ctx   = 1'b1;
        pb_flush = 1'b1;
        pf_stop  = 1'b1;
      end
      S_EVAL: begin
        hit_start = 1'b1;
        if (!mem_cur_any) begin
          hit_din = 1'b0;
        end else if (mem_hit) begin
          hit_din   = 1'b1;
          pa_start  = 1'b1;
          op_search = 1'b1;
        end else if (pb_hit) begin
          hit_din      = 1'b1;
          pa_start     = 1'b1;
          op_fill      = 1'b1;
          mem_fill_ppn = pb_ppn;
          pb_take      = 1'b1;
        end else begin
          hit_din = 1'b0;
        end
      end
      S_NB_SEL: op_select = 1'b1;
      S_FILL: begin
        if (mem_hit) op_search = 1'b1;
        else         op_fill   = 1'b1;
        pb_flush = 1'b1;
        pf_start = 1'b1;
        pa_start = 1'b1;
      end
      default: ;
    endcase
  end

  // ---- state sequence ----------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      va_ack   <= 1'b0;
      hit_fin  <= 1'b0;
      pa_fin   <= 1'b0;
      asid_fin <= 1'b0;
    end else begin
      if (hit_done)  hit_fin  <= 1'b1;
      if (pa_done)   pa_fin   <= 1'b1;
      if (asid_done) asid_fin <= 1'b1;
      unique case (st)
        S_IDLE: if (!pf_busy) begin
          hit_fin  <= 1'b0;
          pa_fin   <= 1'b0;
          asid_fin <= 1'b0;
          if (clr_req)      st <= S_CLR;
          else if (cmw_req) st <= S_CMW;
          else if (va_req)  st <= S_EVAL;
        end
        S_CLR: if (clr_done) st <= S_IDLE;
        S_CMW: if (cmw_done) st <= S_IDLE;
        S_EVAL: begin
          if (!mem_cur_any)         st <= S_NB_WAIT;
          else if (mem_hit || pb_hit) st <= S_HITPA;
          else                      st <= S_MISS_HIT;
        end
        S_NB_WAIT:  if ((hit_fin || hit_done) && (asid_fin || asid_done)) st <= S_NB_SEL;
        S_NB_SEL:   st <= S_PTE;
        S_MISS_HIT: if (hit_fin || hit_done) st <= S_PTE;
        S_PTE:      if (pte_done) st <= S_FILL;
        S_FILL:     st <= S_PA;
        S_PA:       if (pa_fin || pa_done) st <= S_VACK;
        S_HITPA:    if ((hit_fin || hit_done) && (pa_fin || pa_done)) st <= S_VACK;
        S_VACK: begin
          if (!va_ack) va_ack <= 1'b1;
          else if (!va_req) begin
            va_ack <= 1'b0;
            st     <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // The PA is only sent when some source gives a translation.
  a_pa_valid: assert property (@(posedge clk) disable iff (!rst_n) pa_start |-> pa_valid);
  // At most one requester owns the shared PTE channel.
  a_pte_owner: assert property (@(posedge clk) disable iff (!rst_n) (st == S_PTE) |-> !pf_busy);

endmodule
