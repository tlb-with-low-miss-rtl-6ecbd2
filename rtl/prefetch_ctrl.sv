// prefetch_ctrl - sequential-prefetch (SP) control unit.
//
// After a miss in both the current bank and the prefetch buffer at page V,
// the control unit `start`s a new window around V. Whenever the prefetch
// buffer has an empty slot and the controller `allow`s it (no request
// pending), one page-table entry is fetched: a PFE handshake (data '1',
// plus the wanted VPN on `pfe_vpn`) asks the page-table walker for it, and
// the walker answers with a PTE handshake; the PTE's frame number is stored
// in the buffer. The VPN order is V+1 .. V+AHEAD, then V-1 .. V-BEHIND,
// then V+AHEAD+1, V+AHEAD+2, ... for slots freed later (when a buffered
// translation moves into the TLB). `stop` ends the window (context switch,
// clear-TLB). `busy` is high from the PFE request to the end of the PTE
// handshake. Offsets +9/-8 and the rule "fetch while a slot is empty" are
// the original ones; the order, the continuation past +AHEAD and the
// pfe_vpn output are this design's choices (the 1-bit PFE data alone does
// not say which page to fetch).
module prefetch_ctrl
  import tlb_pkg::*;
#(
  parameter int unsigned AHEAD  = 9,
  parameter int unsigned BEHIND = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  vpn_t             base_vpn,
  input  logic             stop,
  input  logic             allow,
  input  logic             pb_has_empty,
  // PFE channel (push)
  output logic             pfe_req,
  output logic             pfe_data,
  output vpn_t             pfe_vpn,
  input  logic             pfe_ack,
  // PTE channel (pull; shared with the control unit, which leaves it alone
  // while busy is high)
  input  logic             pte_req,
  input  logic [PTE_W-1:0] pte_data,
  output logic             pte_ack,
  // prefetch buffer write port
  output logic             pb_wr,
  output vpn_t             pb_wr_vpn,
  output ppn_t             pb_wr_ppn,
  output logic             busy
);

  typedef enum logic [1:0] {GEN_OFF, GEN_UP, GEN_DOWN, GEN_CONT} gen_e;
  typedef enum logic [1:0] {F_IDLE, F_PFE, F_PTE} fstate_e;

  gen_e             phase;
  fstate_e          st;
  vpn_t             base, up_k, down_k, next_vpn;
  logic             pfe_done, pte_got, pte_done, pfe_data_w;
  logic [PTE_W-1:0] pte_q;

  assign next_vpn = (phase == GEN_DOWN) ? base - down_k : base + up_k;
  assign busy     = (st != F_IDLE);

  wire launch = (st == F_IDLE) && allow && pb_has_empty && (phase != GEN_OFF);

  hs_push #(.W(1)) u_pfe (
    .clk, .rst_n, .start(launch), .din(1'b1),
    .req(pfe_req), .data(pfe_data_w), .ack(pfe_ack), .busy(), .done(pfe_done)
  );
  assign pfe_data = pfe_data_w;

  hs_pull #(.W(PTE_W)) u_pte (
    .clk, .rst_n, .en(st == F_PTE), .req(pte_req), .din(pte_data),
    .ack(pte_ack), .data(pte_q), .got(pte_got), .done(pte_done)
  );

  assign pb_wr     = pte_got;
  assign pb_wr_vpn = pfe_vpn;
  assign pb_wr_ppn = pte_ppn(pte_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= F_IDLE;
      phase   <= GEN_OFF;
      base    <= '0;
      up_k    <= '0;
      down_k  <= '0;
      pfe_vpn <= '0;
    end else begin
      unique case (st)
        F_IDLE: if (launch) begin
          pfe_vpn <= next_vpn;
          st      <= F_PFE;
        end
        F_PFE: if (pfe_done) st <= F_PTE;
        F_PTE: if (pte_done) begin
          st <= F_IDLE;
          // advance the window
          unique case (phase)
            GEN_UP: begin
              up_k <= up_k + 1'b1;
              if (up_k == vpn_t'(AHEAD)) phase <= (BEHIND > 0) ? GEN_DOWN : GEN_CONT;
            end
            GEN_DOWN: begin
              down_k <= down_k + 1'b1;
              if (down_k == vpn_t'(BEHIND)) phase <= GEN_CONT;
            end
            GEN_CONT: up_k <= up_k + 1'b1;
            default: ;
          endcase
        end
        default: st <= F_IDLE;
      endcase
      // start/stop only come while the unit is idle
      if (stop) phase <= GEN_OFF;
      else if (start) begin
        base   <= base_vpn;
        up_k   <= vpn_t'(1);
        down_k <= vpn_t'(1);
        phase  <= (AHEAD > 0) ? GEN_UP : GEN_DOWN;
      end
    end
  end

endmodule
