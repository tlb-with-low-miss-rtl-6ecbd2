// hs_push - active (sending) side of one 4-phase bundled-data channel.
//
// A one-cycle `start` latches `din` onto `data` and raises `req`. The
// receiver raises `ack` once it has taken the data; `req` then falls, and
// when `ack` has fallen too, `done` pulses for one cycle and the channel is
// free again (`busy` low). `data` stays stable from req rising until ack
// falls, as the bundled-data rule requires. `start` while busy is ignored.
// The 4-phase protocol is the one of the original controller; running it
// from a clock (inputs assumed synchronous to clk) is this design's choice.
module hs_push #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] din,
  output logic         req,
  output logic [W-1:0] data,
  input  logic         ack,
  output logic         busy,
  output logic         done
);

  typedef enum logic [1:0] {P_IDLE, P_REQ, P_REL} pstate_e;
  pstate_e st;

  assign busy = (st != P_IDLE);
  assign req  = (st == P_REQ);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st   <= P_IDLE;
      data <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        P_IDLE: if (start) begin
          data <= din;
          st   <= P_REQ;
        end
        P_REQ:  if (ack)  st <= P_REL;
        P_REL:  if (!ack) begin
          st   <= P_IDLE;
          done <= 1'b1;
        end
        default: st <= P_IDLE;
      endcase
    end
  end

endmodule
