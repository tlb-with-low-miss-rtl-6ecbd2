// hs_pull - passive (receiving) side of one 4-phase bundled-data channel.
//
// While `en` is high and the sender raises `req`, the data is latched into
// `data`, `got` pulses for one cycle and `ack` rises. When the sender drops
// `req`, `ack` falls and `done` pulses. With `en` low a pending request is
// left waiting, so the channel is only consumed when the controller needs it.
// The 4-phase protocol is the original one; the clocked realisation (inputs
// assumed synchronous to clk) is this design's choice.
module hs_pull #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         req,
  input  logic [W-1:0] din,
  output logic         ack,
  output logic [W-1:0] data,
  output logic         got,
  output logic         done
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack  <= 1'b0;
      data <= '0;
      got  <= 1'b0;
      done <= 1'b0;
    end else begin
      got  <= 1'b0;
      done <= 1'b0;
      if (!ack) begin
        if (en && req) begin
          data <= din;
          ack  <= 1'b1;
          got  <= 1'b1;
        end
      end else if (!req) begin
        ack  <= 1'b0;
        done <= 1'b1;
      end
    end
  end

endmodule
