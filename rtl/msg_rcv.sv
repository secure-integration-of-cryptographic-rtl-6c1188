// msg_rcv: hardware end of a two-phase (toggle) request/acknowledge channel
// from software.
//
// Software places a word on d and inverts req. In the first cycle where req
// differs from ack the receiver copies d into rd; one cycle later ack has
// taken the value of req, which tells software the word was taken and the
// next one can be sent. Both edges of req carry a message.
//
// Interface: d and req in, ack and rd out. An assertion checks that req
// does not toggle again before the previous toggle was acknowledged. Timing: ack follows req with one
// register delay; rd is loaded at the clock edge where req != ack.
//
// The register structure follows the document; exposing rd as a port and
// the asynchronous reset are this design's choices.
module msg_rcv #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         req,
  output logic         ack,
  output logic [W-1:0] rd
);
  logic rack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rack <= 1'b0;
      rd   <= '0;
    end else begin
      rack <= req;
      if (rack != req) rd <= d;
    end
  end

  assign ack = rack;

  // Protocol: software toggles req only after the previous message was
  // acknowledged, so at most one message is outstanding
  a_one_outstanding: assert property (@(posedge clk)
                                      (req != $past(req)) |-> ($past(req) == $past(ack)))
    else $error("req toggled before the previous message was acknowledged");
endmodule
