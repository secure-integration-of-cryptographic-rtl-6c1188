// updown: a small FSMD (finite-state machine with datapath), a counter that
// runs 0, 1, ..., 10, 9, ..., 0, 1, ... under a two-state controller.
//
// In state S0 the controller increments while the count is below 10; at 10
// it decrements once and goes to S1. In S1 it decrements while the count is
// above 0; at 0 it increments once and returns to S0. The output a is the
// counter register, so the sequence repeats every 20 cycles.
//
// Interface: clk, rst_n; output a (W bits). Reset: state S0, count 0.
// The controller and datapath follow the document; the reset is this
// design's choice matching its initial state.
module updown #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] a
);
  typedef enum logic {S0, S1} state_e;
  state_e      state;
  logic [W-1:0] c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S0;
      c     <= '0;
    end else begin
      unique case (state)
        S0: if (c < W'(10)) c <= c + 1'b1;
            else begin c <= c - 1'b1; state <= S1; end
        S1: if (c > W'(0))  c <= c - 1'b1;
            else begin c <= c + 1'b1; state <= S0; end
      endcase
    end
  end

  assign a = c;
endmodule
