// trivium_sfu: Trivium special-function unit driven by two custom processor
// instructions, a 2-operand/2-result one (op2) and a 3-operand/1-result one
// (op3).
//
// The 288-bit state is kept as nine 32-bit words (word k = state bits
// 32k+31..32k). Two 32-round kernels are chained (trivium320, trivium321),
// so one advance moves the state 64 rounds on. An edge detector on bit 0 of
// op2_d1 produces the advance: every time software changes that bit (1, 0,
// 1, ...) the state advances once. op2_q1 and op2_q2 are the key-stream
// words of the first and second kernel for the current state, so software
// reads the 64 bits it is about to step past. Eighteen advances make the
// 1152 initialisation rounds.
// op3 writes the state: when op3_d3 changes, op3_d1 is written into state
// word op3_d2 (0..8). op3_q1 reads back word op3_d2. A write takes priority
// over an advance in the same cycle.
//
// Timing: results are combinational on the state register; the advance and
// the write happen at the clock edge after the operand change is seen.
//
// The two chained kernels, the edge-detected advance and the word-organised
// state register follow the document. The operand encoding of the state
// write (index in op3_d2, strobe by change of op3_d3) and the read-back are
// this design's choice; op2_d2 is part of the instruction format but unused.
module trivium_sfu
  import trivium_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] op2_d1,
  input  logic [31:0] op2_d2,
  output logic [31:0] op2_q1,
  output logic [31:0] op2_q2,
  input  logic [31:0] op3_d1,
  input  logic [31:0] op3_d2,
  input  logic [31:0] op3_d3,
  output logic [31:0] op3_q1
);
  localparam int unsigned WORDS = STATE_W / 32;

  logic [31:0]        s [WORDS];
  logic [STATE_W-1:0] s_flat, s_mid, s_next;
  logic               adv_prev, advance, write;
  logic [31:0]        d3_prev;

  for (genvar k = 0; k < WORDS; k++) begin : g_flat
    assign s_flat[32*k +: 32] = s[k];
  end

  trivium_kernel #(.BITS(32)) u_trivium320 (.si(s_flat), .so(s_mid),  .z(op2_q1));
  trivium_kernel #(.BITS(32)) u_trivium321 (.si(s_mid),  .so(s_next), .z(op2_q2));

  assign advance = (op2_d1[0] != adv_prev);
  assign write   = (op3_d3 != d3_prev);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adv_prev <= 1'b0;
      d3_prev  <= '0;
      for (int k = 0; k < WORDS; k++) s[k] <= '0;
    end else begin
      adv_prev <= op2_d1[0];
      d3_prev  <= op3_d3;
      if (write) begin
        if (op3_d2 < WORDS) s[op3_d2[3:0]] <= op3_d1;
      end else if (advance) begin
        for (int k = 0; k < WORDS; k++) s[k] <= s_next[32*k +: 32];
      end
    end
  end

  assign op3_q1 = (op3_d2 < WORDS) ? s[op3_d2[3:0]] : 32'd0;

  // op2_d2 carries no information for this unit
  logic unused_d2;
  assign unused_d2 = ^op2_d2;
endmodule
