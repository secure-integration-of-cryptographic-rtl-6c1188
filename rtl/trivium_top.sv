// trivium_top: Trivium stream-cipher core producing BITS key-stream bits per
// cycle.
//
// The key-schedule register feeds a BITS-round kernel whose next state goes
// back into the register, so the loop advances BITS rounds per clock. After
// ld is released the core runs INIT_ROUNDS/BITS cycles of initialisation,
// then raises e; from then on z holds the next BITS key-stream bits (first
// bit in the MSB) and each cycle with go = 1 moves on to the following BITS
// bits. With go tied to 1 the core produces BITS bits every cycle.
//
// Interface: clk, rst_n, ld (level), go, iv, key; outputs z and e. z is
// combinational from the state register and valid when e = 1.
//
// The loop structure and the variants (1, 2, 8, 32 bits per cycle) follow
// the document; the go input is used the way its bus-interface example
// needs it, with the exact gating being this design's choice.
module trivium_top
  import trivium_pkg::*;
#(
  parameter int unsigned BITS        = 1,
  parameter int unsigned INIT_ROUNDS = trivium_pkg::TRIV_INIT_ROUNDS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld,
  input  logic             go,
  input  logic [IV_W-1:0]  iv,
  input  logic [KEY_W-1:0] key,
  output logic [BITS-1:0]  z,
  output logic             e
);
  logic [STATE_W-1:0] si, so;

  trivium_keyschedule #(.BITS(BITS), .INIT_ROUNDS(INIT_ROUNDS)) u_sched (
    .clk, .rst_n, .ld, .go, .iv, .key, .e, .si, .so
  );

  trivium_kernel #(.BITS(BITS)) u_kernel (
    .si(so), .so(si), .z
  );
endmodule
