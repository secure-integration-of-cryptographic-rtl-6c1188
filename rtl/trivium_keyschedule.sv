// trivium_keyschedule: the Trivium state register and its initialisation
// control.
//
// On ld the state is loaded with the key in s1..s80, the IV in s94..s173,
// ones in s286..s288 and zeros elsewhere, and a counter is set to
// INIT_ROUNDS/BITS. While the counter is non-zero the state takes the
// kernel's next state (si) every cycle and the counter counts down; e
// (output valid) is 1 when the counter is zero. After initialisation the
// state advances only in cycles where go is 1, so a bus interface can hand
// out one key-stream word per request; tie go to 1 for a free-running core.
//
// Interface: so is the registered state sent to the kernel, si the kernel's
// next state. ld is a level: while it is held the state is reloaded.
// Timing: e rises INIT_ROUNDS/BITS cycles after the last cycle with ld = 1.
//
// The load layout, the 1152-round count and the counter scaled by the number
// of rounds per cycle follow the document. How go gates the state after
// initialisation, and the asynchronous active-low reset, are this design's
// choices.
module trivium_keyschedule
  import trivium_pkg::*;
#(
  parameter int unsigned BITS        = 1,
  parameter int unsigned INIT_ROUNDS = trivium_pkg::TRIV_INIT_ROUNDS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ld,
  input  logic               go,
  input  logic [IV_W-1:0]    iv,
  input  logic [KEY_W-1:0]   key,
  output logic               e,
  input  logic [STATE_W-1:0] si,
  output logic [STATE_W-1:0] so
);
  localparam int unsigned STEPS = INIT_ROUNDS / BITS;
  localparam int unsigned CNT_W = $clog2(STEPS + 1);

  initial assert (BITS > 0 && INIT_ROUNDS % BITS == 0)
    else $error("INIT_ROUNDS must be a multiple of BITS");

  logic [STATE_W-1:0] s;
  logic [CNT_W-1:0]   cnt;
  logic [STATE_W-1:0] load_state;

  assign load_state = {3'b111, 108'd0,                 // s178..s288
                       {(84-IV_W){1'b0}}, iv,          // s94..s177
                       {(93-KEY_W){1'b0}}, key};       // s1..s93

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s   <= '0;
      cnt <= '0;
    end else if (ld) begin
      s   <= load_state;
      cnt <= CNT_W'(STEPS);
    end else begin
      if (cnt != 0 || go) s <= si;
      if (cnt != 0)       cnt <= cnt - 1'b1;
    end
  end

  assign so = s;
  assign e  = (cnt == 0);
endmodule
