// trivium_kernel: combinational Trivium round logic, BITS rounds deep.
//
// One round follows the Trivium update: t1 = s66^s93, t2 = s162^s177,
// t3 = s243^s288, z = t1^t2^t3; the three shift registers (93, 84, 111 bits)
// each shift by one and take in t3^s286&s287^s69, t1^s91&s92^s171 and
// t2^s175&s176^s264 respectively. BITS rounds are a chain of BITS single
// rounds, the way the 1-, 2-, 8- and 32-bit variants of the core are built.
//
// Interface: si is the current state (bit i = s(i+1)), so the state after
// BITS rounds, z the BITS key-stream bits with the bit of the first round in
// the MSB. No clock: the caller registers the state.
//
// The round equations and the chaining follow the document; the bit order of
// z beyond two bits extends its two-bit convention and is this design's choice.
module trivium_kernel
  import trivium_pkg::*;
#(
  parameter int unsigned BITS = 1
) (
  input  logic [STATE_W-1:0] si,
  output logic [STATE_W-1:0] so,
  output logic [BITS-1:0]    z
);
  // One Trivium round: returns the next state and the key-stream bit
  function automatic logic [STATE_W:0] round(logic [STATE_W-1:0] s);
    logic t1, t2, t3, n1, n2, n3;
    t1 = s[65]  ^ s[92];
    t2 = s[161] ^ s[176];
    t3 = s[242] ^ s[287];
    n1 = t1 ^ (s[90]  & s[91])  ^ s[170];
    n2 = t2 ^ (s[174] & s[175]) ^ s[263];
    n3 = t3 ^ (s[285] & s[286]) ^ s[68];
    return {t1 ^ t2 ^ t3,                // key-stream bit
            s[286:177], n2,              // 111-bit register
            s[175:93],  n1,              // 84-bit register
            s[91:0],    n3};             // 93-bit register
  endfunction

  always_comb begin
    logic [STATE_W-1:0] st;
    logic [STATE_W:0]   r;
    st = si;
    for (int i = 0; i < BITS; i++) begin
      r  = round(st);
      st = r[STATE_W-1:0];
      z[BITS-1-i] = r[STATE_W];
    end
    so = st;
  end
endmodule
