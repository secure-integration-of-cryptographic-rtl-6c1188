// codesign_top: the hardware examples of a hardware/software co-design
// study of a Trivium stream-cipher coprocessor, side by side on one clock:
//
//   t1_*   free-running Trivium core, one key-stream bit per cycle
//   apb_*  the same cipher as a memory-mapped coprocessor, 32 bits per step,
//          behind four APB registers at 0x80000000..0x8000000C
//   sfu_*  the cipher as a special-function unit for two custom processor
//          instructions, 64 bits per step
//   mp_*   hardware end of a toggle req/ack message channel
//   ud_a   the up/down counter FSMD example
//
// The processor that drives the bus and instruction ports is outside this
// design; its signals are the top's ports. The examples share nothing but
// the clock and the asynchronous active-low reset, which is this design's
// choice.
module codesign_top
  import trivium_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // Trivium core, 1 bit per cycle
  input  logic             t1_ld,
  input  logic [IV_W-1:0]  t1_iv,
  input  logic [KEY_W-1:0] t1_key,
  output logic             t1_z,
  output logic             t1_e,
  // memory-mapped Trivium coprocessor (APB slave)
  input  logic             apb_psel,
  input  logic             apb_penable,
  input  logic             apb_pwrite,
  input  logic [31:0]      apb_paddr,
  input  logic [31:0]      apb_pwdata,
  output logic [31:0]      apb_prdata,
  output logic             apb_pready,
  output logic             apb_pslverr,
  // Trivium special-function unit
  input  logic [31:0]      sfu_op2_d1,
  input  logic [31:0]      sfu_op2_d2,
  output logic [31:0]      sfu_op2_q1,
  output logic [31:0]      sfu_op2_q2,
  input  logic [31:0]      sfu_op3_d1,
  input  logic [31:0]      sfu_op3_d2,
  input  logic [31:0]      sfu_op3_d3,
  output logic [31:0]      sfu_op3_q1,
  // message-passing receiver
  input  logic [31:0]      mp_d,
  input  logic             mp_req,
  output logic             mp_ack,
  output logic [31:0]      mp_rd,
  // up/down counter
  output logic [3:0]       ud_a
);
  trivium_top u_trivium1 (
    .clk, .rst_n, .ld(t1_ld), .go(1'b1), .iv(t1_iv), .key(t1_key),
    .z(t1_z), .e(t1_e)
  );

  trivium_mmio u_coproc (
    .clk, .rst_n, .psel(apb_psel), .penable(apb_penable), .pwrite(apb_pwrite),
    .paddr(apb_paddr), .pwdata(apb_pwdata), .prdata(apb_prdata),
    .pready(apb_pready), .pslverr(apb_pslverr)
  );

  trivium_sfu u_sfu (
    .clk, .rst_n,
    .op2_d1(sfu_op2_d1), .op2_d2(sfu_op2_d2), .op2_q1(sfu_op2_q1), .op2_q2(sfu_op2_q2),
    .op3_d1(sfu_op3_d1), .op3_d2(sfu_op3_d2), .op3_d3(sfu_op3_d3), .op3_q1(sfu_op3_q1)
  );

  msg_rcv u_rcv (
    .clk, .rst_n, .d(mp_d), .req(mp_req), .ack(mp_ack), .rd(mp_rd)
  );

  updown u_updown (
    .clk, .rst_n, .a(ud_a)
  );
endmodule
