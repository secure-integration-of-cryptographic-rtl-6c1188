// trivium_itf: adapts a 32-bit-per-step Trivium core to four 32-bit
// processor registers (data in, control, data out, status).
//
// Software writes the control word (command in bits 26:24, word index in
// bits 1:0) and the data word. While the command is 1 (IV) or 2 (key), the
// data word is copied every cycle into word ctl[1:0] of an 80-bit IV or key
// register, so writing control then data, or data then control, both work.
// Command 3 holds the core's load input. After initialisation, software
// steps the core by alternating commands 4 and 5: every change 4->5 or 5->4,
// and the change 0->3, gives a one-cycle go pulse, which advances the core
// by 32 rounds. Status bit 0 is the core's output-valid flag; data out is
// the current 32-bit key-stream word.
//
// Interface: din, ctl come from the bus registers; dout, status go to them.
// Timing: IV/key words are registered one cycle after they are selected; go
// is combinational on the control word and the previous cycle's command.
//
// The command codes, the word selection and the go rule follow the document.
// Word 2 of an 80-bit register only has 16 bits, so only din[15:0] is kept.
module trivium_itf
  import trivium_pkg::*;
#(
  parameter int unsigned BITS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] din,
  input  logic [31:0] ctl,
  output logic [31:0] dout,
  output logic [31:0] status
);
  cmd_e             cmd, oldread;
  logic [1:0]       widx;
  logic [KEY_W-1:0] keyr;
  logic [IV_W-1:0]  ivr;
  logic             ld, go, e;
  logic [BITS-1:0]  z;

  initial assert (BITS == 32) else $error("the register interface is 32 bits wide");

  assign cmd  = cmd_e'(ctl[26:24]);
  assign widx = ctl[1:0];

  // Write a 32-bit word into word position w of an 80-bit register
  function automatic logic [79:0] put_word(logic [79:0] r, logic [1:0] w, logic [31:0] d);
    logic [79:0] n = r;
    case (w)
      2'd0:    n[31:0]  = d;
      2'd1:    n[63:32] = d;
      2'd2:    n[79:64] = d[15:0];
      default: ;
    endcase
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ivr     <= '0;
      keyr    <= '0;
      oldread <= CMD_IDLE;
    end else begin
      if (cmd == CMD_IV)  ivr  <= put_word(ivr,  widx, din);
      if (cmd == CMD_KEY) keyr <= put_word(keyr, widx, din);
      oldread <= cmd;
    end
  end

  assign ld = (cmd == CMD_LOAD);
  assign go = (cmd == CMD_STEPA && oldread == CMD_STEPB) ||
              (cmd == CMD_STEPB && oldread == CMD_STEPA) ||
              (cmd == CMD_LOAD  && oldread == CMD_IDLE);

  trivium_top #(.BITS(BITS)) u_core (
    .clk, .rst_n, .ld, .go, .iv(ivr), .key(keyr), .z, .e
  );

  assign dout   = z;
  assign status = {31'd0, e};
endmodule
