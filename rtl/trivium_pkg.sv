// trivium_pkg: sizes and constants shared by the Trivium blocks.
// The state is 288 bits; bit i of a state vector holds Trivium's s(i+1),
// so the three shift registers are s[92:0] (93 bits), s[176:93] (84 bits)
// and s[287:177] (111 bits). Key and IV are 80 bits each and the cipher runs
// 4 x 288 = 1152 rounds before its first key-stream bit. The register
// addresses and control commands are those of the memory-mapped coprocessor.
package trivium_pkg;
  localparam int unsigned STATE_W     = 288;
  localparam int unsigned KEY_W       = 80;
  localparam int unsigned IV_W        = 80;
  localparam int unsigned TRIV_INIT_ROUNDS = 1152;

  // Register offsets of the memory-mapped coprocessor (from its base address)
  localparam logic [3:0] REG_DOUT   = 4'h0;   // key-stream word, read-only
  localparam logic [3:0] REG_DIN    = 4'h4;   // data word, read/write
  localparam logic [3:0] REG_STATUS = 4'h8;   // bit 0: output valid, read-only
  localparam logic [3:0] REG_CTL    = 4'hC;   // control word, read/write

  // Command field, control word bits 26:24
  typedef enum logic [2:0] {
    CMD_IDLE  = 3'd0,
    CMD_IV    = 3'd1,   // write IV word ctl[1:0]
    CMD_KEY   = 3'd2,   // write key word ctl[1:0]
    CMD_LOAD  = 3'd3,   // load key and IV, start initialisation
    CMD_STEPA = 3'd4,   // alternate STEPA/STEPB: each change steps once
    CMD_STEPB = 3'd5
  } cmd_e;
endpackage
