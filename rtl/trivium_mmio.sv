// trivium_mmio: memory-mapped Trivium coprocessor on an AMBA APB bus.
//
// Four 32-bit registers at BASE + 0x0, 0x4, 0x8 and 0xC:
//   0x0  data out  (read-only)  current 32-bit key-stream word
//   0x4  data in   (read/write) word for the IV or key register
//   0x8  status    (read-only)  bit 0 = key stream valid
//   0xC  control   (read/write) bits 26:24 command, bits 1:0 word index
// The data-in and control registers hold the last value written and drive
// trivium_itf continuously; data out and status are read straight from it.
// A typical driver writes the IV and key word by word (commands 1 and 2),
// writes command 0 then 3 to load, and then alternates commands 4 and 5,
// polling status, until the key stream is valid; each further 4/5 change
// yields the next word.
//
// Bus timing: APB3 with no wait states (pready = 1); writes take effect at
// the end of the access phase; an access to any other address in the
// 16-byte window or outside it returns pslverr and no data.
//
// The register map (addresses, directions, contents) follows the document;
// the choice of APB as the bus, read-back of data in and control, and
// pslverr are this design's.
module trivium_mmio
  import trivium_pkg::*;
#(
  parameter logic [31:0] BASE = 32'h8000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [31:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr
);
  logic [31:0] din_r, ctl_r, dout, status;
  logic        hit, valid_reg;
  logic [3:0]  off;

  assign off       = paddr[3:0];
  assign hit       = (paddr[31:4] == BASE[31:4]);
  assign valid_reg = hit && (off == REG_DOUT || off == REG_DIN ||
                             off == REG_STATUS || off == REG_CTL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      din_r <= '0;
      ctl_r <= '0;
    end else if (psel && penable && pwrite && valid_reg) begin
      if (off == REG_DIN) din_r <= pwdata;
      if (off == REG_CTL) ctl_r <= pwdata;
    end
  end

  always_comb begin
    prdata = '0;
    if (valid_reg) begin
      case (off)
        REG_DOUT:   prdata = dout;
        REG_DIN:    prdata = din_r;
        REG_STATUS: prdata = status;
        REG_CTL:    prdata = ctl_r;
        default:    prdata = '0;
      endcase
    end
  end

  assign pready  = 1'b1;
  assign pslverr = psel && penable && !valid_reg;

  // An access phase is always preceded by a setup phase
  a_apb_setup: assert property (@(posedge clk)
                                (psel && penable) |-> $past(psel))
    else $error("APB access phase without setup phase");

  trivium_itf #(.BITS(32)) u_itf (
    .clk, .rst_n, .din(din_r), .ctl(ctl_r), .dout, .status
  );
endmodule
