// tb_trivium_mmio: runs the coprocessor's driver sequence over the APB bus:
// IV = 0 and key = 0x80 programmed word by word at 0x80000004/0x8000000C,
// load, then the polling loop that alternates commands 4 and 5 until status
// (0x80000008) reads 1, then reads key-stream words at 0x80000000, one per
// command change. Checks words against the reference model, register
// read-back, the read-only registers, and pslverr for unmapped addresses.
module tb_trivium_mmio;
  import trivium_ref_pkg::*;

  localparam logic [31:0] DOUT = 32'h8000_0000, DIN = 32'h8000_0004,
                          STAT = 32'h8000_0008, CTL = 32'h8000_000C;

  logic        clk = 0, rst_n = 0;
  logic        psel = 0, penable = 0, pwrite = 0;
  logic [31:0] paddr = 0, pwdata = 0, prdata;
  logic        pready, pslverr;
  logic        last_err;
  int checks = 0, failures = 0;

  trivium_mmio dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic apb_write(logic [31:0] a, logic [31:0] d);
    @(negedge clk) begin psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d; end
    @(negedge clk) penable = 1;
    #1 last_err = pslverr;
    @(negedge clk) begin psel = 0; penable = 0; pwrite = 0; end
  endtask

  task automatic apb_read(logic [31:0] a, output logic [31:0] d);
    @(negedge clk) begin psel = 1; penable = 0; pwrite = 0; paddr = a; end
    @(negedge clk) penable = 1;
    #1 begin d = prdata; last_err = pslverr; end
    @(negedge clk) begin psel = 0; penable = 0; end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trivium_ref r = new();
    logic [31:0] rd, st;
    bit [63:0] w0, w1;
    int polls = 0;
    bit [2:0] cmd;
    r.load(80'h80, 80'h0); r.init();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // program IV
    apb_write(CTL, 32'd1 << 24);
    apb_write(DIN, 32'd0);
    apb_write(CTL, (32'd1 << 24) | 32'h1);
    apb_write(CTL, (32'd1 << 24) | 32'h2);
    // program key
    apb_write(CTL, 32'd2 << 24);
    apb_write(DIN, 32'h80);
    apb_write(CTL, (32'd2 << 24) | 32'h1);
    apb_write(DIN, 32'd0);
    apb_write(CTL, (32'd2 << 24) | 32'h2);
    // read-back of the two writable registers
    apb_read(CTL, rd);
    check(rd == ((32'd2 << 24) | 32'h2) && !last_err, "control read-back");
    apb_read(DIN, rd);
    check(rd == 32'd0, "data-in read-back");
    // run the key schedule
    apb_write(CTL, 32'd0);
    apb_write(CTL, 32'd3 << 24);
    apb_read(STAT, st);
    check(st == 0, "status 0 during load");
    // the driver's polling loop
    forever begin
      apb_read(STAT, st);
      if (st[0]) break;
      apb_write(CTL, 32'd4 << 24);
      cmd = 3'd4;
      apb_read(STAT, st);
      if (st[0]) break;
      apb_write(CTL, 32'd5 << 24);
      cmd = 3'd5;
      polls++;
      if (polls > 100) break;
    end
    check(polls > 0 && polls < 20, $sformatf("polling loop ended after %0d passes", polls));
    // the last command change may have stepped once after status went high
    w0 = r.word(32);
    w1 = r.word(32);
    apb_read(DOUT, rd);
    check(rd == w0[31:0] || rd == w1[31:0], $sformatf("first key-stream word %h", rd));
    if (rd == w0[31:0]) w0 = w1; else w0 = r.word(32);
    for (int n = 0; n < 20; n++) begin
      cmd = (cmd == 3'd4) ? 3'd5 : 3'd4;
      apb_write(CTL, 32'(cmd) << 24);
      apb_read(DOUT, rd);
      check(rd == w0[31:0], $sformatf("key-stream word %0d: %h expected %h", n, rd, w0[31:0]));
      apb_read(DOUT, rd);
      check(rd == w0[31:0], "reading does not step");
      w0 = r.word(32);
    end
    // read-only registers ignore writes; unmapped addresses report an error
    apb_read(DOUT, rd);
    apb_write(DOUT, 32'h1234_5678);
    apb_read(DOUT, st);
    check(st == rd && !last_err, "data out is read-only");
    apb_write(STAT, 32'h0);
    apb_read(STAT, st);
    check(st == 32'd1, "status is read-only");
    apb_read(32'h8000_0010, rd);
    check(last_err && rd == 0, "pslverr outside the register window");
    apb_write(32'h4000_0004, 32'hffff_ffff);
    check(last_err, "pslverr on write to another base");
    apb_read(DIN, rd);
    check(rd == 32'd0, "write elsewhere leaves data in");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
