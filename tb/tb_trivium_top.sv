// tb_trivium_top: runs the Trivium core at its default of one bit per cycle
// and at 2, 8 and 32 bits per cycle, all free-running (go = 1). Checks that the
// output-valid flag rises after 1152, 576, 144 and 36 cycles of initialisation,
// and that the key stream matches the bit-level reference model for two
// key/IV pairs, including a reload in the middle of a run.
module tb_trivium_top;
  import trivium_ref_pkg::*;

  logic        clk = 0, rst_n = 0, ld = 0;
  logic [79:0] iv, key;
  logic        z1;
  logic [1:0]  z2;
  logic [7:0]  z8;
  logic [31:0] z32;
  logic        e1, e2, e8, e32;
  int checks = 0, failures = 0;

  trivium_top              dut1  (.clk, .rst_n, .ld, .go(1'b1), .iv, .key, .z(z1),  .e(e1));
  trivium_top #(.BITS(2))  dut2  (.clk, .rst_n, .ld, .go(1'b1), .iv, .key, .z(z2),  .e(e2));
  trivium_top #(.BITS(8))  dut8  (.clk, .rst_n, .ld, .go(1'b1), .iv, .key, .z(z8),  .e(e8));
  trivium_top #(.BITS(32)) dut32 (.clk, .rst_n, .ld, .go(1'b1), .iv, .key, .z(z32), .e(e32));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit [79:0] k, bit [79:0] v, int nbits);
    trivium_ref r1 = new(), r2 = new(), r8 = new(), r32 = new();
    int cyc = 0, t2 = -1, t8 = -1, t32 = -1;
    bit [63:0] w;
    r1.load(k, v); r2.load(k, v); r8.load(k, v); r32.load(k, v);
    r1.init(); r2.init(); r8.init(); r32.init();
    @(negedge clk);
    key = k; iv = v; ld = 1;
    @(negedge clk);
    ld = 0;
    // count initialisation cycles, check the wide cores once they are valid
    while (!e1 && cyc < 3000) begin
      if (e2 && t2 < 0) t2 = cyc;
      if (e8 && t8 < 0) t8 = cyc;
      if (e32 && t32 < 0) t32 = cyc;
      @(negedge clk);
      cyc++;
    end
    check(cyc == 1152, $sformatf("1-bit core: %0d init cycles", cyc));
    check(t2 == 576,   $sformatf("2-bit core: %0d init cycles", t2));
    check(t8 == 144,   $sformatf("8-bit core: %0d init cycles", t8));
    check(t32 == 36,   $sformatf("32-bit core: %0d init cycles", t32));
    for (int i = 0; i < nbits; i++) begin
      check(e1 && z1 == r1.step(), $sformatf("1-bit key stream bit %0d", i));
      @(negedge clk);
    end
    // wide cores ran on freely; rerun their reference for the bits they used
    for (int i = 0; i < 1152 + nbits - 576; i++) void'(r2.word(2));
    w = r2.word(2);
    check(e2 && z2 == w[1:0], $sformatf("2-bit key stream %b vs %b", z2, w[1:0]));
    for (int i = 0; i < 1152 + nbits - 144; i++) void'(r8.word(8));
    for (int i = 0; i < 1152 + nbits - 36; i++) void'(r32.word(32));
    w = r8.word(8);
    check(e8 && z8 == w[7:0], $sformatf("8-bit key stream %h vs %h", z8, w[7:0]));
    w = r32.word(32);
    check(e32 && z32 == w[31:0], $sformatf("32-bit key stream %h vs %h", z32, w[31:0]));
  endtask

  initial begin
    iv = '0; key = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run(80'h0, 80'h0, 256);
    run({16'hcafe, 32'h01234567, 32'h89abcdef}, {16'h1234, 32'hdeadbeef, 32'h0badf00d}, 320);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
