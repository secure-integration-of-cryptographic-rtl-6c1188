// tb_trivium_sfu: plays the processor side of the Trivium function unit.
// Writes the nine state words of a key/IV load through the 3-operand
// instruction (and reads them back), toggles the 2-operand instruction's
// first operand 18 times for the 1152 initialisation rounds, then reads
// key-stream words two at a time, toggling once per pair, as the driver
// loop does: 256 pairs, the 512-word stream of that driver. Checks the
// words against the reference model, that an
// unchanged operand does not advance, and that an unchanged write strobe
// does not write.
module tb_trivium_sfu;
  import trivium_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [31:0] op2_d1 = 0, op2_d2 = 0, op2_q1, op2_q2;
  logic [31:0] op3_d1 = 0, op3_d2 = 0, op3_d3 = 0, op3_q1;
  int checks = 0, failures = 0;

  trivium_sfu dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // one instruction issue: operands change, then a few cycles pass
  task automatic op3(logic [31:0] d1, logic [31:0] d2, logic [31:0] d3);
    @(negedge clk) begin op3_d1 = d1; op3_d2 = d2; op3_d3 = d3; end
    repeat (2) @(negedge clk);
  endtask
  task automatic op2(logic [31:0] d1);
    @(negedge clk) op2_d1 = d1;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trivium_ref r = new();
    bit [287:0] st;
    bit [63:0] w1, w2;
    bit [79:0] key = {16'h0f1e, 32'h2d3c4b5a, 32'h69788796};
    bit [79:0] iv  = {16'h1357, 32'h9bdf0246, 32'h8ace1234};
    r.load(key, iv);
    st = r.get_vec();
    r.init();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 9; k++) op3(st[32*k +: 32], k, k + 1);
    for (int k = 0; k < 9; k++) begin
      op3(32'hdead_beef, k, 9);             // strobe unchanged: no write
      check(op3_q1 == st[32*k +: 32], $sformatf("state word %0d read-back", k));
    end
    op3(32'd0, 9, 9);
    check(op3_q1 == 0, "index beyond the state reads 0");
    // key schedule: 9 x (advance with 1, advance with 0)
    for (int i = 0; i < 9; i++) begin
      op2(1);
      op2(0);
    end
    // key stream
    for (int i = 0; i < 256; i++) begin
      w1 = r.word(32);
      w2 = r.word(32);
      check(op2_q1 == w1[31:0] && op2_q2 == w2[31:0],
            $sformatf("pair %0d: %h %h expected %h %h", i, op2_q1, op2_q2, w1[31:0], w2[31:0]));
      op2_d2 = $urandom;                    // second operand has no effect
      op2({$urandom, ~op2_d1[0]});
      // re-issuing the same operand value must not advance: the next
      // pair's check would then fail
      if (i % 8 == 3) op2(op2_d1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
