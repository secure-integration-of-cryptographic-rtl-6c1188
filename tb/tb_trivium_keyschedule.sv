// tb_trivium_keyschedule: checks the Trivium state register and its
// initialisation counter. The testbench closes the loop itself with a simple
// next-state function (rotate and invert) so that the checks see the
// register, not the cipher: load layout (against the reference model's
// load), the reload while ld is held, exactly 1152 stepping cycles for one
// round per cycle and 36 for 32 rounds per cycle, and the go gating after
// initialisation.
module tb_trivium_keyschedule;
  import trivium_ref_pkg::*;

  logic         clk = 0, rst_n = 0, ld = 0, go = 0;
  logic [79:0]  iv, key;
  logic         e1, e32;
  logic [287:0] so1, so32, si1, si32;
  int checks = 0, failures = 0;
  trivium_ref ref_m = new();

  function automatic logic [287:0] nxt(logic [287:0] s);
    return {s[286:0], ~s[287]};
  endfunction

  assign si1  = nxt(so1);
  assign si32 = nxt(so32);

  trivium_keyschedule dut1 (.clk, .rst_n, .ld, .go, .iv, .key, .e(e1), .si(si1), .so(so1));
  trivium_keyschedule #(.BITS(32)) dut32 (.clk, .rst_n, .ld, .go, .iv, .key, .e(e32), .si(si32), .so(so32));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [287:0] exp_load, prev1, prev32;
    int n1, n32;
    iv  = {16'h1234, 32'hdeadbeef, 32'h0badf00d};
    key = {16'hcafe, 32'h01234567, 32'h89abcdef};
    ref_m.load(key, iv);
    exp_load = ref_m.get_vec();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(e1 && e32 && so1 == 0, "reset state");
    @(negedge clk) ld = 1;
    repeat (3) begin
      @(negedge clk);
      check(so1 == exp_load && so32 == exp_load, "load layout / reload while ld held");
      check(!e1 && !e32, "e low while loading");
    end
    ld = 0;
    n1 = 0; n32 = 0;
    prev1 = so1; prev32 = so32;
    while (!e1) begin
      @(negedge clk);
      n1++;
      check(so1 == nxt(prev1), "1-bit state steps every init cycle");
      prev1 = so1;
      if (n32 == n1 - 1) begin
        // still initialising in the previous cycle: this was a stepping cycle
        check(so32 == nxt(prev32), "32-bit state steps every init cycle");
        prev32 = so32;
        n32 = e32 ? -n1 : n1;   // negative once e has risen
      end
      if (n1 > 2000) break;
    end
    check(n1 == 1152, $sformatf("1152 init cycles at 1 bit/cycle, saw %0d", n1));
    check(n32 == -36, $sformatf("36 init cycles at 32 bits/cycle, saw %0d", -n32));
    // after initialisation the state waits for go
    prev1 = so1;
    repeat (4) begin
      @(negedge clk);
      check(so1 == prev1 && e1, "state holds without go");
    end
    go = 1;
    @(negedge clk);
    check(so1 == nxt(prev1) && e1, "go advances the state");
    prev1 = so1;
    go = 0;
    @(negedge clk);
    check(so1 == prev1, "one step per go cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
