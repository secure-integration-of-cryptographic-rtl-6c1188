// tb_trivium_itf: drives the register-side inputs of the Trivium bus
// interface the way a driver would: IV and key written word by word with
// commands 1 and 2, load with command 3, then steps with alternating
// commands 4 and 5 (each value held several cycles, repeated values giving
// no extra step). Checks status, every key-stream word against the
// reference model, that repeated commands do not step, that the 36-cycle
// initialisation of the 32-bit core is met, and that word 2 keeps 16 bits.
module tb_trivium_itf;
  import trivium_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [31:0] din = 0, ctl = 0, dout, status;
  int checks = 0, failures = 0;

  trivium_itf dut (.clk, .rst_n, .din, .ctl, .dout, .status);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // one register write followed by a few idle cycles, like a processor
  task automatic wr_ctl(logic [31:0] v, int hold = 3);
    @(negedge clk) ctl = v;
    repeat (hold) @(negedge clk);
  endtask
  task automatic wr_din(logic [31:0] v);
    @(negedge clk) din = v;
    repeat (3) @(negedge clk);
  endtask

  task automatic program_and_check(bit [79:0] k, bit [79:0] v, int nwords);
    trivium_ref r = new();
    bit [63:0] w;
    int cyc;
    bit [2:0] cmd;
    r.load(k, v); r.init();
    for (int i = 0; i < 3; i++) begin     // IV: control first, then data
      wr_ctl((32'd1 << 24) | i);
      wr_din(v[32*i +: 32]);
    end
    for (int i = 0; i < 3; i++) begin     // key
      wr_ctl((32'd2 << 24) | i);
      wr_din(k[32*i +: 32]);
    end
    wr_ctl(32'd0);
    wr_din(32'hffff_ffff);                 // no command selected: ignored
    wr_ctl(32'd3 << 24);
    check(status == 0, "status low while loading");
    @(negedge clk) ctl = 32'd4 << 24;      // release load
    cyc = 0;
    while (status[0] == 0 && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 36, $sformatf("36-cycle initialisation, saw %0d", cyc));
    cmd = 3'd4;
    for (int n = 0; n < nwords; n++) begin
      w = r.word(32);
      check(status == 32'd1 && dout == w[31:0],
            $sformatf("word %0d: %h expected %h", n, dout, w[31:0]));
      wr_ctl(32'(cmd) << 24, 2);
      wr_ctl(32'(cmd) << 24, 2);            // same command again: no step
      check(dout == w[31:0], "repeated command does not step");
      cmd = (cmd == 3'd4) ? 3'd5 : 3'd4;
      wr_ctl(32'(cmd) << 24, 2);            // change: one step
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // the document's driver values: IV 0, key word 0 = 0x80
    program_and_check(80'h80, 80'h0, 8);
    program_and_check({16'ha5c3, 32'h01234567, 32'h89abcdef},
                      {16'h5a3c, 32'hfedcba98, 32'h76543210}, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
