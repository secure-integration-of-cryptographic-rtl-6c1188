// tb_codesign_top: end-to-end test of the whole design at its default sizes.
// Four processes run at once on the shared clock:
//   - the 1-bit Trivium core is loaded, initialised (1152 cycles) and its
//     key stream compared bit by bit with the reference model, then
//     reloaded with another key in mid-stream;
//   - an APB master runs the coprocessor driver (program IV and key, load,
//     poll status while alternating commands 4/5, read key-stream words),
//     including repeated commands and one access to an unmapped address;
//   - a custom-instruction sequence loads the function unit's state, runs
//     the 18 advances of initialisation and reads 64-bit key-stream pairs;
//   - software sends words over the toggle handshake while the up/down
//     counter is watched.
// Each mechanism (load, initialisation finished, bus step, held command,
// bus error, unit state write, unit advance, held operand, handshake message,
// counter turning at 10 and at 0) is counted; one that never happens counts
// as a failure.
module tb_codesign_top;
  import trivium_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        t1_ld = 0, t1_z, t1_e;
  logic [79:0] t1_iv = 0, t1_key = 0;
  logic        apb_psel = 0, apb_penable = 0, apb_pwrite = 0;
  logic [31:0] apb_paddr = 0, apb_pwdata = 0, apb_prdata;
  logic        apb_pready, apb_pslverr;
  logic [31:0] sfu_op2_d1 = 0, sfu_op2_d2 = 0, sfu_op2_q1, sfu_op2_q2;
  logic [31:0] sfu_op3_d1 = 0, sfu_op3_d2 = 0, sfu_op3_d3 = 0, sfu_op3_q1;
  logic [31:0] mp_d = 0, mp_rd;
  logic        mp_req = 0, mp_ack;
  logic [3:0]  ud_a;

  int checks = 0, failures = 0;
  int n_load = 0, n_init = 0, n_bus_step = 0, n_bus_held = 0, n_bus_err = 0;
  int n_sfu_write = 0, n_sfu_adv = 0, n_sfu_held = 0, n_msg = 0, n_turn10 = 0, n_turn0 = 0;
  logic last_err;
  bit   done_ud = 0;

  codesign_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- 1-bit core ----------------
  task automatic t1_run(bit [79:0] k, bit [79:0] v, int nbits);
    trivium_ref r = new();
    int cyc = 0;
    r.load(k, v); r.init();
    @(negedge clk) begin t1_key = k; t1_iv = v; t1_ld = 1; end
    @(negedge clk) t1_ld = 0;
    n_load++;
    while (!t1_e && cyc < 2000) begin @(negedge clk); cyc++; end
    check(cyc == 1152, $sformatf("1-bit core initialisation %0d cycles", cyc));
    if (cyc == 1152) n_init++;
    for (int i = 0; i < nbits; i++) begin
      check(t1_z == r.step(), $sformatf("1-bit key stream bit %0d", i));
      @(negedge clk);
    end
  endtask

  // ---------------- APB coprocessor ----------------
  task automatic apb_write(logic [31:0] a, logic [31:0] d);
    @(negedge clk) begin apb_psel = 1; apb_penable = 0; apb_pwrite = 1; apb_paddr = a; apb_pwdata = d; end
    @(negedge clk) apb_penable = 1;
    #1 last_err = apb_pslverr;
    @(negedge clk) begin apb_psel = 0; apb_penable = 0; apb_pwrite = 0; end
    if (last_err) n_bus_err++;
  endtask
  task automatic apb_read(logic [31:0] a, output logic [31:0] d);
    @(negedge clk) begin apb_psel = 1; apb_penable = 0; apb_pwrite = 0; apb_paddr = a; end
    @(negedge clk) apb_penable = 1;
    #1 begin d = apb_prdata; last_err = apb_pslverr; end
    @(negedge clk) begin apb_psel = 0; apb_penable = 0; end
    if (last_err) n_bus_err++;
  endtask

  task automatic bus_run(bit [79:0] k, bit [79:0] v, int nwords);
    trivium_ref r = new();
    logic [31:0] rd, st;
    bit [63:0] w;
    bit [2:0] cmd;
    int polls = 0;
    r.load(k, v); r.init();
    for (int i = 0; i < 3; i++) begin
      apb_write(32'h8000_000C, (32'd1 << 24) | i);
      apb_write(32'h8000_0004, v[32*i +: 32]);
    end
    for (int i = 0; i < 3; i++) begin
      apb_write(32'h8000_000C, (32'd2 << 24) | i);
      apb_write(32'h8000_0004, k[32*i +: 32]);
    end
    apb_write(32'h8000_000C, 32'd0);
    apb_write(32'h8000_000C, 32'd3 << 24);
    apb_write(32'h8000_000C, 32'd4 << 24);     // release the load
    cmd = 3'd4;
    do begin
      apb_read(32'h8000_0008, st);
      polls++;
    end while (!st[0] && polls < 100);
    check(st == 32'd1, "coprocessor status");
    for (int n = 0; n < nwords; n++) begin
      w = r.word(32);
      apb_read(32'h8000_0000, rd);
      check(rd == w[31:0], $sformatf("coprocessor word %0d: %h expected %h", n, rd, w[31:0]));
      if (n % 4 == 1) begin
        apb_write(32'h8000_000C, 32'(cmd) << 24);   // same command: no step
        apb_read(32'h8000_0000, rd);
        check(rd == w[31:0], "held command does not step");
        n_bus_held++;
      end
      cmd = (cmd == 3'd4) ? 3'd5 : 3'd4;
      apb_write(32'h8000_000C, 32'(cmd) << 24);
      n_bus_step++;
    end
    apb_read(32'h8000_0020, rd);
    check(last_err, "unmapped address reports an error");
  endtask

  // ---------------- function unit ----------------
  task automatic sfu_issue3(logic [31:0] d1, logic [31:0] d2, logic [31:0] d3);
    @(negedge clk) begin sfu_op3_d1 = d1; sfu_op3_d2 = d2; sfu_op3_d3 = d3; end
    repeat (2) @(negedge clk);
  endtask
  task automatic sfu_issue2(logic [31:0] d1);
    @(negedge clk) sfu_op2_d1 = d1;
    repeat (2) @(negedge clk);
  endtask

  task automatic sfu_run(bit [79:0] k, bit [79:0] v, int npairs);
    trivium_ref r = new();
    bit [287:0] st;
    bit [63:0] w1, w2;
    r.load(k, v);
    st = r.get_vec();
    r.init();
    for (int i = 0; i < 9; i++) begin
      sfu_issue3(st[32*i +: 32], i, sfu_op3_d3 + 1);
      n_sfu_write++;
    end
    for (int i = 0; i < 9; i++) begin
      sfu_issue2(1); sfu_issue2(0);
      n_sfu_adv += 2;
    end
    for (int i = 0; i < npairs; i++) begin
      w1 = r.word(32); w2 = r.word(32);
      check(sfu_op2_q1 == w1[31:0] && sfu_op2_q2 == w2[31:0],
            $sformatf("unit pair %0d", i));
      if (i % 5 == 2) begin
        sfu_issue2(sfu_op2_d1);             // same value: no advance
        check(sfu_op2_q1 == w1[31:0], "held operand does not advance");
        n_sfu_held++;
      end
      sfu_issue2({31'd0, ~sfu_op2_d1[0]});
      n_sfu_adv++;
    end
  endtask

  // ---------------- handshake and counter ----------------
  task automatic mp_send(logic [31:0] v);
    int t = 0;
    @(negedge clk) begin mp_d = v; mp_req = ~mp_req; end
    while (mp_ack != mp_req && t < 20) begin @(negedge clk); t++; end
    check(mp_ack == mp_req && mp_rd == v, $sformatf("message %h", v));
    n_msg++;
  endtask

  always @(negedge clk) if (rst_n && !done_ud) begin : watch_ud
    logic [3:0] p1, p2;
    check(ud_a <= 4'd10, "counter within 0..10");
    if (p1 == 4'd10 && ud_a == 4'd9 && p2 == 4'd9) n_turn10++;
    if (p1 == 4'd0  && ud_a == 4'd1 && p2 == 4'd1) n_turn0++;
    p2 = p1;
    p1 = ud_a;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    fork
      begin
        t1_run({16'h0102, 32'h03040506, 32'h0708090a}, {16'hf0e1, 32'hd2c3b4a5, 32'h96877869}, 300);
        t1_run(80'h80, 80'h0, 200);
      end
      begin
        bus_run(80'h80, 80'h0, 12);
        bus_run({16'h1111, 32'h22223333, 32'h44445555}, {16'h6666, 32'h77778888, 32'h9999aaaa}, 12);
      end
      sfu_run({16'hbeef, 32'hfeedface, 32'h0badcafe}, {16'h0001, 32'h00000002, 32'h00000003}, 40);
      for (int i = 0; i < 50; i++) begin
        mp_send($urandom);
        repeat (i % 4) @(negedge clk);
      end
    join
    done_ud = 1;
    check(n_load > 0,      "mechanism: core load");
    check(n_init > 0,      "mechanism: initialisation finished");
    check(n_bus_step > 0,  "mechanism: bus command step");
    check(n_bus_held > 0,  "mechanism: held bus command");
    check(n_bus_err > 0,   "mechanism: bus error");
    check(n_sfu_write > 0, "mechanism: unit state write");
    check(n_sfu_adv > 0,   "mechanism: unit advance");
    check(n_sfu_held > 0,  "mechanism: held unit operand");
    check(n_msg > 0,       "mechanism: handshake message");
    check(n_turn10 > 0,    "mechanism: counter turns at 10");
    check(n_turn0 > 0,     "mechanism: counter turns at 0");
    $display("mechanisms: load=%0d init=%0d bus_step=%0d bus_held=%0d bus_err=%0d sfu_write=%0d sfu_adv=%0d sfu_held=%0d msg=%0d turn10=%0d turn0=%0d",
             n_load, n_init, n_bus_step, n_bus_held, n_bus_err, n_sfu_write, n_sfu_adv, n_sfu_held, n_msg, n_turn10, n_turn0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
