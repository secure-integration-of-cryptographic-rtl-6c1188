// tb_msg_rcv: software side of the toggle handshake. Sends 100 random words
// (place data, invert req, wait for ack == req) and checks that each word is
// received, that ack follows req after one cycle, and that changing d while
// no request is pending does not disturb the received word. Also measures
// the round trip (req toggle to ack seen), which must be one cycle here.
module tb_msg_rcv;
  logic        clk = 0, rst_n = 0, req = 0, ack;
  logic [31:0] d = 0, rd;
  int checks = 0, failures = 0;

  msg_rcv dut (.*);

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
    logic [31:0] v;
    int wait_cyc;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(ack == 0 && rd == 0, "reset values");
    for (int n = 0; n < 100; n++) begin
      v = $urandom;
      @(negedge clk) begin d = v; req = ~req; end
      wait_cyc = 0;
      while (ack != req) begin
        @(negedge clk);
        wait_cyc++;
        if (wait_cyc > 10) break;
      end
      check(wait_cyc == 1, $sformatf("ack after %0d cycles", wait_cyc));
      check(rd == v, $sformatf("word %0d received %h expected %h", n, rd, v));
      repeat (n % 3) begin
        @(negedge clk) d = $urandom;        // no request pending
      end
      @(negedge clk);
      check(rd == v, "idle data change ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
