// tb_updown: checks the up/down FSMD counter cycle by cycle for 100 cycles
// against the sequence 0..10..0 worked out independently (a triangle wave
// of period 20), and that it never leaves 0..10.
module tb_updown;
  logic       clk = 0, rst_n = 0;
  logic [3:0] a;
  int checks = 0, failures = 0;

  updown dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v, ph;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 100; t++) begin
      ph = t % 20;
      exp_v = (ph <= 10) ? ph : 20 - ph;
      checks++;
      if (a != 4'(exp_v)) begin
        failures++;
        $display("FAIL cycle %0d: a=%0d expected %0d", t, a, exp_v);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
