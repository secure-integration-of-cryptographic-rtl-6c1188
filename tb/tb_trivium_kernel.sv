// tb_trivium_kernel: checks the combinational Trivium round logic against
// the bit-level reference model, for random states, at 1 round (the
// default) and at 32 rounds per evaluation.
module tb_trivium_kernel;
  import trivium_ref_pkg::*;

  logic [287:0] si, so1, so32;
  logic         z1;
  logic [31:0]  z32;
  int checks = 0, failures = 0;
  trivium_ref ref_m = new();

  trivium_kernel              dut1  (.si, .so(so1),  .z(z1));
  trivium_kernel #(.BITS(32)) dut32 (.si, .so(so32), .z(z32));

  function automatic logic [287:0] rand288();
    logic [287:0] v;
    for (int k = 0; k < 9; k++) v[32*k +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [287:0] exp_s;
    bit         exp_z;
    bit [63:0]  exp_w;
    for (int n = 0; n < 200; n++) begin
      si = (n == 0) ? 288'd0 : (n == 1) ? '1 : rand288();
      #1;
      ref_m.set_vec(si);
      exp_z = ref_m.step();
      exp_s = ref_m.get_vec();
      checks++;
      if (z1 !== exp_z || so1 !== exp_s) begin
        failures++;
        $display("FAIL 1-bit n=%0d z=%b exp=%b", n, z1, exp_z);
      end
      ref_m.set_vec(si);
      exp_w = ref_m.word(32);
      exp_s = ref_m.get_vec();
      checks++;
      if (z32 !== exp_w[31:0] || so32 !== exp_s) begin
        failures++;
        $display("FAIL 32-bit n=%0d z=%h exp=%h", n, z32, exp_w[31:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
