// tb_pprg_half_adder: exhaustive test of the PPRG half adder.
// Checks sum and carry against a+b and the parity relation
// a^b == sum^carry^(xor of the three garbage outputs) for all four inputs.
module tb_pprg_half_adder;
  logic a, b, s, co;
  logic [2:0] g;
  int checks = 0, failures = 0;

  pprg_half_adder dut (.a_i(a), .b_i(b), .sum_o(s), .carry_o(co), .garbage_o(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[1:0];
      #1;
      checks++;
      if ({co, s} != 2'(a + b)) begin
        failures++;
        $display("FAIL sum: a=%b b=%b got carry=%b sum=%b", a, b, co, s);
      end
      checks++;
      if ((a ^ b) != (s ^ co ^ (^g))) begin
        failures++;
        $display("FAIL parity: a=%b b=%b g=%b", a, b, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
