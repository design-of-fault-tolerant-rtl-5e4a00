// tb_pprg_full_adder: exhaustive test of the PPRG full adder.
// Checks sum and carry against a+b+cin and the parity relation
// a^b^cin == sum^carry^(xor of the three garbage outputs) for all eight
// inputs.
module tb_pprg_full_adder;
  logic a, b, ci, s, co;
  logic [2:0] g;
  int checks = 0, failures = 0;

  pprg_full_adder dut (.a_i(a), .b_i(b), .cin_i(ci), .sum_o(s), .carry_o(co), .garbage_o(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = v[2:0];
      #1;
      checks++;
      if ({co, s} != 2'(a + b + ci)) begin
        failures++;
        $display("FAIL sum: a=%b b=%b cin=%b got carry=%b sum=%b", a, b, ci, co, s);
      end
      checks++;
      if ((a ^ b ^ ci) != (s ^ co ^ (^g))) begin
        failures++;
        $display("FAIL parity: a=%b b=%b cin=%b g=%b", a, b, ci, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
