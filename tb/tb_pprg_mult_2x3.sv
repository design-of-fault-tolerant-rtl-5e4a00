// tb_pprg_mult_2x3: exhaustive test of the 2 by 3 PPRG array multiplier.
// For every operand pair the 5-bit product must equal a*b and the parity
// relation XOR(all partial products) == ^{product, garbage} must hold; the number of
// garbage outputs is checked to be 12.
module tb_pprg_mult_2x3;
  logic [1:0] a;
  logic [2:0] b;
  logic [4:0] p;
  logic [11:0] g;
  logic pp_par, pp_ref;
  int checks = 0, failures = 0;

  pprg_mult_2x3 dut (.a_i(a), .b_i(b), .p_o(p), .garbage_o(g), .pp_parity_o(pp_par));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if ($bits(g) != 12) failures++;
    for (int x = 0; x < 4; x++) begin
      for (int y = 0; y < 8; y++) begin
        a = 2'(x);
        b = 3'(y);
        #1;
        checks++;
        if (p != 5'(x * y)) begin
          failures++;
          $display("FAIL product: %0d * %0d got %0d", x, y, p);
        end
        checks++;
        pp_ref = 1'b0;
        foreach (a[i]) foreach (b[j]) pp_ref ^= a[i] & b[j];
        if (pp_par != pp_ref || pp_ref != (^{p, g})) begin
          failures++;
          $display("FAIL parity: %0d * %0d", x, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
