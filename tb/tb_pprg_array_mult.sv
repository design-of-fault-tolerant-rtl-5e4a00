// tb_pprg_array_mult: exhaustive test of the PPRG array multiplier.
//
// Runs three instances: the default 4x4, and 2x3 and 3x2 (the sizes of the
// published multipliers). For every operand pair the product must equal
// a*b and the XOR of all partial products (computed here) must equal the
// XOR of the product and the garbage outputs. Counts products whose top
// bit is set, so that the carry out of the last stage is known to be used.
module tb_pprg_array_mult;
  logic [3:0] a44, b44;  logic [7:0] p44;  logic [35:0] g44;  logic par44;
  logic [1:0] a23;  logic [2:0] b23;  logic [4:0] p23;  logic [11:0] g23;  logic par23;
  logic [2:0] a32;  logic [1:0] b32;  logic [4:0] p32;  logic [8:0]  g32;  logic par32;
  int checks = 0, failures = 0, top_bits = 0;

  pprg_array_mult                 u44 (.a_i(a44), .b_i(b44), .p_o(p44), .garbage_o(g44), .pp_parity_o(par44));
  pprg_array_mult #(.M(2), .N(3)) u23 (.a_i(a23), .b_i(b23), .p_o(p23), .garbage_o(g23), .pp_parity_o(par23));
  pprg_array_mult #(.M(3), .N(2)) u32 (.a_i(a32), .b_i(b32), .p_o(p32), .garbage_o(g32), .pp_parity_o(par32));

  function automatic logic pp_xor(input int x, input int y, input int m, input int n);
    logic r = 1'b0;
    for (int i = 0; i < m; i++)
      for (int j = 0; j < n; j++)
        r ^= x[i] & y[j];
    return r;
  endfunction

  task automatic check(input bit cond, input string what, input int x, input int y);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d", what, x, y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a44 = 4'(x); b44 = 4'(y);
        a23 = 2'(x); b23 = 3'(y);
        a32 = 3'(x); b32 = 2'(y);
        #1;
        check(p44 == 8'(x * y), "4x4 product", x, y);
        check(par44 == pp_xor(x, y, 4, 4) && par44 == ^{p44, g44}, "4x4 parity", x, y);
        if (p44[7]) top_bits++;
        if (x < 4 && y < 8) begin
          check(p23 == 5'(x * y), "2x3 product", x, y);
          check(par23 == pp_xor(x, y, 2, 3) && par23 == ^{p23, g23}, "2x3 parity", x, y);
        end
        if (x < 8 && y < 4) begin
          check(p32 == 5'(x * y), "3x2 product", x, y);
          check(par32 == pp_xor(x, y, 3, 2) && par32 == ^{p32, g32}, "3x2 parity", x, y);
        end
      end
    end
    check(top_bits > 0, "top product bit never set", 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
