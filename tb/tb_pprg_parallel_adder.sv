// tb_pprg_parallel_adder: exhaustive test of the 4-bit PPRG parallel adder.
// All 256 operand pairs: {co, s} must equal a+b, and the parity relation
// ^{a,b} == ^{s, co, garbage} must hold. Also counts how often the carry
// out is set, so that the full ripple path is known to be exercised.
module tb_pprg_parallel_adder;
  localparam int unsigned N = 4;
  logic [N-1:0] a, b, s;
  logic co;
  logic [3*N-1:0] g;
  int checks = 0, failures = 0, carries = 0, full_ripples = 0;

  pprg_parallel_adder #(.N(N)) dut (.a_i(a), .b_i(b), .s_o(s), .co_o(co), .garbage_o(g));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < (1 << N); x++) begin
      for (int y = 0; y < (1 << N); y++) begin
        a = N'(x);
        b = N'(y);
        #1;
        checks++;
        if ({co, s} != (N+1)'(x + y)) begin
          failures++;
          $display("FAIL sum: %0d + %0d got co=%b s=%0d", x, y, co, s);
        end
        checks++;
        if ((^{a, b}) != (^{s, co, g})) begin
          failures++;
          $display("FAIL parity: %0d + %0d", x, y);
        end
        if (co) carries++;
        if ((x ^ y) == (1 << N) - 2 && (x & y & 1) != 0) full_ripples++;
      end
    end
    checks++;
    if (carries == 0 || full_ripples == 0) begin
      failures++;
      $display("FAIL carry out or full ripple never exercised");
    end
    $display("carry out set %0d times, full-length ripples %0d", carries, full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
