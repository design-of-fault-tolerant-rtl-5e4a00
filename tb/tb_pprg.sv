// tb_pprg: exhaustive self-checking test of the 5x5 PPRG.
//
// Applies all 32 input patterns and checks, against values computed here
// from the gate's equations and properties:
//   - every output P..T against a reference model,
//   - parity preservation (XOR of outputs == XOR of inputs),
//   - reversibility (the 32 output patterns are all different),
//   - the NOR mode (B=1, D=0 gives Q = ~(A|C)),
//   - the half adder and full adder modes used by the adder cells.
// A watchdog stops the run if it does not finish in time.
module tb_pprg;
  import pprg_pkg::*;

  pprg_in_t  gin;
  pprg_out_t gout;
  int checks = 0, failures = 0;
  bit [31:0] seen;

  pprg dut (.in_i(gin), .out_o(gout));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: in=%05b out=%05b", what, gin, gout);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a, b, c, d, e, x;
    logic [4:0] ref_out;
    seen = '0;
    for (int v = 0; v < 32; v++) begin
      gin = pprg_in_t'(v[4:0]);
      #1;
      {a, b, c, d, e} = v[4:0];
      x = ~(a | c) ^ ~b;  // ~A.~C xor ~B
      ref_out = {a,
                 x ^ d,
                 (x & d) ^ (a & b) ^ c,
                 (a & ~b) ^ c ^ (~x & d),
                 d ^ e ^ (a & c)};
      check(gout == pprg_out_t'(ref_out), "outputs");
      check((^gout) == (^gin), "parity preserved");
      check(!seen[gout], "reversible (output not seen before)");
      seen[gout] = 1'b1;
      if (b && !d) check(gout.q == ~(a | c), "NOR mode");
      if (!c && !d && !e) check({gout.r, gout.q} == 2'(a + b), "half adder mode");
      if (!c && !e) check({gout.r, gout.q} == 2'(a + b + d), "full adder mode");
    end
    check(seen == '1, "all 32 outputs reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
