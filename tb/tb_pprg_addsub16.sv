// tb_pprg_addsub16: self-checking test of the 16-bit PPRG adder/subtractor.
//
// First repeats the published waveform case (a=15, b=7, c=0, cntrl=0 gives
// s=22, co=0 and carries set out of bits 0..3 only), then runs directed
// corner cases and random operands in both modes with c=0 and c=1. Sum,
// carry out and every internal carry are compared with a reference built
// from integer arithmetic here; the parity relation
// (XOR of external gate inputs == XOR of s, co and garbage) is checked on
// every vector.
module tb_pprg_addsub16;
  localparam int unsigned N = 16;
  logic [N-1:0] a, b, s, carry;
  logic c, cntrl, co, in_par;
  logic [7*N+3:0] g;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_cin = 0, n_cout = 0;

  pprg_addsub16 #(.N(N)) dut (
    .a_i(a), .b_i(b), .c_i(c), .cntrl_i(cntrl),
    .s_o(s), .co_o(co), .carry_o(carry), .garbage_o(g), .in_parity_o(in_par)
  );

  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb,
                       input logic tc, input logic tm);
    logic [N:0]   full;
    logic [N-1:0] bb, ref_carry;
    logic         ci, ref_par;
    a = ta; b = tb; c = tc; cntrl = tm;
    #1;
    bb = tm ? ~tb : tb;
    ci = tc ^ tm;
    full = {1'b0, ta} + {1'b0, bb} + (N+1)'(ci);
    for (int k = 0; k < N; k++) begin
      logic [N:0] part;
      part = ({1'b0, ta} & ((N+1)'(1) << (k+1)) - 1) + ({1'b0, bb} & ((N+1)'(1) << (k+1)) - 1)
             + (N+1)'(ci);
      ref_carry[k] = part[k+1];
    end
    checks++;
    if ({co, s} != full) begin
      failures++;
      $display("FAIL sum: a=%h b=%h c=%b cntrl=%b got co=%b s=%h exp %h", ta, tb, tc, tm, co, s, full);
    end
    checks++;
    if (carry != ref_carry) begin
      failures++;
      $display("FAIL carries: got %b exp %b", carry, ref_carry);
    end
    if (tm == 1'b0 && tc == 1'b0) begin
      checks++;
      if (s != ta + tb) begin failures++; $display("FAIL add"); end
    end
    if (tm == 1'b1 && tc == 1'b0) begin
      checks++;
      if (s != ta - tb || co != (ta >= tb)) begin failures++; $display("FAIL subtract"); end
    end
    ref_par = (^ta) ^ (^tb) ^ tc ^ tm;  // cntrl feeds N+1 = 17 inverter cells
    checks++;
    if (in_par != ref_par || ref_par != (^{s, co, g})) begin
      failures++;
      $display("FAIL parity: a=%h b=%h", ta, tb);
    end
    if (tm) n_sub++; else n_add++;
    if (tc) n_cin++;
    if (co) n_cout++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Published simulation case.
    apply(16'h000F, 16'h0007, 1'b0, 1'b0);
    checks++;
    if (s != 16'h0016 || co != 1'b0 || carry != 16'h000F) begin
      failures++;
      $display("FAIL published case: s=%h co=%b carry=%b", s, co, carry);
    end
    apply('1, 16'h0001, 1'b0, 1'b0);   // full-length ripple
    apply('0, 16'h0001, 1'b0, 1'b1);   // 0 - 1, borrow out
    apply(16'h1234, 16'h1234, 1'b0, 1'b1);
    apply('1, '1, 1'b1, 1'b0);
    for (int i = 0; i < 4000; i++)
      apply(N'($urandom), N'($urandom), 1'($urandom), 1'($urandom));
    checks++;
    if (n_add == 0 || n_sub == 0 || n_cin == 0 || n_cout == 0) begin
      failures++;
      $display("FAIL a mode was never exercised");
    end
    $display("add %0d, subtract %0d, carry/borrow in %0d, carry out %0d", n_add, n_sub, n_cin, n_cout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
