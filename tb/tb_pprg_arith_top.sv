// tb_pprg_arith_top: end-to-end test of the top with default parameters.
//
// - Both multipliers: all operand pairs; product against a*b, parity error
//   flag must stay 0.
// - 4x4 array multiplier: all operand pairs; product against a*b, parity
//   error flag must stay 0.
// - Adder/subtractor: the published case 15+7=22, corner cases and random
//   vectors in both modes with and without carry/borrow in; sum and carry
//   out against integer arithmetic, parity error flag must stay 0.
// - Fault detection: single output bits inside each unit are forced to the
//   wrong value; the unit's parity error flag must then be 1.
// Every mechanism (multiplier carry into P4, add, subtract, carry/borrow in,
// carry out, detected fault in each unit) is counted and must occur.
module tb_pprg_arith_top;
  localparam int unsigned N = 16;

  logic [1:0] m23_a;  logic [2:0] m23_b;  logic [4:0] m23_p;  logic [11:0] m23_g;  logic m23_err;
  logic [2:0] m32_a;  logic [1:0] m32_b;  logic [4:0] m32_p;  logic [11:0] m32_g;  logic m32_err;
  logic [3:0] arr_a, arr_b;  logic [7:0] arr_p;  logic [35:0] arr_g;  logic arr_err;
  logic [7:0] farr;
  logic [N-1:0] add_a, add_b, add_s, add_carry;
  logic add_c, add_cntrl, add_co, add_err;
  logic [7*N+3:0] add_g;

  logic [3:0] f23, f32;      // forced (faulty) values
  logic [N-1:0] fadd;
  int checks = 0, failures = 0;
  int n_p4_23 = 0, n_p4_32 = 0, n_add = 0, n_sub = 0, n_cin = 0, n_cout = 0;
  int n_p7_arr = 0, n_det_arr = 0;
  int n_det_23 = 0, n_det_32 = 0, n_det_add = 0;

  pprg_arith_top dut (
    .m23_a_i(m23_a), .m23_b_i(m23_b), .m23_p_o(m23_p), .m23_garbage_o(m23_g), .m23_parity_err_o(m23_err),
    .m32_a_i(m32_a), .m32_b_i(m32_b), .m32_p_o(m32_p), .m32_garbage_o(m32_g), .m32_parity_err_o(m32_err),
    .arr_a_i(arr_a), .arr_b_i(arr_b), .arr_p_o(arr_p), .arr_garbage_o(arr_g), .arr_parity_err_o(arr_err),
    .add_a_i(add_a), .add_b_i(add_b), .add_c_i(add_c), .add_cntrl_i(add_cntrl),
    .add_s_o(add_s), .add_co_o(add_co), .add_carry_o(add_carry), .add_garbage_o(add_g),
    .add_parity_err_o(add_err)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_add(input logic [N-1:0] ta, input logic [N-1:0] tb,
                         input logic tc, input logic tm);
    logic [N:0] full;
    add_a = ta; add_b = tb; add_c = tc; add_cntrl = tm;
    #1;
    full = {1'b0, ta} + {1'b0, (tm ? ~tb : tb)} + (N+1)'(tc ^ tm);
    check({add_co, add_s} == full, "adder/subtractor result");
    check(!add_err, "adder parity flag clear");
    if (tm) n_sub++; else n_add++;
    if (tc) n_cin++;
    if (add_co) n_cout++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    add_a = '0; add_b = '0; add_c = 1'b0; add_cntrl = 1'b0;
    m23_a = '0; m23_b = '0; m32_a = '0; m32_b = '0; arr_a = '0; arr_b = '0;

    // Multipliers, exhaustive.
    for (int x = 0; x < 8; x++) begin
      for (int y = 0; y < 8; y++) begin
        m23_a = 2'(x); m23_b = 3'(y);
        m32_a = 3'(y); m32_b = 2'(x);
        #1;
        if (x < 4) begin
          check(m23_p == 5'((x % 4) * y), "2x3 product");
          check(m32_p == 5'(y * (x % 4)), "3x2 product");
          check(!m23_err && !m32_err, "multiplier parity flags clear");
          if (m23_p[4]) n_p4_23++;
          if (m32_p[4]) n_p4_32++;
        end
      end
    end

    // Array multiplier, exhaustive.
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        arr_a = 4'(x); arr_b = 4'(y);
        #1;
        check(arr_p == 8'(x * y), "4x4 product");
        check(!arr_err, "array multiplier parity flag clear");
        if (arr_p[7]) n_p7_arr++;
      end
    end

    // Adder/subtractor.
    run_add(16'h000F, 16'h0007, 1'b0, 1'b0);
    check(add_s == 16'h0016 && add_carry == 16'h000F, "published case 15+7");
    run_add(16'hFFFF, 16'h0001, 1'b0, 1'b0);
    run_add(16'h0000, 16'h0001, 1'b0, 1'b1);
    for (int i = 0; i < 2000; i++)
      run_add(N'($urandom), N'($urandom), 1'($urandom), 1'($urandom));

    // Fault detection: force one cell output wrong in each unit.
    m23_a = 2'd3; m23_b = 3'd7; m32_a = 3'd5; m32_b = 2'd3; arr_a = 4'd13; arr_b = 4'd11;
    add_a = 16'h1234; add_b = 16'h0F0F; add_c = 1'b0; add_cntrl = 1'b0;
    #1;
    check(!m23_err && !m32_err && !add_err && !arr_err, "flags clear before fault");
    for (int k = 0; k < 4; k++) begin
      f23  = 4'((3 * 7) ^ (1 << k));
      f32  = 4'((5 * 3) ^ (1 << k));
      farr = 8'((13 * 11) ^ (1 << (2 * k)));
      fadd = N'((32'h1234 + 32'h0F0F) ^ (1 << (4 * k)));
      force dut.u_m23.u_pa.s_o = f23;
      force dut.u_m32.u_pa.s_o = f32;
      force dut.u_add.s_o      = fadd;
      force dut.u_arr.p_o      = farr;
      #1;
      check(m23_err, "2x3 fault detected");
      check(m32_err, "3x2 fault detected");
      check(add_err, "adder fault detected");
      check(arr_err, "array multiplier fault detected");
      if (arr_err) n_det_arr++;
      if (m23_err) n_det_23++;
      if (m32_err) n_det_32++;
      if (add_err) n_det_add++;
      release dut.u_m23.u_pa.s_o;
      release dut.u_m32.u_pa.s_o;
      release dut.u_add.s_o;
      release dut.u_arr.p_o;
      #1;
    end
    #1;
    check(!m23_err && !m32_err && !add_err && !arr_err, "flags clear after release");

    $display("mechanisms: 2x3 P4=%0d 3x2 P4=%0d add=%0d sub=%0d cin=%0d cout=%0d det23=%0d det32=%0d detadd=%0d arrP7=%0d detarr=%0d",
             n_p4_23, n_p4_32, n_add, n_sub, n_cin, n_cout, n_det_23, n_det_32, n_det_add, n_p7_arr, n_det_arr);
    check(n_p7_arr > 0, "array multiplier top product bit happened");
    check(n_det_arr > 0, "array multiplier fault detection happened");
    check(n_p4_23 > 0, "2x3 carry into P4 happened");
    check(n_p4_32 > 0, "3x2 carry into P4 happened");
    check(n_add > 0 && n_sub > 0, "add and subtract happened");
    check(n_cin > 0 && n_cout > 0, "carry in and carry out happened");
    check(n_det_23 > 0 && n_det_32 > 0 && n_det_add > 0, "fault detection happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
