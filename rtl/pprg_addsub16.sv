// pprg_addsub16: N-bit (default 16) ripple adder/subtractor made only of
// PPRG cells.
//
// Every bit has two PPRG cells. The first is used as a controlled inverter
// (gate ports A=C=E=0, B=b[i], D=cntrl, so Q = b[i]^cntrl); the second is a
// PPRG full adder that adds a[i], the possibly inverted b[i] and the carry
// of bit i-1. One more controlled-inverter cell forms the carry into bit 0
// as c^cntrl. So:
//   cntrl=0: {co, s} = a + b + c                (c is a carry in)
//   cntrl=1: {co, s} = a + ~b + ~c = a - b - c  (c is a borrow in; co=1
//                                                means no borrow out)
// carry_o[k] is the carry out of bit k (carry into bit k+1); co_o equals
// carry_o[N-1].
//
// Garbage outputs: three per full-adder cell (P,S,T) and four per inverter
// cell (P,R,S,T), on garbage_o. in_parity_o is the XOR of all gate inputs
// that come from outside (a, b, c, and cntrl once per inverter cell); for
// a fault-free circuit it equals the XOR of s_o, co_o and garbage_o.
//
// Only the width, the port names and one addition (15+7=22) come from a
// published simulation; the add/subtract meaning of cntrl, the carry/borrow
// meaning of c and the controlled-inverter cells are this design's choice.
// Purely combinational, no clock.
module pprg_addsub16
  import pprg_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]       a_i,
  input  logic [N-1:0]       b_i,
  input  logic               c_i,       // carry in (add) / borrow in (subtract)
  input  logic               cntrl_i,   // 0: add, 1: subtract
  output logic [N-1:0]       s_o,
  output logic               co_o,
  output logic [N-1:0]       carry_o,
  output logic [7*N+3:0]     garbage_o, // [3N-1:0] adders, then 4 per inverter
  output logic               in_parity_o
);

  localparam int unsigned INV_BASE = GARBAGE_PER_CELL * N;

  logic [N-1:0] b_eff;
  logic         cin0;

  // Controlled inverter on the carry into bit 0.
  pprg_in_t  cin_gin;
  pprg_out_t cin_gout;
  always_comb begin
    cin_gin   = '0;
    cin_gin.b = c_i;
    cin_gin.d = cntrl_i;
  end
  pprg u_cin_inv (.in_i(cin_gin), .out_o(cin_gout));
  assign cin0 = cin_gout.q;
  assign garbage_o[INV_BASE + 4*N +: 4] = {cin_gout.p, cin_gout.r, cin_gout.s, cin_gout.t};

  for (genvar i = 0; i < N; i++) begin : g_bit
    pprg_in_t  inv_gin;
    pprg_out_t inv_gout;
    logic      cin;

    always_comb begin
      inv_gin   = '0;
      inv_gin.b = b_i[i];
      inv_gin.d = cntrl_i;
    end
    pprg u_inv (.in_i(inv_gin), .out_o(inv_gout));
    assign b_eff[i] = inv_gout.q;
    assign garbage_o[INV_BASE + 4*i +: 4] = {inv_gout.p, inv_gout.r, inv_gout.s, inv_gout.t};

    if (i == 0) begin : g_first
      assign cin = cin0;
    end else begin : g_rest
      assign cin = carry_o[i-1];
    end

    pprg_full_adder u_fa (
      .a_i       (a_i[i]),
      .b_i       (b_eff[i]),
      .cin_i     (cin),
      .sum_o     (s_o[i]),
      .carry_o   (carry_o[i]),
      .garbage_o (garbage_o[GARBAGE_PER_CELL*i +: GARBAGE_PER_CELL])
    );
  end

  assign co_o        = carry_o[N-1];
  assign in_parity_o = ^a_i ^ ^b_i ^ c_i ^ (cntrl_i & ((N + 1) % 2 == 1));

endmodule
