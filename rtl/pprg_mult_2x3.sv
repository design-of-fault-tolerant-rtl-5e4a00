// pprg_mult_2x3: 2-bit by 3-bit array multiplier on one 4-bit PPRG adder.
//
// The six partial products a[i]&b[j] are arranged as two 4-bit operands of
// a pprg_parallel_adder, following the published operand map:
//   adder A = {0,      a1b1, a1b0, a0b0}
//   adder B = {a1b2,   a0b2, a0b1, 0   }
// Every partial product sits at its weight i+j, so the adder's 4-bit sum
// and carry out form the full 5-bit product p = a*b (P4 is the carry out).
// The partial products are plain AND terms; only the addition uses PPRG
// cells, which gives 4 cells x 3 = 12 garbage outputs, brought out on
// garbage_o. pp_parity_o is the XOR of the eight adder operand bits: for a
// fault-free adder it equals the XOR of p_o and garbage_o.
//
// Purely combinational, no clock.
module pprg_mult_2x3
  import pprg_pkg::*;
(
  input  logic [1:0]  a_i,
  input  logic [2:0]  b_i,
  output logic [4:0]  p_o,
  output logic [11:0] garbage_o,
  output logic        pp_parity_o
);

  logic [3:0] op_a, op_b;

  always_comb begin
    op_a = {1'b0,            a_i[1] & b_i[1], a_i[1] & b_i[0], a_i[0] & b_i[0]};
    op_b = {a_i[1] & b_i[2], a_i[0] & b_i[2], a_i[0] & b_i[1], 1'b0};
  end

  pprg_parallel_adder #(.N(4)) u_pa (
    .a_i       (op_a),
    .b_i       (op_b),
    .s_o       (p_o[3:0]),
    .co_o      (p_o[4]),
    .garbage_o (garbage_o)
  );

  assign pp_parity_o = ^{op_a, op_b};

endmodule
