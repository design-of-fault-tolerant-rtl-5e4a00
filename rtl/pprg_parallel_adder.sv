// pprg_parallel_adder: N-bit ripple-carry adder made of PPRG adder cells.
//
// Bit 0 is a PPRG half adder (no carry in); bits 1..N-1 are PPRG full
// adders, each taking the previous cell's carry (gate output R) on gate
// port D. The sum bits are the cells' Q outputs and the carry out Co is the
// last cell's R. This is the structure given for N=4 (one half adder and
// three full adders), generalised to N-1 full adders as the text states.
//
// garbage_o collects the three garbage outputs of every cell, cell i at
// bits [3i+2:3i]. Because every cell preserves parity and every internal
// carry is both an output of one cell and an input of the next,
//   ^{a_i, b_i} == ^{s_o, co_o, garbage_o}
// holds for a fault-free adder; a single wrong output bit breaks it.
//
// Purely combinational: the result is valid after the ripple delay of N
// cells, no clock.
module pprg_parallel_adder
  import pprg_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]                    a_i,
  input  logic [N-1:0]                    b_i,
  output logic [N-1:0]                    s_o,
  output logic                            co_o,
  output logic [GARBAGE_PER_CELL*N-1:0]   garbage_o
);

  logic [N-1:0] carry;

  pprg_half_adder u_ha (
    .a_i       (a_i[0]),
    .b_i       (b_i[0]),
    .sum_o     (s_o[0]),
    .carry_o   (carry[0]),
    .garbage_o (garbage_o[2:0])
  );

  for (genvar i = 1; i < N; i++) begin : g_fa
    pprg_full_adder u_fa (
      .a_i       (a_i[i]),
      .b_i       (b_i[i]),
      .cin_i     (carry[i-1]),
      .sum_o     (s_o[i]),
      .carry_o   (carry[i]),
      .garbage_o (garbage_o[GARBAGE_PER_CELL*i +: GARBAGE_PER_CELL])
    );
  end

  assign co_o = carry[N-1];

endmodule
