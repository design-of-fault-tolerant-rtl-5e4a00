// pprg_array_mult: M-bit by N-bit array multiplier built from N-1 PPRG
// parallel adders.
//
// Row j of partial products is a & {M{b[j]}}. Row 0 gives product bit 0;
// its upper M-1 bits, with a 0 above them, form the running partial sum.
// Stage j (j = 1..N-1) is an M-bit pprg_parallel_adder (one PPRG half
// adder and M-1 PPRG full adders) that adds row j to the running sum. The
// stage's lowest sum bit is product bit j; its upper sum bits and carry
// out become the running sum for the next stage. After the last stage the
// running sum holds product bits M+N-1..N. Every stage is combinational,
// so the product is valid after the ripple through N-1 adders.
//
// This is the general form of the published 2x3 and 3x2 multipliers, which
// place their partial products on one 4-bit adder; the row-by-row
// arrangement and the default size 4x4 are this design's choice.
// garbage_o collects the 3 garbage outputs of every PPRG cell, stage j at
// bits [3M*j-1 : 3M*(j-1)]. pp_parity_o is the XOR of all adder operand
// bits that come from partial products, i.e. of all partial products; for a
// fault-free multiplier it equals the XOR of the product and garbage_o.
module pprg_array_mult
  import pprg_pkg::*;
#(
  parameter int unsigned M = 4,   // width of a (at least 2)
  parameter int unsigned N = 4    // width of b (at least 2)
) (
  input  logic [M-1:0]                        a_i,
  input  logic [N-1:0]                        b_i,
  output logic [M+N-1:0]                      p_o,
  output logic [GARBAGE_PER_CELL*M*(N-1)-1:0] garbage_o,
  output logic                                pp_parity_o
);

  logic [M-1:0] row [N];
  logic [M-1:0] acc [N];      // running partial sum into stage j
  logic [M-1:0] sum [N];
  logic [N-1:0] co;

  always_comb begin
    for (int j = 0; j < N; j++) row[j] = a_i & {M{b_i[j]}};
  end

  assign p_o[0] = row[0][0];
  assign acc[1] = {1'b0, row[0][M-1:1]};

  // Stage 0 has no adder; keep its slots defined.
  assign sum[0] = '0;
  assign co[0]  = 1'b0;
  assign acc[0] = '0;

  for (genvar j = 1; j < N; j++) begin : g_stage
    pprg_parallel_adder #(.N(M)) u_pa (
      .a_i       (acc[j]),
      .b_i       (row[j]),
      .s_o       (sum[j]),
      .co_o      (co[j]),
      .garbage_o (garbage_o[GARBAGE_PER_CELL*M*(j-1) +: GARBAGE_PER_CELL*M])
    );
    assign p_o[j] = sum[j][0];
    if (j < N - 1) begin : g_next
      assign acc[j+1] = {co[j], sum[j][M-1:1]};
    end
  end

  assign p_o[M+N-1:N] = {co[N-1], sum[N-1][M-1:1]};

  // Every partial product enters exactly one adder cell (or, for bit 0 of
  // row 0, goes straight to the product), and every internal running-sum
  // bit is both a cell output and a cell input, so the XOR of all partial
  // products equals the XOR of the product and the garbage outputs.
  always_comb begin
    pp_parity_o = 1'b0;
    for (int j = 0; j < N; j++) pp_parity_o ^= ^row[j];
  end

endmodule
