// pprg_full_adder: a full adder made of a single PPRG.
//
// Following the published cell, operand B drives gate port A, operand A
// drives gate port B, the carry in drives port D, and ports C and E are tied
// to 0. Output Q is the sum A^B^Cin and output R the carry
// ((A^B)&Cin)^(A&B); P, S and T are garbage outputs g1, g2, g3. The XOR of
// the three inputs equals the XOR of sum, carry and the garbage bits.
//
// Purely combinational, no clock.
module pprg_full_adder
  import pprg_pkg::*;
(
  input  logic       a_i,
  input  logic       b_i,
  input  logic       cin_i,
  output logic       sum_o,
  output logic       carry_o,
  output logic [GARBAGE_PER_CELL-1:0] garbage_o  // {g1=P, g2=S, g3=T}
);

  pprg_in_t  gin;
  pprg_out_t gout;

  always_comb begin
    gin.a = b_i;
    gin.b = a_i;
    gin.c = 1'b0;
    gin.d = cin_i;
    gin.e = 1'b0;
  end

  pprg u_gate (.in_i(gin), .out_o(gout));

  assign sum_o     = gout.q;
  assign carry_o   = gout.r;
  assign garbage_o = {gout.p, gout.s, gout.t};

endmodule
