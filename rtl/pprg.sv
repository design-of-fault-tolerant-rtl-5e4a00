// pprg: the 5x5 parity preserving reversible gate.
//
// Inputs A,B,C,D,E map to outputs P,Q,R,S,T. With X = (~A & ~C) ^ ~B:
//   P = A
//   Q = X ^ D
//   R = (X & D) ^ (A & B) ^ C
//   S = (A & ~B) ^ C ^ (~X & D)
//   T = D ^ E ^ (A & C)
// The mapping is a bijection on the 32 input patterns (reversible) and the
// XOR of P..T always equals the XOR of A..E (parity preserving).
// Special cases used in this design:
//   C=D=E=0          : Q = A^B, R = A&B             (half adder)
//   C=E=0, D=Cin     : Q = A^B^Cin, R = (A^B)Cin^AB  (full adder)
//   B=1, D=0         : Q = ~(A|C)                    (NOR)
//   A=C=E=0          : Q = B^D                        (controlled inverter)
// P, Q, S and T follow the gate's published equations. For R the product
// X&D is used where the printed equation reads X^D: only the product form
// gives the stated carry and keeps the gate reversible and parity
// preserving.
//
// Purely combinational, no clock.
module pprg (
  input  pprg_pkg::pprg_in_t  in_i,
  output pprg_pkg::pprg_out_t out_o
);

  logic x;

  always_comb begin
    x         = (~in_i.a & ~in_i.c) ^ ~in_i.b;
    out_o.p   = in_i.a;
    out_o.q   = x ^ in_i.d;
    out_o.r   = (x & in_i.d) ^ (in_i.a & in_i.b) ^ in_i.c;
    out_o.s   = (in_i.a & ~in_i.b) ^ in_i.c ^ (~x & in_i.d);
    out_o.t   = in_i.d ^ in_i.e ^ (in_i.a & in_i.c);
  end

endmodule
