// pprg_arith_top: the fault tolerant PPRG arithmetic units side by side.
//
// Holds the 2x3 and the 3x2 array multiplier (each one 4-bit PPRG parallel
// adder over AND partial products), the general MUL_M x MUL_N PPRG array
// multiplier (default 4x4) and the 16-bit PPRG adder/subtractor.
// The four units share nothing; each has its own ports. For every unit
// the top also forms a parity error flag: the XOR of the unit's external
// gate inputs compared with the XOR of all its gate outputs (results plus
// garbage). Because every PPRG preserves parity, a flag of 1 means that an
// odd number of gate output bits in that unit are wrong. The flags are this
// design's addition; the units follow the published structures.
//
// Purely combinational, no clock.
module pprg_arith_top #(
  parameter int unsigned ADD_N = 16,  // adder/subtractor width
  parameter int unsigned MUL_M = 4,   // array multiplier: width of a
  parameter int unsigned MUL_N = 4    // array multiplier: width of b
) (
  // 2x3 multiplier
  input  logic [1:0]       m23_a_i,
  input  logic [2:0]       m23_b_i,
  output logic [4:0]       m23_p_o,
  output logic [11:0]      m23_garbage_o,
  output logic             m23_parity_err_o,
  // 3x2 multiplier
  input  logic [2:0]       m32_a_i,
  input  logic [1:0]       m32_b_i,
  output logic [4:0]       m32_p_o,
  output logic [11:0]      m32_garbage_o,
  output logic             m32_parity_err_o,
  // MUL_M x MUL_N array multiplier
  input  logic [MUL_M-1:0]          arr_a_i,
  input  logic [MUL_N-1:0]          arr_b_i,
  output logic [MUL_M+MUL_N-1:0]    arr_p_o,
  output logic [3*MUL_M*(MUL_N-1)-1:0] arr_garbage_o,
  output logic                      arr_parity_err_o,
  // adder / subtractor
  input  logic [ADD_N-1:0] add_a_i,
  input  logic [ADD_N-1:0] add_b_i,
  input  logic             add_c_i,
  input  logic             add_cntrl_i,
  output logic [ADD_N-1:0] add_s_o,
  output logic             add_co_o,
  output logic [ADD_N-1:0] add_carry_o,
  output logic [7*ADD_N+3:0] add_garbage_o,
  output logic             add_parity_err_o
);

  logic m23_in_par, m32_in_par, arr_in_par, add_in_par;

  pprg_mult_2x3 u_m23 (
    .a_i         (m23_a_i),
    .b_i         (m23_b_i),
    .p_o         (m23_p_o),
    .garbage_o   (m23_garbage_o),
    .pp_parity_o (m23_in_par)
  );

  pprg_mult_3x2 u_m32 (
    .a_i         (m32_a_i),
    .b_i         (m32_b_i),
    .p_o         (m32_p_o),
    .garbage_o   (m32_garbage_o),
    .pp_parity_o (m32_in_par)
  );

  pprg_array_mult #(.M(MUL_M), .N(MUL_N)) u_arr (
    .a_i         (arr_a_i),
    .b_i         (arr_b_i),
    .p_o         (arr_p_o),
    .garbage_o   (arr_garbage_o),
    .pp_parity_o (arr_in_par)
  );

  pprg_addsub16 #(.N(ADD_N)) u_add (
    .a_i         (add_a_i),
    .b_i         (add_b_i),
    .c_i         (add_c_i),
    .cntrl_i     (add_cntrl_i),
    .s_o         (add_s_o),
    .co_o        (add_co_o),
    .carry_o     (add_carry_o),
    .garbage_o   (add_garbage_o),
    .in_parity_o (add_in_par)
  );

  assign m23_parity_err_o = m23_in_par ^ (^{m23_p_o, m23_garbage_o});
  assign m32_parity_err_o = m32_in_par ^ (^{m32_p_o, m32_garbage_o});
  assign arr_parity_err_o = arr_in_par ^ (^{arr_p_o, arr_garbage_o});
  assign add_parity_err_o = add_in_par ^ (^{add_s_o, add_co_o, add_garbage_o});

endmodule
