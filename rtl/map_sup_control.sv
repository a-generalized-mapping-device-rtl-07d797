// map_sup_control: the part of the CIRRUS main control that drives the mapping
// unit (its supervisory control).
//
// It gates the timing-chain pulses with micro-instruction bits, following the
// document's equations:
//   T_q clear = W_da                                         (clear q buffer)
//   T_map     = W1(RP).C1'.C2'.C3 + W3.C21 + W_R.C1'.C2.C3   (start a mapping)
//   T_L       = W1(RP).C24                                   (load L)
//   L source  = C25  (0: N, 1: Z)
//   K_L       = W2(R).C1'.C2'.C27 + W4.RT'.C27               (increment L)
// So a register-only micro-instruction (type FA, C123 = 001) starts the unit
// as the upper registers are set, a register-store instruction (type AY, 011)
// when the store read is complete, and C21 starts it in the store types.
// Purely combinational; the strobes are one-clock pulses.
// Only the control bits and timing pulses named in the equations are read;
// the rest of the control word and timing struct is unused here by design.
module map_sup_control
  import map_pkg::*;
(
  input  creg_t   c,
  input  timing_t w,
  output logic    t_q_clear,
  output logic    t_map,
  output logic    t_l,
  output logic    l_src_z,
  output logic    k_l
);

  assign t_q_clear = w.w_da;
  assign t_map     = (w.w1_rp & ~c[1] & ~c[2] & c[3]) |
                     (w.w3 & c[21]) |
                     (w.w_r & ~c[1] & c[2] & c[3]);
  assign t_l       = w.w1_rp & c[24];
  assign l_src_z   = c[25];
  assign k_l       = (w.w2_r & ~c[1] & ~c[2] & c[27]) |
                     (w.w4 & ~w.rt & c[27]);

endmodule
