// switch_matrix: the crosspoint array of the mapping unit.
//
// Input lines a_i run across output lines b_j; at every crossing sits a
// switch closed when the transfer-matrix bit t_ji is 1.  An output line takes
// the value of whichever input its closed switch connects, and rests at 0 when
// no switch in its column is closed:  b_j = OR_i (a_i AND t_ji).
// The array itself follows the document (one transistor switch per
// crossing, a pull-down to 0 per output line); here it is the equivalent
// AND-OR logic.  A mapping may fan one input out to several outputs (sign
// extension); two inputs closed on the same output give their OR.
//
// Interface: t[i] is the N_OUT-bit row of the matrix for input bit i, with
// bit j of the row closing the switch to output j.  Purely combinational.
module switch_matrix #(
  parameter int unsigned N_IN  = 36,
  parameter int unsigned N_OUT = 18
) (
  input  logic [N_IN-1:0]             a,
  input  logic [N_IN-1:0][N_OUT-1:0]  t,
  output logic [N_OUT-1:0]            b
);

  always_comb begin
    b = '0;
    for (int i = 0; i < N_IN; i++)
      b |= t[i] & {N_OUT{a[i]}};
  end

endmodule
