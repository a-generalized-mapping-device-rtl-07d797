// add_logic: the 18-bit parallel add-logic network of CIRRUS.
//
// On its two inputs m and r it forms one of: the two's complement sum with
// carry in (the G_i buffer) and carry out (to the G_o buffer), the bit-wise
// AND, the inclusive OR or the exclusive OR.  The mapping unit works beside
// it on the same two inputs; the lower register selector decides which of
// the two results is kept.  The four functions are the document's; the
// carry-out of logical functions (0) is this design's choice.
// Purely combinational.
module add_logic
  import map_pkg::*;
#(
  parameter int unsigned W = 18
) (
  input  logic [W-1:0] m,
  input  logic [W-1:0] r,
  input  logic         cin,
  input  alfunc_e      func,
  output logic [W-1:0] a,
  output logic         cout
);

  always_comb begin
    cout = 1'b0;
    unique case (func)
      AL_ADD:  {cout, a} = {1'b0, m} + {1'b0, r} + {{W{1'b0}}, cin};
      AL_AND:  a = m & r;
      AL_OR:   a = m | r;
      AL_XOR:  a = m ^ r;
      default: a = '0;
    endcase
  end

endmodule
