// lower_regs: the lower registers N and Z of CIRRUS and their input selector.
//
// When set (the w_low pulse of an add-logic type micro-instruction) one of the
// two registers takes one of: the add-logic output a, the mapping unit
// output q, or a shifted right one place.  With the mapping unit fitted, q
// takes the selector input that used to carry the left-shifted add-logic
// output.  A set-register (SR) micro-instruction instead loads a literal from
// the control word into N or Z.  sel is C34..C36 (see map_pkg::lsel_e).
// Right shifts: into N the top bit becomes 0; into Z the add-logic carry
// enters the top bit and the bit shifted out of a enters the top of N, a
// double-length shift of Z:N.  The selector inputs are the document's; the
// code assignment and the shift fill bits are this design's reading.
// Registers reset to 0.
module lower_regs
  import map_pkg::*;
#(
  parameter int unsigned W = 18
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         set,       // set from a / q / shifted a
  input  lsel_e        sel,
  input  logic [W-1:0] a,
  input  logic         carry,
  input  logic [W-1:0] q,
  input  logic         lit_set,   // set from the literal
  input  logic         lit_z,     // literal goes to Z (else N)
  input  logic [W-1:0] literal,
  output logic [W-1:0] n,
  output logic [W-1:0] z
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n <= '0;
      z <= '0;
    end else if (lit_set) begin
      if (lit_z) z <= literal;
      else       n <= literal;
    end else if (set) begin
      unique case (sel)
        LS_N_A:  n <= a;
        LS_N_Q:  n <= q;
        LS_N_RS: n <= {1'b0, a[W-1:1]};
        LS_Z_A:  z <= a;
        LS_Z_Q:  z <= q;
        LS_Z_RS: begin
          z <= {carry, a[W-1:1]};
          n <= {a[0], n[W-2:0]};
        end
        default: ;
      endcase
    end
  end

endmodule
