// map_select_reg: the selection register L of the CIRRUS mapping unit.
//
// L holds the address of the map to be performed.  It is loaded, when t_l
// pulses (same time as the upper registers are set), from the low ADDR_W bits
// of one of the lower registers: L' = N when src_z = 0 (C25 = 0), Z when
// src_z = 1.  When k_l pulses (after the lower registers are set) L counts up
// by one, so that consecutive maps of a multi-step operation need no address
// arithmetic in the add-logic unit.  The count wraps modulo 2**ADDR_W.  The
// load/increment equations are the document's; the reset value 0, the
// wrap-around and load winning over increment are this design's choices.
// Only the low ADDR_W bits of N and Z are read; the upper bits are unused.
module map_select_reg #(
  parameter int unsigned WORD_W = 18,
  parameter int unsigned ADDR_W = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              t_l,
  input  logic              src_z,
  input  logic [WORD_W-1:0] n,
  input  logic [WORD_W-1:0] z,
  input  logic              k_l,
  output logic [ADDR_W-1:0] l
);

  logic [ADDR_W-1:0] l_next;
  assign l_next = src_z ? z[ADDR_W-1:0] : n[ADDR_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   l <= '0;
    else if (t_l) l <= l_next;
    else if (k_l) l <= l + 1'b1;
  end

endmodule
