// cirrus_map_top: a 36x18 mapping unit fitted to the CIRRUS micro-programmed
// computer, beside its add-logic unit.
//
// The mapping unit takes the concatenated add-logic inputs {m, r} (m in the
// upper half), so it can map an 18-bit word (with zeros or a null map over
// the other half) or combine two halves of a 36-bit word into 18 result bits.
// It works in parallel with the add-logic unit; the lower register selector
// picks either the add-logic result a or the mapping result q for N or Z.
// The map is chosen by the 9-bit selection register L, loaded from N or Z and
// stepped by one after a mapping, so multi-map operations (a 36-bit mapping
// done as two 36-to-18 maps at L and L+1) need no address arithmetic.  The
// supervisory control turns control-word bits and timing pulses into the
// unit's strobes.  A normalisation shift detector watches the double-length
// result Z:N.
//
// Interface: c is the control register C1..C36 of the current
// micro-instruction and w the timing-chain pulses, driven by the host's
// control unit; m, r and gi (carry in) come from the host's upper registers
// and input selection, which are not part of this design.  A micro-instruction
// is: w_da (clears q), w1_rp (loads L, starts the mapping), wait for q_valid
// (three clocks), w_low (sets N or Z), then w2_r (steps L).  The prog_* port
// wires the fixed store.  The structure and control equations follow the
// document; the C-field positions of the lower-register select, add-logic
// function and literal, the clocked timing and the Z:N connection of the
// shift detector are this design's choices.
//
// Lint notes: the control word and the timing struct are wider than what the
// mapping unit uses (the rest drives the host's own units), so some of their
// bits are unused here; only the low nine bits of N or Z reach L.  The reset
// is used asynchronously by the flip-flops and synchronously by the
// assertion's disable condition, which is intended.
module cirrus_map_top
  import map_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  creg_t                      c,
  input  timing_t                    w,
  input  logic [WORD_W-1:0]          m,
  input  logic [WORD_W-1:0]          r,
  input  logic                       gi,
  input  logic                       prog_en,
  input  logic [MAP_ADDR_W-1:0]      prog_addr,
  input  logic [5:0]                 prog_row,
  input  logic [MAP_OUT_W-1:0]       prog_pattern,
  output logic [WORD_W-1:0]          n,
  output logic [WORD_W-1:0]          z,
  output logic [MAP_ADDR_W-1:0]      l,
  output logic [MAP_OUT_W-1:0]       q,
  output logic                       q_valid,
  output logic                       map_busy,
  output logic [WORD_W-1:0]          a,
  output logic                       g_o,
  output logic [5:0]                 norm_shift,
  output logic                       norm_none
);

  logic t_q_clear, t_map, t_l, l_src_z, k_l;
  logic al_cout;
  logic low_set, lit_set;
  alfunc_e func;
  lsel_e   sel;

  assign func    = al_func(c);
  assign sel     = lsel_e'(c[34:36]);
  assign low_set = w.w_low & uses_add_logic(c);
  assign lit_set = w.w_low & (utype(c) == UI_SR) & c[36];

  map_sup_control u_sup (
    .c, .w, .t_q_clear, .t_map, .t_l, .l_src_z, .k_l
  );

  map_select_reg #(.WORD_W(WORD_W), .ADDR_W(MAP_ADDR_W)) u_l (
    .clk, .rst_n, .t_l, .src_z(l_src_z), .n, .z, .k_l, .l
  );

  mapping_unit #(.N_IN(MAP_IN_W), .N_OUT(MAP_OUT_W), .ADDR_W(MAP_ADDR_W)) u_map (
    .clk, .rst_n, .a_in({m, r}), .sel_addr(l), .t_q_clear, .t_map,
    .prog_en, .prog_addr, .prog_row, .prog_pattern,
    .q, .q_valid, .busy(map_busy)
  );

  add_logic #(.W(WORD_W)) u_al (
    .m, .r, .cin(gi), .func, .a, .cout(al_cout)
  );

  // G_o: carry buffer for multi-precision arithmetic.  Every add of a
  // data-path micro-instruction loads it, whether or not N or Z is set
  // (this design's choice; the hold code can so test a carry alone).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          g_o <= 1'b0;
    else if (low_set && func == AL_ADD)  g_o <= al_cout;
  end

  lower_regs #(.W(WORD_W)) u_low (
    .clk, .rst_n, .set(low_set), .sel, .a, .carry(al_cout), .q,
    .lit_set, .lit_z(c[34]), .literal(sr_literal(c)), .n, .z
  );

  shift_detector #(.WIDTH(DWORD_W), .RADIX_COMPLEMENT(1'b1)) u_norm (
    .f({z, n}), .shift(norm_shift), .none(norm_none)
  );

  // The host must wait for the mapping result before storing it.
  a_q_ready: assert property (@(posedge clk) disable iff (!rst_n)
               low_set && (sel == LS_N_Q || sel == LS_Z_Q) |-> q_valid)
    else $error("cirrus_map_top: mapping result selected before it is available");

endmodule
