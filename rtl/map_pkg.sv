// map_pkg: sizes, micro-instruction fields and timing strobes shared by the
// CIRRUS mapping-unit RTL.
//
// The sizes are those of the proposed CIRRUS unit: a 36-input, 18-output
// mapping unit (its input is the pair of 18-bit add-logic inputs m and r)
// with a 9-bit selection register L, i.e. 512 mappings.  The 36-bit control
// word C is numbered C1 (most significant) to C36 as in the CIRRUS
// micro-instruction tables; C1..C3 give the micro-instruction type.
// The timing strobes stand for the W pulses of the CIRRUS timing chain; each
// is a one-clock pulse in this synchronous model.
//
// Lint notes: creg_t is deliberately an ascending range [1:36] so that bit
// c[k] is control bit Ck of the micro-instruction tables.  The field
// functions each read only a few bits of the control word, and a module that
// imports the package for its types leaves the size constants it does not
// need unused; both warnings are expected.
package map_pkg;

  localparam int unsigned WORD_W     = 18;   // CIRRUS hardware word
  localparam int unsigned MAP_IN_W   = 36;   // mapping unit inputs (m, r)
  localparam int unsigned MAP_OUT_W  = 18;   // mapping unit outputs (q)
  localparam int unsigned MAP_ADDR_W = 9;    // selection register L
  localparam int unsigned DWORD_W    = 2 * WORD_W;

  // Control register C, numbered C1..C36 like the micro-instruction tables.
  typedef logic [1:36] creg_t;

  // Micro-instruction type, C1 C2 C3.
  typedef enum logic [2:0] {
    UI_MP  = 3'b000,  // multiply step
    UI_FA  = 3'b001,  // fast arithmetic, registers only
    UI_AXY = 3'b010,  // both stores cycled
    UI_AY  = 3'b011,  // register (Y) store cycled
    UI_SJ  = 3'b100,  // set jump buffer
    UI_SR  = 3'b101,  // set register from literal
    UI_AX  = 3'b110,  // main (X) store cycled
    UI_JP  = 3'b111   // conditional micro-jump
  } utype_e;

  // Lower register input selection, C34 C35 C36.
  typedef enum logic [2:0] {
    LS_N_A  = 3'd0,   // N <- a
    LS_N_Q  = 3'd1,   // N <- q, the mapping unit output
    LS_N_RS = 3'd2,   // N <- a shifted right one place
    LS_HOLD = 3'd3,   // no lower register set
    LS_Z_A  = 3'd4,   // Z <- a
    LS_Z_Q  = 3'd5,   // Z <- q
    LS_Z_RS = 3'd6,   // Z,N <- a shifted right one place (double length)
    LS_NONE = 3'd7    // no add-logic operation
  } lsel_e;

  // Add-logic function.
  typedef enum logic [1:0] {
    AL_ADD = 2'd0,
    AL_AND = 2'd1,
    AL_OR  = 2'd2,
    AL_XOR = 2'd3
  } alfunc_e;

  // Timing strobes of one micro-instruction (one-clock pulses).
  typedef struct packed {
    logic w_da;    // start of the execution phase
    logic w1_rp;   // upper registers set
    logic w2_r;    // after the lower registers are set (register types)
    logic w3;      // store-type mapping start
    logic w4;      // store-type late pulse
    logic w_r;     // register-store read complete
    logic rt;      // qualifier of w4
    logic w_low;   // lower registers N, Z set
  } timing_t;

  function automatic utype_e utype(creg_t c);
    return utype_e'({c[1], c[2], c[3]});
  endfunction

  // Types that pass data through the add-logic / mapping path.
  function automatic logic uses_add_logic(creg_t c);
    utype_e t = utype(c);
    return (t == UI_MP) || (t == UI_FA) || (t == UI_AXY) || (t == UI_AY) ||
           (t == UI_AX);
  endfunction

  // Add-logic function from C25..C27: C26 = 0 adds; otherwise C27 selects
  // exclusive OR, and C25 chooses AND over inclusive OR.
  function automatic alfunc_e al_func(creg_t c);
    if (!c[26])     return AL_ADD;
    else if (c[27]) return AL_XOR;
    else if (c[25]) return AL_AND;
    else            return AL_OR;
  endfunction

  // Literal of a set-register (SR) micro-instruction.
  function automatic logic [WORD_W-1:0] sr_literal(creg_t c);
    return {c[10:13], c[20:33]};
  endfunction

endpackage
