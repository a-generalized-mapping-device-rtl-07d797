// mapping_unit: a generalised mapping device - arbitrary rearrangement,
// fan-out and masking of the bits of a word, chosen by a selection address.
//
// A mapping is a boolean transfer matrix T_s: output bit b_j is the OR of the
// input bits a_i with t_ji = 1.  The unit splits that into the two parts the
// document proposes: a fixed store (map_store) that turns the selection
// address into the whole matrix at once, and a crosspoint switch array
// (switch_matrix) that applies it to the buffered input.  The output buffer q
// is made of set-only flip-flops: it is cleared by t_q_clear and then set by
// the switch outputs during the drive step, so a mapping ORs into whatever q
// already holds if no clear came between.  Adding maps only grows the store;
// the switch array stays N_IN x N_OUT.
//
// Parameters: N_IN inputs, N_OUT outputs, 2**ADDR_W maps.  Defaults are the
// 36-input, 18-output unit proposed for CIRRUS with a 9-bit L register.
// CONST_ONE = 1 adds an invariant '1' input (the row above the top input in
// the store, row N_IN) so that maps can inject constant ones into the output.
//
// Timing (map_local_control): t_map samples a_in; sel_addr is read one clock
// later, so a selection register loaded on the same edge as t_map is already
// used; q and q_valid are set three clocks after t_map.  Programming port: see
// map_store.
//
// Lint note: the reset drives the flip-flops asynchronously and the local
// control's assertion synchronously (its disable condition); intended.
module mapping_unit #(
  parameter int unsigned N_IN      = 36,
  parameter int unsigned N_OUT     = 18,
  parameter int unsigned ADDR_W    = 9,
  parameter bit          CONST_ONE = 1'b0,
  localparam int unsigned N_ROWS   = N_IN + (CONST_ONE ? 1 : 0),
  localparam int unsigned ROW_W    = (N_ROWS > 1) ? $clog2(N_ROWS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_IN-1:0]      a_in,
  input  logic [ADDR_W-1:0]    sel_addr,
  input  logic                 t_q_clear,
  input  logic                 t_map,
  input  logic                 prog_en,
  input  logic [ADDR_W-1:0]    prog_addr,
  input  logic [ROW_W-1:0]     prog_row,
  input  logic [N_OUT-1:0]     prog_pattern,
  output logic [N_OUT-1:0]     q,
  output logic                 q_valid,
  output logic                 busy
);

  logic load_in, read_store, drive, clear_q;
  logic [N_IN-1:0]               a_buf;
  logic [N_ROWS-1:0]             a_ext;
  logic [N_ROWS-1:0][N_OUT-1:0]  t;
  logic [N_OUT-1:0]              b;

  map_local_control u_ctl (
    .clk, .rst_n, .t_q_clear, .t_map,
    .load_in, .read_store, .drive, .clear_q, .busy, .q_valid
  );

  // Input buffers, loaded when the unit is activated.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       a_buf <= '0;
    else if (load_in) a_buf <= a_in;
  end

  if (CONST_ONE) begin : g_one
    assign a_ext = {1'b1, a_buf};
  end else begin : g_plain
    assign a_ext = a_buf;
  end

  map_store #(.N_ROWS(N_ROWS), .N_OUT(N_OUT), .ADDR_W(ADDR_W)) u_store (
    .clk, .prog_en, .prog_addr, .prog_row, .prog_pattern,
    .rd_en(read_store), .rd_addr(sel_addr), .t
  );

  switch_matrix #(.N_IN(N_ROWS), .N_OUT(N_OUT)) u_matrix (
    .a(a_ext), .t, .b
  );

  // Output buffer: set-only flip-flops, cleared at the start of each cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (clear_q) q <= '0;
    else if (drive)   q <= q | b;
  end

endmodule
