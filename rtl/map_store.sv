// map_store: the fixed store holding the transfer matrices of the mapping unit.
//
// Each of the 2**ADDR_W selection addresses owns one drive line; the line is
// threaded through the transformer at crossing (i, j) exactly where the map has
// t_ji = 1, so one drive pulse on line P^s reads out the whole matrix T_s at
// once.  Here the store is an array of N_ROWS x N_OUT bits per map: driving
// line s is reading word s, and the registered read stands for the decode delay
// and drive pulse of the real store.
//
// The document's store is wired (read-only).  The write port below models the
// wiring step: it sets one row (the pattern for one input bit) of one map per
// clock, and is meant to be used before operation, like loading the pattern
// tables into a simulator.  It is this design's own addition.
//
// Interface: rd_en samples rd_addr at the clock edge and presents T_s on t
// from the next cycle on (one-cycle read latency); t holds until the next read.
// No reset: the contents are whatever was wired in.
module map_store #(
  parameter int unsigned N_ROWS = 36,   // input bits (plus one for a constant-1 input)
  parameter int unsigned N_OUT  = 18,
  parameter int unsigned ADDR_W = 9,
  localparam int unsigned N_MAPS = 1 << ADDR_W,
  localparam int unsigned ROW_W  = (N_ROWS > 1) ? $clog2(N_ROWS) : 1
) (
  input  logic                            clk,
  // wiring (programming) port
  input  logic                            prog_en,
  input  logic [ADDR_W-1:0]               prog_addr,
  input  logic [ROW_W-1:0]                prog_row,
  input  logic [N_OUT-1:0]                prog_pattern,
  // read (drive) port
  input  logic                            rd_en,
  input  logic [ADDR_W-1:0]               rd_addr,
  output logic [N_ROWS-1:0][N_OUT-1:0]    t
);

  logic [N_ROWS-1:0][N_OUT-1:0] mem [N_MAPS];

  always_ff @(posedge clk) begin
    if (prog_en)
      mem[prog_addr][prog_row] <= prog_pattern;
  end

  always_ff @(posedge clk) begin
    if (rd_en)
      t <= mem[rd_addr];
  end

endmodule
