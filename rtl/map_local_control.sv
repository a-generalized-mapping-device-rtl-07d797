// map_local_control: internal timing of one mapping operation.
//
// Once the supervisory control raises t_map, this controller runs the unit's
// own sequence:  the input buffers capture the data (load_in), the selection
// address is decoded and the fixed store driven (DECODE, read_store), the
// switch outputs set the output buffer (DRIVE, drive), and the output is then
// reported available (q_valid) until the next clear.  t_q_clear, given by the
// main control at the start of every micro-instruction, clears the output
// buffer (clear_q) and the availability flag.  The order of these steps
// follows the document's timing diagrams; one clock per step is this design's
// choice, so the output is valid three clocks after t_map is sampled:
//
//   cycle 0  t_map=1      load_in
//   cycle 1  DECODE       read_store
//   cycle 2  DRIVE        drive
//   cycle 3  IDLE         q_valid=1
//
// A t_map while busy is ignored (the unit must recycle first); an assertion
// flags it.
// The assertion uses the asynchronous reset as its disable condition, so
// the reset is seen as both asynchronous and synchronous; intended.
module map_local_control (
  input  logic clk,
  input  logic rst_n,
  input  logic t_q_clear,
  input  logic t_map,
  output logic load_in,
  output logic read_store,
  output logic drive,
  output logic clear_q,
  output logic busy,
  output logic q_valid
);

  typedef enum logic [1:0] {S_IDLE, S_DECODE, S_DRIVE} state_e;
  state_e state;

  assign load_in    = (state == S_IDLE) && t_map;
  assign read_store = (state == S_DECODE);
  assign drive      = (state == S_DRIVE);
  assign clear_q    = t_q_clear;
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      q_valid <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:   if (t_map) state <= S_DECODE;
        S_DECODE: state <= S_DRIVE;
        S_DRIVE:  state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
      if (t_q_clear || load_in) q_valid <= 1'b0;
      else if (drive)           q_valid <= 1'b1;
    end
  end

  // The mapping unit must recycle before it is activated again.
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n)
                                 t_map |-> state == S_IDLE)
    else $error("map_local_control: t_map while a mapping is in progress");

endmodule
