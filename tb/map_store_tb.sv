// map_store_tb: wires random patterns into the full 512-map store and reads
// them back through the drive port, against a shadow copy kept in the
// testbench.  Checks the one-clock read latency, that the output holds while
// no read is requested, and that rewriting one row leaves its neighbours.
module map_store_tb;
  localparam int ROWS = 36, OUTW = 18, AW = 9, NMAPS = 512;
  int checks = 0, failures = 0;

  logic clk = 0;
  always #5 clk = ~clk;

  logic prog_en = 0, rd_en = 0;
  logic [AW-1:0] prog_addr = '0, rd_addr = '0;
  logic [5:0] prog_row = '0;
  logic [OUTW-1:0] prog_pattern = '0;
  logic [ROWS-1:0][OUTW-1:0] t;
  logic [ROWS-1:0][OUTW-1:0] shadow [NMAPS];

  map_store dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_row(int adr, int row, logic [OUTW-1:0] pat);
    @(negedge clk);
    prog_en = 1; prog_addr = AW'(adr); prog_row = 6'(row); prog_pattern = pat;
    @(negedge clk);
    prog_en = 0;
    shadow[adr][row] = pat;
  endtask

  task automatic read_check(int adr);
    logic [ROWS-1:0][OUTW-1:0] t_before;
    @(negedge clk);
    t_before = t;
    rd_en = 1; rd_addr = AW'(adr);
    #1;
    checks++;                          // nothing changes t_before the edge
    if (t !== t_before) begin failures++; $display("FAIL read %0d changed early", adr); end
    @(negedge clk);
    rd_en = 0;
    checks++;
    if (t !== shadow[adr]) begin
      failures++;
      if (failures < 10) $display("FAIL read map %0d", adr);
    end
    rd_addr = AW'($urandom);           // no read: output must hold
    @(negedge clk);
    checks++;
    if (t !== shadow[adr]) begin failures++; $display("FAIL hold map %0d", adr); end
  endtask

  initial begin
    // wire every map
    for (int s = 0; s < NMAPS; s++)
      for (int i = 0; i < ROWS; i++) begin
        @(negedge clk);
        prog_en = 1; prog_addr = AW'(s); prog_row = 6'(i);
        prog_pattern = OUTW'($urandom);
        shadow[s][i] = prog_pattern;
      end
    @(negedge clk) prog_en = 0;
    for (int k = 0; k < 600; k++) read_check(k < NMAPS ? k : int'($urandom_range(NMAPS-1)));
    // rewrite one row, neighbours unchanged
    write_row(77, 5, 18'h2AAAA);
    read_check(77);
    read_check(76);
    read_check(78);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
