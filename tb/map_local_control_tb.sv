// map_local_control_tb: checks the step sequence of one mapping (input load,
// store read, drive, output available), its three-clock latency, that
// t_q_clear clears the availability flag, and that the controller returns to
// idle for the next mapping.
module map_local_control_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, t_q_clear = 0, t_map = 0;
  logic load_in, read_store, drive, clear_q, busy, q_valid;

  map_local_control dut (.*);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect5(string what, logic li, logic rs, logic dr, logic bz, logic qv);
    checks++;
    if ({load_in, read_store, drive, busy, q_valid} !== {li, rs, dr, bz, qv}) begin
      failures++;
      $display("FAIL %s: load=%b read=%b drive=%b busy=%b valid=%b", what,
               load_in, read_store, drive, busy, q_valid);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      automatic int gap = $urandom_range(0, 3);
      @(negedge clk);
      t_q_clear = 1;
      #1;
      checks++;
      if (clear_q !== 1'b1) begin failures++; $display("FAIL clear_q"); end
      @(negedge clk);
      t_q_clear = 0;
      expect5("after clear", 0, 0, 0, 0, 0);
      repeat (gap) @(negedge clk);
      t_map = 1;
      #1 expect5("cycle 0", 1, 0, 0, 0, 0);
      @(negedge clk);
      t_map = 0;
      expect5("cycle 1", 0, 1, 0, 1, 0);
      @(negedge clk);
      expect5("cycle 2", 0, 0, 1, 1, 0);
      @(negedge clk);
      expect5("cycle 3", 0, 0, 0, 0, 1);
      @(negedge clk);
      expect5("cycle 4", 0, 0, 0, 0, 1);
    end
    // a second mapping without a clear in between re-arms the flag
    @(negedge clk) t_map = 1;
    @(negedge clk) t_map = 0;
    expect5("re-arm", 0, 1, 0, 1, 0);
    repeat (2) @(negedge clk);
    expect5("re-arm done", 0, 0, 0, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
