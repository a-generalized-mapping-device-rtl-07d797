// map_select_reg_tb: loads L from N and from Z, steps it, checks wrap-around
// at 511 and that a load wins over a same-cycle step, against a model.
module map_select_reg_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, t_l = 0, src_z = 0, k_l = 0;
  logic [17:0] n = '0, z = '0;
  logic [8:0] l;
  int model = 0;

  map_select_reg dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (l !== 9'd0) begin failures++; $display("FAIL reset"); end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      n = 18'($urandom); z = 18'($urandom);
      t_l = ($urandom_range(3) == 0);
      k_l = ($urandom_range(1) == 0);
      src_z = 1'($urandom);
      if (k == 100) begin t_l = 1; src_z = 0; n = 18'h3F1FF; k_l = 0; end   // load 511
      if (k == 101) begin t_l = 0; k_l = 1; end                            // wrap to 0
      if (t_l)      model = src_z ? (z % 512) : (n % 512);
      else if (k_l) model = (model + 1) % 512;
      @(posedge clk);
      #1;
      checks++;
      if (l !== 9'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: l=%0d model=%0d", k, l, model);
      end
      if (k == 101) begin
        checks++;
        if (l !== 9'd0) begin failures++; $display("FAIL wrap"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
