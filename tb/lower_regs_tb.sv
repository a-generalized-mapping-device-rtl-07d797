// lower_regs_tb: sets N and Z from every selector input (add-logic output,
// mapping output, right-shifted output, double-length right shift, literal)
// with random data, against a model of the two registers.
module lower_regs_tb;
  import map_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, set = 0, carry = 0, lit_set = 0, lit_z = 0;
  lsel_e sel = LS_HOLD;
  logic [17:0] a = '0, q = '0, literal = '0, n, z;
  logic [17:0] mn = '0, mz = '0;
  int seen [8];

  lower_regs dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      a = 18'($urandom); q = 18'($urandom); literal = 18'($urandom);
      carry = 1'($urandom); lit_z = 1'($urandom);
      sel = lsel_e'(3'($urandom));
      set = 1'($urandom); lit_set = ($urandom_range(4) == 0);
      if (lit_set) begin
        if (lit_z) mz = literal; else mn = literal;
      end else if (set) begin
        seen[sel]++;
        case (sel)
          LS_N_A:  mn = a;
          LS_N_Q:  mn = q;
          LS_N_RS: mn = a / 2;
          LS_Z_A:  mz = a;
          LS_Z_Q:  mz = q;
          LS_Z_RS: begin
            mz = (a / 2) + (carry ? 18'h20000 : 18'h0);
            mn = (mn & 18'h1FFFF) | (a[0] ? 18'h20000 : 18'h0);
          end
          default: ;
        endcase
      end
      @(posedge clk);
      #1;
      checks++;
      if (n !== mn || z !== mz) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d sel=%0d n=%h/%h z=%h/%h", k, sel, n, mn, z, mz);
      end
    end
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL selector %0d never used", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
