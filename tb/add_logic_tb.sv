// add_logic_tb: random operands through all four add-logic functions,
// checked against integer arithmetic (sum and carry) and bit-wise operators,
// plus the carry-propagation corner cases.
module add_logic_tb;
  import map_pkg::*;
  int checks = 0, failures = 0;
  logic [17:0] m, r, a;
  logic cin, cout;
  alfunc_e func;

  add_logic dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(logic [17:0] mm, logic [17:0] rr, logic ci, alfunc_e f);
    int unsigned sum;
    logic [17:0] ea;
    logic ec;
    m = mm; r = rr; cin = ci; func = f;
    #1;
    sum = int'(mm) + int'(rr) + int'(ci);
    case (f)
      AL_ADD: begin ea = sum[17:0]; ec = sum[18]; end
      AL_AND: begin ea = mm & rr; ec = 0; end
      AL_OR:  begin ea = mm | rr; ec = 0; end
      default: begin ea = mm ^ rr; ec = 0; end
    endcase
    checks++;
    if (a !== ea || cout !== ec) begin
      failures++;
      if (failures < 10) $display("FAIL f=%0d m=%h r=%h ci=%b a=%h c=%b", f, mm, rr, ci, a, cout);
    end
  endtask

  initial begin
    one(18'h3FFFF, 18'h00000, 1'b1, AL_ADD);
    one(18'h3FFFF, 18'h3FFFF, 1'b1, AL_ADD);
    one(18'h20000, 18'h20000, 1'b0, AL_ADD);
    for (int k = 0; k < 4000; k++)
      one(18'($urandom), 18'($urandom), 1'($urandom), alfunc_e'(2'(k)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
