// mapping_unit_tb: runs whole mappings through three mapping units.
//
// A small 8-in, 8-out unit with 8 maps and the invariant '1' input holds the
// worked examples (rotation, sign-extending shift, masking, constant
// injection) and is checked against their outputs.  A full-size 36x18 unit
// with 512 maps is wired with random maps and checked against a reference;
// it also checks the three-clock latency from t_map to q_valid, that the
// address is read after a same-edge change, that inputs are buffered at
// t_map, and that without a clear the set-only output buffer ORs two maps.
// A 4x4 unit, the size of the hardware feasibility model, runs its printed
// bit-reversal matrix and the identity on all sixteen inputs.
module mapping_unit_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;

  // ---------------- small unit ----------------
  logic [7:0] s_a = '0, s_pat = '0, s_q;
  logic [2:0] s_sel = '0, s_paddr = '0;
  logic [3:0] s_prow = '0;
  logic s_clr = 0, s_map = 0, s_pen = 0, s_valid, s_busy;

  mapping_unit #(.N_IN(8), .N_OUT(8), .ADDR_W(3), .CONST_ONE(1'b1)) u_small (
    .clk, .rst_n, .a_in(s_a), .sel_addr(s_sel), .t_q_clear(s_clr), .t_map(s_map),
    .prog_en(s_pen), .prog_addr(s_paddr), .prog_row(s_prow), .prog_pattern(s_pat),
    .q(s_q), .q_valid(s_valid), .busy(s_busy));

  // ---------------- full-size unit ----------------
  logic [35:0] f_a = '0;
  logic [17:0] f_pat = '0, f_q;
  logic [8:0]  f_sel = '0, f_paddr = '0;
  logic [5:0]  f_prow = '0;
  logic f_clr = 0, f_map = 0, f_pen = 0, f_valid, f_busy;
  logic [35:0][17:0] maps [512];

  mapping_unit u_full (
    .clk, .rst_n, .a_in(f_a), .sel_addr(f_sel), .t_q_clear(f_clr), .t_map(f_map),
    .prog_en(f_pen), .prog_addr(f_paddr), .prog_row(f_prow), .prog_pattern(f_pat),
    .q(f_q), .q_valid(f_valid), .busy(f_busy));

  // 4x4 unit the size of the feasibility model, two maps: the reversal
  // matrix 0001/0010/0100/1000 and the identity
  logic [3:0] v_a = '0, v_pat = '0, v_q;
  logic       v_sel = 0, v_paddr = 0;
  logic [1:0] v_prow = '0;
  logic v_clr = 0, v_map = 0, v_pen = 0, v_valid, v_busy;

  mapping_unit #(.N_IN(4), .N_OUT(4), .ADDR_W(1)) u_feas (
    .clk, .rst_n, .a_in(v_a), .sel_addr(v_sel), .t_q_clear(v_clr), .t_map(v_map),
    .prog_en(v_pen), .prog_addr(v_paddr), .prog_row(v_prow), .prog_pattern(v_pat),
    .q(v_q), .q_valid(v_valid), .busy(v_busy));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rows listed top (input bit 7) to bottom (bit 0), then the constant row
  task automatic s_wire(int map, logic [7:0] r0, r1, r2, r3, r4, r5, r6, r7, logic [7:0] one);
    logic [7:0] rows [9];
    rows = '{r7, r6, r5, r4, r3, r2, r1, r0, one};
    for (int i = 0; i < 9; i++) begin
      @(negedge clk);
      s_pen = 1; s_paddr = 3'(map); s_prow = 4'(i); s_pat = rows[i];
    end
    @(negedge clk) s_pen = 0;
  endtask

  task automatic s_run(int map, logic [7:0] in, logic [7:0] exp, string what);
    @(negedge clk) s_clr = 1;
    @(negedge clk) begin s_clr = 0; s_map = 1; s_a = in; s_sel = 3'(map); end
    @(negedge clk) begin s_map = 0; s_a = ~in; end
    repeat (2) @(negedge clk);
    checks++;
    if (!s_valid || s_q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b valid=%b expected %b", what, s_q, s_valid, exp);
    end
  endtask

  function automatic logic [17:0] ref_map(logic [35:0][17:0] t, logic [35:0] a);
    logic [17:0] o = '0;
    for (int j = 0; j < 18; j++)
      for (int i = 0; i < 36; i++)
        o[j] = o[j] | (a[i] & t[i][j]);
    return o;
  endfunction

  // one mapping on the full unit; returns the clocks from t_map to q_valid
  task automatic f_run(int map, logic [35:0] in, logic clear, output int lat);
    if (clear) begin
      @(negedge clk) f_clr = 1;
      @(negedge clk) f_clr = 0;
    end
    @(negedge clk) begin f_map = 1; f_a = in; end
    @(negedge clk) begin f_map = 0; f_a = ~in; f_sel = 9'(map); end  // address changes after t_map edge
    lat = 1;
    while (!f_valid && lat < 20) begin
      @(negedge clk);
      lat++;
    end
  endtask

  initial begin
    int lat;
    logic [17:0] exp;
    repeat (2) @(negedge clk);
    rst_n = 1;

    s_wire(0, 8'b00000010, 8'b00000001, 8'b10000000, 8'b01000000,
              8'b00100000, 8'b00010000, 8'b00001000, 8'b00000100, 8'b0);
    s_wire(1, 8'b11111000, 8'b00000100, 8'b00000010, 8'b00000001,
              8'b0, 8'b0, 8'b0, 8'b0, 8'b0);
    s_wire(2, 8'b10000000, 8'b01000000, 8'b0, 8'b0,
              8'b00001000, 8'b00000100, 8'b0, 8'b0, 8'b0);
    s_wire(3, 8'b00001000, 8'b00000100, 8'b00100000, 8'b00010000,
              8'b0, 8'b0, 8'b0, 8'b0, 8'b11000011);
    s_run(0, 8'b10111010, 8'b11101010, "rotate-a");
    s_run(0, 8'b01100010, 8'b10001001, "rotate-b");
    s_run(1, 8'b10111010, 8'b11111011, "sra-a");
    s_run(1, 8'b01100001, 8'b00000110, "sra-b");
    s_run(2, 8'b11111111, 8'b11001100, "mask-a");
    s_run(2, 8'b01011010, 8'b01001000, "mask-b");
    // constant row adds 11000011; inputs 1,0,1,1 select 00001000,00100000,00010000
    s_run(3, 8'b10110110, 8'b11111011, "inject-ones");
    s_run(3, 8'b00000000, 8'b11000011, "inject-only");

    // full size: wire all 512 maps
    for (int s = 0; s < 512; s++)
      for (int i = 0; i < 36; i++) begin
        @(negedge clk);
        f_pen = 1; f_paddr = 9'(s); f_prow = 6'(i);
        f_pat = 18'($urandom) & 18'($urandom) & 18'($urandom);
        maps[s][i] = f_pat;
      end
    @(negedge clk) f_pen = 0;

    for (int n = 0; n < 300; n++) begin
      automatic int s = $urandom_range(511);
      automatic logic [35:0] in = {4'($urandom), $urandom};
      f_sel = 9'($urandom);           // overwritten right after the t_map edge
      f_run(s, in, 1'b1, lat);
      checks++;
      if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
      checks++;
      exp = ref_map(maps[s], in);
      if (f_q !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL map %0d in=%h q=%h exp=%h", s, in, f_q, exp);
      end
    end

    // two maps without a clear: the output buffer ORs them.  Maps 10 and 11
    // are rewired as plain copies of the lower and upper input halves so
    // that their outputs differ.
    for (int i = 0; i < 36; i++) begin
      @(negedge clk);
      f_pen = 1; f_paddr = 9'd10; f_prow = 6'(i);
      f_pat = (i < 18) ? 18'(1) << i : '0;
      maps[10][i] = f_pat;
      @(negedge clk);
      f_paddr = 9'd11;
      f_pat = (i >= 18) ? 18'(1) << (i - 18) : '0;
      maps[11][i] = f_pat;
    end
    @(negedge clk) f_pen = 0;
    for (int n = 0; n < 20; n++) begin
      logic [35:0] i1, i2;
      i1 = {4'($urandom), $urandom};
      i2 = {4'($urandom), $urandom};
      f_run(10, i1, 1'b1, lat);
      f_run(11, i2, 1'b0, lat);
      checks++;
      exp = ref_map(maps[10], i1) | ref_map(maps[11], i2);
      if (f_q !== exp) begin failures++; $display("FAIL accumulate q=%h exp=%h", f_q, exp); end
      @(negedge clk) f_clr = 1;
      @(negedge clk) f_clr = 0;
      checks++;
      if (f_q !== '0 || f_valid) begin failures++; $display("FAIL clear"); end
    end


    // feasibility-size unit: matrix row k (printed top to bottom) is input
    // bit 3-k, its columns output bits 3..0
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      v_pen = 1; v_paddr = 1'b0; v_prow = 2'(i); v_pat = 4'(1) << (3 - i);
      @(negedge clk);
      v_paddr = 1'b1; v_pat = 4'(1) << i;
    end
    @(negedge clk) v_pen = 0;
    for (int mp = 0; mp < 2; mp++)
      for (int x = 0; x < 16; x++) begin
        logic [3:0] want;
        @(negedge clk) v_clr = 1;
        @(negedge clk) begin v_clr = 0; v_map = 1; v_a = 4'(x); v_sel = 1'(mp); end
        @(negedge clk) v_map = 0;
        repeat (2) @(negedge clk);
        want = (mp == 0) ? {v_a[0], v_a[1], v_a[2], v_a[3]} : v_a;
        checks++;
        if (!v_valid || v_q !== want) begin
          failures++;
          $display("FAIL 4x4 map %0d in %b: q=%b expected %b", mp, v_a, v_q, want);
        end
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
