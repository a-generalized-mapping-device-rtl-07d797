// switch_matrix_tb: checks the crosspoint array against worked examples and a
// column-by-column reference.
//
// An 8x8 instance is driven with the rearrangement, sign-extension and
// masking examples (circular shift, right shift with sign extension, masking
// with 11001100, an 8-place rotation) and their printed outputs; an 8x16
// instance with the example that splits one byte into two sign-extended
// 4-bit integers; a 36x18 instance (the CIRRUS size) with random matrices
// compared against a reference that evaluates each output column separately.
module switch_matrix_tb;
  int checks = 0, failures = 0;

  logic [7:0]            a8;
  logic [7:0][7:0]       t8;
  logic [7:0]            b8;
  logic [7:0][15:0]      t16;
  logic [15:0]           b16;
  logic [35:0]           a36;
  logic [35:0][17:0]     t36;
  logic [17:0]           b36;

  switch_matrix #(.N_IN(8),  .N_OUT(8))  dut8  (.a(a8),  .t(t8),  .b(b8));
  switch_matrix #(.N_IN(8),  .N_OUT(16)) dut16 (.a(a8),  .t(t16), .b(b16));
  switch_matrix                          dut36 (.a(a36), .t(t36), .b(b36));

  // Rows are listed top to bottom: row k belongs to input bit 7-k.
  task automatic set8(input logic [7:0] r0, r1, r2, r3, r4, r5, r6, r7);
    t8[7] = r0; t8[6] = r1; t8[5] = r2; t8[4] = r3;
    t8[3] = r4; t8[2] = r5; t8[1] = r6; t8[0] = r7;
  endtask

  task automatic check8(input logic [7:0] in, input logic [7:0] exp, input string what);
    a8 = in;
    #1;
    checks++;
    if (b8 !== exp) begin
      failures++;
      $display("FAIL %s: in=%b out=%b expected %b", what, in, b8, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // circular shift, 2 places left
    set8(8'b00000010, 8'b00000001, 8'b10000000, 8'b01000000,
         8'b00100000, 8'b00010000, 8'b00001000, 8'b00000100);
    check8(8'b10111010, 8'b11101010, "rotate-a");
    check8(8'b01100010, 8'b10001001, "rotate-b");
    // right shift with sign extension, 4 places
    set8(8'b11111000, 8'b00000100, 8'b00000010, 8'b00000001,
         8'b0, 8'b0, 8'b0, 8'b0);
    check8(8'b10111010, 8'b11111011, "sra-a");
    check8(8'b01100001, 8'b00000110, "sra-b");
    // masking with 11001100
    set8(8'b10000000, 8'b01000000, 8'b0, 8'b0,
         8'b00001000, 8'b00000100, 8'b0, 8'b0);
    check8(8'b11111111, 8'b11001100, "mask-a");
    check8(8'b01011010, 8'b01001000, "mask-b");
    // rotation by two places the other way
    set8(8'b00100000, 8'b00010000, 8'b00001000, 8'b00000100,
         8'b00000010, 8'b00000001, 8'b10000000, 8'b01000000);
    check8(8'b01101101, 8'b01011011, "rotate-right");

    // one byte into two sign-extended 4-bit integers (8 in, 16 out)
    t16[7] = 16'b11111000_00000000; t16[6] = 16'b00000100_00000000;
    t16[5] = 16'b00000010_00000000; t16[4] = 16'b00000001_00000000;
    t16[3] = 16'b00000000_11111000; t16[2] = 16'b00000000_00000100;
    t16[1] = 16'b00000000_00000010; t16[0] = 16'b00000000_00000001;
    a8 = 8'b01011101;
    #1;
    checks++;
    if (b16 !== 16'b00000101_11111101) begin
      failures++;
      $display("FAIL split: out=%b", b16);
    end

    // random 36x18 matrices, sparse and dense
    for (int n = 0; n < 2000; n++) begin
      logic [17:0] exp;
      for (int i = 0; i < 36; i++) begin
        t36[i] = 18'($urandom);
        if (n % 2 == 0) t36[i] &= 18'($urandom) & 18'($urandom) & 18'($urandom);
      end
      a36 = {4'($urandom), $urandom};
      #1;
      for (int j = 0; j < 18; j++) begin
        exp[j] = 1'b0;
        for (int i = 0; i < 36; i++)
          if (t36[i][j] && a36[i]) exp[j] = 1'b1;
      end
      checks++;
      if (b36 !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL random %0d: out=%h exp=%h", n, b36, exp);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
