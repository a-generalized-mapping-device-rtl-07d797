// shift_detector_tb: compares the normalisation shift with a reference that
// shifts the fraction left one place at a time until it is normalised
// (sign differs from the next bit, or, in two's complement, the word is
// 1100..0 = -1/2).  Exhaustive on 8-bit detectors of both kinds, random and
// structured (runs of equal bits) on the 36-bit default.
module shift_detector_tb;
  int checks = 0, failures = 0;

  logic [7:0]  f8;
  logic [2:0]  s8r, s8o;
  logic        n8r, n8o;
  logic [35:0] f36;
  logic [5:0]  s36r, s36o;
  logic        n36r, n36o;

  shift_detector #(.WIDTH(8), .RADIX_COMPLEMENT(1'b1)) d8r (.f(f8), .shift(s8r), .none(n8r));
  shift_detector #(.WIDTH(8), .RADIX_COMPLEMENT(1'b0)) d8o (.f(f8), .shift(s8o), .none(n8o));
  shift_detector                                        d36r (.f(f36), .shift(s36r), .none(n36r));
  shift_detector #(.WIDTH(36), .RADIX_COMPLEMENT(1'b0)) d36o (.f(f36), .shift(s36o), .none(n36o));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: returns -1 when no shift normalises the word
  function automatic int ref_shift(logic [63:0] f, int w, bit radix);
    logic [63:0] g = f;
    logic [63:0] half = 64'b11 << (w - 2);
    logic [63:0] mask = (64'b1 << w) - 1;
    for (int s = 0; s < w - 1; s++) begin
      if (g[w-1] != g[w-2]) return s;
      if (radix && ((g & mask) == half)) return s;
      g = (g << 1) & mask;
    end
    return -1;
  endfunction

  task automatic cmp(string what, int exp, logic [5:0] got, logic none);
    checks++;
    if ((exp < 0 && !none) || (exp >= 0 && (none || int'(got) != exp))) begin
      failures++;
      if (failures < 15) $display("FAIL %s: shift=%0d none=%b expected %0d", what, got, none, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      f8 = 8'(v);
      #1;
      cmp($sformatf("8r %b", f8), ref_shift(64'(f8), 8, 1), 6'(s8r), n8r);
      cmp($sformatf("8o %b", f8), ref_shift(64'(f8), 8, 0), 6'(s8o), n8o);
    end
    for (int k = 0; k < 5000; k++) begin
      if (k % 2 == 0) f36 = {4'($urandom), $urandom};
      else begin
        // a run of equal bits from the top, then random: exercises long shifts
        automatic int p = $urandom_range(0, 36);
        automatic logic top = 1'($urandom);
        f36 = {4'($urandom), $urandom};
        for (int i = 0; i < p; i++) f36[35-i] = top;
        if ($urandom_range(3) == 0) for (int i = p; i < 36; i++) f36[35-i] = ~top;
      end
      #1;
      cmp($sformatf("36r %h", f36), ref_shift(64'(f36), 36, 1), s36r, n36r);
      cmp($sformatf("36o %h", f36), ref_shift(64'(f36), 36, 0), s36o, n36o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
