// map_workloads_tb: sub-word workloads run through a full-size 36x18 mapping
// unit (512 maps) and the 18-bit add-logic network.
//
// The testbench plays the micro-program: it wires a set of maps, then for each
// step puts the two add-logic operands on the 36-bit mapping input, selects a
// map, waits for the result and, where the step needs arithmetic, passes the
// mapped words through the add-logic unit.  Five workloads:
//
//   * character extraction, six 6-bit characters per 36-bit word: map k moves
//     character k (k = 0 the leftmost) to the low six bits, all else masked;
//   * character extraction, four 8-bit characters in the low 32 bits of the
//     word: maps 8..11 do the same for 8-bit characters;
//   * quarter-word (9-bit) arithmetic on two co-ordinates packed in an 18-bit
//     half-word: add (each field wraps at 9 bits without disturbing the other),
//     field copy A -> a and negation -A -> a;
//   * 36-bit left shift with overflow detection: for each distance k, two
//     maps give the shifted upper and lower halves and two more gather the
//     bits that leave the word or reach the sign (the overflow portion); the
//     OR of those two, taken in the add-logic unit, is nonzero on overflow.
//     Four maps per distance, 140 maps for distances 1..35;
//   * reduction and assembly of the 36-bit floating-point word (28-bit
//     fraction, 8-bit exponent): the fraction becomes a 36-bit fixed-point
//     pair with eight zeros below it, the exponent an 18-bit sign-extended
//     integer; after an exponent update the word is assembled again.
//
// The map numbering and the way the quarter-word operations are split into
// maps and adds are this testbench's own; the results are checked against
// plain slicing and 9-bit integer arithmetic.
module map_workloads_tb;
  import map_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;

  logic [35:0] a_in = '0;
  logic [17:0] pat = '0, q;
  logic [8:0]  sel = '0, paddr = '0;
  logic [5:0]  prow = '0;
  logic clr = 0, tmap = 0, pen = 0, q_valid, busy;

  mapping_unit u_map (
    .clk, .rst_n, .a_in, .sel_addr(sel), .t_q_clear(clr), .t_map(tmap),
    .prog_en(pen), .prog_addr(paddr), .prog_row(prow), .prog_pattern(pat),
    .q, .q_valid, .busy);

  logic [17:0] al_m = '0, al_r = '0, al_a;
  logic al_cin = 0, al_cout;
  alfunc_e al_f = AL_ADD;
  add_logic u_al (.m(al_m), .r(al_r), .cin(al_cin), .func(al_f), .a(al_a), .cout(al_cout));

  // map numbers
  localparam int CH6 = 0;     // 0..5
  localparam int CH8 = 8;     // 8..11
  localparam int QU  = 16;    // upper 9-bit field of m -> top of output
  localparam int QL  = 17;    // lower 9-bit field of m -> top of output
  localparam int QPK = 18;    // pack: top of m -> upper field, top of r -> lower field
  localparam int QCU = 19;    // copy: upper field of m, lower field of r
  localparam int LSH = 32;    // 32 + 4(k-1) + {0 upper, 1 lower, 2, 3 overflow}
  localparam int FRU = 180;   // fraction, upper half (m passed through)
  localparam int FRL = 181;   // fraction, lower half: f18..f27 then eight zeros
  localparam int FEX = 182;   // exponent, sign-extended to 18 bits
  localparam int FAS = 183;   // assembly: fraction lower half (m) over exponent (r)

  int used [string];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wire one map given, for every input bit, the output bit it drives (-1: none)
  task automatic wire_map(int map, int dest [36]);
    for (int i = 0; i < 36; i++) begin
      @(negedge clk);
      pen = 1; paddr = 9'(map); prow = 6'(i);
      pat = (dest[i] < 0) ? '0 : 18'(1) << dest[i];
    end
    @(negedge clk) pen = 0;
  endtask

  task automatic no_dest(output int dest [36]);
    for (int i = 0; i < 36; i++) dest[i] = -1;
  endtask

  // one mapping of {m, r} through map s, three-clock latency checked
  task automatic do_map(int s, logic [17:0] m, logic [17:0] r, output logic [17:0] res);
    int lat = 0;
    @(negedge clk) clr = 1;
    @(negedge clk) begin clr = 0; tmap = 1; a_in = {m, r}; sel = 9'(s); end
    @(negedge clk) tmap = 0;
    lat = 1;
    while (!q_valid && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 3) begin failures++; $display("FAIL latency %0d on map %0d", lat, s); end
    res = q;
  endtask

  task automatic do_add(logic [17:0] m, logic [17:0] r, logic cin, output logic [17:0] res);
    al_f = AL_ADD; al_m = m; al_r = r; al_cin = cin;
    #1 res = al_a;
  endtask

  task automatic check(string what, logic [17:0] got, logic [17:0] exp);
    checks++;
    used[what] = used.exists(what) ? used[what] + 1 : 1;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %o expected %o", what, got, exp);
    end
  endtask

  initial begin
    int d [36];
    logic [35:0] w;
    logic [17:0] x, y, t1, t2, s1, s2, res;
    logic [8:0] fa, fb, fa2, fb2;

    repeat (2) @(negedge clk);
    rst_n = 1;

    // input bit i of the map is bit i of {m, r}: m occupies 35..18
    for (int k = 0; k < 6; k++) begin
      no_dest(d);
      for (int b = 0; b < 6; b++) d[35 - 6*k - 5 + b] = b;
      wire_map(CH6 + k, d);
    end
    for (int k = 0; k < 4; k++) begin
      no_dest(d);
      for (int b = 0; b < 8; b++) d[31 - 8*k - 7 + b] = b;
      wire_map(CH8 + k, d);
    end
    no_dest(d); for (int b = 0; b < 9; b++) d[27 + b] = 9 + b; wire_map(QU, d);
    no_dest(d); for (int b = 0; b < 9; b++) d[18 + b] = 9 + b; wire_map(QL, d);
    no_dest(d);
    for (int b = 0; b < 9; b++) begin d[27 + b] = 9 + b; d[9 + b] = b; end
    wire_map(QPK, d);
    no_dest(d);
    for (int b = 0; b < 9; b++) begin d[27 + b] = 9 + b; d[b] = b; end
    wire_map(QCU, d);

    // six 6-bit characters per word; the character index is the low part of
    // a character address, used as the map address
    for (int n = 0; n < 60; n++) begin
      automatic int k = n % 6;
      w = {4'($urandom), $urandom};
      do_map(CH6 + k, w[35:18], w[17:0], res);
      check("char6", res, 18'(w[35 - 6*k -: 6]));
    end
    for (int n = 0; n < 40; n++) begin
      automatic int k = n % 4;
      w = {4'($urandom), $urandom};
      do_map(CH8 + k, w[35:18], w[17:0], res);
      check("char8", res, 18'(w[31 - 8*k -: 8]));
    end

    // quarter-word add, a + A -> a, b + B -> b, each field on its own
    for (int n = 0; n < 60; n++) begin
      x = 18'($urandom); y = 18'($urandom);
      if (n == 0) begin x = {9'h1ff, 9'h001}; y = {9'h001, 9'h1ff}; end   // both fields wrap
      do_map(QU, x, 18'($urandom), t1);    // A at the top, zeros below
      do_map(QU, y, 18'($urandom), t2);    // a at the top
      do_add(t1, t2, 1'b0, s1);            // carry out of the top is lost: 9-bit wrap
      do_map(QL, x, '0, t1);               // B at the top
      do_map(QL, y, '0, t2);               // b at the top
      do_add(t1, t2, 1'b0, s2);
      do_map(QPK, s1, s2, res);
      fa = x[17:9] + y[17:9];
      fb = x[8:0] + y[8:0];
      check("quarter_add", res, {fa, fb});
    end

    // quarter-word copy A -> a (b left as it was)
    for (int n = 0; n < 30; n++) begin
      x = 18'($urandom); y = 18'($urandom);
      do_map(QCU, x, y, res);
      check("quarter_copy", res, {x[17:9], y[8:0]});
    end

    // quarter-word negate -A -> a: complement by exclusive OR with ones
    // (placed by the map), then add one in the field's lowest place
    for (int n = 0; n < 30; n++) begin
      x = 18'($urandom); y = 18'($urandom);
      if (n == 0) x[17:9] = 9'h100;        // -256 negates to itself
      do_map(QU, x, '0, t1);
      al_f = AL_XOR; al_m = t1; al_r = {9'h1ff, 9'h0}; al_cin = 0;
      #1 t2 = al_a;
      do_add(t2, 18'h200, 1'b0, s1);
      do_map(QPK, s1, {y[8:0], 9'h0}, res);
      fa2 = -x[17:9];
      fb2 = y[8:0];
      check("quarter_negate", res, {fa2, fb2});
    end

    // left shift of a positive 36-bit {m, r} by k with overflow detection
    for (int k = 1; k < 36; k++) begin
      automatic int base = LSH + 4 * (k - 1);
      no_dest(d); for (int i = 0; i < 36; i++) if (i + k >= 18 && i + k < 36) d[i] = i + k - 18;
      wire_map(base, d);
      no_dest(d); for (int i = 0; i < 18; i++) if (i + k < 18) d[i] = i + k;
      wire_map(base + 1, d);
      no_dest(d); for (int i = 35 - k; i < 36; i++) if (i - (35 - k) < 18) d[i] = i - (35 - k);
      wire_map(base + 2, d);
      no_dest(d); for (int i = 35 - k; i < 36; i++) if (i - (35 - k) >= 18) d[i] = i - (35 - k) - 18;
      wire_map(base + 3, d);
    end
    for (int n = 0; n < 105; n++) begin
      automatic int k = 1 + n % 35;
      automatic int base = LSH + 4 * (k - 1);
      logic [35:0] want;
      logic [17:0] hi, lo, o1, o2, ov;
      w = {4'($urandom), $urandom} >> $urandom_range(1, 35);   // positive
      w[35] = 1'b0;
      do_map(base,     w[35:18], w[17:0], hi);
      do_map(base + 1, w[35:18], w[17:0], lo);
      do_map(base + 2, w[35:18], w[17:0], o1);
      do_map(base + 3, w[35:18], w[17:0], o2);
      al_f = AL_OR; al_m = o1; al_r = o2; al_cin = 0;
      #1 ov = al_a;
      want = w << k;
      check("shift_upper", hi, want[35:18]);
      check("shift_lower", lo, want[17:0]);
      // overflow: a bit leaves the word or reaches the sign
      check((w >> (35 - k)) != 0 ? "shift_overflow" : "shift_no_overflow",
            18'(ov != '0), 18'((w >> (35 - k)) != 0));
    end

    // floating-point reduction and assembly, input {m, r} = the 36-bit word
    no_dest(d); for (int i = 18; i < 36; i++) d[i] = i - 18; wire_map(FRU, d);
    no_dest(d); for (int i = 8; i < 18; i++) d[i] = i; wire_map(FRL, d);
    no_dest(d); for (int i = 0; i < 8; i++) d[i] = i; wire_map(FEX, d);
    // the sign row drives bits 7..17; wire its row with a full pattern
    @(negedge clk); pen = 1; paddr = 9'(FEX); prow = 6'd7; pat = 18'h3ff80;
    @(negedge clk) pen = 0;
    no_dest(d);
    for (int i = 26; i < 36; i++) d[i] = i - 18;
    for (int i = 0; i < 8; i++) d[i] = i;
    wire_map(FAS, d);
    for (int n = 0; n < 40; n++) begin
      logic [17:0] fu, fl, ex, ex2;
      w = {4'($urandom), $urandom};
      do_map(FRU, w[35:18], w[17:0], fu);
      do_map(FRL, w[35:18], w[17:0], fl);
      do_map(FEX, w[35:18], w[17:0], ex);
      check("float_fraction", fu, w[35:18]);
      check("float_fraction", fl, {w[17:8], 8'h00});
      check("float_exponent", ex, {{10{w[7]}}, w[7:0]});
      do_add(ex, 18'd1, 1'b0, ex2);                  // exponent + 1
      do_map(FAS, fl, ex2, res);
      check("float_assembly", res, {w[17:8], 8'(w[7:0] + 8'd1)});
    end

    foreach (used[k]) $display("workload %s: %0d", k, used[k]);
    if (used.size() != 12) begin
      failures++;
      $display("FAIL only %0d of 12 workload checks ran", used.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
