// cirrus_map_top_tb: end-to-end run of the CIRRUS mapping-unit augmentation at
// full size (512 maps of 36x18).
//
// The testbench plays the host computer: it wires the fixed store, then issues
// micro-instructions as control words with their timing pulses, feeding m, r
// as the host's upper registers would (taking them from N and Z where a real
// micro-program would route those registers).  Workloads:
//   * 36-bit left shift by any distance as two 36-to-18 maps at L and L+1
//     (L loaded from Z, stepped after the first map),
//   * 18-bit arithmetic right shifts with a null map over the other half,
//   * floating-point style normalisation: the shift detector gives the
//     distance, the add-logic forms the map address 2*s, L is loaded from N,
//     and two maps normalise the 36-bit fraction held in Z:N,
//   * random maps against a reference, and the add-logic functions.
// It checks every result against a model, the three-clock map latency, and
// counts each mechanism (L loaded from N / from Z, L stepped by W2 and by W4,
// map started by W1, W_R and W3, map into N and into Z, each add-logic
// function, the double right shift, literals, the -1/2 normalisation case);
// a mechanism that never occurs is a failure.
module cirrus_map_top_tb;
  import map_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;

  creg_t c = '0;
  timing_t w = '0;
  logic [17:0] m = '0, r = '0;
  logic gi = 0;
  logic prog_en = 0;
  logic [8:0] prog_addr = '0;
  logic [5:0] prog_row = '0;
  logic [17:0] prog_pattern = '0;
  logic [17:0] n, z, q, a;
  logic [8:0] l;
  logic q_valid, map_busy, g_o, norm_none;
  logic [5:0] norm_shift;

  cirrus_map_top dut (.*);

  // ---- map table kept by the testbench ----
  localparam int SHL_BASE = 0;     // 36-bit left shift by s: maps 2s (upper), 2s+1 (lower)
  localparam int SRA_BASE = 128;   // 18-bit arithmetic right shift of r by s
  logic [35:0][17:0] maps [512];

  // ---- model of the host-visible state ----
  logic [17:0] mn = '0, mz = '0;
  int ml = 0;
  logic mgo = 0;

  // ---- mechanism counters ----
  typedef enum int {
    EV_L_FROM_N, EV_L_FROM_Z, EV_L_STEP_W2, EV_L_STEP_W4, EV_MAP_W1, EV_MAP_WR,
    EV_MAP_W3, EV_MAP_TO_N, EV_MAP_TO_Z, EV_ADD, EV_AND, EV_OR, EV_XOR,
    EV_DOUBLE_RS, EV_LITERAL, EV_NORM_HALF, EV_NUM
  } ev_e;
  int ev [EV_NUM];

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (n=%h/%h z=%h/%h l=%0d/%0d)", what, n, mn, z, mz, l, ml);
    end
  endtask

  function automatic logic [35:0][17:0] shl_map(int s, bit upper);
    logic [35:0][17:0] t = '0;
    for (int i = 0; i < 36; i++) begin
      int d = i + s;
      if (upper && d >= 18 && d <= 35) t[i][d-18] = 1'b1;
      if (!upper && d <= 17)           t[i][d]    = 1'b1;
    end
    return t;
  endfunction

  function automatic logic [35:0][17:0] sra_map(int s);
    logic [35:0][17:0] t = '0;     // rows 35..18 (m) stay empty: null map
    for (int i = 0; i < 18; i++) begin
      if (i - s >= 0) t[i][i-s] = 1'b1;
      if (i == 17) for (int j = 17 - s; j <= 17; j++) t[i][j] = 1'b1;
    end
    return t;
  endfunction

  function automatic logic [17:0] ref_map(int s, logic [35:0] in);
    logic [17:0] o = '0;
    for (int j = 0; j < 18; j++)
      for (int i = 0; i < 36; i++)
        if (maps[s][i][j] && in[i]) o[j] = 1'b1;
    return o;
  endfunction

  // ---- control word construction ----
  function automatic creg_t cw(utype_e ty, lsel_e sel, bit c24 = 0, bit c25 = 0,
                               bit c26 = 0, bit c27 = 0, bit c21 = 0);
    creg_t x = '0;
    {x[1], x[2], x[3]} = ty;
    x[34:36] = sel;
    x[21] = c21; x[24] = c24; x[25] = c25; x[26] = c26; x[27] = c27;
    return x;
  endfunction

  function automatic creg_t cw_lit(logic [17:0] v, bit to_z);
    creg_t x = '0;
    {x[1], x[2], x[3]} = UI_SR;
    x[10:13] = v[17:14];
    x[20:33] = v[13:0];
    x[34] = to_z;
    x[36] = 1'b1;
    return x;
  endfunction

  task automatic pulse(string which);
    @(negedge clk);
    w = '0;
    case (which)
      "da":  w.w_da  = 1;
      "w1":  w.w1_rp = 1;
      "w2":  w.w2_r  = 1;
      "w3":  w.w3    = 1;
      "w4":  w.w4    = 1;
      "wr":  w.w_r   = 1;
      "low": w.w_low = 1;
      default: ;
    endcase
    @(negedge clk);
    w = '0;
  endtask

  // One micro-instruction.  start: which pulse starts the mapping ("w1" for
  // type FA, "wr" for AY, "w3" for a store type with C21); step: "w2" or "w4".
  task automatic uop(creg_t cc, logic [17:0] mm, logic [17:0] rr, logic g,
                     string start = "w1", string step = "w2");
    int lat;
    logic [17:0] sum_a;
    logic        sum_c;
    lsel_e sel = lsel_e'(cc[34:36]);
    logic [17:0] want_q;
    bit maps_now;
    int l_used;
    c = cc; m = mm; r = rr; gi = g;
    pulse("da");
    check(q_valid == 0 && q == 0, "q cleared at start");
    // upper registers: L load
    if (cc[24] && utype(cc) != UI_SR) begin
      ml = cc[25] ? int'(mz[8:0]) : int'(mn[8:0]);
      ev[cc[25] ? EV_L_FROM_Z : EV_L_FROM_N]++;
    end
    l_used = ml;
    maps_now = (start == "w1" && utype(cc) == UI_FA) ||
               (start == "wr" && utype(cc) == UI_AY) ||
               (start == "w3" && cc[21]);
    if (utype(cc) != UI_SR) begin
      pulse("w1");
      if (start != "w1") pulse(start);
    end
    lat = 1;
    while (!q_valid && lat < 10) begin @(negedge clk); lat++; end
    if (maps_now) begin
      want_q = ref_map(l_used, {mm, rr});
      check(lat == 3, $sformatf("map latency %0d", lat));
      check(q === want_q, $sformatf("map %0d result %h expected %h", l_used, q, want_q));
      ev[start == "w1" ? EV_MAP_W1 : start == "wr" ? EV_MAP_WR : EV_MAP_W3]++;
    end
    // lower registers
    {sum_c, sum_a} = {1'b0, mm} + {1'b0, rr} + {18'b0, g};
    if (utype(cc) == UI_SR) begin
      ev[EV_LITERAL]++;
      if (cc[34]) mz = {cc[10:13], cc[20:33]}; else mn = {cc[10:13], cc[20:33]};
    end else begin
      logic [17:0] av;
      if (!cc[26])     begin av = sum_a;   mgo = sum_c; if (sel != LS_HOLD && sel != LS_NONE) ev[EV_ADD]++; end
      else if (cc[27]) begin av = mm ^ rr; if (sel != LS_HOLD && sel != LS_NONE) ev[EV_XOR]++; end
      else if (cc[25]) begin av = mm & rr; if (sel != LS_HOLD && sel != LS_NONE) ev[EV_AND]++; end
      else             begin av = mm | rr; if (sel != LS_HOLD && sel != LS_NONE) ev[EV_OR]++;  end
      case (sel)
        LS_N_A:  mn = av;
        LS_N_Q:  begin mn = want_q; ev[EV_MAP_TO_N]++; end
        LS_N_RS: mn = av >> 1;
        LS_Z_A:  mz = av;
        LS_Z_Q:  begin mz = want_q; ev[EV_MAP_TO_Z]++; end
        LS_Z_RS: begin
          mz = {cc[26] ? 1'b0 : sum_c, av[17:1]};
          mn = {av[0], mn[16:0]};
          ev[EV_DOUBLE_RS]++;
        end
        default: ;
      endcase
    end
    pulse("low");
    if (utype(cc) != UI_SR && cc[27] && (step == "w4" || !cc[1] && !cc[2])) begin
      ml = (ml + 1) % 512;
      ev[step == "w2" ? EV_L_STEP_W2 : EV_L_STEP_W4]++;
    end
    if (utype(cc) != UI_SR) pulse(step);
    @(negedge clk);
    check(n === mn && z === mz && l === 9'(ml) && g_o === mgo, "register state");
  endtask

  // 36-bit left shift of {hi, lo} by s via maps at L = 2s, 2s+1
  task automatic shift36(logic [17:0] hi, logic [17:0] lo, int s, string start = "w1");
    logic [35:0] want = {hi, lo} << s;
    utype_e ty = (start == "wr") ? UI_AY : (start == "w3") ? UI_AX : UI_FA;
    string step = (start == "w1") ? "w2" : "w4";
    uop(cw_lit(18'(SHL_BASE + 2 * s), 1'b1), 0, 0, 0);                     // literal > Z
    uop(cw(ty, LS_Z_Q, 1, 1, 0, 1, start == "w3"), hi, lo, 0, start, step); // Z>L, map > Z, L+1
    uop(cw(ty, LS_N_Q, 0, 0, 0, 0, start == "w3"), hi, lo, 0, start, step); // map > N
    check({z, n} === want, $sformatf("shift36 by %0d", s));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    // wire the fixed store
    for (int s = 0; s < 512; s++) begin
      if (s < 72)                               maps[s] = shl_map((s - SHL_BASE) / 2, (s % 2) == 0);
      else if (s >= SRA_BASE && s < SRA_BASE + 18) maps[s] = sra_map(s - SRA_BASE);
      else for (int i = 0; i < 36; i++) maps[s][i] = 18'($urandom) & 18'($urandom);
      for (int i = 0; i < 36; i++) begin
        @(negedge clk);
        prog_en = 1; prog_addr = 9'(s); prog_row = 6'(i); prog_pattern = maps[s][i];
      end
    end
    @(negedge clk) prog_en = 0;

    // 36-bit shifts, every distance, started by W1 (type FA)
    for (int s = 0; s < 36; s++) shift36(18'($urandom), 18'($urandom), s);
    // the 13-place shift again through the store-type starts
    shift36(18'h2A5C3, 18'h1F00F, 13, "wr");
    shift36(18'h13579, 18'h2468A, 13, "w3");

    // 18-bit arithmetic right shifts (null map over m), L loaded from N
    for (int k = 0; k < 18; k++) begin
      logic [17:0] v, want_sra;
      v = 18'($urandom);
      want_sra = v;
      for (int b = 0; b < k; b++) want_sra = {want_sra[17], want_sra[17:1]};
      uop(cw_lit(18'(SRA_BASE + k), 1'b0), 0, 0, 0);                     // literal > N
      uop(cw(UI_FA, LS_Z_Q, 1, 0), 18'($urandom), v, 0);                  // N>L, map > Z
      check(z === want_sra, $sformatf("sra %0d", k));
    end

    // random maps
    for (int k = 0; k < 40; k++) begin
      automatic int s = $urandom_range(200, 511);
      uop(cw_lit(18'(s), 1'b1), 0, 0, 0);
      uop(cw(UI_FA, LS_N_Q, 1, 1), 18'($urandom), 18'($urandom), 0);
    end

    // add-logic functions and the double-length right shift
    for (int k = 0; k < 40; k++) begin
      automatic lsel_e s = lsel_e'(3'($urandom_range(0, 6)));
      if (s == LS_N_Q || s == LS_Z_Q) s = LS_N_A;
      uop(cw(UI_FA, s, 0, 1'($urandom), 1'($urandom), 1'($urandom)),
          18'($urandom), 18'($urandom), 1'($urandom));
    end
    uop(cw(UI_FA, LS_Z_RS), 18'h3FFFF, 18'h00003, 1'b0);                 // carry into Z

    // normalisation: fraction in Z:N, detector gives s, maps 2s, 2s+1 shift it
    for (int k = 0; k < 30; k++) begin
      logic [35:0] f;
      int s;
      logic [35:0] want;
      case (k % 3)
        0: f = {4'($urandom), $urandom} >> $urandom_range(0, 34);                  // positive
        1: f = ~({4'($urandom), $urandom} >> $urandom_range(0, 34));               // negative
        default: f = {36{1'b1}} << $urandom_range(1, 34);                          // -1/2 * 2**-p
      endcase
      if (f == '0) f = 36'h1;
      uop(cw_lit(f[35:18], 1'b1), 0, 0, 0);
      uop(cw_lit(f[17:0], 1'b0), 0, 0, 0);
      s = int'(norm_shift);
      check(!norm_none, "normalisable");
      // address 2s formed by the add-logic: (s) + (s) > N, then N>L
      uop(cw(UI_FA, LS_N_A), 18'(s), 18'(s), 0);
      begin
        logic [17:0] hi, lo;
        hi = f[35:18];
        lo = f[17:0];
        uop(cw(UI_FA, LS_Z_Q, 1, 0, 0, 1), hi, lo, 0);                   // N>L, map > Z, L+1
        uop(cw(UI_FA, LS_N_Q), hi, lo, 0);                                // map > N
      end
      want = f << s;
      check({z, n} === want, "normalised value");
      check(z[17] != z[16] || {z, n} === {2'b11, 34'b0}, "normalised form");
      if ({z, n} === {2'b11, 34'b0} && s > 0) ev[EV_NORM_HALF]++;
    end

    for (int e = 0; e < EV_NUM; e++) begin
      checks++;
      if (ev[e] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", ev_e'(e));
      end else $display("mechanism %-14s %0d", ev_e'(e), ev[e]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
