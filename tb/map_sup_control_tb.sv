// map_sup_control_tb: drives every micro-instruction type with every
// combination of the timing pulses and of the control bits C21, C24, C25,
// C27, and compares the mapping-unit strobes with a truth-table model
// written from the control equations.
module map_sup_control_tb;
  import map_pkg::*;
  int checks = 0, failures = 0;
  creg_t c;
  timing_t w;
  logic t_q_clear, t_map, t_l, l_src_z, k_l;

  map_sup_control dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ty = 0; ty < 8; ty++)
      for (int wv = 0; wv < 256; wv++)
        for (int cb = 0; cb < 16; cb++) begin
          logic e_clr, e_map, e_l, e_z, e_k;
          c = creg_t'({$urandom, 4'($urandom)});
          {c[1], c[2], c[3]} = 3'(ty);
          {c[21], c[24], c[25], c[27]} = 4'(cb);
          w = timing_t'(8'(wv));
          #1;
          e_clr = w.w_da;
          // start: register-only type on the upper-register pulse, register
          // store type on the store pulse, any type with C21 on W3
          e_map = (ty == 1 && w.w1_rp) || (ty == 3 && w.w_r) || (w.w3 && c[21]);
          e_l   = w.w1_rp && c[24];
          e_z   = c[25];
          e_k   = c[27] && ((ty <= 1 && w.w2_r) || (w.w4 && !w.rt));
          checks++;
          if ({t_q_clear, t_map, t_l, l_src_z, k_l} !== {e_clr, e_map, e_l, e_z, e_k}) begin
            failures++;
            if (failures < 10)
              $display("FAIL type %0d w=%b cb=%b: got %b%b%b%b%b", ty, w, 4'(cb),
                       t_q_clear, t_map, t_l, l_src_z, k_l);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
