// tb_ima_unit: self-checking test of one IMA-APUF unit.
//
// Checks, for all four challenge pairs:
//  - logic: every mux output equals the inverted input selected through the
//    intra-stage network, using the wiring table written out pin by pin
//    (mux0: inv0,inv1,inv2,inv3; mux1: inv1,inv0,inv3,inv2;
//     mux2: inv2,inv3,inv0,inv1; mux3: inv3,inv2,inv1,inv0);
//  - timing: after a simultaneous edge on all inputs, each output moves after
//    exactly inverter + network wire + mux delay of its own route;
//  - symmetry: outputs {mux0, mux3} always come from inputs {0,3} or {1,2}.
module tb_ima_unit;
  timeunit 1ps;
  timeprecision 1ps;
  import ima_pkg::*;

  localparam int unsigned SEED = 5;
  localparam int unsigned UIDX = 3;

  path_t path_i, path_o;
  sel_t  sel_i;
  int    checks = 0, failures = 0;
  time   t_change [4];

  ima_unit #(.DEVICE_SEED(SEED), .UNIT_INDEX(UIDX)) dut (.*);

  // wiring[j][p] = index of the inverter feeding pin p of mux j
  const int wiring [4][4] = '{'{0, 1, 2, 3}, '{1, 0, 3, 2}, '{2, 3, 0, 1}, '{3, 2, 1, 0}};

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    path_t pat;
    time   t0;
    int    exp_d, src;
    path_i = '0;
    sel_i  = '0;
    #5000;
    for (int s = 0; s < 4; s++) begin
      sel_i = sel_t'(s);
      // logic: 16 input patterns
      for (int v = 0; v < 16; v++) begin
        pat = path_t'(v);
        path_i = pat;
        #2000;
        for (int j = 0; j < 4; j++)
          check(path_o[j] == ~pat[wiring[j][s]],
                $sformatf("logic sel=%0d in=%b mux%0d=%b", s, pat, j, path_o[j]));
      end
      // symmetry of the pairs
      check(((wiring[0][s] + wiring[3][s]) == 3) && ((wiring[1][s] + wiring[2][s]) == 3),
            $sformatf("pairing sel=%0d", s));
      // timing: all inputs low, then one simultaneous rising edge
      path_i = '0;
      #2000;
      t0 = $time;
      path_i = '1;
      for (int j = 0; j < 4; j++) t_change[j] = 0;
      // sample every ps and note when each output leaves its old value
      for (int step = 1; step <= 2000; step++) begin
        #1;
        for (int j = 0; j < 4; j++)
          if (t_change[j] == 0 && path_o[j] == 1'b0) t_change[j] = $time;
      end
      for (int j = 0; j < 4; j++) begin
        src   = wiring[j][s];
        exp_d = int'(elem_delay_ps(SEED, UIDX, ELEM_INV + src)
              + elem_delay_ps(SEED, UIDX, ELEM_WIRE + 4 * j + s)
              + elem_delay_ps(SEED, UIDX, ELEM_MUX + j));
        check(t_change[j] - t0 == time'(exp_d),
              $sformatf("delay sel=%0d mux%0d got %0t want %0d", s, j, t_change[j] - t0, exp_d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
