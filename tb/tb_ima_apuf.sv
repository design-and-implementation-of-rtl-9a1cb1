// tb_ima_apuf: end-to-end test of the IMA-APUF at its default size
// (64 stages, 32 units, default chip DEVICE_SEED).
//
// Each evaluation: hold launch low, apply challenge and tuning codes, raise
// launch, wait for the edge to cross the chain, read r1/r2/r, lower launch and
// check that both arbiters are released (r1 = r2 = 1, r = 0).
// Expected responses come from the reference model (ima_ref_pkg); challenges
// whose compared paths arrive at the same picosecond are skipped, since a
// real latch has no defined answer there.
//
// Mechanisms counted (each must occur at least once):
//   r1 won by mux0 path / by mux3 path, r2 won by mux1 / by mux2,
//   r = 0 / r = 1, an all-11 challenge (fully symmetrical routing),
//   tuning codes that reverse an arbiter decision, arbiter release.
module tb_ima_apuf;
  timeunit 1ps;
  timeprecision 1ps;
  import ima_pkg::*;
  import ima_ref_pkg::*;

  // Defaults of ima_apuf, repeated for the reference model.
  localparam int unsigned N_STAGES  = 64;
  localparam int unsigned TUNE_BITS = 4;
  localparam int unsigned STEP_PS   = 8;
  localparam int unsigned SEED      = 1;

  logic                      launch_i;
  logic [N_STAGES-1:0]       challenge_i;
  logic [3:0][TUNE_BITS-1:0] tune_i;
  logic                      r1_o, r2_o, r_o;

  int checks = 0, failures = 0;
  int n_r1_0 = 0, n_r1_1 = 0, n_r2_0 = 0, n_r2_1 = 0, n_r_0 = 0, n_r_1 = 0;
  int n_all11 = 0, n_tune_flip = 0, n_release = 0, n_eval = 0;

  ima_apuf dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Predicted {r1, r2}; returns 0 when an arbiter would see a tie.
  function automatic bit predict(logic [N_STAGES-1:0] c, logic [3:0][TUNE_BITS-1:0] tune,
                                 output logic r1, output logic r2);
    arrival_t t;
    bit tie1, tie2;
    t = arrivals(SEED, N_STAGES, chal_t'(c));
    for (int j = 0; j < 4; j++) t[j] += longint'(tune[j]) * STEP_PS;
    r1 = arbiter(t[0], t[3], tie1);
    r2 = arbiter(t[1], t[2], tie2);
    return !(tie1 || tie2);
  endfunction

  // One evaluation; returns the measured {r1, r2}.
  task automatic evaluate(logic [N_STAGES-1:0] c, logic [3:0][TUNE_BITS-1:0] tune,
                          output logic [1:0] got);
    logic e1, e2;
    void'(predict(c, tune, e1, e2));
    challenge_i = c;
    tune_i      = tune;
    #2000;
    launch_i = 1;
    #40000;
    got = {r1_o, r2_o};
    n_eval++;
    check(r1_o == e1, $sformatf("c=%h r1=%b want %b", c, r1_o, e1));
    check(r2_o == e2, $sformatf("c=%h r2=%b want %b", c, r2_o, e2));
    check(r_o == (e1 ^ e2), $sformatf("c=%h r=%b want %b", c, r_o, e1 ^ e2));
    if (r1_o) n_r1_1++; else n_r1_0++;
    if (r2_o) n_r2_1++; else n_r2_0++;
    if (r_o) n_r_1++; else n_r_0++;
    launch_i = 0;
    #40000;
    check(r1_o == 1'b1 && r2_o == 1'b1 && r_o == 1'b0,
          $sformatf("arbiters not released: r1=%b r2=%b r=%b", r1_o, r2_o, r_o));
    n_release++;
  endtask

  initial begin
    logic [N_STAGES-1:0]       c;
    logic [3:0][TUNE_BITS-1:0] tune, zero_tune;
    logic [1:0]                got, got2;
    logic                      e1, e2;
    arrival_t                  t;
    longint                    d;
    int                        tries;

    zero_tune   = '0;
    launch_i    = 0;
    challenge_i = '0;
    tune_i      = '0;
    #50000;
    check(r1_o == 1'b1 && r2_o == 1'b1, "arbiters at rest after power-up");

    // Fully symmetrical routing: every unit set to 11.
    c = '1;
    if (predict(c, zero_tune, e1, e2)) begin
      evaluate(c, zero_tune, got);
      n_all11++;
    end

    // Random challenges, tuning off.
    for (int i = 0; i < 200; i++) begin
      c = {$urandom, $urandom};
      if (!predict(c, zero_tune, e1, e2)) continue;
      evaluate(c, zero_tune, got);
    end

    // Tuning: find challenges where r1 (then r2) is decided by less than the
    // tuning range, then delay the winning path enough to reverse the decision.
    for (int arb = 0; arb < 2; arb++) begin
      tries = 0;
      while (tries < 2000) begin
        tries++;
        c = {$urandom, $urandom};
        t = arrivals(SEED, N_STAGES, chal_t'(c));
        d = (arb == 0) ? t[3] - t[0] : t[2] - t[1];
        if (d == 0 || d > 100 || d < -100) continue;
        tune = '0;
        // delay the winner by just over the gap
        if (arb == 0) begin
          if (d > 0) tune[0] = TUNE_BITS'((d / STEP_PS) + 1);
          else       tune[3] = TUNE_BITS'((-d / STEP_PS) + 1);
        end else begin
          if (d > 0) tune[1] = TUNE_BITS'((d / STEP_PS) + 1);
          else       tune[2] = TUNE_BITS'((-d / STEP_PS) + 1);
        end
        if (!predict(c, zero_tune, e1, e2) || !predict(c, tune, e1, e2)) continue;
        evaluate(c, zero_tune, got);
        evaluate(c, tune, got2);
        check(got[1-arb] != got2[1-arb],
              $sformatf("tuning did not reverse arbiter %0d (gap %0d ps)", arb + 1, d));
        if (got[1-arb] != got2[1-arb]) n_tune_flip++;
        break;
      end
    end

    $display("evaluations=%0d r1:0/1=%0d/%0d r2:0/1=%0d/%0d r:0/1=%0d/%0d all11=%0d tune_flips=%0d releases=%0d",
             n_eval, n_r1_0, n_r1_1, n_r2_0, n_r2_1, n_r_0, n_r_1, n_all11, n_tune_flip, n_release);
    check(n_r1_0 > 0 && n_r1_1 > 0, "arbiter 1 decided both ways");
    check(n_r2_0 > 0 && n_r2_1 > 0, "arbiter 2 decided both ways");
    check(n_r_0 > 0 && n_r_1 > 0, "response r took both values");
    check(n_all11 > 0, "all-11 challenge evaluated");
    check(n_tune_flip == 2, "tuning reversed both arbiters");
    check(n_release > 0, "arbiters released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
