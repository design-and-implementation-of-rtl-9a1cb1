// tb_ima_calibration: the tuning procedure run against a skewed layout.
//
// The PUF is built with an extra 100 ps of routing on the mux0 and mux1
// paths (ROUTE_PS), so the mux3 and mux2 paths win too often and r1, r2 are
// biased towards 1. The test then follows the calibration procedure: for
// each tuning code on the faster line (mux3 for arbiter 1, mux2 for
// arbiter 2) it measures the share of 1 responses over a fixed challenge
// set, and keeps the code whose bias is closest to 50%.
// Checked: every response against the reference model, the bias falling as
// the code grows, and the chosen code bringing the bias closer to 50% than
// no tuning does.
module tb_ima_calibration;
  timeunit 1ps;
  timeprecision 1ps;
  import ima_pkg::*;
  import ima_ref_pkg::*;

  localparam int unsigned N_STAGES  = 64;
  localparam int unsigned TUNE_BITS = 4;
  localparam int unsigned STEP_PS   = 8;
  localparam int unsigned SEED      = 3;
  localparam int unsigned SKEW_PS   = 100;
  localparam int unsigned N_CHAL    = 32;
  localparam int unsigned ROUTE [4] = '{SKEW_PS, SKEW_PS, 0, 0};

  logic                      launch_i;
  logic [N_STAGES-1:0]       challenge_i;
  logic [3:0][TUNE_BITS-1:0] tune_i;
  logic                      r1_o, r2_o, r_o;

  int checks = 0, failures = 0;
  logic [N_STAGES-1:0] chal [N_CHAL];

  ima_apuf #(.DEVICE_SEED(SEED), .ROUTE_PS(ROUTE)) dut (.*);

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

  // Predicted {r1, r2} with skew and tuning; 0 on a tie.
  function automatic bit predict(logic [N_STAGES-1:0] c, logic [3:0][TUNE_BITS-1:0] tune,
                                 output logic [1:0] e);
    arrival_t t;
    bit tie1, tie2;
    t = arrivals(SEED, N_STAGES, chal_t'(c));
    for (int j = 0; j < 4; j++) t[j] += longint'(ROUTE[j]) + longint'(tune[j]) * STEP_PS;
    e[1] = arbiter(t[0], t[3], tie1);
    e[0] = arbiter(t[1], t[2], tie2);
    return !(tie1 || tie2);
  endfunction

  // Share of 1 responses (in challenges, 0..N_CHAL) of r1 and r2 for one tuning setting.
  int ones1, ones2;
  task automatic measure(logic [3:0][TUNE_BITS-1:0] tune);
    logic [1:0] e;
    ones1 = 0;
    ones2 = 0;
    tune_i = tune;
    for (int i = 0; i < N_CHAL; i++) begin
      void'(predict(chal[i], tune, e));
      challenge_i = chal[i];
      #2000;
      launch_i = 1;
      #40000;
      check({r1_o, r2_o} == e, $sformatf("c=%h r1r2=%b%b want %b", chal[i], r1_o, r2_o, e));
      ones1 += int'(r1_o);
      ones2 += int'(r2_o);
      launch_i = 0;
      #40000;
    end
  endtask

  function automatic int dist50(int ones);
    return (2 * ones > N_CHAL) ? 2 * ones - N_CHAL : N_CHAL - 2 * ones;
  endfunction

  initial begin
    logic [3:0][TUNE_BITS-1:0] tune;
    logic [1:0] e;
    int n = 0, best1, best2, d1_best, d2_best, d1_0, d2_0, prev1, prev2;
    bit ok;
    launch_i = 0;
    tune_i = '0;
    challenge_i = '0;
    // a challenge set free of ties at every tuning code
    while (n < N_CHAL) begin
      chal[n] = {$urandom, $urandom};
      ok = 1;
      for (int c = 0; c < (1 << TUNE_BITS); c++) begin
        tune = '0;
        tune[3] = TUNE_BITS'(c);
        tune[2] = TUNE_BITS'(c);
        if (!predict(chal[n], tune, e)) ok = 0;
      end
      if (ok) n++;
    end
    #50000;
    best1 = 0; best2 = 0; d1_best = N_CHAL + 1; d2_best = N_CHAL + 1;
    prev1 = N_CHAL; prev2 = N_CHAL;
    for (int c = 0; c < (1 << TUNE_BITS); c++) begin
      tune = '0;
      tune[3] = TUNE_BITS'(c);   // slow down the faster line of arbiter 1
      tune[2] = TUNE_BITS'(c);   // and of arbiter 2
      measure(tune);
      $display("tune code %2d: r1 ones %0d/%0d, r2 ones %0d/%0d", c, ones1, N_CHAL, ones2, N_CHAL);
      check(ones1 <= prev1 && ones2 <= prev2, "bias falls as the faster line is slowed");
      prev1 = ones1;
      prev2 = ones2;
      if (c == 0) begin
        d1_0 = dist50(ones1);
        d2_0 = dist50(ones2);
      end
      if (dist50(ones1) < d1_best) begin d1_best = dist50(ones1); best1 = c; end
      if (dist50(ones2) < d2_best) begin d2_best = dist50(ones2); best2 = c; end
    end
    $display("chosen codes: arbiter 1 = %0d, arbiter 2 = %0d (skew %0d ps = %0d steps)",
             best1, best2, SKEW_PS, SKEW_PS / STEP_PS);
    check(d1_0 > 0 && d2_0 > 0, "untuned responses are biased");
    check(d1_best < d1_0, "tuning reduces the bias of r1");
    check(d2_best < d2_0, "tuning reduces the bias of r2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
