// tb_ima_uniqueness: inter-chip uniqueness experiment on simulated chips.
//
// Four IMA-APUF instances, each with its own DEVICE_SEED (one seed = one
// chip's delays), receive the same random 64-bit challenges. Every response
// is checked against the reference model; the test then reports the figures
// used to judge a PUF across chips:
//   uniqueness  = mean pairwise Hamming distance between chips' responses
//   uniformity  = share of 1 responses per chip
//   bit-aliasing = share of chips answering 1, per challenge
// and repeats a challenge to confirm that the noise-free model is steady.
// The values depend on the simulation delay model, not on silicon.
module tb_ima_uniqueness;
  timeunit 1ps;
  timeprecision 1ps;
  import ima_pkg::*;
  import ima_ref_pkg::*;

  localparam int unsigned N_CHIPS   = 4;
  localparam int unsigned N_CHAL    = 64;
  localparam int unsigned N_STAGES  = 64;
  localparam int unsigned TUNE_BITS = 4;

  logic                      launch_i;
  logic [N_STAGES-1:0]       challenge_i;
  logic [3:0][TUNE_BITS-1:0] tune_i;
  logic [N_CHIPS-1:0]        r1, r2, r;

  int checks = 0, failures = 0;
  logic [N_CHAL-1:0] resp [N_CHIPS];

  for (genvar i = 0; i < N_CHIPS; i++) begin : g_chip
    ima_apuf #(.DEVICE_SEED(i + 1)) u_puf (
      .launch_i, .challenge_i, .tune_i,
      .r1_o(r1[i]), .r2_o(r2[i]), .r_o(r[i])
    );
  end

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

  // Expected responses of all chips; 0 if any chip would see a tie.
  function automatic bit expected(logic [N_STAGES-1:0] c, output logic [N_CHIPS-1:0] e);
    arrival_t t;
    bit tie1, tie2;
    logic a1, a2;
    for (int i = 0; i < N_CHIPS; i++) begin
      t  = arrivals(i + 1, N_STAGES, chal_t'(c));
      a1 = arbiter(t[0], t[3], tie1);
      a2 = arbiter(t[1], t[2], tie2);
      if (tie1 || tie2) return 0;
      e[i] = a1 ^ a2;
    end
    return 1;
  endfunction

  task automatic apply(logic [N_STAGES-1:0] c);
    challenge_i = c;
    #2000;
    launch_i = 1;
    #40000;
  endtask

  task automatic release_all();
    launch_i = 0;
    #40000;
  endtask

  initial begin
    logic [N_STAGES-1:0] c, c_first;
    logic [N_CHIPS-1:0]  e, first_r;
    int n = 0, hd_sum = 0, pairs = 0, ones, alias_min = N_CHIPS, alias_max = 0;
    real uniq;
    launch_i = 0;
    tune_i   = '0;
    challenge_i = '0;
    #50000;
    while (n < N_CHAL) begin
      c = {$urandom, $urandom};
      if (!expected(c, e)) continue;
      apply(c);
      for (int i = 0; i < N_CHIPS; i++) begin
        check(r[i] == e[i], $sformatf("chip %0d c=%h r=%b want %b", i, c, r[i], e[i]));
        resp[i][n] = r[i];
      end
      if (n == 0) begin
        c_first = c;
        first_r = r;
      end
      ones = $countones(r);
      if (ones < alias_min) alias_min = ones;
      if (ones > alias_max) alias_max = ones;
      release_all();
      n++;
    end
    // steadiness: repeat the first challenge
    apply(c_first);
    check(r == first_r, "repeated challenge gives the same responses");
    release_all();
    for (int i = 0; i < N_CHIPS; i++)
      for (int k = i + 1; k < N_CHIPS; k++) begin
        hd_sum += $countones(resp[i] ^ resp[k]);
        pairs++;
      end
    uniq = 100.0 * real'(hd_sum) / real'(pairs * N_CHAL);
    $display("chips=%0d challenges=%0d uniqueness=%0.2f%%", N_CHIPS, N_CHAL, uniq);
    for (int i = 0; i < N_CHIPS; i++)
      $display("chip %0d uniformity=%0.1f%%", i, 100.0 * real'($countones(resp[i])) / N_CHAL);
    $display("bit-aliasing: between %0d and %0d of %0d chips answer 1 per challenge",
             alias_min, alias_max, N_CHIPS);
    check(hd_sum > 0, "chips differ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
