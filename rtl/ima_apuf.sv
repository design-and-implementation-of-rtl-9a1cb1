// ima_apuf: improved MA-APUF (IMA-APUF), an arbiter-based strong PUF.
//
// A rising edge on launch_i enters four paths at once. N_STAGES/2 units
// (ima_delay_line) each invert the four signals and permute them under two
// challenge bits; the permutations always keep paths {mux0, mux3} and
// {mux1, mux2} as pairs of symmetrical routes. After the last unit each path
// passes a tuning delay (ima_tuning), then one arbiter compares mux0 with mux3
// to give r1_o and a second compares mux1 with mux2 to give r2_o. The response
// is r_o = r1_o ^ r2_o. Response values: r1_o = 1 when the mux3 path wins,
// r2_o = 1 when the mux2 path wins.
//
// Interface: launch_i, challenge_i (bit k-1 is challenge bit C_k),
// tune_i[j] (delay code of the tuning stage on path j, j = mux index),
// r1_o, r2_o, r_o.
//
// Operation: hold launch_i low, set challenge_i and tune_i, raise launch_i,
// and read r1_o/r2_o/r_o once the edge has crossed the chain (about
// N_STAGES/2 * 0.5 ns with the simulation delays). Lower launch_i again; when
// all four paths are low the arbiters are released for the next challenge.
// Challenge and tuning codes must stay stable while launch_i is high (an
// assertion checks this in simulation). There is no clock and no flip-flop.
// The responses are asynchronous latch outputs; capture them in the
// receiving clock domain.
//
// From the source design: the unit structure and wiring, the arbiter pairing
// mux0/mux3 and mux1/mux2, the cross-coupled NAND arbiters, the XOR, and the
// tuning blocks in front of the two arbiters. This design's choices: one
// tuning stage per path with a binary code, the challenge bit order, and the
// simulation delay model selected by DEVICE_SEED (one seed = one chip) and
// the routing skew ROUTE_PS used to exercise the tuning.
module ima_apuf
  import ima_pkg::*;
#(
  parameter int unsigned N_STAGES    = 64,
  parameter int unsigned TUNE_BITS   = 4,
  parameter int unsigned TUNE_STEP_PS = 8,
  parameter int unsigned DEVICE_SEED = 1,
  // Fixed routing delay of each path (mux0..mux3) in front of its tuning
  // stage, simulation only; unequal values model placement skew.
  parameter int unsigned ROUTE_PS [4] = '{0, 0, 0, 0}
) (
  input  logic                      launch_i,
  input  logic [N_STAGES-1:0]       challenge_i,
  input  logic [3:0][TUNE_BITS-1:0] tune_i,
  output logic                      r1_o,
  output logic                      r2_o,
  output logic                      r_o
);
  timeunit 1ps;
  timeprecision 1ps;

  path_t line_q;   // last-unit mux outputs
  path_t tuned_q;  // after the tuning delays

  ima_delay_line #(
    .N_STAGES   (N_STAGES),
    .DEVICE_SEED(DEVICE_SEED)
  ) u_line (
    .launch_i   (launch_i),
    .challenge_i(challenge_i),
    .path_o     (line_q)
  );

  for (genvar j = 0; j < 4; j++) begin : g_tune
    ima_tuning #(
      .TUNE_BITS(TUNE_BITS),
      .STEP_PS  (TUNE_STEP_PS),
      .ROUTE_PS (ROUTE_PS[j])
    ) u_tune (
      .path_i(line_q[j]),
      .tune_i(tune_i[j]),
      .path_o(tuned_q[j])
    );
  end

  // Symmetrical pairs: mux0 against mux3, mux1 against mux2.
  ima_arbiter u_arb1 (.a_i(tuned_q[0]), .b_i(tuned_q[3]), .q_o(r1_o));
  ima_arbiter u_arb2 (.a_i(tuned_q[1]), .b_i(tuned_q[2]), .q_o(r2_o));

  assign r_o = r1_o ^ r2_o;

  // Protocol: challenge and tuning codes may change only while launch_i is
  // low; a change during a race would reroute edges already in flight.
  // Values settling at time 0 are exempt.
  always @(challenge_i or tune_i)
    assert (!launch_i || $time == 0)
      else $error("ima_apuf: challenge or tuning changed while launch_i is high");

endmodule
