// ima_delay_line: the n-stage delay chain of the improved MA-APUF.
//
// N_STAGES/2 ima_unit instances in cascade. The launch edge drives all four
// inputs of the first unit; mux j of each unit drives inverter j of the next.
// Unit u (0-based) is steered by challenge bits C(2u+1) and C(2u+2), which are
// challenge_i[2u] (MSB of the unit select) and challenge_i[2u+1].
//
// Interface: launch_i, challenge_i[N_STAGES-1:0] (bit k-1 is C_k), and
// path_o[3:0], the mux0..mux3 outputs of the last unit that go to the
// arbiters. Logic: with an even number of units every path_o bit equals
// launch_i once the edge has passed; which path arrives first is the PUF
// secret.
//
// Timing: combinational, with the per-element simulation delays of each unit
// (see ima_pkg). The unit count n/2 and the cascade follow the source design,
// which uses n = 64; N_STAGES must be a multiple of 4 so that the number of
// inverters on every path is even and the arbiters see rising edges.
module ima_delay_line
  import ima_pkg::*;
#(
  parameter int unsigned N_STAGES    = 64,
  parameter int unsigned DEVICE_SEED = 1
) (
  input  logic                launch_i,
  input  logic [N_STAGES-1:0] challenge_i,
  output path_t               path_o
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N_UNITS = N_STAGES / 2;

  path_t chain [N_UNITS+1];

  assign chain[0] = {4{launch_i}};

  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    ima_unit #(
      .DEVICE_SEED(DEVICE_SEED),
      .UNIT_INDEX (u)
    ) u_unit (
      .path_i(chain[u]),
      .sel_i ({challenge_i[2*u], challenge_i[2*u+1]}),
      .path_o(chain[u+1])
    );
  end

  assign path_o = chain[N_UNITS];

  initial begin
    assert (N_STAGES % 4 == 0 && N_STAGES >= 4)
      else $error("ima_delay_line: N_STAGES must be a positive multiple of 4");
  end

endmodule
