// ima_tuning: programmable delay line (PDL) that trims one arbiter input path.
//
// Behavioural model. On an FPGA a tuning block is a short chain of LUTs whose
// logic function is a plain buffer; its control bits only choose a longer or
// shorter route through the LUT, so it adds delay without changing any value.
// This model has that structure: TUNE_BITS stages, stage k either passes the
// signal straight on or passes it through an extra delay of STEP_PS << k ps,
// as chosen by tune_i[k]. The added delay is therefore tune_i * STEP_PS ps.
// ROUTE_PS is a fixed delay in front of the stages that stands for the wire
// from the last unit to this point; unequal values on the two inputs of an
// arbiter model the routing skew the tuning is meant to cancel (default 0).
// Synthesis ignores the delays, so the synthesized block is a wire; only its
// timing, which exists in simulation, gives it a purpose.
//
// Interface: path_i (signal from the last unit), tune_i (binary delay code),
// path_o (to the arbiter). Timing: combinational plus ROUTE_PS +
// tune_i * STEP_PS ps;
// change tune_i only while the launch edge is low.
//
// The source design adds a tuning block on the compared paths to cancel the
// routing asymmetry of the FPGA before the two arbiters. The binary-weighted
// stage structure, TUNE_BITS, STEP_PS and ROUTE_PS are this design's choices.
module ima_tuning #(
  parameter int unsigned TUNE_BITS = 4,
  parameter int unsigned STEP_PS   = 8,
  parameter int unsigned ROUTE_PS  = 0
) (
  input  logic                 path_i,
  input  logic [TUNE_BITS-1:0] tune_i,
  output logic                 path_o
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [TUNE_BITS:0] stage;   // stage[k]: input of stage k
  logic [TUNE_BITS-1:0] slow;  // delayed copy inside stage k

  if (ROUTE_PS > 0) begin : g_route
    assign #(ROUTE_PS) stage[0] = path_i;
  end else begin : g_no_route
    assign stage[0] = path_i;
  end

  for (genvar k = 0; k < TUNE_BITS; k++) begin : g_stage
    assign #(STEP_PS << k) slow[k] = stage[k];
    assign stage[k+1] = tune_i[k] ? slow[k] : stage[k];
  end

  assign path_o = stage[TUNE_BITS];

endmodule
