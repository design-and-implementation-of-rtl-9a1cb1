// ima_unit: one unit (two challenge bits) of the improved MA-APUF delay chain.
//
// Four inverters inv0..inv3 take the four propagating signals. An intra-stage
// network feeds their outputs to four 4-to-1 multiplexers mux0..mux3 that all
// share the unit's 2-bit challenge sel_i. Input pin p of mux j is driven by
// inverter j XOR p, so challenge 00 keeps the paths straight, 01 swaps a/b and
// c/d, 10 swaps a/c and b/d, and 11 reverses the order. Every permutation keeps
// the pair {a,d} together and the pair {b,c} together, which is what lets the
// arbiters always compare symmetrical paths.
//
// Interface: path_i[3:0] (inv0..inv3 inputs), sel_i = {C(2u+1), C(2u+2)},
// path_o[3:0] (mux0..mux3 outputs). Logic: path_o[j] = ~path_i[j ^ sel_i].
//
// Timing: purely combinational. Each inverter, network wire and mux carries a
// delay annotation from ima_pkg::elem_delay_ps(DEVICE_SEED, UNIT_INDEX, ...)
// that models one chip's process variation in simulation; synthesis ignores
// it. The inverters, the network wiring and the per-unit shared challenge
// follow the source design; the delay values and the challenge bit order
// (first bit = MSB of sel_i) are this design's choices.
module ima_unit
  import ima_pkg::*;
#(
  parameter int unsigned DEVICE_SEED = 1,
  parameter int unsigned UNIT_INDEX  = 0
) (
  input  path_t path_i,
  input  sel_t  sel_i,
  output path_t path_o
);
  timeunit 1ps;
  timeprecision 1ps;

  // keep: the four paths carry the same logic value, so without it synthesis
  // would merge them and the PUF would lose its racing paths.
  (* keep *) path_t           inv_q;    // inverter outputs
  (* keep *) logic [3:0][3:0] mux_in;   // mux_in[j][p]: pin p of mux j
  (* keep *) path_t           mux_q;    // mux outputs

  for (genvar k = 0; k < 4; k++) begin : g_inv
    localparam int unsigned DINV = elem_delay_ps(DEVICE_SEED, UNIT_INDEX, ELEM_INV + k);
    assign #(DINV) inv_q[k] = ~path_i[k];
  end

  for (genvar j = 0; j < 4; j++) begin : g_mux
    for (genvar p = 0; p < 4; p++) begin : g_pin
      localparam int unsigned DWIRE =
        elem_delay_ps(DEVICE_SEED, UNIT_INDEX, ELEM_WIRE + 4 * j + p);
      assign #(DWIRE) mux_in[j][p] = inv_q[net_source(j, p)];
    end
    localparam int unsigned DMUX = elem_delay_ps(DEVICE_SEED, UNIT_INDEX, ELEM_MUX + j);
    assign #(DMUX) mux_q[j] = mux_in[j][sel_i];
  end

  assign path_o = mux_q;

endmodule
