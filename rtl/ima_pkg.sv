// ima_pkg: types, constants and the simulation delay model shared by the
// improved MA-APUF (IMA-APUF) modules.
//
// The IMA-APUF is a delay-based strong PUF: four copies of a rising edge race
// through a chain of inverter/multiplexer units and two arbiters decide which
// of two paths arrived first. In silicon or on an FPGA the delays come from
// process variation and placement. For simulation, every inverter, every
// intra-stage network wire and every multiplexer carries a delay annotation
// (ignored by synthesis) whose value is a nominal delay plus a pseudo-random
// offset drawn from (DEVICE_SEED, unit index, element index). One DEVICE_SEED
// stands for one manufactured chip. The nominal values and the spread are this
// design's own choice; the source design gives no delay numbers.
//
// Element numbering inside a unit (used by elem_delay_ps):
//   0..3    inverter inv0..inv3
//   4..19   intra-stage network wire feeding input pin p of mux j: 4 + 4*j + p
//   20..23  multiplexer mux0..mux3
package ima_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // The four propagating signals of one unit, index 0..3 = path a..d.
  typedef logic [3:0] path_t;

  // Per-unit challenge pair {C(2u+1), C(2u+2)}; the first challenge bit is the MSB.
  typedef logic [1:0] sel_t;

  localparam int unsigned ELEM_INV    = 0;
  localparam int unsigned ELEM_WIRE   = 4;
  localparam int unsigned ELEM_MUX    = 20;

  // Nominal delays in ps and the width of the uniform spread added to each.
  localparam int unsigned INV_NOM_PS  = 120;
  localparam int unsigned WIRE_NOM_PS = 60;
  localparam int unsigned MUX_NOM_PS  = 250;
  localparam int unsigned SPREAD_PS   = 40;

  // Intra-stage network: input pin p of mux j is driven by inverter j ^ p.
  function automatic int unsigned net_source(int unsigned mux_j, int unsigned pin_p);
    return (mux_j ^ pin_p) & 3;
  endfunction

  // 32-bit integer mix (xorshift-multiply), used only to spread delays.
  function automatic logic [31:0] mix32(logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Delay of element `elem` of unit `unit_idx` on chip `seed`, in ps.
  function automatic int unsigned elem_delay_ps(int unsigned seed, int unsigned unit_idx,
                                                int unsigned elem);
    logic [31:0] h;
    int unsigned nominal;
    h = mix32(32'(seed) * 32'h9e3779b9 ^ mix32(32'(unit_idx) * 32'd64 + 32'(elem)));
    if (elem < ELEM_WIRE)     nominal = INV_NOM_PS;
    else if (elem < ELEM_MUX) nominal = WIRE_NOM_PS;
    else                      nominal = MUX_NOM_PS;
    return nominal + int'(h % SPREAD_PS);
  endfunction

endpackage
