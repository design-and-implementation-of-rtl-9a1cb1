// ima_ref_pkg: reference model of the IMA-APUF for the testbenches.
//
// Computes, independently of the RTL structure, when a launch edge reaches
// each of the four delay-line outputs: it walks the four paths unit by unit
// using the intra-stage wiring written out as a table (mux0: inv0..inv3,
// mux1: inv1,inv0,inv3,inv2, mux2: inv2,inv3,inv0,inv1, mux3: inv3..inv0),
// and adds the chip's element delays from ima_pkg::elem_delay_ps. From the
// arrival times it predicts the arbiter decisions.
package ima_ref_pkg;
  timeunit 1ps;
  timeprecision 1ps;
  import ima_pkg::*;

  localparam int unsigned MAX_STAGES = 256;

  typedef logic [MAX_STAGES-1:0] chal_t;
  typedef longint arrival_t [4];

  const int wiring [4][4] = '{'{0, 1, 2, 3}, '{1, 0, 3, 2}, '{2, 3, 0, 1}, '{3, 2, 1, 0}};

  // Arrival time (ps after launch) of the edge at mux0..mux3 of the last unit.
  function automatic arrival_t arrivals(int unsigned seed, int unsigned n_stages, chal_t c);
    arrival_t t, ti, tn;
    int s;
    for (int k = 0; k < 4; k++) t[k] = 0;
    for (int unsigned u = 0; u < n_stages / 2; u++) begin
      s = 2 * int'(c[2*u]) + int'(c[2*u+1]);
      for (int k = 0; k < 4; k++)
        ti[k] = t[k] + longint'(elem_delay_ps(seed, u, ELEM_INV + k));
      for (int j = 0; j < 4; j++)
        tn[j] = ti[wiring[j][s]] + longint'(elem_delay_ps(seed, u, ELEM_WIRE + 4 * j + s))
              + longint'(elem_delay_ps(seed, u, ELEM_MUX + j));
      t = tn;
    end
    return t;
  endfunction

  // Arbiter with inputs a (upper NAND) and b (lower NAND): 0 if a is first.
  // `tie` is set when both arrive together, where the latch has no defined answer.
  function automatic logic arbiter(longint ta, longint tb, output bit tie);
    tie = (ta == tb);
    return logic'(tb < ta);
  endfunction

endpackage
