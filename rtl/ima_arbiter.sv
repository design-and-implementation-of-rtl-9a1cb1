// ima_arbiter: SR-latch arbiter made of two cross-coupled NAND gates.
//
// At rest both inputs are low and both NAND outputs are high. When a rising
// edge reaches one input first, that side's NAND output falls and holds the
// other NAND output high, so the later edge changes nothing:
//   a_i first -> q_o = 0,  b_i first -> q_o = 1.
// Returning both inputs low releases the latch (q_o = qn = 1) for the next
// evaluation. Edges that arrive at exactly the same instant leave the latch
// metastable; in this zero-delay model that is a combinational loop with no
// stable value, so stimulus must keep the two arrival times apart.
//
// Interface: a_i (upper NAND input), b_i (lower NAND input), q_o (upper NAND
// output, the response bit). Timing: asynchronous, no clock.
//
// The cross-coupled NAND pair and the use of the upper NAND output as the
// response follow the source design. The loop between the two gates is the
// latch itself and is intended; tools report it as a combinational loop.
module ima_arbiter (
  input  logic a_i,
  input  logic b_i,
  output logic q_o
);
  timeunit 1ps;
  timeprecision 1ps;

  logic q, qn;

  assign q  = ~(a_i & qn);
  assign qn = ~(b_i & q);
  assign q_o = q;

endmodule
