// tb_ima_tuning: self-checking test of the tuning delay line.
//
// For every delay code, sends a rising and then a falling edge through the
// block and checks that the value arrives unchanged and exactly
// code * STEP_PS ps after the input edge.
module tb_ima_tuning;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TUNE_BITS = 4;
  localparam int unsigned STEP_PS   = 8;

  logic                 path_i, path_o;
  logic [TUNE_BITS-1:0] tune_i;
  int                   checks = 0, failures = 0;

  ima_tuning #(.TUNE_BITS(TUNE_BITS), .STEP_PS(STEP_PS)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned meas_d;  // result of edge_delay
  time         t_out;   // time of the last output change

  always @(posedge path_o or negedge path_o) t_out = $time;

  // Drive `v` and wait 1 ns; meas_d = ps from the input edge to the output change.
  task automatic edge_delay(input logic v);
    time t0;
    t0 = $time;
    t_out = 0;
    path_i = v;
    #1000;
    if (t_out >= t0) meas_d = int'(t_out - t0);
    else             meas_d = 9999;
  endtask

  initial begin
    int unsigned d;
    path_i = 0;
    tune_i = '0;
    #1000;
    for (int c = 0; c < (1 << TUNE_BITS); c++) begin
      tune_i = TUNE_BITS'(c);
      #1000;
      check(path_o == 1'b0, $sformatf("code %0d: settled low", c));
      edge_delay(1'b1);
      d = meas_d;
      check(d == c * STEP_PS, $sformatf("code %0d rise: %0d ps, want %0d", c, d, c * STEP_PS));
      #1000;
      check(path_o == 1'b1, $sformatf("code %0d: settled high", c));
      edge_delay(1'b0);
      d = meas_d;
      check(d == c * STEP_PS, $sformatf("code %0d fall: %0d ps, want %0d", c, d, c * STEP_PS));
      #1000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
