// tb_ima_delay_line: self-checking test of the 64-stage IMA-APUF delay chain.
//
// For random challenges and a few fixed ones (all 00, all 11, alternating),
// raises the launch edge and checks that each of the four outputs rises, and
// that it does so exactly when the reference model (ima_ref_pkg) says,
// to the picosecond. Then lowers launch and checks that all outputs fall.
module tb_ima_delay_line;
  timeunit 1ps;
  timeprecision 1ps;
  import ima_pkg::*;
  import ima_ref_pkg::*;

  localparam int unsigned N_STAGES = 64;
  localparam int unsigned SEED     = 7;

  logic                launch_i;
  logic [N_STAGES-1:0] challenge_i;
  path_t               path_o;
  int                  checks = 0, failures = 0;
  time                 t_rise [4];

  ima_delay_line #(.N_STAGES(N_STAGES), .DEVICE_SEED(SEED)) dut (.*);

  always @(posedge path_o[0]) t_rise[0] = $time;
  always @(posedge path_o[1]) t_rise[1] = $time;
  always @(posedge path_o[2]) t_rise[2] = $time;
  always @(posedge path_o[3]) t_rise[3] = $time;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(logic [N_STAGES-1:0] c);
    arrival_t exp_t;
    time      t0;
    exp_t = arrivals(SEED, N_STAGES, chal_t'(c));
    challenge_i = c;
    #1000;
    for (int j = 0; j < 4; j++) t_rise[j] = 0;
    t0 = $time;
    launch_i = 1;
    #40000;
    for (int j = 0; j < 4; j++) begin
      check(path_o[j] == 1'b1, $sformatf("path %0d not high", j));
      check(longint'(t_rise[j]) - longint'(t0) == exp_t[j],
            $sformatf("c=%h path %0d: rose after %0d ps, want %0d", c, j,
                      longint'(t_rise[j]) - longint'(t0), exp_t[j]));
    end
    launch_i = 0;
    #40000;
    check(path_o == 4'b0000, $sformatf("paths not low after release: %b", path_o));
  endtask

  initial begin
    launch_i    = 0;
    challenge_i = '0;
    #40000;
    run_one('0);
    run_one('1);
    run_one({(N_STAGES/2){2'b01}});
    run_one({(N_STAGES/2){2'b10}});
    for (int i = 0; i < 40; i++) run_one({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
