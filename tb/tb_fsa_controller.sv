// tb_fsa_controller: checks the state sequence and timing of the controller.
//
// For K = 8 (and once for K = 16) a load in Load must give Init with count
// 1, then for i = 3..K-1 the states Loop_DLG, Loop_ACC, Loop_EXP with count
// i, then one clock of Ready and a return to Load: the result strobe comes
// 3*(K-3)+2 clocks after the load clock. load pulses while busy must be
// ignored, and Load must wait while load is low.
module tb_fsa_controller;
  import fsa_pkg::*;

  localparam int K = 8;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, load16 = 1'b0;
  state_t st8;
  logic [2:0] cnt8;
  logic rdy8, busy8;
  state_t st16;
  logic [3:0] cnt16;
  logic rdy16, busy16;

  fsa_controller #(.K(8))  u8  (.clk, .rst_n, .load, .state(st8),  .count(cnt8),  .ready(rdy8),  .busy(busy8));
  fsa_controller #(.K(16)) u16 (.clk, .rst_n, .load(load16), .state(st16), .count(cnt16), .ready(rdy16), .busy(busy16));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Walk one operation of the K = 8 instance, clock by clock.
  task automatic run_one(input bit poke_load);
    int n;
    check(st8 == ST_LOAD && !busy8, "not in Load before start");
    load <= 1'b1;
    @(posedge clk);
    load <= poke_load;
    #1;
    n = 1;
    check(st8 == ST_INIT && cnt8 == 3'd1 && busy8, "Init with count 1 expected");
    for (int i = 3; i < K; i++) begin
      for (int s = 0; s < 3; s++) begin
        @(posedge clk); #1; n++;
        check(st8 == state_t'(int'(ST_LOOP_DLG) + s) && int'(cnt8) == i,
              $sformatf("i=%0d sub-stage %0d: state %s count %0d", i, s, st8.name(), cnt8));
      end
    end
    @(posedge clk); #1; n++;
    check(st8 == ST_READY && rdy8 && !busy8, "Ready expected");
    check(n == 3 * (K - 3) + 2, $sformatf("latency %0d, expected %0d", n, 3 * (K - 3) + 2));
    load <= 1'b0;
    @(posedge clk); #1;
    check(st8 == ST_LOAD && !rdy8, "back to Load expected");
  endtask

  int lat16;
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    check(st8 == ST_LOAD, "reset state is Load");
    // Load waits while load is low.
    repeat (4) @(posedge clk);
    #1;
    check(st8 == ST_LOAD && st16 == ST_LOAD, "left Load without load");
    run_one(1'b0);
    run_one(1'b1);   // load held high while busy: must not disturb the run
    // K = 16 latency: count clocks from the load clock to ready.
    @(posedge clk); #1;
    check(st16 == ST_LOAD, "K=16 instance in Load");
    load16 <= 1'b1;
    @(posedge clk);
    load16 <= 1'b0;
    lat16 = 1;   // clock periods after the load clock: Init is period 1
    do begin
      @(posedge clk); #1;
      lat16++;
    end while (!rdy16 && lat16 < 200);
    check(lat16 == 3 * (16 - 3) + 2, $sformatf("K=16 latency %0d", lat16));
    // Reset in the middle of a run returns to Load.
    load <= 1'b1;
    @(posedge clk);
    load <= 1'b0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b0;
    #1;
    check(st8 == ST_LOAD && cnt8 == 3'd1, "asynchronous reset to Load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
