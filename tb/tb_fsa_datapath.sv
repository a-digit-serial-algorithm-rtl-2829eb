// tb_fsa_datapath: checks the shift-add datapath on odd bases.
//
// The datapath is driven by the real controller and ROM, at K = 16 and at
// K = 128. For random odd x and random y, plus corner cases (x = 1,
// x = 2^K-1, y = 0, y = 1, both signs of x), the result in Ready is
// compared with x^y mod 2^K computed by square-and-multiply in the
// testbench. Each run also checks that the result appears exactly
// 3*(K-3)+2 clock periods after the load clock.
module tb_fsa_datapath;
  import fsa_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  function automatic logic [127:0] powmod(input logic [127:0] b_in, input logic [127:0] e);
    logic [127:0] r, b;
    r = 128'd1;
    b = b_in;
    for (int k = 0; k < 128; k++) begin
      if (e[k]) r = r * b;
      b = b * b;
    end
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---- K = 16 ----
  logic load16 = 1'b0;
  logic [15:0] x16, y16, z16;
  state_t st16;
  logic [3:0] c16;
  logic r16, b16;
  logic [13:0] d16;
  fsa_controller #(.K(16)) c_16 (.clk, .rst_n, .load(load16), .state(st16), .count(c16), .ready(r16), .busy(b16));
  dlg_rom        #(.K(16)) m_16 (.addr(c16), .data(d16));
  fsa_datapath   #(.K(16)) d_16 (.clk, .rst_n, .state(st16), .count(c16), .load(load16),
                                 .x(x16), .y(y16[13:0]), .dlg(d16), .z(z16));

  // ---- K = 128 ----
  logic load128 = 1'b0;
  logic [127:0] x128, y128, z128;
  state_t st128;
  logic [6:0] c128;
  logic r128, b128;
  logic [125:0] d128;
  fsa_controller #(.K(128)) c_128 (.clk, .rst_n, .load(load128), .state(st128), .count(c128), .ready(r128), .busy(b128));
  dlg_rom        #(.K(128)) m_128 (.addr(c128), .data(d128));
  fsa_datapath   #(.K(128)) d_128 (.clk, .rst_n, .state(st128), .count(c128), .load(load128),
                                   .x(x128), .y(y128[125:0]), .dlg(d128), .z(z128));

  task automatic run16(input logic [15:0] x, input logic [15:0] y);
    logic [15:0] expect_z;
    int lat;
    x16 <= x; y16 <= y; load16 <= 1'b1;
    @(posedge clk);
    load16 <= 1'b0;
    lat = 1;
    #1;
    while (!r16) begin @(posedge clk); #1; lat++; end
    check(lat == 3 * (16 - 3) + 2, $sformatf("K=16 latency %0d", lat));
    expect_z = powmod(128'(x), 128'(y))[15:0];
    check(z16 == expect_z, $sformatf("K=16 %0d^%0d = %0d, expected %0d", x, y, z16, expect_z));
    @(posedge clk);
  endtask

  task automatic run128(input logic [127:0] x, input logic [127:0] y);
    logic [127:0] expect_z;
    int lat;
    x128 <= x; y128 <= y; load128 <= 1'b1;
    @(posedge clk);
    load128 <= 1'b0;
    lat = 1;
    #1;
    while (!r128) begin @(posedge clk); #1; lat++; end
    check(lat == 3 * (128 - 3) + 2, $sformatf("K=128 latency %0d", lat));
    expect_z = powmod(x, y);
    check(z128 == expect_z, $sformatf("K=128 %h^%h = %h, expected %h", x, y, z128, expect_z));
    @(posedge clk);
  endtask

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    x16 = '0; y16 = '0; x128 = '0; y128 = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run16(16'd1, 16'd12345);
    run16(16'd3, 16'd10);
    run16(16'hFFFF, 16'd7);
    run16(16'hFFFF, 16'd8);
    run16(16'd5, 16'd0);
    run16(16'd7, 16'd1);
    for (int n = 0; n < 200; n++)
      run16(16'($urandom) | 16'd1, 16'($urandom));
    run128(128'd3, 128'd10);
    run128('1, 128'd3);
    for (int n = 0; n < 60; n++)
      run128(rnd128() | 128'd1, rnd128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
