// tb_pow2_factor: checks the split x = 2^p * n and the final 2^(p*y) scaling.
//
// At K = 16 and K = 128, for random x with a random number of trailing
// zeros, random y (small and large) and the zero cases, the odd part n must
// be odd and equal x shifted right by its trailing zeros, and feeding
// z_odd = n^y mod 2^K (computed in the testbench) must give z = x^y mod 2^K.
module tb_pow2_factor;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, cap = 1'b0;
  always #5 clk = ~clk;

  logic [15:0]  x16, y16, n16, zo16, z16;
  logic [127:0] x128, y128, n128, zo128, z128;

  pow2_factor #(.K(16))  u16  (.clk, .rst_n, .capture(cap), .x(x16),  .y(y16),  .n(n16),  .z_odd(zo16),  .z(z16));
  pow2_factor #(.K(128)) u128 (.clk, .rst_n, .capture(cap), .x(x128), .y(y128), .n(n128), .z_odd(zo128), .z(z128));

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

  task automatic one(input logic [127:0] x, input logic [127:0] y);
    logic [127:0] n_ref16, n_ref128;
    int tz;
    x16 = x[15:0]; y16 = y[15:0]; x128 = x; y128 = y;
    cap = 1'b1;
    #1;
    // Odd part by repeated halving.
    n_ref16 = 128'(x[15:0]);
    if (n_ref16 == 0) n_ref16 = 1;
    while (!n_ref16[0]) n_ref16 = n_ref16 >> 1;
    n_ref128 = x;
    if (n_ref128 == 0) n_ref128 = 1;
    while (!n_ref128[0]) n_ref128 = n_ref128 >> 1;
    check(n16 == n_ref16[15:0], $sformatf("K=16 n of %h is %h", x16, n16));
    check(n128 == n_ref128, $sformatf("K=128 n of %h is %h", x, n128));
    zo16  = powmod(128'(n16), 128'(y16))[15:0];
    zo128 = powmod(n128, y);
    @(posedge clk);
    cap <= 1'b0;
    x16 <= ~x16; x128 <= ~x128;   // inputs may change after capture
    #1;
    check(z16 == powmod(128'(x[15:0]), 128'(y[15:0]))[15:0],
          $sformatf("K=16 %h^%h gives %h", x[15:0], y[15:0], z16));
    check(z128 == powmod(x, y), $sformatf("K=128 %h^%h gives %h", x, y, z128));
  endtask

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    x16 = '0; y16 = '0; x128 = '0; y128 = '0; zo16 = '0; zo128 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    one(128'd0, 128'd0);
    one(128'd0, 128'd5);
    one(128'd6, 128'd0);
    one(128'd2, 128'd7);
    one(128'd2, 128'd127);
    one(128'd2, 128'd128);
    one(128'd4, 128'd63);
    one(128'd4, 128'd64);
    one(128'd12, 128'd3);
    for (int n = 0; n < 300; n++) begin
      logic [127:0] x, y;
      x = (rnd128() | 128'd1) << ($urandom % 128);
      y = ($urandom % 2) ? 128'($urandom % 140) : rnd128();
      one(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
