// tb_fsa_power: end-to-end test of the powering unit at its default size.
//
// The unit is used with every parameter at its default (K = 128). Operands
// cover odd bases of both signs classes (x mod 8 in {1,3} and in {5,7}),
// even bases, x = 0, y = 0, large exponents whose 2^(p*y) factor shifts the
// result out entirely, load pulses while busy (ignored) and back-to-back
// operations. Every result is compared with x^y mod 2^128 computed by
// square-and-multiply, and every operation must report ready exactly
// 3*(K-3)+2 clock periods after its load clock. Each mechanism is counted
// and a mechanism that never occurred counts as a failure:
//   conversion steps that update p and steps that skip it (derived from
//   x alone), sign negation of the result, even bases, zero base, zero
//   exponent, results shifted out by 2^(p*y), ignored loads, back-to-back
//   starts.
module tb_fsa_power;

  localparam int K = 128;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [K-1:0] x = '0, y = '0, z;
  logic idle, busy, ready;

  fsa_power dut (.clk, .rst_n, .load, .x, .y, .idle, .busy, .ready, .z);

  always #5 clk = ~clk;

  int n_dlg_upd = 0, n_dlg_skip = 0, n_neg = 0, n_even = 0, n_zero_x = 0,
      n_zero_y = 0, n_shifted_out = 0, n_ignored = 0, n_b2b = 0;

  function automatic logic [K-1:0] powmod(input logic [K-1:0] b_in, input logic [K-1:0] e);
    logic [K-1:0] r, b;
    r = K'(1);
    b = b_in;
    for (int k = 0; k < K; k++) begin
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

  // Classify the operands for the mechanism counters.
  task automatic classify(input logic [K-1:0] xv, input logic [K-1:0] yv);
    logic [K-1:0] nv, pv;
    int tz;
    if (xv == '0) begin
      n_zero_x++;
      return;
    end
    tz = 0;
    nv = xv;
    while (!nv[0]) begin nv = nv >> 1; tz++; end
    if (tz > 0) n_even++;
    if (yv == '0) n_zero_y++;
    if (tz > 0 && yv != '0 && (yv >= K || tz * int'(yv) >= K)) n_shifted_out++;
    if (nv[2] && yv[0]) n_neg++;
    // Conversion steps of the odd part: update when bit i differs.
    if (nv[2]) nv = -nv;
    pv = K'(1);
    for (int i = 1; i < K; i++) begin
      if (i == 2) continue;
      if (nv[i] != pv[i]) begin
        pv = pv + (pv << i);
        n_dlg_upd++;
      end else begin
        n_dlg_skip++;
      end
    end
  endtask

  // One operation; poke = pulse load while busy with other operands.
  task automatic run(input logic [K-1:0] xv, input logic [K-1:0] yv, input bit poke);
    int lat;
    logic [K-1:0] expect_z;
    classify(xv, yv);
    check(idle, "unit not idle at start");
    x <= xv; y <= yv; load <= 1'b1;
    @(posedge clk);
    load <= 1'b0;
    lat = 1;
    #1;
    while (!ready && lat < 1000) begin
      if (poke && lat == 20) begin
        x <= ~xv; y <= yv + 1; load <= 1'b1;
        n_ignored++;
      end else begin
        load <= 1'b0;
      end
      @(posedge clk); #1;
      lat++;
    end
    load <= 1'b0;
    expect_z = powmod(xv, yv);
    check(ready, "no ready");
    check(lat == 3 * (K - 3) + 2, $sformatf("latency %0d, expected %0d", lat, 3 * (K - 3) + 2));
    check(z == expect_z, $sformatf("%h^%h = %h, expected %h", xv, yv, z, expect_z));
    check(busy == 1'b0, "busy high in Ready");
    @(posedge clk); #1;
  endtask

  function automatic logic [K-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    run(K'(3), K'(10), 1'b0);
    run(K'(5), K'(3), 1'b0);        // x = 5 (mod 8): negated result
    run(K'(7), K'(4), 1'b0);        // x = 7 (mod 8), even y: no negation
    run('1, K'(12345), 1'b0);
    run(K'(0), K'(0), 1'b0);
    run(K'(0), K'(9), 1'b0);
    run(K'(6), K'(0), 1'b0);
    run(K'(2), K'(127), 1'b0);
    run(K'(2), K'(128), 1'b0);
    run(K'(12), rnd(), 1'b0);
    run(rnd() | K'(1), rnd(), 1'b1);
    // Back-to-back: load again in the clock right after ready.
    for (int n = 0; n < 4; n++) begin
      n_b2b++;
      run(rnd() | K'(1), rnd(), 1'b0);
    end
    // Even bases with exponents small enough to leave bits of the odd part.
    for (int n = 0; n < 8; n++)
      run((rnd() | K'(1)) << (1 + $urandom % 3), K'($urandom % 40), 1'b0);
    for (int n = 0; n < 20; n++) begin
      logic [K-1:0] xv, yv;
      xv = rnd() << ($urandom % 8);
      yv = ($urandom % 3 == 0) ? K'($urandom % 200) : rnd();
      run(xv, yv, n % 5 == 0);
    end
    $display("mechanisms: dlg_update=%0d dlg_skip=%0d negate=%0d even_base=%0d zero_base=%0d zero_exp=%0d shifted_out=%0d ignored_load=%0d back_to_back=%0d",
             n_dlg_upd, n_dlg_skip, n_neg, n_even, n_zero_x, n_zero_y, n_shifted_out, n_ignored, n_b2b);
    check(n_dlg_upd > 0, "conversion update never happened");
    check(n_dlg_skip > 0, "conversion skip never happened");
    check(n_neg > 0, "sign negation never happened");
    check(n_even > 0, "even base never happened");
    check(n_zero_x > 0, "zero base never happened");
    check(n_zero_y > 0, "zero exponent never happened");
    check(n_shifted_out > 0, "result never shifted out");
    check(n_ignored > 0, "load while busy never happened");
    check(n_b2b > 0, "back-to-back never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
