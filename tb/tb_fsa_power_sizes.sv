// tb_fsa_power_sizes: the powering unit at the five published word sizes.
//
// Units with K = 8, 16, 32 and 64 run next to a default K = 128 unit. For
// each size and random operands (odd and even bases), the K-bit unit's
// result must equal x^y mod 2^K (square-and-multiply in the testbench) and
// must appear 3*(K-3)+2 clock periods after its load clock, so smaller
// words finish sooner. The K = 128 unit, given the same operands
// zero-extended, must agree with it in its low K bits: the low bits of a
// power depend only on the low bits of the operands, so one wide unit
// serves every narrower word size.
module tb_fsa_power_sizes;

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

  // One bundle of wires per size, indexed 0..3 for K = 8, 16, 32, 64.
  localparam int NS = 4;
  localparam int KS [NS] = '{8, 16, 32, 64};
  logic [NS-1:0]  load, idle, busy, ready;
  logic [127:0]   xs [NS], ys [NS], zs [NS];

  for (genvar g = 0; g < NS; g++) begin : g_unit
    localparam int KG = KS[g];
    logic [KG-1:0] zk;
    fsa_power #(.K(KG)) u (.clk, .rst_n, .load(load[g]), .x(xs[g][KG-1:0]), .y(ys[g][KG-1:0]),
                           .idle(idle[g]), .busy(busy[g]), .ready(ready[g]), .z(zk));
    assign zs[g] = 128'(zk);
  end

  logic         load_w = 1'b0;
  logic [127:0] x_w = '0, y_w = '0, z_w;
  logic         idle_w, busy_w, ready_w;
  fsa_power u_wide (.clk, .rst_n, .load(load_w), .x(x_w), .y(y_w),
                    .idle(idle_w), .busy(busy_w), .ready(ready_w), .z(z_w));

  // Run size s and the wide unit on the same operands, started together.
  task automatic run(input int s, input logic [127:0] xv, input logic [127:0] yv);
    int k, lat, lat_w;
    logic [127:0] mask, res, res_w;
    k = KS[s];
    mask = (128'd1 << k) - 128'd1;
    xv &= mask;
    yv &= mask;
    xs[s] <= xv; ys[s] <= yv; load[s] <= 1'b1;
    x_w <= xv; y_w <= yv; load_w <= 1'b1;
    @(posedge clk);
    load[s] <= 1'b0; load_w <= 1'b0;
    lat = 0; lat_w = 0;
    res = '0; res_w = '0;
    for (int c = 1; c <= 400 && (lat == 0 || lat_w == 0); c++) begin
      #1;
      if (ready[s] && lat == 0) begin lat = c; res = zs[s]; end
      if (ready_w && lat_w == 0) begin lat_w = c; res_w = z_w; end
      @(posedge clk);
    end
    check(lat == 3 * (k - 3) + 2, $sformatf("K=%0d latency %0d", k, lat));
    check(lat_w == 3 * (128 - 3) + 2, $sformatf("K=128 latency %0d", lat_w));
    check(res == (powmod(xv, yv) & mask),
          $sformatf("K=%0d %h^%h = %h, expected %h", k, xv, yv, res, powmod(xv, yv) & mask));
    check((res_w & mask) == res, $sformatf("K=128 low %0d bits %h differ from %h", k, res_w & mask, res));
  endtask

  function automatic logic [127:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    load = '0;
    for (int s = 0; s < NS; s++) begin xs[s] = '0; ys[s] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      run(s, 128'd3, 128'd10);
      for (int n = 0; n < 12; n++)
        run(s, rnd() | 128'd1, rnd());
      for (int n = 0; n < 4; n++)
        run(s, rnd() << ($urandom % 3), 128'($urandom % 16));
    end
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
