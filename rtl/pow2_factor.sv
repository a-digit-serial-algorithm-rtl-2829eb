// pow2_factor: power-of-two factor of the base, x = 2^p * n with n odd.
//
// The shift-add datapath works on odd bases only. Since
// x^y = 2^(p*y) * n^y, this block strips the trailing zeros of x before the
// datapath and shifts the odd result left by p*y after it; when p*y >= K
// every bit of the result is zero. n keeps zeros in its top p bits, which
// cannot reach the result because it is shifted by p*y >= p whenever
// y > 0. Zero operands: x = 0 is treated as p = K with n = 1, so 0^y = 0
// for y > 0 and 0^0 = 1; y = 0 gives 1 for every x.
//
// The factorisation into 2^p and an odd part is the published method; the
// trailing-zero count, the small p*y product (two $clog2(K)+1 bit numbers,
// not a K-bit multiplier) and the zero-operand conventions are this
// design's choices.
//
// Timing: n is combinational from x. On a clock with capture high the shift
// amount for (x, y) is stored; z is combinational from z_odd and that
// stored amount, so it is valid whenever z_odd is.
module pow2_factor #(
  parameter int K = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         capture,
  input  logic [K-1:0] x,
  input  logic [K-1:0] y,
  output logic [K-1:0] n,
  input  logic [K-1:0] z_odd,
  output logic [K-1:0] z
);

  localparam int PW = $clog2(K) + 1;   // holds 0..K

  logic [PW-1:0] tz;        // trailing zeros of x, K for x = 0
  logic          shift_big; // p*y >= K: result is zero
  logic [PW-1:0] shift_amt; // p*y when below K

  always_comb begin
    tz = PW'(K);
    for (int b = K - 1; b >= 0; b--)
      if (x[b]) tz = PW'(b);
  end

  assign n = (x == '0) ? K'(1) : x >> tz;

  // p*y, saturated: only values below K are kept exactly.
  logic [2*PW-1:0] prod;
  logic            y_small;
  assign y_small = (y < K'(K));
  assign prod    = tz * y[PW-1:0];

  logic          big_d;
  logic [PW-1:0] amt_d;
  always_comb begin
    if (y == '0 || tz == '0) begin
      big_d = 1'b0;
      amt_d = '0;
    end else if (!y_small || prod >= (2*PW)'(K)) begin
      big_d = 1'b1;
      amt_d = '0;
    end else begin
      big_d = 1'b0;
      amt_d = prod[PW-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_big <= 1'b0;
      shift_amt <= '0;
    end else if (capture) begin
      shift_big <= big_d;
      shift_amt <= amt_d;
    end
  end

  assign z = shift_big ? '0 : z_odd << shift_amt;

endmodule
