// fsa_power: digit-serial integer power unit, z = x^y mod 2^K.
//
// The base is split as x = 2^p * n with n odd (pow2_factor). The odd part
// goes through the feedback shift-add (FSA) core: a controller
// (fsa_controller), a ROM of two-ones discrete logs (dlg_rom) and the
// datapath (fsa_datapath), which converts n to its discrete log e,
// multiplies e by y one bit at a time and converts 3^(e*y) back to binary
// one bit at a time, all with additions and shifts. The three recurrences
// are pipelined: each conversion step finalises one bit of e, which at once
// yields one bit of the product and one deconversion step. The result of
// the core is finally shifted left by p*y.
//
// Interface: when idle is high, a clock with load high takes x and y. The
// result z is valid for the single clock in which ready is high,
// 3*(K-3)+2 clocks after the load clock (for K = 128, 377 clocks); the unit
// is idle again on the next clock. busy is high from the
// clock after load until ready; load is ignored then.
// K is the word size; the published design was built for K = 8, 16, 32,
// 64 and 128, and 128 is the default here.
module fsa_power
  import fsa_pkg::*;
#(
  parameter int K = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [K-1:0] x,
  input  logic [K-1:0] y,
  output logic         idle,
  output logic         busy,
  output logic         ready,
  output logic [K-1:0] z
);

  localparam int CW = $clog2(K);

  state_t        state;
  logic [CW-1:0] count;
  logic [K-3:0]  dlg;
  logic [K-1:0]  n, z_odd;

  fsa_controller #(.K(K)) u_ctrl (
    .clk, .rst_n, .load, .state, .count, .ready, .busy
  );

  dlg_rom #(.K(K)) u_rom (
    .addr(count), .data(dlg)
  );

  pow2_factor #(.K(K)) u_pow2 (
    .clk, .rst_n,
    .capture(idle && load),
    .x, .y, .n, .z_odd, .z
  );

  fsa_datapath #(.K(K)) u_dp (
    .clk, .rst_n, .state, .count, .load,
    .x(n), .y(y[K-3:0]), .dlg, .z(z_odd)
  );

  assign idle = (state == ST_LOAD);

endmodule
