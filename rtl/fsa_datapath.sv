// fsa_datapath: the computation datapath of the FSA powering unit.
//
// Computes z = x^y mod 2^K for odd x with no multiplier. Odd x is written
// as x = (-1)^s * 3^e (mod 2^K), so x^y = (-1)^(s*y) * 3^(e*y). Three
// shift-and-add recurrences run interleaved, one index i per iteration
// (i = 1 in Init, then i = 3..K-1), with bit position j = i-2 (j = 0 for
// i = 1):
//   DLG  (Loop_DLG): if bit i of x differs from bit i of p then
//        p += p << i and e += dlg(2^i+1). p = 3^e tracks x, and bit j of e
//        is final after this step.
//   ACC  (Loop_ACC): if bit j of e is set then m += t, where t = y << j.
//        m accumulates e*y; bit j of m is final after this step.
//   EXP  (Loop_EXP): q += (bit j of m) << j; if bit j of q is set then
//        z += z << i and q -= dlg(2^i+1). z = 3^(m-q) and the low j+1 bits
//        of q are zero afterwards, so z ends as 3^(e*y) mod 2^K. t shifts.
// The DLG step at index i and the EXP step for product bit j use the same
// table entry dlg(2^i+1), so one ROM read (address = count) serves both.
// Load normalises x (s = 1 and x := -x when x mod 8 is 5 or 7) and clears
// the registers; Init performs the three steps for i = 1 in one clock; in
// Ready the output z carries the sign (-1)^(s*y), i.e. is negated when s
// and bit 0 of y are both set. The p/e/z/q recurrences, the bit checkers
// and the states follow the published algorithm; the exact form of the
// accumulator/deconversion hand-over, the K-2 bit width of e, t, m and q
// (only their value mod 2^(K-2) matters) and the final sign step are this
// design's choices.
//
// Interface: state and count come from fsa_controller, dlg from dlg_rom
// addressed by count. y enters modulo 2^(K-2), which is all that e*y
// needs (bit 0 of y also gives the sign). x and y are sampled when state is Load and load is
// high; z is valid while state is Ready. x must be odd (fsa_power handles
// even x around this block).
module fsa_datapath
  import fsa_pkg::*;
#(
  parameter int K = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  state_t               state,
  input  logic [$clog2(K)-1:0] count,
  input  logic                 load,
  input  logic [K-1:0]         x,
  input  logic [K-3:0]         y,
  input  logic [K-3:0]         dlg,
  output logic [K-1:0]         z
);

  localparam int CW = $clog2(K);
  localparam int QW = K - 2;

  logic [K-1:0]  xr, p, zr;
  logic [QW-1:0] e, t, m, q;
  logic          s, y0;

  // Index i and product bit j of the current step.
  logic [CW-1:0] i, j;
  assign i = count;
  assign j = (count == CW'(1)) ? '0 : count - CW'(2);

  // One step of each recurrence, written as functions so that Init can
  // chain all three in one clock.
  function automatic logic dlg_hit(input logic [K-1:0] xv, input logic [K-1:0] pv,
                                   input logic [CW-1:0] iv);
    return xv[iv] != pv[iv];
  endfunction

  function automatic logic [QW-1:0] acc_step(input logic [QW-1:0] ev, input logic [QW-1:0] mv,
                                             input logic [QW-1:0] tv, input logic [CW-1:0] jv);
    return ev[jv] ? mv + tv : mv;
  endfunction

  function automatic logic [QW-1:0] exp_q(input logic [QW-1:0] qv, input logic [QW-1:0] mv,
                                          input logic [CW-1:0] jv);
    return qv + (QW'(mv[jv]) << jv);
  endfunction

  // Combinational next values.
  logic          hit_d, hit_x;
  logic [K-1:0]  p_step, z_step;
  logic [QW-1:0] e_step, m_step, qa, q_step;

  always_comb begin
    hit_d  = dlg_hit(xr, p, i);
    p_step = hit_d ? p + (p << i) : p;
    e_step = hit_d ? e + dlg : e;
    // In Init the accumulator and deconversion see the freshly updated e
    // and m; in the loop they see the registers written one clock before.
    if (state == ST_INIT) begin
      m_step = acc_step(e_step, m, t, j);
      qa     = exp_q(q, m_step, j);
    end else begin
      m_step = acc_step(e, m, t, j);
      qa     = exp_q(q, m, j);
    end
    hit_x  = qa[j];
    z_step = hit_x ? zr + (zr << i) : zr;
    q_step = hit_x ? qa - dlg : qa;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr <= K'(1);
      p  <= K'(1);
      zr <= K'(1);
      e  <= '0;
      t  <= '0;
      m  <= '0;
      q  <= '0;
      s  <= 1'b0;
      y0 <= 1'b0;
    end else begin
      unique case (state)
        ST_LOAD: if (load) begin
          // Sign: keep x when x mod 8 is 1 or 3, else work on 2^K - x.
          s  <= x[2];
          xr <= x[2] ? -x : x;
          y0 <= y[0];
          t  <= y;
          p  <= K'(1);
          zr <= K'(1);
          e  <= '0;
          m  <= '0;
          q  <= '0;
        end
        ST_INIT: begin
          p  <= p_step;
          e  <= e_step;
          m  <= m_step;
          zr <= z_step;
          q  <= q_step;
          t  <= t << 1;
        end
        ST_LOOP_DLG: begin
          p <= p_step;
          e <= e_step;
        end
        ST_LOOP_ACC: m <= m_step;
        ST_LOOP_EXP: begin
          zr <= z_step;
          q  <= q_step;
          t  <= t << 1;
        end
        default: ;
      endcase
    end
  end

  assign z = (s && y0) ? -zr : zr;

endmodule
