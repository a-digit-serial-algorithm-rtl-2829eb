// dlg_rom: table of the two-ones discrete logarithms.
//
// Entry i holds dlg(2^i + 1), the exponent d with 3^d = 2^i + 1 (mod 2^K),
// reduced modulo 2^(K-2). Such a d exists for i = 1 (dlg(3) = 1) and for
// every i >= 3; entries 0 and 2 have no discrete log and read as zero. For
// i >= 3 the lowest set bit of dlg(2^i+1) is bit i-2, which is what lets the
// conversion and deconversion run one bit per step.
//
// The contents are computed at elaboration by build_table(): for a target
// n = 1 or 3 (mod 8) the discrete log is found bit by bit, since multiplying
// by 3^(2^j) (j >= 1) flips bit j+2 of a residue and keeps the bits below
// it, and multiplying by 3 fixes bit 1. The table has K entries of K-2 bits,
// as the published design stores it; computing it instead of listing it is
// this design's choice. The read is combinational: data follows addr in the
// same clock.
module dlg_rom #(
  parameter int K = 128
) (
  input  logic [$clog2(K)-1:0] addr,
  output logic [K-3:0]         data
);

  typedef logic [K-1:0][K-3:0] table_t;

  // Discrete log, base 3, of odd n with n mod 8 in {1,3}, modulo 2^(K-2).
  function automatic logic [K-3:0] dlg_of(input logic [K-1:0] n);
    logic [K-1:0] pw;   // 3^e mod 2^K for the bits of e found so far
    logic [K-1:0] p3;   // 3^(2^j) mod 2^K
    logic [K-3:0] e;
    pw = K'(1);
    p3 = K'(3);
    e  = '0;
    if (pw[1] != n[1]) begin
      e[0] = 1'b1;
      pw   = pw * p3;
    end
    for (int j = 1; j < K - 2; j++) begin
      p3 = p3 * p3;
      if (pw[j+2] != n[j+2]) begin
        e[j] = 1'b1;
        pw   = pw * p3;
      end
    end
    return e;
  endfunction

  function automatic table_t build_table();
    table_t t;
    for (int i = 0; i < K; i++) begin
      if (i == 1 || i >= 3)
        t[i] = dlg_of((K'(1) << i) + K'(1));
      else
        t[i] = '0;
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  // Indices K..2^$clog2(K)-1 exist only when K is not a power of two.
  assign data = (int'(addr) < K) ? TABLE[addr] : '0;

endmodule
