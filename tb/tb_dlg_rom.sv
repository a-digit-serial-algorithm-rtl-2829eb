// tb_dlg_rom: checks the two-ones discrete log table.
//
// For K = 8 and K = 128 every entry i = 1 and i >= 3 must satisfy
// 3^data = 2^i + 1 (mod 2^K), checked by square-and-multiply in the
// testbench, and must lie below 2^(K-2) with its lowest set bit at
// position i-2 (i >= 3). For K = 8 the entries are also compared with the
// published table for k = 8 (values modulo 2^6). Entries 0 and 2 read zero.
module tb_dlg_rom;

  int checks = 0, failures = 0;

  logic [2:0]   a8;
  logic [5:0]   d8;
  logic [6:0]   a128;
  logic [125:0] d128;

  dlg_rom #(.K(8))   u8   (.addr(a8),   .data(d8));
  dlg_rom #(.K(128)) u128 (.addr(a128), .data(d128));

  // 3^e mod 2^128; lower word sizes keep the low bits.
  function automatic logic [127:0] pow3(input logic [127:0] e);
    logic [127:0] r, b;
    r = 128'd1;
    b = 128'd3;
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
      $display("FAIL: %s", what);
    end
  endtask

  // dlg(2^i+1) mod 64 for i = 0..7 at k = 8 (0 where none exists).
  localparam logic [5:0] TABLE8 [8] = '{6'd0, 6'd1, 6'd0, 6'd2, 6'd52, 6'd40, 6'd16, 6'd32};

  initial begin
    for (int i = 0; i < 8; i++) begin
      a8 = 3'(i);
      #1;
      check(d8 == TABLE8[i], $sformatf("K=8 entry %0d = %0d, expected %0d", i, d8, TABLE8[i]));
      if (i == 1 || i >= 3)
        check(pow3(128'(d8))[7:0] == 8'((1 << i) + 1), $sformatf("K=8 3^T[%0d] mismatch", i));
    end
    for (int i = 0; i < 128; i++) begin
      logic [127:0] target;
      a128 = 7'(i);
      #1;
      target = (128'd1 << i) + 128'd1;
      if (i == 0 || i == 2) begin
        check(d128 == '0, $sformatf("K=128 entry %0d not zero", i));
      end else begin
        check(pow3(128'(d128)) == target, $sformatf("K=128 3^T[%0d] != 2^%0d+1", i, i));
        if (i >= 3)
          check(d128[i-2] && ((d128 & ((126'd1 << (i - 2)) - 126'd1)) == '0),
                $sformatf("K=128 entry %0d lowest set bit not at %0d", i, i - 2));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
