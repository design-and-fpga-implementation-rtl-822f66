// tb_tol_window: self-checking test of the tolerance window comparator.
// Drives random and edge-case (value, reference, delta) triples at an 8-bit
// width and compares with |value - reference| <= delta worked out in integer
// arithmetic; also runs the 16-bit default width on random triples.
module tb_tol_window;
  int checks = 0, failures = 0;

  logic [7:0]  a8, r8, d8;
  logic        in8;
  logic [15:0] a16, r16, d16;
  logic        in16;

  tol_window #(.W(8))  dut8  (.new_val(a8),  .ref_val(r8),  .delta(d8),  .in_win(in8));
  tol_window           dut16 (.new_val(a16), .ref_val(r16), .delta(d16), .in_win(in16));

  function automatic bit expect_in(int a, int r, int d);
    int diff = (a > r) ? a - r : r - a;
    return diff <= d;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exhaustive over value and reference for a few deltas, incl. edges
    for (int d = 0; d < 256; d += 51) begin
      for (int a = 0; a < 256; a += 3) begin
        for (int r = 0; r < 256; r += 5) begin
          a8 = 8'(a); r8 = 8'(r); d8 = 8'(d);
          #1;
          checks++;
          if (in8 !== expect_in(a, r, d)) begin
            failures++;
            if (failures < 10) $display("FAIL W8 a=%0d r=%0d d=%0d got %0b", a, r, d, in8);
          end
        end
      end
    end
    for (int t = 0; t < 5000; t++) begin
      a16 = 16'($urandom); r16 = 16'($urandom); d16 = 16'($urandom_range(0, 3000));
      if (t % 4 == 0) a16 = r16 + d16;          // upper edge (may wrap: still checked)
      if (t % 4 == 1) a16 = r16 - d16;          // lower edge
      #1;
      checks++;
      if (in16 !== expect_in(int'(a16), int'(r16), int'(d16))) begin
        failures++;
        if (failures < 10) $display("FAIL W16 a=%0d r=%0d d=%0d got %0b", a16, r16, d16, in16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
