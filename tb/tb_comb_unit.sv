// tb_comb_unit: self-checking test of the combiner.
// Draws two random half-row sets of magnitudes, forms each half's (m1, m2,
// column of m1, sign), latches them through the combiner and compares the
// result with the two smallest magnitudes of the joined set, the sign
// product and the location of the smallest. Also checks that the result
// holds while `latch` is low.
module tb_comb_unit;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0, latch = 0;
  always #5 clk = ~clk;
  mag_t m11, m12, m21, m22;
  logic [COL_W-1:0] col1, col2;
  logic sgn1, sgn2;
  row_res_t res;
  int checks = 0, failures = 0;

  comb_unit dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int a [2][8];
      int n [2], h1 [2], h2 [2], hc [2], all [16], na, e1, e2, eg, ec;
      for (int g = 0; g < 2; g++) begin
        n[g] = $urandom_range(8);
        h1[g] = 15; h2[g] = 15; hc[g] = 0;
        for (int k = 0; k < n[g]; k++) begin
          a[g][k] = $urandom_range(15);
          if (a[g][k] < h1[g]) begin h2[g] = h1[g]; h1[g] = a[g][k]; hc[g] = k; end
          else if (a[g][k] < h2[g]) h2[g] = a[g][k];
        end
      end
      // expected: smallest two of the joined multiset; ties go to group 0
      e1 = 15; e2 = 15; eg = 0; ec = 0;
      for (int g = 0; g < 2; g++) for (int k = 0; k < n[g]; k++) begin
        if (a[g][k] < e1) begin e2 = e1; e1 = a[g][k]; eg = g; ec = k; end
        else if (a[g][k] < e2) e2 = a[g][k];
      end
      if (h1[0] == h1[1]) begin eg = 0; ec = hc[0]; end
      @(negedge clk);
      m11 = mag_t'(h1[0]); m12 = mag_t'(h2[0]); col1 = COL_W'(hc[0]); sgn1 = 1'($urandom_range(1));
      m21 = mag_t'(h1[1]); m22 = mag_t'(h2[1]); col2 = COL_W'(hc[1]); sgn2 = 1'($urandom_range(1));
      latch = 1;
      @(negedge clk);
      latch = 0;
      m11 = '0; m21 = '0;   // changes without latch must not show
      checks++;
      if (int'(res.m1) != e1 || int'(res.m2) != e2 || res.sgn != (sgn1 ^ sgn2)
          || (e1 < 15 && (int'(res.grp) != eg || int'(res.col) != ec))) begin
        failures++;
        if (failures < 5) $display("i=%0d got %0d %0d g%0d c%0d exp %0d %0d g%0d c%0d", i, res.m1, res.m2, res.grp, res.col, e1, e2, eg, ec);
      end
      @(negedge clk);
      checks++;
      if (int'(res.m1) != e1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
