// tb_min_unit: self-checking test of the serial MIN unit.
// Feeds random rows of 1..8 T-values (with random gaps and 'first' marking the
// start of each row) and compares the combinational running result after
// every input with a direct computation of the two smallest magnitudes, the
// column of the smallest and the sign product. Also checks that a row with
// no valid input leaves the empty state (15, 15, +).
module tb_min_unit;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic first = 0, in_valid = 0;
  msg_t t_in = '0;
  logic [COL_W-1:0] col_in = '0;
  mag_t m1, m2;
  logic [COL_W-1:0] mcol;
  logic sgn;
  int checks = 0, failures = 0;

  min_unit dut (.clk, .rst_n, .first, .in_valid, .t_in, .col_in,
                .nxt_m1(m1), .nxt_m2(m2), .nxt_col(mcol), .nxt_sgn(sgn));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vals [8];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int row = 0; row < 300; row++) begin
      int n, r1, r2, rc, rs;
      n = (row % 25 == 0) ? 0 : $urandom_range(1, 8);
      r1 = 15; r2 = 15; rc = 0; rs = 0;
      if (n == 0) begin
        @(negedge clk); first = 1; in_valid = 0;
        #1;
        checks++;
        if (m1 != 15 || m2 != 15 || sgn != 0) failures++;
        @(posedge clk);
      end
      for (int k = 0; k < n; k++) begin
        int a;
        vals[k] = $urandom_range(30) - 15;
        a = vals[k] < 0 ? -vals[k] : vals[k];
        if (a < r1) begin r2 = r1; r1 = a; rc = k; end
        else if (a < r2) r2 = a;
        if (vals[k] < 0) rs ^= 1;
        // optional idle cycle inside a row
        if (k > 0 && $urandom_range(3) == 0) begin
          @(negedge clk); first = 0; in_valid = 0; @(posedge clk);
        end
        @(negedge clk);
        first = (k == 0); in_valid = 1; t_in = msg_t'(vals[k]); col_in = COL_W'(k);
        #1;
        checks++;
        if (m1 != mag_t'(r1) || m2 != mag_t'(r2) || sgn != rs[0] || mcol != COL_W'(rc)) begin
          failures++;
          if (failures < 5) $display("row %0d k %0d: got %0d %0d %0d %0b exp %0d %0d %0d %0d", row, k, m1, m2, mcol, sgn, r1, r2, rc, rs);
        end
        @(posedge clk);
      end
      @(negedge clk); first = 0; in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
