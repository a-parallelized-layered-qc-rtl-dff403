// tb_sel_unit: self-checking test of the SEL unit (combinational).
// For random row results and T-values, checks R_new = sign * max(0, m - 1)
// with m = m2 at the position of m1 and m1 elsewhere, sign = overall sign xor
// sign(T), and Q_new = T + R_new saturated to +-15.
module tb_sel_unit;
  import ldpc_pkg::*;
  row_res_t res;
  logic grp;
  logic [COL_W-1:0] col;
  msg_t t_in, r_new, q_new;
  int checks = 0, failures = 0;

  sel_unit dut (.res, .grp, .col, .t_in, .r_new, .q_new);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int m1, m2, t, m, r, q, s;
      m1 = $urandom_range(15); m2 = $urandom_range(m1, 15);
      t  = $urandom_range(30) - 15;
      res.m1 = mag_t'(m1); res.m2 = mag_t'(m2);
      res.grp = 1'($urandom_range(1)); res.col = COL_W'($urandom_range(7));
      res.sgn = 1'($urandom_range(1));
      grp = (i % 3 == 0) ? res.grp : 1'($urandom_range(1));
      col = (i % 3 == 0) ? res.col : COL_W'($urandom_range(7));
      t_in = msg_t'(t);
      #1;
      m = (grp == res.grp && col == res.col) ? m2 : m1;
      m = m > 1 ? m - 1 : 0;
      s = int'(res.sgn) ^ (t < 0 ? 1 : 0);
      r = s ? -m : m;
      q = t + r; q = q > 15 ? 15 : (q < -15 ? -15 : q);
      checks++;
      if (int'(r_new) != r || int'(q_new) != q) begin
        failures++;
        if (failures < 5) $display("i=%0d got r=%0d q=%0d exp r=%0d q=%0d", i, r_new, q_new, r, q);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
