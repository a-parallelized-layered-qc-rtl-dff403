// sel_unit: output stage of one check node for one block (combinational).
//
// From the registered row result (m1, m2, position of m1, sign product) and
// the stored T-value of the block being updated it forms
//   R_new = sign * max(0, m - beta),  m = m2 if this block holds m1, else m1,
//   sign  = overall sign xor sign(T),
//   Q_new = sat(T + R_new),
// which are equations (4) and (5) of the layered offset min-sum with beta = 1.
// The block is identified by its group and its column within the group.
module sel_unit
  import ldpc_pkg::*;
(
  input  row_res_t         res,
  input  logic             grp,
  input  logic [COL_W-1:0] col,
  input  msg_t             t_in,
  output msg_t             r_new,
  output msg_t             q_new
);
  mag_t m, mo;
  logic s;

  always_comb begin
    m     = (res.grp == grp && res.col == col) ? res.m2 : res.m1;
    mo    = (m > mag_t'(OFFSET)) ? m - mag_t'(OFFSET) : '0;
    s     = res.sgn ^ t_in[NQ-1];
    r_new = s ? -msg_t'({1'b0, mo}) : msg_t'({1'b0, mo});
    q_new = add_sat(t_in, r_new);
  end
endmodule
