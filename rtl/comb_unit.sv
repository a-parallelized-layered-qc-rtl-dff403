// comb_unit: combiner of the two half-row minima of one check node.
//
// The two MIN units of a check node each see the blocks of one column group.
// When `latch` is set (the cycle in which a row's last block enters the MIN
// units) the unit forms the overall first minimum m1 = min(m11, m21), the
// second minimum m2 = min(m of the other unit's first, this unit's second),
// the overall sign s1 xor s2 and the (group, column) where m1 lies, and
// registers them. The registered row result stays stable for the SEL units
// until the next row is latched. On equal first minima group 0 wins.
module comb_unit
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             latch,
  input  mag_t             m11,
  input  mag_t             m12,
  input  logic [COL_W-1:0] col1,
  input  logic             sgn1,
  input  mag_t             m21,
  input  mag_t             m22,
  input  logic [COL_W-1:0] col2,
  input  logic             sgn2,
  output row_res_t         res
);
  row_res_t nxt;

  always_comb begin
    if (m21 < m11) begin
      nxt.m1  = m21;
      nxt.m2  = (m11 < m22) ? m11 : m22;
      nxt.grp = 1'b1;
      nxt.col = col2;
    end else begin
      nxt.m1  = m11;
      nxt.m2  = (m21 < m12) ? m21 : m12;
      nxt.grp = 1'b0;
      nxt.col = col1;
    end
    nxt.sgn = sgn1 ^ sgn2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     res <= '{m1: MAG_MAX, m2: MAG_MAX, grp: 1'b0, col: '0, sgn: 1'b0};
    else if (latch) res <= nxt;
  end
endmodule
