// min_unit: serial check-node minimum finder of the layered offset min-sum.
//
// Each cycle in which `in_valid` is set the unit takes one T-value of its check
// node (one non-zero block of the current row) and updates the smallest
// magnitude m1, the second smallest m2, the block column where m1 was found and
// the product of the signs. `first` marks the first cycle of a new row: the
// running state is restarted before the input (if valid) is taken, so a row in
// which this group has no block leaves the "empty" state m1 = m2 = 15, sign +.
// The updated state is also given combinationally on `nxt`, so that the
// combiner can close a row in the same cycle as its last block arrives.
// Serial processing with two minima follows the reference architecture; the
// tie rule (a new value equal to m1 does not replace it) is this design's own.
module min_unit
  import ldpc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              first,
  input  logic              in_valid,
  input  msg_t              t_in,
  input  logic [COL_W-1:0]  col_in,
  output logic [MAG_W-1:0]  nxt_m1,
  output logic [MAG_W-1:0]  nxt_m2,
  output logic [COL_W-1:0]  nxt_col,
  output logic              nxt_sgn
);
  mag_t             m1_q, m2_q, base_m1, base_m2, mag;
  logic [COL_W-1:0] col_q, base_col;
  logic             sgn_q, base_sgn;

  always_comb begin
    base_m1  = first ? MAG_MAX : m1_q;
    base_m2  = first ? MAG_MAX : m2_q;
    base_col = first ? '0      : col_q;
    base_sgn = first ? 1'b0    : sgn_q;
    mag      = mag_of(t_in);
    nxt_m1   = base_m1;
    nxt_m2   = base_m2;
    nxt_col  = base_col;
    nxt_sgn  = base_sgn;
    if (in_valid) begin
      nxt_sgn = base_sgn ^ t_in[NQ-1];
      if (mag < base_m1) begin
        nxt_m1  = mag;
        nxt_m2  = base_m1;
        nxt_col = col_in;
      end else if (mag < base_m2) begin
        nxt_m2  = mag;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1_q  <= MAG_MAX;
      m2_q  <= MAG_MAX;
      col_q <= '0;
      sgn_q <= 1'b0;
    end else if (first || in_valid) begin
      m1_q  <= nxt_m1;
      m2_q  <= nxt_m2;
      col_q <= nxt_col;
      sgn_q <= nxt_sgn;
    end
  end
endmodule
