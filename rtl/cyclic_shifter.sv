// cyclic_shifter: cyclic shifter with differential shifts for one column group.
//
// Q-values are written back in the orientation in which the MIN units used
// them, so no second shifter is needed to rotate them back. The shifter keeps
// the orientation (shift value) each of its GCOLS block columns is stored in,
// in a small register file, and rotates an incoming block by
//   d = (target - stored) mod Z,   out[k] = in[(k + d) mod Z],
// so that check node k of the current block row sees variable (k + target)
// mod Z of the block column, as for the sub-matrix P^target.
// `fwd` replaces the stored orientation by `fwd_shift` for a block that is
// being forwarded from the write-back stage before its orientation has been
// recorded. `clear` sets all orientations to 0 (channel LLRs are loaded in
// natural order). The rotation is combinational; the orientation table is
// written at the clock edge. The differential-shift scheme follows the
// original architecture; the barrel structure is this design's choice.
module cyclic_shifter
  import ldpc_pkg::*;
#(
  parameter int unsigned Z = 42
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               wr_en,
  input  logic [COL_W-1:0]   wr_col,
  input  logic [SHIFT_W-1:0] wr_shift,
  input  logic [COL_W-1:0]   col,
  input  logic [SHIFT_W-1:0] target,
  input  logic               fwd,
  input  logic [SHIFT_W-1:0] fwd_shift,
  input  msg_t               din  [Z],
  output msg_t               dout [Z]
);
  logic [SHIFT_W-1:0] stored [GCOLS];
  logic [SHIFT_W-1:0] cur;
  logic [SHIFT_W:0]   diff;
  logic [SHIFT_W-1:0] d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(GCOLS); i++) stored[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < int'(GCOLS); i++) stored[i] <= '0;
    end else if (wr_en) begin
      stored[wr_col] <= wr_shift;
    end
  end

  always_comb begin
    cur  = fwd ? fwd_shift : stored[col];
    diff = {1'b0, target} + (SHIFT_W+1)'(Z) - {1'b0, cur};
    d    = (diff >= (SHIFT_W+1)'(Z)) ? SHIFT_W'(diff - (SHIFT_W+1)'(Z)) : SHIFT_W'(diff);
  end

  // Logarithmic rotator: stage b rotates by 2^b when bit b of d is set.
  msg_t stg [SHIFT_W+1][Z];

  always_comb begin
    for (int k = 0; k < int'(Z); k++) stg[0][k] = din[k];
    for (int b = 0; b < int'(SHIFT_W); b++) begin
      for (int k = 0; k < int'(Z); k++) begin
        stg[b+1][k] = d[b] ? stg[b][(k + ((1 << b) % int'(Z))) % int'(Z)] : stg[b][k];
      end
    end
    for (int k = 0; k < int'(Z); k++) dout[k] = stg[SHIFT_W][k];
  end
endmodule
