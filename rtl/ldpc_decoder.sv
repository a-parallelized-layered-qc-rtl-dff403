// ldpc_decoder: doubly parallelized layered offset-min-sum QC-LDPC decoder for
// the IEEE 802.11ad codes (Z = 42, 16 block columns, 672-bit codewords).
//
// The block columns of H are split into two groups of 8. Each group has its
// own Z MIN units, Z SEL units, differential cyclic shifter and halves of the
// Q-, T- and R-memories (proc_group). Both groups work on the same block row
// (layer) at once, each on its own blocks; Z combiners (comb_unit) merge the
// two half-row minima and signs into the row result, so the schedule is
// exactly that of a non-parallel layered decoder. A command sequence, built
// offline for the code and the column grouping and written through the
// configuration port, drives everything: one command per cycle, L commands
// per iteration, I iterations.
//
// Use: for each code rate (index 0..3) write its sequence (`cfg_we`,
// `cfg_code`, `cfg_addr`, `cfg_cmd`), its length L (`len_we`, `cfg_len`) and
// its block-column map (`map_*`: which group and slot each of the 16 block
// columns of that code lives in). Then, per codeword, set `code`, write the
// 16 blocks of Z channel LLRs (`llr_*`, in natural block order, saturated to
// +-15 on entry) and pulse `start` with `n_iter` set; `code` must stay
// stable from the LLR load until `start`. After 1 + L*I + FLUSH + 3 = L*I + 6
// cycles the 16 blocks of hard decisions appear on
// `out_valid/out_blk/out_bits` (bit k of block b is codeword bit 42*b + k,
// 1 = negative LLR), one block per cycle; `done` marks the last.
// `ev_*` flag the cycles in which a Q forward, a memory bypass or an empty
// (stall) command took place.
// Split into two groups, the combiner and command-sequence control follow the original
// original architecture. The load/output interface, the configuration ports and the
// 2-stage pipeline (the original architecture's pipeline drains in 8 cycles, this one in
// 2) are this design's own.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned Z         = 42,
  parameter int unsigned RDEPTH    = 28,
  parameter int unsigned SEQ_DEPTH = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic [CODE_W-1:0] cfg_code,
  input  logic              cfg_we,
  input  logic [SEQ_AW-1:0] cfg_addr,
  input  cmd_t              cfg_cmd,
  input  logic              len_we,
  input  logic [LEN_W-1:0]  cfg_len,
  input  logic              map_we,
  input  logic [3:0]        map_blk,
  input  logic              map_grp,
  input  logic [COL_W-1:0]  map_col,
  input  logic [ITER_W-1:0] n_iter,
  input  logic [CODE_W-1:0] code,
  // channel LLRs
  input  logic              llr_valid,
  input  logic [3:0]        llr_blk,
  input  msg_t              llr [Z],
  // control
  input  logic              start,
  output logic              busy,
  // hard decisions
  output logic              out_valid,
  output logic [3:0]        out_blk,
  output logic [Z-1:0]      out_bits,
  output logic              done,
  // events
  output logic              ev_fwd,
  output logic              ev_byp,
  output logic              ev_stall
);
  // ---------------- block-column map ----------------
  logic             mgrp [NCODES][NBLK];
  logic [COL_W-1:0] mcol [NCODES][NBLK];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < int'(NCODES); c++)
        for (int b = 0; b < int'(NBLK); b++) begin
          mgrp[c][b] <= b >= int'(GCOLS);
          mcol[c][b] <= COL_W'(b % int'(GCOLS));
        end
    end else if (map_we && !busy) begin
      mgrp[cfg_code][map_blk] <= map_grp;
      mcol[cfg_code][map_blk] <= map_col;
    end
  end

  // ---------------- controller ----------------
  cmd_t       cmd;
  logic       cmd_valid, iter0, clear_shift, rd_valid, ctl_done;
  logic [3:0] rd_blk;
  logic [CODE_W-1:0] cur_code;

  seq_controller #(.SEQ_DEPTH(SEQ_DEPTH)) u_ctl (
    .clk, .rst_n, .cfg_we, .cfg_code, .cfg_addr, .cfg_cmd, .len_we, .cfg_len, .n_iter, .code, .start,
    .cmd, .cmd_valid, .iter0, .clear_shift, .cur_code, .rd_valid, .rd_blk, .busy, .done(ctl_done));

  // ---------------- per-group command ----------------
  min_op_t gmin [NGROUPS];
  msg_t    ld_sat [Z];

  always_comb begin
    for (int g = 0; g < int'(NGROUPS); g++) begin
      gmin[g] = cmd.min_op[g];
      if (rd_valid) begin
        // hard-decision read: rotate back to orientation 0, no MIN update
        gmin[g]       = '0;
        gmin[g].col   = mcol[cur_code][rd_blk];
      end
    end
    for (int k = 0; k < int'(Z); k++)
      ld_sat[k] = (llr[k] < MSG_MIN) ? MSG_MIN : llr[k];
  end

  // ---------------- groups and combiners ----------------
  row_res_t         res [Z];
  mag_t             m1  [NGROUPS][Z];
  mag_t             m2  [NGROUPS][Z];
  logic [COL_W-1:0] mc  [NGROUPS][Z];
  logic             ms  [NGROUPS][Z];
  msg_t             qrot[NGROUPS][Z];
  logic [NGROUPS-1:0] g_fwd, g_byp;
  logic             row_end_c1;

  for (genvar g = 0; g < int'(NGROUPS); g++) begin : g_grp
    proc_group #(.Z(Z), .RDEPTH(RDEPTH), .GRP(1'(g))) u_grp (
      .clk, .rst_n,
      .first(cmd.first), .iter0, .min_op(gmin[g]), .sel_op(cmd.sel_op[g]), .res,
      .ld_we(llr_valid && !busy && mgrp[code][llr_blk] == 1'(g)), .ld_col(mcol[code][llr_blk]),
      .ld_data(ld_sat), .clear_shift,
      .nxt_m1(m1[g]), .nxt_m2(m2[g]), .nxt_col(mc[g]), .nxt_sgn(ms[g]),
      .qrot(qrot[g]), .ev_fwd(g_fwd[g]), .ev_byp(g_byp[g]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) row_end_c1 <= 1'b0;
    else        row_end_c1 <= cmd.row_end;
  end

  for (genvar k = 0; k < int'(Z); k++) begin : g_comb
    comb_unit u_comb (
      .clk, .rst_n, .latch(row_end_c1),
      .m11(m1[0][k]), .m12(m2[0][k]), .col1(mc[0][k]), .sgn1(ms[0][k]),
      .m21(m1[1][k]), .m22(m2[1][k]), .col2(mc[1][k]), .sgn2(ms[1][k]),
      .res(res[k]));
  end

  // ---------------- hard-decision output ----------------
  logic       rd_c1, done_c1;
  logic [3:0] blk_c1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_c1     <= 1'b0;
      blk_c1    <= '0;
      done_c1   <= 1'b0;
      out_valid <= 1'b0;
      out_blk   <= '0;
      out_bits  <= '0;
      done      <= 1'b0;
    end else begin
      rd_c1     <= rd_valid;
      blk_c1    <= rd_blk;
      done_c1   <= ctl_done;
      out_valid <= rd_c1;
      out_blk   <= blk_c1;
      done      <= done_c1;
      if (rd_c1)
        for (int k = 0; k < int'(Z); k++) out_bits[k] <= qrot[mgrp[cur_code][blk_c1]][k][NQ-1];
    end
  end

  assign ev_fwd   = |g_fwd;
  assign ev_byp   = |g_byp;
  assign ev_stall = cmd_valid && !cmd.min_op[0].valid && !cmd.min_op[1].valid
                    && !cmd.sel_op[0].valid && !cmd.sel_op[1].valid;
endmodule
