// proc_group: one of the two processing halves of the decoder.
//
// A group owns 8 of the 16 block columns of H. It holds Z MIN units, Z SEL
// units, the differential cyclic shifter and its own halves of the Q-memory
// (8 x Z messages), T-memory (8 x Z) and R-memory (RDEPTH x Z). Every cycle it
// executes the MIN operation and the SEL operation of the current command.
//
// Pipeline (cycle numbers relative to the cycle a command is presented):
//   MIN  c0: Q-memory read of `col`, R-memory read of `raddr`.
//        c1: rotate Q by the differential shift, T = sat(Q - R_old)
//            (R_old = 0 in the first iteration), update the MIN units,
//            write T to the T-memory at `col`.
//   SEL  c0: T-memory read of `col`.
//        c1: SEL units form R_new and Q_new from T and the row result;
//            the results are registered in the write-back stage.
//        c2: write-back: Q to the Q-memory at `col`, R to the R-memory at
//            `raddr`, orientation `shift` into the shifter.
// Data forwarding: a MIN issued one cycle after the SEL that writes its
// column takes Q (and its orientation) from the write-back register (`fwd`).
// Memory bypassing: a MIN issued two cycles after it reads the Q-memory in
// the write cycle and gets the write data (`byp`); likewise a SEL issued in
// the cycle right after the MIN of its column gets T that way (`tbyp`). The
// flags come from the command sequence, as in the original architecture; the
// hardware does not detect hazards itself.
// In the load phase `ld_we` writes channel LLRs straight into the Q-memory.
// The rotated Q block of stage c1 is brought out on `qrot` for the
// hard-decision output (issued as a MIN with valid = 0 and shift = 0).
module proc_group
  import ldpc_pkg::*;
#(
  parameter int unsigned Z      = 42,
  parameter int unsigned RDEPTH = 28,
  parameter bit          GRP    = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  // command
  input  logic             first,
  input  logic             iter0,
  input  min_op_t          min_op,
  input  sel_op_t          sel_op,
  input  row_res_t         res    [Z],
  // channel LLR load
  input  logic             ld_we,
  input  logic [COL_W-1:0] ld_col,
  input  msg_t             ld_data [Z],
  input  logic             clear_shift,
  // to the combiners, valid in the cycle after the MIN command
  output mag_t             nxt_m1  [Z],
  output mag_t             nxt_m2  [Z],
  output logic [COL_W-1:0] nxt_col [Z],
  output logic             nxt_sgn [Z],
  // rotated Q of stage c1 (hard-decision output)
  output msg_t             qrot   [Z],
  // event flags for monitoring
  output logic             ev_fwd,
  output logic             ev_byp
);
  localparam int unsigned W   = Z * NQ;
  localparam int unsigned RAW = (RDEPTH > 1) ? $clog2(RDEPTH) : 1;

  // ---------------- stage registers ----------------
  // only the fields used after c0 are carried into c1
  typedef struct packed {
    logic               valid;
    logic [COL_W-1:0]   col;
    logic [SHIFT_W-1:0] shift;
    logic               fwd;
  } s1_min_t;
  typedef struct packed {
    logic               valid;
    logic [COL_W-1:0]   col;
    logic [SHIFT_W-1:0] shift;
    logic [RADDR_W-1:0] raddr;
  } s1_sel_t;
  s1_min_t s1_min;
  logic    s1_first, s1_iter0;
  s1_sel_t s1_sel;

  typedef struct packed {
    logic               valid;
    logic [COL_W-1:0]   col;
    logic [SHIFT_W-1:0] shift;
    logic [RADDR_W-1:0] raddr;
  } wb_ctl_t;
  wb_ctl_t          wb;
  logic [W-1:0]     wb_q, wb_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_min   <= '0;
      s1_first <= 1'b0;
      s1_iter0 <= 1'b0;
      s1_sel   <= '0;
    end else begin
      s1_min   <= '{valid: min_op.valid, col: min_op.col, shift: min_op.shift, fwd: min_op.fwd};
      s1_first <= first;
      s1_iter0 <= iter0;
      s1_sel   <= '{valid: sel_op.valid, col: sel_op.col, shift: sel_op.shift, raddr: sel_op.raddr};
    end
  end

  // ---------------- memories ----------------
  logic [W-1:0] q_rd, r_rd, t_rd, t_wr, q_wr_data, ld_word;
  logic         q_we;
  logic [COL_W-1:0] q_waddr;

  always_comb begin
    for (int k = 0; k < int'(Z); k++) ld_word[k*NQ +: NQ] = ld_data[k];
    q_we      = ld_we | wb.valid;
    q_waddr   = ld_we ? ld_col : wb.col;
    q_wr_data = ld_we ? ld_word : wb_q;
  end

  ldpc_ram #(.DEPTH(GCOLS), .WIDTH(W)) u_qmem (
    .clk, .we(q_we), .waddr(q_waddr), .wdata(q_wr_data),
    .re(1'b1), .raddr(min_op.col), .byp(min_op.byp), .rdata(q_rd));

  ldpc_ram #(.DEPTH(RDEPTH), .WIDTH(W)) u_rmem (
    .clk, .we(wb.valid), .waddr(RAW'(wb.raddr)), .wdata(wb_r),
    .re(1'b1), .raddr(RAW'(min_op.raddr)), .byp(1'b0), .rdata(r_rd));

  ldpc_ram #(.DEPTH(GCOLS), .WIDTH(W)) u_tmem (
    .clk, .we(s1_min.valid), .waddr(s1_min.col), .wdata(t_wr),
    .re(1'b1), .raddr(sel_op.col), .byp(sel_op.tbyp), .rdata(t_rd));

  // ---------------- MIN side, stage c1 ----------------
  logic [W-1:0] q_in;
  msg_t q_vec [Z];
  msg_t t_vec [Z];

  always_comb begin
    q_in = s1_min.fwd ? wb_q : q_rd;
    for (int k = 0; k < int'(Z); k++) q_vec[k] = msg_t'(q_in[k*NQ +: NQ]);
  end

  cyclic_shifter #(.Z(Z)) u_shift (
    .clk, .rst_n, .clear(clear_shift),
    .wr_en(wb.valid), .wr_col(wb.col), .wr_shift(wb.shift),
    .col(s1_min.col), .target(s1_min.shift),
    .fwd(s1_min.fwd), .fwd_shift(wb.shift),
    .din(q_vec), .dout(qrot));

  always_comb begin
    for (int k = 0; k < int'(Z); k++) begin
      t_vec[k] = sub_sat(qrot[k], s1_iter0 ? msg_t'(0) : msg_t'(r_rd[k*NQ +: NQ]));
      t_wr[k*NQ +: NQ] = t_vec[k];
    end
  end

  for (genvar k = 0; k < int'(Z); k++) begin : g_min
    min_unit u_min (
      .clk, .rst_n,
      .first(s1_first), .in_valid(s1_min.valid), .t_in(t_vec[k]), .col_in(s1_min.col),
      .nxt_m1(nxt_m1[k]), .nxt_m2(nxt_m2[k]), .nxt_col(nxt_col[k]), .nxt_sgn(nxt_sgn[k]));
  end

  // ---------------- SEL side, stage c1 ----------------
  logic [W-1:0] r_new_w, q_new_w;

  for (genvar k = 0; k < int'(Z); k++) begin : g_sel
    msg_t r_k, q_k;
    sel_unit u_sel (
      .res(res[k]), .grp(GRP), .col(s1_sel.col),
      .t_in(msg_t'(t_rd[k*NQ +: NQ])), .r_new(r_k), .q_new(q_k));
    assign r_new_w[k*NQ +: NQ] = r_k;
    assign q_new_w[k*NQ +: NQ] = q_k;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb   <= '0;
      wb_q <= '0;
      wb_r <= '0;
    end else begin
      wb.valid <= s1_sel.valid;
      wb.col   <= s1_sel.col;
      wb.shift <= s1_sel.shift;
      wb.raddr <= s1_sel.raddr;
      if (s1_sel.valid) begin
        wb_q <= q_new_w;
        wb_r <= r_new_w;
      end
    end
  end

  assign ev_fwd = s1_min.valid & s1_min.fwd;
  assign ev_byp = (min_op.valid & min_op.byp) | (sel_op.valid & sel_op.tbyp);

  // A forward or a Q bypass must coincide with a write-back of the same column.
  a_fwd: assert property (@(posedge clk) disable iff (!rst_n)
           s1_min.valid && s1_min.fwd |-> wb.valid && wb.col == s1_min.col)
         else $error("forward without a matching write-back");
  a_byp: assert property (@(posedge clk) disable iff (!rst_n)
           min_op.valid && min_op.byp |-> wb.valid && wb.col == min_op.col)
         else $error("Q bypass without a matching write-back");
endmodule
