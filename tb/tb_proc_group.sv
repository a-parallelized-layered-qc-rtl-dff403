// tb_proc_group: self-checking test of one processing group on its own.
//
// The group is given 8 block columns of random channel LLRs and a random
// 4-row code restricted to those columns. The testbench schedules MIN and
// SEL operations over 3 iterations with random slack, setting the forward,
// Q-bypass and T-bypass flags where a read follows a write by one or two
// cycles, and drives the row result itself (computed by a plain layered
// offset-min-sum model; with one group the row result is the group's own
// minima). It checks the MIN units' running result at the end of every row
// against the model (this covers the Q-memory, the shifter, R-memory and
// T = Q - R), and at the end reads every column back at orientation 0 and
// compares all Z*8 Q-values with the model. Forwards, Q-bypasses and
// T-bypasses must each occur.
module tb_proc_group;
  import ldpc_pkg::*;
  localparam int Z = 42, M = 4, NIT = 3, NC = 8, TMAX = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic first, iter0, ld_we = 0, clear_shift = 0;
  min_op_t min_op;
  sel_op_t sel_op;
  row_res_t res [Z];
  logic [COL_W-1:0] ld_col = '0;
  msg_t ld_data [Z];
  mag_t nxt_m1 [Z], nxt_m2 [Z];
  logic [COL_W-1:0] nxt_col [Z];
  logic nxt_sgn [Z];
  msg_t qrot [Z];
  logic ev_fwd, ev_byp;

  proc_group #(.Z(Z), .RDEPTH(28), .GRP(1'b0)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // code and model
  int H [M][NC];
  int q [NC][Z];
  int R [M][NC][Z];
  row_res_t mres [NIT*M][Z];
  int rm1 [NIT*M][Z], rm2 [NIT*M][Z], rsg [NIT*M][Z];

  // timeline
  min_op_t tl_min [TMAX];
  sel_op_t tl_sel [TMAX];
  logic    tl_first [TMAX], tl_iter0 [TMAX];
  int      tl_selrow [TMAX];   // row instance whose SEL is issued here, -1 none
  int      tl_chk [TMAX];      // row instance whose last MIN is issued here, -1 none

  function automatic int sat(int v); return v > 15 ? 15 : (v < -15 ? -15 : v); endfunction
  function automatic int imax(int a, int b); return a > b ? a : b; endfunction

  task automatic model_row(int inst, int r);
    int T [NC];
    for (int z = 0; z < Z; z++) begin
      int m1, m2, pos, sg;
      m1 = 15; m2 = 15; pos = 0; sg = 0;
      for (int c = 0; c < NC; c++) if (H[r][c] >= 0) begin
        int a;
        T[c] = sat(q[c][(z + H[r][c]) % Z] - R[r][c][z]);
        a = T[c] < 0 ? -T[c] : T[c];
        if (T[c] < 0) sg ^= 1;
        if (a < m1) begin m2 = m1; m1 = a; pos = c; end else if (a < m2) m2 = a;
      end
      mres[inst][z] = '{m1: mag_t'(m1), m2: mag_t'(m2), grp: 1'b0, col: COL_W'(pos), sgn: sg[0]};
      rm1[inst][z] = m1; rm2[inst][z] = m2; rsg[inst][z] = sg;
      for (int c = 0; c < NC; c++) if (H[r][c] >= 0) begin
        int m, mo, s;
        m = (c == pos) ? m2 : m1; mo = m > 1 ? m - 1 : 0;
        s = sg ^ (T[c] < 0 ? 1 : 0);
        R[r][c][z] = s ? -mo : mo;
        q[c][(z + H[r][c]) % Z] = sat(T[c] + R[r][c][z]);
      end
    end
  endtask

  int n_fwd = 0, n_byp = 0, n_tbyp = 0, tend;

  task automatic build();
    int lastw [NC], tmin [NC], lst [NC], raddr [M][NC];
    int n, t, e, s, min_free, sel_free, prev_sel_end, ra;
    for (int i = 0; i < TMAX; i++) begin
      tl_min[i] = '0; tl_sel[i] = '0; tl_first[i] = 0; tl_iter0[i] = 0; tl_selrow[i] = -1; tl_chk[i] = -1;
    end
    ra = 0;
    for (int r = 0; r < M; r++) for (int c = 0; c < NC; c++) if (H[r][c] >= 0) raddr[r][c] = ra++;
    for (int c = 0; c < NC; c++) lastw[c] = -100;
    min_free = 2; sel_free = 0; prev_sel_end = -1;
    for (int it = 0; it < NIT; it++)
      for (int r = 0; r < M; r++) begin
        int inst = it*M + r;
        n = 0;
        for (int c = 0; c < NC; c++) if (H[r][c] >= 0) lst[n++] = c;
        for (int i = 0; i < n; i++) for (int j = i + 1; j < n; j++)
          if (lastw[lst[j]] < lastw[lst[i]]) begin int x; x = lst[i]; lst[i] = lst[j]; lst[j] = x; end
        t = min_free + $urandom_range(2) - 1;
        for (int k = 0; k < n; k++) t = imax(t, lastw[lst[k]] + 1 - k);
        t = imax(t, prev_sel_end - (n - 1));
        t = imax(t, min_free);
        // keep the wrap-around of R reads safe: R is read in the next
        // iteration well after its write in this one (rows are long enough)
        e = t + n - 1;
        tl_first[t] = 1;
        tl_chk[e] = inst;
        for (int k = 0; k < n; k++) begin
          int c = lst[k];
          tl_min[t+k] = '{valid: 1'b1, col: COL_W'(c), shift: SHIFT_W'(H[r][c]), raddr: RADDR_W'(raddr[r][c]),
                          fwd: (t + k == lastw[c] + 1), byp: (t + k == lastw[c] + 2)};
          tl_iter0[t+k] = (it == 0);
          if (t + k == lastw[c] + 1) n_fwd++;
          if (t + k == lastw[c] + 2) n_byp++;
          tmin[c] = t + k;
        end
        s = imax(e + 1 + (($urandom_range(3) == 0) ? 1 : 0), sel_free);
        // SEL in reverse MIN order, so the last MIN block may be bypassed
        for (int k = 0; k < n; k++) begin
          int c = lst[n - 1 - k];
          tl_sel[s+k] = '{valid: 1'b1, col: COL_W'(c), shift: SHIFT_W'(H[r][c]), raddr: RADDR_W'(raddr[r][c]),
                          tbyp: (s + k == tmin[c] + 1)};
          if (s + k == tmin[c] + 1) n_tbyp++;
          tl_selrow[s+k] = inst;
          lastw[c] = s + k;
        end
        min_free = t + n; sel_free = s + n; prev_sel_end = s + n - 1;
      end
    tend = sel_free + 3;
  endtask

  initial begin
    int llr [NC][Z];
    int cur_res;
    for (int k = 0; k < Z; k++) ld_data[k] = '0;
    for (int k = 0; k < Z; k++) res[k] = '0;
    first = 0; iter0 = 0; min_op = '0; sel_op = '0;
    for (int r = 0; r < M; r++) for (int c = 0; c < NC; c++)
      H[r][c] = ($urandom_range(2) != 0) ? int'($urandom_range(Z - 1)) : -1;
    for (int r = 0; r < M; r++) for (int c = 0; c < NC; c++) for (int z = 0; z < Z; z++) R[r][c][z] = 0;
    for (int c = 0; c < NC; c++) for (int z = 0; z < Z; z++) begin
      llr[c][z] = int'($urandom_range(30)) - 15; q[c][z] = llr[c][z];
    end
    for (int it = 0; it < NIT; it++) for (int r = 0; r < M; r++) model_row(it*M + r, r);
    build();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load LLRs, clear orientations
    for (int c = 0; c < NC; c++) begin
      @(negedge clk); ld_we = 1; ld_col = COL_W'(c);
      for (int z = 0; z < Z; z++) ld_data[z] = msg_t'(llr[c][z]);
    end
    @(negedge clk); ld_we = 0; clear_shift = 1;
    @(negedge clk); clear_shift = 0;
    // run the timeline; drive command t in cycle t, row result for SEL stage c1
    cur_res = 0;
    for (int t = 0; t < tend; t++) begin
      min_op = tl_min[t]; sel_op = tl_sel[t]; first = tl_first[t]; iter0 = tl_iter0[t];
      if (t > 0 && tl_selrow[t-1] >= 0) cur_res = tl_selrow[t-1];
      for (int z = 0; z < Z; z++) res[z] = mres[cur_res][z];
      @(negedge clk);
      // the MIN result of a row closed by the previous command is visible now
      if (tl_chk[t] >= 0) begin
        int bad;
        bad = 0;
        for (int z = 0; z < Z; z++)
          if (int'(nxt_m1[z]) != rm1[tl_chk[t]][z] || int'(nxt_m2[z]) != rm2[tl_chk[t]][z]
              || int'(nxt_sgn[z]) != rsg[tl_chk[t]][z]) bad++;
        checks++;
        if (bad != 0) begin failures++; if (failures < 5) $display("row instance %0d: MIN result wrong at %0d nodes", tl_chk[t], bad); end
      end
    end
    // read back every column at orientation 0
    for (int c = 0; c < NC; c++) begin
      int bad;
      min_op = '{valid: 1'b0, col: COL_W'(c), shift: '0, raddr: '0, fwd: 1'b0, byp: 1'b0};
      sel_op = '0; first = 0;
      @(negedge clk);
      bad = 0;
      for (int z = 0; z < Z; z++) if (int'(qrot[z]) != q[c][z]) bad++;
      checks++;
      if (bad != 0) begin failures++; if (failures < 5) $display("column %0d: %0d Q-values wrong", c, bad); end
    end
    checks += 3;
    if (n_fwd == 0) begin failures++; $display("no forward in schedule"); end
    if (n_byp == 0) begin failures++; $display("no Q bypass in schedule"); end
    if (n_tbyp == 0) begin failures++; $display("no T bypass in schedule"); end
    $display("schedule: %0d cycles, forwards=%0d qbypasses=%0d tbypasses=%0d", tend, n_fwd, n_byp, n_tbyp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
