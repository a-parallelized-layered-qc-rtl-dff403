// tb_ldpc_decoder: end-to-end test of the layered QC-LDPC decoder.
//
// For several randomly drawn quasi-cyclic codes with 16 block columns of size
// Z = 42 (8, 6, 4 and 3 block rows, the shapes of the rate 1/2, 5/8, 3/4 and
// 13/16 base matrices, with random positions and shifts) and random splits of the block
// columns into two groups of 8, the testbench
//   1. builds the command sequence itself (a greedy scheduler: MIN blocks
//      are ordered by when their Q becomes ready, SEL of a row starts right
//      after the row is closed, forward / bypass flags are set where a read
//      follows a write by one or two cycles, and the sequence is padded so
//      that it can repeat without hazards across iterations);
//   2. loads the four sequences, lengths and column maps into the four code
//      slots, then, codeword by codeword, selects a code (switching codes
//      between codewords) and loads channel LLRs (noisy all-zero codeword
//      or uniformly random values);
//   3. runs I = 5 iterations and compares the 672 hard decisions bit by bit
//      with a plain, unrotated layered offset-min-sum model using the same
//      5-bit saturating arithmetic;
//   4. checks the decoding latency, L*I + 6 cycles from start to the first
//      output block;
//   5. counts forwards, memory bypasses, stall commands and code switches,
//      each of which must occur at least once over the run.
// The decoder runs at its default parameters.
module tb_ldpc_decoder;
  import ldpc_pkg::*;

  localparam int Z     = 42;
  localparam int NB    = 16;
  localparam int NITER = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              cfg_we = 0, map_we = 0, llr_valid = 0, start = 0, len_we = 0;
  logic [SEQ_AW-1:0] cfg_addr = '0;
  logic [LEN_W-1:0]  cfg_len = '0;
  logic [CODE_W-1:0] cfg_code = '0, code = '0;
  cmd_t              cfg_cmd = '0;
  logic [3:0]        map_blk = '0, llr_blk = '0;
  logic              map_grp = 0;
  logic [COL_W-1:0]  map_col = '0;
  logic [ITER_W-1:0] n_iter = '0;
  msg_t              llr [Z];
  logic              busy, out_valid, done, ev_fwd, ev_byp, ev_stall;
  logic [3:0]        out_blk;
  logic [Z-1:0]      out_bits;

  ldpc_decoder dut (.*);

  int checks = 0, failures = 0;
  int n_fwd = 0, n_byp = 0, n_stall = 0, n_cyc = 0;

  always @(posedge clk) begin
    n_cyc <= n_cyc + 1;
    if (ev_fwd)   n_fwd   <= n_fwd + 1;
    if (ev_byp)   n_byp   <= n_byp + 1;
    if (ev_stall) n_stall <= n_stall + 1;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- code, grouping, sequence ----------------
  // working copy of one code, and the four stored code slots
  int   M;
  int   H [8][NB];          // -1 = zero block, else shift
  int   grp_of [NB], slot_of [NB];
  int   L;
  cmd_t seq [64];
  int   cM [4], cH [4][8][NB], cgrp [4][NB], cslot [4][NB], cL [4];
  cmd_t cseq [4][64];
  int   n_switch = 0, prev_code = -1;

  function automatic int imax(int a, int b); return a > b ? a : b; endfunction

  task automatic draw_code(int rows, int per_row);
    int perm [NB];
    M = rows;
    for (int r = 0; r < M; r++) begin
      for (int b = 0; b < NB; b++) perm[b] = b;
      for (int b = NB - 1; b > 0; b--) begin
        int j = $urandom_range(b);
        int t = perm[b]; perm[b] = perm[j]; perm[j] = t;
      end
      for (int b = 0; b < NB; b++) H[r][b] = -1;
      for (int k = 0; k < per_row; k++) H[r][perm[k]] = $urandom_range(Z - 1);
    end
    // random split into two groups of 8
    for (int b = 0; b < NB; b++) perm[b] = b;
    for (int b = NB - 1; b > 0; b--) begin
      int j = $urandom_range(b);
      int t = perm[b]; perm[b] = perm[j]; perm[j] = t;
    end
    for (int k = 0; k < NB; k++) begin
      grp_of[perm[k]]  = k / 8;
      slot_of[perm[k]] = k % 8;
    end
  endtask

  task automatic build_sequence(output bit ok);
    int lastw [NB], tmin [NB], tfirst [NB], raddr_of [8][NB], smin [8][NB];
    int ridx [2];
    int lst [2][8], cnt [2];
    int min_free, sel_free, prev_sel_end, t, e, s, n, last_cmd, e0;
    ok = 1;
    for (int i = 0; i < 64; i++) seq[i] = '0;
    for (int b = 0; b < NB; b++) begin lastw[b] = -100; tfirst[b] = -1; end
    ridx = '{0, 0};
    min_free = 0; sel_free = 0; prev_sel_end = -1; last_cmd = 0; e0 = 0;
    for (int r = 0; r < M; r++) begin
      cnt = '{0, 0};
      for (int b = 0; b < NB; b++)
        if (H[r][b] >= 0) begin lst[grp_of[b]][cnt[grp_of[b]]] = b; cnt[grp_of[b]]++; end
      // order each group's blocks by the time their Q is written back
      for (int g = 0; g < 2; g++)
        for (int i = 0; i < cnt[g]; i++)
          for (int j = i + 1; j < cnt[g]; j++)
            if (lastw[lst[g][j]] < lastw[lst[g][i]]) begin
              int tt = lst[g][i]; lst[g][i] = lst[g][j]; lst[g][j] = tt;
            end
      n = imax(cnt[0], cnt[1]);
      t = min_free;
      for (int g = 0; g < 2; g++)
        for (int k = 0; k < cnt[g]; k++) t = imax(t, lastw[lst[g][k]] + 1 - k);
      t = imax(t, prev_sel_end - (n - 1));
      e = t + n - 1;
      if (r == 0) e0 = e;
      s = imax(e + 1, sel_free);
      if (s + n > 64) begin ok = 0; return; end
      seq[t].first   = 1'b1;
      seq[e].row_end = 1'b1;
      for (int g = 0; g < 2; g++)
        for (int k = 0; k < cnt[g]; k++) begin
          int b = lst[g][k];
          raddr_of[r][b] = ridx[g]++;
          seq[t+k].min_op[g].valid = 1'b1;
          seq[t+k].min_op[g].col   = COL_W'(slot_of[b]);
          seq[t+k].min_op[g].shift = SHIFT_W'(H[r][b]);
          seq[t+k].min_op[g].raddr = RADDR_W'(raddr_of[r][b]);
          seq[t+k].min_op[g].fwd   = (t + k == lastw[b] + 1);
          seq[t+k].min_op[g].byp   = (t + k == lastw[b] + 2);
          tmin[b] = t + k;
          smin[r][b] = t + k;
          if (tfirst[b] < 0) tfirst[b] = t + k;
        end
      for (int g = 0; g < 2; g++)
        for (int k = 0; k < cnt[g]; k++) begin
          int b = lst[g][k];
          seq[s+k].sel_op[g].valid = 1'b1;
          seq[s+k].sel_op[g].col   = COL_W'(slot_of[b]);
          seq[s+k].sel_op[g].shift = SHIFT_W'(H[r][b]);
          seq[s+k].sel_op[g].raddr = RADDR_W'(raddr_of[r][b]);
          seq[s+k].sel_op[g].tbyp  = (s + k == tmin[b] + 1);
          lastw[b] = s + k;
        end
      min_free = t + n;
      sel_free = s + n;
      prev_sel_end = s + n - 1;
      last_cmd = imax(last_cmd, s + n - 1);
      for (int g = 0; g < 2; g++) if (ridx[g] > 28) ok = 0;
    end
    // length, padded so that the next iteration needs no forwarding across
    // the wrap and the first row is not closed before the last SEL finished
    L = last_cmd + 1;
    for (int b = 0; b < NB; b++) if (tfirst[b] >= 0) L = imax(L, lastw[b] + 3 - tfirst[b]);
    for (int r = 0; r < M; r++)
      for (int b = 0; b < NB; b++)
        if (H[r][b] >= 0) L = imax(L, lastw[b] + 3 - smin[r][b]);
    L = imax(L, prev_sel_end - e0);
    if (L > 64) ok = 0;
  endtask

  // ---------------- reference model ----------------
  int llr_in [Z*NB];
  int refq   [Z*NB];

  function automatic int sat(int v);
    return v > 15 ? 15 : (v < -15 ? -15 : v);
  endfunction

  task automatic reference(int iters);
    int R [8][NB][Z];
    int T [NB];
    for (int i = 0; i < Z*NB; i++) refq[i] = sat(llr_in[i]);
    for (int r = 0; r < 8; r++) for (int b = 0; b < NB; b++) for (int z = 0; z < Z; z++) R[r][b][z] = 0;
    for (int it = 0; it < iters; it++)
      for (int r = 0; r < M; r++)
        for (int z = 0; z < Z; z++) begin
          int m1, m2, pos, sg;
          m1 = 15; m2 = 15; pos = -1; sg = 0;
          for (int b = 0; b < NB; b++) if (H[r][b] >= 0) begin
            int v = b*Z + (z + H[r][b]) % Z;
            int a;
            T[b] = sat(refq[v] - R[r][b][z]);
            a = T[b] < 0 ? -T[b] : T[b];
            if (T[b] < 0) sg ^= 1;
            if (a < m1) begin m2 = m1; m1 = a; pos = b; end
            else if (a < m2) m2 = a;
          end
          for (int b = 0; b < NB; b++) if (H[r][b] >= 0) begin
            int v = b*Z + (z + H[r][b]) % Z;
            int m = (b == pos) ? m2 : m1;
            int mo = m > 1 ? m - 1 : 0;
            int s = sg ^ (T[b] < 0 ? 1 : 0);
            R[r][b][z] = s ? -mo : mo;
            refq[v] = sat(T[b] + R[r][b][z]);
          end
        end
  endtask

  // ---------------- configuration of one code slot ----------------
  task automatic setup_code(int c, int rows, int per_row);
    bit ok;
    do begin
      draw_code(rows, per_row);
      build_sequence(ok);
    end while (!ok);
    cM[c] = M; cL[c] = L;
    for (int r = 0; r < 8; r++) for (int b = 0; b < NB; b++) cH[c][r][b] = H[r][b];
    for (int b = 0; b < NB; b++) begin cgrp[c][b] = grp_of[b]; cslot[c][b] = slot_of[b]; end
    for (int i = 0; i < 64; i++) cseq[c][i] = seq[i];
    @(negedge clk);
    cfg_code = CODE_W'(c);
    for (int i = 0; i < L; i++) begin
      cfg_we = 1; cfg_addr = SEQ_AW'(i); cfg_cmd = seq[i];
      @(negedge clk);
    end
    cfg_we = 0;
    len_we = 1; cfg_len = LEN_W'(L);
    @(negedge clk);
    len_we = 0;
    for (int b = 0; b < NB; b++) begin
      map_we = 1; map_blk = 4'(b); map_grp = grp_of[b][0]; map_col = COL_W'(slot_of[b]);
      @(negedge clk);
    end
    map_we = 0;
    $display("code slot %0d: %0d block rows, %0d blocks per row, L=%0d", c, rows, per_row, L);
  endtask

  // ---------------- one decoding run ----------------
  task automatic run_case(int c, bit noisy);
    int t0, nout, corrected;
    M = cM[c]; L = cL[c];
    for (int r = 0; r < 8; r++) for (int b = 0; b < NB; b++) H[r][b] = cH[c][r][b];
    if (prev_code >= 0 && prev_code != c) n_switch++;
    prev_code = c;
    for (int i = 0; i < Z*NB; i++) begin
      if (noisy) llr_in[i] = 3 + int'($urandom_range(12)) - 6;   // +1 sent, noisy
      else       llr_in[i] = int'($urandom_range(31)) - 16;
    end
    reference(NITER);
    @(negedge clk);
    code = CODE_W'(c);
    for (int b = 0; b < NB; b++) begin
      llr_valid = 1; llr_blk = 4'(b);
      for (int k = 0; k < Z; k++) llr[k] = msg_t'(llr_in[b*Z + k]);
      @(negedge clk);
    end
    llr_valid = 0;
    n_iter = ITER_W'(NITER);
    start = 1;
    @(posedge clk); t0 = n_cyc;
    @(negedge clk); start = 0;
    code = CODE_W'(c ^ 1);   // the decoder latched the code at start
    nout = 0; corrected = 0;
    while (nout < NB) begin
      @(posedge clk);
      if (out_valid) begin
        if (nout == 0) begin
          checks++;
          if (n_cyc - t0 != L*NITER + 6) begin
            failures++;
            $display("latency %0d, expected %0d", n_cyc - t0, L*NITER + 6);
          end
        end
        checks++;
        if (out_blk != 4'(nout)) begin failures++; $display("block order: got %0d expected %0d", out_blk, nout); end
        for (int k = 0; k < Z; k++) begin
          int idx = int'(out_blk)*Z + k;
          checks++;
          if (out_bits[k] != (refq[idx] < 0)) begin
            failures++;
            if (failures < 10) $display("bit %0d: got %0b expected %0b", idx, out_bits[k], refq[idx] < 0);
          end
          if (noisy && llr_in[idx] < 0 && !out_bits[k]) corrected++;
        end
        nout++;
      end
    end
    @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("still busy after output"); end
    $display("codeword with code slot %0d noisy=%0b: L=%0d, %0d cycles, corrected=%0d", c, noisy, L, L*NITER + 6, corrected);
  endtask

  initial begin
    for (int k = 0; k < Z; k++) llr[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // shapes of the rate 1/2, 5/8, 3/4 and 13/16 base matrices
    setup_code(0, 8, 6);
    setup_code(1, 6, 8);
    setup_code(2, 4, 11);
    setup_code(3, 3, 15);
    run_case(0, 1'b1);
    run_case(1, 1'b1);
    run_case(2, 1'b1);
    run_case(3, 1'b0);
    run_case(2, 1'b0);
    run_case(0, 1'b0);
    run_case(0, 1'b1);
    checks += 4;
    if (n_switch == 0) begin failures++; $display("no code switch occurred"); end
    if (n_fwd == 0)   begin failures++; $display("no forward occurred"); end
    if (n_byp == 0)   begin failures++; $display("no bypass occurred"); end
    if (n_stall == 0) begin failures++; $display("no stall command occurred"); end
    $display("events: forwards=%0d bypasses=%0d stalls=%0d code switches=%0d", n_fwd, n_byp, n_stall, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
