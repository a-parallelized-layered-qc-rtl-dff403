// tb_seq_controller: self-checking test of the command sequencer.
// Writes random sequences and lengths for all four code slots (one of
// length 64), starts random codes for random I, and checks that the
// commands of the selected code come out in order, once per cycle, L*I of
// them, with `iter0`
// set exactly during the first iteration, that `clear_shift` pulses once at
// the start, that the hard-decision reads follow FLUSH = 2 cycles after the
// last command in block order 0..15 with `done` on the last, and that a
// configuration write during a run is ignored.
module tb_seq_controller;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0, start = 0, len_we = 0;
  logic [SEQ_AW-1:0] cfg_addr = '0;
  logic [LEN_W-1:0] cfg_len = '0;
  logic [CODE_W-1:0] cfg_code = '0, code = '0, cur_code;
  cmd_t cfg_cmd = '0, cmd;
  logic [ITER_W-1:0] n_iter = '0;
  logic cmd_valid, iter0, clear_shift, rd_valid, busy, done;
  logic [3:0] rd_blk;
  cmd_t model [4][64];
  int lens [4];
  int checks = 0, failures = 0;

  seq_controller dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cmd_t rnd_cmd();
    logic [$bits(cmd_t)-1:0] v;
    for (int i = 0; i < $bits(cmd_t); i += 32) v[i +: 32] = $urandom;
    return cmd_t'(v);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4; c++) begin
      lens[c] = (c == 2) ? 64 : $urandom_range(1, 64);
      for (int a = 0; a < 64; a++) begin
        @(negedge clk); cfg_we = 1; cfg_code = CODE_W'(c); cfg_addr = SEQ_AW'(a);
        model[c][a] = rnd_cmd(); cfg_cmd = model[c][a];
      end
      @(negedge clk); cfg_we = 0; len_we = 1; cfg_len = LEN_W'(lens[c]);
      @(negedge clk); len_we = 0;
    end
    for (int run = 0; run < 8; run++) begin
      int L, I, C, n_cmd, n_clear, last_cmd_cyc, cyc, nrd;
      C = (run < 4) ? run : $urandom_range(3);
      L = lens[C]; I = $urandom_range(1, 6);
      @(negedge clk);
      code = CODE_W'(C); n_iter = ITER_W'(I); start = 1;
      @(negedge clk); start = 0;
      // a write during the run must not land
      cfg_we = 1; cfg_code = CODE_W'(C); cfg_addr = '0; cfg_cmd = ~model[C][0];
      len_we = 1; cfg_len = '0;
      code = CODE_W'(C + 1);   // the code is latched at start
      n_cmd = 0; n_clear = 0; cyc = 0; last_cmd_cyc = -1; nrd = 0;
      // clear_shift came in the first cycle after start
      while (!done) begin
        @(posedge clk); #1; cyc++;
        cfg_we = 0; len_we = 0;
        if (clear_shift) n_clear++;
        if (cmd_valid) begin
          int pc;
          pc = n_cmd % L;
          checks++;
          if (cmd != model[C][pc] || iter0 != (n_cmd < L) || cur_code != CODE_W'(C)) begin
            failures++;
            if (failures < 5) $display("run %0d cmd %0d wrong %h %h iter0=%0b", run, n_cmd, cmd, model[C][pc], iter0);
          end
          n_cmd++; last_cmd_cyc = cyc;
        end else begin
          checks++;
          if (cmd != '0) failures++;
        end
        if (rd_valid) begin
          checks++;
          if (int'(rd_blk) != nrd) failures++;
          if (nrd == 0) begin
            checks++;
            if (cyc - last_cmd_cyc != 3) begin failures++; $display("flush gap %0d", cyc - last_cmd_cyc); end
          end
          nrd++;
        end
        if (cyc > 2000) break;
      end
      checks += 3;
      if (n_cmd != L*I) begin failures++; $display("issued %0d commands, expected %0d", n_cmd, L*I); end
      if (nrd != 16)    begin failures++; $display("%0d reads", nrd); end
      if (n_clear != 0) failures++;   // the clear pulse precedes this loop
      @(posedge clk); #1;
      checks++;
      if (busy) failures++;
    end
    // clear pulse right after start
    @(negedge clk); start = 1; code = 2'd1; n_iter = 4'd1;
    @(posedge clk); #1;
    checks++;
    if (!clear_shift) failures++;
    @(negedge clk); start = 0;
    wait (done); @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
