// tb_cyclic_shifter: self-checking test of the differential cyclic shifter.
// Keeps, per block column, a model vector in natural order and the
// orientation it is stored in. Each step stores a column rotated to some
// orientation (recording it through the write port), then asks for it at a
// random target shift and checks out[k] = natural[(k + target) mod 42].
// Also checks the forwarded orientation and the clear input.
module tb_cyclic_shifter;
  import ldpc_pkg::*;
  localparam int Z = 42;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, wr_en = 0, fwd = 0;
  logic [COL_W-1:0] wr_col = '0, col = '0;
  logic [SHIFT_W-1:0] wr_shift = '0, target = '0, fwd_shift = '0;
  msg_t din [Z], dout [Z];
  int orient [8];
  int checks = 0, failures = 0;

  cyclic_shifter #(.Z(Z)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_rot(int nat [Z], int tgt);
    int bad = 0;
    for (int k = 0; k < Z; k++) if (int'(dout[k]) != nat[(k + tgt) % Z]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      if (failures < 5) $display("rotation by %0d wrong in %0d places", tgt, bad);
    end
  endtask

  initial begin
    int nat [Z];
    for (int k = 0; k < Z; k++) nat[k] = (k % 31) - 15;
    for (int k = 0; k < Z; k++) din[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 8; c++) orient[c] = 0;
    for (int i = 0; i < 2000; i++) begin
      int c, s, tgt;
      c = $urandom_range(7); s = $urandom_range(Z - 1); tgt = $urandom_range(Z - 1);
      @(negedge clk);
      // record that column c is now stored in orientation s
      wr_en = 1; wr_col = COL_W'(c); wr_shift = SHIFT_W'(s);
      @(negedge clk);
      wr_en = 0; orient[c] = s;
      // present the stored (rotated) word and ask for target tgt
      for (int k = 0; k < Z; k++) din[k] = msg_t'(nat[(k + s) % Z]);
      col = COL_W'(c); target = SHIFT_W'(tgt);
      fwd = 1'(i % 5 == 0);
      fwd_shift = SHIFT_W'(s);
      if (fwd) wr_en = 0;
      #1;
      check_rot(nat, tgt);
      // forwarded orientation overrides the table
      if (i % 7 == 0) begin
        int s2;
        s2 = $urandom_range(Z - 1);
        fwd = 1; fwd_shift = SHIFT_W'(s2);
        for (int k = 0; k < Z; k++) din[k] = msg_t'(nat[(k + s2) % Z]);
        #1;
        check_rot(nat, tgt);
      end
      fwd = 0;
    end
    // clear sets every orientation to 0
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int k = 0; k < Z; k++) din[k] = msg_t'(nat[k]);
    for (int c = 0; c < 8; c++) begin
      col = COL_W'(c); target = 6'd17;
      #1;
      check_rot(nat, 17);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
