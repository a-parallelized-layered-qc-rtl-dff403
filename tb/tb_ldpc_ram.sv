// tb_ldpc_ram: self-checking test of the decoder memory half.
// Random writes and reads against a shadow array: a read returns the word
// of the previous cycle's contents one cycle later, a same-cycle read of the
// written word returns the old word without `byp` and the new one with it,
// and a cycle without `re` keeps the read register. Uses the R-memory size
// (28 words of 42*5 bits).
module tb_ldpc_ram;
  localparam int DEPTH = 28, WIDTH = 210, AW = 5;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0, byp = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  ldpc_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] v;
    for (int i = 0; i < WIDTH; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] expv, held;
    // initialise
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = AW'(a); wdata = rnd(); shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    held = '0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      we = 1'($urandom_range(1)); waddr = AW'($urandom_range(DEPTH - 1)); wdata = rnd();
      re = ($urandom_range(7) != 0);
      raddr = (i % 4 == 0) ? waddr : AW'($urandom_range(DEPTH - 1));
      byp = 1'($urandom_range(1));
      if (re) expv = (byp) ? wdata : shadow[raddr];
      else    expv = held;
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expv) begin
        failures++;
        if (failures < 5) $display("i=%0d read mismatch", i);
      end
      held = rdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
