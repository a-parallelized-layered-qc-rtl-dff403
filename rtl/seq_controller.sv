// seq_controller: command sequencer of the decoder.
//
// One command sequence per code rate is generated offline and written into
// the sequence memory through `cfg_we` (code `cfg_code`, address `cfg_addr`);
// its length L is written with `len_we`. The memory holds NCODES sequences of
// up to SEQ_DEPTH commands each. On `start` the controller latches the code
// index `code`, clears the shifter orientations and issues one command per
// cycle, commands 0 .. L-1 of that code, n_iter times over (`iter0` marks the
// first iteration, in which the old R-messages are taken as zero). The command
// leaves the controller registered, one cycle after its address was formed.
// After the last command it waits FLUSH cycles for the pipeline to write its
// last results back, then issues NBLK hard-decision reads, one per block
// column in natural order (`rd_valid`, `rd_blk`), and pulses `done` with the
// last one. Outside RUN the command output is all-zero, a no-op.
// Configuration writes are ignored while a decoding is in progress.
// Issuing one command per cycle for L*I cycles plus a flush, and one
// sequence per code, follow the original architecture; the memory depth, the load
// interface and the output phase are this design's own.
module seq_controller
  import ldpc_pkg::*;
#(
  parameter int unsigned SEQ_DEPTH = 64,
  parameter int unsigned FLUSH     = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [CODE_W-1:0] cfg_code,
  input  logic [SEQ_AW-1:0] cfg_addr,
  input  cmd_t              cfg_cmd,
  input  logic              len_we,
  input  logic [LEN_W-1:0]  cfg_len,
  input  logic [ITER_W-1:0] n_iter,
  input  logic [CODE_W-1:0] code,
  input  logic              start,
  output cmd_t              cmd,
  output logic              cmd_valid,
  output logic              iter0,
  output logic              clear_shift,
  output logic [CODE_W-1:0] cur_code,
  output logic              rd_valid,
  output logic [3:0]        rd_blk,
  output logic              busy,
  output logic              done
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH, S_OUT} state_t;
  state_t state;

  cmd_t              seq_mem [NCODES*SEQ_DEPTH];
  logic [LEN_W-1:0]  len_mem [NCODES];
  logic [SEQ_AW-1:0] pc;
  logic [LEN_W-1:0]  len;
  logic [ITER_W-1:0] iter, iters;
  logic [3:0]        cnt;

  always_ff @(posedge clk) begin
    if (cfg_we && state == S_IDLE) seq_mem[int'(cfg_code) * int'(SEQ_DEPTH) + int'(cfg_addr)] <= cfg_cmd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < int'(NCODES); c++) len_mem[c] <= '0;
    end else if (len_we && state == S_IDLE) begin
      len_mem[cfg_code] <= cfg_len;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pc          <= '0;
      len         <= '0;
      iter        <= '0;
      iters       <= '0;
      cnt         <= '0;
      cur_code    <= '0;
      cmd         <= '0;
      cmd_valid   <= 1'b0;
      iter0       <= 1'b0;
      clear_shift <= 1'b0;
      rd_valid    <= 1'b0;
      rd_blk      <= '0;
      done        <= 1'b0;
    end else begin
      cmd         <= '0;
      cmd_valid   <= 1'b0;
      clear_shift <= 1'b0;
      rd_valid    <= 1'b0;
      done        <= 1'b0;
      unique case (state)
        S_IDLE: if (start && len_mem[code] != '0 && n_iter != '0) begin
          state       <= S_RUN;
          pc          <= '0;
          iter        <= '0;
          iters       <= n_iter;
          len         <= len_mem[code];
          cur_code    <= code;
          clear_shift <= 1'b1;
        end
        S_RUN: begin
          cmd       <= seq_mem[int'(cur_code) * int'(SEQ_DEPTH) + int'(pc)];
          cmd_valid <= 1'b1;
          iter0     <= (iter == '0);
          if (LEN_W'(pc) == len - 1'b1) begin
            pc <= '0;
            if (iter == iters - 1'b1) begin
              state <= S_FLUSH;
              cnt   <= '0;
            end else begin
              iter <= iter + 1'b1;
            end
          end else begin
            pc <= pc + 1'b1;
          end
        end
        S_FLUSH: begin
          if (cnt == 4'(FLUSH - 1)) begin
            state <= S_OUT;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_OUT: begin
          rd_valid <= 1'b1;
          rd_blk   <= cnt;
          cnt      <= cnt + 1'b1;
          if (cnt == 4'(NBLK - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
