// ldpc_pkg: constants, message arithmetic and the command format shared by the
// layered QC-LDPC decoder.
//
// Messages (Q, T and R) are 5-bit two's-complement numbers saturated to the
// symmetric range [-15, +15], as the design uses 5 bits for all three message
// types. The saturation range and the two's-complement coding are this
// design's choice. The command word is what the offline sequence generator
// produces: per cycle, one MIN operation and one SEL operation for each of the
// two column groups, plus the flags that start a row and close it. The
// sequences and column maps of the four code rates are held side by side and
// selected by a 2-bit code index. Field
// widths cover 8 block columns per group, shifts up to 63 and 32 R addresses.
package ldpc_pkg;

  localparam int unsigned NQ        = 5;   // bits per Q, T and R message
  localparam int unsigned MAG_W     = NQ - 1;
  localparam int unsigned NGROUPS   = 2;   // column groups (MIN/SEL unit sets)
  localparam int unsigned GCOLS     = 8;   // block columns per group
  localparam int unsigned NBLK      = NGROUPS * GCOLS; // block columns of H
  localparam int unsigned COL_W     = 3;
  localparam int unsigned SHIFT_W   = 6;
  localparam int unsigned RADDR_W   = 5;
  localparam int unsigned SEQ_AW    = 6;   // command address within one code's sequence
  localparam int unsigned LEN_W     = SEQ_AW + 1; // sequence length 1..64
  localparam int unsigned NCODES    = 4;   // code rates 1/2, 5/8, 3/4, 13/16
  localparam int unsigned CODE_W    = 2;
  localparam int unsigned ITER_W    = 4;
  localparam int unsigned OFFSET    = 1;   // offset beta of the offset min-sum

  typedef logic signed [NQ-1:0] msg_t;
  typedef logic [MAG_W-1:0]     mag_t;

  localparam msg_t MSG_MAX = msg_t'((1 << (NQ - 1)) - 1);  // +15
  localparam msg_t MSG_MIN = -MSG_MAX;                     // -15
  localparam mag_t MAG_MAX = '1;

  // One MIN operation: read Q of block column `col`, rotate it to `shift`,
  // subtract the old R at `raddr`, feed the MIN units, store T.
  // fwd: take Q from the write-back register (written one cycle later than
  // the memory could deliver it). byp: the Q-memory read returns the value
  // written in the same cycle.
  typedef struct packed {
    logic               valid;
    logic [COL_W-1:0]   col;
    logic [SHIFT_W-1:0] shift;
    logic [RADDR_W-1:0] raddr;
    logic               fwd;
    logic               byp;
  } min_op_t;

  // One SEL operation: read T of block column `col`, compute the new R and Q
  // for it from the combined row minima, write R to `raddr` and Q back to
  // `col`, record `shift` as the orientation Q is now stored in.
  // tbyp: the T-memory read returns the value written in the same cycle.
  typedef struct packed {
    logic               valid;
    logic [COL_W-1:0]   col;
    logic [SHIFT_W-1:0] shift;
    logic [RADDR_W-1:0] raddr;
    logic               tbyp;
  } sel_op_t;

  typedef struct packed {
    logic                       first;   // first MIN command of a row
    logic                       row_end; // last MIN command of a row
    min_op_t [NGROUPS-1:0]      min_op;
    sel_op_t [NGROUPS-1:0]      sel_op;
  } cmd_t;

  // Row result of the MIN/COMB units for one check node.
  typedef struct packed {
    mag_t             m1;
    mag_t             m2;
    logic             grp;   // group in which m1 was found
    logic [COL_W-1:0] col;   // block column (within the group) of m1
    logic             sgn;   // product of signs, 1 = negative
  } row_res_t;

  function automatic msg_t sat_msg(input logic signed [NQ+1:0] v);
    if (v > (NQ+2)'(MSG_MAX))      return MSG_MAX;
    else if (v < (NQ+2)'(MSG_MIN)) return MSG_MIN;
    else                           return msg_t'(v);
  endfunction

  function automatic msg_t sub_sat(input msg_t a, input msg_t b);
    return sat_msg((NQ+2)'(a) - (NQ+2)'(b));
  endfunction

  function automatic msg_t add_sat(input msg_t a, input msg_t b);
    return sat_msg((NQ+2)'(a) + (NQ+2)'(b));
  endfunction

  function automatic mag_t mag_of(input msg_t a);
    return a[NQ-1] ? mag_t'(-a) : mag_t'(a);
  endfunction

endpackage
