// te_pkg: types and constants shared by the trace encoder and the CVA6 connector.
//
// The trace encoder follows the RISC-V Efficient Trace (E-Trace) branch-trace scheme:
// the core reports "blocks" (runs of retired instructions ending in a discontinuity)
// and the encoder turns them into compressed packets. This package fixes the field
// widths, the itype encoding, the packet format/subformat codes and the block record
// that travels from the connector to the encoder.
//
// Field widths printed in the packet tables (format 2 bits, subformat 2, privilege 2,
// branches 5, branch_map 31, ecause/tval/address XLEN) follow those tables. Widths the
// tables leave open (context, time, iretire) and the encoding of the operation class
// coming from the core are this design's choices.
package te_pkg;

  localparam int unsigned XLEN        = 64;  // 64-bit CVA6
  localparam int unsigned ITYPE_LEN   = 3;   // 3-bit itype (no call/return distinction)
  localparam int unsigned IRETIRE_LEN = 32;  // halfword count per block (assumed)
  localparam int unsigned PRIV_LEN    = 2;
  localparam int unsigned CAUSE_LEN   = XLEN; // ecause field is XLEN wide in the trap packet
  localparam int unsigned TIME_LEN    = 64;  // time field is XLEN wide
  localparam int unsigned CONTEXT_LEN = 32;  // width left open by the payload tables
  localparam int unsigned BMAP_LEN    = 31;  // branch map capacity
  localparam int unsigned BCNT_LEN    = 5;   // branches field
  localparam int unsigned PAYLOAD_LEN = 320; // widest packet (trap) rounded to bytes
  localparam int unsigned PLEN_LEN    = 6;   // payload length in bytes, 0..40

  // E-Trace itype values for a 3-bit itype
  typedef enum logic [ITYPE_LEN-1:0] {
    IT_STD        = 3'd0, // no special instruction (also inferable jump)
    IT_EXC        = 3'd1, // exception
    IT_INT        = 3'd2, // interrupt
    IT_ERET       = 3'd3, // exception or interrupt return
    IT_BR_NTAKEN  = 3'd4, // branch not taken
    IT_BR_TAKEN   = 3'd5, // branch taken
    IT_UNINF_JUMP = 3'd6, // uninferable jump
    IT_RSVD       = 3'd7
  } itype_e;

  // packet formats and format-3 subformats
  typedef enum logic [1:0] {
    F_OPT_EXT    = 2'b00,
    F_DIFF_DELTA = 2'b01,
    F_ADDR_ONLY  = 2'b10,
    F_SYNC       = 2'b11
  } format_e;

  typedef enum logic [1:0] {
    SF_START   = 2'b00,
    SF_TRAP    = 2'b01,
    SF_CONTEXT = 2'b10,
    SF_SUPPORT = 2'b11
  } subformat_e;

  typedef enum logic [1:0] {
    QS_NO_CHANGE  = 2'b00,
    QS_ENDED_REP  = 2'b01,
    QS_TRACE_LOST = 2'b10,
    QS_ENDED_NTR  = 2'b11
  } qual_status_e;

  // address mode ("configuration" register); only the first two are implemented
  localparam logic [2:0] CFG_DELTA_ADDRESS = 3'd0;
  localparam logic [2:0] CFG_FULL_ADDRESS  = 3'd1;

  // class of a committed instruction, as seen at the core's commit port
  typedef enum logic [2:0] {
    OP_OTHER  = 3'd0, // ALU, load/store, ...
    OP_BRANCH = 3'd1, // conditional branch
    OP_JAL    = 3'd2, // direct jump (inferable)
    OP_JALR   = 3'd3, // indirect jump (uninferable)
    OP_ERET   = 3'd4  // mret / sret / dret
  } op_e;

  // one block, as produced by the connector and consumed by the encoder
  typedef struct packed {
    logic [ITYPE_LEN-1:0]   itype;
    logic [XLEN-1:0]        iaddr;
    logic [IRETIRE_LEN-1:0] iretire;
    logic                   ilastsize;
  } block_t;

  // settings of one filter comparator (held in te_reg, used by te_filter)
  typedef struct packed {
    logic            filter; // 1: this comparator takes part in qualification
    logic            mode;   // 0: in range lower..upper, 1: equal to match
    logic [XLEN-1:0] upper;
    logic [XLEN-1:0] lower;
    logic [XLEN-1:0] match;
  } cmp_cfg_t;

  function automatic logic is_branch(logic [ITYPE_LEN-1:0] it);
    return (it == IT_BR_NTAKEN) || (it == IT_BR_TAKEN);
  endfunction

  function automatic logic is_updiscon(logic [ITYPE_LEN-1:0] it);
    return (it == IT_ERET) || (it == IT_UNINF_JUMP);
  endfunction

  function automatic logic is_trap(logic [ITYPE_LEN-1:0] it);
    return (it == IT_EXC) || (it == IT_INT);
  endfunction

endpackage
