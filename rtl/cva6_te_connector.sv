// cva6_te_connector: turns the commit ports of a CVA6 core into E-Trace blocks.
//
// A block is a run of retired instructions that ends in a special instruction (branch,
// indirect jump, exception return) or in a trap; it is described by the address of its
// first instruction (iaddr), its length in halfwords (iretire), the size of its last
// instruction (ilastsize: 0 = 2 bytes, 1 = 4 bytes) and its type (itype).
//
// Dataflow, one stage per step of the design description:
//   1. itype detection: one itype_detector per commit port. The outcome of the last
//      resolved branch is kept in a register, because the core resolves a branch some
//      cycles before committing it. A block counter adds up how many blocks end in this
//      cycle (number of itypes other than 0, or 1 in a trap cycle) and stores the count
//      in a FIFO when it is not zero.
//   2. serialization: whenever a port commits or a trap is signalled, every port pushes
//      one entry (committed flag, itype, pc, compressed flag, privilege) into its own
//      FIFO, so the FIFOs stay in step, and cause/tval go into a shared FIFO on a trap.
//      A counter selects the FIFO whose head goes to the FSM, so instructions reach the
//      FSM in program order, one per cycle. Entries of ports that committed nothing are
//      dropped without costing a cycle (this design's choice: otherwise a single commit
//      would take NRET cycles). A trap entry is taken from the first FIFO only and pops
//      all of them, as the trap signals reach every port.
//   3. FSM with states idle and count: idle starts a block (iaddr = pc, iretire =
//      1 or 2) and goes to count for a standard instruction, or closes a one-instruction
//      block at once for a special one; count adds to iretire until a special
//      instruction or a trap closes the block. A trap with no instruction in the block
//      gives iretire = 0, iaddr = the trapping pc and the ilastsize of the last retired
//      instruction. cause and tval are set only for trap blocks, else 0.
//   4. deserialization: a counter steers each finished block into output register 0,
//      1, ...; when the count at the head of the block-count FIFO is reached, valid_o
//      is raised for those ports for one cycle.
// While hold_i is high (the encoder is stalled in lossless mode) the FIFOs still
// accept commits but nothing is popped and valid_o/block_o keep their values.
// Latency from commit to valid_o is one cycle per instruction of the group plus one
// (output register), plus the time queued behind earlier groups; throughput is one
// committed instruction (or one trap) per cycle, so bursts of NRET commits per cycle
// wait in the FIFOs.
//
// Assumptions of this design: no instruction commits in a cycle that signals a trap;
// the FSM's "standard instruction" is itype 0 (the text's reading; the state chart
// labels that edge itype == 1); FIFO depth 16; priv_o is the privilege of the last
// block of the group. The connector has no back-pressure: a FIFO overflow loses
// entries and is reported by an assertion.
module cva6_te_connector
  import te_pkg::*;
#(
  parameter int unsigned NRET  = 2,   // commit ports
  parameter int unsigned DEPTH = 16   // entries per FIFO
) (
  input  logic                  clk_i,
  input  logic                  rst_ni,
  // from the commit stage
  input  logic [NRET-1:0]       valid_i,
  input  logic [NRET-1:0][XLEN-1:0] pc_i,
  input  op_e  [NRET-1:0]       op_i,
  input  logic [NRET-1:0]       is_compressed_i,
  input  logic                  ex_valid_i,
  input  logic [CAUSE_LEN-1:0]  cause_i,
  input  logic [XLEN-1:0]       tval_i,
  input  logic                  interrupt_i,
  // from the branch unit and the CSR file
  input  logic                  branch_valid_i,
  input  logic                  is_taken_i,
  input  logic [PRIV_LEN-1:0]   priv_lvl_i,
  // to the trace encoder
  input  logic                  hold_i,    // encoder frozen: keep outputs, stop draining
  output logic [NRET-1:0]       valid_o,
  output block_t [NRET-1:0]     block_o,
  output logic [CAUSE_LEN-1:0]  cause_o,
  output logic [XLEN-1:0]       tval_o,
  output logic [PRIV_LEN-1:0]   priv_o
);

  localparam int unsigned CW = $clog2(NRET + 1);
  localparam int unsigned SW = (NRET > 1) ? $clog2(NRET) : 1;

  typedef struct packed {
    logic                 committed;
    logic [ITYPE_LEN-1:0] itype;
    logic [XLEN-1:0]      pc;
    logic                 compressed;
    logic [PRIV_LEN-1:0]  priv;
  } entry_t;

  typedef struct packed {
    logic [CAUSE_LEN-1:0] cause;
    logic [XLEN-1:0]      tval;
  } trap_t;

  // ---------------- 1. itype detection and block counting ----------------
  logic                         taken_q;
  logic [NRET-1:0][ITYPE_LEN-1:0] itype;
  logic                         event_in;
  logic [CW-1:0]                nblocks;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)             taken_q <= 1'b0;
    else if (branch_valid_i) taken_q <= is_taken_i;
  end

  for (genvar i = 0; i < NRET; i++) begin : g_det
    itype_detector u_det (
      .valid_i(valid_i[i]), .op_i(op_i[i]), .ex_valid_i, .interrupt_i,
      .branch_taken_i(taken_q), .itype_o(itype[i])
    );
  end

  always_comb begin
    nblocks = '0;
    if (ex_valid_i) nblocks = CW'(1);
    else for (int i = 0; i < NRET; i++)
      if (valid_i[i] && itype[i] != IT_STD) nblocks = nblocks + 1'b1;
  end

  assign event_in = (|valid_i) | ex_valid_i;

  logic [CW-1:0] cnt_head;
  logic          cnt_empty, cnt_full, cnt_pop;

  te_fifo #(.WIDTH(CW), .DEPTH(DEPTH)) u_cnt_fifo (
    .clk_i, .rst_ni, .push_i(event_in && nblocks != '0), .data_i(nblocks),
    .pop_i(cnt_pop), .data_o(cnt_head), .empty_o(cnt_empty), .full_o(cnt_full)
  );

  // ---------------- 2. serialization ----------------
  entry_t [NRET-1:0] head;
  logic   [NRET-1:0] lane_empty, lane_full, lane_pop;
  trap_t             trap_head;
  logic              trap_empty, trap_full, trap_pop;
  logic [SW-1:0]     sel_q;

  for (genvar i = 0; i < NRET; i++) begin : g_lane
    entry_t e;
    assign e.committed  = valid_i[i] & ~ex_valid_i;
    assign e.itype      = itype[i];
    assign e.pc         = pc_i[i];
    assign e.compressed = is_compressed_i[i];
    assign e.priv       = priv_lvl_i;
    te_fifo #(.WIDTH($bits(entry_t)), .DEPTH(DEPTH)) u_fifo (
      .clk_i, .rst_ni, .push_i(event_in), .data_i(e), .pop_i(lane_pop[i]),
      .data_o(head[i]), .empty_o(lane_empty[i]), .full_o(lane_full[i])
    );
  end

  te_fifo #(.WIDTH($bits(trap_t)), .DEPTH(DEPTH)) u_trap_fifo (
    .clk_i, .rst_ni, .push_i(ex_valid_i), .data_i({cause_i, tval_i}), .pop_i(trap_pop),
    .data_o(trap_head), .empty_o(trap_empty), .full_o(trap_full)
  );

  entry_t cur;
  logic   cur_valid, cur_trap;
  logic   grp_valid, rest_any, last_pick;
  logic [SW-1:0] pick;

  // lanes below sel_q already hold the next group; among the others the first lane
  // with a committed instruction (or the trap, always in lane 0) is served, and lanes
  // without an instruction are dropped on the way, so that a group costs one cycle per
  // committed instruction
  always_comb begin
    grp_valid = ~lane_empty[sel_q] & ~hold_i;
    cur_valid = 1'b0;
    pick      = sel_q;
    for (int i = NRET - 1; i >= 0; i--)
      if (i >= int'(sel_q) && (head[i].committed || is_trap(head[i].itype))) begin
        pick      = SW'(i);
        cur_valid = grp_valid;
      end
    cur      = head[pick];
    cur_trap = cur_valid && is_trap(cur.itype);
    rest_any = 1'b0;
    for (int i = 0; i < NRET; i++)
      if (i > int'(pick) && head[i].committed) rest_any = 1'b1;
    last_pick = ~cur_valid | cur_trap | ~rest_any;
    lane_pop  = '0;
    if (grp_valid)
      for (int i = 0; i < NRET; i++)
        if (i >= int'(sel_q) && (last_pick || i <= int'(pick))) lane_pop[i] = 1'b1;
    if (cur_trap) lane_pop = '1;        // a trap entry stands for the whole group
  end
  assign trap_pop = cur_trap;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)        sel_q <= '0;
    else if (grp_valid) sel_q <= last_pick ? '0 : pick + 1'b1;
  end

  // ---------------- 3. block FSM ----------------
  typedef enum logic {S_IDLE, S_COUNT} state_e;
  state_e                 state_q, state_d;
  logic [XLEN-1:0]        iaddr_q, iaddr_d;
  logic [IRETIRE_LEN-1:0] iretire_q, iretire_d;
  logic                   lastsize_q, lastsize_d;  // size of the last retired instruction
  logic                   blk_valid;
  block_t                 blk;
  trap_t                  blk_trap;
  logic [PRIV_LEN-1:0]    blk_priv;

  always_comb begin
    logic [IRETIRE_LEN-1:0] size;
    state_d    = state_q;
    iaddr_d    = iaddr_q;
    iretire_d  = iretire_q;
    lastsize_d = lastsize_q;
    blk_valid  = 1'b0;
    blk        = '0;
    blk_trap   = '0;
    blk_priv   = cur.priv;
    size       = cur.compressed ? IRETIRE_LEN'(1) : IRETIRE_LEN'(2);
    if (cur_valid) begin
      if (cur_trap) begin
        blk_valid     = 1'b1;
        blk.itype     = cur.itype;
        blk.iaddr     = (state_q == S_IDLE) ? cur.pc : iaddr_q;
        blk.iretire   = (state_q == S_IDLE) ? '0 : iretire_q;
        blk.ilastsize = lastsize_q;
        blk_trap      = trap_head;
        state_d       = S_IDLE;
        iretire_d     = '0;
      end else if (cur.committed) begin
        lastsize_d = ~cur.compressed;
        if (state_q == S_IDLE) begin
          iaddr_d   = cur.pc;
          iretire_d = size;
        end else begin
          iretire_d = iretire_q + size;
        end
        if (cur.itype == IT_STD) begin
          state_d = S_COUNT;
        end else begin
          blk_valid     = 1'b1;
          blk.itype     = cur.itype;
          blk.iaddr     = iaddr_d;
          blk.iretire   = iretire_d;
          blk.ilastsize = ~cur.compressed;
          state_d       = S_IDLE;
          iretire_d     = '0;
        end
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q    <= S_IDLE;
      iaddr_q    <= '0;
      iretire_q  <= '0;
      lastsize_q <= 1'b1;
    end else begin
      state_q    <= state_d;
      iaddr_q    <= iaddr_d;
      iretire_q  <= iretire_d;
      lastsize_q <= lastsize_d;
    end
  end

  // ---------------- 4. deserialization ----------------
  logic [SW-1:0] k_q;
  logic          group_done;

  assign group_done = blk_valid && !cnt_empty && (CW'(k_q) + CW'(1) == cnt_head);
  assign cnt_pop    = group_done;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      k_q     <= '0;
      valid_o <= '0;
      block_o <= '0;
      cause_o <= '0;
      tval_o  <= '0;
      priv_o  <= '0;
    end else if (!hold_i) begin
      valid_o <= '0;
      if (blk_valid) begin
        block_o[k_q] <= blk;
        priv_o       <= blk_priv;
        if (k_q == '0) begin
          cause_o <= blk_trap.cause;
          tval_o  <= blk_trap.tval;
        end
        if (group_done) begin
          k_q <= '0;
          for (int i = 0; i < NRET; i++) valid_o[i] <= (CW'(i) < cnt_head);
        end else begin
          k_q <= k_q + 1'b1;
        end
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                  !(event_in && (cnt_full || (|lane_full) || (ex_valid_i && trap_full))))
    else $error("cva6_te_connector: FIFO overflow, trace entries lost");
  a_trap_known: assert property (@(posedge clk_i) disable iff (!rst_ni) trap_pop |-> !trap_empty)
    else $error("cva6_te_connector: trap without cause/tval");
  a_cnt_known: assert property (@(posedge clk_i) disable iff (!rst_ni) blk_valid |-> !cnt_empty)
    else $error("cva6_te_connector: block without a block count");

endmodule
