// tb_cva6_te_connector: self-checking test of cva6_te_connector with two commit ports.
// A random program is committed zero, one or two instructions per cycle, with
// branches (outcome presented by the branch unit the cycle before), indirect jumps,
// exception returns, compressed instructions, exceptions and interrupts. The testbench
// cuts the same instruction stream into blocks on its own (iaddr, iretire in
// halfwords, ilastsize, itype, cause/tval for traps) and records how many blocks end in
// each commit cycle. Every group the connector outputs must match the next expected
// group block by block, with valid_o set on exactly that many ports. Random hold
// cycles (encoder stalled) must freeze the outputs without losing or repeating a
// group. A final phase commits exactly one instruction per cycle, on either port, and
// no FIFO may fill up: the connector must sustain one instruction per cycle.
module tb_cva6_te_connector;
  import te_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] v, comp;
  logic [1:0][63:0] pc;
  op_e [1:0] op;
  logic ex, intr, bv, tk;
  logic [63:0] cause, tval;
  logic [1:0] priv;
  logic [1:0] vo;
  logic hold = 0;   // encoder stalled: outputs must hold, nothing is consumed
  block_t [1:0] bo;
  logic [63:0] cause_o, tval_o;
  logic [1:0] priv_o;
  int checks = 0, failures = 0, nblocks = 0, ntrap = 0, ndouble = 0;

  typedef struct { block_t b; logic [63:0] cause, tval; logic [1:0] priv; } exp_t;
  exp_t eq[$];
  int   gq[$];

  always #5 clk = ~clk;

  cva6_te_connector #(.NRET(2), .DEPTH(16)) dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(v), .pc_i(pc),
    .op_i(op), .is_compressed_i(comp), .ex_valid_i(ex), .cause_i(cause), .tval_i(tval), .interrupt_i(intr),
    .branch_valid_i(bv), .is_taken_i(tk), .priv_lvl_i(priv), .hold_i(hold), .valid_o(vo), .block_o(bo),
    .cause_o(cause_o), .tval_o(tval_o), .priv_o(priv_o));

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // checker
  always @(posedge clk) if (rst_n && vo != 0 && !hold) begin
    int n; exp_t e;
    n = (vo == 2'b11) ? 2 : 1;
    checks++;
    if (gq.size() == 0 || vo[0] !== 1'b1 || gq[0] != n) begin
      failures++; $display("FAIL group: valid=%b expected %0d", vo, gq.size() ? gq[0] : -1);
    end
    if (gq.size()) void'(gq.pop_front());
    for (int i = 0; i < n; i++) begin
      checks++;
      if (eq.size() == 0) begin failures++; $display("FAIL unexpected block"); end
      else begin
        e = eq.pop_front();
        if (bo[i] !== e.b || (is_trap(e.b.itype) && (cause_o !== e.cause || tval_o !== e.tval))) begin
          failures++;
          $display("FAIL block: it=%0d a=%h r=%0d ls=%0d  exp it=%0d a=%h r=%0d ls=%0d", bo[i].itype, bo[i].iaddr,
                   bo[i].iretire, bo[i].ilastsize, e.b.itype, e.b.iaddr, e.b.iretire, e.b.ilastsize);
        end
        if (i == n - 1) begin checks++; if (priv_o !== e.priv) begin failures++; $display("FAIL priv"); end end
      end
      nblocks++;
    end
    if (n == 2) ndouble++;
  end

  // the one-commit-per-cycle phase must never fill a FIFO
  int nfull = 0;
  always @(posedge clk) if (rst_n && (dut.cnt_full || (|dut.lane_full) || dut.trap_full)) nfull++;

  initial begin
    logic [63:0] next_pc, start;
    logic        started, lastsize_m, taken_m;
    int          acc, k, ends, lo, rate;
    v = 0; comp = 0; pc = 0; op = '{OP_OTHER, OP_OTHER}; ex = 0; intr = 0; bv = 0; tk = 0;
    cause = 0; tval = 0; priv = 3;
    next_pc = 64'h8000_0000; started = 0; acc = 0; lastsize_m = 1; taken_m = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 3000 cycles with random bursts of 0-2 commits, then 1500 cycles with exactly one
    // commit (on either port) per cycle: the connector must keep up without overflowing
    for (int t = 0; t < 4500; t++) begin
      rate = (t < 3000) ? 35 : 100;
      @(negedge clk);
      v = 0; ex = 0; intr = 0; bv = 0;
      if (($urandom % 100) < 5) priv = 2'($urandom % 4);
      ends = 0;
      if (($urandom % 100) < rate) begin
        if (($urandom % 10) == 0) begin
          // trap cycle, nothing commits
          exp_t e;
          ex = 1; intr = $urandom % 2; cause = {$urandom, $urandom}; tval = {$urandom, $urandom};
          pc[0] = next_pc; op[0] = OP_OTHER;
          e.b.itype = intr ? IT_INT : IT_EXC;
          e.b.iaddr = started ? start : next_pc;
          e.b.iretire = IRETIRE_LEN'(acc);
          e.b.ilastsize = lastsize_m;
          e.cause = cause; e.tval = tval; e.priv = priv;
          eq.push_back(e); ends = 1; ntrap++;
          started = 0; acc = 0;
          next_pc = 64'h8000_8000 + 64'(($urandom % 256) * 4);
        end else begin
          k = 1 + ($urandom % 2); lo = 0;
          if (rate == 100) begin lo = $urandom % 2; k = lo + 1; end   // port 0 or port 1 alone
          for (int i = lo; i < k; i++) begin
            v[i] = 1; comp[i] = $urandom % 2; pc[i] = next_pc;
            case ($urandom % 8)
              0, 1: op[i] = OP_BRANCH;
              2: op[i] = OP_JALR;
              3: op[i] = (($urandom % 4) == 0) ? OP_ERET : OP_JAL;
              default: op[i] = OP_OTHER;
            endcase
            if (!started) begin start = next_pc; started = 1; end
            acc += comp[i] ? 1 : 2;
            lastsize_m = !comp[i];
            next_pc += comp[i] ? 2 : 4;
            if (op[i] inside {OP_BRANCH, OP_JALR, OP_ERET}) begin
              exp_t e;
              case (op[i])
                OP_BRANCH: e.b.itype = taken_m ? IT_BR_TAKEN : IT_BR_NTAKEN;
                OP_JALR:   e.b.itype = IT_UNINF_JUMP;
                default:   e.b.itype = IT_ERET;
              endcase
              e.b.iaddr = start; e.b.iretire = IRETIRE_LEN'(acc); e.b.ilastsize = !comp[i];
              e.cause = 0; e.tval = 0; e.priv = priv;
              eq.push_back(e); ends++;
              started = 0; acc = 0;
              if (op[i] != OP_BRANCH || taken_m) next_pc = 64'h8000_0000 + 64'(($urandom % 4096) * 2);
            end
          end
        end
        if (ends != 0) gq.push_back(ends);
      end
      // branch unit result for the next cycle's branches
      if (($urandom % 2) == 0) begin bv = 1; tk = $urandom % 2; end
      @(posedge clk); if (bv) taken_m = tk;
      #1 hold = (t < 3000) && (($urandom % 6) == 0);   // random stall cycles in the first phase
    end
    @(negedge clk); v = 0; ex = 0; bv = 0;
    repeat (200) @(posedge clk);
    checks++; if (nfull != 0) begin failures++; $display("FAIL a FIFO was full in %0d cycles", nfull); end
    checks++; if (eq.size() != 0) begin failures++; $display("FAIL %0d blocks never came out", eq.size()); end
    checks++; if (ntrap == 0 || ndouble == 0) begin failures++; $display("FAIL no traps or no double groups"); end
    $display("blocks=%0d traps=%0d two-block groups=%0d", nblocks, ntrap, ndouble);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
