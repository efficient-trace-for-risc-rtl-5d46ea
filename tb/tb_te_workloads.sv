// tb_te_workloads: the trace subsystem (default parameters) on two program shapes
// that stand for the kinds of test programs trace compression is judged on:
//   * kernel A, a compute kernel: nested counted loops (inner loop of 7 instructions
//     run 16 times, outer loop 40 times, mixed 2- and 4-byte instructions) - branch
//     outcomes only, so the trace is almost entirely full branch maps;
//   * kernel B, call-heavy code: a loop that calls a short function 300 times; every
//     return is an indirect jump, so each iteration costs an address packet, and the
//     packet count passes the periodic resynchronisation limit.
// The instruction stream is built first (addresses, operation classes, branch
// outcomes), then committed as a single-issue core with two commit ports would: one
// instruction per cycle, random stall cycles, two instructions in a cycle after a
// stall. The branch unit reports each branch outcome the cycle before the branch
// commits. Every packet is
// decoded: the branch-map bits of all packets, concatenated, must equal the outcome of
// every branch of the program in order, and every address rebuilt from a packet must
// be the first address of a block of the program. The compression rate
// 1 - 8*bytes / (32*instructions) is printed for each kernel and must be above 95 %
// for the loop kernel.
module tb_te_workloads;
  import te_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] cv = 0, comp = 0;
  logic [1:0][63:0] pc = '0;
  op_e [1:0] op = '{OP_OTHER, OP_OTHER};
  logic ex = 0, intr = 0, bv = 0, tk = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [7:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic pready, pslverr, req_on = 0, req_off = 0;
  logic pv, stall;
  logic [3:0] ptype;
  logic [319:0] pl;
  logic [5:0] plen;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  te_system dut (.clk_i(clk), .rst_ni(rst_n), .commit_valid_i(cv), .commit_pc_i(pc), .commit_op_i(op),
    .commit_is_compressed_i(comp), .ex_valid_i(ex), .ex_cause_i(64'h0), .ex_tval_i(64'h0),
    .interrupt_i(intr), .branch_valid_i(bv), .branch_is_taken_i(tk), .priv_lvl_i(2'd3),
    .time_i(64'h0), .context_i(32'h0), .psel_i(psel), .penable_i(penable), .pwrite_i(pwrite),
    .paddr_i(paddr), .pwdata_i(pwdata), .prdata_o(prdata), .pready_o(pready), .pslverr_o(pslverr),
    .trace_req_on_i(req_on), .trace_req_off_i(req_off), .encapsulator_ready_i(1'b1),
    .packet_valid_o(pv), .packet_type_o(ptype), .packet_payload_o(pl), .payload_length_o(plen),
    .stall_o(stall));

  // ---------------- program ----------------
  typedef struct { logic [63:0] pc; op_e op; bit c; bit taken; } ins_t;
  ins_t prog[$];
  bit   starts[logic [63:0]];
  bit   outcomes[$];          // expected branch-map bits (1 = not taken), program order

  function automatic void emit(logic [63:0] a, op_e o, bit c, bit t);
    ins_t i;
    i.pc = a; i.op = o; i.c = c; i.taken = t;
    if (prog.size() == 0 || prog[$].op inside {OP_BRANCH, OP_JALR, OP_ERET}) starts[a] = 1;
    prog.push_back(i);
    if (o == OP_BRANCH) outcomes.push_back(!t);
  endfunction

  // nested loops; returns the address after the kernel
  function automatic void kernel_a(logic [63:0] base);
    logic [63:0] a;
    for (int o = 0; o < 40; o++) begin
      for (int i = 0; i < 16; i++) begin
        a = base + 64'h40;
        for (int k = 0; k < 6; k++) begin emit(a, OP_OTHER, (k % 2) != 0, 0); a += ((k % 2) != 0) ? 2 : 4; end
        emit(a, OP_BRANCH, 0, i != 15);          // inner loop back edge
      end
      a += 4;
      for (int k = 0; k < 3; k++) begin emit(a, OP_OTHER, 0, 0); a += 4; end
      emit(a, OP_BRANCH, 1, o != 39);            // outer loop back edge
    end
  endfunction

  function automatic void kernel_b(logic [63:0] base, logic [63:0] func);
    logic [63:0] a;
    for (int n = 0; n < 300; n++) begin
      a = base;
      for (int k = 0; k < 3; k++) begin emit(a, OP_OTHER, 0, 0); a += 4; end
      emit(a, OP_JAL, 0, 0);                     // call: inferable target
      for (int k = 0; k < 5; k++) emit(func + 64'(4 * k), OP_OTHER, 0, 0);
      emit(func + 20, OP_JALR, 1, 0);            // return: uninferable
      emit(a + 4, OP_OTHER, 0, 0);
      emit(a + 8, OP_BRANCH, 0, 1);              // loop back edge, taken
    end
  endfunction

  // ---------------- packet decoder ----------------
  bit   got[$];
  int   n_pkts = 0, bytes = 0, n_addr = 0, n_sync = 0, n_full = 0, n_bad = 0;
  logic [63:0] last_addr = 0;

  function automatic int map_len(int b);
    if (b == 0) return 31; else if (b == 1) return 1; else if (b <= 3) return 3;
    else if (b <= 7) return 7; else if (b <= 15) return 15; else return 31;
  endfunction

  function automatic logic [63:0] field(logic [319:0] p, int start, int len, int trailing);
    int ab; logic [63:0] r;
    ab = (len - (start + trailing + 7) / 8) * 8;
    r = 64'(p >> start);
    if (ab < 64) r = (r[ab-1]) ? (r | ~((64'd1 << ab) - 1)) : (r & ((64'd1 << ab) - 1));
    return r;
  endfunction

  always @(posedge clk) if (rst_n && pv) begin
    logic [63:0] a; bit has_a;
    n_pkts++; bytes += int'(plen); has_a = 0;
    case (ptype)
      4'b1100: begin n_sync++; a = field(pl, 7, int'(plen), 0); has_a = 1; end
      4'b1000: begin a = last_addr + field(pl, 2, int'(plen), 3); has_a = 1; end
      4'b0100: begin
        if (pl[6:2] == 0) begin n_full++; for (int i = 0; i < 31; i++) got.push_back(pl[7 + i]); end
        else begin
          for (int i = 0; i < int'(pl[6:2]); i++) got.push_back(pl[7 + i]);
          a = last_addr + field(pl, 7 + map_len(int'(pl[6:2])), int'(plen), 3); has_a = 1;
        end
      end
      4'b1111: ;
      default: begin failures++; $display("FAIL unexpected packet type %h", ptype); end
    endcase
    if (has_a) begin
      n_addr++; last_addr = a; checks++;
      if (!starts.exists(a)) begin
        failures++; n_bad++;
        if (n_bad < 5) $display("FAIL packet %0d reports %h, not a block start", n_pkts, a);
      end
    end
  end

  // ---------------- driver ----------------
  task automatic apb_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  // commits prog[] like a single-issue core with two commit ports: one instruction per
  // cycle, a stall cycle now and then, and two instructions in the cycle after a stall
  // (never two branches in one cycle)
  task automatic run_program();
    int i = 0, k;
    bit idle = 0;
    while (i < prog.size()) begin
      @(negedge clk);
      cv = 0; bv = 0;
      if (($urandom % 5) == 0) begin idle = 1; continue; end
      k = (idle && i + 1 < prog.size() && !(prog[i].op == OP_BRANCH && prog[i+1].op == OP_BRANCH)) ? 2 : 1;
      idle = 0;
      for (int j = 0; j < k; j++) begin
        cv[j] = 1; pc[j] = prog[i+j].pc; op[j] = prog[i+j].op; comp[j] = prog[i+j].c;
      end
      i += k;
      // branch unit: outcome of the next branch to commit, one cycle ahead
      for (int j = i; j < i + 2 && j < prog.size(); j++)
        if (prog[j].op == OP_BRANCH) begin bv = 1; tk = prog[j].taken; break; end
      // the outcome register must not change under a branch committing now
      for (int j = 0; j < k; j++) if (op[j] == OP_BRANCH) bv = 0;
      if (bv) begin
        @(negedge clk); cv = 0; bv = 0; idle = 1;   // one idle cycle lets the outcome settle
      end
    end
    @(negedge clk); cv = 0; bv = 0;
  endtask

  task automatic run_kernel(string name, int which, output real rate);
    int p0, b0, ni;
    prog.delete(); outcomes.delete(); got.delete(); starts.delete();
    if (which == 0) kernel_a(64'h8000_0000); else kernel_b(64'h8000_1000, 64'h8000_2000);
    // leave through an indirect jump to an exit routine, so the last packet is sent
    emit(prog[$].pc + 4, OP_JALR, 0, 0);
    for (int k = 0; k < 4; k++) emit(64'h8000_f000 + 64'(4 * k), OP_OTHER, 0, 0);
    emit(64'h8000_f010, OP_JALR, 0, 0);
    // a packet is decided once the block after it has arrived: two more short blocks
    for (int k = 0; k < 4; k++) emit(64'h8000_e000 + 64'(4 * k), OP_OTHER, 0, 0);
    emit(64'h8000_e010, OP_JALR, 0, 0);
    for (int k = 0; k < 4; k++) emit(64'h8000_d000 + 64'(4 * k), OP_OTHER, 0, 0);
    emit(64'h8000_d010, OP_JALR, 0, 0);
    ni = prog.size();
    p0 = n_pkts; b0 = bytes;
    run_program();
    repeat (60) @(negedge clk);
    rate = (1.0 - real'(bytes - b0) * 8.0 / (real'(ni) * 32.0)) * 100.0;
    $display("%s: instructions=%0d branches=%0d packets=%0d bytes=%0d compression=%0.2f%%",
             name, ni, outcomes.size(), n_pkts - p0, bytes - b0, rate);
    checks++;
    if (got.size() != outcomes.size()) begin
      failures++; $display("FAIL %s: %0d branch bits decoded, %0d branches executed", name, got.size(), outcomes.size());
    end
    for (int i = 0; i < got.size() && i < outcomes.size(); i++) begin
      checks++;
      if (got[i] != outcomes[i]) begin
        failures++;
        if (failures < 5) $display("FAIL %s: branch %0d decoded %0d expected %0d", name, i, got[i], outcomes[i]);
      end
    end
  endtask

  initial begin
    #5ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real ra, rb;
    int s0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    apb_write(8'h00, 32'h0000_0007);            // activated, no context/time, delta addresses
    @(negedge clk) req_on = 1; @(negedge clk) req_on = 0;
    repeat (3) @(negedge clk);
    run_kernel("loop kernel", 0, ra);
    checks++; if (ra <= 95.0) begin failures++; $display("FAIL loop kernel compression below 95%%"); end
    checks++; if (n_full < 20) begin failures++; $display("FAIL loop kernel: too few full-map packets"); end
    s0 = n_sync;
    run_kernel("call kernel", 1, rb);
    checks++; if (n_addr < 300) begin failures++; $display("FAIL call kernel: fewer address packets than returns"); end
    checks++; if (n_sync == s0) begin failures++; $display("FAIL call kernel: no periodic resynchronisation"); end
    $display("full maps=%0d address packets=%0d syncs=%0d", n_full, n_addr, n_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
