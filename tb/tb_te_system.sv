// tb_te_system: end-to-end test of the trace subsystem at its default parameters
// (two commit ports, 16-entry FIFOs, resynchronisation every 255 packets).
// A random program is committed through the CVA6-side ports: straight-line code,
// conditional branches with their outcome from the branch unit, indirect jumps and
// exception returns (at most one of these per cycle), compressed instructions,
// exceptions and interrupts with privilege changes, excursions into an address range the instruction-address filter
// excludes, a long branch-only stretch that fills the branch map, a busy encapsulator
// that drops packets, a context-reporting phase in which the context input changes
// every 200 cycles (a reported context must be one that was driven, and a context
// packet must report a change), a full-address phase (address packets then carry
// whole addresses, and a support packet announces the mode), a lossless phase in which the encapsulator turns busy while a
// packet is waiting (the core obeys stall_o and the packet must be held, not lost),
// and finally trace off. Every packet the encapsulator accepts is decoded: addresses are
// rebuilt (full in synchronisation/trap packets, accumulated differences otherwise,
// sign-extended from their compressed fields) and must each be the first address of a
// block the program really executed (after a trace-lost report, from the next full
// address on). Each mechanism of the design is counted and must
// occur at least once. The compression rate (1 - packet bits / (32 x instructions))
// is printed.
module tb_te_system;
  import te_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] cv = 0, comp = 0;
  logic [1:0][63:0] pc = '0;
  op_e [1:0] op = '{OP_OTHER, OP_OTHER};
  logic ex = 0, intr = 0, bv = 0, tk = 0;
  logic [63:0] cause = 0, tval = 0;
  logic [1:0] priv = 3;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [7:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic pready, pslverr, req_on = 0, req_off = 0, enc_ready = 1;
  logic pv, stall;
  logic [3:0] ptype;
  logic [319:0] pl;
  logic [5:0] plen;
  int checks = 0, failures = 0;
  bit starts [logic [63:0]];    // first addresses of executed blocks
  logic [31:0] ctx_val = 0;      // context driven into the encoder
  bit ctx_seen [logic [31:0]] = '{32'h0: 1};

  always #5 clk = ~clk;

  te_system dut (.clk_i(clk), .rst_ni(rst_n), .commit_valid_i(cv), .commit_pc_i(pc), .commit_op_i(op),
    .commit_is_compressed_i(comp), .ex_valid_i(ex), .ex_cause_i(cause), .ex_tval_i(tval),
    .interrupt_i(intr), .branch_valid_i(bv), .branch_is_taken_i(tk), .priv_lvl_i(priv),
    .time_i(64'h0), .context_i(ctx_val), .psel_i(psel), .penable_i(penable), .pwrite_i(pwrite),
    .paddr_i(paddr), .pwdata_i(pwdata), .prdata_o(prdata), .pready_o(pready), .pslverr_o(pslverr),
    .trace_req_on_i(req_on), .trace_req_off_i(req_off), .encapsulator_ready_i(enc_ready),
    .packet_valid_o(pv), .packet_type_o(ptype), .packet_payload_o(pl), .payload_length_o(plen),
    .stall_o(stall));

  // ---------------- packet decoder ----------------
  int n_support_on = 0, n_support_off = 0, n_ended = 0, n_lost_rep = 0, n_sync = 0, n_trap = 0;
  int n_f2 = 0, n_f1 = 0, n_full = 0, n_pkts = 0, total_bytes = 0, n_badaddr = 0;
  logic [63:0] last_addr = 0;
  bit in_bonly = 0;
  int n_full_bonly = 0;
  int n_resync = 0;
  // periodic resynchronisation requests seen inside the encoder
  always @(posedge clk) if (rst_n && dut.u_encoder.gt_resync && dut.u_encoder.pending_q) n_resync++;

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

  // a packet is received when the encapsulator is ready; after a trace_lost report the
  // address differences cannot be followed until the next full address
  bit unsynced = 0, lossless = 0, ctx_on = 0, full_mode = 0;
  int n_fulladdr = 0, n_modechg = 0;
  logic [31:0] last_ctx = '0;
  int n_ctx = 0;
  // a reported context must be one the core drove; a context packet must report a change
  task automatic check_ctx(logic [31:0] c, bit must_change);
    checks++;
    if (!ctx_seen.exists(c) || (must_change && c == last_ctx)) begin
      failures++; $display("FAIL context %h reported (last %h)", c, last_ctx);
    end
    last_ctx = c;
  endtask
  int lost_before = 0;
  bit want_stall = 0;
  // in the lossless phase the encapsulator turns busy while a packet is on the outputs
  always @(posedge clk) begin
    #1;
    if (want_stall && pv) begin enc_ready = 0; want_stall = 0; end
  end
  int n_stall = 0, n_held = 0;
  always @(posedge clk) if (rst_n && stall) n_stall++;
  always @(posedge clk) if (rst_n && pv && !enc_ready && lossless) n_held++;
  always @(posedge clk) if (rst_n && pv && enc_ready) begin
    logic [63:0] a; bit has_a;
    n_pkts++; total_bytes += int'(plen); has_a = 0;
    case (ptype)
      4'b1111: begin
        if (pl[4]) n_support_on++; else n_support_off++;
        if (pl[8]) n_modechg++;           // ioptions: full-address mode now on
        if (pl[7:6] == QS_ENDED_REP) n_ended++;
        if (pl[7:6] == QS_TRACE_LOST) begin n_lost_rep++; unsynced = 1; end
      end
      4'b1100: begin
        n_sync++; has_a = 1; unsynced = 0;
        if (ctx_on) begin check_ctx(pl[38:7], 0); a = field(pl, 39, int'(plen), 0); end
        else a = field(pl, 7, int'(plen), 0);
      end
      4'b1101: begin
        n_trap++; has_a = 1; unsynced = 0;
        if (ctx_on) begin check_ctx(pl[38:7], 0); a = field(pl, 105, int'(plen), pl[103] ? 0 : 64); end
        else a = field(pl, 73, int'(plen), pl[71] ? 0 : 64);
      end
      4'b1110: begin n_ctx++; check_ctx(pl[37:6], 1); end
      4'b1000: begin
        n_f2++; has_a = 1; a = field(pl, 2, int'(plen), 3);
        if (full_mode) n_fulladdr++; else a += last_addr;
      end
      4'b0100: begin
        if (pl[6:2] == 0) begin
          n_full++;
          // from the second full map of the branch-only stretch on, only not-taken
          // branches are in the map (the first may still hold earlier branches): all 1
          if (in_bonly && n_full_bonly++ > 0) begin
            checks++;
            if (pl[37:7] != '1) begin failures++; $display("FAIL full map %b, expected all not taken", pl[37:7]); end
          end
        end
        else begin
          n_f1++; has_a = 1; a = field(pl, 7 + map_len(int'(pl[6:2])), int'(plen), 3);
          if (full_mode) n_fulladdr++; else a += last_addr;
        end
      end
      default: begin failures++; $display("FAIL unknown packet type %h", ptype); end
    endcase
    if (has_a && !unsynced) begin
      last_addr = a;
      checks++;
      if (!starts.exists(a)) begin
        failures++; n_badaddr++;
        if (n_badaddr < 10) $display("FAIL packet %0d type %h reports %h, not a block start (lossless %0b, context %0b)", n_pkts, ptype, a, lossless, ctx_on);
      end
    end
  end

  // ---------------- stimulus ----------------
  task automatic apb_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  logic [63:0] next_pc = 64'h8000_0000;
  bit started = 0;
  int n_instr = 0, n_double = 0, n_excursion = 0, n_privchg = 0, n_exc = 0;
  logic taken_m = 0;

  // one commit cycle; mode 0 random, 1 branches only, 2 random without traps
  task automatic cycle(int mode, int rate);
    int k, ends;
    bit uj;
    @(negedge clk);
    cv = 0; ex = 0; intr = 0; bv = 0;
    if (!stall && int'($urandom % 100) < rate) begin    // the core obeys stall_o
      if (mode == 0 && ($urandom % 40) == 0) begin
        ex = 1; intr = $urandom % 2; cause = intr ? 64'd7 : 64'd2; tval = {$urandom, $urandom};
        pc[0] = next_pc; op[0] = OP_OTHER;
        if (!started) starts[next_pc] = 1;
        started = 0; n_exc++;
        if (($urandom % 2) == 0) begin priv = (priv == 3) ? 2'd0 : 2'd3; n_privchg++; end
        next_pc = 64'h8000_8000 + 64'(($urandom % 64) * 4);
      end else begin
        k = 1 + ($urandom % 2); ends = 0; uj = 0;
        for (int i = 0; i < k; i++) begin
          cv[i] = 1; comp[i] = $urandom % 2; pc[i] = next_pc; n_instr++;
          if (mode == 1) op[i] = OP_BRANCH;
          else case ($urandom % 10)
            0, 1, 2: op[i] = OP_BRANCH;
            3: op[i] = OP_JALR;
            4: op[i] = (($urandom % 5) == 0) ? OP_ERET : OP_JAL;
            default: op[i] = OP_OTHER;
          endcase
          // at most one uninferable discontinuity per cycle (the encoder's premise)
          if (op[i] inside {OP_JALR, OP_ERET}) begin
            if (uj) op[i] = OP_OTHER;
            uj = 1;
          end
          if (!started) begin starts[next_pc] = 1; started = 1; end
          next_pc += comp[i] ? 2 : 4;
          if (op[i] inside {OP_BRANCH, OP_JALR, OP_ERET}) begin
            started = 0; ends++;
            if (op[i] != OP_BRANCH || (taken_m && mode != 1)) begin
              if (mode == 0 && ($urandom % 25) == 0) begin next_pc = 64'h9000_0000; n_excursion++; end
              else next_pc = 64'h8000_0000 + 64'(($urandom % 8192) * 2);
            end
          end
        end
        if (ends == 2) n_double++;
      end
    end
    if (mode == 1) begin bv = 1; tk = 1'b0; end
    else if (($urandom % 2) == 0) begin bv = 1; tk = 1'($urandom % 2); end
    @(posedge clk); if (bv) taken_m = tk;
    #1 cv = 0; ex = 0; bv = 0;          // one edge per commit, even if the caller waits
  endtask

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real rate;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // instruction-address filter: trace 0x8000_0000 .. 0x8FFF_FFFF only
    apb_write(8'd4, 32'h0000_0100);                     // iaddr comparator: filter on, range mode
    apb_write(8'(4 * 26), 32'h8FFF_FFFF); apb_write(8'(4 * 27), 32'h0);   // upper
    apb_write(8'(4 * 28), 32'h8000_0000); apb_write(8'(4 * 29), 32'h0);   // lower
    apb_write(8'h00, 32'h0000_0007);                    // activate, no context, no time, delta
    @(negedge clk) req_on = 1; @(negedge clk) req_on = 0;
    repeat (3) @(negedge clk);
    for (int t = 0; t < 6000; t++) cycle(0, 35);
    while (next_pc >= 64'h9000_0000) cycle(0, 35);   // leave the filtered-out range first
    cycle(1, 0);                                        // branch unit: last outcome not taken
    in_bonly = 1;
    for (int t = 0; t < 200; t++) cycle(1, 35);         // branches only: the map fills
    repeat (20) cycle(1, 0);
    in_bonly = 0;
    for (int t = 0; t < 9000; t++) cycle(2, 35);        // long trap-free run: periodic resync
    repeat (30) cycle(2, 0);
    apb_write(8'h00, 32'h0000_0005);                    // context reporting on, core idle
    ctx_on = 1;
    for (int t = 0; t < 2000; t++) begin
      if (t % 200 == 100) begin ctx_val++; ctx_seen[ctx_val] = 1; end
      cycle(0, 35);
    end
    repeat (30) cycle(2, 0);
    apb_write(8'h00, 32'h0000_0007);                    // context reporting off again
    ctx_on = 0;
    repeat (30) cycle(2, 0);
    apb_write(8'h00, 32'h0000_0017);                    // full-address mode
    full_mode = 1;
    for (int t = 0; t < 1500; t++) cycle(0, 35);
    repeat (30) cycle(2, 0);
    apb_write(8'h00, 32'h0000_0007);                    // back to address differences
    full_mode = 0;
    while (next_pc >= 64'h9000_0000) cycle(0, 35);   // packets must be produced
    @(posedge clk) #1 enc_ready = 0;
    for (int t = 0; t < 100; t++) cycle(2, 50);         // busy encapsulator: packets lost
    @(posedge clk) #1 enc_ready = 1;
    for (int t = 0; t < 200; t++) cycle(0, 35);
    lossless = 1;
    apb_write(8'h00, 32'h0000_0087);                    // lossless: stall instead of losing
    lost_before = n_lost_rep;
    for (int t = 0; t < 1000; t++) begin
      if (t % 50 == 10) want_stall = 1;
      if (t % 50 == 35) begin want_stall = 0; @(posedge clk) #1 enc_ready = 1; end
      cycle(0, 35);
    end
    @(posedge clk) #1 enc_ready = 1;
    for (int t = 0; t < 300; t++) cycle(0, 35);
    @(negedge clk) cv = 0; ex = 0;
    repeat (100) @(negedge clk);
    @(negedge clk) req_off = 1; @(negedge clk) req_off = 0;
    repeat (20) @(negedge clk);
    rate = (1.0 - (real'(total_bytes) * 8.0) / (real'(n_instr) * 32.0)) * 100.0;
    $display("instructions=%0d packets=%0d bytes=%0d compression=%0.2f%%", n_instr, n_pkts, total_bytes, rate);
    $display("support on=%0d off=%0d ended=%0d lost=%0d sync=%0d trap=%0d f2=%0d f1=%0d fullmap=%0d",
             n_support_on, n_support_off, n_ended, n_lost_rep, n_sync, n_trap, n_f2, n_f1, n_full);
    $display("context packets=%0d full-address packets=%0d mode-change reports=%0d", n_ctx, n_fulladdr, n_modechg);
    $display("periodic resync cycles=%0d stall cycles=%0d held-packet cycles=%0d", n_resync, n_stall, n_held);
    $display("two-block commit cycles=%0d filter excursions=%0d privilege changes=%0d traps=%0d",
             n_double, n_excursion, n_privchg, n_exc);
    checks++; if (n_support_on == 0) begin failures++; $display("FAIL never: support packet on enable"); end
    checks++; if (n_support_off == 0) begin failures++; $display("FAIL never: support packet on disable"); end
    checks++; if (n_ended == 0) begin failures++; $display("FAIL never: end of qualification"); end
    checks++; if (n_lost_rep == 0) begin failures++; $display("FAIL never: trace lost"); end
    checks++; if (n_sync < 3) begin failures++; $display("FAIL too few synchronisations"); end
    checks++; if (n_trap == 0) begin failures++; $display("FAIL never: trap packet"); end
    checks++; if (n_f2 == 0) begin failures++; $display("FAIL never: address-only packet"); end
    checks++; if (n_f1 == 0) begin failures++; $display("FAIL never: branch map + address packet"); end
    checks++; if (n_full_bonly < 2) begin failures++; $display("FAIL never: full branch map packet"); end
    checks++; if (n_double == 0) begin failures++; $display("FAIL never: two blocks in one cycle"); end
    checks++; if (n_stall == 0 || n_held == 0) begin failures++; $display("FAIL never: lossless stall holding a packet"); end
    checks++; if (n_lost_rep != lost_before) begin failures++; $display("FAIL packets lost in lossless mode"); end
    checks++; if (n_fulladdr == 0 || n_modechg == 0) begin failures++; $display("FAIL never: full-address mode"); end
    checks++; if (n_ctx == 0) begin failures++; $display("FAIL never: context packet"); end
    checks++; if (n_resync == 0) begin failures++; $display("FAIL never: periodic resynchronisation"); end
    checks++; if (rate <= 0.0) begin failures++; $display("FAIL no compression"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
