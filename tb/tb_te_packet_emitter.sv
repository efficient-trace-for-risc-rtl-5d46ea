// tb_te_packet_emitter: self-checking test of te_packet_emitter.
// Directed packets of every implemented kind (synchronisation, trap with time and
// context, support, address-only, branch map with and without address, full-address
// mode). The expected payload of each is written out field by field as a
// concatenation in the testbench, together with the expected length in bytes, packet
// type, address handed to compression and branch-map flush.
module tb_te_packet_emitter;
  import te_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid, thaddr, lctc, noaddr, updf, lc_int, tc_int, tc_br, tc_tk, noctx, notime, shallow, ien, emode;
  format_e fmt; subformat_e sf; qual_status_e qs;
  logic [63:0] lc_cause, lc_tval, tc_cause, tc_tval, tstamp, addr;
  logic [31:0] ctx;
  logic [1:0] priv;
  logic [2:0] cfg, iopt;
  logic [4:0] br;
  logic [30:0] map;
  logic [6:0] keep;
  logic pv, flush;
  logic [3:0] ptype;
  logic [319:0] pl;
  logic [5:0] plen;
  logic [63:0] a2c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  te_packet_emitter dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .packet_format_i(fmt),
    .packet_f_sync_subformat_i(sf), .thaddr_i(thaddr), .lc_tc_mux_i(lctc), .qual_status_i(qs),
    .noaddr_i(noaddr), .updiscon_flag_i(updf), .lc_cause_i(lc_cause), .lc_tval_i(lc_tval),
    .lc_interrupt_i(lc_int), .tc_cause_i(tc_cause), .tc_tval_i(tc_tval), .tc_interrupt_i(tc_int),
    .tc_branch_i(tc_br), .tc_branch_taken_i(tc_tk), .tc_priv_i(priv), .tc_time_i(tstamp),
    .tc_context_i(ctx), .tc_address_i(addr), .nocontext_i(noctx), .notime_i(notime),
    .shallow_trace_i(shallow), .tc_ienable_i(ien), .encoder_mode_i(emode), .configuration_i(cfg),
    .ioptions_i(iopt), .branches_i(br), .branch_map_i(map), .keep_bits_i(keep),
    .packet_valid_o(pv), .packet_type_o(ptype), .packet_payload_o(pl), .payload_length_o(plen),
    .branch_map_flush_o(flush), .address_to_compress_o(a2c));

  task automatic base();
    valid = 1; fmt = F_SYNC; sf = SF_START; qs = QS_NO_CHANGE; thaddr = 0; lctc = 0; noaddr = 0; updf = 0;
    lc_int = 0; tc_int = 0; tc_br = 0; tc_tk = 0; noctx = 1; notime = 1; shallow = 0; ien = 1; emode = 0;
    lc_cause = 64'd13; lc_tval = 64'hdead_beef; tc_cause = 64'd5; tc_tval = 64'h1234; tstamp = 64'h0102_0304_0506_0708;
    ctx = 32'hcafe_f00d; priv = 2'd3; cfg = CFG_DELTA_ADDRESS; iopt = 3'b101; br = 0; map = 0; keep = 7'd64;
    addr = 64'h8000_0000;
  endtask

  task automatic send(string name, logic [63:0] exp_a2c, bit exp_flush, logic [319:0] exp_pl, int exp_bits, logic [3:0] exp_type);
    @(negedge clk); #1;
    checks++;
    if (a2c !== exp_a2c || flush !== exp_flush) begin
      failures++; $display("FAIL %s: a2c=%h exp %h flush=%b", name, a2c, exp_a2c, flush);
    end
    @(posedge clk); #1;
    checks++;
    if (!pv || pl !== exp_pl || int'(plen) != (exp_bits + 7) / 8 || ptype !== exp_type) begin
      failures++; $display("FAIL %s: len=%0d exp %0d type=%h exp %h\n  got %h\n  exp %h", name, plen,
                           (exp_bits + 7) / 8, ptype, exp_type, pl, exp_pl);
    end
    valid = 0;
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    base(); valid = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 1. synchronisation, address 0x8000_0000 needs 33 bits -> 40 kept
    base(); keep = 33; tc_br = 1; tc_tk = 1;
    send("sync", 64'h8000_0000, 0, 320'({40'h00_8000_0000, 2'd3, 1'b0, 2'b00, 2'b11}), 47, 4'b1100);
    // 2. address only, delta +0x10 (6 bits -> 8 kept)
    base(); fmt = F_ADDR_ONLY; addr = 64'h8000_0010; keep = 6;
    send("addr-only", 64'h10, 0, 320'({3'b000, 8'h10, 2'b10}), 13, 4'b1000);
    // 3. branch map + address, delta -0x20, 5 branches -> 7-bit map
    base(); fmt = F_DIFF_DELTA; addr = 64'h7FFF_FFF0; keep = 6; br = 5; map = 31'h7FFF_FF2D; updf = 1;
    send("diff-delta", 64'hFFFF_FFFF_FFFF_FFE0, 1, 320'({1'b0, 1'b0, 1'b1, 8'hE0, 7'h2D, 5'd5, 2'b01}), 25, 4'b0100);
    // 4. full branch map, no address
    base(); fmt = F_DIFF_DELTA; noaddr = 1; br = 31; map = 31'h5555_1234; addr = 64'h9000_0000;
    send("branch map", 64'h9000_0000 - 64'h7FFF_FFF0, 1, 320'({31'h5555_1234, 5'd0, 2'b01}), 38, 4'b0100);
    // 5. trap with time and context, cause/tval of the previous block
    base(); sf = SF_TRAP; notime = 0; noctx = 0; lctc = 1; thaddr = 1; addr = 64'h8000_0100; keep = 33;
    send("trap", 64'h8000_0100, 0, 320'({64'hdead_beef, 40'h00_8000_0100, 1'b1, 1'b0, 64'd13, 32'hcafe_f00d,
         64'h0102_0304_0506_0708, 2'd3, 1'b1, 2'b01, 2'b11}), 273, 4'b1101);
    // 6. interrupt trap: tval omitted
    base(); sf = SF_TRAP; tc_int = 1; addr = 64'h100; keep = 10;
    send("interrupt", 64'h100, 0, 320'({16'h0100, 1'b0, 1'b1, 64'd5, 2'd3, 1'b1, 2'b01, 2'b11}), 89, 4'b1101);
    // 7. support packet, shallow trace flushes the branch map
    base(); sf = SF_SUPPORT; qs = QS_TRACE_LOST; emode = 1; shallow = 1;
    send("support", 64'h8000_0000, 1, 320'({2'b00, 3'b101, 2'b10, 1'b1, 1'b1, 2'b11, 2'b11}), 13, 4'b1111);
    // 8. full-address mode address-only packet
    base(); fmt = F_ADDR_ONLY; cfg = CFG_FULL_ADDRESS; addr = 64'h8000_0010; keep = 33;
    send("full addr", 64'h8000_0010, 0, 320'({3'b000, 40'h00_8000_0010, 2'b10}), 45, 4'b1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
