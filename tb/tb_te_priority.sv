// tb_te_priority: self-checking test of te_priority.
// One directed case per branch of the packet flow chart (support packet first, trap
// packets with thaddr 0/1, the "reported" flip-flop, synchronisation on first
// qualified / privilege change / resync overflow, updiscon, resync with branches,
// exception with retirement, next-block conditions, full branch map, and no packet),
// each compared with the packet the chart prescribes. Context packets are checked to
// wait behind address and branch-map packets and to be covered by a synchronisation
// packet. Address compression is checked on random addresses against a bit-by-bit
// count of the sign run.
module tb_te_priority;
  import te_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid, lc_exc, lc_upd, tc_q, tc_exc, tc_ret, tc_first, tc_priv, nc_q, nc_ret;
  logic bm_empty, bm_full, en_ev, dis_ev, op_ev, lc_final, lost, nc_exc, nc_priv, nc_bm_empty, gt, et;
  logic [63:0] addr;
  logic noctx;
  logic [CONTEXT_LEN-1:0] ctx;
  logic v_o, thaddr, lctc, noaddr, updf, rrst;
  format_e fmt; subformat_e sf; qual_status_e qs;
  logic [6:0] keep;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  te_priority dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(valid), .lc_exception_i(lc_exc),
    .lc_updiscon_i(lc_upd), .tc_qualified_i(tc_q), .tc_exception_i(tc_exc), .tc_retired_i(tc_ret),
    .tc_first_qualified_i(tc_first), .tc_privchange_i(tc_priv), .nc_qualified_i(nc_q),
    .nc_retired_i(nc_ret), .tc_branch_map_empty_i(bm_empty), .tc_branch_map_full_i(bm_full),
    .tc_enc_enabled_i(en_ev), .tc_enc_disabled_i(dis_ev), .tc_opmode_change_i(op_ev),
    .lc_final_qualified_i(lc_final), .tc_packets_lost_i(lost), .nc_exception_i(nc_exc),
    .nc_privchange_i(nc_priv), .nc_branch_map_empty_i(nc_bm_empty), .tc_gt_max_resync_i(gt),
    .tc_et_max_resync_i(et), .nocontext_i(noctx), .tc_context_i(ctx), .address_to_compress_i(addr), .valid_o(v_o), .packet_format_o(fmt),
    .packet_f_sync_subformat_o(sf), .thaddr_o(thaddr), .lc_tc_mux_o(lctc), .qual_status_o(qs),
    .noaddr_o(noaddr), .updiscon_flag_o(updf), .keep_bits_o(keep), .resync_timer_rst_o(rrst));

  task automatic base();
    valid = 1; lc_exc = 0; lc_upd = 0; tc_q = 1; tc_exc = 0; tc_ret = 1; tc_first = 0; tc_priv = 0;
    nc_q = 1; nc_ret = 1; bm_empty = 1; bm_full = 0; en_ev = 0; dis_ev = 0; op_ev = 0; lc_final = 0;
    lost = 0; nc_exc = 0; nc_priv = 0; nc_bm_empty = 1; gt = 0; et = 0; addr = 64'h8000_1000;
    noctx = 1; ctx = '0;
  endtask

  // expect: v, format, subformat, thaddr, lc/tc mux, noaddr, resync reset
  task automatic expect_pkt(string name, bit ev, format_e ef, subformat_e esf, bit eth, bit elc, bit ena, bit err);
    #1;
    checks++;
    if (v_o !== ev || (ev && (fmt !== ef || (ef == F_SYNC && sf !== esf) || thaddr !== eth ||
        lctc !== elc || noaddr !== ena || rrst !== err))) begin
      failures++;
      $display("FAIL %s: v=%b fmt=%0d sf=%0d th=%b lc=%b na=%b rst=%b", name, v_o, fmt, sf, thaddr, lctc, noaddr, rrst);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int run, exp_keep;
    base(); valid = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    base(); valid = 0;          expect_pkt("idle", 0, F_SYNC, SF_START, 0, 0, 0, 0);
    base(); en_ev = 1;          expect_pkt("enable", 1, F_SYNC, SF_SUPPORT, 0, 0, 0, 0);
    base(); lost = 1; lc_exc = 1; expect_pkt("lost first", 1, F_SYNC, SF_SUPPORT, 0, 0, 0, 0);
    checks++; if (qs !== QS_TRACE_LOST) begin failures++; $display("FAIL qual status lost"); end
    base(); lc_final = 1; tc_q = 0; expect_pkt("final", 1, F_SYNC, SF_SUPPORT, 0, 0, 0, 0);
    checks++; if (qs !== QS_ENDED_REP) begin failures++; $display("FAIL qual status ended"); end
    base(); tc_q = 0; nc_q = 0;  expect_pkt("unqualified", 0, F_SYNC, SF_START, 0, 0, 0, 0);
    base(); lc_exc = 1; tc_exc = 1; tc_ret = 0; expect_pkt("exc exc_only", 1, F_SYNC, SF_TRAP, 0, 1, 0, 1);
    @(posedge clk); #1; // reported flop now set
    base(); lc_exc = 1;         expect_pkt("exc reported", 1, F_SYNC, SF_START, 0, 0, 0, 1);
    @(posedge clk); #1; // reported cleared by the sync packet
    base(); lc_exc = 1;         expect_pkt("exc not reported", 1, F_SYNC, SF_TRAP, 1, 1, 0, 1);
    base(); tc_first = 1;       expect_pkt("first", 1, F_SYNC, SF_START, 0, 0, 0, 1);
    base(); tc_priv = 1;        expect_pkt("privchange", 1, F_SYNC, SF_START, 0, 0, 0, 1);
    base(); gt = 1;             expect_pkt("gt resync", 1, F_SYNC, SF_START, 0, 0, 0, 1);
    base(); lc_upd = 1; tc_exc = 1; tc_ret = 0; expect_pkt("upd exc_only", 1, F_SYNC, SF_TRAP, 0, 0, 0, 1);
    base(); lc_upd = 1;         expect_pkt("upd f2", 1, F_ADDR_ONLY, SF_START, 0, 0, 0, 0);
    base(); lc_upd = 1; bm_empty = 0; expect_pkt("upd f1", 1, F_DIFF_DELTA, SF_START, 0, 0, 0, 0);
    base(); lc_upd = 1; nc_exc = 1; #1; checks++; if (!updf) begin failures++; $display("FAIL updiscon flag"); end
    base(); et = 1; bm_empty = 0; expect_pkt("resync_br", 1, F_DIFF_DELTA, SF_START, 0, 0, 0, 0);
    base(); et = 1;             expect_pkt("et, empty map", 0, F_SYNC, SF_START, 0, 0, 0, 0);
    base(); tc_exc = 1;         expect_pkt("er_n", 1, F_ADDR_ONLY, SF_START, 0, 0, 0, 0);
    base(); nc_exc = 1; nc_ret = 0; expect_pkt("next exc_only", 1, F_ADDR_ONLY, SF_START, 0, 0, 0, 0);
    base(); nc_priv = 1; nc_bm_empty = 0; bm_empty = 0; expect_pkt("ppccd_br", 1, F_DIFF_DELTA, SF_START, 0, 0, 0, 0);
    base(); nc_priv = 1;        expect_pkt("ppccd, no branches", 0, F_SYNC, SF_START, 0, 0, 0, 0);
    base(); nc_q = 0;           expect_pkt("next unqualified", 1, F_ADDR_ONLY, SF_START, 0, 0, 0, 0);
    base(); bm_full = 1; bm_empty = 0; expect_pkt("rpt_br", 1, F_DIFF_DELTA, SF_START, 0, 0, 1, 0);
    base();                     expect_pkt("nothing", 0, F_SYNC, SF_START, 0, 0, 0, 0);
    // context changes: each case sits between two clock edges; the register of the
    // context last sent is updated only by the edge that ends a case
    @(negedge clk) base(); ctx = 32'h5;             expect_pkt("context off", 0, F_SYNC, SF_START, 0, 0, 0, 0);
    @(negedge clk) base(); noctx = 0; ctx = 32'h5;  expect_pkt("context change", 1, F_SYNC, SF_CONTEXT, 0, 0, 0, 0);
    @(negedge clk) base(); noctx = 0; ctx = 32'h5;  expect_pkt("context sent", 0, F_SYNC, SF_START, 0, 0, 0, 0);
    @(negedge clk) base(); noctx = 0; ctx = 32'h9; lc_upd = 1; expect_pkt("address before context", 1, F_ADDR_ONLY, SF_START, 0, 0, 0, 0);
    @(negedge clk) base(); noctx = 0; ctx = 32'h9; bm_full = 1; bm_empty = 0; expect_pkt("map before context", 1, F_DIFF_DELTA, SF_START, 0, 0, 1, 0);
    @(negedge clk) base(); noctx = 0; ctx = 32'h9;  expect_pkt("context still pending", 1, F_SYNC, SF_CONTEXT, 0, 0, 0, 0);
    @(negedge clk) base(); noctx = 0; ctx = 32'h7; tc_first = 1; expect_pkt("sync carries context", 1, F_SYNC, SF_START, 0, 0, 0, 1);
    @(negedge clk) base(); noctx = 0; ctx = 32'h7;  expect_pkt("context carried", 0, F_SYNC, SF_START, 0, 0, 0, 0);
    @(negedge clk) base(); noctx = 0; ctx = 32'h8; valid = 0; expect_pkt("context, no block", 0, F_SYNC, SF_START, 0, 0, 0, 0);
    // address compression
    for (int t = 0; t < 2000; t++) begin
      base();
      addr = {$urandom, $urandom} >> ($urandom % 64);
      if ($urandom % 2) addr = ~addr;
      if (t == 0) addr = 0;
      if (t == 1) addr = '1;
      if (t == 2) addr = 64'b0000001100010;
      #1;
      run = 1;
      while (run < 64 && addr[63 - run] == addr[63]) run++;
      exp_keep = 64 - run + 1;
      checks++;
      if (int'(keep) != exp_keep) begin failures++; $display("FAIL keep %h: %0d exp %0d", addr, keep, exp_keep); end
      if (t == 2 && keep != 8) begin failures++; $display("FAIL worked example"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
