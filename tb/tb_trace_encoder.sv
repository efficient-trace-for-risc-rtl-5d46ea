// tb_trace_encoder: self-checking test of trace_encoder (two ports, resync after 6
// packets).
// After programming over APB and switching tracing on, a hand-written block sequence
// is sent whose packets are worked out from the E-Trace rules: support packet on
// enable, synchronisation on the first block, address-only after an indirect jump,
// branch map + address after the next one (map 101b, three branches), a packet for a
// trap block that retired instructions, the trap packet with the handler address.
// Each packet's type, address (sign-extended from its compressed field) and branch
// fields are compared. A long run of branches must then produce a full-branch-map
// packet, the resync counter a new synchronisation, a dropped packet a trace-lost
// support packet, and switching off a support packet with tracing disabled.
module tb_trace_encoder;
  import te_pkg::*;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [7:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic pready, pslverr, req_on = 0, req_off = 0, enc_ready = 1;
  logic [1:0] v = 0;
  block_t [1:0] blk;
  logic [63:0] cause = 0, tval = 0;
  logic [1:0] priv = 3;
  logic pv, stall;
  logic [3:0] ptype;
  logic [319:0] pl;
  logic [5:0] plen;
  int checks = 0, failures = 0;

  typedef struct { logic [3:0] ptype; logic [319:0] pl; int len; } pkt_t;
  pkt_t pq[$];

  always #5 clk = ~clk;

  trace_encoder #(.N(2), .RESYNC_MAX(6)) dut (.clk_i(clk), .rst_ni(rst_n), .psel_i(psel),
    .penable_i(penable), .pwrite_i(pwrite), .paddr_i(paddr), .pwdata_i(pwdata), .prdata_o(prdata),
    .pready_o(pready), .pslverr_o(pslverr), .trace_req_on_i(req_on), .trace_req_off_i(req_off),
    .valid_i(v), .block_i(blk), .cause_i(cause), .tval_i(tval), .priv_i(priv), .tvec_i(64'h0),
    .time_i(64'h0), .context_i(32'h0), .encapsulator_ready_i(enc_ready), .packet_valid_o(pv),
    .packet_type_o(ptype), .packet_payload_o(pl), .payload_length_o(plen), .stall_o(stall));

  always @(posedge clk) if (pv) pq.push_back('{ptype, pl, int'(plen)});

  task automatic apb_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  task automatic grp(int n, logic [2:0] it0, logic [63:0] a0, int r0, logic [2:0] it1 = 0, logic [63:0] a1 = 0, int r1 = 0);
    @(negedge clk);
    v = (n == 2) ? 2'b11 : 2'b01;
    blk[0] = '{itype: it0, iaddr: a0, iretire: 32'(r0), ilastsize: 1'b1};
    blk[1] = '{itype: it1, iaddr: a1, iretire: 32'(r1), ilastsize: 1'b1};
    @(negedge clk); v = 0;
  endtask

  function automatic logic [63:0] field(logic [319:0] p, int start, int len, int trailing);
    int ab; logic [63:0] r;
    ab = (len - (start + trailing + 7) / 8) * 8;
    r = 64'(p >> start);
    if (ab < 64) r = (r[ab-1]) ? (r | ~((64'd1 << ab) - 1)) : (r & ((64'd1 << ab) - 1));
    return r;
  endfunction

  task automatic check(bit c, string msg);
    checks++; if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic expect_addr_pkt(string name, logic [3:0] t, logic [63:0] a, int start, int trailing);
    pkt_t p;
    check(pq.size() > 0, {name, ": packet missing"});
    if (pq.size() == 0) return;
    p = pq.pop_front();
    check(p.ptype == t, $sformatf("%s: type %h exp %h", name, p.ptype, t));
    check(field(p.pl, start, p.len, trailing) == a,
          $sformatf("%s: address %h exp %h", name, field(p.pl, start, p.len, trailing), a));
  endtask

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    pkt_t p;
    int n_full = 0, n_sync = 0, n_lost = 0, n_off = 0;
    blk = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    apb_write(8'h00, 32'h0000_0007);          // activated, no context, no time, delta addresses
    @(negedge clk) req_on = 1; @(negedge clk) req_on = 0;
    repeat (4) @(negedge clk);
    check(pq.size() == 1 && pq[0].ptype == 4'b1111 && pq[0].pl[4] == 1'b1, "support packet on enable");
    void'(pq.pop_front());
    grp(1, IT_UNINF_JUMP, 64'h8000_0000, 4);                       // G1
    grp(1, IT_BR_NTAKEN,  64'h8000_0100, 2);                       // G2 target of the jump
    grp(2, IT_BR_TAKEN,   64'h8000_0104, 6, IT_BR_NTAKEN, 64'h8000_0200, 2); // G3
    grp(1, IT_UNINF_JUMP, 64'h8000_0300, 4);                       // G4
    grp(1, IT_BR_NTAKEN,  64'h8000_0400, 2);                       // G5 target
    cause = 64'd2; tval = 64'h55;
    grp(1, IT_EXC,        64'h8000_0404, 2);                       // G6 trap after retiring
    cause = 0; tval = 0;
    grp(1, IT_BR_NTAKEN,  64'h8000_8000, 8);                       // G7 handler
    grp(1, IT_BR_NTAKEN,  64'h8000_8010, 2);                       // G8
    repeat (4) @(negedge clk);
    expect_addr_pkt("sync", 4'b1100, 64'h8000_0000, 7, 0);
    expect_addr_pkt("addr-only after jump", 4'b1000, 64'h100, 2, 3);
    check(pq.size() > 0 && pq[0].pl[6:2] == 5'd3 && pq[0].pl[9:7] == 3'b101, "branch count 3, map 101");
    expect_addr_pkt("branch map + address", 4'b0100, 64'h300, 2 + 5 + 3, 3);
    check(pq.size() > 0 && pq[0].pl[6:2] == 5'd1, "one branch before the trap");
    expect_addr_pkt("trap block", 4'b0100, 64'h4, 2 + 5 + 1, 3);
    check(pq.size() > 0 && pq[0].pl[70:7] == 64'd2 && pq[0].pl[72] == 1'b1, "trap cause and thaddr");
    expect_addr_pkt("trap packet", 4'b1101, 64'h8000_8000, 73, 64);
    check(pq.size() == 0, $sformatf("no further packets (%0d)", pq.size()));
    pq.delete();
    // long run of branches: the map fills, and resyncs follow
    for (int i = 0; i < 40; i++) grp(2, IT_BR_TAKEN, 64'h8000_9000 + 64'(i * 16), 4, IT_BR_NTAKEN, 64'h8000_9008 + 64'(i * 16), 4);
    for (int i = 0; i < 30; i++) begin
      grp(1, IT_UNINF_JUMP, 64'h8001_0000 + 64'(i * 64), 4);
      grp(1, IT_BR_TAKEN, 64'h8002_0000 + 64'(i * 64), 2);
    end
    // a packet dropped by a busy encapsulator
    @(negedge clk) enc_ready = 0;
    grp(1, IT_UNINF_JUMP, 64'h8003_0000, 4);
    grp(1, IT_BR_TAKEN, 64'h8003_0100, 2);
    grp(1, IT_BR_TAKEN, 64'h8003_0200, 2);
    repeat (3) @(negedge clk);
    enc_ready = 1;
    repeat (4) @(negedge clk);
    @(negedge clk) req_off = 1; @(negedge clk) req_off = 0;
    repeat (4) @(negedge clk);
    while (pq.size()) begin
      p = pq.pop_front();
      if (p.ptype == 4'b0100 && p.pl[6:2] == 5'd0 && p.len == 5) n_full++;
      if (p.ptype == 4'b1100) n_sync++;
      if (p.ptype == 4'b1111 && p.pl[7:6] == QS_TRACE_LOST) n_lost++;
      if (p.ptype == 4'b1111 && p.pl[4] == 1'b0) n_off++;
    end
    $display("full-map packets=%0d resyncs=%0d lost reports=%0d off reports=%0d", n_full, n_sync, n_lost, n_off);
    check(n_full > 0, "full branch map packet");
    check(n_sync > 0, "periodic resynchronisation");
    check(n_lost > 0, "trace-lost support packet");
    check(n_off > 0, "trace-off support packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
