// tb_te_reg: self-checking test of te_reg.
// Writes every configuration word over APB with random data, reads it back, and checks
// the decoded outputs (control bits, comparator settings of all five filters). Then
// checks the trace-enable rules (on request needs activation and a ready
// encapsulator, off request and de-activation clear it), that the gated clock only
// toggles while activated and stops (with hold_o raised) while a stall is requested,
// and that an unmapped access signals an error.
module tb_te_reg;
  import te_pkg::*;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [7:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic pready, pslverr;
  logic req_off = 0, req_on = 0, enc_ready = 1;
  logic tr_en, tr_act, noctx, notime, emode, shallow, lossless, clk_g;
  logic [2:0] cfg;
  cmp_cfg_t cc [5];
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  te_reg dut (.clk_i(clk), .rst_ni(rst_n), .psel_i(psel), .penable_i(penable), .pwrite_i(pwrite),
    .paddr_i(paddr), .pwdata_i(pwdata), .prdata_o(prdata), .pready_o(pready), .pslverr_o(pslverr),
    .trace_req_off_i(req_off), .trace_req_on_i(req_on), .encapsulator_ready_i(enc_ready),
    .trace_enable_o(tr_en), .trace_activated_o(tr_act), .nocontext_o(noctx), .notime_o(notime),
    .encoder_mode_o(emode), .configuration_o(cfg), .shallow_trace_o(shallow),
    .lossless_trace_o(lossless), .stall_i(stall), .clk_gated_o(clk_g), .hold_o(hold), .cause_cfg_o(cc[0]), .tvec_cfg_o(cc[1]),
    .tval_cfg_o(cc[2]), .priv_lvl_cfg_o(cc[3]), .iaddr_cfg_o(cc[4]));

  task automatic apb(input bit wr, input logic [7:0] a, input logic [31:0] d, output logic [31:0] r, output logic err);
    @(negedge clk); psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    #1 r = prdata; err = pslverr;
    @(posedge clk); #1; psel = 0; penable = 0;
  endtask

  task automatic check(input bit cond, input string msg);
    checks++; if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic stall = 0, hold;
  int edges;
  always @(posedge clk_g) edges++;

  initial begin
    logic [31:0] r; logic e;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(noctx && notime && !tr_act && !tr_en, "reset values");
    for (int w = 1; w < 32; w++) begin
      shadow[w] = $urandom; apb(1, 8'(4*w), shadow[w], r, e);
    end
    for (int w = 1; w < 32; w++) begin
      apb(0, 8'(4*w), 0, r, e); check(r == shadow[w] && !e, $sformatf("readback word %0d", w));
    end
    for (int k = 0; k < 5; k++) begin
      check(cc[k].filter == shadow[1][2*k] && cc[k].mode == shadow[1][2*k+1], $sformatf("cfg %0d flags", k));
      check(cc[k].upper == {shadow[3+6*k], shadow[2+6*k]}, $sformatf("cfg %0d upper", k));
      check(cc[k].lower == {shadow[5+6*k], shadow[4+6*k]}, $sformatf("cfg %0d lower", k));
      check(cc[k].match == {shadow[7+6*k], shadow[6+6*k]}, $sformatf("cfg %0d match", k));
    end
    // clock gate off while not activated
    edges = 0; repeat (5) @(posedge clk);
    check(edges == 0, "gated clock stopped");
    // trace-on without activation is ignored
    @(negedge clk) req_on = 1; @(negedge clk) req_on = 0;
    check(!tr_en, "enable needs activation");
    apb(1, 8'h00, 32'h0000_01F9, r, e); // activated, ctx/time on, mode 1, cfg 7, lossless, shallow
    check(tr_act && !noctx && !notime && emode && cfg == 3'd7 && lossless && shallow, "control decode");
    edges = 0; repeat (5) @(posedge clk); #1;
    check(edges >= 4, "gated clock runs");
    // a stall request stops the gated clock from the next falling edge and raises hold_o
    @(posedge clk); #1 stall = 1;
    @(negedge clk); #1 check(hold, "hold raised by stall");
    edges = 0; repeat (4) @(posedge clk); #1;
    check(edges == 0, "gated clock stopped by stall");
    stall = 0;
    @(negedge clk); #1 check(!hold, "hold released");
    edges = 0; repeat (4) @(posedge clk); #1;
    check(edges == 4, "gated clock runs after stall");
    enc_ready = 0; @(negedge clk) req_on = 1; @(negedge clk) req_on = 0;
    check(!tr_en, "enable needs ready encapsulator");
    enc_ready = 1; @(negedge clk) req_on = 1; @(negedge clk) req_on = 0;
    check(tr_en, "trace on");
    apb(0, 8'd128, 0, r, e); check(r == 32'd1 && !e, "status word");
    @(negedge clk) req_off = 1; @(negedge clk) req_off = 0;
    check(!tr_en, "trace off");
    @(negedge clk) req_on = 1; @(negedge clk) req_on = 0;
    check(tr_en, "trace on again");
    apb(1, 8'h00, 32'h0, r, e);
    @(negedge clk); @(negedge clk);
    check(!tr_en, "deactivation clears enable");
    apb(0, 8'd200, 0, r, e); check(e, "unmapped access error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
