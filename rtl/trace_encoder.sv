// trace_encoder: RISC-V Efficient Trace (E-Trace) branch-trace encoder for a core that
// retires up to N blocks per cycle, of which at most one ends in something other than
// a branch (the "branches only" multiple-retirement architecture).
//
// Each cycle the core-side connector may present up to N blocks (port 0 oldest) plus
// the shared trap cause, trap value and privilege. One te_filter per port qualifies
// the blocks; a three-stage register pipeline, advanced whenever a block arrives,
// holds the next (nc), current (tc) and previous (lc) block group. In the cycle after a
// group enters tc, te_priority decides its packet from the three stages; the reported
// address is that of the group's first block, and the branches of all its qualified
// blocks go into te_branch_map at the same clock edge as any flush, so a packet
// reports the branches that came before its address. te_packet_emitter assembles the
// payload, te_resync_counter counts packets and forces periodic synchronisation, and
// te_reg holds the configuration and gates the clock of everything else.
//
// Sticky events (trace switched on or off, address mode changed, packet lost) raise a
// support packet at the next opportunity. A packet is lost when the encapsulator is
// not ready and lossless_trace is clear. With lossless_trace set, stall_o asks the
// core to stall instead, and the encoder's clock stops (from the next falling edge)
// so the packet on the outputs waits for the encapsulator; hold_o tells the block
// source to keep its outputs and valid_i unchanged meanwhile.
//
// Timing: a block group entering nc at edge t is decided one cycle after the next
// group arrives, and its packet appears on packet_*_o one cycle later.
//
// The submodules, their connections and the choice of the first priority/emitter
// for the single packet per cycle follow the design description. Using the first
// block of the group as "the" current block, the per-group pipeline advance, the
// sticky event flags and the synchronised flag (a group is "first qualified" until a
// synchronisation or trap packet has been sent since tracing was switched on) are
// this design's choices. Context and time are plain inputs; the trap vector input
// feeds only the filters. An assertion checks the architecture's premise: at most one
// block per cycle ends in an uninferable discontinuity.
module trace_encoder
  import te_pkg::*;
#(
  parameter int unsigned N          = 2,    // retirement ports (CVA6: 2 commit ports)
  parameter int unsigned RESYNC_MAX = 255   // packets between synchronisations
) (
  input  logic                   clk_i,
  input  logic                   rst_ni,
  // APB configuration port
  input  logic                   psel_i,
  input  logic                   penable_i,
  input  logic                   pwrite_i,
  input  logic [7:0]             paddr_i,
  input  logic [31:0]            pwdata_i,
  output logic [31:0]            prdata_o,
  output logic                   pready_o,
  output logic                   pslverr_o,
  input  logic                   trace_req_on_i,
  input  logic                   trace_req_off_i,
  // blocks from the core
  input  logic [N-1:0]           valid_i,
  input  block_t [N-1:0]         block_i,
  input  logic [CAUSE_LEN-1:0]   cause_i,
  input  logic [XLEN-1:0]        tval_i,
  input  logic [PRIV_LEN-1:0]    priv_i,
  input  logic [XLEN-1:0]        tvec_i,
  input  logic [TIME_LEN-1:0]    time_i,
  input  logic [CONTEXT_LEN-1:0] context_i,
  // packets to the encapsulator
  input  logic                   encapsulator_ready_i,
  output logic                   packet_valid_o,
  output logic [3:0]             packet_type_o,
  output logic [PAYLOAD_LEN-1:0] packet_payload_o,
  output logic [PLEN_LEN-1:0]    payload_length_o,
  output logic                   stall_o,
  output logic                   hold_o     // encoder frozen this cycle: hold its inputs
);

  typedef struct packed {
    logic                   any;
    logic [N-1:0]           valid;
    logic [N-1:0]           qual;
    block_t [N-1:0]         blk;
    logic [CAUSE_LEN-1:0]   cause;
    logic [XLEN-1:0]        tval;
    logic [PRIV_LEN-1:0]    priv;
    logic [TIME_LEN-1:0]    tstamp;
    logic [CONTEXT_LEN-1:0] ctx;
  } stage_t;

  // ---------------- configuration ----------------
  logic       trace_enable, nocontext, notime, encoder_mode;
  logic       shallow_trace, lossless_trace, clk_gated;
  logic [2:0] configuration;
  cmp_cfg_t   cause_cfg, tvec_cfg, tval_cfg, priv_cfg, iaddr_cfg;

  te_reg u_reg (
    .clk_i, .rst_ni, .psel_i, .penable_i, .pwrite_i, .paddr_i, .pwdata_i, .prdata_o,
    .pready_o, .pslverr_o, .trace_req_off_i, .trace_req_on_i, .encapsulator_ready_i,
    .trace_enable_o(trace_enable), .trace_activated_o(),
    .nocontext_o(nocontext), .notime_o(notime), .encoder_mode_o(encoder_mode),
    .configuration_o(configuration), .shallow_trace_o(shallow_trace),
    .lossless_trace_o(lossless_trace), .stall_i(stall_o), .clk_gated_o(clk_gated),
    .hold_o,
    .cause_cfg_o(cause_cfg), .tvec_cfg_o(tvec_cfg), .tval_cfg_o(tval_cfg),
    .priv_lvl_cfg_o(priv_cfg), .iaddr_cfg_o(iaddr_cfg)
  );

  // ---------------- filters, one per port ----------------
  logic [N-1:0] qualified;
  for (genvar i = 0; i < N; i++) begin : g_filter
    te_filter u_filter (
      .cause_cfg_i(cause_cfg), .tvec_cfg_i(tvec_cfg), .tval_cfg_i(tval_cfg),
      .priv_lvl_cfg_i(priv_cfg), .iaddr_cfg_i(iaddr_cfg),
      .cause_i, .tvec_i, .tval_i, .priv_lvl_i(priv_i), .iaddr_i(block_i[i].iaddr),
      .trace_enable_i(trace_enable), .nc_qualified_o(qualified[i])
    );
  end

  // ---------------- input pipeline: nc -> tc -> lc ----------------
  stage_t nc_q, tc_q, lc_q, in_s;
  logic   pending_q;

  always_comb begin
    in_s.any    = |valid_i;
    in_s.valid  = valid_i;
    in_s.qual   = qualified & valid_i;
    in_s.blk    = block_i;
    in_s.cause  = cause_i;
    in_s.tval   = tval_i;
    in_s.priv   = priv_i;
    in_s.tstamp = time_i;
    in_s.ctx    = context_i;
  end

  always_ff @(posedge clk_gated or negedge rst_ni) begin
    if (!rst_ni) begin
      nc_q      <= '0;
      tc_q      <= '0;
      lc_q      <= '0;
      pending_q <= 1'b0;
    end else begin
      pending_q <= in_s.any && nc_q.any;
      if (in_s.any) begin
        nc_q <= in_s;
        tc_q <= nc_q;
        lc_q <= tc_q;
      end
    end
  end

  // ---------------- stage conditions ----------------
  function automatic logic grp_trap(stage_t s);
    logic r = 1'b0;
    for (int i = 0; i < N; i++) r |= s.valid[i] & is_trap(s.blk[i].itype);
    return r;
  endfunction
  function automatic logic grp_updiscon(stage_t s);
    logic r = 1'b0;
    for (int i = 0; i < N; i++) r |= s.valid[i] & is_updiscon(s.blk[i].itype);
    return r;
  endfunction
  function automatic logic grp_has_branch(stage_t s);
    logic r = 1'b0;
    for (int i = 0; i < N; i++) r |= s.qual[i] & is_branch(s.blk[i].itype);
    return r;
  endfunction

  logic tc_qualified, nc_qualified, lc_qualified;
  logic tc_exception, nc_exception, lc_exception, lc_updiscon;
  logic tc_retired, nc_retired, tc_privchange, nc_privchange;
  logic tc_interrupt, lc_interrupt, tc_first_qualified, lc_final_qualified;
  logic tc_branch, tc_branch_taken;
  logic synced_q;

  assign tc_qualified  = tc_q.qual[0];
  assign nc_qualified  = nc_q.qual[0];
  assign lc_qualified  = lc_q.qual[0];
  assign tc_exception  = grp_trap(tc_q);
  assign nc_exception  = grp_trap(nc_q);
  assign lc_exception  = grp_trap(lc_q) & lc_qualified;
  assign lc_updiscon   = grp_updiscon(lc_q) & lc_qualified;
  assign tc_retired    = tc_q.blk[0].iretire != '0;
  assign nc_retired    = nc_q.blk[0].iretire != '0;
  assign tc_privchange = lc_q.any && (tc_q.priv != lc_q.priv);
  assign nc_privchange = nc_q.priv != tc_q.priv;
  assign tc_interrupt  = tc_q.blk[0].itype == IT_INT;
  assign lc_interrupt  = lc_q.blk[0].itype == IT_INT;
  assign tc_first_qualified = tc_qualified & ~synced_q;
  assign lc_final_qualified = lc_qualified & ~tc_qualified;
  assign tc_branch       = is_branch(tc_q.blk[0].itype) &&
                           (tc_q.blk[0].iretire == (tc_q.blk[0].ilastsize ? IRETIRE_LEN'(2) : IRETIRE_LEN'(1)));
  assign tc_branch_taken = tc_q.blk[0].itype == IT_BR_TAKEN;

  // ---------------- branch map ----------------
  logic [N-1:0] bm_valid, bm_taken;
  logic [4:0]   branches;
  logic [30:0]  branch_map;
  logic         bm_full, bm_empty, bm_flush;

  for (genvar i = 0; i < N; i++) begin : g_bm
    assign bm_valid[i] = pending_q & tc_q.qual[i] & is_branch(tc_q.blk[i].itype);
    assign bm_taken[i] = tc_q.blk[i].itype == IT_BR_TAKEN;
  end

  te_branch_map #(.N(N)) u_branch_map (
    .clk_i(clk_gated), .rst_ni, .valid_i(bm_valid), .branch_taken_i(bm_taken),
    .flush_i(bm_flush), .branches_o(branches), .map_o(branch_map),
    .is_full_o(bm_full), .is_empty_o(bm_empty)
  );

  // ---------------- sticky events for support packets ----------------
  logic       en_q, enabled_ev_q, disabled_ev_q, opmode_ev_q, lost_ev_q;
  logic [2:0] cfg_q;
  logic       support_sent, sync_sent, lost;

  // ---------------- priority ----------------
  logic                   pr_valid, thaddr, lc_tc_mux, noaddr, upd_flag, resync_rst;
  format_e                pr_format;
  subformat_e             pr_subformat;
  qual_status_e           qual_status;
  logic [$clog2(XLEN+1)-1:0] keep_bits;
  logic [XLEN-1:0]        addr_to_compress;
  logic                   gt_resync, et_resync;

  te_priority u_priority (
    .clk_i(clk_gated), .rst_ni, .valid_i(pending_q),
    .lc_exception_i(lc_exception), .lc_updiscon_i(lc_updiscon),
    .tc_qualified_i(tc_qualified), .tc_exception_i(tc_exception), .tc_retired_i(tc_retired),
    .tc_first_qualified_i(tc_first_qualified), .tc_privchange_i(tc_privchange),
    .nc_qualified_i(nc_qualified), .nc_retired_i(nc_retired),
    .tc_branch_map_empty_i(bm_empty), .tc_branch_map_full_i(bm_full),
    .tc_enc_enabled_i(enabled_ev_q), .tc_enc_disabled_i(disabled_ev_q),
    .tc_opmode_change_i(opmode_ev_q), .lc_final_qualified_i(lc_final_qualified),
    .tc_packets_lost_i(lost_ev_q), .nc_exception_i(nc_exception),
    .nc_privchange_i(nc_privchange),
    .nc_branch_map_empty_i(bm_empty & ~grp_has_branch(tc_q)),
    .tc_gt_max_resync_i(gt_resync), .tc_et_max_resync_i(et_resync),
    .nocontext_i(nocontext), .tc_context_i(tc_q.ctx),
    .address_to_compress_i(addr_to_compress),
    .valid_o(pr_valid), .packet_format_o(pr_format), .packet_f_sync_subformat_o(pr_subformat),
    .thaddr_o(thaddr), .lc_tc_mux_o(lc_tc_mux), .qual_status_o(qual_status),
    .noaddr_o(noaddr), .updiscon_flag_o(upd_flag), .keep_bits_o(keep_bits),
    .resync_timer_rst_o(resync_rst)
  );

  te_resync_counter #(.N(1), .MODE(1'b0), .MAX_VALUE(RESYNC_MAX)) u_resync (
    .clk_i(clk_gated), .rst_ni, .trace_enabled_i(trace_enable),
    .packet_emitted_i(pr_valid), .resync_rst_i(resync_rst),
    .gt_resync_max_o(gt_resync), .et_resync_max_o(et_resync)
  );

  // ---------------- packet emitter ----------------
  te_packet_emitter u_emitter (
    .clk_i(clk_gated), .rst_ni, .valid_i(pr_valid), .packet_format_i(pr_format),
    .packet_f_sync_subformat_i(pr_subformat), .thaddr_i(thaddr), .lc_tc_mux_i(lc_tc_mux),
    .qual_status_i(qual_status), .noaddr_i(noaddr), .updiscon_flag_i(upd_flag),
    .lc_cause_i(lc_q.cause), .lc_tval_i(lc_q.tval), .lc_interrupt_i(lc_interrupt),
    .tc_cause_i(tc_q.cause), .tc_tval_i(tc_q.tval), .tc_interrupt_i(tc_interrupt),
    .tc_branch_i(tc_branch), .tc_branch_taken_i(tc_branch_taken), .tc_priv_i(tc_q.priv),
    .tc_time_i(tc_q.tstamp), .tc_context_i(tc_q.ctx), .tc_address_i(tc_q.blk[0].iaddr),
    .nocontext_i(nocontext), .notime_i(notime), .shallow_trace_i(shallow_trace),
    .tc_ienable_i(trace_enable), .encoder_mode_i(encoder_mode),
    .configuration_i(configuration),
    .ioptions_i({lossless_trace, shallow_trace, configuration == CFG_FULL_ADDRESS}),
    .branches_i(branches), .branch_map_i(branch_map), .keep_bits_i(keep_bits),
    .packet_valid_o, .packet_type_o, .packet_payload_o, .payload_length_o,
    .branch_map_flush_o(bm_flush), .address_to_compress_o(addr_to_compress)
  );

  assign support_sent = pr_valid && pr_format == F_SYNC && pr_subformat == SF_SUPPORT;
  assign sync_sent    = pr_valid && pr_format == F_SYNC &&
                        (pr_subformat == SF_START || pr_subformat == SF_TRAP);
  assign lost         = packet_valid_o & ~encapsulator_ready_i & ~lossless_trace;
  assign stall_o      = lossless_trace & ~encapsulator_ready_i;

  always_ff @(posedge clk_gated or negedge rst_ni) begin
    if (!rst_ni) begin
      en_q          <= 1'b0;
      cfg_q         <= '0;
      enabled_ev_q  <= 1'b0;
      disabled_ev_q <= 1'b0;
      opmode_ev_q   <= 1'b0;
      lost_ev_q     <= 1'b0;
      synced_q      <= 1'b0;
    end else begin
      en_q  <= trace_enable;
      cfg_q <= configuration;
      if (support_sent) begin
        enabled_ev_q  <= 1'b0;
        disabled_ev_q <= 1'b0;
        opmode_ev_q   <= 1'b0;
        lost_ev_q     <= 1'b0;
      end
      if (trace_enable && !en_q)              enabled_ev_q  <= 1'b1;
      if (!trace_enable && en_q)              disabled_ev_q <= 1'b1;
      if (en_q && (configuration != cfg_q))   opmode_ev_q   <= 1'b1;
      if (lost)                               lost_ev_q     <= 1'b1;
      if (!trace_enable)                      synced_q      <= 1'b0;
      else if (sync_sent)                     synced_q      <= 1'b1;
    end
  end

  // the branches-only architecture serves cores that retire at most one uninferable
  // discontinuity (jump or exception return) per cycle; a second one would go unreported
  logic [N-1:0] in_updiscon;
  always_comb
    for (int i = 0; i < N; i++) in_updiscon[i] = valid_i[i] & is_updiscon(block_i[i].itype);

  a_one_updiscon: assert property (@(posedge clk_i) disable iff (!rst_ni) $countones(in_updiscon) <= 1)
    else $error("trace_encoder: more than one uninferable discontinuity in one cycle");

endmodule
