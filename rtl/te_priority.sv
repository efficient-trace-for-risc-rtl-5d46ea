// te_priority: chooses which packet, if any, the current block needs, and how many
// address bits the packet must carry.
//
// The decision is the E-Trace packet flow chart written as one combinational network.
// It looks at three consecutive qualified-input stages: the previous block (lc_*), the
// current block (tc_*) and the next block (nc_*). valid_i marks the one cycle in which
// the current block is decided. In order of priority:
//   1. support packet (format 3, subformat 3) when tracing was switched on or off, the
//      address mode changed, packets were lost, or the previous block was the last
//      qualified one; this check comes before everything else;
//   2. nothing for an unqualified block;
//   3. previous block ended in a trap: trap packet (format 3/1) with thaddr = 0 when
//      the current block retires nothing, thaddr = 1 unless the trap was already
//      reported, otherwise a synchronisation packet (format 3/0);
//   4. first qualified block, privilege change or resync counter past its maximum:
//      synchronisation packet (format 3/0);
//   5. previous block ended in an uninferable discontinuity: trap packet (thaddr = 0,
//      current cause) if the current block retires nothing, else an address packet;
//   6. resync counter at its maximum with branches pending, or a trap in a block that
//      also retired instructions: address packet;
//   7. next block retires nothing before a trap, changes privilege with branches
//      pending, or is unqualified: address packet;
//   8. branch map full: branch-map packet without address (format 1, branches = 0);
//   9. context of the current block differs from the last one reported (and context
//      is enabled): context packet (format 3/2).
// An address packet is format 1 when branches are pending and format 2 otherwise.
// Synchronisation and trap packets reset the resync counter.
//
// Address compression: two leading-zero counters, on the address and on its
// complement, find the run of equal most-significant bits; all of it but one bit can
// be dropped because the receiver sign-extends. keep_bits_o = XLEN - run + 1.
//
// The flow chart, the three stages, placing the support packet first, the "reported"
// flip-flop, the lc/tc cause selection and the compression scheme follow the design
// description. Not implemented: optional efficiency extensions (format 0) and the
// implicit-return stack. The "reported" flip-flop is set by a trap packet with
// thaddr = 0 and cleared by any other packet (this design's reading).
//
// Context packets are this design's placement: the context sent last (by a
// synchronisation, trap or context packet) is kept in a register, and a change is
// reported on the first qualified block that needs no other packet, so it never
// displaces an address or branch report; a synchronisation or trap packet that comes
// first carries the new context itself. The registers are clocked by clk_i; the rest
// is combinational.
module te_priority
  import te_pkg::*;
(
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                valid_i,
  input  logic                lc_exception_i,
  input  logic                lc_updiscon_i,
  input  logic                tc_qualified_i,
  input  logic                tc_exception_i,
  input  logic                tc_retired_i,
  input  logic                tc_first_qualified_i,
  input  logic                tc_privchange_i,
  input  logic                nc_qualified_i,
  input  logic                nc_retired_i,
  input  logic                tc_branch_map_empty_i,
  input  logic                tc_branch_map_full_i,
  input  logic                tc_enc_enabled_i,
  input  logic                tc_enc_disabled_i,
  input  logic                tc_opmode_change_i,
  input  logic                lc_final_qualified_i,
  input  logic                tc_packets_lost_i,
  input  logic                nc_exception_i,
  input  logic                nc_privchange_i,
  input  logic                nc_branch_map_empty_i,
  input  logic                tc_gt_max_resync_i,
  input  logic                tc_et_max_resync_i,
  input  logic                nocontext_i,
  input  logic [CONTEXT_LEN-1:0] tc_context_i,
  input  logic [XLEN-1:0]     address_to_compress_i,
  output logic                valid_o,
  output format_e             packet_format_o,
  output subformat_e          packet_f_sync_subformat_o,
  output logic                thaddr_o,
  output logic                lc_tc_mux_o,       // 1: cause/tval of the previous block
  output qual_status_e        qual_status_o,
  output logic                noaddr_o,          // format 1 without address
  output logic                updiscon_flag_o,   // report "updiscon before trap/resync"
  output logic [$clog2(XLEN+1)-1:0] keep_bits_o,
  output logic                resync_timer_rst_o
);

  localparam int unsigned KW = $clog2(XLEN + 1);

  logic                   reported_q;
  logic [CONTEXT_LEN-1:0] ctx_sent_q;   // context carried by the last format-3 packet

  // ---------------- packet format determination ----------------
  always_comb begin
    logic exc_only, address_pkt, support;
    valid_o                   = 1'b0;
    packet_format_o           = F_SYNC;
    packet_f_sync_subformat_o = SF_START;
    thaddr_o                  = 1'b0;
    lc_tc_mux_o               = 1'b0;
    qual_status_o             = QS_NO_CHANGE;
    noaddr_o                  = 1'b0;
    updiscon_flag_o           = 1'b0;
    resync_timer_rst_o        = 1'b0;
    address_pkt               = 1'b0;
    exc_only = tc_exception_i & ~tc_retired_i;
    support  = tc_enc_enabled_i | tc_enc_disabled_i | tc_opmode_change_i |
               tc_packets_lost_i | (valid_i & lc_final_qualified_i);

    if (support) begin
      valid_o                   = 1'b1;
      packet_f_sync_subformat_o = SF_SUPPORT;
      if (tc_packets_lost_i)                    qual_status_o = QS_TRACE_LOST;
      else if (valid_i && lc_final_qualified_i) qual_status_o = QS_ENDED_REP;
    end else if (valid_i && tc_qualified_i) begin
      if (lc_exception_i) begin
        valid_o            = 1'b1;
        resync_timer_rst_o = 1'b1;
        if (exc_only) begin
          packet_f_sync_subformat_o = SF_TRAP;
          lc_tc_mux_o               = 1'b1;
        end else if (!reported_q) begin
          packet_f_sync_subformat_o = SF_TRAP;
          thaddr_o                  = 1'b1;
          lc_tc_mux_o               = 1'b1;
        end
      end else if (tc_first_qualified_i || tc_privchange_i || tc_gt_max_resync_i) begin
        valid_o            = 1'b1;
        resync_timer_rst_o = 1'b1;
      end else if (lc_updiscon_i) begin
        if (exc_only) begin
          valid_o                   = 1'b1;
          resync_timer_rst_o        = 1'b1;
          packet_f_sync_subformat_o = SF_TRAP;
        end else begin
          address_pkt     = 1'b1;
          updiscon_flag_o = tc_exception_i | nc_exception_i | nc_privchange_i | tc_et_max_resync_i;
        end
      end else if ((tc_et_max_resync_i && !tc_branch_map_empty_i) ||
                   (tc_exception_i && tc_retired_i)) begin
        address_pkt = 1'b1;
      end else if ((nc_exception_i && !nc_retired_i) ||
                   (nc_privchange_i && !nc_branch_map_empty_i) || !nc_qualified_i) begin
        address_pkt = 1'b1;
      end else if (tc_branch_map_full_i) begin
        valid_o         = 1'b1;
        packet_format_o = F_DIFF_DELTA;
        noaddr_o        = 1'b1;
      end else if (!nocontext_i && tc_context_i != ctx_sent_q) begin
        valid_o                   = 1'b1;
        packet_f_sync_subformat_o = SF_CONTEXT;
      end
      if (address_pkt) begin
        valid_o         = 1'b1;
        packet_format_o = tc_branch_map_empty_i ? F_ADDR_ONLY : F_DIFF_DELTA;
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      reported_q <= 1'b0;
      ctx_sent_q <= '0;
    end else if (valid_o) begin
      reported_q <= (packet_format_o == F_SYNC) && (packet_f_sync_subformat_o == SF_TRAP) && !thaddr_o;
      if (packet_format_o == F_SYNC && packet_f_sync_subformat_o != SF_SUPPORT)
        ctx_sent_q <= tc_context_i;
    end
  end

  // ---------------- address compression ----------------
  logic [KW-1:0] lz0, lz1, run;

  te_lzc #(.WIDTH(XLEN)) u_lzc0 (.data_i(address_to_compress_i),  .count_o(lz0));
  te_lzc #(.WIDTH(XLEN)) u_lzc1 (.data_i(~address_to_compress_i), .count_o(lz1));

  assign run = (lz0 >= lz1) ? lz0 : lz1;
  assign keep_bits_o = KW'(XLEN) - run + KW'(1);

endmodule
