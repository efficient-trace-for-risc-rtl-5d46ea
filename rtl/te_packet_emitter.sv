// te_packet_emitter: builds the payload of the packet chosen by te_priority.
//
// Fields are packed from bit 0 upwards in the order of the E-Trace payload tables
// (format first). Optional fields are left out when not configured: time when notime
// is set, context when nocontext is set, tval for interrupts. Two fields have variable
// length:
//   * the address. The emitter picks the address to send (the full address in
//     synchronisation and trap packets and in full-address mode, otherwise the
//     difference to the last address sent), hands it to te_priority through
//     address_to_compress_o, gets back the number of significant bits and keeps that
//     many rounded up to a whole byte. The notify/updiscon/irreport bits that follow
//     the address repeat its top kept bit unless the updiscon flag inverts updiscon and
//     irreport, so the receiver can sign-extend the packet.
//   * the branch map, whose kept length (1, 3, 7, 15 or 31 bits) follows from the
//     branch count, or 31 bits in a branch-map packet without address.
// The outputs are registered: a packet chosen in cycle t appears on packet_*_o in
// cycle t+1, with its length in bytes and type {format, subformat}. The flush request
// to the branch map is combinational, in cycle t, for every format 1 packet, and for
// every packet when shallow_trace is set. The last-address register is updated by
// every packet that carries an address.
//
// Field order and widths follow the payload tables; rounding the address length up to
// bytes and the flush rule follow the design description. The packed bit order, the
// ioptions bits ({lossless, shallow, full address}) and leaving out the irdepth field
// (no implicit-return stack) are this design's choices.
module te_packet_emitter
  import te_pkg::*;
(
  input  logic                   clk_i,
  input  logic                   rst_ni,
  input  logic                   valid_i,
  input  format_e                packet_format_i,
  input  subformat_e             packet_f_sync_subformat_i,
  input  logic                   thaddr_i,
  input  logic                   lc_tc_mux_i,
  input  qual_status_e           qual_status_i,
  input  logic                   noaddr_i,
  input  logic                   updiscon_flag_i,
  input  logic [CAUSE_LEN-1:0]   lc_cause_i,
  input  logic [XLEN-1:0]        lc_tval_i,
  input  logic                   lc_interrupt_i,
  input  logic [CAUSE_LEN-1:0]   tc_cause_i,
  input  logic [XLEN-1:0]        tc_tval_i,
  input  logic                   tc_interrupt_i,
  input  logic                   tc_branch_i,        // tc address is a branch
  input  logic                   tc_branch_taken_i,
  input  logic [PRIV_LEN-1:0]    tc_priv_i,
  input  logic [TIME_LEN-1:0]    tc_time_i,
  input  logic [CONTEXT_LEN-1:0] tc_context_i,
  input  logic [XLEN-1:0]        tc_address_i,
  input  logic                   nocontext_i,
  input  logic                   notime_i,
  input  logic                   shallow_trace_i,
  input  logic                   tc_ienable_i,
  input  logic                   encoder_mode_i,
  input  logic [2:0]             configuration_i,
  input  logic [2:0]             ioptions_i,
  input  logic [4:0]             branches_i,
  input  logic [30:0]            branch_map_i,
  input  logic [$clog2(XLEN+1)-1:0] keep_bits_i,
  output logic                   packet_valid_o,
  output logic [3:0]             packet_type_o,      // {format, subformat}
  output logic [PAYLOAD_LEN-1:0] packet_payload_o,
  output logic [PLEN_LEN-1:0]    payload_length_o,   // bytes
  output logic                   branch_map_flush_o,
  output logic [XLEN-1:0]        address_to_compress_o
);

  logic [XLEN-1:0] latest_address_q;
  logic            full_addr_pkt;
  logic            has_address;

  // --------- address to compress ---------
  assign full_addr_pkt = (packet_format_i == F_SYNC) || (configuration_i == CFG_FULL_ADDRESS);
  assign address_to_compress_o = full_addr_pkt ? tc_address_i : (tc_address_i - latest_address_q);
  assign has_address = valid_i &&
                       ((packet_format_i == F_ADDR_ONLY) ||
                        (packet_format_i == F_DIFF_DELTA && !noaddr_i) ||
                        (packet_format_i == F_SYNC &&
                         (packet_f_sync_subformat_i == SF_START || packet_f_sync_subformat_i == SF_TRAP)));

  // append val[w-1:0] at bit pos of pl
  function automatic logic [PAYLOAD_LEN-1:0] put(logic [PAYLOAD_LEN-1:0] pl, int unsigned pos,
                                                 logic [XLEN-1:0] val, int unsigned w);
    logic [PAYLOAD_LEN-1:0] v;
    v = PAYLOAD_LEN'(val);
    if (w < XLEN) v = v & ((PAYLOAD_LEN'(1) << w) - PAYLOAD_LEN'(1));
    return pl | (v << pos);
  endfunction

  // kept branch-map length for a given branch count
  function automatic int unsigned map_len(logic [4:0] b);
    if (b == 0)       return 31;
    else if (b == 1)  return 1;
    else if (b <= 3)  return 3;
    else if (b <= 7)  return 7;
    else if (b <= 15) return 15;
    else              return 31;
  endfunction

  logic [PAYLOAD_LEN-1:0] payload;
  int unsigned            nbits;

  always_comb begin
    int unsigned     pos;
    int unsigned     abits;
    logic [XLEN-1:0] addr;
    logic            sign;
    logic [CAUSE_LEN-1:0] cause;
    logic [XLEN-1:0] tval;
    logic            intr;
    payload = '0;
    pos     = 0;
    addr    = address_to_compress_o;
    abits   = ((int'(keep_bits_i) + 7) / 8) * 8;
    if (abits > XLEN) abits = XLEN;
    sign    = addr[abits-1];
    cause   = lc_tc_mux_i ? lc_cause_i : tc_cause_i;
    tval    = lc_tc_mux_i ? lc_tval_i : tc_tval_i;
    intr    = lc_tc_mux_i ? lc_interrupt_i : tc_interrupt_i;

    payload = put(payload, pos, XLEN'(packet_format_i), 2); pos += 2;
    case (packet_format_i)
      F_SYNC: begin
        payload = put(payload, pos, XLEN'(packet_f_sync_subformat_i), 2); pos += 2;
        case (packet_f_sync_subformat_i)
          SF_START, SF_TRAP: begin
            payload = put(payload, pos, XLEN'(!(tc_branch_i && tc_branch_taken_i)), 1); pos += 1;
            payload = put(payload, pos, XLEN'(tc_priv_i), PRIV_LEN); pos += PRIV_LEN;
            if (!notime_i)    begin payload = put(payload, pos, XLEN'(tc_time_i), TIME_LEN); pos += TIME_LEN; end
            if (!nocontext_i) begin payload = put(payload, pos, XLEN'(tc_context_i), CONTEXT_LEN); pos += CONTEXT_LEN; end
            if (packet_f_sync_subformat_i == SF_TRAP) begin
              payload = put(payload, pos, XLEN'(cause), CAUSE_LEN); pos += CAUSE_LEN;
              payload = put(payload, pos, XLEN'(intr), 1); pos += 1;
              payload = put(payload, pos, XLEN'(thaddr_i), 1); pos += 1;
            end
            payload = put(payload, pos, addr, abits); pos += abits;
            if (packet_f_sync_subformat_i == SF_TRAP && !intr) begin
              payload = put(payload, pos, tval, XLEN); pos += XLEN;
            end
          end
          SF_CONTEXT: begin
            payload = put(payload, pos, XLEN'(tc_priv_i), PRIV_LEN); pos += PRIV_LEN;
            if (!notime_i)    begin payload = put(payload, pos, XLEN'(tc_time_i), TIME_LEN); pos += TIME_LEN; end
            if (!nocontext_i) begin payload = put(payload, pos, XLEN'(tc_context_i), CONTEXT_LEN); pos += CONTEXT_LEN; end
          end
          default: begin // SF_SUPPORT
            payload = put(payload, pos, XLEN'(tc_ienable_i), 1); pos += 1;
            payload = put(payload, pos, XLEN'(encoder_mode_i), 1); pos += 1;
            payload = put(payload, pos, XLEN'(qual_status_i), 2); pos += 2;
            payload = put(payload, pos, XLEN'(ioptions_i), 3); pos += 3;
            payload = put(payload, pos, '0, 2); pos += 2; // denable, dloss: no data trace
          end
        endcase
      end
      F_DIFF_DELTA: begin
        if (noaddr_i) begin
          payload = put(payload, pos, '0, 5); pos += 5;
          payload = put(payload, pos, XLEN'(branch_map_i), 31); pos += 31;
        end else begin
          payload = put(payload, pos, XLEN'(branches_i), 5); pos += 5;
          payload = put(payload, pos, XLEN'(branch_map_i), map_len(branches_i)); pos += map_len(branches_i);
          payload = put(payload, pos, addr, abits); pos += abits;
          payload = put(payload, pos, XLEN'(sign), 1); pos += 1;                      // notify
          payload = put(payload, pos, XLEN'(sign ^ updiscon_flag_i), 1); pos += 1;    // updiscon
          payload = put(payload, pos, XLEN'(sign ^ updiscon_flag_i), 1); pos += 1;    // irreport
        end
      end
      default: begin // F_ADDR_ONLY (format 0 is never chosen)
        payload = put(payload, pos, addr, abits); pos += abits;
        payload = put(payload, pos, XLEN'(sign), 1); pos += 1;
        payload = put(payload, pos, XLEN'(sign ^ updiscon_flag_i), 1); pos += 1;
        payload = put(payload, pos, XLEN'(sign ^ updiscon_flag_i), 1); pos += 1;
      end
    endcase
    nbits = pos;
  end

  assign branch_map_flush_o = valid_i &&
                              ((packet_format_i == F_DIFF_DELTA) || shallow_trace_i);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      packet_valid_o   <= 1'b0;
      packet_type_o    <= '0;
      packet_payload_o <= '0;
      payload_length_o <= '0;
      latest_address_q <= '0;
    end else begin
      packet_valid_o <= valid_i;
      if (valid_i) begin
        packet_type_o    <= {packet_format_i,
                             (packet_format_i == F_SYNC) ? packet_f_sync_subformat_i : SF_START};
        packet_payload_o <= payload;
        payload_length_o <= PLEN_LEN'((nbits + 7) / 8);
      end
      if (has_address) latest_address_q <= tc_address_i;
    end
  end

endmodule
