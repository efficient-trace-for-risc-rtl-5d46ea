// te_reg: configuration registers of the trace encoder, trace enable and clock gate.
//
// Software programs the encoder through a 32-bit APB slave (zero wait states). The
// registers hold the run-time options (trace_activated, nocontext, notime,
// encoder_mode, configuration = address mode, lossless_trace, shallow_trace) and the
// settings of the five filter comparators. trace_enable is a flip-flop that is set by
// a trace-on request, accepted only while the encoder is activated and the
// encapsulator is ready, and cleared by a trace-off request or by de-activation.
// clk_gated_o runs only while trace_activated is set and no stall is requested
// (stall_i: lossless mode with a busy encapsulator); its enable is sampled on the
// falling clock edge so the gated clock has no glitches, and hold_o shows the sampled
// stall so that logic on the free-running clock can pause in step. stall_i must be
// stable by the falling edge.
//
// Register map (word offsets, byte address = 4 * word):
//   0  CTRL   [0] trace_activated [1] nocontext [2] notime [3] encoder_mode
//             [6:4] configuration (0 delta address, 1 full address)
//             [7] lossless_trace [8] shallow_trace            reset: nocontext = notime = 1
//   1  FILTER [2k] filter enable, [2k+1] mode of comparator k
//             (k = 0 cause, 1 tvec, 2 tval, 3 priv_lvl, 4 iaddr)
//   2+6k .. 7+6k  comparator k: upper lo/hi, lower lo/hi, match lo/hi (64-bit values)
//   32 STATUS (read only) [0] trace_enable
// Accesses to other words return pslverr.
//
// The list of stored settings, the trace_enable flip-flop, the trace-on/off requests
// and the clock gate driven by trace_activated follow the design description; the bus
// timing, the register map and the reset values are this design's choices.
module te_reg
  import te_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  // APB slave
  input  logic        psel_i,
  input  logic        penable_i,
  input  logic        pwrite_i,
  input  logic [7:0]  paddr_i,
  input  logic [31:0] pwdata_i,
  output logic [31:0] prdata_o,
  output logic        pready_o,
  output logic        pslverr_o,
  // trace on/off requests and encapsulator status
  input  logic        trace_req_off_i,
  input  logic        trace_req_on_i,
  input  logic        encapsulator_ready_i,
  // to te_priority / te_packet_emitter
  output logic        trace_enable_o,
  output logic        trace_activated_o,
  output logic        nocontext_o,
  output logic        notime_o,
  output logic        encoder_mode_o,
  output logic [2:0]  configuration_o,
  output logic        shallow_trace_o,
  output logic        lossless_trace_o,
  input  logic        stall_i,
  output logic        clk_gated_o,
  output logic        hold_o,
  // to te_filter
  output cmp_cfg_t    cause_cfg_o,
  output cmp_cfg_t    tvec_cfg_o,
  output cmp_cfg_t    tval_cfg_o,
  output cmp_cfg_t    priv_lvl_cfg_o,
  output cmp_cfg_t    iaddr_cfg_o
);

  localparam int unsigned NWORDS = 32;
  localparam logic [31:0] CTRL_RESET = 32'h0000_0006;

  logic [31:0] regs_q [NWORDS];
  logic        trace_enable_q;
  logic        gate_en_q, hold_q;
  logic [5:0]  widx;
  logic        access, in_range;

  assign widx     = paddr_i[7:2];
  assign access   = psel_i & penable_i;
  assign in_range = (widx < 6'(NWORDS)) || (widx == 6'd32);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < NWORDS; i++) regs_q[i] <= '0;
      regs_q[0] <= CTRL_RESET;
    end else if (access && pwrite_i && (widx < 6'(NWORDS))) begin
      regs_q[widx[4:0]] <= pwdata_i;
    end
  end

  always_comb begin
    prdata_o = '0;
    if (widx == 6'd32)            prdata_o = {31'b0, trace_enable_q};
    else if (widx < 6'(NWORDS))   prdata_o = regs_q[widx[4:0]];
  end
  assign pready_o  = 1'b1;
  assign pslverr_o = access & ~in_range;

  assign trace_activated_o = regs_q[0][0];
  assign nocontext_o       = regs_q[0][1];
  assign notime_o          = regs_q[0][2];
  assign encoder_mode_o    = regs_q[0][3];
  assign configuration_o   = regs_q[0][6:4];
  assign lossless_trace_o  = regs_q[0][7];
  assign shallow_trace_o   = regs_q[0][8];

  function automatic cmp_cfg_t cfg_of(int k);
    cmp_cfg_t c;
    c.filter = regs_q[1][2*k];
    c.mode   = regs_q[1][2*k+1];
    c.upper  = {regs_q[3+6*k], regs_q[2+6*k]};
    c.lower  = {regs_q[5+6*k], regs_q[4+6*k]};
    c.match  = {regs_q[7+6*k], regs_q[6+6*k]};
    return c;
  endfunction

  assign cause_cfg_o    = cfg_of(0);
  assign tvec_cfg_o     = cfg_of(1);
  assign tval_cfg_o     = cfg_of(2);
  assign priv_lvl_cfg_o = cfg_of(3);
  assign iaddr_cfg_o    = cfg_of(4);

  // trace enable management
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                                   trace_enable_q <= 1'b0;
    else if (!trace_activated_o || trace_req_off_i) trace_enable_q <= 1'b0;
    else if (trace_req_on_i && encapsulator_ready_i) trace_enable_q <= 1'b1;
  end
  assign trace_enable_o = trace_enable_q;

  // clock gate: enable captured while the clock is low
  always_ff @(negedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      gate_en_q <= 1'b0;
      hold_q    <= 1'b0;
    end else begin
      gate_en_q <= trace_activated_o & ~stall_i;
      hold_q    <= trace_activated_o & stall_i;
    end
  end
  assign clk_gated_o = clk_i & gate_en_q;
  assign hold_o      = hold_q;

endmodule
