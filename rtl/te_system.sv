// te_system: branch-trace subsystem for one CVA6 core.
//
// The core's commit-stage, branch-unit and CSR signals enter cva6_te_connector, which
// groups the committed instructions into E-Trace blocks (up to NRET per cycle); the
// blocks go straight into trace_encoder, which filters them, decides which packets are
// needed and emits compressed packets with their length in bytes for an encapsulator.
// Software configures and enables the encoder through the APB port. In lossless mode
// stall_o asks the core to stop committing while the encapsulator is busy; the
// encoder then freezes and holds the connector, whose FIFOs absorb the instructions
// still in flight. The core itself
// is outside this module: its signals are ports. In a multicore system one te_system
// is instantiated per core.
//
// The structure (core -> connector -> encoder) follows the design description. The
// trap-vector input of the encoder's filters is tied to zero because the connector
// does not provide it; time and context are inputs of this module.
module te_system
  import te_pkg::*;
#(
  parameter int unsigned NRET       = 2,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned RESYNC_MAX = 255
) (
  input  logic                   clk_i,
  input  logic                   rst_ni,
  // CVA6 commit stage, branch unit, CSR file
  input  logic [NRET-1:0]        commit_valid_i,
  input  logic [NRET-1:0][XLEN-1:0] commit_pc_i,
  input  op_e  [NRET-1:0]        commit_op_i,
  input  logic [NRET-1:0]        commit_is_compressed_i,
  input  logic                   ex_valid_i,
  input  logic [CAUSE_LEN-1:0]   ex_cause_i,
  input  logic [XLEN-1:0]        ex_tval_i,
  input  logic                   interrupt_i,
  input  logic                   branch_valid_i,
  input  logic                   branch_is_taken_i,
  input  logic [PRIV_LEN-1:0]    priv_lvl_i,
  input  logic [TIME_LEN-1:0]    time_i,
  input  logic [CONTEXT_LEN-1:0] context_i,
  // configuration
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
  // packets
  input  logic                   encapsulator_ready_i,
  output logic                   packet_valid_o,
  output logic [3:0]             packet_type_o,
  output logic [PAYLOAD_LEN-1:0] packet_payload_o,
  output logic [PLEN_LEN-1:0]    payload_length_o,
  output logic                   stall_o
);

  logic [NRET-1:0]      blk_valid;
  block_t [NRET-1:0]    blk;
  logic [CAUSE_LEN-1:0] blk_cause;
  logic [XLEN-1:0]      blk_tval;
  logic [PRIV_LEN-1:0]  blk_priv;
  logic                 enc_hold;

  cva6_te_connector #(.NRET(NRET), .DEPTH(FIFO_DEPTH)) u_connector (
    .clk_i, .rst_ni, .valid_i(commit_valid_i), .pc_i(commit_pc_i), .op_i(commit_op_i),
    .is_compressed_i(commit_is_compressed_i), .ex_valid_i, .cause_i(ex_cause_i),
    .tval_i(ex_tval_i), .interrupt_i, .branch_valid_i, .is_taken_i(branch_is_taken_i),
    .priv_lvl_i, .hold_i(enc_hold), .valid_o(blk_valid), .block_o(blk), .cause_o(blk_cause),
    .tval_o(blk_tval), .priv_o(blk_priv)
  );

  trace_encoder #(.N(NRET), .RESYNC_MAX(RESYNC_MAX)) u_encoder (
    .clk_i, .rst_ni, .psel_i, .penable_i, .pwrite_i, .paddr_i, .pwdata_i, .prdata_o,
    .pready_o, .pslverr_o, .trace_req_on_i, .trace_req_off_i,
    .valid_i(blk_valid), .block_i(blk), .cause_i(blk_cause), .tval_i(blk_tval),
    .priv_i(blk_priv), .tvec_i('0), .time_i, .context_i,
    .encapsulator_ready_i, .packet_valid_o, .packet_type_o, .packet_payload_o,
    .payload_length_o, .stall_o, .hold_o(enc_hold)
  );

endmodule
