// te_filter: decides whether an input block is "qualified", i.e. is to be traced.
//
// Five comparators look at the block's trap cause, trap vector, trap value, privilege
// level and instruction address. Each one is programmed from te_reg: when its filter
// bit is clear it passes everything; otherwise it passes values inside
// [lower, upper] (mode 0) or equal to match (mode 1). The block is qualified when all
// five comparators pass and tracing is enabled. Purely combinational; the result is
// registered by the encoder's input pipeline, where it becomes the "next" stage.
//
// The five comparators, their settings (filter, upper, lower, match, mode) and the
// final AND with trace enable are taken from the design description. The meaning of
// the mode bit and the inclusive range are this design's choices. The trap vector is
// not produced by the CVA6 connector; the encoder ties it to zero, so its comparator
// is only useful with its filter bit clear or with a range that contains zero.
module te_filter
  import te_pkg::*;
(
  input  cmp_cfg_t              cause_cfg_i,
  input  cmp_cfg_t              tvec_cfg_i,
  input  cmp_cfg_t              tval_cfg_i,
  input  cmp_cfg_t              priv_lvl_cfg_i,
  input  cmp_cfg_t              iaddr_cfg_i,
  input  logic [CAUSE_LEN-1:0]  cause_i,
  input  logic [XLEN-1:0]       tvec_i,
  input  logic [XLEN-1:0]       tval_i,
  input  logic [PRIV_LEN-1:0]   priv_lvl_i,
  input  logic [XLEN-1:0]       iaddr_i,
  input  logic                  trace_enable_i,
  output logic                  nc_qualified_o
);

  function automatic logic compare(cmp_cfg_t cfg, logic [XLEN-1:0] value);
    if (!cfg.filter) return 1'b1;
    if (cfg.mode)    return value == cfg.match;
    return (value >= cfg.lower) && (value <= cfg.upper);
  endfunction

  logic cause_ok, tvec_ok, tval_ok, priv_ok, iaddr_ok;

  assign cause_ok = compare(cause_cfg_i, XLEN'(cause_i));
  assign tvec_ok  = compare(tvec_cfg_i, tvec_i);
  assign tval_ok  = compare(tval_cfg_i, tval_i);
  assign priv_ok  = compare(priv_lvl_cfg_i, XLEN'(priv_lvl_i));
  assign iaddr_ok = compare(iaddr_cfg_i, iaddr_i);

  assign nc_qualified_o = cause_ok & tvec_ok & tval_ok & priv_ok & iaddr_ok & trace_enable_i;

endmodule
