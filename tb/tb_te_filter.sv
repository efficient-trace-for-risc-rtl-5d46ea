// tb_te_filter: self-checking test of te_filter with random comparator settings.
// Values are drawn near the programmed bounds so both in-range and out-of-range,
// match and mismatch cases occur; the expected qualification is computed in the
// testbench from the comparator rules (range inclusive, match exact, disabled passes).
module tb_te_filter;
  import te_pkg::*;
  cmp_cfg_t c [5];
  logic [63:0] val [5];
  logic en, q;
  int checks = 0, failures = 0, npass = 0;

  te_filter dut (.cause_cfg_i(c[0]), .tvec_cfg_i(c[1]), .tval_cfg_i(c[2]), .priv_lvl_cfg_i(c[3]),
    .iaddr_cfg_i(c[4]), .cause_i(val[0]), .tvec_i(val[1]), .tval_i(val[2]), .priv_lvl_i(val[3][1:0]),
    .iaddr_i(val[4]), .trace_enable_i(en), .nc_qualified_o(q));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic exp, ok;
    for (int t = 0; t < 5000; t++) begin
      en = ($urandom % 10) != 0;
      for (int k = 0; k < 5; k++) begin
        logic [63:0] base;
        base = (k == 3) ? 64'($urandom % 4) : {32'($urandom % 4), 32'($urandom % 64)};
        c[k].filter = ($urandom % 3) == 0;
        c[k].mode   = $urandom % 2;
        c[k].lower  = base;
        c[k].upper  = base + 64'($urandom % 8);
        c[k].match  = base;
        val[k]      = base + 64'($urandom % 10) - 64'd1;
        if (k == 3) val[k] = 64'($urandom % 4);
      end
      #1;
      exp = en;
      for (int k = 0; k < 5; k++) begin
        if (!c[k].filter) ok = 1;
        else if (c[k].mode) ok = (val[k] == c[k].match);
        else ok = (val[k] >= c[k].lower) && (val[k] <= c[k].upper);
        exp &= ok;
      end
      checks++;
      if (q !== exp) begin failures++; $display("t=%0d q=%b exp=%b", t, q, exp); end
      if (q) npass++;
    end
    checks++; if (npass == 0 || npass == 5000) begin failures++; $display("no variety"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
