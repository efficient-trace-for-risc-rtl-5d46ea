// tb_te_resync_counter: self-checking test of te_resync_counter.
// Random packet-emitted pulses on two ports, random enables and resets; a counter
// model in the testbench predicts the equal/greater-than flags every cycle, including
// saturation at MAX_VALUE + 1 and ignoring counts while the request is pending. A
// second instance in cycle mode is checked for reaching MAX_VALUE after exactly
// MAX_VALUE enabled cycles.
module tb_te_resync_counter;
  localparam int MAXV = 5;
  logic clk = 0, rst_n = 0;
  logic en, rst_c;
  logic [1:0] pe;
  logic gt, et, gt_c, et_c;
  int checks = 0, failures = 0;
  int model, cyc_cnt;

  always #5 clk = ~clk;

  te_resync_counter #(.N(2), .MODE(1'b0), .MAX_VALUE(MAXV)) dut (
    .clk_i(clk), .rst_ni(rst_n), .trace_enabled_i(en), .packet_emitted_i(pe),
    .resync_rst_i(rst_c), .gt_resync_max_o(gt), .et_resync_max_o(et));
  te_resync_counter #(.N(1), .MODE(1'b1), .MAX_VALUE(MAXV)) dut_cyc (
    .clk_i(clk), .rst_ni(rst_n), .trace_enabled_i(1'b1), .packet_emitted_i(1'b0),
    .resync_rst_i(1'b0), .gt_resync_max_o(gt_c), .et_resync_max_o(et_c));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; pe = 0; rst_c = 0; model = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // cycle mode: et after exactly MAXV cycles
    cyc_cnt = 0;
    while (!et_c) begin @(posedge clk); #1; cyc_cnt++; end
    checks++; if (cyc_cnt != MAXV) begin failures++; $display("cycle mode reached max after %0d", cyc_cnt); end
    @(posedge clk); #1; checks++; if (!gt_c) begin failures++; $display("cycle mode gt missing"); end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en = ($urandom % 8) != 0;
      pe = 2'($urandom);
      rst_c = ($urandom % 12) == 0;
      @(posedge clk); #1;
      if (rst_c) model = 0;
      else if (!en || model > MAXV) model = model;
      else begin
        model += int'(pe[0]) + int'(pe[1]);
        if (model > MAXV + 1) model = MAXV + 1;
      end
      checks++;
      if (gt != (model > MAXV) || et != (model == MAXV)) begin
        failures++; $display("t=%0d model=%0d gt=%b et=%b", t, model, gt, et);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
