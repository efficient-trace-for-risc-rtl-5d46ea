// tb_itype_detector: exhaustive self-checking test of itype_detector over every
// combination of commit valid, operation class, trap, interrupt and branch outcome.
module tb_itype_detector;
  import te_pkg::*;
  logic v, ex, intr, tk;
  op_e op;
  logic [2:0] it;
  int checks = 0, failures = 0;

  itype_detector dut (.valid_i(v), .op_i(op), .ex_valid_i(ex), .interrupt_i(intr),
                      .branch_taken_i(tk), .itype_o(it));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [2:0] exp;
    for (int c = 0; c < 5 * 16; c++) begin
      op = op_e'(c / 16); {v, ex, intr, tk} = 4'(c);
      #1;
      if (ex) exp = intr ? 3'd2 : 3'd1;
      else if (!v) exp = 3'd0;
      else if (op == OP_BRANCH) exp = tk ? 3'd5 : 3'd4;
      else if (op == OP_JALR) exp = 3'd6;
      else if (op == OP_ERET) exp = 3'd3;
      else exp = 3'd0;
      checks++;
      if (it !== exp) begin failures++; $display("op=%0d v=%b ex=%b int=%b tk=%b -> %0d exp %0d", op, v, ex, intr, tk, it, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
