// itype_detector: E-Trace instruction type of one committed instruction.
//
// Combinational. An exception or interrupt signalled in the same cycle wins (itype 1
// or 2, for every port, since the trap signals are shared); otherwise the operation
// class of the committed instruction decides: conditional branch -> 4 (not taken) or
// 5 (taken, from branch_taken_i), indirect jump -> 6 (uninferable), exception return
// -> 3, everything else, direct jumps included, -> 0. A port with no committed
// instruction and no trap gives 0.
//
// That the itype comes from the operation and the trap signals follows the design
// description; branch_taken_i is the branch outcome registered by the connector
// because the core resolves branches before it commits them. The operation classes
// (te_pkg::op_e) stand for the core's operation codes and are this design's choice.
module itype_detector
  import te_pkg::*;
(
  input  logic                 valid_i,
  input  op_e                  op_i,
  input  logic                 ex_valid_i,
  input  logic                 interrupt_i,
  input  logic                 branch_taken_i,
  output logic [ITYPE_LEN-1:0] itype_o
);

  always_comb begin
    itype_o = IT_STD;
    if (ex_valid_i)      itype_o = interrupt_i ? IT_INT : IT_EXC;
    else if (valid_i) begin
      case (op_i)
        OP_BRANCH: itype_o = branch_taken_i ? IT_BR_TAKEN : IT_BR_NTAKEN;
        OP_JALR:   itype_o = IT_UNINF_JUMP;
        OP_ERET:   itype_o = IT_ERET;
        default:   itype_o = IT_STD;
      endcase
    end
  end

endmodule
