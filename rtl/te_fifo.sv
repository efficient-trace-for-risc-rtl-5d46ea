// te_fifo: synchronous first-in first-out buffer used by the CVA6 connector as an
// elastic buffer between the commit ports and the one-instruction-per-cycle block FSM.
//
// WIDTH-bit entries, DEPTH entries (a power of two). push_i writes data_i when not
// full; pop_i drops the head when not empty; both may happen in one cycle. The head is
// visible on data_o with no latency (show-ahead). empty_o and full_o are registered
// state. Pushing into a full FIFO is an error and is reported by an assertion. Storage
// is a register array, cleared by reset, with read and write pointers one bit wider
// than the index.
module te_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             push_i,
  input  logic [WIDTH-1:0] data_i,
  input  logic             pop_i,
  output logic [WIDTH-1:0] data_o,
  output logic             empty_o,
  output logic             full_o
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem_q [DEPTH];
  logic [AW:0]      wptr_q, rptr_q;
  logic             do_push, do_pop;

  assign empty_o = wptr_q == rptr_q;
  assign full_o  = (wptr_q[AW] != rptr_q[AW]) && (wptr_q[AW-1:0] == rptr_q[AW-1:0]);
  assign do_push = push_i & ~full_o;
  assign do_pop  = pop_i & ~empty_o;
  assign data_o  = mem_q[rptr_q[AW-1:0]];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      mem_q  <= '{default: '0};
      wptr_q <= '0;
      rptr_q <= '0;
    end else begin
      if (do_push) mem_q[wptr_q[AW-1:0]] <= data_i;
      if (do_push) wptr_q <= wptr_q + 1'b1;
      if (do_pop)  rptr_q <= rptr_q + 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk_i) disable iff (!rst_ni) !(push_i && full_o))
    else $error("te_fifo: push into full FIFO");

endmodule
