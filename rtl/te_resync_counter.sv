// te_resync_counter: decides when the encoder must send a resynchronisation packet.
//
// The counter counts either emitted packets (MODE = 0, up to N per cycle, one bit of
// packet_emitted_i per packet emitter) or clock cycles (MODE = 1) while tracing is
// enabled. et_resync_max_o is high while the count equals MAX_VALUE; gt_resync_max_o is
// high once it has gone past it and stays high until resync_rst_i, which the priority
// logic raises when it sends a synchronisation or trap packet. The count saturates at
// MAX_VALUE + 1, and nothing more is counted while gt_resync_max_o is high, because
// those packets or cycles belong to the period before the pending resynchronisation.
// The whole update, including up to N packets per cycle, takes one clock.
//
// The parameters N, MODE and MAX_VALUE and the saturation behaviour follow the design
// description; the default MAX_VALUE (255 packets) is this design's choice.
// resync_rst_i wins over counting in the same cycle. Active-low asynchronous reset.
module te_resync_counter #(
  parameter int unsigned N         = 1,
  parameter bit          MODE      = 1'b0,  // 0: packets, 1: clock cycles
  parameter int unsigned MAX_VALUE = 255
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         trace_enabled_i,
  input  logic [N-1:0] packet_emitted_i,
  input  logic         resync_rst_i,
  output logic         gt_resync_max_o,
  output logic         et_resync_max_o
);

  localparam int unsigned CW = $clog2(MAX_VALUE + 2);

  logic [CW-1:0] cnt_q, cnt_d;

  always_comb begin
    int unsigned inc;
    int unsigned sum;
    inc = 0;
    if (MODE) inc = 1;
    else for (int i = 0; i < N; i++) inc += int'(packet_emitted_i[i]);
    sum   = int'(cnt_q) + inc;
    cnt_d = cnt_q;
    if (resync_rst_i)               cnt_d = '0;
    else if (!trace_enabled_i)      cnt_d = cnt_q;
    else if (gt_resync_max_o)       cnt_d = cnt_q;
    else if (sum > MAX_VALUE + 1)   cnt_d = CW'(MAX_VALUE + 1);
    else                            cnt_d = CW'(sum);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) cnt_q <= '0;
    else         cnt_q <= cnt_d;
  end

  assign gt_resync_max_o = int'(cnt_q) > MAX_VALUE;
  assign et_resync_max_o = int'(cnt_q) == MAX_VALUE;

endmodule
