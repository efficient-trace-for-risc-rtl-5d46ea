// te_branch_map: counts qualified branches and records whether each was taken.
//
// Up to N branches (one per retirement port, port 0 oldest) are accepted per clock.
// Each branch appends one bit to a 31-bit map at the position given by the branch
// counter: 1 for not taken, 0 for taken; bit 0 is the oldest branch. When the counter
// reaches 31 the map is full: is_full_o asks for a branch-map packet and stays high
// until flush_i (from the packet emitter) clears the map. Branches that do not fit in
// a full map are kept in a small left-over store (status_left/valid_left) and are
// served first in a following cycle, so one cycle brings the whole state up to date.
// flush_i and new branches in the same cycle: the old contents are dropped first and
// the left-over and new branches then fill the empty map.
//
// Map polarity, 31-entry size, the left-over registers and the single-cycle update are
// the design description's. The left-over store holds 2*N branches (this design's
// choice); if the map stays full without a flush for several cycles, branches beyond
// that are dropped, which an assertion reports.
module te_branch_map #(
  parameter int unsigned N = 2
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic [N-1:0] valid_i,
  input  logic [N-1:0] branch_taken_i,
  input  logic         flush_i,
  output logic [4:0]   branches_o,
  output logic [30:0]  map_o,
  output logic         is_full_o,
  output logic         is_empty_o
);

  localparam int unsigned LEFT = 2 * N;

  logic [4:0]      branch_cnt_q, branch_cnt_d;
  logic [30:0]     branch_map_q, branch_map_d;
  logic [LEFT-1:0] status_left_q, status_left_d; // taken flag of each left-over branch
  logic [LEFT-1:0] valid_left_q, valid_left_d;   // packed from bit 0 (oldest)
  logic            dropped;

  always_comb begin
    int unsigned cnt;
    int unsigned nleft;
    cnt          = flush_i ? 0 : int'(branch_cnt_q);
    branch_map_d = flush_i ? '0 : branch_map_q;
    status_left_d = '0;
    valid_left_d  = '0;
    nleft   = 0;
    dropped = 1'b0;
    // left-over branches first, they are older than this cycle's
    for (int i = 0; i < LEFT; i++) begin
      if (valid_left_q[i]) begin
        if (cnt < 31) begin
          branch_map_d[cnt] = ~status_left_q[i];
          cnt++;
        end else if (nleft < LEFT) begin
          status_left_d[nleft] = status_left_q[i];
          valid_left_d[nleft]  = 1'b1;
          nleft++;
        end else dropped = 1'b1;
      end
    end
    for (int i = 0; i < N; i++) begin
      if (valid_i[i]) begin
        if (cnt < 31) begin
          branch_map_d[cnt] = ~branch_taken_i[i];
          cnt++;
        end else if (nleft < LEFT) begin
          status_left_d[nleft] = branch_taken_i[i];
          valid_left_d[nleft]  = 1'b1;
          nleft++;
        end else dropped = 1'b1;
      end
    end
    branch_cnt_d = 5'(cnt);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      branch_cnt_q  <= '0;
      branch_map_q  <= '0;
      status_left_q <= '0;
      valid_left_q  <= '0;
    end else begin
      branch_cnt_q  <= branch_cnt_d;
      branch_map_q  <= branch_map_d;
      status_left_q <= status_left_d;
      valid_left_q  <= valid_left_d;
    end
  end

  assign branches_o = branch_cnt_q;
  assign map_o      = branch_map_q;
  assign is_full_o  = branch_cnt_q == 5'd31;
  assign is_empty_o = branch_cnt_q == 5'd0;

  a_no_drop: assert property (@(posedge clk_i) disable iff (!rst_ni) !dropped)
    else $error("te_branch_map: left-over store overflowed, branches lost");

endmodule
