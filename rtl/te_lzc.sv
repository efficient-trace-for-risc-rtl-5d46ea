// te_lzc: leading-zero counter used by the address compression of te_priority.
//
// count_o is the number of consecutive zero bits starting at the most significant bit
// of data_i, WIDTH when data_i is zero. Combinational; the counter scans from the MSB
// down. Counting leading ones is done by feeding the complemented address.
module te_lzc #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0]               data_i,
  output logic [$clog2(WIDTH+1)-1:0]     count_o
);

  always_comb begin
    logic found;
    count_o = '0;
    found   = 1'b0;
    for (int i = WIDTH - 1; i >= 0; i--) begin
      if (!found) begin
        if (data_i[i]) found = 1'b1;
        else           count_o = count_o + 1'b1;
      end
    end
  end

endmodule
