// fovea_remap: moves the fovea of the spatial acuity modulation network in
// the address domain.
//
// Rather than reprogramming the synapse table for every fovea position, the
// row and column fields of each incoming retina address ({row, col}) have a
// fixed signed offset added to them. A shifted address that falls outside the
// ROWS x COLS retina has no synapse list and is flagged `out_drop`, so the
// event is discarded. With `enable` low the address passes unchanged.
// Combinational. The offset arithmetic is the document's; the signed offset
// widths and the drop of out-of-range addresses are this design's choices.
module fovea_remap #(
  parameter int ROWS  = 60,
  parameter int COLS  = 80,
  parameter int ROW_W = 6,
  parameter int COL_W = 7
) (
  input  logic                   enable,
  input  logic signed [ROW_W:0]  row_off,
  input  logic signed [COL_W:0]  col_off,
  input  logic [ROW_W+COL_W-1:0] in_addr,
  output logic [ROW_W+COL_W-1:0] out_addr,
  output logic                   out_drop
);
  logic signed [ROW_W+1:0] row_n;
  logic signed [COL_W+1:0] col_n;

  always_comb begin
    row_n = $signed({2'b00, in_addr[ROW_W+COL_W-1:COL_W]}) + row_off;
    col_n = $signed({2'b00, in_addr[COL_W-1:0]}) + col_off;
    if (enable) begin
      out_addr = {row_n[ROW_W-1:0], col_n[COL_W-1:0]};
      out_drop = (row_n < 0) || (row_n >= $signed((ROW_W+2)'(ROWS))) ||
                 (col_n < 0) || (col_n >= $signed((COL_W+2)'(COLS)));
    end else begin
      out_addr = in_addr;
      out_drop = 1'b0;
    end
  end
endmodule
