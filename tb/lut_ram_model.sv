// lut_ram_model: behavioural model of the IFAT's lookup-table memory, an
// off-board part. 2^AW words of DW bits; a read strobe `re` with `addr`
// returns the word LAT cycles later with `rvalid`. Testbenches load it by
// writing `mem` hierarchically.
module lut_ram_model #(
  parameter int AW  = 22,
  parameter int DW  = 36,
  parameter int LAT = 2
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] addr,
  output logic          rvalid,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];
  logic [LAT-1:0] vpipe = '0;
  logic [DW-1:0]  dpipe [LAT];

  always_ff @(posedge clk) begin
    vpipe    <= {vpipe[LAT-2:0], re};
    dpipe[0] <= mem[addr];
    for (int i = 1; i < LAT; i++) dpipe[i] <= dpipe[i-1];
  end
  assign rvalid = vpipe[LAT-1];
  assign rdata  = dpipe[LAT-1];
endmodule
