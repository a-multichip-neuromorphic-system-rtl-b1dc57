// ifat_fpga: the event-routing logic of the IFAT board.
//
// Three event sources share one synapse-table walker (lut_router):
//  * the external AER bus (retina or CPU, via the MUX/DEMUX). Its 14-bit word
//    is {src, addr}: src 0 marks a retina event, whose {row, col} address goes
//    through fovea_remap first (and is dropped if shifted off the retina);
//    src 1 marks a CPU event, which is used as it is. Both index the table as
//    {1'b0, addr}.
//  * the output AER buses of the two I&F chips; a spike of neuron {row, col}
//    on chip c indexes the table as {1'b1, c, row, col}, which closes
//    recurrent loops (feedback) inside the silicon cortex.
// A round-robin arbiter merges the three. The walker drives the DAC code and
// DAC write strobe, the internal AER bus to the cortex (one command word seen
// by both chips; a command addressed to both waits until both acknowledge),
// and the external AER output bus.
// All AER buses use the four-phase handshake of aer_rx / aer_tx; everything
// else runs on `clk`. The partition follows the document's block diagram;
// the handshakes, the source tag and the table-index layout are this design's.
// Lint notes: rst_n also disables the assertions inside lut_router during
// reset, which the linter reports as a net used both
// synchronously and asynchronously; the arbiter's grant vector is not needed
// and is left unread.
module ifat_fpga
  import ifat_pkg::*;
#(
  parameter int RET_ROWS   = 60,
  parameter int RET_COLS   = 80,
  parameter int DAC_SETTLE = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration: fovea offset
  input  logic                  fovea_en,
  input  logic signed [6:0]     fovea_row_off,
  input  logic signed [7:0]     fovea_col_off,
  // external AER bus, incoming {src, addr}
  input  logic                  ext_in_req,
  input  logic [ADDR_W:0]       ext_in_data,
  output logic                  ext_in_ack,
  // external AER bus, outgoing
  output logic                  ext_out_req,
  output logic [ADDR_W-1:0]     ext_out_data,
  input  logic                  ext_out_ack,
  // lookup-table RAM
  output logic                  ram_re,
  output logic [RAM_ADDR_W-1:0] ram_addr,
  input  logic                  ram_rvalid,
  input  logic [RAM_DATA_W-1:0] ram_rdata,
  // DAC
  output logic [EREV_W-1:0]     dac_code,
  output logic                  dac_wr,
  // internal AER bus to the cortex
  output logic                  cx_in_req,
  output cx_cmd_t               cx_in_cmd,
  input  logic [1:0]            cx_in_ack,     // one per chip
  // internal AER buses from the cortex chips
  input  logic [1:0]            cx_out_req,
  input  logic [1:0][CX_CELL_W-1:0] cx_out_addr,
  output logic [1:0]            cx_out_ack,
  // event flags
  output logic                  st_line,
  output logic                  st_stop,
  output logic                  st_full,
  output logic                  st_drop,
  output logic                  st_settle,
  output logic                  st_fovea_drop
);
  // ---- external input -------------------------------------------------------
  logic              xr_valid, xr_ready;
  logic [ADDR_W:0]   xr_data;
  logic [ADDR_W-1:0] remapped;
  logic              off_retina, drop;

  aer_rx #(.W(ADDR_W + 1)) u_ext_rx (
    .clk, .rst_n, .aer_req(ext_in_req), .aer_data(ext_in_data), .aer_ack(ext_in_ack),
    .m_valid(xr_valid), .m_data(xr_data), .m_ready(xr_ready));

  fovea_remap #(.ROWS(RET_ROWS), .COLS(RET_COLS), .ROW_W(6), .COL_W(7)) u_fovea (
    .enable(fovea_en), .row_off(fovea_row_off), .col_off(fovea_col_off),
    .in_addr(xr_data[ADDR_W-1:0]), .out_addr(remapped), .out_drop(off_retina));

  assign drop          = !xr_data[ADDR_W] && off_retina;
  assign st_fovea_drop = xr_valid && drop;

  // ---- cortex outputs ---------------------------------------------------------
  logic [1:0]                 cr_valid, cr_ready;
  logic [1:0][CX_CELL_W-1:0]  cr_data;

  for (genvar c = 0; c < 2; c++) begin : g_cx_rx
    aer_rx #(.W(CX_CELL_W)) u_rx (
      .clk, .rst_n, .aer_req(cx_out_req[c]), .aer_data(cx_out_addr[c]), .aer_ack(cx_out_ack[c]),
      .m_valid(cr_valid[c]), .m_data(cr_data[c]), .m_ready(cr_ready[c]));
  end

  // ---- merge ---------------------------------------------------------------
  logic [2:0]                 a_valid, a_ready;
  logic [2:0][INDEX_W-1:0]    a_data;
  logic                       ev_valid, ev_ready;
  logic [INDEX_W-1:0]         ev_index;
  logic [1:0]                 grant;

  assign a_valid   = {cr_valid[1], cr_valid[0], xr_valid && !drop};
  assign a_data[0] = {1'b0, xr_data[ADDR_W] ? xr_data[ADDR_W-1:0] : remapped};
  assign a_data[1] = {1'b1, 1'b0, cr_data[0]};
  assign a_data[2] = {1'b1, 1'b1, cr_data[1]};
  assign xr_ready  = drop ? 1'b1 : a_ready[0];
  assign cr_ready  = a_ready[2:1];

  aer_arbiter #(.N(3), .W(INDEX_W)) u_arb (
    .clk, .rst_n, .s_valid(a_valid), .s_data(a_data), .s_ready(a_ready),
    .m_valid(ev_valid), .m_data(ev_index), .m_grant(grant), .m_ready(ev_ready));

  // ---- synapse-table walker ---------------------------------------------------
  logic        cx_valid, cx_ready, x_valid, x_ready;
  cx_cmd_t     cx_cmd;
  logic [ADDR_W-1:0] x_addr;

  lut_router #(.DAC_SETTLE(DAC_SETTLE)) u_router (
    .clk, .rst_n,
    .ev_valid, .ev_index, .ev_ready,
    .ram_re, .ram_addr, .ram_rvalid, .ram_rdata,
    .dac_code, .dac_wr,
    .cx_valid, .cx_cmd, .cx_ready,
    .ext_valid(x_valid), .ext_addr(x_addr), .ext_ready(x_ready),
    .st_line, .st_stop, .st_full, .st_drop, .st_settle);

  // ---- outputs --------------------------------------------------------------
  // Chips addressed by the command on the internal bus; the combined
  // acknowledge rises when all of them have acknowledged and falls when all
  // acknowledges are low again.
  logic [1:0] sel;
  logic       cx_ack;
  assign sel    = (cx_in_cmd.sel == SEL_ALL) ? 2'b11 : (cx_in_cmd.chip ? 2'b10 : 2'b01);
  assign cx_ack = cx_in_req ? &(cx_in_ack | ~sel) : |cx_in_ack;

  aer_tx #(.W(CX_CMD_W)) u_cx_tx (
    .clk, .rst_n, .s_valid(cx_valid), .s_data(cx_cmd), .s_ready(cx_ready),
    .aer_req(cx_in_req), .aer_data(cx_in_cmd), .aer_ack(cx_ack));

  aer_tx #(.W(ADDR_W)) u_ext_tx (
    .clk, .rst_n, .s_valid(x_valid), .s_data(x_addr), .s_ready(x_ready),
    .aer_req(ext_out_req), .aer_data(ext_out_data), .aer_ack(ext_out_ack));
endmodule
