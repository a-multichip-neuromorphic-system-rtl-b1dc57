// neuromorphic_system: a spike-based vision system built from a silicon
// retina, a host computer and one IFAT (integrate-and-fire array transceiver).
//
// Structure (the block diagram of the system):
//   retina --+
//            +-- mux_demux == external AER bus == ifat_fpga == internal AER bus == 2 x iaf_chip
//   CPU -----+                                     |    |                            ^
//                                                 RAM  DAC --- equilibrium potential-+
// Every spike is an address event. The FPGA takes each event from the
// external bus or from a cortex chip, walks that neuron's synapse list in the
// lookup-table RAM and, for every synapse, sets the DAC to the synapse's
// equilibrium potential and activates the target neuron(s) with the stored
// weight, or forwards an event to the external bus (which reaches the CPU).
// Connectivity is therefore arbitrary and reprogrammable, and cortex spikes
// can feed back into the cortex.
//
// Ports: the retina and CPU AER buses (four-phase req/ack), the CPU's return
// bus, the RAM read port (the RAM is an off-board part), the fovea offset
// configuration and one-cycle monitoring flags. Everything is synchronous to
// `clk` except the AER handshakes, which are synchronised at each receiver.
// The I&F chips and the DAC are behavioural models of analog parts.
// Lint note: rst_n also disables the router's assertions during reset,
// which the linter reports as a net used synchronously and asynchronously.
module neuromorphic_system
  import ifat_pkg::*;
#(
  parameter int RET_ROWS   = 60,
  parameter int RET_COLS   = 80,
  parameter int CX_ROWS    = 40,
  parameter int CX_COLS    = 60,
  parameter int DAC_SETTLE = 4,
  parameter int VREF_MV    = 1000,
  parameter int VTH_MV     = 500
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // fovea position
  input  logic                  fovea_en,
  input  logic signed [6:0]     fovea_row_off,
  input  logic signed [7:0]     fovea_col_off,
  // silicon retina AER output
  input  logic                  or_req,
  input  logic [ADDR_W-1:0]     or_addr,
  output logic                  or_ack,
  // CPU AER output (events into the system)
  input  logic                  cpu_req,
  input  logic [ADDR_W-1:0]     cpu_addr,
  output logic                  cpu_ack,
  // CPU AER input (events out of the system)
  output logic                  cpu_out_req,
  output logic [ADDR_W-1:0]     cpu_out_addr,
  input  logic                  cpu_out_ack,
  // lookup-table RAM
  output logic                  ram_re,
  output logic [RAM_ADDR_W-1:0] ram_addr,
  input  logic                  ram_rvalid,
  input  logic [RAM_DATA_W-1:0] ram_rdata,
  // monitoring
  output logic                  st_line,
  output logic                  st_stop,
  output logic                  st_full,
  output logic                  st_drop,
  output logic                  st_settle,
  output logic                  st_fovea_drop
);
  logic                      ext_req, ext_ack, xo_req, xo_ack;
  logic [ADDR_W:0]           ext_data;
  logic [ADDR_W-1:0]         xo_data;
  logic [EREV_W-1:0]         dac_code;
  logic                      dac_wr;
  logic [15:0]               erev_mv;
  logic                      cx_in_req;
  cx_cmd_t                   cx_in_cmd;
  logic [1:0]                cx_in_ack, cx_out_req, cx_out_ack;
  logic [1:0][CX_CELL_W-1:0] cx_out_addr;

  mux_demux u_mux (
    .clk, .rst_n,
    .or_req, .or_addr, .or_ack,
    .cpu_req, .cpu_addr, .cpu_ack,
    .cpu_out_req, .cpu_out_addr, .cpu_out_ack,
    .ext_req, .ext_data, .ext_ack,
    .ifat_out_req(xo_req), .ifat_out_data(xo_data), .ifat_out_ack(xo_ack));

  ifat_fpga #(.RET_ROWS(RET_ROWS), .RET_COLS(RET_COLS), .DAC_SETTLE(DAC_SETTLE)) u_fpga (
    .clk, .rst_n,
    .fovea_en, .fovea_row_off, .fovea_col_off,
    .ext_in_req(ext_req), .ext_in_data(ext_data), .ext_in_ack(ext_ack),
    .ext_out_req(xo_req), .ext_out_data(xo_data), .ext_out_ack(xo_ack),
    .ram_re, .ram_addr, .ram_rvalid, .ram_rdata,
    .dac_code, .dac_wr,
    .cx_in_req, .cx_in_cmd, .cx_in_ack,
    .cx_out_req, .cx_out_addr, .cx_out_ack,
    .st_line, .st_stop, .st_full, .st_drop, .st_settle, .st_fovea_drop);

  ifat_dac #(.VREF_MV(VREF_MV)) u_dac (.code(dac_code), .wr(dac_wr), .vout_mv(erev_mv));

  for (genvar c = 0; c < 2; c++) begin : g_chip
    iaf_chip #(.CHIP_ID(c[0]), .ROWS(CX_ROWS), .COLS(CX_COLS), .VTH_MV(VTH_MV)) u_chip (
      .clk, .rst_n,
      .in_req(cx_in_req), .in_cmd(cx_in_cmd), .in_ack(cx_in_ack[c]),
      .erev_mv,
      .out_req(cx_out_req[c]), .out_addr(cx_out_addr[c]), .out_ack(cx_out_ack[c]));
  end
endmodule
