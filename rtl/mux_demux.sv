// mux_demux: the board between the external devices and the IFAT.
//
// MUX direction: address events from the silicon retina (OR) and from the
// host computer (CPU) arrive on two four-phase AER buses. Each is received
// (aer_rx), the two streams are merged by a round-robin arbiter, tagged with
// their source (bit 13: 0 retina, 1 CPU) and sent on the single external AER
// bus to the IFAT (aer_tx).
// DEMUX direction: the only listener on the return path is the CPU, so events
// the IFAT sends out are wired straight through to the CPU's input bus.
// Timing: an event crosses the MUX in about ten clock cycles when the IFAT
// acknowledges at once. The document names the MUX/DEMUX and shows its
// connections; the arbitration, the source tag and the clocked implementation
// are this design's choices.
// Lint and synthesis notes: 15 output bits (cpu_out_req/addr, ifat_out_ack)
// come straight from inputs because the DEMUX is a wire; the arbiter's
// one-hot grant output is not needed here and is left unread.
module mux_demux
  import ifat_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // retina
  input  logic              or_req,
  input  logic [ADDR_W-1:0] or_addr,
  output logic              or_ack,
  // CPU, events to the IFAT
  input  logic              cpu_req,
  input  logic [ADDR_W-1:0] cpu_addr,
  output logic              cpu_ack,
  // CPU, events from the IFAT
  output logic              cpu_out_req,
  output logic [ADDR_W-1:0] cpu_out_addr,
  input  logic              cpu_out_ack,
  // external AER bus to the IFAT
  output logic              ext_req,
  output logic [ADDR_W:0]   ext_data,
  input  logic              ext_ack,
  // external AER bus from the IFAT
  input  logic              ifat_out_req,
  input  logic [ADDR_W-1:0] ifat_out_data,
  output logic              ifat_out_ack
);
  logic [1:0]              r_valid, r_ready;
  logic [1:0][ADDR_W-1:0]  r_data;
  logic [1:0][ADDR_W:0]    tag_data;
  logic                    m_valid, m_ready;
  logic [ADDR_W:0]         m_data;
  logic                    m_grant;

  aer_rx #(.W(ADDR_W)) u_or_rx (
    .clk, .rst_n, .aer_req(or_req), .aer_data(or_addr), .aer_ack(or_ack),
    .m_valid(r_valid[0]), .m_data(r_data[0]), .m_ready(r_ready[0]));
  aer_rx #(.W(ADDR_W)) u_cpu_rx (
    .clk, .rst_n, .aer_req(cpu_req), .aer_data(cpu_addr), .aer_ack(cpu_ack),
    .m_valid(r_valid[1]), .m_data(r_data[1]), .m_ready(r_ready[1]));

  assign tag_data[0] = {1'b0, r_data[0]};
  assign tag_data[1] = {1'b1, r_data[1]};

  aer_arbiter #(.N(2), .W(ADDR_W + 1)) u_arb (
    .clk, .rst_n, .s_valid(r_valid), .s_data(tag_data), .s_ready(r_ready),
    .m_valid, .m_data, .m_grant, .m_ready);

  aer_tx #(.W(ADDR_W + 1)) u_tx (
    .clk, .rst_n, .s_valid(m_valid), .s_data(m_data), .s_ready(m_ready),
    .aer_req(ext_req), .aer_data(ext_data), .aer_ack(ext_ack));

  assign cpu_out_req  = ifat_out_req;
  assign cpu_out_addr = ifat_out_data;
  assign ifat_out_ack = cpu_out_ack;
endmodule
