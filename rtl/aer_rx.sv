// aer_rx: receiving end of an address-event (AER) bus.
//
// The sender places an address on `aer_data` and raises `aer_req`; this block
// synchronises `aer_req` into `clk` with two flip-flops, captures the address,
// raises `aer_ack`, waits for `aer_req` to fall and then lowers `aer_ack`
// (four-phase, bundled-data handshake). The captured address is offered on a
// valid/ready stream; a new event is acknowledged only once the previous one
// has been taken, so back-pressure reaches the sender as a late acknowledge.
// Latency: an event appears on `m_valid` three clock edges after `aer_req`
// rises. The AER protocol itself is the document's; the four-phase handshake
// and its synchronous implementation are this design's choice.
module aer_rx #(
  parameter int W = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         aer_req,
  input  logic [W-1:0] aer_data,
  output logic         aer_ack,
  output logic         m_valid,
  output logic [W-1:0] m_data,
  input  logic         m_ready
);
  logic [1:0] req_sync;
  logic       req_s;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) req_sync <= '0;
    else        req_sync <= {req_sync[0], aer_req};
  assign req_s = req_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aer_ack <= 1'b0;
      m_valid <= 1'b0;
      m_data  <= '0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (!aer_ack) begin
        if (req_s && (!m_valid || m_ready)) begin
          m_data  <= aer_data;
          m_valid <= 1'b1;
          aer_ack <= 1'b1;
        end
      end else if (!req_s) begin
        aer_ack <= 1'b0;
      end
    end
  end
endmodule
