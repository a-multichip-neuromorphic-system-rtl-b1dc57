// aer_tx: sending end of an address-event (AER) bus.
//
// An event accepted from the valid/ready stream is held on `aer_data` while
// `aer_req` is raised; the block waits for the synchronised `aer_ack` to rise,
// lowers `aer_req`, and waits for `aer_ack` to fall before it accepts the next
// event (four-phase, bundled-data handshake). `aer_data` is stable from one
// cycle before `aer_req` rises until the acknowledge has fallen.
// A transfer costs at least six clock cycles plus the receiver's response
// time. The handshake style is this design's choice; the document names only
// the AER protocol.
module aer_tx #(
  parameter int W = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         s_valid,
  input  logic [W-1:0] s_data,
  output logic         s_ready,
  output logic         aer_req,
  output logic [W-1:0] aer_data,
  input  logic         aer_ack
);
  typedef enum logic [1:0] {TX_IDLE, TX_SETUP, TX_REQ, TX_REL} tx_state_e;
  tx_state_e  state;
  logic [1:0] ack_sync;
  logic       ack_s;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ack_sync <= '0;
    else        ack_sync <= {ack_sync[0], aer_ack};
  assign ack_s   = ack_sync[1];
  assign s_ready = (state == TX_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= TX_IDLE;
      aer_req  <= 1'b0;
      aer_data <= '0;
    end else begin
      unique case (state)
        TX_IDLE:  if (s_valid) begin
                    aer_data <= s_data;
                    state    <= TX_SETUP;
                  end
        TX_SETUP: if (!ack_s) begin          // data settled one cycle
                    aer_req <= 1'b1;
                    state   <= TX_REQ;
                  end
        TX_REQ:   if (ack_s) begin
                    aer_req <= 1'b0;
                    state   <= TX_REL;
                  end
        TX_REL:   if (!ack_s) state <= TX_IDLE;
        default:  state <= TX_IDLE;
      endcase
    end
  end
endmodule
