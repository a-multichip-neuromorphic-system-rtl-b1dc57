// aer_arbiter: round-robin merge of N event streams into one.
//
// Every input is a valid/ready stream of W-bit events. The output offers the
// event of the first requesting input at or after the rotating pointer; when
// that event is taken the pointer moves to the input after the winner, so no
// input can be starved. Purely combinational from inputs to output, with the
// pointer as the only state; `m_grant` tells which input the current output
// event comes from. The document calls for a central arbiter that merges
// AER buses; round-robin fairness is this design's choice.
module aer_arbiter #(
  parameter int N = 2,
  parameter int W = 13
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         s_valid,
  input  logic [N-1:0][W-1:0]  s_data,
  output logic [N-1:0]         s_ready,
  output logic                 m_valid,
  output logic [W-1:0]         m_data,
  output logic [$clog2(N)-1:0] m_grant,
  input  logic                 m_ready
);
  localparam int GW = $clog2(N);
  logic [GW-1:0] ptr;

  always_comb begin
    logic found;
    logic [GW-1:0] idx;
    found   = 1'b0;
    m_grant = '0;
    for (int k = 0; k < N; k++) begin
      idx = GW'((int'(ptr) + k) % N);
      if (!found && s_valid[idx]) begin
        found   = 1'b1;
        m_grant = idx;
      end
    end
    m_valid = found;
    m_data  = s_data[m_grant];
    s_ready = '0;
    s_ready[m_grant] = m_ready && found;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ptr <= '0;
    else if (m_valid && m_ready)
      ptr <= (int'(m_grant) == N - 1) ? '0 : m_grant + 1'b1;
endmodule
