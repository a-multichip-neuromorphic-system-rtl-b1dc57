// tb_aer_rx: drives 300 random addresses through a four-phase sender with
// random gaps, takes them with random back-pressure, and checks order,
// content and that the acknowledge follows the request within bounds.
module tb_aer_rx;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req = 0, ack, m_valid, m_ready = 0;
  logic [12:0] data = '0, m_data;
  int checks = 0, failures = 0;
  logic [12:0] q[$];

  aer_rx #(.W(13)) dut (.clk, .rst_n, .aer_req(req), .aer_data(data), .aer_ack(ack),
                        .m_valid, .m_data, .m_ready);

  always @(posedge clk) begin
    if (rst_n && m_valid && m_ready) begin
      checks++;
      if (q.size() == 0 || m_data != q[0]) begin
        failures++; $display("FAIL: got %h", m_data);
      end
      if (q.size() != 0) void'(q.pop_front());
    end
    m_ready <= ($urandom % 10) == 0;
  end

  task automatic send(input logic [12:0] a);
    int n;
    data = a; q.push_back(a);
    @(negedge clk); req = 1;
    n = 0;
    while (!ack) begin @(negedge clk); n++; end
    @(negedge clk); data = ~a;       // data may change once acknowledged
    req = 0;
    while (ack) @(negedge clk);
    repeat ($urandom % 3) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) send(13'($urandom));
    repeat (300) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d events lost", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
