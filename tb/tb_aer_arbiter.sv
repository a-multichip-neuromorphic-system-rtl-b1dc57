// tb_aer_arbiter: three sources offer numbered events under random
// back-pressure. Checks that each output event is the head of the granted
// source, that nothing is lost, and that a waiting source is served before
// any other source is served twice (round-robin).
module tb_aer_arbiter;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] s_valid = '0, s_ready;
  logic [N-1:0][7:0] s_data;
  logic m_valid, m_ready = 0;
  logic [7:0] m_data;
  logic [1:0] m_grant;
  int checks = 0, failures = 0;
  int cnt [N];
  int waited [N];
  int total = 0;

  aer_arbiter #(.N(N), .W(8)) dut (.clk, .rst_n, .s_valid, .s_data, .s_ready,
                                   .m_valid, .m_data, .m_grant, .m_ready);

  always_comb for (int i = 0; i < N; i++) s_data[i] = 8'({i[1:0], 6'(cnt[i])});

  always @(posedge clk) begin
    if (rst_n) begin
      if (m_valid && m_ready) begin
        checks++;
        total++;
        if (!s_valid[m_grant] || m_data != s_data[m_grant]) begin
          failures++; $display("FAIL: grant %0d data %h", m_grant, m_data);
        end
        for (int i = 0; i < N; i++)
          if (i == int'(m_grant)) waited[i] = 0;
          else if (s_valid[i]) begin
            waited[i]++;
            checks++;
            if (waited[i] > N - 1) begin failures++; $display("FAIL: source %0d starved", i); end
          end
        cnt[m_grant]++;
        s_valid[m_grant] <= ($urandom % 4) != 0;
      end
      for (int i = 0; i < N; i++)
        if (!s_valid[i] && ($urandom % 2)) s_valid[i] <= 1'b1;
      m_ready <= ($urandom % 3) != 0;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin cnt[i] = 0; waited[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (total >= 600);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (cnt[i] < 100) begin failures++; $display("FAIL: source %0d served %0d", i, cnt[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
