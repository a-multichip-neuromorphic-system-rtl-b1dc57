// tb_aer_tx: feeds 300 random words into the sender with random gaps; a
// four-phase receiver in the testbench acknowledges after random delays and
// checks that every word arrives once, in order, stable while requested.
module tb_aer_tx;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic s_valid = 0, s_ready, req, ack = 0;
  logic [18:0] s_data = '0, data;
  int checks = 0, failures = 0;
  logic [18:0] q[$];
  int sent = 0;

  aer_tx #(.W(19)) dut (.clk, .rst_n, .s_valid, .s_data, .s_ready,
                        .aer_req(req), .aer_data(data), .aer_ack(ack));

  // producer
  always @(posedge clk) begin
    if (rst_n) begin
      if (s_valid && s_ready) begin q.push_back(s_data); sent++; s_valid <= 0; end
      else if (!s_valid && sent < 300 && ($urandom % 2)) begin
        s_valid <= 1; s_data <= 19'($urandom);
      end
    end
  end

  // four-phase receiver
  initial begin
    logic [18:0] seen;
    forever begin
      @(negedge clk);
      if (req) begin
        seen = data;
        repeat ($urandom % 4) begin
          @(negedge clk);
          checks++;
          if (data != seen || !req) begin failures++; $display("FAIL: data moved"); end
        end
        checks++;
        if (q.size() == 0 || seen != q[0]) begin failures++; $display("FAIL: got %h", seen); end
        if (q.size() != 0) void'(q.pop_front());
        ack = 1;
        while (req) @(negedge clk);
        repeat ($urandom % 3) @(negedge clk);
        ack = 0;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (sent == 300);
    repeat (40) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d undelivered", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
