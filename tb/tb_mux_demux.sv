// tb_mux_demux: the retina and the CPU send 200 events each at the same time
// through four-phase senders; a receiver on the external bus checks that
// every event arrives once, in per-source order, with the right source tag,
// and that both sources were served while competing. The return path to the
// CPU is checked with 50 events.
module tb_mux_demux;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic or_req = 0, or_ack, cpu_req = 0, cpu_ack;
  logic [12:0] or_addr = 0, cpu_addr = 0;
  logic cpu_out_req, cpu_out_ack = 0;
  logic [12:0] cpu_out_addr;
  logic ext_req, ext_ack = 0;
  logic [13:0] ext_data;
  logic ifat_out_req = 0, ifat_out_ack;
  logic [12:0] ifat_out_data = 0;
  int checks = 0, failures = 0, contended = 0;
  logic [12:0] q0[$], q1[$];
  bit done0 = 0, done1 = 0;

  mux_demux dut (.clk, .rst_n, .or_req, .or_addr, .or_ack, .cpu_req, .cpu_addr, .cpu_ack,
    .cpu_out_req, .cpu_out_addr, .cpu_out_ack, .ext_req, .ext_data, .ext_ack,
    .ifat_out_req, .ifat_out_data, .ifat_out_ack);

  always @(posedge clk) if (or_req && cpu_req) contended++;

  initial begin
    forever begin
      @(negedge clk);
      if (ext_req) begin
        checks++;
        if (ext_data[13]) begin
          if (q1.size() == 0 || ext_data[12:0] != q1[0]) begin failures++; $display("FAIL cpu %h", ext_data); end
          if (q1.size()) void'(q1.pop_front());
        end else begin
          if (q0.size() == 0 || ext_data[12:0] != q0[0]) begin failures++; $display("FAIL or %h", ext_data); end
          if (q0.size()) void'(q0.pop_front());
        end
        repeat ($urandom % 3) @(negedge clk);
        ext_ack = 1;
        while (ext_req) @(negedge clk);
        ext_ack = 0;
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
    fork
      for (int i = 0; i < 200; i++) begin
        or_addr = 13'($urandom); q0.push_back(or_addr);
        @(negedge clk); or_req = 1; while (!or_ack) @(negedge clk);
        or_req = 0; while (or_ack) @(negedge clk);
      end
      for (int i = 0; i < 200; i++) begin
        cpu_addr = 13'($urandom); q1.push_back(cpu_addr);
        @(negedge clk); cpu_req = 1; while (!cpu_ack) @(negedge clk);
        cpu_req = 0; while (cpu_ack) @(negedge clk);
      end
      for (int i = 0; i < 50; i++) begin
        ifat_out_data = 13'($urandom);
        @(negedge clk); ifat_out_req = 1;
        #1;
        checks++;
        if (!cpu_out_req || cpu_out_addr != ifat_out_data) failures++;
        @(negedge clk); cpu_out_ack = 1; #1;
        checks++;
        if (!ifat_out_ack) failures++;
        ifat_out_req = 0; @(negedge clk); cpu_out_ack = 0;
      end
    join
    repeat (40) @(posedge clk);
    checks++;
    if (q0.size() || q1.size() || contended < 50) begin
      failures++; $display("FAIL: left %0d %0d contended %0d", q0.size(), q1.size(), contended);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
