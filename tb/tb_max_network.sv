// tb_max_network: the MAX network workload on the full-size system.
// Inputs x_i are events sent by the CPU with probability 0.5 (x_max) or 0.3
// (the others) per time step, the 50 Hz : 30 Hz ratio of the source
// experiment. Each x_i excites neuron y_i; every y_i excites the output
// neuron z and inhibits all other y_j (equilibrium potential 0); z reports
// its spikes to the CPU. The same network is run with n = 1 and n = 8
// inputs. Without the mutual inhibition the input to z would grow 5.2-fold;
// the test requires the z rate for n = 8 to stay within 0.5x..1.8x of the
// n = 1 rate, the number of y spikes to grow with n, and a control run of
// n = 8 with the inhibitory synapses switched off (event count 0) to give at
// least 1.5x more z spikes, so the inhibition is what holds z down.
// Each inhibitory synapse issues 6 events (w = 15, E = 0), which pulls the
// target's potential to about a fifth; the excitatory synapses use w = 15,
// E = 255 (996 mV), so y needs three input events to fire. These constants,
// the time step of 100 cycles and the 400-step run length are this test's
// choices; the network shape and the 50 : 30 rate ratio follow the source.
module tb_max_network;
  import ifat_pkg::*;
  localparam int STEPS = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic or_req = 0, or_ack, cpu_req = 0, cpu_ack, cpu_out_req, cpu_out_ack = 0;
  logic [12:0] or_addr = 0, cpu_addr = 0, cpu_out_addr;
  logic ram_re, ram_rvalid;
  logic [21:0] ram_addr;
  logic [35:0] ram_rdata;
  logic st_line, st_stop, st_full, st_drop, st_settle, st_fovea_drop;
  int checks = 0, failures = 0, z_count = 0, y_count = 0;

  lut_ram_model #(.LAT(2)) u_ram (.clk, .re(ram_re), .addr(ram_addr), .rvalid(ram_rvalid), .rdata(ram_rdata));

  neuromorphic_system dut (.clk, .rst_n, .fovea_en(1'b0), .fovea_row_off(7'sd0), .fovea_col_off(8'sd0),
    .or_req, .or_addr, .or_ack, .cpu_req, .cpu_addr, .cpu_ack,
    .cpu_out_req, .cpu_out_addr, .cpu_out_ack,
    .ram_re, .ram_addr, .ram_rvalid, .ram_rdata,
    .st_line, .st_stop, .st_full, .st_drop, .st_settle, .st_fovea_drop);

  function automatic ram_word_t mk(input logic [15:0] t, input int w, input int n, input int e);
    ram_word_t x;
    x.target = t; x.weight = 4'(w); x.nev = 4'(n); x.prob = 4'hF; x.erev = 8'(e);
    return x;
  endfunction

  // y_i = chip 0 (0, i); z = chip 0 (1, 0); x_i = CPU address 0x1E00 + i
  task automatic build(input int n, input int inh);
    for (int i = 0; i < n; i++) begin
      int o;
      u_ram.mem[{14'(13'h1E00 + i), 8'd0}] = mk({4'b0000, 6'd0, 6'(i)}, 15, 1, 255);
      u_ram.mem[{14'(13'h1E00 + i), 8'd1}] = '1;
      o = 0;
      u_ram.mem[{2'b10, 6'd0, 6'(i), 8'(o)}] = mk({4'b0000, 6'd1, 6'd0}, 15, 1, 255); o++;
      u_ram.mem[{2'b10, 6'd0, 6'(i), 8'(o)}] = mk({3'b010, 13'h100}, 0, 1, 0); o++;
      for (int j = 0; j < n; j++)
        if (j != i) begin
          u_ram.mem[{2'b10, 6'd0, 6'(i), 8'(o)}] = mk({4'b0000, 6'd0, 6'(j)}, 15, inh, 0); o++;
        end
      u_ram.mem[{2'b10, 6'd0, 6'(i), 8'(o)}] = '1;
    end
    u_ram.mem[{2'b10, 6'd1, 6'd0, 8'd0}] = mk({3'b010, 13'h0FF}, 0, 1, 0);
    u_ram.mem[{2'b10, 6'd1, 6'd0, 8'd1}] = '1;
  endtask

  initial forever begin
    @(negedge clk);
    if (cpu_out_req) begin
      if (cpu_out_addr == 13'h0FF) z_count++;
      else if (cpu_out_addr == 13'h100) y_count++;
      cpu_out_ack = 1;
      while (cpu_out_req) @(negedge clk);
      cpu_out_ack = 0;
    end
  end

  task automatic cpu_send(input logic [12:0] a);
    @(negedge clk); cpu_addr = a; cpu_req = 1;
    while (!cpu_ack) @(negedge clk);
    cpu_req = 0;
    while (cpu_ack) @(negedge clk);
  endtask

  task automatic run(input int n, input int inh, output int z, output int y);
    rst_n = 0;
    repeat (5) @(posedge clk);
    build(n, inh);
    rst_n = 1;
    repeat (3000) @(posedge clk);          // chip memories clear after reset
    z_count = 0; y_count = 0;
    for (int s = 0; s < STEPS; s++) begin
      for (int i = 0; i < n; i++)
        if (($urandom % 100) < ((i == 0) ? 50 : 30)) cpu_send(13'(13'h1E00 + i));
      repeat (100) @(posedge clk);
    end
    repeat (3000) @(posedge clk);
    z = z_count; y = y_count;
  endtask

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int z1, y1, z8, y8, z0, y0;
    run(1, 6, z1, y1);
    run(8, 6, z8, y8);
    run(8, 0, z0, y0);
    $display("n=1: z %0d spikes, y %0d spikes; n=8: z %0d spikes, y %0d spikes", z1, y1, z8, y8);
    $display("n=8 without inhibition: z %0d spikes, y %0d spikes", z0, y0);
    checks++;
    if (z1 == 0) begin failures++; $display("FAIL: z silent"); end
    checks++;
    if (z8 * 10 < z1 * 5 || z8 * 10 > z1 * 18) begin failures++; $display("FAIL: z not invariant to n"); end
    checks++;
    if (y8 <= y1) begin failures++; $display("FAIL: y activity did not grow with n"); end
    checks++;
    if (z0 * 10 < z8 * 15) begin failures++; $display("FAIL: removing inhibition did not raise z"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
