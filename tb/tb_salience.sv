// tb_salience: salience detection on the full-size system, as a second pass
// over logged simple-cell events played back by the CPU.
// Each simple-cell event carries the cell's position {row[5:0], col[6:0]} on
// the 60 x 80 grid and arrives on the CPU bus (no fovea offset applies).
// Salience cells pool 8 x 8 windows stepped by 4 positions: 14 x 19 = 266
// cells, window (wr, wc) covering rows 4 wr .. 4 wr + 7 and columns
// 4 wc .. 4 wc + 7, so each position feeds up to four overlapping windows
// (w = 4, E = 996 mV). Window (wr, wc) is cortex neuron k = 19 wr + wc on
// chip 0 (row k / 60, column k % 60) and reports its spikes to the CPU as
// external event 0x1000 + k.
// The played-back log is a vertical edge of simple-cell events at column 41,
// rows 16..39, one event per position per frame for FRAMES frames, plus one
// isolated event per frame at (50, 10). A reference model in this testbench
// predicts every salience cell's spike count, which must match; the edge
// windows must respond and the most active window must contain the edge,
// while the isolated event must not make its windows fire. The window size
// and step follow the source; the log, weight and frame count are this
// test's choices.
module tb_salience;
  import ifat_pkg::*;
  localparam int FRAMES = 6;
  localparam int WR = 14, WC = 19, NCELL = WR * WC;
  localparam int W = 4, E_CODE = 255, VTH = 500;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic or_req = 0, or_ack, cpu_req = 0, cpu_ack, cpu_out_req, cpu_out_ack = 0;
  logic [12:0] or_addr = 0, cpu_addr = 0, cpu_out_addr;
  logic ram_re, ram_rvalid;
  logic [21:0] ram_addr;
  logic [35:0] ram_rdata;
  logic st_line, st_stop, st_full, st_drop, st_settle, st_fovea_drop;
  int checks = 0, failures = 0;
  int got [NCELL];
  int expv [NCELL];
  int expc [NCELL];

  lut_ram_model #(.LAT(2)) u_ram (.clk, .re(ram_re), .addr(ram_addr), .rvalid(ram_rvalid), .rdata(ram_rdata));

  neuromorphic_system dut (.clk, .rst_n, .fovea_en(1'b1), .fovea_row_off(7'sd5), .fovea_col_off(8'sd5),
    .or_req, .or_addr, .or_ack, .cpu_req, .cpu_addr, .cpu_ack,
    .cpu_out_req, .cpu_out_addr, .cpu_out_ack,
    .ram_re, .ram_addr, .ram_rvalid, .ram_rdata,
    .st_line, .st_stop, .st_full, .st_drop, .st_settle, .st_fovea_drop);

  function automatic ram_word_t mk(input logic [15:0] t, input int w, input int e);
    ram_word_t x;
    x.target = t; x.weight = 4'(w); x.nev = 4'd1; x.prob = 4'hF; x.erev = 8'(e);
    return x;
  endfunction

  // window k covers position (r, c)
  function automatic bit covers(input int k, input int r, input int c);
    int wr = k / WC, wc = k % WC;
    return r >= 4 * wr && r < 4 * wr + 8 && c >= 4 * wc && c < 4 * wc + 8;
  endfunction

  task automatic build();
    for (int r = 0; r < 60; r++)
      for (int c = 0; c < 80; c++) begin
        int o = 0;
        for (int k = 0; k < NCELL; k++)
          if (covers(k, r, c)) begin
            u_ram.mem[{1'b0, 6'(r), 7'(c), 8'(o)}] = mk({4'b0000, 6'(k / 60), 6'(k % 60)}, W, E_CODE);
            o++;
          end
        u_ram.mem[{1'b0, 6'(r), 7'(c), 8'(o)}] = '1;
      end
    for (int k = 0; k < NCELL; k++) begin
      u_ram.mem[{2'b10, 6'(k / 60), 6'(k % 60), 8'd0}] = mk({3'b010, 13'(13'h1000 + k)}, 0, 0);
      u_ram.mem[{2'b10, 6'(k / 60), 6'(k % 60), 8'd1}] = '1;
    end
  endtask

  task automatic ref_event(input int r, input int c);
    int e = E_CODE * 1000 / 256;
    for (int k = 0; k < NCELL; k++)
      if (covers(k, r, c)) begin
        int v = expv[k];
        v = v + (((e - v) * W) >>> 6);
        if (v >= VTH) begin v = 0; expc[k]++; end
        expv[k] = v;
      end
  endtask

  initial forever begin
    @(negedge clk);
    if (cpu_out_req) begin
      int k;
      k = int'(cpu_out_addr) - 'h1000;
      if (k >= 0 && k < NCELL) got[k]++;
      else begin failures++; $display("FAIL: unexpected output address %0h", cpu_out_addr); end
      cpu_out_ack = 1;
      while (cpu_out_req) @(negedge clk);
      cpu_out_ack = 0;
    end
  end

  task automatic cpu_send(input int r, input int c);
    @(negedge clk); cpu_addr = {6'(r), 7'(c)}; cpu_req = 1;
    while (!cpu_ack) @(negedge clk);
    cpu_req = 0;
    while (cpu_ack) @(negedge clk);
    ref_event(r, c);
  endtask

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best = 0, best_k = 0, edge_active = 0;
    for (int k = 0; k < NCELL; k++) begin got[k] = 0; expv[k] = 0; expc[k] = 0; end
    build();
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      for (int r = 16; r < 40; r++) cpu_send(r, 41);
      cpu_send(50, 10);
    end
    repeat (5000) @(posedge clk);
    for (int k = 0; k < NCELL; k++) begin
      checks++;
      if (got[k] != expc[k]) begin
        failures++;
        $display("FAIL: window (%0d, %0d) fired %0d times, expected %0d", k / WC, k % WC, got[k], expc[k]);
      end
      if (got[k] > best) begin best = got[k]; best_k = k; end
      if (got[k] > 0 && covers(k, 20, 41)) edge_active++;
      checks++;
      if (covers(k, 50, 10) && got[k] != 0) begin
        failures++; $display("FAIL: isolated event made window %0d fire", k);
      end
    end
    checks++;
    if (edge_active == 0 || !covers(best_k, best_k / WC * 4 + 4, 41)) begin
      failures++; $display("FAIL: most salient window %0d is not on the edge", best_k);
    end
    $display("edge windows active: %0d; most salient window (%0d, %0d) with %0d spikes",
             edge_active, best_k / WC, best_k % WC, best);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
