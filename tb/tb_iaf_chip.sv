// tb_iaf_chip: drives commands into one I&F chip model (chip 0) through a
// four-phase sender and checks every output spike against a reference
// integrate-and-fire calculation kept in the testbench: single-cell
// excitation to threshold, inhibition, a row broadcast (60 spikes), a
// whole-chip broadcast leak, and that a command for the other chip is ignored.
// Spikes are expected in firing order (the model queues them), so the
// reference keeps its own queue of expected addresses. Timing is checked only
// through the handshake: every command must be acknowledged and every spike
// must arrive before the watchdog. The 2400-cell size, the conductance-like
// update toward the equilibrium potential and fire-and-reset follow the
// source; the constants and the 40 x 60 layout are this model's choices.
module tb_iaf_chip;
  import ifat_pkg::*;
  localparam int ROWS = 40, COLS = 60, N = ROWS * COLS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_req = 0, in_ack, out_req, out_ack = 0;
  cx_cmd_t in_cmd = '0;
  logic [15:0] erev = 0;
  logic [11:0] out_addr;
  int checks = 0, failures = 0;
  int vref [N];
  logic [11:0] expq[$];

  iaf_chip #(.CHIP_ID(1'b0), .ROWS(ROWS), .COLS(COLS), .VTH_MV(500)) dut (
    .clk, .rst_n, .in_req, .in_cmd, .in_ack, .erev_mv(erev),
    .out_req, .out_addr, .out_ack);

  // reference model: same update rule, integer arithmetic in the testbench
  task automatic ref_apply(input cx_cmd_t c, input int e);
    int fired [$];
    for (int i = 0; i < N; i++) begin
      bit hit;
      hit = (c.sel == SEL_CHIP || c.sel == SEL_ALL) ||
            (int'(c.row) == i / COLS && (c.sel == SEL_ROW || int'(c.col) == i % COLS));
      if (hit) begin
        int d;
        d = ((e - vref[i]) * int'(c.weight));
        vref[i] = vref[i] + (d >>> 6);
        if (vref[i] >= 500) begin vref[i] = 0; fired.push_back(i); end
      end
    end
    foreach (fired[k]) expq.push_back({6'(fired[k] / COLS), 6'(fired[k] % COLS)});
  endtask

  task automatic cmd(input cx_sel_e s, input logic chip, input int r, input int c,
                     input int w, input int e);
    cx_cmd_t k;
    k.sel = s; k.chip = chip; k.row = 6'(r); k.col = 6'(c); k.weight = 4'(w);
    in_cmd = k; erev = 16'(e);
    if (chip == 1'b0 || s == SEL_ALL) ref_apply(k, e);
    @(negedge clk); in_req = 1;
    if (chip == 1'b1 && s != SEL_ALL) begin
      repeat (20) @(negedge clk);
      checks++;
      if (in_ack) begin failures++; $display("FAIL: other chip's command acknowledged"); end
      in_req = 0;
      return;
    end
    while (!in_ack) @(negedge clk);
    in_req = 0;
    while (in_ack) @(negedge clk);
  endtask

  // spike receiver
  initial begin
    forever begin
      @(negedge clk);
      if (out_req) begin
        checks++;
        if (expq.size() == 0 || out_addr != expq[0]) begin
          failures++; $display("FAIL: spike %h, expected %h", out_addr, expq.size() ? expq[0] : 12'hFFF);
        end
        if (expq.size()) void'(expq.pop_front());
        out_ack = 1;
        while (out_req) @(negedge clk);
        out_ack = 0;
      end
    end
  end

  task automatic drain;
    int t = 0;
    while (expq.size() != 0 && t < 100000) begin @(negedge clk); t++; end
    repeat (20) @(negedge clk);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) vref[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // one cell: three strong excitatory events reach threshold
    repeat (3) cmd(SEL_CELL, 1'b0, 3, 7, 15, 996);
    drain();
    checks++;
    if (expq.size() != 0) failures++;
    // inhibition then excitation on another cell
    repeat (2) cmd(SEL_CELL, 1'b0, 10, 20, 9, 800);
    cmd(SEL_CELL, 1'b0, 10, 20, 15, 0);
    repeat (4) cmd(SEL_CELL, 1'b0, 10, 20, 12, 996);
    drain();
    // the other chip's command
    cmd(SEL_CELL, 1'b1, 3, 7, 15, 996);
    // row broadcast: 60 spikes
    repeat (3) cmd(SEL_ROW, 1'b0, 5, 0, 15, 996);
    drain();
    // global leak followed by whole-chip excitation
    cmd(SEL_ALL, 1'b1, 0, 0, 8, 0);
    repeat (4) cmd(SEL_CHIP, 1'b0, 0, 0, 15, 996);
    drain();
    for (int i = 0; i < 50; i++)
      cmd(SEL_CELL, 1'b0, $urandom % ROWS, $urandom % COLS, $urandom % 16, $urandom % 1000);
    drain();
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d spikes missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
