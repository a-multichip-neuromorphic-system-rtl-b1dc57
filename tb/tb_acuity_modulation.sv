// tb_acuity_modulation: spatial acuity modulation on the full-size system,
// with the centre of vision moved by the fovea offset instead of by
// rewriting the table.
// The table maps the (shifted) 80 x 60 retina onto cortex cells at two
// resolutions: a 16 x 16 fovea at rows 22..37, columns 32..47 where each
// pixel drives its own cell (w = 15, E = 996 mV, so three events fire it),
// and a periphery pooled in 8 x 8 blocks, each block driving one cell
// (w = 2, same E). Fovea pixel (r, c) is cell 16 (r - 22) + (c - 32); block
// (br, bc) is cell 256 + 10 br + bc. A cell is neuron k = cell index on
// chip 0 (row k / 60, column k % 60) and reports spikes to the CPU as
// external event k.
// A bright 4 x 4 patch at retina rows and columns 10..13 fires once per pixel
// per frame, for FRAMES frames, in three runs:
//   A: no offset: the patch falls in the periphery, on one pooled cell;
//   B: offset (+14, +24): the patch lands inside the fovea, on 16 cells;
//   C: offset (-20, 0): the patch is shifted off the field and dropped.
// A reference model in this testbench applies the same neuron update and
// predicts each cell's spike count; the counts seen at the CPU must match,
// B must activate 16 cells and A one, and C must produce no spike and one
// drop per event. The two-resolution pooling and the offset arithmetic
// follow the source; the ring layout (one ring of 8 x 8 blocks), weights and
// patch are this test's choices.
module tb_acuity_modulation;
  import ifat_pkg::*;
  localparam int FRAMES = 12;
  localparam int NCELL = 336;
  localparam int E_CODE = 255;
  localparam int VTH = 500;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic or_req = 0, or_ack, cpu_req = 0, cpu_ack, cpu_out_req, cpu_out_ack = 0;
  logic [12:0] or_addr = 0, cpu_addr = 0, cpu_out_addr;
  logic ram_re, ram_rvalid;
  logic [21:0] ram_addr;
  logic [35:0] ram_rdata;
  logic st_line, st_stop, st_full, st_drop, st_settle, st_fovea_drop;
  logic fovea_en = 1'b1;
  logic signed [6:0] row_off = 0;
  logic signed [7:0] col_off = 0;
  int checks = 0, failures = 0, drops = 0;
  int got [NCELL];
  int expv [NCELL];
  int expc [NCELL];

  lut_ram_model #(.LAT(2)) u_ram (.clk, .re(ram_re), .addr(ram_addr), .rvalid(ram_rvalid), .rdata(ram_rdata));

  neuromorphic_system dut (.clk, .rst_n, .fovea_en, .fovea_row_off(row_off), .fovea_col_off(col_off),
    .or_req, .or_addr, .or_ack, .cpu_req, .cpu_addr, .cpu_ack,
    .cpu_out_req, .cpu_out_addr, .cpu_out_ack,
    .ram_re, .ram_addr, .ram_rvalid, .ram_rdata,
    .st_line, .st_stop, .st_full, .st_drop, .st_settle, .st_fovea_drop);

  function automatic bit in_fovea(input int r, input int c);
    return r >= 22 && r < 38 && c >= 32 && c < 48;
  endfunction

  function automatic int cell_of(input int r, input int c);
    return in_fovea(r, c) ? 16 * (r - 22) + (c - 32) : 256 + 10 * (r / 8) + (c / 8);
  endfunction

  function automatic int weight_of(input int r, input int c);
    return in_fovea(r, c) ? 15 : 2;
  endfunction

  function automatic ram_word_t mk(input logic [15:0] t, input int w, input int e);
    ram_word_t x;
    x.target = t; x.weight = 4'(w); x.nev = 4'd1; x.prob = 4'hF; x.erev = 8'(e);
    return x;
  endfunction

  task automatic build();
    for (int r = 0; r < 60; r++)
      for (int c = 0; c < 80; c++) begin
        int k = cell_of(r, c);
        u_ram.mem[{1'b0, 6'(r), 7'(c), 8'd0}] = mk({4'b0000, 6'(k / 60), 6'(k % 60)}, weight_of(r, c), E_CODE);
        u_ram.mem[{1'b0, 6'(r), 7'(c), 8'd1}] = '1;
      end
    for (int k = 0; k < NCELL; k++) begin
      u_ram.mem[{2'b10, 6'(k / 60), 6'(k % 60), 8'd0}] = mk({3'b010, 13'(k)}, 0, 0);
      u_ram.mem[{2'b10, 6'(k / 60), 6'(k % 60), 8'd1}] = '1;
    end
  endtask

  task automatic ref_event(input int k, input int w);
    int e, v;
    e = E_CODE * 1000 / 256;
    v = expv[k];
    v = v + (((e - v) * w) >>> 6);
    if (v >= VTH) begin v = 0; expc[k]++; end
    expv[k] = v;
  endtask

  initial forever begin
    @(negedge clk);
    if (cpu_out_req) begin
      if (int'(cpu_out_addr) < NCELL) got[int'(cpu_out_addr)]++;
      else begin failures++; $display("FAIL: unexpected output address %0d", cpu_out_addr); end
      cpu_out_ack = 1;
      while (cpu_out_req) @(negedge clk);
      cpu_out_ack = 0;
    end
  end

  always @(posedge clk) if (st_fovea_drop) drops++;

  task automatic retina_send(input int r, input int c);
    @(negedge clk); or_addr = {6'(r), 7'(c)}; or_req = 1;
    while (!or_ack) @(negedge clk);
    or_req = 0;
    while (or_ack) @(negedge clk);
  endtask

  // one run; returns the number of distinct cells that fired
  task automatic run(input int roff, input int coff, output int active, output int spikes);
    rst_n = 0;
    row_off = 7'(roff); col_off = 8'(coff);
    for (int k = 0; k < NCELL; k++) begin got[k] = 0; expv[k] = 0; expc[k] = 0; end
    drops = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    for (int f = 0; f < FRAMES; f++)
      for (int r = 10; r < 14; r++)
        for (int c = 10; c < 14; c++) begin
          int rr = r + roff, cc = c + coff;
          retina_send(r, c);
          if (rr >= 0 && rr < 60 && cc >= 0 && cc < 80) ref_event(cell_of(rr, cc), weight_of(rr, cc));
        end
    repeat (5000) @(posedge clk);
    active = 0; spikes = 0;
    for (int k = 0; k < NCELL; k++) begin
      checks++;
      if (got[k] != expc[k]) begin
        failures++;
        $display("FAIL: offset (%0d, %0d): cell %0d fired %0d times, expected %0d", roff, coff, k, got[k], expc[k]);
      end
      if (got[k] > 0) active++;
      spikes += got[k];
    end
  endtask

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a_act, a_sp, b_act, b_sp, c_act, c_sp;
    build();
    run(0, 0, a_act, a_sp);
    checks++;
    if (a_act != 1) begin failures++; $display("FAIL: periphery run activated %0d cells", a_act); end
    checks++;
    if (drops != 0) begin failures++; $display("FAIL: %0d drops with no offset", drops); end
    run(14, 24, b_act, b_sp);
    checks++;
    if (b_act != 16) begin failures++; $display("FAIL: fovea run activated %0d cells", b_act); end
    run(-20, 0, c_act, c_sp);
    checks++;
    if (c_sp != 0 || drops != FRAMES * 16) begin
      failures++; $display("FAIL: off-field run: %0d spikes, %0d drops", c_sp, drops);
    end
    $display("periphery: %0d cell(s), %0d spikes; fovea: %0d cells, %0d spikes; off field: %0d drops",
             a_act, a_sp, b_act, b_sp, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
