// tb_feature_extraction: oriented simple cells on the full-size system.
// All 4800 cortex cells are configured as the same simple cell type: a
// horizontal 4 x 1 receptive field over retina pixels (r, c .. c+3), with the
// two left pixels excitatory and the two right pixels inhibitory. Cell
// (r, c) is cortex neuron k = 80 r + c, i.e. chip k / 2400, row (k % 2400) / 60,
// column k % 60. Each pixel's synapse list has one line per cell it feeds
// (up to 4); each cell's list sends its spike to the CPU as external event k.
// The retina sees a bright vertical band (columns 20..59), one event per
// bright pixel per frame in raster order, for FRAMES frames. The excitatory
// and inhibitory synapses are balanced (w = 8, E = 781 mV and 0 mV): in the
// uniform band a cell settles below threshold, so only cells whose field
// straddles the bright-to-dark edge on the right fire, and the dark-to-bright
// edge on the left gives no response (the filter is polarity selective).
// A reference model in this testbench applies the same neuron update to each
// cell in event order and predicts every cell's spike count exactly; each
// cell's count at the CPU is compared with it. The 4 x 1 two-plus/two-minus
// field and the balance come from the source; the band image, weights and
// frame count are this test's choices.
module tb_feature_extraction;
  import ifat_pkg::*;
  localparam int FRAMES = 10;
  localparam int W = 8, E_EXC = 200, E_INH = 0;    // DAC codes
  localparam int VTH = 500;
  localparam int NCELL = 4800;
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

  neuromorphic_system dut (.clk, .rst_n, .fovea_en(1'b0), .fovea_row_off(7'sd0), .fovea_col_off(8'sd0),
    .or_req, .or_addr, .or_ack, .cpu_req, .cpu_addr, .cpu_ack,
    .cpu_out_req, .cpu_out_addr, .cpu_out_ack,
    .ram_re, .ram_addr, .ram_rvalid, .ram_rdata,
    .st_line, .st_stop, .st_full, .st_drop, .st_settle, .st_fovea_drop);

  function automatic ram_word_t mk(input logic [15:0] t, input int n, input int e);
    ram_word_t x;
    x.target = t; x.weight = 4'(W); x.nev = 4'(n); x.prob = 4'hF; x.erev = 8'(e);
    return x;
  endfunction

  function automatic logic [15:0] cell_target(input int k);
    return {3'b000, 1'(k / 2400), 6'((k % 2400) / 60), 6'(k % 60)};
  endfunction

  function automatic logic [13:0] cell_index(input int k);
    return {1'b1, 1'(k / 2400), 6'((k % 2400) / 60), 6'(k % 60)};
  endfunction

  function automatic bit bright(input int c);
    return c >= 20 && c < 60;
  endfunction

  task automatic build();
    for (int r = 0; r < 60; r++)
      for (int c = 0; c < 80; c++) begin
        int o = 0;
        for (int p = 0; p < 4; p++)
          if (c - p >= 0) begin
            u_ram.mem[{1'b0, 6'(r), 7'(c), 8'(o)}] = mk(cell_target(80 * r + c - p), 1, (p < 2) ? E_EXC : E_INH);
            o++;
          end
        u_ram.mem[{1'b0, 6'(r), 7'(c), 8'(o)}] = '1;
      end
    for (int k = 0; k < NCELL; k++) begin
      u_ram.mem[{cell_index(k), 8'd0}] = mk({3'b010, 13'(k)}, 1, 0);
      u_ram.mem[{cell_index(k), 8'd1}] = '1;
    end
  endtask

  // reference: one synaptic event on cell k
  task automatic ref_event(input int k, input int code);
    int e, v;
    e = code * 1000 / 256;
    v = expv[k];
    v = v + (((e - v) * W) >>> 6);
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

  task automatic retina_send(input int r, input int c);
    @(negedge clk); or_addr = {6'(r), 7'(c)}; or_req = 1;
    while (!or_ack) @(negedge clk);
    or_req = 0;
    while (or_ack) @(negedge clk);
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fired_cells = 0, mism = 0, total = 0;
    for (int k = 0; k < NCELL; k++) begin got[k] = 0; expv[k] = 0; expc[k] = 0; end
    build();
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    for (int f = 0; f < FRAMES; f++)
      for (int r = 0; r < 60; r++)
        for (int c = 0; c < 80; c++)
          if (bright(c)) begin
            retina_send(r, c);
            for (int p = 0; p < 4; p++)
              if (c - p >= 0) ref_event(80 * r + c - p, (p < 2) ? E_EXC : E_INH);
          end
    repeat (20000) @(posedge clk);
    for (int k = 0; k < NCELL; k++) begin
      checks++;
      total += got[k];
      if (got[k] != expc[k]) begin
        failures++;
        if (mism++ < 10) $display("FAIL: cell row %0d col %0d fired %0d times, expected %0d", k / 80, k % 80, got[k], expc[k]);
      end
      if (expc[k] > 0) fired_cells++;
    end
    // the response must sit at the right-hand edge only
    for (int r = 0; r < 60; r++)
      for (int c = 0; c < 80; c++) begin
        checks++;
        if ((got[80 * r + c] > 0) != (c >= 57 && c <= 59)) begin
          failures++;
          if (mism++ < 20) $display("FAIL: cell row %0d col %0d responds %0d times", r, c, got[80 * r + c]);
        end
      end
    $display("%0d cells fired, %0d spikes in all, %0d retina events", fired_cells, total, FRAMES * 60 * 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
