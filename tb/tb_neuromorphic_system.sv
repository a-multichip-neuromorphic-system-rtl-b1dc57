// tb_neuromorphic_system: end-to-end test of the whole system at its default
// size (80 x 60 retina, 2 x 2400 neurons, 2^22-line lookup table).
// The CPU and a retina driver send address events; the lookup table is
// loaded so that cortex neurons report their spikes to the CPU. Phases:
//  1 a CPU event drives one neuron over threshold with N events per line;
//    its spike is looked up again (recurrence) and reaches the CPU
//  2 a row broadcast fires the 60 neurons of one row on chip 1
//  3 a global leak (broadcast, E = 0) then a broadcast to both chips fires
//    all 4800 neurons; every spike walks its own list
//  4 a probabilistic line (code 3: each try passes with probability 4/16)
//    drops some events
//  5 a 256-line list ends at offset 0xFF
//  6 retina events pass the fovea offset (some fall off the retina) while
//    the CPU sends at the same time
// Every CPU-bound event is checked against the expected multiset, and each
// mechanism is counted; one that never happened is a failure.
module tb_neuromorphic_system;
  import ifat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic fovea_en = 0;
  logic signed [6:0] row_off = 0;
  logic signed [7:0] col_off = 0;
  logic or_req = 0, or_ack, cpu_req = 0, cpu_ack, cpu_out_req, cpu_out_ack = 0;
  logic [12:0] or_addr = 0, cpu_addr = 0, cpu_out_addr;
  logic ram_re, ram_rvalid;
  logic [21:0] ram_addr;
  logic [35:0] ram_rdata;
  logic st_line, st_stop, st_full, st_drop, st_settle, st_fovea_drop;

  int checks = 0, failures = 0;
  int exp_cnt [bit [12:0]];
  int exp_total = 0, got_total = 0, got_cc = 0;
  int n_stop = 0, n_full = 0, n_drop = 0, n_settle = 0, n_fdrop = 0, n_contend = 0;
  int n_cx_cmd = 0, n_bcast = 0, n_spikes = 0;
  int cyc = 0, last_spike_cyc = 0;

  lut_ram_model #(.LAT(2)) u_ram (.clk, .re(ram_re), .addr(ram_addr), .rvalid(ram_rvalid), .rdata(ram_rdata));

  neuromorphic_system dut (.clk, .rst_n, .fovea_en, .fovea_row_off(row_off), .fovea_col_off(col_off),
    .or_req, .or_addr, .or_ack, .cpu_req, .cpu_addr, .cpu_ack,
    .cpu_out_req, .cpu_out_addr, .cpu_out_ack,
    .ram_re, .ram_addr, .ram_rvalid, .ram_rdata,
    .st_line, .st_stop, .st_full, .st_drop, .st_settle, .st_fovea_drop);

  // ---- counters -------------------------------------------------------------
  logic prev_cx_req = 0;
  logic [1:0] prev_spk = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    n_stop   += int'(st_stop);
    n_full   += int'(st_full);
    n_drop   += int'(st_drop);
    n_settle += int'(st_settle);
    n_fdrop  += int'(st_fovea_drop);
    if (or_req && cpu_req) n_contend++;
    if (dut.cx_in_req && !prev_cx_req) begin
      n_cx_cmd++;
      if (dut.cx_in_cmd.sel != SEL_CELL) n_bcast++;
    end
    for (int c = 0; c < 2; c++)
      if (dut.cx_out_req[c] && !prev_spk[c]) begin n_spikes++; last_spike_cyc = cyc; end
    prev_cx_req <= dut.cx_in_req;
    prev_spk    <= dut.cx_out_req;
  end

  // ---- table helpers --------------------------------------------------------
  function automatic ram_word_t mk(input logic [15:0] t, input int w, input int n,
                                   input int p, input int e);
    ram_word_t x;
    x.target = t; x.weight = 4'(w); x.nev = 4'(n); x.prob = 4'(p); x.erev = 8'(e);
    return x;
  endfunction
  task automatic put(input logic [13:0] idx, input int off, input ram_word_t w);
    u_ram.mem[{idx, 8'(off)}] = w;
  endtask
  function automatic logic [15:0] ext_t(input logic [12:0] a);
    return {3'b010, a};
  endfunction
  localparam ram_word_t STOP = '1;

  // events of weight w and equilibrium code e a resting neuron needs to fire
  // (V += w (E - V) / 64 with E = e * 1000 / 256 mV, threshold 500 mV)
  function automatic int n_to_fire(input int w, input int e);
    int v, n, em;
    em = e * 1000 / 256; v = 0; n = 0;
    while (v < 500 && n < 16) begin v = v + (((em - v) * w) >>> 6); n++; end
    return n;
  endfunction

  task automatic expect_code(input logic [12:0] c);
    exp_cnt[c] = exp_cnt.exists(c) ? exp_cnt[c] + 1 : 1;
    exp_total++;
  endtask

  // ---- CPU receiver ---------------------------------------------------------
  initial forever begin
    @(negedge clk);
    if (cpu_out_req) begin
      if (cpu_out_addr == 13'h0CC) got_cc++;
      else begin
        checks++;
        if (!exp_cnt.exists(cpu_out_addr) || exp_cnt[cpu_out_addr] == 0) begin
          failures++; $display("FAIL: unexpected CPU event %h", cpu_out_addr);
        end else exp_cnt[cpu_out_addr]--;
        got_total++;
      end
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
  task automatic or_send(input int r, input int c);
    @(negedge clk); or_addr = {6'(r), 7'(c)}; or_req = 1;
    while (!or_ack) @(negedge clk);
    or_req = 0;
    while (or_ack) @(negedge clk);
  endtask

  task automatic settle_out(input int max_cycles);
    int t = 0, quiet = 0;
    while (quiet < 400 && t < max_cycles) begin
      @(negedge clk); t++;
      if (dut.u_fpga.u_router.state == 0 && !cpu_out_req && dut.cx_out_req == 0) quiet++;
      else quiet = 0;
    end
    checks++;
    if (got_total != exp_total) begin
      failures++; $display("FAIL: %0d of %0d CPU events", got_total, exp_total);
    end
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nf, cmd0, spk0, st0, dr0, t0;
    nf = n_to_fire(15, 255);
    // every cortex neuron: empty list unless given one below
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 2400; i++)
        put({1'b1, 1'(c), 6'(i / 60), 6'(i % 60)}, 0, STOP);
    // neuron chip 0 (0,0) reports 0x0AB; chip 1 row 7 reports {1,7,col}
    put(14'h2000, 0, mk(ext_t(13'h0AB), 0, 1, 15, 0));
    put(14'h2000, 1, STOP);
    for (int j = 0; j < 60; j++) begin
      put({2'b11, 6'd7, 6'(j)}, 0, mk(ext_t({1'b1, 6'd7, 6'(j)}), 0, 1, 15, 0));
      put({2'b11, 6'd7, 6'(j)}, 1, STOP);
    end
    // CPU lists
    put(14'h1F00, 0, mk(16'h0000, 15, nf, 15, 255));                  // cell chip0 (0,0)
    put(14'h1F00, 1, STOP);
    put(14'h1F01, 0, mk({2'b10, 2'b00, 5'd0, 1'b1, 6'd7}, 15, nf, 15, 255)); // row 7 of chip 1
    put(14'h1F01, 1, STOP);
    put(14'h1F02, 0, mk({2'b10, 2'b10, 12'd0}, 15, 2, 15, 0));         // global leak
    put(14'h1F02, 1, STOP);
    put(14'h1F03, 0, mk({2'b10, 2'b10, 12'd0}, 15, nf, 15, 255));      // all neurons
    put(14'h1F03, 1, STOP);
    put(14'h1F04, 0, mk(ext_t(13'h0CC), 0, 15, 3, 0));                 // probabilistic
    put(14'h1F04, 1, STOP);
    for (int o = 0; o < 256; o++) put(14'h1F05, o, mk(ext_t(13'(13'h0D00 + o)), 0, 1, 15, 0));
    put(14'h1F06, 0, mk(ext_t(13'h0EE), 0, 1, 15, 0));
    put(14'h1F06, 1, STOP);

    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++;
    if (nf < 2) begin failures++; $display("FAIL: n_to_fire %0d", nf); end

    $display("phase 1: one neuron, %0d events per line", nf);
    expect_code(13'h0AB);
    cpu_send(13'h1F00);
    settle_out(20000);

    $display("phase 2: row broadcast");
    for (int j = 0; j < 60; j++) expect_code({1'b1, 6'd7, 6'(j)});
    cpu_send(13'h1F01);
    settle_out(50000);

    $display("phase 3: leak, then all 4800 neurons");
    cpu_send(13'h1F02);
    settle_out(20000);
    spk0 = n_spikes; st0 = n_stop;
    expect_code(13'h0AB);
    for (int j = 0; j < 60; j++) expect_code({1'b1, 6'd7, 6'(j)});
    t0 = cyc;
    cpu_send(13'h1F03);
    settle_out(2000000);
    // rate: the document quotes about 1,000,000 events/s; at an assumed
    // 50 MHz clock that is one routed spike per 50 cycles
    checks++;
    $display("  %0d cycles for 4800 spikes (%0d.%02d per spike)", last_spike_cyc - t0,
             (last_spike_cyc - t0) / 4800, ((last_spike_cyc - t0) % 4800) * 100 / 4800);
    if (last_spike_cyc - t0 > 50 * 4800) begin failures++; $display("FAIL: too slow"); end
    checks++;
    if (n_spikes - spk0 != 4800 || n_stop - st0 != 4801) begin
      failures++; $display("FAIL: %0d spikes, %0d list ends", n_spikes - spk0, n_stop - st0);
    end

    $display("phase 4: probabilistic line");
    dr0 = n_drop; got_cc = 0;
    cpu_send(13'h1F04);
    settle_out(20000);
    checks++;
    if (got_cc + (n_drop - dr0) != 15 || n_drop == dr0) begin
      failures++; $display("FAIL: %0d passed %0d dropped", got_cc, n_drop - dr0);
    end

    $display("phase 5: 256-line list");
    for (int o = 0; o < 256; o++) expect_code(13'(13'h0D00 + o));
    cpu_send(13'h1F05);
    settle_out(50000);

    $display("phase 6: retina through the fovea offset, CPU in parallel");
    fovea_en = 1; row_off = 7'sd2; col_off = -7'sd3;
    for (int r = 20; r < 24; r++)
      for (int c = 30; c < 34; c++) begin
        put({1'b0, 6'(r + 2), 7'(c - 3)}, 0, mk(ext_t(13'(2048 + (r + 2) * 80 + c - 3)), 0, 1, 15, 0));
        put({1'b0, 6'(r + 2), 7'(c - 3)}, 1, STOP);
      end
    cmd0 = n_fdrop;
    fork
      begin
        for (int r = 20; r < 24; r++)
          for (int c = 30; c < 34; c++) begin
            expect_code(13'(2048 + (r + 2) * 80 + c - 3));
            or_send(r, c);
          end
        or_send(59, 10);   // shifted below the last row
        or_send(10, 1);    // shifted left of column 0
      end
      for (int k = 0; k < 16; k++) begin
        expect_code(13'h0EE);
        cpu_send(13'h1F06);
      end
    join
    settle_out(50000);
    checks++;
    if (n_fdrop - cmd0 != 2) begin failures++; $display("FAIL: %0d fovea drops", n_fdrop - cmd0); end

    $display("mechanisms:");
    need("cortex commands", n_cx_cmd);
    need("broadcast commands", n_bcast);
    need("cortex spikes (recurrent lookups)", n_spikes);
    need("stop codes", n_stop);
    need("lists ended at 0xFF", n_full);
    need("probability drops", n_drop);
    need("DAC rewrites", n_settle);
    need("DAC values reused", n_cx_cmd - n_settle);
    need("fovea drops", n_fdrop);
    need("retina/CPU contention", n_contend);
    need("events to the CPU", got_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
