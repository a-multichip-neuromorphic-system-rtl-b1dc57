// tb_lut_router: loads synapse lists into a RAM model and checks the exact
// sequence of DAC writes, cortex commands and external events the router
// produces against a reference walk computed in the testbench (including its
// own copy of the LFSR for the probability test). Lists cover: the stop code,
// several events per line, DAC reuse, external targets, broadcast targets,
// reserved words, N = 0, a 256-line list that ends at offset 0xFF, and
// probabilistic lines. Also checks the DAC settling gap before a command.
module tb_lut_router;
  import ifat_pkg::*;
  localparam int SETTLE = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ev_valid = 0, ev_ready;
  logic [INDEX_W-1:0] ev_index = '0;
  logic ram_re, ram_rvalid;
  logic [RAM_ADDR_W-1:0] ram_addr;
  logic [RAM_DATA_W-1:0] ram_rdata;
  logic [7:0] dac_code;
  logic dac_wr, cx_valid, cx_ready = 0, ext_valid, ext_ready = 0;
  cx_cmd_t cx_cmd;
  logic [ADDR_W-1:0] ext_addr;
  logic st_line, st_stop, st_full, st_drop, st_settle;
  int checks = 0, failures = 0;
  int n_stop = 0, n_full = 0, n_drop = 0;

  lut_ram_model #(.AW(RAM_ADDR_W), .DW(RAM_DATA_W), .LAT(3)) u_ram (
    .clk, .re(ram_re), .addr(ram_addr), .rvalid(ram_rvalid), .rdata(ram_rdata));

  lut_router #(.DAC_SETTLE(SETTLE)) dut (.clk, .rst_n, .ev_valid, .ev_index, .ev_ready,
    .ram_re, .ram_addr, .ram_rvalid, .ram_rdata, .dac_code, .dac_wr,
    .cx_valid, .cx_cmd, .cx_ready, .ext_valid, .ext_addr, .ext_ready,
    .st_line, .st_stop, .st_full, .st_drop, .st_settle);

  // expected output items: {kind[1:0], payload[19:0]}; 1 DAC, 2 cortex, 3 ext
  logic [21:0] expq[$];
  logic [15:0] lfsr = 16'hACE1;
  int dac_now = -1;
  int last_wr = -100, cyc = 0;

  function automatic ram_word_t mk(input logic [15:0] t, input int w, input int n,
                                   input int p, input int e);
    ram_word_t x;
    x.target = t; x.weight = 4'(w); x.nev = 4'(n); x.prob = 4'(p); x.erev = 8'(e);
    return x;
  endfunction

  task automatic put(input int idx, input int off, input ram_word_t w);
    u_ram.mem[{14'(idx), 8'(off)}] = w;
  endtask

  // reference walk of one list
  task automatic ref_walk(input int idx);
    for (int off = 0; off < 256; off++) begin
      ram_word_t w;
      w = u_ram.mem[{14'(idx), 8'(off)}];
      if (w.target == 16'hFFFF) return;
      if (w.target[15:14] == 2'b11) continue;
      for (int k = 0; k < int'(w.nev); k++) begin
        bit pass;
        pass = lfsr[3:0] <= w.prob;
        lfsr = {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
        if (!pass) continue;
        if (w.target[15:14] == 2'b01) expq.push_back({2'd3, 7'd0, w.target[12:0]});
        else begin
          if (dac_now != int'(w.erev)) begin
            expq.push_back({2'd1, 12'd0, w.erev});
            dac_now = int'(w.erev);
          end
          expq.push_back({2'd2, 1'b0, 19'(target_to_cmd(w.target, w.weight))});
        end
      end
    end
  endtask

  task automatic got(input logic [21:0] it);
    checks++;
    if (expq.size() == 0 || it != expq[0]) begin
      failures++;
      $display("FAIL: got %h expected %h", it, expq.size() ? expq[0] : 22'h3FFFFF);
    end
    if (expq.size()) void'(expq.pop_front());
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dac_wr) begin got({2'd1, 12'd0, dac_code}); last_wr = cyc; end
    if (cx_valid && cx_ready) begin
      got({2'd2, 1'b0, 19'(cx_cmd)});
      checks++;
      if (cyc - last_wr < SETTLE) begin failures++; $display("FAIL: DAC not settled"); end
    end
    if (ext_valid && ext_ready) got({2'd3, 7'd0, ext_addr});
    n_stop += int'(st_stop); n_full += int'(st_full); n_drop += int'(st_drop);
    cx_ready  <= ($urandom % 3) != 0;
    ext_ready <= ($urandom % 2) != 0;
  end

  task automatic event_in(input int idx);
    ref_walk(idx);
    @(negedge clk); ev_valid = 1; ev_index = 14'(idx);
    @(posedge clk); while (!ev_ready) @(posedge clk);
    @(negedge clk); ev_valid = 0;
    while (!ev_ready) @(negedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // list A (index 0): the example lookup-table contents: target 9, then stop
    put(0, 0, mk(16'h0009, 7, 10, 5, 8'hA0));
    put(0, 1, mk(16'hFFFF, 15, 15, 15, 255));
    // list B: two events per line, DAC reused, stop
    put(5, 0, mk({2'b00, 1'b0, 1'b1, 6'd1, 6'd2}, 7, 2, 15, 8'hA0));
    put(5, 1, mk(16'hFFFF, 0, 0, 0, 0));
    // list C: external, broadcast row, reserved, N = 0, broadcast all, stop
    put(9, 0, mk({3'b010, 13'h0123}, 0, 1, 15, 0));
    put(9, 1, mk({2'b10, 2'b00, 5'd0, 1'b1, 6'd5}, 3, 1, 15, 8'hA0));
    put(9, 2, mk(16'hC000, 1, 1, 15, 1));
    put(9, 3, mk(16'h0044, 1, 0, 15, 1));
    put(9, 4, mk({2'b10, 2'b10, 12'd0}, 8, 1, 15, 8'h00));
    put(9, 5, mk(16'hFFFF, 0, 0, 0, 0));
    // list D (a cortex index): 256 lines, no stop code
    for (int o = 0; o < 256; o++) put(14'h2001, o, mk(16'(o), 1, 1, 15, (o % 2) ? 8'h10 : 8'h20));
    // list E: probabilistic lines
    put(77, 0, mk(16'h0100, 4, 15, 7, 8'h33));
    put(77, 1, mk({3'b010, 13'h1ABC}, 0, 15, 2, 0));
    put(77, 2, mk(16'hFFFF, 0, 0, 0, 0));

    repeat (3) @(posedge clk);
    rst_n = 1;
    event_in(0);
    event_in(5);
    event_in(9);
    event_in(14'h2001);
    for (int i = 0; i < 6; i++) event_in(77);
    event_in(5);
    repeat (50) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d items missing", expq.size()); end
    checks++;
    if (n_stop != 10 || n_full != 1 || n_drop == 0) begin
      failures++; $display("FAIL: stop %0d full %0d drop %0d", n_stop, n_full, n_drop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
