// tb_ifat_fpga: the IFAT's FPGA with a RAM model and two I&F chip responders.
// Every presynaptic index used gets a one-line list whose target is an
// external event carrying a code of that index, so the events that come out
// show which table entry each input reached. Checks: CPU events bypass the
// fovea offset, retina events are shifted (or dropped when shifted off the
// retina), cortex spikes index the cortex half of the table, events from all
// three sources arriving together are all routed, and a broadcast to both
// chips completes only after both chips acknowledged while a single-cell
// command reaches only its chip.
module tb_ifat_fpga;
  import ifat_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic fovea_en = 0;
  logic signed [6:0] row_off = 0;
  logic signed [7:0] col_off = 0;
  logic ext_in_req = 0, ext_in_ack, ext_out_req, ext_out_ack = 0;
  logic [13:0] ext_in_data = 0;
  logic [12:0] ext_out_data;
  logic ram_re, ram_rvalid;
  logic [21:0] ram_addr;
  logic [35:0] ram_rdata;
  logic [7:0] dac_code;
  logic dac_wr, cx_in_req;
  cx_cmd_t cx_in_cmd;
  logic [1:0] cx_in_ack = 0, cx_out_req = 0, cx_out_ack;
  logic [1:0][11:0] cx_out_addr = '0;
  logic st_line, st_stop, st_full, st_drop, st_settle, st_fovea_drop;
  int checks = 0, failures = 0, n_fdrop = 0;
  int exp_cnt [bit [12:0]];
  int got_total = 0, exp_total = 0;
  cx_cmd_t seen [2][$];

  lut_ram_model #(.LAT(2)) u_ram (.clk, .re(ram_re), .addr(ram_addr), .rvalid(ram_rvalid), .rdata(ram_rdata));

  ifat_fpga dut (.clk, .rst_n, .fovea_en, .fovea_row_off(row_off), .fovea_col_off(col_off),
    .ext_in_req, .ext_in_data, .ext_in_ack, .ext_out_req, .ext_out_data, .ext_out_ack,
    .ram_re, .ram_addr, .ram_rvalid, .ram_rdata, .dac_code, .dac_wr,
    .cx_in_req, .cx_in_cmd, .cx_in_ack, .cx_out_req, .cx_out_addr, .cx_out_ack,
    .st_line, .st_stop, .st_full, .st_drop, .st_settle, .st_fovea_drop);

  function automatic logic [12:0] code_of(input logic [13:0] idx);
    return 13'((int'(idx) * 37 + 11) % 8191);
  endfunction

  // give index idx a one-line list: external event code_of(idx), then stop
  task automatic prog(input logic [13:0] idx);
    ram_word_t w;
    w = '0; w.target = {3'b010, code_of(idx)}; w.nev = 1; w.prob = 4'hF;
    u_ram.mem[{idx, 8'd0}] = w;
    w = '1;
    u_ram.mem[{idx, 8'd1}] = w;
  endtask

  task automatic expect_code(input logic [12:0] c);
    exp_cnt[c] = exp_cnt.exists(c) ? exp_cnt[c] + 1 : 1;
    exp_total++;
  endtask

  // external output receiver
  initial forever begin
    @(negedge clk);
    if (ext_out_req) begin
      checks++;
      if (!exp_cnt.exists(ext_out_data) || exp_cnt[ext_out_data] == 0) begin
        failures++; $display("FAIL: unexpected external event %h", ext_out_data);
      end else exp_cnt[ext_out_data]--;
      got_total++;
      ext_out_ack = 1;
      while (ext_out_req) @(negedge clk);
      ext_out_ack = 0;
    end
  end

  // I&F chip responders
  for (genvar c = 0; c < 2; c++) begin : g_resp
    initial forever begin
      @(negedge clk);
      if (cx_in_req && !cx_in_ack[c] &&
          (cx_in_cmd.sel == SEL_ALL || cx_in_cmd.chip == c[0])) begin
        seen[c].push_back(cx_in_cmd);
        repeat (c == 1 ? 6 : 1) @(negedge clk);
        cx_in_ack[c] = 1;
        while (cx_in_req) @(negedge clk);
        cx_in_ack[c] = 0;
      end
    end
  end

  task automatic ext_send(input logic [13:0] d);
    @(negedge clk); ext_in_data = d; ext_in_req = 1;
    while (!ext_in_ack) @(negedge clk);
    ext_in_req = 0;
    while (ext_in_ack) @(negedge clk);
  endtask

  task automatic chip_send(input int c, input logic [11:0] a);
    @(negedge clk); cx_out_addr[c] = a; cx_out_req[c] = 1;
    while (!cx_out_ack[c]) @(negedge clk);
    cx_out_req[c] = 0;
    while (cx_out_ack[c]) @(negedge clk);
  endtask

  task automatic wait_out;
    int t = 0;
    while (got_total < exp_total && t < 5000) begin @(negedge clk); t++; end
    repeat (30) @(negedge clk);
    checks++;
    if (got_total != exp_total) begin failures++; $display("FAIL: %0d of %0d events out", got_total, exp_total); end
  endtask

  always @(posedge clk) n_fdrop += int'(st_fovea_drop);

  // four-phase rule on the internal bus: the request may fall only after
  // every chip it addresses has acknowledged
  logic       prev_req = 0;
  logic [1:0] prev_ack = 0, prev_sel = 0;
  always @(posedge clk) begin
    if (prev_req && !cx_in_req) begin
      checks++;
      if ((prev_ack & prev_sel) != prev_sel) begin
        failures++; $display("FAIL: request withdrawn before all chips acknowledged");
      end
    end
    prev_req <= cx_in_req;
    prev_ack <= cx_in_ack;
    prev_sel <= (cx_in_cmd.sel == SEL_ALL) ? 2'b11 : (cx_in_cmd.chip ? 2'b10 : 2'b01);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fovea_en = 1; row_off = 7'sd3; col_off = -8'sd5;
    // CPU events: no offset
    for (int i = 0; i < 30; i++) begin
      logic [12:0] a;
      a = 13'($urandom);
      prog({1'b0, a}); expect_code(code_of({1'b0, a}));
      ext_send({1'b1, a});
    end
    wait_out();
    // retina events: shifted by (+3, -5); some fall off the retina
    for (int i = 0; i < 60; i++) begin
      int r, c, rr, cc;
      r = $urandom % 60; c = $urandom % 80;
      if (i < 5) begin r = 58; c = 2; end
      rr = r + 3; cc = c - 5;
      if (rr < 60 && cc >= 0) begin
        prog({1'b0, 6'(rr), 7'(cc)}); expect_code(code_of({1'b0, 6'(rr), 7'(cc)}));
      end
      ext_send({1'b0, 6'(r), 7'(c)});
    end
    wait_out();
    checks++;
    if (n_fdrop < 5) begin failures++; $display("FAIL: only %0d fovea drops", n_fdrop); end
    // cortex spikes
    for (int i = 0; i < 30; i++) begin
      int c;
      logic [11:0] a;
      c = i % 2; a = {6'($urandom % 40), 6'($urandom % 60)};
      prog({1'b1, 1'(c), a}); expect_code(code_of({1'b1, 1'(c), a}));
      chip_send(c, a);
    end
    wait_out();
    // all three sources together
    fovea_en = 0;
    for (int i = 0; i < 20; i++) begin
      logic [12:0] a0; logic [11:0] a1, a2;
      a0 = 13'(i * 3 + 100); a1 = 12'(i + 5); a2 = 12'(i + 700);
      prog({1'b0, a0}); expect_code(code_of({1'b0, a0}));
      prog({2'b10, a1}); expect_code(code_of({2'b10, a1}));
      prog({2'b11, a2}); expect_code(code_of({2'b11, a2}));
      fork
        ext_send({1'b1, a0});
        chip_send(0, a1);
        chip_send(1, a2);
      join
    end
    wait_out();
    // cortex commands: broadcast to both chips, then one cell on chip 1
    begin
      ram_word_t w;
      w = '0; w.target = {2'b10, 2'b10, 12'd0}; w.weight = 5; w.nev = 1; w.prob = 4'hF; w.erev = 8'h40;
      u_ram.mem[{14'd4000, 8'd0}] = w;
      w.target = {3'b000, 1'b1, 6'd7, 6'd9}; w.weight = 9;
      u_ram.mem[{14'd4000, 8'd1}] = w;
      u_ram.mem[{14'd4000, 8'd2}] = '1;
      ext_send({1'b1, 13'd4000});
      repeat (200) @(negedge clk);
      checks++;
      if (seen[0].size() != 1 || seen[1].size() != 2) begin
        failures++; $display("FAIL: chips saw %0d and %0d commands", seen[0].size(), seen[1].size());
      end else begin
        checks++;
        if (seen[0][0].sel != SEL_ALL || seen[1][0].sel != SEL_ALL || seen[1][1].sel != SEL_CELL ||
            seen[1][1].row != 7 || seen[1][1].col != 9 || seen[1][1].weight != 9)
          failures++;
      end
      checks++;
      if (dac_code != 8'h40) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
