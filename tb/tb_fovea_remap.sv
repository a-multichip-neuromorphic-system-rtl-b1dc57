// tb_fovea_remap: 5000 random addresses and offsets; the expected shifted
// address and drop flag are computed from integer row/column arithmetic.
module tb_fovea_remap;
  logic enable;
  logic signed [6:0] row_off;
  logic signed [7:0] col_off;
  logic [12:0] in_addr, out_addr;
  logic out_drop;
  int checks = 0, failures = 0;

  fovea_remap dut (.enable, .row_off, .col_off, .in_addr, .out_addr, .out_drop);

  initial begin
    int r, c, er, ec;
    bit edrop;
    for (int i = 0; i < 5000; i++) begin
      r = $urandom % 60; c = $urandom % 80;
      enable  = (i % 10) != 0;
      row_off = 7'($signed($urandom % 41) - 20);
      col_off = 8'($signed($urandom % 61) - 30);
      in_addr = {6'(r), 7'(c)};
      #1;
      er = r + int'(row_off); ec = c + int'(col_off);
      if (!enable) begin er = r; ec = c; end
      edrop = enable && (er < 0 || er >= 60 || ec < 0 || ec >= 80);
      checks++;
      if (out_drop != edrop || (!edrop && out_addr != {6'(er), 7'(ec)})) begin
        failures++;
        $display("FAIL: r=%0d c=%0d off=%0d,%0d -> %h drop=%b", r, c, row_off, col_off, out_addr, out_drop);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
