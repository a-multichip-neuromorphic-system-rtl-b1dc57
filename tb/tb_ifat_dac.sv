// tb_ifat_dac: writes every code, checks the output voltage against
// code * 1000 / 256 mV, and checks that the output holds while the input
// code changes without a write strobe.
module tb_ifat_dac;
  logic [7:0] code = 0;
  logic wr = 0;
  logic [15:0] vout;
  int checks = 0, failures = 0;

  ifat_dac #(.VREF_MV(1000)) dut (.code, .wr, .vout_mv(vout));

  initial begin
    int exp;
    for (int k = 0; k < 256; k++) begin
      code = 8'(k); #1 wr = 1; #1 wr = 0;
      code = 8'($urandom); #1;
      exp = (k * 1000) / 256;
      checks++;
      if (int'(vout) != exp) begin failures++; $display("FAIL: code %0d -> %0d", k, vout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
