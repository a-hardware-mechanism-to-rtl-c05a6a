// tb_addr_decoder: exhaustive test of the register address decoder.
// Checks every address with the enable high and low against a one-hot value
// computed here, for the 32-register default and for a 12-entry decoder
// (addresses 12..15 must select nothing).
module tb_addr_decoder;
  int checks = 0, failures = 0;

  logic        en32;
  logic [4:0]  a32;
  logic [31:0] wl32;
  logic        en12;
  logic [3:0]  a12;
  logic [11:0] wl12;

  addr_decoder dut32 (.en(en32), .addr(a32), .wl(wl32));
  addr_decoder #(.N(12)) dut12 (.en(en12), .addr(a12), .wl(wl12));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < 32; a++) begin
        logic [31:0] exp;
        en32 = e[0]; a32 = a[4:0];
        #1;
        exp = 32'd0;
        if (e == 1) exp[a] = 1'b1;
        checks++;
        if (wl32 !== exp) begin
          failures++;
          $display("FAIL N=32 en=%0d addr=%0d wl=%h exp=%h", e, a, wl32, exp);
        end
      end
      for (int a = 0; a < 16; a++) begin
        logic [11:0] exp;
        en12 = e[0]; a12 = a[3:0];
        #1;
        exp = 12'd0;
        if (e == 1 && a < 12) exp[a] = 1'b1;
        checks++;
        if (wl12 !== exp) begin
          failures++;
          $display("FAIL N=12 en=%0d addr=%0d wl=%h exp=%h", e, a, wl12, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
