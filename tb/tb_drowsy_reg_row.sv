// tb_drowsy_reg_row: random test of one drowsy register row.
// Two rows are tested side by side: the default two-read/one-write row and a
// four-read/two-write row (two-wide issue). A reference value per row is
// kept here; each cycle random word lines, write enables, drowsy flag and
// data are applied. Reads must return the value only when selected and
// awake, writes must land only when awake (the higher write port winning),
// and `blocked` must flag exactly the accesses made while drowsy. A value
// must survive a drowsy period during which writes are attempted.
module tb_drowsy_reg_row;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic drowsy;
  logic [1:0]  rwl1;
  logic [0:0]  wwl1, we1;
  logic [31:0] din1 [1];
  logic [31:0] rd1 [2];
  logic        blk1;
  logic [3:0]  rwl2;
  logic [1:0]  wwl2, we2;
  logic [31:0] din2 [2];
  logic [31:0] rd2 [4];
  logic        blk2;
  logic [31:0] ref1, ref2;
  int n_wr = 0, n_blocked_wr = 0, n_both = 0;

  always #5 clk = ~clk;

  drowsy_reg_row dut1 (.clk, .rst_n, .drowsy, .rwl(rwl1), .wwl(wwl1), .we(we1),
                       .din(din1), .rd(rd1), .blocked(blk1));
  drowsy_reg_row #(.NRP(4), .NWP(2)) dut2 (.clk, .rst_n, .drowsy, .rwl(rwl2), .wwl(wwl2),
                       .we(we2), .din(din2), .rd(rd2), .blocked(blk2));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    drowsy = 0; rwl1 = '0; wwl1 = '0; we1 = '0; din1[0] = '0;
    rwl2 = '0; wwl2 = '0; we2 = '0; din2[0] = '0; din2[1] = '0;
    ref1 = '0; ref2 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      drowsy  = ($urandom_range(0, 2) == 0);
      rwl1    = 2'($urandom);
      wwl1    = 1'($urandom);
      we1     = 1'($urandom);
      din1[0] = $urandom;
      rwl2    = 4'($urandom);
      wwl2    = 2'($urandom);
      we2     = 2'($urandom);
      din2[0] = $urandom;
      din2[1] = $urandom;
      #1;
      for (int p = 0; p < 2; p++)
        chk(rd1[p] == ((rwl1[p] && !drowsy) ? ref1 : 32'd0), $sformatf("2R1W read port %0d", p));
      for (int p = 0; p < 4; p++)
        chk(rd2[p] == ((rwl2[p] && !drowsy) ? ref2 : 32'd0), $sformatf("4R2W read port %0d", p));
      chk(blk1 == (drowsy && (rwl1 != 0 || (wwl1 & we1) != 0)), "2R1W blocked flag");
      chk(blk2 == (drowsy && (rwl2 != 0 || (wwl2 & we2) != 0)), "4R2W blocked flag");
      @(posedge clk);
      if (!drowsy) begin
        if (wwl1[0] && we1[0]) begin ref1 = din1[0]; n_wr++; end
        if (wwl2[0] && we2[0]) ref2 = din2[0];
        if (wwl2[1] && we2[1]) ref2 = din2[1];
        if ((wwl2 & we2) == 2'b11) n_both++;
      end else if (wwl1[0] && we1[0]) n_blocked_wr++;
    end
    // a value written before a drowsy period must survive it
    @(negedge clk); drowsy = 0; wwl1 = 1; we1 = 1; din1[0] = 32'hCAFE_F00D; rwl1 = 0;
    @(negedge clk); drowsy = 1; din1[0] = 32'h0;
    repeat (5) @(negedge clk);
    wwl1 = 0; we1 = 0; drowsy = 0; rwl1 = 2'b01; #1;
    chk(rd1[0] == 32'hCAFE_F00D, "value retained across drowsy period");
    chk(n_wr > 100 && n_blocked_wr > 50 && n_both > 50, "gated, accepted and dual writes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
