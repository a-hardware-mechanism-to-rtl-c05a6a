// tb_drowsy_regfile: random test of the drowsy register file.
// Four instances: the default 32 x 32 file with two read ports and one
// write port, the same with HARD_ZERO on register 0 and on register 31
// (ZERO_REG), and a four-read/two-write file (two-wide issue). A reference array per instance is kept here. Each
// cycle picks random read and write registers and a random drowsy pattern in
// which the accessed registers are awake most of the time. Reads are checked
// against the reference with same-cycle write data forwarded by the
// comparators (the higher write port winning), reads of drowsy rows must
// return zero, and `blocked` must name exactly the drowsy rows accessed.
module tb_drowsy_regfile;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_blocked = 0, n_dual = 0;
  logic clk = 0, rst_n = 0;

  // 2R1W instances (plain and HARD_ZERO) share their inputs
  logic [31:0] drowsy;
  logic [31:0] rwl   [2];
  logic [4:0]  raddr [2];
  logic [31:0] rdata [2];
  logic [31:0] zdata [2];
  logic [0:0]  we;
  logic [31:0] wwl   [1];
  logic [4:0]  waddr [1];
  logic [31:0] wdata [1];
  logic [31:0] blocked, zblocked;
  // 4R2W instance
  logic [31:0] rwl4   [4];
  logic [4:0]  raddr4 [4];
  logic [31:0] rdata4 [4];
  logic [1:0]  we4;
  logic [31:0] wwl4   [2];
  logic [4:0]  waddr4 [2];
  logic [31:0] wdata4 [2];
  logic [31:0] blocked4;

  logic [31:0] ref_rf [32];
  logic [31:0] zref   [32];
  logic [31:0] zref31 [32];
  logic [31:0] z31data [2];
  logic [31:0] z31blocked;
  logic [31:0] ref4   [32];

  always #5 clk = ~clk;

  drowsy_regfile dut (.*);
  drowsy_regfile #(.HARD_ZERO(1'b1)) dut_z (
    .clk, .rst_n, .drowsy('0), .rwl, .raddr, .rdata(zdata),
    .we, .wwl, .waddr, .wdata, .blocked(zblocked));
  drowsy_regfile #(.HARD_ZERO(1'b1), .ZERO_REG(31)) dut_z31 (
    .clk, .rst_n, .drowsy('0), .rwl, .raddr, .rdata(z31data),
    .we, .wwl, .waddr, .wdata, .blocked(z31blocked));
  drowsy_regfile #(.NRP(4), .NWP(2)) dut4 (
    .clk, .rst_n, .drowsy, .rwl(rwl4), .raddr(raddr4), .rdata(rdata4),
    .we(we4), .wwl(wwl4), .waddr(waddr4), .wdata(wdata4), .blocked(blocked4));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    drowsy = '1; we = '0; we4 = '0;
    for (int p = 0; p < 2; p++) begin rwl[p] = '0; raddr[p] = '0; end
    for (int p = 0; p < 4; p++) begin rwl4[p] = '0; raddr4[p] = '0; end
    wwl[0] = '0; waddr[0] = '0; wdata[0] = '0;
    for (int q = 0; q < 2; q++) begin wwl4[q] = '0; waddr4[q] = '0; wdata4[q] = '0; end
    for (int i = 0; i < 32; i++) begin ref_rf[i] = '0; zref[i] = '0; zref31[i] = '0; ref4[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] exp, acc, exp_blk;
      logic [31:0] touched;
      @(negedge clk);
      // ---- 2R1W stimulus
      for (int p = 0; p < 2; p++) begin
        raddr[p] = $urandom_range(0, 31);
        rwl[p]   = ($urandom_range(0, 7) == 0) ? '0 : (32'd1 << raddr[p]);
      end
      waddr[0] = ($urandom_range(0, 3) == 0) ? raddr[0] : 5'($urandom_range(0, 31));
      we[0]    = 1'($urandom);
      wwl[0]   = we[0] ? (32'd1 << waddr[0]) : '0;
      wdata[0] = $urandom;
      // ---- 4R2W stimulus
      for (int p = 0; p < 4; p++) begin
        raddr4[p] = $urandom_range(0, 31);
        rwl4[p]   = ($urandom_range(0, 7) == 0) ? '0 : (32'd1 << raddr4[p]);
      end
      for (int q = 0; q < 2; q++) begin
        waddr4[q] = ($urandom_range(0, 2) == 0) ? raddr4[q] : 5'($urandom_range(0, 31));
        we4[q]    = 1'($urandom);
        wwl4[q]   = we4[q] ? (32'd1 << waddr4[q]) : '0;
        wdata4[q] = $urandom;
      end
      if ($urandom_range(0, 3) == 0) begin waddr4[1] = waddr4[0]; wwl4[1] = we4[1] ? wwl4[0] | (32'd1 << waddr4[0]) : '0; end
      // ---- drowsy pattern, mostly leaving the accessed rows awake
      touched = rwl[0] | rwl[1] | wwl[0];
      for (int p = 0; p < 4; p++) touched |= rwl4[p];
      for (int q = 0; q < 2; q++) touched |= wwl4[q];
      drowsy = $urandom;
      if ($urandom_range(0, 4) != 0) drowsy = drowsy & ~touched;
      #1;
      // ---- 2R1W checks
      for (int p = 0; p < 2; p++) begin
        exp = '0;
        if (rwl[p] != 0 && !drowsy[raddr[p]])
          exp = (we[0] && !drowsy[waddr[0]] && waddr[0] == raddr[p]) ? wdata[0] : ref_rf[raddr[p]];
        if (we[0] && !drowsy[waddr[0]] && rwl[p] != 0 && waddr[0] == raddr[p]) n_fwd++;
        chk(rdata[p] == exp, $sformatf("2R1W port %0d r%0d got %h exp %h", p, raddr[p], rdata[p], exp));
        exp = (rwl[p] == 0 || raddr[p] == 0) ? '0 :
              ((we[0] && waddr[0] == raddr[p]) ? wdata[0] : zref[raddr[p]]);
        chk(zdata[p] == exp, $sformatf("HARD_ZERO port %0d", p));
        exp = (rwl[p] == 0 || raddr[p] == 31) ? '0 :
              ((we[0] && waddr[0] == raddr[p] && waddr[0] != 31) ? wdata[0] : zref31[raddr[p]]);
        chk(z31data[p] == exp, $sformatf("ZERO_REG=31 port %0d", p));
      end
      exp_blk = drowsy & (rwl[0] | rwl[1] | wwl[0]);
      if (exp_blk != 0) n_blocked++;
      chk(blocked == exp_blk, "2R1W blocked vector");
      // ---- 4R2W checks
      for (int p = 0; p < 4; p++) begin
        acc = '0;
        if (rwl4[p] != 0 && !drowsy[raddr4[p]]) begin
          acc = ref4[raddr4[p]];
          for (int q = 0; q < 2; q++)
            if (we4[q] && !drowsy[waddr4[q]] && waddr4[q] == raddr4[p]) acc = wdata4[q];
        end
        chk(rdata4[p] == acc, $sformatf("4R2W port %0d", p));
      end
      exp_blk = drowsy & (rwl4[0] | rwl4[1] | rwl4[2] | rwl4[3] | wwl4[0] | wwl4[1]);
      chk(blocked4 == exp_blk, "4R2W blocked vector");
      @(posedge clk);
      if (we[0] && !drowsy[waddr[0]]) ref_rf[waddr[0]] = wdata[0];
      if (we[0] && waddr[0] != 0) zref[waddr[0]] = wdata[0];
      if (we[0] && waddr[0] != 31) zref31[waddr[0]] = wdata[0];
      if (we4 == 2'b11 && waddr4[0] == waddr4[1] && !drowsy[waddr4[0]]) n_dual++;
      for (int q = 0; q < 2; q++)
        if (we4[q] && !drowsy[waddr4[q]]) ref4[waddr4[q]] = wdata4[q];
    end
    chk(n_fwd > 50, "write-to-read forwarding exercised");
    chk(n_blocked > 50, "drowsy accesses exercised");
    chk(n_dual > 20, "two write ports on one register exercised");
    $display("forwarded=%0d blocked=%0d dual_writes=%0d", n_fwd, n_blocked, n_dual);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
