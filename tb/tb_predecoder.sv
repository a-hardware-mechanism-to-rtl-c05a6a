// tb_predecoder: random test of the fetch-stage predecoder.
// Random instruction words are fetched with random valid and hold. The
// combinational wake set must be the one-hot OR of the Rs/Rt/Rd fields
// (bits 25:21, 20:16, 15:11) of the bypassed word, or of the IR word while
// held, and the latched word lines and designators must appear one cycle
// later. A second instance with other field positions checks the
// parameters.
module tb_predecoder;
  int checks = 0, failures = 0;
  int n_hold = 0;
  logic clk = 0, rst_n = 0;
  logic hold, fetch_valid, ir_valid;
  logic [31:0] fetch_instr, ir_instr;
  logic [31:0] wake_next, rwl_rs_q, rwl_rt_q, rwl_rd_q;
  logic [4:0]  rs_q, rt_q, rd_q;
  logic [31:0] wake2, rs2_wl, rt2_wl, rd2_wl;
  logic [4:0]  rs2, rt2, rd2;

  always #5 clk = ~clk;

  predecoder dut (.*);
  predecoder #(.RS_LSB(0), .RT_LSB(5), .RD_LSB(27)) dut2 (
    .clk, .rst_n, .hold, .fetch_valid, .fetch_instr, .ir_valid, .ir_instr,
    .wake_next(wake2), .rwl_rs_q(rs2_wl), .rwl_rt_q(rt2_wl), .rwl_rd_q(rd2_wl),
    .rs_q(rs2), .rt_q(rt2), .rd_q(rd2));

  // IR model (the instruction register sits outside the predecoder)
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin ir_valid <= 0; ir_instr <= '0; end
    else if (!hold) begin ir_valid <= fetch_valid; ir_instr <= fetch_instr; end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  function automatic logic [31:0] oh(input logic [4:0] r);
    return 32'd1 << r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hold = 0; fetch_valid = 0; fetch_instr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] w, e1, e2;
      logic v;
      @(negedge clk);
      hold        = ($urandom_range(0, 4) == 0);
      fetch_valid = ($urandom_range(0, 5) != 0);
      fetch_instr = $urandom;
      #1;
      if (hold) n_hold++;
      w = hold ? ir_instr : fetch_instr;
      v = hold ? ir_valid : fetch_valid;
      e1 = v ? (oh(w[25:21]) | oh(w[20:16]) | oh(w[15:11])) : '0;
      e2 = v ? (oh(w[4:0]) | oh(w[9:5]) | oh(w[31:27])) : '0;
      chk(wake_next == e1, "wake_next (MIPS field positions)");
      chk(wake2 == e2, "wake_next (other field positions)");
      @(posedge clk); #1;
      chk(rwl_rs_q == (v ? oh(w[25:21]) : '0) && rs_q == w[25:21], "latched Rs");
      chk(rwl_rt_q == (v ? oh(w[20:16]) : '0) && rt_q == w[20:16], "latched Rt");
      chk(rwl_rd_q == (v ? oh(w[15:11]) : '0) && rd_q == w[15:11], "latched Rd");
      chk(rs2_wl == (v ? oh(w[4:0]) : '0) && rd2 == w[31:27], "latched, other positions");
      // latched word lines belong to what IR now holds
      chk(!ir_valid || rs_q == ir_instr[25:21], "latched Rs matches IR");
    end
    chk(n_hold > 100, "hold exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
