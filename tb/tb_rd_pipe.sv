// tb_rd_pipe: random test of the destination pipeline.
// Random destinations enter from decode; each must appear in execute one
// cycle later, in memory two, in write-back three. While it is in the
// memory stage, the wake request for the right file must be its one-hot
// word line (none when it does not write), and in write-back the latched
// write word line must be that same line. A second instance with
// WAKE_FROM_EX must additionally request the execute-stage destination.
module tb_rd_pipe;
  int checks = 0, failures = 0;
  int n_int_wake = 0, n_fp_wake = 0;
  logic clk = 0, rst_n = 0;
  logic id_valid, id_we, id_fp;
  logic [4:0] id_rd;
  logic ex_valid, ex_we, ex_fp, mem_valid, mem_we, mem_fp, wb_valid, wb_we, wb_fp;
  logic [4:0] ex_rd, mem_rd, wb_rd;
  logic [31:0] wb_wwl, wb_wake_int, wb_wake_fp;
  logic [31:0] e_wake_int, e_wake_fp;

  typedef struct packed { logic v, we, fp; logic [4:0] rd; } d_t;
  d_t hist [4];   // hist[k] = what entered decode's output k edges ago

  always #5 clk = ~clk;

  rd_pipe dut (.*);
  rd_pipe #(.WAKE_FROM_EX(1'b1)) dut_ex (
    .clk, .rst_n, .id_valid, .id_we, .id_fp, .id_rd,
    .ex_valid(), .ex_we(), .ex_fp(), .ex_rd(), .mem_valid(), .mem_we(), .mem_fp(), .mem_rd(),
    .wb_valid(), .wb_we(), .wb_fp(), .wb_rd(), .wb_wwl(),
    .wb_wake_int(e_wake_int), .wb_wake_fp(e_wake_fp));

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
    id_valid = 0; id_we = 0; id_fp = 0; id_rd = '0;
    for (int k = 0; k < 4; k++) hist[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      d_t e, m, w;
      logic [31:0] ml, el;
      @(negedge clk);
      id_valid = ($urandom_range(0, 4) != 0);
      id_we    = $urandom_range(0, 1);
      id_fp    = $urandom_range(0, 1);
      id_rd    = $urandom_range(0, 31);
      #1;
      e = hist[1]; m = hist[2]; w = hist[3];
      if (i >= 4) begin
        chk(ex_valid == e.v && (!e.v || (ex_we == e.we && ex_fp == e.fp && ex_rd == e.rd)), "execute stage");
        chk(mem_valid == m.v && (!m.v || (mem_we == m.we && mem_fp == m.fp && mem_rd == m.rd)), "memory stage");
        chk(wb_valid == w.v && (!w.v || (wb_we == w.we && wb_fp == w.fp && wb_rd == w.rd)), "write-back stage");
        ml = (m.v && m.we) ? (32'd1 << m.rd) : '0;
        chk(wb_wake_int == (m.fp ? '0 : ml), "integer wake request");
        chk(wb_wake_fp == (m.fp ? ml : '0), "fp wake request");
        el = (e.v && e.we) ? (32'd1 << e.rd) : '0;
        chk(e_wake_int == ((m.fp ? '0 : ml) | (e.fp ? '0 : el)), "early integer wake request");
        chk(e_wake_fp == ((m.fp ? ml : '0) | (e.fp ? el : '0)), "early fp wake request");
        chk(wb_wwl == ((w.v && w.we) ? (32'd1 << w.rd) : '0), "write-back word line");
        if (wb_wake_int != 0) n_int_wake++;
        if (wb_wake_fp != 0) n_fp_wake++;
      end
      @(posedge clk);
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0];
      hist[1] = '{v: id_valid, we: id_valid & id_we, fp: id_fp, rd: id_rd};
    end
    chk(n_int_wake > 100 && n_fp_wake > 100, "both files' wake requests exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
