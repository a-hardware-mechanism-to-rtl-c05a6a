// tb_drowsy_rf_core_w2: the end-to-end test of tb_drowsy_rf_core with the
// pipeline two instructions wide (ISSUE_W = 2), the fetch/decode/issue width
// of the evaluated processor configuration: four read ports and two write
// ports per file, two predecoders whose wake sets are ORed, and two
// write-backs per cycle, the younger winning when both write one register.
//
// The testbench plays the host processor: it fetches random instruction
// words (with gaps), stalls decode at random, acts as the instruction
// decoder (the opcode picks one of five instruction classes that use the
// three register fields differently) and supplies a fresh random result for
// every instruction in write-back. A cycle-level reference model of the
// pipeline and of both register files, written independently here, predicts
// for every cycle: the IR, the operands latched for execute, the
// destination in every stage, and exactly which registers are active
// (reserved ones, the predecoded fields of the instruction in decode and
// the destination in write-back). No register may be accessed while drowsy.
//
// Mechanisms counted (each must occur): decode stalls, same-cycle
// write-to-read forwarding, destination wake-ups in write-back for a
// register no operand field named, needless wake-ups of fields an
// instruction does not use, registers going back to sleep after use, and
// writes to the zero register being dropped (and, with two slots, two
// write-backs to one register in the same cycle). It also prints the fraction of
// register-cycles spent drowsy.
module tb_drowsy_rf_core_w2;
  localparam int N = 32;
  localparam bit EX = 1'b0;   // WAKE_FROM_EX
  localparam int W = 2;
  localparam logic [N-1:0] RES = 32'hA000_0005;   // r0, r2, r29, r31
  localparam logic [N-1:0] FRES = '0;             // reserved fp registers
  localparam int XL = 32;                         // data width
  localparam int FS = 21, FT = 16, FD = 11;       // Rs, Rt, Rd field positions
  localparam logic [4:0] ZR = 0;                  // integer zero register
  localparam int CYCLES = 20000;

  int checks = 0, failures = 0;
  int n_stall = 0, n_fwd = 0, n_wb_only_wake = 0, n_needless = 0;
  int n_sleep = 0, n_zero_wr = 0, n_instr = 0, n_same_wr = 0;
  longint awake_cycles = 0, total_cycles = 0;

  logic clk = 0, rst_n = 0;
  logic stall;
  logic [W-1:0] fetch_valid, ir_valid, dec_we, dec_fp;
  logic [31:0] fetch_instr [W];
  logic [31:0] ir_instr [W];
  logic [4:0] dec_rd [W];
  logic [W-1:0] ex_valid, ex_we, ex_fp, mem_valid, mem_we, mem_fp, wb_valid, wb_we, wb_fp;
  logic [XL-1:0] ex_int_rs [W];
  logic [XL-1:0] ex_int_rt [W];
  logic [XL-1:0] ex_fp_rs [W];
  logic [XL-1:0] ex_fp_rt [W];
  logic [4:0] ex_rd [W];
  logic [4:0] mem_rd [W];
  logic [4:0] wb_rd [W];
  logic [XL-1:0] wb_data [W];
  logic [31:0] int_drowsy, fp_drowsy, int_wake_next, fp_wake_next;
  logic access_blocked;

  always #5 clk = ~clk;

  drowsy_rf_core #(.ISSUE_W(W), .WAKE_FROM_EX(EX)) dut (.*);

  // ---------------------------------------------------- instruction classes
  // 0: integer R-type  reads rs, rt   writes rd (int)
  // 1: integer I-type  reads rs       writes rt (int)
  // 2: FP arithmetic   reads rs, rt   writes rd (fp)
  // 3: store           reads rs, rt   no write
  // 4: jump            no register
  typedef struct packed { logic we, fp; logic [4:0] rd; logic [2:0] used; } dec_t;

  function automatic dec_t decode(input logic [31:0] w);
    dec_t d;
    case (w[31:26] % 5)
      0: d = '{we: 1, fp: 0, rd: w[FD+:5], used: 3'b111};
      1: d = '{we: 1, fp: 0, rd: w[FT+:5], used: 3'b011};
      2: d = '{we: 1, fp: 1, rd: w[FD+:5], used: 3'b111};
      3: d = '{we: 0, fp: 0, rd: w[FD+:5], used: 3'b011};
      default: d = '{we: 0, fp: 0, rd: w[FD+:5], used: 3'b000};
    endcase
    return d;
  endfunction

  always_comb begin
    for (int k = 0; k < W; k++) begin
      dec_t d;
      d = decode(ir_instr[k]);
      dec_we[k] = d.we;
      dec_fp[k] = d.fp;
      dec_rd[k] = d.rd;
    end
  end

  // ------------------------------------------------------ reference model
  typedef struct packed { logic v, we, fp; logic [4:0] rd; logic [XL-1:0] data; } st_t;
  st_t m_ex [W];
  st_t m_mem [W];
  st_t m_wb [W];
  logic [W-1:0] m_ir_valid;
  logic [31:0] m_ir [W];
  logic [XL-1:0] ref_int [N];
  logic [XL-1:0] ref_fp [N];
  logic [XL-1:0] e_int_rs [W];
  logic [XL-1:0] e_int_rt [W];
  logic [XL-1:0] e_fp_rs [W];
  logic [XL-1:0] e_fp_rt [W];
  logic [N-1:0] m_act_int, m_act_fp, n_act_int, n_act_fp;

  function automatic logic [N-1:0] oh(input logic [4:0] r);
    return N'(1) << r;
  endfunction

  function automatic logic [N-1:0] fields(input logic v, input logic [31:0] w);
    return v ? (oh(w[FS+:5]) | oh(w[FT+:5]) | oh(w[FD+:5])) : '0;
  endfunction

  // Value read in decode: the file, or a write-back of this cycle (the
  // youngest slot wins).
  function automatic logic [XL-1:0] rd_int(input logic [4:0] r);
    logic [XL-1:0] v;
    if (r == ZR) return '0;
    v = ref_int[r];
    for (int k = 0; k < W; k++)
      if (m_wb[k].v && m_wb[k].we && !m_wb[k].fp && m_wb[k].rd == r) v = m_wb[k].data;
    return v;
  endfunction

  function automatic logic [XL-1:0] rd_fp(input logic [4:0] r);
    logic [XL-1:0] v;
    v = ref_fp[r];
    for (int k = 0; k < W; k++)
      if (m_wb[k].v && m_wb[k].we && m_wb[k].fp && m_wb[k].rd == r) v = m_wb[k].data;
    return v;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stall = 0; fetch_valid = '0;
    for (int k = 0; k < W; k++) begin
      fetch_instr[k] = '0; wb_data[k] = '0; m_ir[k] = '0;
      m_ex[k] = '0; m_mem[k] = '0; m_wb[k] = '0;
      e_int_rs[k] = '0; e_int_rt[k] = '0; e_fp_rs[k] = '0; e_fp_rt[k] = '0;
    end
    m_ir_valid = '0;
    m_act_int = RES; m_act_fp = FRES;
    for (int i = 0; i < N; i++) begin ref_int[i] = '0; ref_fp[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    for (int c = 0; c < CYCLES; c++) begin
      logic [W-1:0] id_valid;
      dec_t d [W];
      logic [N-1:0] sel_pd, wbw_int, wbw_fp;
      // ---- drive this cycle's inputs (we are just after a falling edge)
      stall = ($urandom_range(0, 6) == 0);
      for (int k = 0; k < W; k++) begin
        fetch_valid[k] = ($urandom_range(0, 9) != 0);
        fetch_instr[k] = $urandom;
        wb_data[k]     = m_wb[k].data;
      end
      if ($urandom_range(0, 3) == 0) begin
        // make the next instruction read what an older one writes
        fetch_instr[0][FS+:5] = m_ex[W-1].rd;
      end
      #1;

      // ---- what the model expects before the edge
      id_valid = m_ir_valid & {W{!stall}};
      sel_pd = '0; wbw_int = '0; wbw_fp = '0;
      for (int k = 0; k < W; k++) begin
        d[k] = decode(m_ir[k]);
        sel_pd |= stall ? fields(m_ir_valid[k], m_ir[k]) : fields(fetch_valid[k], fetch_instr[k]);
        if (m_mem[k].v && m_mem[k].we && !m_mem[k].fp) wbw_int |= oh(m_mem[k].rd);
        if (m_mem[k].v && m_mem[k].we &&  m_mem[k].fp) wbw_fp  |= oh(m_mem[k].rd);
        if (EX && m_ex[k].v && m_ex[k].we && !m_ex[k].fp) wbw_int |= oh(m_ex[k].rd);
        if (EX && m_ex[k].v && m_ex[k].we &&  m_ex[k].fp) wbw_fp  |= oh(m_ex[k].rd);
      end
      n_act_int = RES | sel_pd | wbw_int;
      n_act_fp  = FRES | sel_pd | wbw_fp;
      chk(int_wake_next == n_act_int, "integer wake_next");
      chk(fp_wake_next == n_act_fp, "fp wake_next");
      chk(!access_blocked, "no access to a drowsy register");

      // mechanism statistics
      if (m_ir_valid != 0 && stall) n_stall++;
      for (int k = 0; k < W; k++) begin
        logic [N-1:0] dec_fields;
        dec_fields = '0;
        for (int j = 0; j < W; j++) dec_fields |= fields(m_ir_valid[j], m_ir[j]);
        for (int j = 0; j < W; j++)
          if (id_valid[k] && m_wb[j].v && m_wb[j].we &&
              (m_wb[j].rd == m_ir[k][FS+:5] || m_wb[j].rd == m_ir[k][FT+:5]) &&
              !(m_wb[j].rd == ZR && !m_wb[j].fp))
            n_fwd++;
        if (m_wb[k].v && m_wb[k].we && (dec_fields & oh(m_wb[k].rd)) == 0) n_wb_only_wake++;
        if (id_valid[k] && d[k].used != 3'b111) n_needless++;
        if (m_wb[k].v && m_wb[k].we && !m_wb[k].fp && m_wb[k].rd == ZR) n_zero_wr++;
        for (int j = k + 1; j < W; j++)
          if (m_wb[k].v && m_wb[k].we && m_wb[j].v && m_wb[j].we &&
              m_wb[k].fp == m_wb[j].fp && m_wb[k].rd == m_wb[j].rd)
            n_same_wr++;
      end
      n_sleep += $countones(m_act_int & ~n_act_int) + $countones(m_act_fp & ~n_act_fp);
      awake_cycles += $countones(m_act_int) + $countones(m_act_fp);
      total_cycles += 2 * N;

      // ---- the edge, in the model
      for (int k = 0; k < W; k++) begin
        if (id_valid[k]) begin
          e_int_rs[k] = rd_int(m_ir[k][FS+:5]);
          e_int_rt[k] = rd_int(m_ir[k][FT+:5]);
          e_fp_rs[k]  = rd_fp(m_ir[k][FS+:5]);
          e_fp_rt[k]  = rd_fp(m_ir[k][FT+:5]);
          n_instr++;
        end
      end
      for (int k = 0; k < W; k++) begin
        if (m_wb[k].v && m_wb[k].we) begin
          if (m_wb[k].fp) ref_fp[m_wb[k].rd] = m_wb[k].data;
          else if (m_wb[k].rd != ZR) ref_int[m_wb[k].rd] = m_wb[k].data;
        end
      end
      for (int k = 0; k < W; k++) begin
        m_wb[k]  = m_mem[k];
        m_mem[k] = m_ex[k];
        m_ex[k]  = '{v: id_valid[k], we: id_valid[k] && d[k].we, fp: d[k].fp, rd: d[k].rd, data: XL'({$urandom, $urandom})};
      end
      if (!stall) begin
        m_ir_valid = fetch_valid;
        for (int k = 0; k < W; k++) m_ir[k] = fetch_instr[k];
      end
      m_act_int = n_act_int;
      m_act_fp  = n_act_fp;

      @(negedge clk);
      // ---- compare the state after the edge
      for (int k = 0; k < W; k++) begin
        chk(ir_valid[k] == m_ir_valid[k] && (!m_ir_valid[k] || ir_instr[k] == m_ir[k]), "IR");
        chk(ex_valid[k] == m_ex[k].v, "execute valid");
        if (m_ex[k].v) begin
          chk(ex_int_rs[k] == e_int_rs[k] && ex_int_rt[k] == e_int_rt[k], $sformatf("integer operands, slot %0d", k));
          chk(ex_fp_rs[k] == e_fp_rs[k] && ex_fp_rt[k] == e_fp_rt[k], $sformatf("fp operands, slot %0d", k));
          chk(ex_we[k] == m_ex[k].we && ex_fp[k] == m_ex[k].fp && ex_rd[k] == m_ex[k].rd, "execute destination");
        end
        chk(mem_valid[k] == m_mem[k].v && (!m_mem[k].v || (mem_we[k] == m_mem[k].we && mem_rd[k] == m_mem[k].rd && mem_fp[k] == m_mem[k].fp)), "memory destination");
        chk(wb_valid[k] == m_wb[k].v && (!m_wb[k].v || (wb_we[k] == m_wb[k].we && wb_rd[k] == m_wb[k].rd && wb_fp[k] == m_wb[k].fp)), "write-back destination");
      end
      chk(int_drowsy == ~m_act_int, "integer drowsy vector");
      chk(fp_drowsy == ~m_act_fp, "fp drowsy vector");
    end

    $display("instructions=%0d stalls=%0d forwards=%0d wb_only_wakes=%0d needless=%0d sleeps=%0d zero_writes=%0d same_reg_writes=%0d",
             n_instr, n_stall, n_fwd, n_wb_only_wake, n_needless, n_sleep, n_zero_wr, n_same_wr);
    $display("drowsy fraction of register-cycles = %0.1f%%",
             100.0 * real'(total_cycles - awake_cycles) / real'(total_cycles));
    chk(n_stall > 0, "stall occurred");
    chk(n_fwd > 0, "write-to-read forwarding occurred");
    chk(n_wb_only_wake > 0, "write-back destination wake-up occurred");
    chk(n_needless > 0, "needless predecode wake-up occurred");
    chk(n_sleep > 0, "registers returned to drowsy");
    chk(n_zero_wr > 0, "zero-register write dropped");
    if (W > 1) chk(n_same_wr > 0, "two slots writing one register in one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
