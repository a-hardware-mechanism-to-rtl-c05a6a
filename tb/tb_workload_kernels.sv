// tb_workload_kernels: the full-size drowsy register file driven by real
// instruction streams.
//
// An instruction-set model in this testbench executes two small integer
// kernels written in MIPS encodings: a bitwise CRC-32 over 48 words and a
// population count over 48 words, the kind of inner loops found in the crc
// and bitcount programs of the embedded benchmark suites. It records the
// committed instruction stream with the source values and results of every
// instruction (branches resolved, no delay slots). The stream is fed to
// drowsy_rf_core one instruction per cycle with no stalls. The testbench
// plays the rest of the processor: it decodes the destination, forwards
// results of the two older instructions still in flight (as the host
// bypass network would), and delivers each result in write-back.
//
// Checks: every source operand seen in execute, after forwarding, equals
// the architectural value from the model; after the run every integer
// register, read back through the pipeline, holds the model's value; the
// stream flows without a lost cycle (one instruction enters execute per
// cycle); no drowsy register is ever accessed. It prints the fraction of
// register-cycles spent drowsy and the share of predecoded fields that
// named a register the instruction does not use, per kernel.
module tb_workload_kernels;
  localparam int N = 32;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic stall;
  logic [0:0] fetch_valid, ir_valid, dec_we, dec_fp;
  logic [31:0] fetch_instr [1];
  logic [31:0] ir_instr [1];
  logic [4:0] dec_rd [1];
  logic [0:0] ex_valid, ex_we, ex_fp, mem_valid, mem_we, mem_fp, wb_valid, wb_we, wb_fp;
  logic [31:0] ex_int_rs [1];
  logic [31:0] ex_int_rt [1];
  logic [31:0] ex_fp_rs [1];
  logic [31:0] ex_fp_rt [1];
  logic [4:0] ex_rd [1];
  logic [4:0] mem_rd [1];
  logic [4:0] wb_rd [1];
  logic [31:0] wb_data [1];
  logic [31:0] int_drowsy, fp_drowsy, int_wake_next, fp_wake_next;
  logic access_blocked;

  always #5 clk = ~clk;

  drowsy_rf_core dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------- encoding
  localparam logic [4:0] ZERO = 0, V0 = 2, A0 = 4, A1 = 5, T0 = 8, T1 = 9,
                         T2 = 10, T3 = 11, T5 = 13, S0 = 16;

  function automatic logic [31:0] r_op(input logic [4:0] rs, rt, rd,
                                       input logic [4:0] sh, input logic [5:0] fn);
    return {6'd0, rs, rt, rd, sh, fn};
  endfunction
  function automatic logic [31:0] i_op(input logic [5:0] op, input logic [4:0] rs, rt,
                                       input int imm);
    return {op, rs, rt, 16'(imm)};
  endfunction

  localparam logic [5:0] F_SLL = 6'h00, F_SRL = 6'h02, F_ADDU = 6'h21, F_SUBU = 6'h23,
                         F_AND = 6'h24, F_OR = 6'h25, F_XOR = 6'h26, F_NOR = 6'h27;
  localparam logic [5:0] O_BEQ = 6'h04, O_BNE = 6'h05, O_ADDIU = 6'h09, O_ANDI = 6'h0c,
                         O_ORI = 6'h0d, O_LUI = 6'h0f, O_LW = 6'h23, O_SW = 6'h2b;

  logic [31:0] prog [$];
  task automatic emit(input logic [31:0] w); prog.push_back(w); endtask
  function automatic int here(); return prog.size(); endfunction
  function automatic int boff(input int from, input int to); return to - (from + 1); endfunction

  // ------------------------------------------------------ destination info
  typedef struct packed { logic we; logic [4:0] rd; logic [2:0] used; } dinfo_t;  // used: {rd,rt,rs} fields

  function automatic dinfo_t dinfo(input logic [31:0] w);
    dinfo_t d;
    d = '0;
    case (w[31:26])
      6'h00: d = '{we: 1, rd: w[15:11], used: (w[5:0] == F_SLL || w[5:0] == F_SRL) ? 3'b110 : 3'b111};
      O_ADDIU, O_ANDI, O_ORI, O_LW: d = '{we: 1, rd: w[20:16], used: 3'b011};
      O_LUI: d = '{we: 1, rd: w[20:16], used: 3'b010};
      O_SW, O_BEQ, O_BNE: d = '{we: 0, rd: 0, used: 3'b011};
      default: d = '0;
    endcase
    return d;
  endfunction

  always_comb begin
    dinfo_t d;
    d = dinfo(ir_instr[0]);
    dec_we[0] = d.we;
    dec_fp[0] = 1'b0;
    dec_rd[0] = d.rd;
  end

  // -------------------------------------------------- instruction-set model
  typedef struct { logic [31:0] w; logic we; logic [4:0] rd; logic [31:0] res;
                   logic [31:0] rs_v, rt_v; logic rs_u, rt_u; } tr_t;
  tr_t trace [$];
  logic [31:0] regs [N];
  logic [31:0] dmem [256];

  task automatic run_model();
    int pc = 0, steps = 0;
    while (pc < prog.size() && steps < 100000) begin
      logic [31:0] w, a, b, r;
      tr_t t;
      dinfo_t d;
      int npc;
      w = prog[pc]; a = regs[w[25:21]]; b = regs[w[20:16]]; r = '0;
      npc = pc + 1;
      d = dinfo(w);
      case (w[31:26])
        6'h00: case (w[5:0])
          F_SLL:  r = b << w[10:6];
          F_SRL:  r = b >> w[10:6];
          F_ADDU: r = a + b;
          F_SUBU: r = a - b;
          F_AND:  r = a & b;
          F_OR:   r = a | b;
          F_XOR:  r = a ^ b;
          F_NOR:  r = ~(a | b);
          default: r = '0;
        endcase
        O_ADDIU: r = a + {{16{w[15]}}, w[15:0]};
        O_ANDI:  r = a & {16'd0, w[15:0]};
        O_ORI:   r = a | {16'd0, w[15:0]};
        O_LUI:   r = {w[15:0], 16'd0};
        O_LW:    r = dmem[8'((a + {{16{w[15]}}, w[15:0]}) >> 2)];
        O_SW:    dmem[8'((a + {{16{w[15]}}, w[15:0]}) >> 2)] = b;
        O_BEQ:   if (a == b) npc = pc + 1 + int'($signed(w[15:0]));
        O_BNE:   if (a != b) npc = pc + 1 + int'($signed(w[15:0]));
        default: ;
      endcase
      t.w = w; t.we = d.we; t.rd = d.rd; t.res = r;
      t.rs_v = a; t.rt_v = b; t.rs_u = d.used[0]; t.rt_u = d.used[1];
      trace.push_back(t);
      if (d.we && d.rd != 0) regs[d.rd] = r;
      pc = npc;
      steps++;
    end
  endtask

  // CRC-32 (reflected, polynomial 0xEDB88320), one data word per byte.
  task automatic build_crc(input int nbytes);
    int l1, l2;
    prog.delete();
    emit(i_op(O_ORI, ZERO, A0, 0));
    emit(i_op(O_ADDIU, ZERO, A1, nbytes));
    emit(i_op(O_LUI, ZERO, V0, 16'hFFFF));
    emit(i_op(O_ORI, V0, V0, 16'hFFFF));
    emit(i_op(O_LUI, ZERO, T5, 16'hEDB8));
    emit(i_op(O_ORI, T5, T5, 16'h8320));
    l1 = here();
    emit(i_op(O_LW, A0, T0, 0));
    emit(i_op(O_ANDI, T0, T0, 255));
    emit(r_op(V0, T0, V0, 0, F_XOR));
    emit(i_op(O_ADDIU, ZERO, T1, 8));
    l2 = here();
    emit(i_op(O_ANDI, V0, T2, 1));
    emit(r_op(ZERO, V0, V0, 1, F_SRL));
    emit(r_op(ZERO, T2, T3, 0, F_SUBU));
    emit(r_op(T3, T5, T3, 0, F_AND));
    emit(r_op(V0, T3, V0, 0, F_XOR));
    emit(i_op(O_ADDIU, T1, T1, -1));
    emit(i_op(O_BNE, T1, ZERO, boff(here(), l2)));
    emit(i_op(O_ADDIU, A0, A0, 4));
    emit(i_op(O_ADDIU, A1, A1, -1));
    emit(i_op(O_BNE, A1, ZERO, boff(here(), l1)));
    emit(r_op(V0, ZERO, V0, 0, F_NOR));
    emit(i_op(O_ORI, ZERO, S0, 1020));
    emit(i_op(O_SW, S0, V0, 0));
  endtask

  // Population count of nwords words.
  task automatic build_bitcount(input int nwords);
    int l1, l2, br;
    prog.delete();
    emit(i_op(O_ORI, ZERO, A0, 0));
    emit(i_op(O_ADDIU, ZERO, A1, nwords));
    emit(r_op(ZERO, ZERO, V0, 0, F_ADDU));
    l1 = here();
    emit(i_op(O_LW, A0, T0, 0));
    l2 = here();
    br = here();
    emit(32'd0);                        // beq t0, zero, done (patched)
    emit(i_op(O_ANDI, T0, T1, 1));
    emit(r_op(V0, T1, V0, 0, F_ADDU));
    emit(r_op(ZERO, T0, T0, 1, F_SRL));
    emit(i_op(O_BEQ, ZERO, ZERO, boff(here(), l2)));
    prog[br] = i_op(O_BEQ, T0, ZERO, boff(br, here()));
    emit(i_op(O_ADDIU, A0, A0, 4));
    emit(i_op(O_ADDIU, A1, A1, -1));
    emit(i_op(O_BNE, A1, ZERO, boff(here(), l1)));
  endtask

  function automatic logic [31:0] crc_ref(input int n);
    logic [31:0] c;
    c = '1;
    for (int i = 0; i < n; i++) begin
      c ^= {24'd0, dmem[i][7:0]};
      for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    end
    return ~c;
  endfunction

  // ------------------------------------------------------ run one stream
  task automatic run_stream(input string name);
    int n, cyc, idx_ir, idx_ex, idx_mem, idx_wb;
    int needless, required, ex_seen, first_ex, last_ex;
    longint awake, total;
    n = trace.size();
    // append a read-back of every integer register: or r0, rX, rX
    for (int x = 1; x < N; x++) begin
      tr_t t;
      t.w = r_op(5'(x), 5'(x), ZERO, 0, F_OR); t.we = 1; t.rd = 0; t.res = regs[x];
      t.rs_v = regs[x]; t.rt_v = regs[x]; t.rs_u = 1; t.rt_u = 1;
      trace.push_back(t);
    end
    idx_ir = -1; idx_ex = -1; idx_mem = -1; idx_wb = -1;
    needless = 0; required = 0; awake = 0; total = 0; ex_seen = 0;
    first_ex = -1; last_ex = -1;
    stall = 0;
    for (cyc = 0; cyc < trace.size() + 6; cyc++) begin
      // inputs of this cycle
      fetch_valid[0] = (cyc < trace.size());
      fetch_instr[0] = fetch_valid[0] ? trace[cyc].w : '0;
      wb_data[0]     = (idx_wb >= 0) ? trace[idx_wb].res : '0;
      #1;
      chk(!access_blocked, "no access to a drowsy register");
      if (idx_ir >= 0 && idx_ir < n) begin
        dinfo_t d;
        d = dinfo(trace[idx_ir].w);
        required += $countones(d.used);
        needless += 3 - $countones(d.used);
      end
      if (idx_ex >= 0 && idx_ex < n) begin
        awake += $countones(~int_drowsy) + $countones(~fp_drowsy);
        total += 2 * N;
      end
      @(negedge clk);
      idx_wb = idx_mem; idx_mem = idx_ex; idx_ex = idx_ir;
      idx_ir = (cyc < trace.size()) ? cyc : -1;
      // operand check in execute, with the host's forwarding from MEM and WB
      if (idx_ex >= 0) begin
        tr_t t;
        logic [31:0] rs_v, rt_v;
        t = trace[idx_ex];
        rs_v = fwd(t.w[25:21], ex_int_rs[0], idx_mem, idx_wb);
        rt_v = fwd(t.w[20:16], ex_int_rt[0], idx_mem, idx_wb);
        chk(ex_valid[0], "an instruction enters execute every cycle");
        if (t.rs_u) chk(rs_v == t.rs_v, $sformatf("%s: Rs operand of #%0d", name, idx_ex));
        if (t.rt_u) chk(rt_v == t.rt_v, $sformatf("%s: Rt operand of #%0d", name, idx_ex));
        ex_seen++;
        if (first_ex < 0) first_ex = cyc;
        last_ex = cyc;
      end
    end
    chk(ex_seen == trace.size() && last_ex - first_ex + 1 == trace.size(),
        $sformatf("%s: %0d instructions in %0d cycles of execute", name, ex_seen, last_ex - first_ex + 1));
    $display("%s: %0d instructions, drowsy register-cycles %0.1f%%, needless predecoded fields %0.1f%% of required",
             name, n, 100.0 * real'(total - awake) / real'(total), 100.0 * real'(needless) / real'(required));
    trace.delete();
  endtask

  function automatic logic [31:0] fwd(input logic [4:0] r, input logic [31:0] rf_v,
                                      input int im, input int iw);
    if (r == 0) return '0;
    if (im >= 0 && trace[im].we && trace[im].rd == r) return trace[im].res;
    if (iw >= 0 && trace[iw].we && trace[iw].rd == r) return trace[iw].res;
    return rf_v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fetch_valid = '0; fetch_instr[0] = '0; stall = 0; wb_data[0] = '0;
    for (int i = 0; i < N; i++) regs[i] = '0;
    for (int i = 0; i < 256; i++) dmem[i] = $urandom;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    build_crc(48);
    run_model();
    chk(dmem[255] == crc_ref(48), "model CRC matches the reference CRC");
    run_stream("crc");

    build_bitcount(48);
    run_model();
    begin
      int pc;
      pc = 0;
      for (int i = 0; i < 48; i++) pc += $countones(dmem[i]);
      chk(regs[V0] == 32'(pc), "model population count matches");
    end
    run_stream("bitcount");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
