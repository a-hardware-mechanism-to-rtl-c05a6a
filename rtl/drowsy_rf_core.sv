// drowsy_rf_core: register-file side of an in-order pipeline whose registers
// sleep unless they are being used.
//
// Pipeline (fetch, decode, execute, memory, write-back). The register file
// is read in decode and written in write-back. Every register of the
// integer file and of the floating-point file is held in a low-power
// (drowsy) state, which keeps its value, except in the cycle in which it is
// accessed and except the four registers the compiler reserves.
//
//   fetch      The I-cache output is bypassed around the instruction
//              register (IR) into the predecoder, which cuts Rs, Rt and Rd
//              from their fixed positions and decodes them with the register
//              file's decoders. Those registers are woken, in both files,
//              for the next cycle, since the file an operand lives in is
//              known only after full decode.
//   decode     IR holds the instruction; the latched word lines read Rs and
//              Rt from both files into the operand registers of the execute
//              stage. The processor's instruction decoder (outside this
//              block) returns the destination register, its file and
//              whether it is written (dec_*).
//   ex / mem   The destination travels in rd_pipe. In the memory stage it
//              is decoded by the write decoder and woken for write-back.
//   write-back The result (wb_data, from the result bus) is written through
//              the latched write word line; a read of the same register in
//              the same cycle is served by the register file comparators.
//
// ISSUE_W instructions move through the pipeline side by side (slot 0 is
// the oldest). Each slot has its own predecoder and destination pipeline,
// the files get 2*ISSUE_W read ports and ISSUE_W write ports, and the wake
// sets of all slots are ORed. The single-issue default matches the register
// file organisation (two read ports, one write port); ISSUE_W = 2 gives the
// 2-wide fetch/decode/issue of the evaluated processor configuration.
//
// WAKE_FROM_EX = 1 wakes each destination one cycle earlier (during the
// memory stage as well as write-back); see rd_pipe.
//
// `stall` holds IR (and thus decode) for the whole group; the predecoder then re-selects the IR
// fields so the same registers stay awake, and a bubble enters execute.
// The ALUs, caches, branch predictor and instruction decoder belong to the
// host processor and connect through the ports.
//
// Following the technique: predecode during fetch with the file's own
// decoders, wake on use, the reserved registers always active, destination
// woken ahead of write-back. This design's own choices: waking predecoded
// registers in both files, the stall handling, the integer zero register
// (ZERO_REG, r0 by default) hard-wired to zero, the MIPS field positions as
// defaults and the error flag. Other fixed-format ISAs are set through the
// parameters; for Alpha: XLEN = 64, RS_LSB = 21, RT_LSB = 16, RD_LSB = 0,
// ZERO_REG = 31 and INT_RESERVED = r0 | r26 | r30 | r31 (return value,
// return address, stack pointer, zero).
//
// The per-register `*_drowsy` outputs are the supply-select signals;
// `*_wake_next` is the same information one cycle early. `access_blocked`
// rises if any register is accessed while drowsy (never, in correct use).
// Timing: operands appear in ex_* one cycle after the instruction is in
// decode; wb_* name the register written at the end of the current cycle.
module drowsy_rf_core #(
  parameter int unsigned NREGS   = drowsy_rf_pkg::NREGS_DEF,
  parameter int unsigned XLEN    = drowsy_rf_pkg::XLEN_DEF,
  parameter int unsigned ILEN    = drowsy_rf_pkg::ILEN_DEF,
  parameter int unsigned ISSUE_W = 1,
  parameter bit          WAKE_FROM_EX = 1'b0,
  parameter int unsigned RS_LSB  = drowsy_rf_pkg::RS_LSB_DEF,
  parameter int unsigned RT_LSB  = drowsy_rf_pkg::RT_LSB_DEF,
  parameter int unsigned RD_LSB  = drowsy_rf_pkg::RD_LSB_DEF,
  parameter int unsigned ZERO_REG = 0,
  // zero register, return value, stack pointer, return address
  parameter logic [NREGS-1:0] INT_RESERVED =
      (NREGS'(1) << 0) | (NREGS'(1) << 2) |
      (NREGS'(1) << (NREGS - 3)) | (NREGS'(1) << (NREGS - 1)),
  parameter logic [NREGS-1:0] FP_RESERVED = NREGS'(drowsy_rf_pkg::FP_RESERVED_DEF),
  localparam int unsigned AW = (NREGS > 1) ? $clog2(NREGS) : 1,
  localparam int unsigned IW = ISSUE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // fetch: I-cache output, one word per slot
  input  logic [IW-1:0]    fetch_valid,
  input  logic [ILEN-1:0]  fetch_instr [IW],
  input  logic             stall,
  // decode: IR to the instruction decoder, destination back from it
  output logic [IW-1:0]    ir_valid,
  output logic [ILEN-1:0]  ir_instr [IW],
  input  logic [IW-1:0]    dec_we,
  input  logic [IW-1:0]    dec_fp,
  input  logic [AW-1:0]    dec_rd [IW],
  // execute: operand registers
  output logic [IW-1:0]    ex_valid,
  output logic [XLEN-1:0]  ex_int_rs [IW],
  output logic [XLEN-1:0]  ex_int_rt [IW],
  output logic [XLEN-1:0]  ex_fp_rs  [IW],
  output logic [XLEN-1:0]  ex_fp_rt  [IW],
  output logic [IW-1:0]    ex_we,
  output logic [IW-1:0]    ex_fp,
  output logic [AW-1:0]    ex_rd [IW],
  // memory stage destination (for the operand bypass network)
  output logic [IW-1:0]    mem_valid,
  output logic [IW-1:0]    mem_we,
  output logic [IW-1:0]    mem_fp,
  output logic [AW-1:0]    mem_rd [IW],
  // write-back
  output logic [IW-1:0]    wb_valid,
  output logic [IW-1:0]    wb_we,
  output logic [IW-1:0]    wb_fp,
  output logic [AW-1:0]    wb_rd [IW],
  input  logic [XLEN-1:0]  wb_data [IW],
  // power state
  output logic [NREGS-1:0] int_drowsy,
  output logic [NREGS-1:0] fp_drowsy,
  output logic [NREGS-1:0] int_wake_next,
  output logic [NREGS-1:0] fp_wake_next,
  output logic             access_blocked
);

  // ---------------------------------------------------------------- fetch
  logic [NREGS-1:0] pd_wake_s [IW];
  logic [NREGS-1:0] rwl_rd    [2*IW];   // read word lines: 2s = Rs, 2s+1 = Rt
  logic [AW-1:0]    radr      [2*IW];
  logic [NREGS-1:0] rwl_rs_s  [IW];
  logic [NREGS-1:0] rwl_rt_s  [IW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_valid <= '0;
      for (int unsigned s = 0; s < IW; s++) ir_instr[s] <= '0;
    end else if (!stall) begin
      ir_valid <= fetch_valid;
      for (int unsigned s = 0; s < IW; s++) ir_instr[s] <= fetch_instr[s];
    end
  end

  // ------------------------------------------------- per-slot predecode
  logic [IW-1:0]    id_valid;
  logic [NREGS-1:0] wb_wwl_s [IW];
  logic [NREGS-1:0] wbw_int_s [IW];
  logic [NREGS-1:0] wbw_fp_s [IW];

  assign id_valid = ir_valid & {IW{~stall}};

  for (genvar s = 0; s < IW; s++) begin : g_slot
    predecoder #(
      .NREGS(NREGS), .ILEN(ILEN),
      .RS_LSB(RS_LSB), .RT_LSB(RT_LSB), .RD_LSB(RD_LSB)
    ) u_predecode (
      .clk        (clk),
      .rst_n      (rst_n),
      .hold       (stall),
      .fetch_valid(fetch_valid[s]),
      .fetch_instr(fetch_instr[s]),
      .ir_valid   (ir_valid[s]),
      .ir_instr   (ir_instr[s]),
      .wake_next  (pd_wake_s[s]),
      .rwl_rs_q   (rwl_rs_s[s]),
      .rwl_rt_q   (rwl_rt_s[s]),
      .rwl_rd_q   (),
      .rs_q       (radr[2*s]),
      .rt_q       (radr[2*s+1]),
      .rd_q       ()
    );

    // Read word lines are live only while the slot holds an instruction.
    assign rwl_rd[2*s]   = ir_valid[s] ? rwl_rs_s[s] : '0;
    assign rwl_rd[2*s+1] = ir_valid[s] ? rwl_rt_s[s] : '0;

    // ----------------------------------------- destination pipeline
    rd_pipe #(.NREGS(NREGS), .WAKE_FROM_EX(WAKE_FROM_EX)) u_rd_pipe (
      .clk        (clk),
      .rst_n      (rst_n),
      .id_valid   (id_valid[s]),
      .id_we      (dec_we[s]),
      .id_fp      (dec_fp[s]),
      .id_rd      (dec_rd[s]),
      .ex_valid   (ex_valid[s]),
      .ex_we      (ex_we[s]),
      .ex_fp      (ex_fp[s]),
      .ex_rd      (ex_rd[s]),
      .mem_valid  (mem_valid[s]),
      .mem_we     (mem_we[s]),
      .mem_fp     (mem_fp[s]),
      .mem_rd     (mem_rd[s]),
      .wb_valid   (wb_valid[s]),
      .wb_we      (wb_we[s]),
      .wb_fp      (wb_fp[s]),
      .wb_rd      (wb_rd[s]),
      .wb_wwl     (wb_wwl_s[s]),
      .wb_wake_int(wbw_int_s[s]),
      .wb_wake_fp (wbw_fp_s[s])
    );
  end

  // ------------------------------------------------------ wake-up control
  logic [NREGS-1:0] pd_wake, wb_wake_int, wb_wake_fp;

  always_comb begin
    pd_wake     = '0;
    wb_wake_int = '0;
    wb_wake_fp  = '0;
    for (int unsigned s = 0; s < IW; s++) begin
      pd_wake     |= pd_wake_s[s];
      wb_wake_int |= wbw_int_s[s];
      wb_wake_fp  |= wbw_fp_s[s];
    end
  end

  wake_controller #(.NREGS(NREGS), .RESERVED(INT_RESERVED)) u_wake_int (
    .clk      (clk),
    .rst_n    (rst_n),
    .pd_wake  (pd_wake),
    .wb_wake  (wb_wake_int),
    .wake_next(int_wake_next),
    .drowsy   (int_drowsy)
  );

  wake_controller #(.NREGS(NREGS), .RESERVED(FP_RESERVED)) u_wake_fp (
    .clk      (clk),
    .rst_n    (rst_n),
    .pd_wake  (pd_wake),
    .wb_wake  (wb_wake_fp),
    .wake_next(fp_wake_next),
    .drowsy   (fp_drowsy)
  );

  // ------------------------------------------------------ register files
  logic [XLEN-1:0]  int_rdata [2*IW];
  logic [XLEN-1:0]  fp_rdata  [2*IW];
  logic [IW-1:0]    int_we, fp_we;
  logic [NREGS-1:0] int_wwl [IW];
  logic [NREGS-1:0] fp_wwl  [IW];
  logic [NREGS-1:0] int_blocked, fp_blocked;

  for (genvar s = 0; s < IW; s++) begin : g_wr
    assign int_we[s]  = wb_valid[s] & wb_we[s] & ~wb_fp[s];
    assign fp_we[s]   = wb_valid[s] & wb_we[s] &  wb_fp[s];
    assign int_wwl[s] = wb_fp[s] ? '0 : wb_wwl_s[s];
    assign fp_wwl[s]  = wb_fp[s] ? wb_wwl_s[s] : '0;
  end

  drowsy_regfile #(
    .NREGS(NREGS), .XLEN(XLEN), .NRP(2*IW), .NWP(IW), .HARD_ZERO(1'b1), .ZERO_REG(ZERO_REG)
  ) u_int_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .drowsy (int_drowsy),
    .rwl    (rwl_rd),
    .raddr  (radr),
    .rdata  (int_rdata),
    .we     (int_we),
    .wwl    (int_wwl),
    .waddr  (wb_rd),
    .wdata  (wb_data),
    .blocked(int_blocked)
  );

  drowsy_regfile #(
    .NREGS(NREGS), .XLEN(XLEN), .NRP(2*IW), .NWP(IW), .HARD_ZERO(1'b0)
  ) u_fp_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .drowsy (fp_drowsy),
    .rwl    (rwl_rd),
    .raddr  (radr),
    .rdata  (fp_rdata),
    .we     (fp_we),
    .wwl    (fp_wwl),
    .waddr  (wb_rd),
    .wdata  (wb_data),
    .blocked(fp_blocked)
  );

  assign access_blocked = |{int_blocked, fp_blocked};

  // ------------------------------------------- operand (ID/EX) registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < IW; s++) begin
        ex_int_rs[s] <= '0;
        ex_int_rt[s] <= '0;
        ex_fp_rs[s]  <= '0;
        ex_fp_rt[s]  <= '0;
      end
    end else begin
      for (int unsigned s = 0; s < IW; s++) begin
        if (id_valid[s]) begin
          ex_int_rs[s] <= int_rdata[2*s];
          ex_int_rt[s] <= int_rdata[2*s+1];
          ex_fp_rs[s]  <= fp_rdata[2*s];
          ex_fp_rt[s]  <= fp_rdata[2*s+1];
        end
      end
    end
  end

  a_no_drowsy_access: assert property (@(posedge clk) disable iff (!rst_n) !access_blocked);

endmodule
