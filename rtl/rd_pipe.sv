// rd_pipe: destination-register pipeline and early wake-up of the register
// to be written.
//
// The destination designator (Rd) of each instruction leaving decode travels
// with it through the execute, memory and write-back pipeline registers,
// together with a valid bit, a write enable and the file it targets
// (integer or floating point). The write is done in write-back, so the
// destination register must be active then. By the memory stage the
// destination is certain, so the write address decoder decodes the
// memory-stage Rd (the Rd selector in front of it picks that stage) and:
//   * `wb_wake_int` / `wb_wake_fp` tell the wake-up logic of the right file
//     to make that register active for the next cycle;
//   * the decoded word line is registered as the write word line used in
//     write-back (`wb_wwl`).
// The Rd of the execute and memory stages is also brought out (`ex_*`,
// `mem_*`) for the processor's operand bypass network.
//
// When decode does not hand over an instruction (`id_valid` low, e.g. while
// decode is stalled) a bubble enters execute; the later stages always move.
// The destination may be woken after the execute stage or after the memory
// stage, depending on the pipeline. WAKE_FROM_EX = 0 (default) wakes it
// for the write-back cycle only, decoded in the memory stage. WAKE_FROM_EX = 1
// also decodes the execute-stage destination, so the register is already
// active during the memory stage, for pipelines where the supply needs more
// than one cycle of warning. The write word line always comes from the
// memory-stage decode. The default choice and the file bit carried with
// the destination are this design's choices.
// Timing: one stage per clock; wb_* belong to the instruction in write-back;
// wb_wake_* are combinational and take effect at the next edge.
module rd_pipe #(
  parameter int unsigned NREGS        = drowsy_rf_pkg::NREGS_DEF,
  parameter bit          WAKE_FROM_EX = 1'b0,
  localparam int unsigned AW          = (NREGS > 1) ? $clog2(NREGS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // from decode
  input  logic             id_valid,
  input  logic             id_we,
  input  logic             id_fp,
  input  logic [AW-1:0]    id_rd,
  // stage outputs
  output logic             ex_valid,
  output logic             ex_we,
  output logic             ex_fp,
  output logic [AW-1:0]    ex_rd,
  output logic             mem_valid,
  output logic             mem_we,
  output logic             mem_fp,
  output logic [AW-1:0]    mem_rd,
  output logic             wb_valid,
  output logic             wb_we,
  output logic             wb_fp,
  output logic [AW-1:0]    wb_rd,
  output logic [NREGS-1:0] wb_wwl,
  // wake requests for the next cycle
  output logic [NREGS-1:0] wb_wake_int,
  output logic [NREGS-1:0] wb_wake_fp
);

  typedef struct packed {
    logic          valid;
    logic          we;
    logic          fp;
    logic [AW-1:0] rd;
  } dest_t;

  dest_t ex_q, mem_q, wb_q;
  logic [NREGS-1:0] mem_wl, ex_wl, wake_int, wake_fp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_q   <= '0;
      mem_q  <= '0;
      wb_q   <= '0;
      wb_wwl <= '0;
    end else begin
      ex_q   <= dest_t'{valid: id_valid, we: id_valid & id_we, fp: id_fp, rd: id_rd};
      mem_q  <= ex_q;
      wb_q   <= mem_q;
      wb_wwl <= mem_wl;
    end
  end

  // Write address decoder, fed with the memory-stage Rd.
  addr_decoder #(.N(NREGS), .AW(AW)) u_wdec (
    .en  (mem_q.valid & mem_q.we),
    .addr(mem_q.rd),
    .wl  (mem_wl)
  );

  // Second decoder on the execute-stage Rd, used only for the earlier wake.
  addr_decoder #(.N(NREGS), .AW(AW)) u_exdec (
    .en  (WAKE_FROM_EX & ex_q.valid & ex_q.we),
    .addr(ex_q.rd),
    .wl  (ex_wl)
  );

  always_comb begin
    wake_int = mem_q.fp ? '0 : mem_wl;
    wake_fp  = mem_q.fp ? mem_wl : '0;
    if (ex_q.fp) wake_fp  |= ex_wl;
    else         wake_int |= ex_wl;
  end

  assign wb_wake_int = wake_int;
  assign wb_wake_fp  = wake_fp;

  assign ex_valid  = ex_q.valid;
  assign ex_we     = ex_q.we;
  assign ex_fp     = ex_q.fp;
  assign ex_rd     = ex_q.rd;
  assign mem_valid = mem_q.valid;
  assign mem_we    = mem_q.we;
  assign mem_fp    = mem_q.fp;
  assign mem_rd    = mem_q.rd;
  assign wb_valid  = wb_q.valid;
  assign wb_we     = wb_q.we;
  assign wb_fp     = wb_q.fp;
  assign wb_rd     = wb_q.rd;

endmodule
