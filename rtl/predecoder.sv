// predecoder: fetch-stage register predecode.
//
// The instruction word leaves the I-cache at the end of the fetch cycle and
// is also bypassed, ahead of the instruction register (IR), to this block.
// Because the register designators sit at fixed positions in the instruction
// format, Rs, Rt and Rd can be cut out without decoding the opcode, and the
// register file's own address decoders turn them into word lines while the
// instruction is still being fetched. Those word lines serve two purposes:
//   * their OR (`wake_next`) tells the wake-up logic which registers the
//     decode stage will touch in the next cycle, so they can leave the
//     drowsy state before the access;
//   * registered at the clock edge (`rwl_*_q`), they are the read word lines
//     the register file uses during decode.
// All three fields are always decoded, as if every instruction had three
// register operands; fields that hold an immediate or an unused register
// wake a register needlessly, which costs energy but never correctness.
//
// When decode is held (`hold`), IR keeps its instruction, so the selector
// in front of the decoders picks the IR fields instead of the bypass and the
// same registers stay selected and awake.
//
// The selector and its use during stalls, and the MIPS default field
// positions (Rs 25:21, Rt 20:16, Rd 15:11), are this design's choices; the
// early decode with the file's own decoders is the technique itself.
//
// Interface: fetch_* is the bypass from the I-cache, ir_* the current IR.
// Timing: wake_next is combinational; the *_q outputs change at the rising
// edge and belong to the instruction that IR holds in the same cycle.
module predecoder #(
  parameter int unsigned NREGS  = drowsy_rf_pkg::NREGS_DEF,
  parameter int unsigned ILEN   = drowsy_rf_pkg::ILEN_DEF,
  parameter int unsigned RS_LSB = drowsy_rf_pkg::RS_LSB_DEF,
  parameter int unsigned RT_LSB = drowsy_rf_pkg::RT_LSB_DEF,
  parameter int unsigned RD_LSB = drowsy_rf_pkg::RD_LSB_DEF,
  localparam int unsigned AW    = (NREGS > 1) ? $clog2(NREGS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             hold,         // decode stalled: IR keeps its word
  input  logic             fetch_valid,
  input  logic [ILEN-1:0]  fetch_instr,  // bypass from the I-cache output
  input  logic             ir_valid,
  input  logic [ILEN-1:0]  ir_instr,
  output logic [NREGS-1:0] wake_next,    // registers used by decode next cycle
  output logic [NREGS-1:0] rwl_rs_q,
  output logic [NREGS-1:0] rwl_rt_q,
  output logic [NREGS-1:0] rwl_rd_q,
  output logic [AW-1:0]    rs_q,
  output logic [AW-1:0]    rt_q,
  output logic [AW-1:0]    rd_q
);

  logic            sel_valid;
  logic [ILEN-1:0] sel_instr;
  logic [AW-1:0]   rs, rt, rd;
  logic [NREGS-1:0] wl_rs, wl_rt, wl_rd;

  // Selector in front of the decoders: bypass, or IR while decode is held.
  assign sel_valid = hold ? ir_valid : fetch_valid;
  assign sel_instr = hold ? ir_instr : fetch_instr;

  assign rs = sel_instr[RS_LSB +: AW];
  assign rt = sel_instr[RT_LSB +: AW];
  assign rd = sel_instr[RD_LSB +: AW];

  addr_decoder #(.N(NREGS), .AW(AW)) u_dec_rs (.en(sel_valid), .addr(rs), .wl(wl_rs));
  addr_decoder #(.N(NREGS), .AW(AW)) u_dec_rt (.en(sel_valid), .addr(rt), .wl(wl_rt));
  addr_decoder #(.N(NREGS), .AW(AW)) u_dec_rd (.en(sel_valid), .addr(rd), .wl(wl_rd));

  assign wake_next = wl_rs | wl_rt | wl_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rwl_rs_q <= '0;
      rwl_rt_q <= '0;
      rwl_rd_q <= '0;
      rs_q     <= '0;
      rt_q     <= '0;
      rd_q     <= '0;
    end else begin
      rwl_rs_q <= wl_rs;
      rwl_rt_q <= wl_rt;
      rwl_rd_q <= wl_rd;
      rs_q     <= rs;
      rt_q     <= rt;
      rd_q     <= rd;
    end
  end

endmodule
