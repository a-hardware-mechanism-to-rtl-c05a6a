// wake_controller: active/drowsy state of every register of one file.
//
// A register is active only in the cycle in which it is accessed; at all
// other times it is kept drowsy (low supply, contents kept). The registers
// reserved by the compiler (zero register, stack pointer, return address,
// return value) are never put to sleep. In each cycle the block gathers the
// registers that will be accessed in the next cycle:
//   * `pd_wake`: the predecoded operand registers of the instruction that
//     will be in decode (from the fetch-stage predecoder);
//   * `wb_wake`: the destination register of the instruction that will be
//     in write-back (decoded one stage ahead, in the memory stage);
// and at the clock edge makes exactly those (plus the reserved set) active.
// A register that is not named again goes back to the drowsy state at the
// next edge, right after its use.
//
// `wake_next` is the same set one cycle early, so a supply switch can start
// moving before the edge at which the register is needed.
// The permanently active reserved set and the wake-on-use, sleep-after-use
// policy are the technique itself; the one-cycle-early `wake_next` output
// and the reset state are this design's choices.
// Timing: `drowsy` is registered; after reset only the reserved registers
// are active.
module wake_controller #(
  parameter int unsigned     NREGS    = drowsy_rf_pkg::NREGS_DEF,
  parameter logic [NREGS-1:0] RESERVED = drowsy_rf_pkg::INT_RESERVED_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NREGS-1:0] pd_wake,
  input  logic [NREGS-1:0] wb_wake,
  output logic [NREGS-1:0] wake_next,
  output logic [NREGS-1:0] drowsy
);

  logic [NREGS-1:0] active_q;

  assign wake_next = RESERVED | pd_wake | wb_wake;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) active_q <= RESERVED;
    else        active_q <= wake_next;
  end

  assign drowsy = ~active_q;

  a_reserved_active: assert property (@(posedge clk) disable iff (!rst_n)
                                      (drowsy & RESERVED) == '0);

endmodule
