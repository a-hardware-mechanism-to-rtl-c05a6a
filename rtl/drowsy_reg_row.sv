// drowsy_reg_row: one register (a row of M cells) of the drowsy register file.
//
// A row holds M bits and has NRP read word lines and NWP write word lines
// (two and one for a single-issue pipeline; 2i and i for i instructions per
// cycle). While `drowsy` is high the cells sit on the low supply and keep
// their contents but must not be touched, so every read enable and write
// enable is gated with the inverse of `drowsy`: a selected read of a drowsy
// row drives nothing onto its bit lines (reads as zero) and a write is
// dropped. Each such blocked access is flagged so the surrounding logic (or
// an assertion) can see that a register was used without being woken.
//
// The gating follows the technique; the supply switch itself (high/low VDD,
// high-Vth pass devices) is a circuit-level matter and is not modelled:
// `drowsy` is the digital signal that would select the supply. The zero
// read value of a drowsy row, the `blocked` flag, the priority of the
// highest-numbered write port when several write the row in one cycle and
// the reset to zero are this design's choices.
//
// Interface: rd[p] is the row's contribution to read bus p (zero when not
// selected), to be ORed over all rows.
// Timing: reads are combinational; a write takes effect at the rising edge.
module drowsy_reg_row #(
  parameter int unsigned W   = drowsy_rf_pkg::XLEN_DEF,
  parameter int unsigned NRP = 2,
  parameter int unsigned NWP = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           drowsy,
  input  logic [NRP-1:0] rwl,        // read word lines
  input  logic [NWP-1:0] wwl,        // write word lines
  input  logic [NWP-1:0] we,         // write enables
  input  logic [W-1:0]   din [NWP],
  output logic [W-1:0]   rd  [NRP],
  output logic           blocked     // an access was attempted while drowsy
);

  logic [W-1:0]   cells;
  logic [NRP-1:0] re_g;
  logic [NWP-1:0] we_g;

  // read_enable / write_enable gating circuit
  assign re_g = rwl & {NRP{~drowsy}};
  assign we_g = wwl & we & {NWP{~drowsy}};

  for (genvar p = 0; p < NRP; p++) begin : g_rd
    assign rd[p] = re_g[p] ? cells : '0;
  end

  assign blocked = drowsy & ((|rwl) | (|(wwl & we)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cells <= '0;
    end else begin
      for (int unsigned p = 0; p < NWP; p++) begin
        if (we_g[p]) cells <= din[p];
      end
    end
  end

endmodule
