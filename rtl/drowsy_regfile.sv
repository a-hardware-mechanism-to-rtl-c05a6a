// drowsy_regfile: N x M register file with per-register drowsy state.
//
// NRP read ports and NWP write ports: two and one for the single-issue
// pipeline, 2i and i for i instructions per cycle. The address decoders sit
// outside this block (they run one stage early, during fetch), so the ports
// take one-hot word lines: rwl[p] selects the row read by port p in this
// cycle and wwl[q] the row written by write port q at the end of it. Every
// row is a drowsy_reg_row whose enables are gated by its `drowsy` bit, so a
// drowsy register is never read or written. The bit lines of all rows are
// ORed into the data outputs.
//
// Comparators check each write address against each read address: when a
// register being written is read in the same cycle, the write data is
// forwarded to that output. If several write ports hit the same register,
// the highest-numbered port (the youngest instruction) wins, both in the
// array and in the forwarding. The binary addresses that drive the
// comparators come with the word lines.
//
// The port organisation, the per-row gating and the comparators follow the
// register file organisation of the technique. HARD_ZERO (register ZERO_REG
// reads as zero and ignores writes: r0 on MIPS, r31 on Alpha), the port priority
// and the `blocked` vector (a bit per row that tried an access while drowsy,
// checked by an assertion) are this design's choices.
// Timing: rdata is combinational from the word lines; writes happen at the
// rising clock edge.
module drowsy_regfile #(
  parameter int unsigned NREGS     = drowsy_rf_pkg::NREGS_DEF,
  parameter int unsigned XLEN      = drowsy_rf_pkg::XLEN_DEF,
  parameter int unsigned NRP       = 2,
  parameter int unsigned NWP       = 1,
  parameter bit          HARD_ZERO = 1'b0,
  parameter int unsigned ZERO_REG  = 0,
  localparam int unsigned AW       = (NREGS > 1) ? $clog2(NREGS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NREGS-1:0] drowsy,
  // read ports
  input  logic [NREGS-1:0] rwl   [NRP],
  input  logic [AW-1:0]    raddr [NRP],
  output logic [XLEN-1:0]  rdata [NRP],
  // write ports
  input  logic [NWP-1:0]   we,
  input  logic [NREGS-1:0] wwl   [NWP],
  input  logic [AW-1:0]    waddr [NWP],
  input  logic [XLEN-1:0]  wdata [NWP],
  output logic [NREGS-1:0] blocked
);

  logic [XLEN-1:0]  bl [NREGS][NRP];
  logic [NREGS-1:0] row_en;

  for (genvar r = 0; r < NREGS; r++) begin : g_row
    logic [NRP-1:0] rwl_r;
    logic [NWP-1:0] wwl_r;
    assign row_en[r] = !(HARD_ZERO && r == ZERO_REG);
    for (genvar p = 0; p < NRP; p++) begin : g_rp
      assign rwl_r[p] = rwl[p][r] & row_en[r];
    end
    for (genvar q = 0; q < NWP; q++) begin : g_wp
      assign wwl_r[q] = wwl[q][r] & row_en[r];
    end
    drowsy_reg_row #(.W(XLEN), .NRP(NRP), .NWP(NWP)) u_row (
      .clk    (clk),
      .rst_n  (rst_n),
      .drowsy (drowsy[r]),
      .rwl    (rwl_r),
      .wwl    (wwl_r),
      .we     (we),
      .din    (wdata),
      .rd     (bl[r]),
      .blocked(blocked[r])
    );
  end

  // A write port is live when it writes an awake, writable row.
  logic [NWP-1:0] wr_live;
  for (genvar q = 0; q < NWP; q++) begin : g_live
    assign wr_live[q] = we[q] && (|(wwl[q] & row_en & ~drowsy));
  end

  // Bit-line OR per read port, then the comparators.
  always_comb begin
    for (int unsigned p = 0; p < NRP; p++) begin
      logic [XLEN-1:0] acc;
      acc = '0;
      for (int unsigned r = 0; r < NREGS; r++) acc |= bl[r][p];
      for (int unsigned q = 0; q < NWP; q++) begin
        if (wr_live[q] && (|rwl[p]) && raddr[p] == waddr[q]) acc = wdata[q];
      end
      rdata[p] = acc;
    end
  end

  // Word lines are one-hot (or idle) and the binary write addresses name
  // the same row as the write word lines.
  for (genvar p = 0; p < NRP; p++) begin : g_a_rd
    a_rwl_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rwl[p]));
  end
  for (genvar q = 0; q < NWP; q++) begin : g_a_wr
    a_wwl_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wwl[q]));
    a_waddr_match: assert property (@(posedge clk) disable iff (!rst_n)
                                    (|wwl[q]) |-> wwl[q][waddr[q]]);
  end

endmodule
