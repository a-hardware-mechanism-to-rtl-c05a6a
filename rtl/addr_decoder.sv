// addr_decoder: register address decoder (read word decoder or write word
// decoder of the register file).
//
// Turns a log2(N)-bit register designator into N one-hot word lines. With
// `en` low, or an address at or above N, every word line stays low. The
// same decoder is used for the two read ports and the write port; in the
// drowsy register file it is moved one stage early so that its word lines
// also tell the wake-up logic which registers will be used.
//
// The enable and the behaviour for out-of-range addresses are this design's
// choice; the decoding itself is the plain function of a word decoder.
//
// Timing: purely combinational.
module addr_decoder #(
  parameter int unsigned N  = drowsy_rf_pkg::NREGS_DEF,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [N-1:0]  wl
);

  always_comb begin
    wl = '0;
    for (int unsigned i = 0; i < N; i++) begin
      wl[i] = en && (addr == AW'(i));
    end
  end

endmodule
