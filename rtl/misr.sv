// misr: W-bit multi-input signature register.
//
// An internal-XOR (Galois) LFSR whose W stages each also take one parallel
// input bit. On every enabled clock edge
//   sig[0] <= sig[W-1] ^ d[0]
//   sig[k] <= sig[k-1] ^ d[k] ^ (POLY[k] & sig[W-1])   for k = 1..W-1
// so after a test the register holds a signature of every bit that has
// passed through d. The published architecture compacts the M scan-out bits
// of each cycle in parallel with an MISR and compares the final value with
// the expected one; the width follows the chain count, while the feedback
// polynomial (default x^9 + x^4 + 1) and the clear input are this design's
// choice.
//
// Interface: en (compact d this cycle), clr (load zero, has priority over
// en), d[W] in; sig[W] out.
// Timing: one compaction step per enabled rising clk edge; rst_n
// (asynchronous, active low) clears the signature.
module misr #(
  parameter int unsigned W = scan_pkg::M_CHAINS,
  parameter logic [W-1:0] POLY = scan_pkg::MISR_POLY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] sig
);

  logic [W-1:0] nxt;

  always_comb begin
    nxt[0] = sig[W-1] ^ d[0];
    for (int unsigned k = 1; k < W; k++) begin
      nxt[k] = sig[k-1] ^ d[k] ^ (POLY[k] & sig[W-1]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sig <= '0;
    else if (clr) sig <= '0;
    else if (en)  sig <= nxt;
  end

endmodule
