// scan_compress_top: low-power scan test architecture with XOR decompressor
// and MISR compactor.
//
// Each scan cycle the tester applies one N-bit seed. The XOR network expands
// it into M scan-in values which enter the M scan chains in parallel. After
// LEN shift cycles the chains hold one test pattern (one column per seed);
// a capture cycle (scan_en low) loads the responses of the logic under test,
// and while the next pattern is shifted in the responses leave the chains
// and are compacted, M bits per cycle, by the MISR. At the end the signature
// is compared with the expected one.
//
// The shift power of a scan load is set by how many scan-in values toggle
// between consecutive seeds; the published method picks the order in which
// the tester applies the 16 seed values (a travelling-salesman tour over
// the Hamming distances of the XOR outputs). That ordering is data applied
// by the tester, so this hardware is the same for any order.
//
// The logic under test is outside this block: the chain contents go out on
// scan_q_o and its responses come back on capture_d_i.
//
// Interface:
//   seed_i       seed X0..X(N-1) for this scan cycle (seed_i[0] = X0)
//   scan_en_i    1: shift, 0: capture capture_d_i into every chain
//   misr_clr_i   clear the signature (priority over misr_en_i)
//   misr_en_i    compact this cycle's scan-out bits (sampled with the shift)
//   capture_d_i  [chain][cell] response data
//   scan_q_o     [chain][cell] scan cell values
//   scan_out_o   last cell of each chain
//   signature_o  MISR contents
//   expected_sig_i / sig_match_o  signature comparison (combinational)
// Timing: one shift, capture or compaction per rising clk edge. The MISR
// compacts scan_out_o as it is before the edge, so the bit in cell LEN-1 is
// compacted on the same edge that shifts it out. rst_n is asynchronous,
// active low. The chain length and polynomial are this design's choices.
module scan_compress_top
  import scan_pkg::*;
#(
  parameter int unsigned N   = N_SEED,
  parameter int unsigned M   = M_CHAINS,
  parameter int unsigned LEN = CHAIN_LEN,
  parameter logic [M-1:0][N-1:0] MASKS = XOR_MASKS,
  parameter logic [M-1:0] POLY = MISR_POLY
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N-1:0]            seed_i,
  input  logic                    scan_en_i,
  input  logic                    misr_clr_i,
  input  logic                    misr_en_i,
  input  logic [M-1:0][LEN-1:0]   capture_d_i,
  output logic [M-1:0][LEN-1:0]   scan_q_o,
  output logic [M-1:0]            scan_out_o,
  output logic [M-1:0]            signature_o,
  input  logic [M-1:0]            expected_sig_i,
  output logic                    sig_match_o
);

  logic [M-1:0] scan_in;

  xor_network #(.N(N), .M(M), .MASKS(MASKS)) u_xor (
    .x (seed_i),
    .y (scan_in)
  );

  for (genvar c = 0; c < M; c++) begin : g_chain
    scan_chain #(.LEN(LEN)) u_chain (
      .clk       (clk),
      .rst_n     (rst_n),
      .scan_en   (scan_en_i),
      .scan_in   (scan_in[c]),
      .capture_d (capture_d_i[c]),
      .scan_out  (scan_out_o[c]),
      .q         (scan_q_o[c])
    );
  end

  misr #(.W(M), .POLY(POLY)) u_misr (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (misr_clr_i),
    .en    (misr_en_i),
    .d     (scan_out_o),
    .sig   (signature_o)
  );

  assign sig_match_o = (signature_o == expected_sig_i);

  // Compaction only makes sense for bits that are being shifted out.
  a_compact_while_shifting : assert property (
    @(posedge clk) disable iff (!rst_n) (misr_en_i && !misr_clr_i) |-> scan_en_i
  ) else $error("MISR compaction requested during a capture cycle");

endmodule
