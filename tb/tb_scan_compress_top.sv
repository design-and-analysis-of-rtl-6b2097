// tb_scan_compress_top: end-to-end scan test of the whole architecture at
// its default size (4-bit seeds, 9 chains of 16 cells, 9-bit MISR).
//
// The testbench plays the tester. It applies eleven scan loads: nine
// low-switching seed orderings (each a sequence of all 16 seed values), an
// ordering with the fewest possible scan-in toggles for this XOR network
// (48, found by exhaustive search, see tb_seed_order) and, for comparison,
// the plain ascending order 0..15. Each load is 16 shift
// cycles, one seed per cycle; then one capture cycle takes the response of
// a stand-in for the logic under test. While the next load shifts in, the
// previous response shifts out and is compacted by the MISR; a final
// unload with seed 0 flushes the last response. Then the signature is
// compared with the expected one through the design's comparator, once with
// the right value and once with a wrong one.
//
// Checks:
//  * every cycle, all 144 scan cells and the signature against a reference
//    model of chains and MISR kept in the testbench;
//  * after each load, every cell against the XOR equations of the seed that
//    was applied (cell k of chain j holds Yj of the seed applied 15-k cycles
//    before the end of the load), i.e. the load takes exactly 16 cycles;
//  * the number of scan-in toggles of each load (changes of cell 0 between
//    consecutive shift cycles, summed over the 9 chains) against totals
//    worked out by hand from the XOR equations with X0 as the seed's least
//    significant bit;
//  * that each mechanism (shift, capture, compaction, signature clear,
//    signature match, signature mismatch) happened at least once.
module tb_scan_compress_top;
  localparam int N = 4, M = 9, L = 16, LOADS = 11;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] seed_i;
  logic scan_en_i, misr_clr_i, misr_en_i;
  logic [M-1:0][L-1:0] capture_d_i, scan_q_o;
  logic [M-1:0] scan_out_o, signature_o, expected_sig_i;
  logic sig_match_o;

  scan_compress_top dut (.*);

  always #5 clk = ~clk;

  // Seed orderings: nine low-switching tours, an optimal one, ascending order.
  int unsigned order [LOADS][16] = '{
    '{ 1, 15,  2,  3, 12,  7,  8,  5, 10,  4,  9,  6, 13,  0, 14, 11},
    '{12,  3,  2, 15,  1,  6,  7,  8,  9,  4, 10,  5, 11,  0, 13, 14},
    '{ 6,  1, 15,  2,  3, 12,  7,  8,  5, 10,  4, 11,  0, 13, 14,  9},
    '{ 4,  9,  6,  1, 15,  2,  3, 12,  7,  8,  5, 10, 13,  0, 14, 11},
    '{14,  0, 13,  2,  3, 12,  1,  6,  7,  8,  5, 10,  4,  9, 11, 15},
    '{ 7,  8,  5, 10, 13,  0, 14,  9,  4,  1, 15,  2,  3, 12, 11,  6},
    '{ 3, 12,  2, 13,  0, 14,  9,  4, 10,  5,  8,  7,  6,  1, 15, 11},
    '{ 2,  3, 12,  7,  8,  5, 10,  4,  9,  6,  1, 15,  0, 11, 13, 14},
    '{ 8,  5, 10,  4,  9,  6,  1, 15,  2,  3, 12,  7,  0, 13, 11, 14},
    '{11,  6,  8,  5, 10,  7,  9,  4, 15,  2, 12,  1, 14,  3, 13,  0},
    '{ 0,  1,  2,  3,  4,  5,  6,  7,  8,  9, 10, 11, 12, 13, 14, 15}
  };
  // Scan-in toggles per load, worked out by hand (15 seed changes x 9 lines).
  int unsigned exp_toggles [LOADS] = '{55, 59, 58, 56, 59, 55, 56, 60, 57, 48, 76};

  int checks = 0, failures = 0;
  int n_shift = 0, n_capture = 0, n_compact = 0, n_clear = 0, n_match = 0, n_mismatch = 0;

  bit ch [M][L];          // reference scan cells
  logic [M-1:0] sig_ref;  // reference signature

  function automatic logic [M-1:0] y_of(input int unsigned s);
    logic [3:0] v;
    logic [M-1:0] r;
    v = 4'(s);
    r[0] = v[0] ^ v[1] ^ v[2];
    r[1] = v[1] ^ v[2];
    r[2] = v[0] ^ v[2];
    r[3] = v[0] ^ v[1] ^ v[3];
    r[4] = v[1] ^ v[3];
    r[5] = v[1] ^ v[2] ^ v[3];
    r[6] = v[2] ^ v[3];
    r[7] = v[0] ^ v[2] ^ v[3];
    r[8] = v[0] ^ v[3];
    return r;
  endfunction

  // signature * x mod (x^9 + x^4 + 1), plus the input word
  function automatic logic [M-1:0] misr_step(input logic [M-1:0] s, input logic [M-1:0] din);
    logic [M:0] t;
    t = {s, 1'b0};
    if (t[M]) t = t ^ 10'b10_0001_0001;
    return t[M-1:0] ^ din;
  endfunction

  // Stand-in for the logic under test: each response bit mixes two cells.
  always_comb begin
    for (int c = 0; c < M; c++)
      for (int k = 0; k < L; k++)
        capture_d_i[c][k] = scan_q_o[c][k] ^ scan_q_o[(c + 1) % M][(k + 3) % L] ^ ((k % M) == c);
  end

  task automatic compare_all(input string what);
    for (int c = 0; c < M; c++)
      for (int k = 0; k < L; k++) begin
        checks++;
        if (scan_q_o[c][k] !== ch[c][k]) begin
          failures++;
          if (failures < 20) $display("%s: chain %0d cell %0d = %0b, expected %0b",
                                      what, c, k, scan_q_o[c][k], ch[c][k]);
        end
      end
    checks++;
    if (signature_o !== sig_ref) begin
      failures++;
      if (failures < 20) $display("%s: signature %h, expected %h", what, signature_o, sig_ref);
    end
  endtask

  // One clock cycle with the given controls; updates the reference model.
  task automatic cycle(input int unsigned seed, input logic sen, input logic men, input logic mclr);
    logic [M-1:0] yin, sout;
    bit nxt [M][L];
    seed_i = 4'(seed); scan_en_i = sen; misr_en_i = men; misr_clr_i = mclr;
    #1;
    yin = y_of(seed);
    for (int c = 0; c < M; c++) sout[c] = ch[c][L-1];
    if (mclr)     sig_ref = '0;
    else if (men) sig_ref = misr_step(sig_ref, sout);
    for (int c = 0; c < M; c++)
      for (int k = 0; k < L; k++)
        if (sen) nxt[c][k] = (k == 0) ? yin[c] : ch[c][k-1];
        else     nxt[c][k] = capture_d_i[c][k];
    if (sen) n_shift++; else n_capture++;
    if (mclr) n_clear++;
    else if (men) n_compact++;
    @(posedge clk);
    ch = nxt;
    #1 compare_all(sen ? "shift" : "capture");
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] prev_in;
    int unsigned toggles;
    seed_i = '0; scan_en_i = 1; misr_en_i = 0; misr_clr_i = 0; expected_sig_i = '0;
    foreach (ch[c, k]) ch[c][k] = 0;
    sig_ref = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    compare_all("reset");
    cycle(0, 1'b1, 1'b0, 1'b1);  // clear the signature (also shifts one seed)

    for (int p = 0; p < LOADS; p++) begin
      toggles = 0;
      for (int i = 0; i < L; i++) begin
        // the first load shifts out only reset/initial contents: compact
        // from the second load on
        cycle(order[p][i], 1'b1, (p > 0), 1'b0);
        if (i > 0)
          for (int c = 0; c < M; c++) toggles += (scan_q_o[c][0] != prev_in[c]);
        for (int c = 0; c < M; c++) prev_in[c] = scan_q_o[c][0];
      end
      // pattern content straight from the XOR equations
      for (int c = 0; c < M; c++)
        for (int k = 0; k < L; k++) begin
          checks++;
          if (scan_q_o[c][k] !== y_of(order[p][L-1-k])[c]) begin
            failures++;
            $display("load %0d: chain %0d cell %0d holds %0b, expected Y%0d of seed %0d",
                     p, c, k, scan_q_o[c][k], c, order[p][L-1-k]);
          end
        end
      checks++;
      if (toggles != exp_toggles[p]) begin
        failures++;
        $display("load %0d: %0d scan-in toggles, expected %0d", p, toggles, exp_toggles[p]);
      end
      $display("load %0d: %0d scan-in toggles over 15 seed changes", p, toggles);
      cycle(0, 1'b0, 1'b0, 1'b0);  // capture
    end
    // unload the last response
    for (int i = 0; i < L; i++) cycle(0, 1'b1, 1'b1, 1'b0);

    expected_sig_i = sig_ref;
    #1;
    checks++;
    if (sig_match_o !== 1'b1) begin
      failures++;
      $display("signature %h not accepted, expected %h", signature_o, sig_ref);
    end else n_match++;
    expected_sig_i = sig_ref ^ 9'h004;
    #1;
    checks++;
    if (sig_match_o !== 1'b0) begin
      failures++;
      $display("wrong expected signature accepted");
    end else n_mismatch++;
    $display("final signature %h", signature_o);

    $display("shift=%0d capture=%0d compact=%0d clear=%0d match=%0d mismatch=%0d",
             n_shift, n_capture, n_compact, n_clear, n_match, n_mismatch);
    checks += 6;
    if (n_shift == 0)    begin failures++; $display("no shift cycle");   end
    if (n_capture == 0)  begin failures++; $display("no capture cycle"); end
    if (n_compact == 0)  begin failures++; $display("no compaction");    end
    if (n_clear == 0)    begin failures++; $display("no signature clear"); end
    if (n_match == 0)    begin failures++; $display("no signature match"); end
    if (n_mismatch == 0) begin failures++; $display("no signature mismatch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
