// tb_seed_order: the switching matrix of the XOR network and the seed order
// with the least scan-in switching.
//
// The 16 seed values are applied to the XOR network one after another and
// its 9 outputs recorded. The switching distance of two seeds is the number
// of outputs that differ between them, i.e. how many scan-in lines toggle
// when the tester goes from one seed to the other. From these the testbench
// builds the 16x16 matrix and checks that it is symmetric with a zero
// diagonal, that its upper triangle sums to 576 and that the closest pair of
// distinct seeds differs in 3 outputs (both worked out by hand).
//
// The cheapest order of all 16 seeds (an open path visiting every seed
// once) is then found exactly by dynamic programming over subsets
// (Held-Karp; cost[S][j] = cheapest path through the set S ending in j).
// Its cost must be 48, the returned order must be a permutation costing
// 48, and each of the nine low-switching orderings used in the end-to-end
// test must cost what was worked out by hand and no less than the optimum.
// The closed tour (back to the first seed) must cost 52.
module tb_seed_order;
  logic [3:0] x;
  logic [8:0] y;
  int checks = 0, failures = 0;

  xor_network dut (.x(x), .y(y));

  int unsigned sw [16][16];
  logic [8:0] ytab [16];

  int unsigned order [9][16] = '{
    '{ 1, 15,  2,  3, 12,  7,  8,  5, 10,  4,  9,  6, 13,  0, 14, 11},
    '{12,  3,  2, 15,  1,  6,  7,  8,  9,  4, 10,  5, 11,  0, 13, 14},
    '{ 6,  1, 15,  2,  3, 12,  7,  8,  5, 10,  4, 11,  0, 13, 14,  9},
    '{ 4,  9,  6,  1, 15,  2,  3, 12,  7,  8,  5, 10, 13,  0, 14, 11},
    '{14,  0, 13,  2,  3, 12,  1,  6,  7,  8,  5, 10,  4,  9, 11, 15},
    '{ 7,  8,  5, 10, 13,  0, 14,  9,  4,  1, 15,  2,  3, 12, 11,  6},
    '{ 3, 12,  2, 13,  0, 14,  9,  4, 10,  5,  8,  7,  6,  1, 15, 11},
    '{ 2,  3, 12,  7,  8,  5, 10,  4,  9,  6,  1, 15,  0, 11, 13, 14},
    '{ 8,  5, 10,  4,  9,  6,  1, 15,  2,  3, 12,  7,  0, 13, 11, 14}
  };
  int unsigned exp_cost [9] = '{55, 59, 58, 56, 59, 55, 56, 60, 57};

  localparam int unsigned FULL = 1 << 16;
  localparam int unsigned INF  = 32'hFFFF;
  int unsigned cost [FULL][16];
  byte         pred [FULL][16];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Held-Karp over subsets; start_mask restricts the first seed.
  task automatic run_dp(input logic [15:0] start_mask);
    for (int unsigned s = 0; s < FULL; s++)
      for (int j = 0; j < 16; j++) begin
        cost[s][j] = INF;
        pred[s][j] = -1;
      end
    for (int j = 0; j < 16; j++)
      if (start_mask[j]) cost[1 << j][j] = 0;
    for (int unsigned s = 1; s < FULL; s++)
      for (int i = 0; i < 16; i++) begin
        if (cost[s][i] == INF) continue;
        for (int j = 0; j < 16; j++) begin
          logic [15:0] t;
          if (s[j]) continue;
          t = 16'(s | (1 << j));
          if (cost[s][i] + sw[i][j] < cost[t][j]) begin
            cost[t][j] = cost[s][i] + sw[i][j];
            pred[t][j] = byte'(i);
          end
        end
      end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned best, tour, sum, dmin, c, last;
    int unsigned path [16];
    int unsigned s;
    bit seen [16];

    // record the network's outputs for all seeds
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1 ytab[v] = y;
    end
    // switching matrix
    sum = 0; dmin = 99;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        sw[i][j] = $countones(ytab[i] ^ ytab[j]);
        if (j > i) sum += sw[i][j];
        if (j != i && sw[i][j] < dmin) dmin = sw[i][j];
      end
    for (int i = 0; i < 16; i++) begin
      check(sw[i][i] == 0, $sformatf("diagonal %0d not zero", i));
      for (int j = 0; j < i; j++)
        check(sw[i][j] == sw[j][i], $sformatf("matrix not symmetric at %0d,%0d", i, j));
    end
    check(sum == 576, $sformatf("upper-triangle sum %0d, expected 576", sum));
    check(dmin == 3, $sformatf("closest pair differs in %0d outputs, expected 3", dmin));
    check(sw[0][13] == 3 && sw[0][7] == 4 && sw[0][3] == 6,
          "row 0 entries differ from the hand-worked values");

    // the low-switching orderings
    for (int p = 0; p < 9; p++) begin
      c = 0;
      for (int k = 0; k < 15; k++) c += sw[order[p][k]][order[p][k+1]];
      check(c == exp_cost[p], $sformatf("ordering %0d costs %0d, expected %0d", p, c, exp_cost[p]));
      $display("ordering %0d: %0d scan-in toggles", p, c);
    end

    // exact optimum, open path from any seed
    run_dp(16'hFFFF);
    best = INF; last = 0;
    for (int j = 0; j < 16; j++)
      if (cost[FULL-1][j] < best) begin
        best = cost[FULL-1][j];
        last = j;
      end
    check(best == 48, $sformatf("optimal open path costs %0d, expected 48", best));
    s = FULL - 1;
    for (int k = 15; k >= 0; k--) begin
      int unsigned prev;
      path[k] = last;
      prev = int'(pred[s][last]);
      s = s & ~(1 << last);
      last = prev;
    end
    c = 0;
    foreach (seen[k]) seen[k] = 0;
    for (int k = 0; k < 16; k++) seen[path[k]] = 1;
    for (int k = 0; k < 15; k++) c += sw[path[k]][path[k+1]];
    check(c == best, $sformatf("reconstructed path costs %0d, optimum %0d", c, best));
    for (int k = 0; k < 16; k++) check(seen[k], $sformatf("seed %0d missing from path", k));
    for (int p = 0; p < 9; p++) check(exp_cost[p] >= best, "an ordering beats the optimum");
    $write("optimal order:");
    for (int k = 0; k < 16; k++) $write(" %0d", path[k]);
    $display(", %0d toggles", c);

    // closed tour from seed 0 (any start gives the same tour cost)
    run_dp(16'h0001);
    tour = INF;
    for (int j = 1; j < 16; j++)
      if (cost[FULL-1][j] + sw[j][0] < tour) tour = cost[FULL-1][j] + sw[j][0];
    check(tour == 52, $sformatf("optimal closed tour costs %0d, expected 52", tour));
    $display("optimal closed tour: %0d toggles", tour);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
