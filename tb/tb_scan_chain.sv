// tb_scan_chain: random shift and capture cycles against a reference model.
//
// A 16-cell chain is driven with random scan_in, scan_en and capture data
// for 400 cycles. The reference keeps its own array of cell values; after
// each edge the cell values and scan_out are compared. A directed part
// checks the shift latency: a single 1 shifted into an empty chain reaches
// scan_out after exactly LEN shift cycles.
module tb_scan_chain;
  localparam int LEN = 16;
  logic clk = 0, rst_n = 0, scan_en, scan_in;
  logic [LEN-1:0] capture_d, q;
  logic scan_out;
  int checks = 0, failures = 0;
  bit model [LEN];

  scan_chain #(.LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_state(input string what);
    for (int k = 0; k < LEN; k++) begin
      checks++;
      if (q[k] !== model[k]) begin
        failures++;
        $display("%s: cell %0d = %0b, expected %0b", what, k, q[k], model[k]);
      end
    end
    checks++;
    if (scan_out !== model[LEN-1]) begin
      failures++;
      $display("%s: scan_out = %0b, expected %0b", what, scan_out, model[LEN-1]);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    scan_en = 1; scan_in = 0; capture_d = '0;
    foreach (model[k]) model[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check_state("after reset");
    // random shift/capture traffic
    for (int n = 0; n < 400; n++) begin
      scan_en   = ($urandom_range(0, 4) != 0);
      scan_in   = 1'($urandom);
      capture_d = LEN'($urandom);
      @(posedge clk);
      if (scan_en) begin
        for (int k = LEN - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = scan_in;
      end else begin
        for (int k = 0; k < LEN; k++) model[k] = capture_d[k];
      end
      #1 check_state("random");
    end
    // latency: flush with zeros, then one 1
    scan_en = 1; scan_in = 0;
    repeat (LEN) @(posedge clk);
    #1 scan_in = 1;
    @(posedge clk);
    #1 scan_in = 0;
    lat = 1;
    while (!scan_out && lat < 3 * LEN) begin
      @(posedge clk);
      #1 lat++;
    end
    checks++;
    if (lat != LEN) begin
      failures++;
      $display("shift latency %0d cycles, expected %0d", lat, LEN);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
