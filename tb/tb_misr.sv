// tb_misr: the 9-bit MISR against a bit-serial reference.
//
// The reference treats the signature as a polynomial over GF(2): each step
// multiplies it by x modulo x^9 + x^4 + 1 and adds the input word. Random
// inputs, enables and clears are applied for 500 cycles. A second part
// checks that two input streams differing in one bit give different
// signatures.
module tb_misr;
  logic clk = 0, rst_n = 0, clr, en;
  logic [8:0] d, sig;
  logic [8:0] model;
  int checks = 0, failures = 0;

  misr dut (.*);

  always #5 clk = ~clk;

  // sig * x mod (x^9 + x^4 + 1), plus din
  function automatic logic [8:0] step(input logic [8:0] s, input logic [8:0] din);
    logic [9:0] t;
    t = {s, 1'b0};
    if (t[9]) t = t ^ 10'b10_0001_0001;
    return t[8:0] ^ din;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] sig_a;
    clr = 0; en = 0; d = '0; model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      clr = ($urandom_range(0, 49) == 0);
      en  = ($urandom_range(0, 3) != 0);
      d   = 9'($urandom);
      @(posedge clk);
      if (clr)     model = '0;
      else if (en) model = step(model, d);
      #1;
      checks++;
      if (sig !== model) begin
        failures++;
        $display("cycle %0d: sig %h, expected %h", n, sig, model);
      end
    end
    // single-bit error detection
    for (int pass = 0; pass < 2; pass++) begin
      clr = 1; en = 0;
      @(posedge clk);
      #1 clr = 0; en = 1;
      for (int n = 0; n < 20; n++) begin
        d = 9'(n * 37 + 5);
        if (pass == 1 && n == 7) d[3] = ~d[3];
        @(posedge clk);
        #1;
      end
      en = 0;
      if (pass == 0) sig_a = sig;
    end
    checks++;
    if (sig === sig_a) begin
      failures++;
      $display("single-bit error not seen in the signature");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
