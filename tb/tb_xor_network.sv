// tb_xor_network: exhaustive check of the 4-input, 9-output XOR network.
//
// All 16 seed values are applied; each output is compared with the XOR
// equations written out term by term (Y0 = X0^X1^X2 ... Y8 = X0^X3), which
// is independent of the mask table the network is built from.
module tb_xor_network;
  logic [3:0] x;
  logic [8:0] y;
  int checks = 0, failures = 0;

  xor_network dut (.x(x), .y(y));

  function automatic logic [8:0] ref_y(input logic [3:0] v);
    logic [8:0] r;
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

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      for (int j = 0; j < 9; j++) begin
        checks++;
        if (y[j] !== ref_y(4'(v))[j]) begin
          failures++;
          $display("seed %0d: Y%0d = %0b, expected %0b", v, j, y[j], ref_y(4'(v))[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
