// xor_network: the N-input, M-output linear decompressor ("EXOR network").
//
// Every output y[j] (Yj) is the XOR of the seed bits x[i] (Xi) selected by
// bit i of MASKS[j]. The default masks are the published 4x9 network, so with
// the defaults Y0 = X0^X1^X2, Y1 = X1^X2, ..., Y8 = X0^X3 (see scan_pkg).
// Each scan cycle the tester presents one seed and the M outputs are loaded
// in parallel into the M scan chains as their scan-in values.
//
// Interface: x (N bits, x[0] = X0), y (M bits, y[0] = Y0).
// Timing: purely combinational, no clock.
module xor_network
  import scan_pkg::*;
#(
  parameter int unsigned N = N_SEED,
  parameter int unsigned M = M_CHAINS,
  parameter logic [M-1:0][N-1:0] MASKS = XOR_MASKS
) (
  input  logic [N-1:0] x,
  output logic [M-1:0] y
);

  always_comb begin
    for (int unsigned j = 0; j < M; j++) begin
      y[j] = ^(x & MASKS[j]);
    end
  end

endmodule
