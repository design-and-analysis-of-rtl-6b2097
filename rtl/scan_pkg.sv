// scan_pkg: constants shared by the scan-compression test architecture.
//
// A 4-bit seed from the tester is expanded by a fixed XOR network into 9
// scan-in values, one per scan chain; the scan-out bits of the 9 chains are
// compacted by a 9-bit MISR. The seed width (4), chain count (9) and the XOR
// equations Y0..Y8 are the published ones. The chain length (16, so that one
// ordering of all 16 seed values fills one scan load) and the MISR feedback
// polynomial (x^9 + x^4 + 1, a primitive polynomial) are this design's choice.
package scan_pkg;

  localparam int unsigned N_SEED    = 4;   // seed bits X0..X3
  localparam int unsigned M_CHAINS  = 9;   // scan-in values Y0..Y8 / chains
  localparam int unsigned CHAIN_LEN = 16;  // scan cells per chain (own choice)

  // Connection matrix of the XOR network. Bit i of XOR_MASKS[j] is set when
  // seed bit Xi feeds output Yj:
  //   Y0 = X0^X1^X2   Y1 = X1^X2      Y2 = X0^X2
  //   Y3 = X0^X1^X3   Y4 = X1^X3      Y5 = X1^X2^X3
  //   Y6 = X2^X3      Y7 = X0^X2^X3   Y8 = X0^X3
  typedef logic [N_SEED-1:0] seed_t;
  typedef logic [M_CHAINS-1:0] chains_t;
  typedef seed_t [M_CHAINS-1:0] xor_masks_t;

  localparam xor_masks_t XOR_MASKS = '{
    4'b1001,  // Y8
    4'b1101,  // Y7
    4'b1100,  // Y6
    4'b1110,  // Y5
    4'b1010,  // Y4
    4'b1011,  // Y3
    4'b0101,  // Y2
    4'b0110,  // Y1
    4'b0111   // Y0
  };

  // MISR feedback taps, x^9 + x^4 + 1: bit k set means the stage-8 output
  // is fed back into stage k (in addition to stage 0).
  localparam chains_t MISR_POLY = 9'h011;

endpackage
