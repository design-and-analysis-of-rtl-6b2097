// scan_chain: one mux-D scan chain of LEN scan cells.
//
// Each cell is a flip-flop with a multiplexer on its D input. With scan_en
// high the cells form a shift register: scan_in enters cell 0, every cell
// takes its lower neighbour and cell LEN-1 drives scan_out. With scan_en low
// every cell loads its functional input capture_d[k] (the response of the
// logic under test), which is the capture cycle of a scan test.
//
// Interface: scan_in, scan_en, capture_d[LEN] in; scan_out and the cell
// values q[LEN] (which drive the logic under test) out.
// Timing: one shift or capture per rising clk edge; a bit shifted in appears
// at scan_out LEN cycles later. rst_n (asynchronous, active low) clears all
// cells; the published description names the chains and their scan enable
// but not their length or reset, which are this design's choice.
module scan_chain #(
  parameter int unsigned LEN = scan_pkg::CHAIN_LEN
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           scan_en,
  input  logic           scan_in,
  input  logic [LEN-1:0] capture_d,
  output logic           scan_out,
  output logic [LEN-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (scan_en) begin
      q <= LEN'({q, scan_in});  // drop the bit leaving cell LEN-1
    end else begin
      q <= capture_d;
    end
  end

  assign scan_out = q[LEN-1];

endmodule
