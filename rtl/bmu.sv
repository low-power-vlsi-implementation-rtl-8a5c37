// bmu: hard-decision branch metric unit.
//
// For a received 2-bit code symbol the unit computes the Hamming distance to
// each of the four possible code symbols 00, 01, 10, 11 (the number of bits
// that differ), and holds the four metrics in a register while the folded
// add-compare-select unit consumes them over several cycles. Hard decision
// with the Hamming distance is one of the two metrics the source design
// names (the other, Euclidean distance for soft decision, is not built).
//
// Interface: when load is high the symbol rx_sym is taken and bm_o[c], the
// distance from rx_sym to symbol c, is valid from the next clock on until
// the next load. Reset clears the metrics.
module bmu
  import viterbi_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  code_t rx_sym,
  output bm_t   bm_o [4]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < 4; c++) bm_o[c] <= '0;
    end else if (load) begin
      for (int c = 0; c < 4; c++) bm_o[c] <= hamming(rx_sym, code_t'(c));
    end
  end

endmodule
