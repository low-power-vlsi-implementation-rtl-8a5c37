// pmm: path metric memory of the Viterbi decoder.
//
// Holds one path metric per trellis state in two banks. The "current" bank
// holds the metrics of the last completed trellis stage and is read by the
// add-compare-select unit; the new metrics it produces are written into the
// other bank. Because the add-compare-select work of one stage is spread over
// several clocks (folding), the old metrics must stay intact until the whole
// stage is done, hence the two banks; swap makes the written bank current.
// The two-bank organisation is this design's choice: the source design only
// says that the selected metrics are stored and updated in this memory.
//
// Interface: NRD combinational read ports on the current bank, NWR write
// ports on the other bank, all_pm_o shows the whole current bank (used to
// find the best state at the end of a frame). init loads the current bank
// with 0 for state 0 and INIT_PM for every other state, since a frame starts
// from the all-zero encoder state. init has priority over swap and writes.
module pmm
  import viterbi_pkg::*;
#(
  parameter int unsigned PM_W    = 8,
  parameter int unsigned NRD     = 2,
  parameter int unsigned NWR     = 1,
  parameter int unsigned INIT_PM = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic            swap,
  input  state_t          rd_addr [NRD],
  output logic [PM_W-1:0] rd_data [NRD],
  input  logic            wr_en   [NWR],
  input  state_t          wr_addr [NWR],
  input  logic [PM_W-1:0] wr_data [NWR],
  output logic [PM_W-1:0] all_pm_o [NS]
);

  logic [PM_W-1:0] bank [2][NS];
  logic            cur;

  always_ff @(posedge clk) begin
    if (!rst_n || init) begin
      cur <= 1'b0;
      for (int s = 0; s < NS; s++) begin
        bank[0][s] <= (s == 0) ? '0 : PM_W'(INIT_PM);
        bank[1][s] <= '0;
      end
    end else begin
      for (int w = 0; w < NWR; w++)
        if (wr_en[w]) bank[!cur][wr_addr[w]] <= wr_data[w];
      if (swap) cur <= !cur;
    end
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) rd_data[r] = bank[cur][rd_addr[r]];
    for (int s = 0; s < NS; s++)  all_pm_o[s] = bank[cur][s];
  end

endmodule
