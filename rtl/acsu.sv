// acsu: folded add-compare-select unit.
//
// A trellis stage has one add-compare-select (ACS) operation per state, eight
// in all. Under the folding transformation these eight operations share
// ACS_UNITS hardware ACS nodes: in fold step j (0 .. 8/ACS_UNITS-1) node u
// serves state n = j*ACS_UNITS + u, so one stage takes 8/ACS_UNITS clocks.
// The time multiplexing follows the source design; the number of nodes and
// the state-to-step order are this design's choices.
//
// ACS for state n: its two predecessors are p0 = {n[1:0],0} and
// p1 = {n[1:0],1}, both entered with input bit n[2]. Each candidate metric is
// the predecessor's path metric plus the branch metric of the code symbol on
// that branch; the smaller wins (ties go to p0) and becomes n's new path
// metric, and the survivor bit records which predecessor won (its lowest
// state bit). The unit is purely combinational: read addresses go to the path
// metric memory, its data come back, and the results go to the write port
// of that memory and to the survivor memory in the same clock.
//
// Path metrics are not normalised: the caller sizes PM_W so that a frame
// cannot overflow it.
module acsu
  import viterbi_pkg::*;
#(
  parameter int unsigned ACS_UNITS = 1,
  parameter int unsigned PM_W      = 8,
  localparam int unsigned FOLD     = NS / ACS_UNITS,
  localparam int unsigned FW       = (FOLD > 1) ? $clog2(FOLD) : 1
) (
  input  logic [FW-1:0]   fold_idx,
  input  bm_t             bm_i      [4],
  output state_t          rd_addr   [2*ACS_UNITS],
  input  logic [PM_W-1:0] rd_data   [2*ACS_UNITS],
  output state_t          wr_addr   [ACS_UNITS],
  output logic [PM_W-1:0] wr_data   [ACS_UNITS],
  output logic            surv_o    [ACS_UNITS]
);

  // Address side: which states this fold step serves and their predecessors.
  always_comb begin
    for (int u = 0; u < ACS_UNITS; u++) begin
      state_t n;
      n = state_t'(int'(fold_idx) * ACS_UNITS + u);
      wr_addr[u]     = n;
      rd_addr[2*u]   = {n[SW-2:0], 1'b0};
      rd_addr[2*u+1] = {n[SW-2:0], 1'b1};
    end
  end

  // Data side: add, compare, select.
  always_comb begin
    for (int u = 0; u < ACS_UNITS; u++) begin
      state_t          n, p0, p1;
      logic [PM_W-1:0] m0, m1;
      n  = state_t'(int'(fold_idx) * ACS_UNITS + u);
      p0 = {n[SW-2:0], 1'b0};
      p1 = {n[SW-2:0], 1'b1};
      m0 = rd_data[2*u]   + PM_W'(bm_i[branch_code(p0, n[SW-1])]);
      m1 = rd_data[2*u+1] + PM_W'(bm_i[branch_code(p1, n[SW-1])]);
      surv_o[u]  = (m1 < m0);
      wr_data[u] = (m1 < m0) ? m1 : m0;
    end
  end

endmodule
