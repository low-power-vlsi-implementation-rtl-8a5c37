// viterbi_decoder: hard-decision Viterbi decoder for the rate-1/2, K=4 code,
// with a folded add-compare-select stage.
//
// Blocks: the branch metric unit (bmu) turns each received symbol into four
// Hamming distances; the folded add-compare-select unit (acsu) updates the
// eight path metrics held in the path metric memory (pmm), ACS_UNITS states
// per clock, and produces one survivor row per stage for the trace-back unit
// (tbu). This split and the folding of the ACS work onto fewer hardware nodes
// follow the source design. The controller here, the frame organisation and
// all timing are this design's choices.
//
// Operation: the decoder works on frames of FRAME_LEN received symbols.
// A frame is expected to start in encoder state 000 (the encoder is flushed
// with K-1 zero bits at the end of each frame, or cleared). For each symbol
// the controller spends one clock accepting it (sym_valid && sym_ready) and
// 8/ACS_UNITS clocks on the folded ACS (fold steps), so symbols are taken at
// most once every 1 + 8/ACS_UNITS clocks. After the last symbol of a frame it
// picks the state with the smallest path metric (lowest index on a tie),
// reports that metric on best_pm_o (with best_pm_valid for one clock) and
// starts the trace-back; the frame's decoded bits then leave on out_bit /
// out_valid in order, out_last marking the last. sym_ready is low while the
// survivor memory is traced; the output of one frame overlaps the reception
// of the next.
//
// PM_W is derived so that no path metric can overflow within a frame.
module viterbi_decoder
  import viterbi_pkg::*;
#(
  parameter int unsigned ACS_UNITS = 1,
  parameter int unsigned FRAME_LEN = 64,
  parameter int unsigned INIT_PM   = 8,
  localparam int unsigned PM_W     = $clog2(INIT_PM + 2 * FRAME_LEN + 1),
  localparam int unsigned FOLD     = NS / ACS_UNITS,
  localparam int unsigned FW       = (FOLD > 1) ? $clog2(FOLD) : 1,
  localparam int unsigned AW       = (FRAME_LEN > 1) ? $clog2(FRAME_LEN) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            sym_valid,
  output logic            sym_ready,
  input  code_t           sym,
  output logic            out_valid,
  output logic            out_bit,
  output logic            out_last,
  output logic            best_pm_valid,
  output logic [PM_W-1:0] best_pm_o
);

  typedef enum logic [1:0] {D_RECV, D_ACS, D_BEST} dec_state_e;

  dec_state_e      dstate;
  logic [FW-1:0]   fold;
  logic [AW-1:0]   stage;
  logic [NS-1:0]   surv_acc, surv_row;

  bm_t             bm [4];
  state_t          rd_addr [2*ACS_UNITS];
  logic [PM_W-1:0] rd_data [2*ACS_UNITS];
  state_t          wr_addr [ACS_UNITS];
  logic [PM_W-1:0] wr_data [ACS_UNITS];
  logic            wr_en   [ACS_UNITS];
  logic            surv    [ACS_UNITS];
  logic [PM_W-1:0] all_pm  [NS];

  logic            accept, last_fold, pm_init, pm_swap;
  logic            tb_ready, tb_trace_busy, tb_start;
  state_t          best_state;
  logic [PM_W-1:0] best_pm;

  assign sym_ready = (dstate == D_RECV) && !tb_trace_busy;
  assign accept    = sym_valid && sym_ready;
  assign last_fold = (dstate == D_ACS) && (fold == FW'(FOLD - 1));
  assign pm_swap   = last_fold;
  assign tb_start  = (dstate == D_BEST) && tb_ready;
  assign pm_init   = tb_start;

  always_comb begin
    for (int u = 0; u < ACS_UNITS; u++) wr_en[u] = (dstate == D_ACS);
  end

  // Survivor row of the current stage: bits gathered in earlier fold steps
  // plus the ones produced in this clock.
  always_comb begin
    surv_row = surv_acc;
    for (int u = 0; u < ACS_UNITS; u++) surv_row[wr_addr[u]] = surv[u];
  end

  // Best state at the end of a frame.
  always_comb begin
    best_state = '0;
    best_pm    = all_pm[0];
    for (int s = 1; s < NS; s++) begin
      if (all_pm[s] < best_pm) begin
        best_pm    = all_pm[s];
        best_state = state_t'(s);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dstate        <= D_RECV;
      fold          <= '0;
      stage         <= '0;
      surv_acc      <= '0;
      best_pm_valid <= 1'b0;
      best_pm_o     <= '0;
    end else begin
      best_pm_valid <= 1'b0;
      unique case (dstate)
        D_RECV: if (accept) begin
          dstate <= D_ACS;
          fold   <= '0;
        end
        D_ACS: begin
          surv_acc <= surv_row;
          if (last_fold) begin
            fold <= '0;
            if (stage == AW'(FRAME_LEN - 1)) begin
              stage  <= '0;
              dstate <= D_BEST;
            end else begin
              stage  <= stage + 1'b1;
              dstate <= D_RECV;
            end
          end else begin
            fold <= fold + 1'b1;
          end
        end
        D_BEST: if (tb_ready) begin
          best_pm_valid <= 1'b1;
          best_pm_o     <= best_pm;
          dstate        <= D_RECV;
        end
        default: dstate <= D_RECV;
      endcase
    end
  end

  bmu u_bmu (
    .clk, .rst_n, .load(accept), .rx_sym(sym), .bm_o(bm)
  );

  acsu #(.ACS_UNITS(ACS_UNITS), .PM_W(PM_W)) u_acsu (
    .fold_idx(fold), .bm_i(bm), .rd_addr, .rd_data, .wr_addr, .wr_data,
    .surv_o(surv)
  );

  pmm #(.PM_W(PM_W), .NRD(2 * ACS_UNITS), .NWR(ACS_UNITS), .INIT_PM(INIT_PM)) u_pmm (
    .clk, .rst_n, .init(pm_init), .swap(pm_swap), .rd_addr, .rd_data,
    .wr_en, .wr_addr, .wr_data, .all_pm_o(all_pm)
  );

  tbu #(.FRAME_LEN(FRAME_LEN)) u_tbu (
    .clk, .rst_n, .surv_we(last_fold), .surv_waddr(stage), .surv_wdata(surv_row),
    .start(tb_start), .start_state(best_state), .ready(tb_ready),
    .trace_busy(tb_trace_busy), .out_valid, .out_bit, .out_last
  );

endmodule
