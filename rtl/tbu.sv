// tbu: trace-back unit with survivor memory and output buffer.
//
// During a frame the add-compare-select unit writes one survivor row per
// trellis stage: bit n of row t says which predecessor state n chose at stage
// t. When the frame ends, start is given with the state to trace from (the
// state with the smallest path metric). The unit then walks the rows
// backwards, one stage per clock: the decoded bit of stage t is the top bit
// of the current state, and the predecessor is {state[1:0], row[t][state]}.
// The decoded bits come out in reverse order, so they are first collected in
// an output buffer and then sent in order, one bit per clock.
//
// Trace-back over a whole frame (rather than a sliding window of fixed depth,
// or register exchange) is this design's choice; the source design names
// trace-back without giving its organisation.
//
// The survivor memory has a registered read port, so it maps onto a block
// RAM; the read of a row is issued one clock before the trace step uses it.
//
// Timing: start (accepted only while ready is high) -> FRAME_LEN clocks of
// trace-back (trace_busy high, no survivor writes allowed) -> FRAME_LEN clocks
// with out_valid high, out_last on the last bit. Decoded bit i of the frame
// appears FRAME_LEN + 1 + i clocks after start. No backpressure on the output.
module tbu
  import viterbi_pkg::*;
#(
  parameter int unsigned FRAME_LEN = 64,
  localparam int unsigned AW = (FRAME_LEN > 1) ? $clog2(FRAME_LEN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          surv_we,
  input  logic [AW-1:0] surv_waddr,
  input  logic [NS-1:0] surv_wdata,
  input  logic          start,
  input  state_t        start_state,
  output logic          ready,
  output logic          trace_busy,
  output logic          out_valid,
  output logic          out_bit,
  output logic          out_last
);

  typedef enum logic [1:0] {T_IDLE, T_TRACE, T_OUT} tb_phase_e;

  localparam logic [AW-1:0] LAST = AW'(FRAME_LEN - 1);

  logic [NS-1:0]  surv_mem [FRAME_LEN];
  logic           dec_buf  [FRAME_LEN];
  tb_phase_e      phase;
  logic [AW-1:0]  idx;
  state_t         st;
  logic [NS-1:0]  row;
  logic [AW-1:0]  rd_idx;

  // Survivor memory: one write port, one registered read port (block RAM
  // style). The read address runs one stage ahead of the trace: the row for
  // stage idx is read in the clock before it is used.
  assign rd_idx = (phase == T_TRACE) ? idx - 1'b1 : LAST;

  always_ff @(posedge clk) begin
    if (surv_we) surv_mem[surv_waddr] <= surv_wdata;
    row <= surv_mem[rd_idx];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= T_IDLE;
      idx   <= '0;
      st    <= '0;
    end else begin
      unique case (phase)
        T_IDLE: if (start) begin
          phase <= T_TRACE;
          idx   <= LAST;
          st    <= start_state;
        end
        T_TRACE: begin
          dec_buf[idx] <= st[SW-1];
          st           <= {st[SW-2:0], row[st]};
          if (idx == '0) phase <= T_OUT;
          else           idx   <= idx - 1'b1;
        end
        T_OUT: begin
          if (idx == LAST) begin
            phase <= T_IDLE;
            idx   <= '0;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        default: phase <= T_IDLE;
      endcase
    end
  end

  assign ready      = (phase == T_IDLE);
  assign trace_busy = (phase == T_TRACE);
  assign out_valid  = (phase == T_OUT);
  assign out_bit    = (phase == T_OUT) && dec_buf[idx];
  assign out_last   = (phase == T_OUT) && (idx == LAST);

  // The survivor memory must not change while it is being traced.
  a_no_write_in_trace: assert property (@(posedge clk) disable iff (!rst_n)
    !(surv_we && phase == T_TRACE));

endmodule
