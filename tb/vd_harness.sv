// vd_harness: drives one viterbi_decoder configuration with terminated
// frames and checks its output. Frames cycle through three channel
// conditions: error-free, sparse single-bit errors (at most one every 12
// symbols and none in the last 8) and random errors at about 6 % of the
// bits. Every frame's decoded bits and best metric are compared with the
// register-exchange reference decoder; the error-free and sparse frames must
// also return the original data and a best metric equal to the number of
// flipped bits. Symbols are offered back to back, with occasional idle gaps;
// where no gap was inserted the spacing between accepted symbols must be
// exactly 1 + 8/U clocks.
module vd_harness
  import viterbi_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int U = 1,
  parameter int L = 32,
  parameter int NFRAMES = 12
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls,
  output int   corrected
);

  localparam int PM_W = $clog2(8 + 2 * L + 1);

  logic sym_valid = 0;
  logic sym_ready;
  code_t sym = '0;
  logic out_valid, out_bit, out_last, best_pm_valid;
  logic [PM_W-1:0] best_pm;

  viterbi_decoder #(.ACS_UNITS(U), .FRAME_LEN(L)) dut (.clk, .rst_n, .sym_valid, .sym_ready,
    .sym, .out_valid, .out_bit, .out_last, .best_pm_valid, .best_pm_o(best_pm));

  bits_t data [NFRAMES];
  bits_t exp_dec [NFRAMES];
  int    exp_pm [NFRAMES];
  int    nerr [NFRAMES];
  int    mode [NFRAMES];
  int    sent_frames = 0;
  int    pm_frame = 0, out_frame = 0, out_idx = 0;
  int    cyc = 0;
  bits_t got;

  initial begin
    done = 0; checks = 0; failures = 0; stalls = 0; corrected = 0;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL [U=%0d L=%0d] %s", U, L, what);
    end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (sym_valid && !sym_ready) stalls++;
  end

  // stimulus
  initial begin
    syms_t tx, rx;
    int last_acc;
    bit gap;
    @(posedge clk iff rst_n);
    for (int f = 0; f < NFRAMES; f++) begin
      mode[f] = f % 3;
      for (int i = 0; i < MAXLEN; i++) data[f][i] = 0;
      for (int i = 0; i < L - 3; i++) data[f][i] = $urandom_range(0, 1) == 1;
      ref_encode(data[f], L, tx);
      rx = tx;
      nerr[f] = 0;
      for (int t = 0; t < L; t++) begin
        if (mode[f] == 1 && t % 12 == 5 && t < L - 8 && $urandom_range(0, 1) == 1) begin
          int bp;
          bp = $urandom_range(0, 1);
          rx[t][bp] = !rx[t][bp];
          nerr[f]++;
        end else if (mode[f] == 2) begin
          for (int b = 0; b < 2; b++)
            if ($urandom_range(0, 99) < 6) begin rx[t][b] ^= 1'b1; nerr[f]++; end
        end
      end
      exp_pm[f] = ref_viterbi(rx, L, 8, exp_dec[f]);
      sent_frames = f + 1;
      last_acc = -1;
      for (int t = 0; t < L; t++) begin
        gap = $urandom_range(0, 9) == 0;
        if (gap) repeat ($urandom_range(1, 4)) @(posedge clk);
        @(negedge clk);
        sym_valid = 1; sym = code_t'(rx[t]);
        @(posedge clk iff sym_ready);
        if (t > 0 && !gap && last_acc >= 0)
          chk(cyc + 1 - last_acc == 1 + 8 / U,
              $sformatf("symbol spacing %0d", cyc + 1 - last_acc));
        last_acc = cyc + 1;
        #1 sym_valid = 0;
      end
    end
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && best_pm_valid) begin
      chk(int'(best_pm) == exp_pm[pm_frame],
          $sformatf("frame %0d best metric %0d expected %0d", pm_frame, best_pm, exp_pm[pm_frame]));
      if (mode[pm_frame] != 2)
        chk(int'(best_pm) == nerr[pm_frame], $sformatf("frame %0d metric vs errors", pm_frame));
      pm_frame++;
    end
    if (rst_n && out_valid) begin
      got[out_idx] = out_bit;
      chk(out_last == (out_idx == L - 1), "out_last position");
      out_idx++;
      if (out_last || out_idx == L) begin
        bit ok_ref, ok_data;
        ok_ref = 1; ok_data = 1;
        for (int i = 0; i < L; i++) begin
          if (got[i] != exp_dec[out_frame][i]) ok_ref = 0;
          if (got[i] != data[out_frame][i]) ok_data = 0;
        end
        chk(ok_ref, $sformatf("frame %0d differs from reference decoder", out_frame));
        if (mode[out_frame] != 2) chk(ok_data, $sformatf("frame %0d data not recovered", out_frame));
        if (ok_data && nerr[out_frame] > 0) corrected++;
        out_idx = 0;
        out_frame++;
        if (out_frame == NFRAMES) done = 1;
      end
    end
  end

endmodule
