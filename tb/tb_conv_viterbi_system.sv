// tb_conv_viterbi_system: end-to-end test of the whole link at its default
// parameters (one ACS node, frames of 64 symbols). Random data frames go
// into the encoder; its symbols pass a behavioural channel that flips bits;
// the result is fed to the decoder and the reconstructed bits are compared
// with the original data and with the reference decoder.
//
// Frames are closed in two ways: with three zero tail bits in the frame
// (trellis termination), or with 64 data bits followed by an encoder clear.
// Channel conditions rotate through error-free, sparse single-bit errors and
// random errors at about 5 %. The test counts the mechanisms of the design
// and fails if one never happened: folded ACS steps (eight per stage with one
// node), receive stalls (decoder not ready), trace-backs (frames delivered),
// frames decoded correctly despite channel errors, tail-terminated frames and
// encoder clears.
module tb_conv_viterbi_system;
  import viterbi_pkg::*;
  import tb_ref_pkg::*;

  localparam int L = 64;
  localparam int NFRAMES = 24;
  localparam int PM_W = $clog2(8 + 2 * L + 1);

  logic clk = 0, rst_n = 0;
  logic enc_clear = 0, tx_valid = 0, tx_bit = 0;
  logic enc_valid;
  code_t enc_code;
  logic rx_valid = 0, rx_ready;
  code_t rx_code = '0;
  logic dec_valid, dec_bit, dec_last, dec_pm_valid;
  logic [PM_W-1:0] dec_pm;

  conv_viterbi_system dut (.clk, .rst_n, .enc_clear, .tx_valid, .tx_bit, .enc_valid, .enc_code,
    .rx_valid, .rx_ready, .rx_code, .dec_valid, .dec_bit, .dec_last, .dec_pm_valid, .dec_pm);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fold = 0, n_stage = 0, n_stall = 0, n_trace = 0, n_corrected = 0;
  int n_tail = 0, n_clear = 0, n_errors = 0;
  int cyc = 0;

  bits_t data [NFRAMES];
  bits_t exp_dec [NFRAMES];
  int    exp_pm [NFRAMES];
  int    nerr [NFRAMES];
  int    mode [NFRAMES];
  bit    use_clear [NFRAMES];
  syms_t txs [NFRAMES];
  int    enc_frame = 0, enc_idx = 0;
  bit    frame_ready [NFRAMES];
  syms_t rxs [NFRAMES];

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  task automatic report();
    $display("fold steps %0d, stages %0d, stalls %0d, trace-backs %0d, corrected frames %0d",
             n_fold, n_stage, n_stall, n_trace, n_corrected);
    $display("tail-terminated frames %0d, encoder clears %0d, channel bit errors %0d",
             n_tail, n_clear, n_errors);
    checks += 7;
    if (n_fold == 0 || n_fold != 8 * n_stage) failures++;
    if (n_stall == 0) failures++;
    if (n_trace != NFRAMES) failures++;
    if (n_corrected == 0) failures++;
    if (n_tail == 0) failures++;
    if (n_clear == 0) failures++;
    if (n_errors == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    report();
  end

  // mechanism counters, observed on the decoder's internal handshakes
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (dut.u_dec.dstate == dut.u_dec.D_ACS) n_fold++;
      if (dut.u_dec.last_fold) n_stage++;
      if (rx_valid && !rx_ready) n_stall++;
      if (dec_valid && dec_last) n_trace++;
      if (enc_clear) n_clear++;
    end
  end

  // transmit side: build frames and feed the encoder one bit per clock
  initial begin
    @(posedge clk iff rst_n);
    for (int f = 0; f < NFRAMES; f++) begin
      mode[f] = f % 3;
      use_clear[f] = (f % 4 == 3);
      for (int i = 0; i < MAXLEN; i++) data[f][i] = 0;
      for (int i = 0; i < (use_clear[f] ? L : L - 3); i++) data[f][i] = $urandom_range(0, 1) == 1;
      if (!use_clear[f]) n_tail++;
      ref_encode(data[f], L, txs[f]);
      for (int i = 0; i < L; i++) begin
        @(negedge clk);
        tx_valid = 1; tx_bit = data[f][i];
      end
      @(negedge clk);
      tx_valid = 0;
      if (use_clear[f]) begin
        enc_clear = 1;
        @(negedge clk);
        enc_clear = 0;
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  end

  // encoder output: compare with the reference encoder, then pass the
  // symbols through the channel model
  always @(posedge clk) begin
    if (rst_n && enc_valid) begin
      chk(enc_code == code_t'(txs[enc_frame][enc_idx]),
          $sformatf("encoder frame %0d symbol %0d", enc_frame, enc_idx));
      rxs[enc_frame][enc_idx] = enc_code;
      enc_idx++;
      if (enc_idx == L) begin
        int f;
        f = enc_frame;
        nerr[f] = 0;
        for (int t = 0; t < L; t++) begin
          if (mode[f] == 1 && t % 12 == 5 && t < L - 8) begin
            int bp;
            bp = $urandom_range(0, 1);
            rxs[f][t][bp] = !rxs[f][t][bp];
            nerr[f]++;
          end else if (mode[f] == 2) begin
            for (int b = 0; b < 2; b++)
              if ($urandom_range(0, 99) < 5) begin rxs[f][t][b] = !rxs[f][t][b]; nerr[f]++; end
          end
        end
        n_errors += nerr[f];
        exp_pm[f] = ref_viterbi(rxs[f], L, 8, exp_dec[f]);
        frame_ready[f] = 1;
        enc_idx = 0;
        enc_frame++;
      end
    end
  end

  // receive side: offer the channel output to the decoder as fast as it takes it
  initial begin
    for (int f = 0; f < NFRAMES; f++) frame_ready[f] = 0;
    @(posedge clk iff rst_n);
    for (int f = 0; f < NFRAMES; f++) begin
      while (!frame_ready[f]) @(posedge clk);
      for (int t = 0; t < L; t++) begin
        @(negedge clk);
        rx_valid = 1; rx_code = code_t'(rxs[f][t]);
        @(posedge clk iff rx_ready);
        #1 rx_valid = 0;
      end
    end
  end

  // decoder output
  int pm_frame = 0, out_frame = 0, out_idx = 0;
  bits_t got;
  always @(posedge clk) begin
    if (rst_n && dec_pm_valid) begin
      chk(int'(dec_pm) == exp_pm[pm_frame], $sformatf("frame %0d best metric", pm_frame));
      if (mode[pm_frame] == 1)
        chk(int'(dec_pm) == nerr[pm_frame], $sformatf("frame %0d metric equals errors", pm_frame));
      pm_frame++;
    end
    if (rst_n && dec_valid) begin
      got[out_idx] = dec_bit;
      chk(dec_last == (out_idx == L - 1), "dec_last position");
      out_idx++;
      if (dec_last || out_idx == L) begin
        bit ok_ref, ok_data;
        ok_ref = 1; ok_data = 1;
        for (int i = 0; i < L; i++) begin
          if (got[i] != exp_dec[out_frame][i]) ok_ref = 0;
          if (got[i] != data[out_frame][i]) ok_data = 0;
        end
        chk(ok_ref, $sformatf("frame %0d differs from reference decoder", out_frame));
        if (mode[out_frame] != 2 && !use_clear[out_frame])
          chk(ok_data, $sformatf("frame %0d data not recovered", out_frame));
        if (ok_data && nerr[out_frame] > 0) n_corrected++;
        out_idx = 0;
        out_frame++;
        if (out_frame == NFRAMES) begin
          repeat (3) @(posedge clk);
          report();
        end
      end
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
  end
endmodule
