// tb_ber_workload: runs the decoder at its default size (one ACS node,
// frames of 64 symbols) over a binary symmetric channel at code-bit error
// rates of 0 %, 10 % and 20 %, and reports the residual bit and frame error
// rates after decoding. Each frame holds 61 random data bits and 3 zero tail
// bits. Checks: every frame must match the reference decoder exactly, and at
// 0 % channel errors every frame must come back error-free. The error rates
// themselves are reported, not checked.
module tb_ber_workload;
  import viterbi_pkg::*;
  import tb_ref_pkg::*;

  localparam int L = 64;
  localparam int NPER = 300;       // frames per error rate
  localparam int NRATES = 3;
  localparam int RATE_PM [NRATES] = '{0, 100, 200};   // per mille
  localparam int PM_W = $clog2(8 + 2 * L + 1);

  logic clk = 0, rst_n = 0;
  logic sym_valid = 0, sym_ready;
  code_t sym = '0;
  logic out_valid, out_bit, out_last, best_pm_valid;
  logic [PM_W-1:0] best_pm;

  viterbi_decoder dut (.clk, .rst_n, .sym_valid, .sym_ready, .sym, .out_valid, .out_bit,
    .out_last, .best_pm_valid, .best_pm_o(best_pm));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bits_t data, exp_dec, got;
  syms_t tx, rx;

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int r = 0; r < NRATES; r++) begin
      int bit_err, frame_err, chan_err;
      bit_err = 0; frame_err = 0; chan_err = 0;
      for (int f = 0; f < NPER; f++) begin
        int n;
        for (int i = 0; i < MAXLEN; i++) data[i] = 0;
        for (int i = 0; i < L - 3; i++) data[i] = $urandom_range(0, 1) == 1;
        ref_encode(data, L, tx);
        rx = tx;
        for (int t = 0; t < L; t++)
          for (int b = 0; b < 2; b++)
            if ($urandom_range(0, 999) < RATE_PM[r]) begin rx[t][b] = !rx[t][b]; chan_err++; end
        void'(ref_viterbi(rx, L, 8, exp_dec));
        // send the frame
        for (int t = 0; t < L; t++) begin
          @(negedge clk);
          sym_valid = 1; sym = code_t'(rx[t]);
          @(posedge clk iff sym_ready);
          #1 sym_valid = 0;
        end
        // collect its decoded bits
        n = 0;
        while (n < L) begin
          @(posedge clk);
          if (out_valid) begin got[n] = out_bit; n++; end
        end
        begin
          bit ok_ref;
          int e;
          ok_ref = 1; e = 0;
          for (int i = 0; i < L - 3; i++) begin
            if (got[i] != exp_dec[i]) ok_ref = 0;
            if (got[i] != data[i]) e++;
          end
          checks++;
          if (!ok_ref) begin failures++; $display("FAIL rate %0d frame %0d vs reference", r, f); end
          if (RATE_PM[r] == 0) begin
            checks++;
            if (e != 0) begin failures++; $display("FAIL error-free frame %0d", f); end
          end
          bit_err += e;
          if (e != 0) frame_err++;
        end
      end
      $display("channel error rate %0d.%0d %%: channel bit errors %0d of %0d, decoded bit errors %0d of %0d (%0d.%02d %%), frame errors %0d of %0d",
               RATE_PM[r] / 10, RATE_PM[r] % 10, chan_err, NPER * L * 2, bit_err, NPER * (L - 3),
               bit_err * 100 / (NPER * (L - 3)), (bit_err * 10000 / (NPER * (L - 3))) % 100,
               frame_err, NPER);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
