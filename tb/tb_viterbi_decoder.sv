// tb_viterbi_decoder: runs the decoder in three folding configurations
// (one ACS node, eight fold steps per stage; two nodes; eight nodes, no
// folding) and three frame lengths, each driven and checked by vd_harness.
module tb_viterbi_decoder;
  logic clk = 0, rst_n = 0;
  logic d [3];
  int c [3], f [3], s [3], k [3];
  int checks, failures;

  always #5 clk = ~clk;

  vd_harness #(.U(1), .L(32), .NFRAMES(12)) h0 (.clk, .rst_n, .done(d[0]), .checks(c[0]),
    .failures(f[0]), .stalls(s[0]), .corrected(k[0]));
  vd_harness #(.U(2), .L(24), .NFRAMES(12)) h1 (.clk, .rst_n, .done(d[1]), .checks(c[1]),
    .failures(f[1]), .stalls(s[1]), .corrected(k[1]));
  vd_harness #(.U(8), .L(20), .NFRAMES(12)) h2 (.clk, .rst_n, .done(d[2]), .checks(c[2]),
    .failures(f[2]), .stalls(s[2]), .corrected(k[2]));

  task automatic report(bit timeout);
    checks = 0; failures = timeout ? 1 : 0;
    for (int i = 0; i < 3; i++) begin
      checks += c[i]; failures += f[i];
      $display("config %0d: checks %0d failures %0d stalls %0d corrected frames %0d",
               i, c[i], f[i], s[i], k[i]);
      // back-pressure and error correction must both have happened
      checks += 2;
      if (s[i] == 0) failures++;
      if (k[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    report(1);
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    wait (d[0] && d[1] && d[2]);
    repeat (5) @(posedge clk);
    report(0);
  end
endmodule
