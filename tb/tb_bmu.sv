// tb_bmu: checks the four Hamming-distance branch metrics for every received
// symbol, and that the metrics hold while load is low.
module tb_bmu;
  import viterbi_pkg::*;

  logic clk = 0, rst_n = 0, load = 0;
  code_t rx_sym = '0;
  bm_t bm [4];
  int checks = 0, failures = 0;

  bmu dut (.clk, .rst_n, .load, .rx_sym, .bm_o(bm));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected distance written out as a table.
  function automatic int hdist(int a, int b);
    int t [4][4] = '{'{0, 1, 1, 2}, '{1, 0, 2, 1}, '{1, 2, 0, 1}, '{2, 1, 1, 0}};
    return t[a][b];
  endfunction

  initial begin
    int held;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 400; i++) begin
      int s;
      s = $urandom_range(0, 3);
      load <= 1; rx_sym <= code_t'(s);
      @(posedge clk); #1;
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (int'(bm[c]) != hdist(s, c)) begin
          failures++;
          $display("FAIL rx=%0d c=%0d bm=%0d", s, c, bm[c]);
        end
      end
      held = s;
      load <= 0; rx_sym <= code_t'($urandom_range(0, 3));
      repeat ($urandom_range(1, 3)) @(posedge clk);
      #1;
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (int'(bm[c]) != hdist(held, c)) begin
          failures++;
          $display("FAIL hold rx=%0d c=%0d bm=%0d", held, c, bm[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
