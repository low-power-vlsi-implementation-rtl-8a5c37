// tb_conv_encoder: checks the FSM encoder against a shift-register model of
// G1 = 1+Z+Z^2+Z^3, G2 = 1+Z^2+Z^3 over random input with gaps, checks the
// one-clock latency, the clear input, and that all 16 arcs of the state
// diagram were exercised. It also checks a few arcs by their printed labels.
module tb_conv_encoder;
  import viterbi_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_bit = 0;
  logic out_valid;
  code_t out_code;
  int checks = 0, failures = 0;
  int cycles = 0;
  bit r0, r1, r2;
  bit exp_valid;
  bit [1:0] exp_code;
  bit arc_seen [16];

  conv_encoder dut (.clk, .rst_n, .clear, .in_valid, .in_bit, .out_valid, .out_code);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  // Drive one input (or idle) and check the registered output one clock later.
  task automatic step(bit v, bit b, bit clr);
    in_valid <= v; in_bit <= b; clear <= clr;
    exp_valid = v && !clr;
    if (clr) begin
      r0 = 0; r1 = 0; r2 = 0;
    end else if (v) begin
      exp_code = {b ^ r0 ^ r1 ^ r2, b ^ r1 ^ r2};
      arc_seen[{r0, r1, r2, b}] = 1;
      r2 = r1; r1 = r0; r0 = b;
    end
    @(posedge clk); cycles++;
    #1;
    check(out_valid == exp_valid, "out_valid");
    if (exp_valid) check(out_code == exp_code, "out_code");
  endtask

  initial begin
    r0 = 0; r1 = 0; r2 = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Arcs as printed in the state diagram: 000 -1/11-> 100 -0/10-> 010 -1/00-> 101
    step(1, 1, 0); check(out_code == 2'b11, "arc 000->100 label 11");
    step(1, 0, 0); check(out_code == 2'b10, "arc 100->010 label 10");
    step(1, 1, 0); check(out_code == 2'b00, "arc 010->101 label 00");
    step(1, 0, 0); check(out_code == 2'b01, "arc 101->010 label 01");
    for (int i = 0; i < 3000; i++) begin
      int r;
      r = $urandom_range(0, 99);
      step(r < 80, $urandom_range(0, 1) == 1, r == 99);
    end
    for (int a = 0; a < 16; a++) check(arc_seen[a], "arc coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
