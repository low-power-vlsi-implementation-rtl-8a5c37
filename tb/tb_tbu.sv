// tb_tbu: checks the trace-back unit. For a random input sequence the true
// encoder state path is known; survivor rows are written so that the state
// on the true path points at its true predecessor while all other bits are
// random. Tracing from the true final state must return the input sequence,
// in order, with the first bit FRAME_LEN + 1 clocks after start.
module tb_tbu;
  import viterbi_pkg::*;

  localparam int L = 40;
  localparam int AW = $clog2(L);

  logic clk = 0, rst_n = 0;
  logic surv_we = 0, start = 0;
  logic [AW-1:0] surv_waddr = '0;
  logic [NS-1:0] surv_wdata = '0;
  state_t start_state = '0;
  logic ready, trace_busy, out_valid, out_bit, out_last;
  int checks = 0, failures = 0;

  tbu #(.FRAME_LEN(L)) dut (.clk, .rst_n, .surv_we, .surv_waddr, .surv_wdata, .start,
    .start_state, .ready, .trace_busy, .out_valid, .out_bit, .out_last);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit data [L];
    int st, prev, lat;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int frame = 0; frame < 30; frame++) begin
      // write survivor rows along a random path starting at a random state
      st = $urandom_range(0, 7);
      for (int t = 0; t < L; t++) begin
        logic [NS-1:0] row;
        prev = st;
        data[t] = $urandom_range(0, 1) == 1;
        st = (int'(data[t]) << 2) | (prev >> 1);   // shift the new bit in at the top
        row = NS'($urandom);
        row[st] = prev[0];                          // oldest bit of the predecessor
        @(negedge clk);
        surv_we = 1; surv_waddr = AW'(t); surv_wdata = row;
        @(posedge clk); #1;
        surv_we = 0;
      end
      chk(ready, "ready before start");
      @(negedge clk);
      start = 1; start_state = state_t'(st);
      @(posedge clk); #1;
      start = 0;
      lat = 1;
      while (!out_valid) begin
        chk(trace_busy && !ready, "busy while tracing");
        @(posedge clk); #1;
        lat++;
      end
      chk(lat == L + 1, $sformatf("latency %0d", lat));
      for (int i = 0; i < L; i++) begin
        chk(out_valid, "out_valid run");
        chk(out_bit == data[i], $sformatf("frame %0d bit %0d", frame, i));
        chk(out_last == (i == L - 1), "out_last");
        @(posedge clk); #1;
      end
      chk(!out_valid && ready, "idle after frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
