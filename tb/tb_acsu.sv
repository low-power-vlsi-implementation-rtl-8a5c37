// tb_acsu: checks the folded add-compare-select unit with one ACS node
// (eight fold steps per stage) and with four nodes (two fold steps). Path
// metrics and the received symbol are random; for every state the new metric
// and survivor bit are compared with a direct computation from the encoder
// equations, and every state must be written exactly once per stage.
module tb_acsu;
  import viterbi_pkg::*;
  import tb_ref_pkg::*;

  localparam int PM_W = 8;

  int checks = 0, failures = 0;
  logic [PM_W-1:0] pm [8];
  bm_t bm [4];

  // single node
  logic [2:0]      f1;
  state_t          ra1 [2];
  logic [PM_W-1:0] rd1 [2];
  state_t          wa1 [1];
  logic [PM_W-1:0] wd1 [1];
  logic            sv1 [1];
  // four nodes
  logic [0:0]      f4;
  state_t          ra4 [8];
  logic [PM_W-1:0] rd4 [8];
  state_t          wa4 [4];
  logic [PM_W-1:0] wd4 [4];
  logic            sv4 [4];

  acsu #(.ACS_UNITS(1), .PM_W(PM_W)) dut1 (.fold_idx(f1), .bm_i(bm), .rd_addr(ra1),
    .rd_data(rd1), .wr_addr(wa1), .wr_data(wd1), .surv_o(sv1));
  acsu #(.ACS_UNITS(4), .PM_W(PM_W)) dut4 (.fold_idx(f4), .bm_i(bm), .rd_addr(ra4),
    .rd_data(rd4), .wr_addr(wa4), .wr_data(wd4), .surv_o(sv4));

  always_comb begin
    for (int i = 0; i < 2; i++) rd1[i] = pm[ra1[i]];
    for (int i = 0; i < 8; i++) rd4[i] = pm[ra4[i]];
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expect_acs(input int ns, input int rx, output int m, output bit sv);
    int c [2];
    for (int k = 0; k < 2; k++) begin
      sym_t e, d;
      e = ref_step(ns[2], ns[1], ns[0], k[0]);
      d = e ^ sym_t'(rx);
      c[k] = int'(pm[((ns & 3) << 1) | k]) + d[1] + d[0];
    end
    sv = c[1] < c[0];
    m  = sv ? c[1] : c[0];
  endfunction

  task automatic check_one(int ns, int got_m, bit got_s, int rx, string tag);
    int m; bit s;
    expect_acs(ns, rx, m, s);
    checks++;
    if (got_m != m || got_s != s) begin
      failures++;
      $display("FAIL %s state %0d: got %0d/%0b expected %0d/%0b", tag, ns, got_m, got_s, m, s);
    end
  endtask

  initial begin
    for (int it = 0; it < 300; it++) begin
      int rx;
      bit seen1 [8], seen4 [8];
      rx = $urandom_range(0, 3);
      for (int s = 0; s < 8; s++) begin
        // small values make ties frequent
        pm[s] = (it % 2 == 0) ? PM_W'($urandom_range(0, 4)) : PM_W'($urandom_range(0, 120));
        seen1[s] = 0; seen4[s] = 0;
      end
      for (int c = 0; c < 4; c++) begin
        sym_t d;
        d = sym_t'(rx) ^ sym_t'(c);
        bm[c] = bm_t'(d[1] + d[0]);
      end
      for (int j = 0; j < 8; j++) begin
        f1 = 3'(j);
        #1;
        check_one(int'(wa1[0]), int'(wd1[0]), sv1[0], rx, "1 node");
        seen1[wa1[0]] = 1;
      end
      for (int j = 0; j < 2; j++) begin
        f4 = 1'(j);
        #1;
        for (int u = 0; u < 4; u++) begin
          check_one(int'(wa4[u]), int'(wd4[u]), sv4[u], rx, "4 nodes");
          seen4[wa4[u]] = 1;
        end
      end
      for (int s = 0; s < 8; s++) begin
        checks++;
        if (!seen1[s] || !seen4[s]) begin
          failures++;
          $display("FAIL state %0d not covered in a stage", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
