// tb_pmm: checks the two-bank path metric memory: initial contents after
// init, that writes go to the hidden bank and become visible only after swap,
// the read ports, and that init restores the start values.
module tb_pmm;
  import viterbi_pkg::*;

  localparam int PM_W = 8, NRD = 4, NWR = 2, INIT_PM = 9;

  logic clk = 0, rst_n = 0, init = 0, swap = 0;
  state_t          rd_addr [NRD];
  logic [PM_W-1:0] rd_data [NRD];
  logic            wr_en   [NWR];
  state_t          wr_addr [NWR];
  logic [PM_W-1:0] wr_data [NWR];
  logic [PM_W-1:0] all_pm  [NS];
  int checks = 0, failures = 0;
  int model_cur [8], model_nxt [8];

  pmm #(.PM_W(PM_W), .NRD(NRD), .NWR(NWR), .INIT_PM(INIT_PM)) dut (.clk, .rst_n, .init,
    .swap, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data, .all_pm_o(all_pm));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(string what);
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (int'(all_pm[s]) != model_cur[s]) begin
        failures++;
        $display("FAIL %s state %0d: %0d expected %0d", what, s, all_pm[s], model_cur[s]);
      end
    end
    for (int r = 0; r < NRD; r++) begin
      rd_addr[r] = state_t'($urandom_range(0, 7));
      #1;
      checks++;
      if (int'(rd_data[r]) != model_cur[rd_addr[r]]) begin
        failures++;
        $display("FAIL %s read port %0d", what, r);
      end
    end
  endtask

  initial begin
    for (int w = 0; w < NWR; w++) begin wr_en[w] = 0; wr_addr[w] = '0; wr_data[w] = '0; end
    for (int r = 0; r < NRD; r++) rd_addr[r] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int round = 0; round < 50; round++) begin
      init <= 1;
      @(posedge clk); init <= 0; #1;
      for (int s = 0; s < 8; s++) model_cur[s] = (s == 0) ? 0 : INIT_PM;
      check_all("init");
      for (int stage = 0; stage < 6; stage++) begin
        // four write clocks of two states each fill the hidden bank
        for (int j = 0; j < 4; j++) begin
          @(negedge clk);
          for (int w = 0; w < NWR; w++) begin
            wr_en[w]   = 1;
            wr_addr[w] = state_t'(2 * j + w);
            wr_data[w] = PM_W'($urandom_range(0, 255));
            model_nxt[2 * j + w] = int'(wr_data[w]);
          end
          swap = (j == 3);
          @(posedge clk); #1;
          for (int w = 0; w < NWR; w++) wr_en[w] = 0;
          swap = 0;
          if (j < 3) check_all("before swap");
        end
        model_cur = model_nxt;
        check_all("after swap");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
