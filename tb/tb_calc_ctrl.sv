// tb_calc_ctrl: checks the butterfly schedule of the calculation controller.
// For several lengths, forward and reverse: every stage touches each of the N (bank, address)
// locations exactly once, the lanes of one issue never share a bank, each stage is followed by
// STALL_CYCLES stall cycles, and the total cycle count equals sum(N / r) over the stages, with
// radix-2 stages issuing two butterflies per cycle, plus 7 per stage (284 for 256 points and
// 1,905 for 972 points).
module tb_calc_ctrl;
  import fft_pkg::*;
  logic clk = 0, rst = 1, setup_enable = 0, setup_done, start = 0, fwd = 1;
  logic busy, done, stall, fwd_q;
  logic [IDX_W-1:0] fft_idx = 0;
  fft_cfg_t cfg;
  logic [NBANK-1:0] lane_valid;
  logic [NBANK-1:0][2:0] lane_bank;
  logic [NBANK-1:0][ADDR_W-1:0] lane_addr;
  op_e op;
  logic [W_W-1:0] tw_base;
  logic [1:0] tw_grp;
  int checks = 0, failures = 0, dual_seen = 0;
  always #1 clk = ~clk;

  fft_setup u_setup (.clk, .rst, .setup_enable, .fft_idx, .is_fft(1'b1), .cfg, .setup_done);
  calc_ctrl #(.STALL_CYCLES(7)) dut (.clk, .rst, .cfg, .start, .fwd, .busy, .done, .stall, .fwd_q,
    .lane_valid, .lane_bank, .lane_addr, .op, .tw_base, .tw_grp);

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run(int id, bit f, int expect_cycles);
    bit seen [5][512];
    int n, cyc, stages, touched, stall_run, expc;
    fft_idx = IDX_W'(id);
    setup_enable = 1;
    @(negedge clk);
    setup_enable = 0;
    wait (setup_done);
    @(negedge clk);
    n = int'(cfg.n);
    // expected cycles from the radices
    expc = 0; stages = 0;
    for (int s = 0; s < NSLOT; s++) if (cfg.radix[s] != 1) begin
      stages++;
      if (cfg.radix[s] == 2 && cfg.dual) expc += (cfg.rmax == 4) ? n / 4 : 3 * n / 10;
      else expc += n / int'(cfg.radix[s]);
    end
    expc += 7 * stages;
    fwd = f;
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0; touched = 0; stall_run = 0;
    for (int b = 0; b < 5; b++) for (int a = 0; a < 512; a++) seen[b][a] = 0;
    while (!done) begin
      if (busy) cyc++;
      if (stall) stall_run++;
      else if (stall_run != 0) begin
        chk(stall_run == 7, "stall length");
        chk(touched == n, $sformatf("N=%0d stage touched %0d", n, touched));
        stall_run = 0; touched = 0;
        for (int b = 0; b < 5; b++) for (int a = 0; a < 512; a++) seen[b][a] = 0;
      end
      if (op == OP_R2X2 && |lane_valid) dual_seen++;
      for (int l = 0; l < 5; l++) if (lane_valid[l]) begin
        for (int m = l + 1; m < 5; m++) if (lane_valid[m]) chk(lane_bank[l] != lane_bank[m], "bank conflict");
        chk(!seen[lane_bank[l]][lane_addr[l]], "location touched twice");
        seen[lane_bank[l]][lane_addr[l]] = 1;
        touched++;
      end
      @(negedge clk);
    end
    chk(touched == n, "last stage");
    chk(cyc == expc, $sformatf("N=%0d cycles %0d expected %0d", n, cyc, expc));
    if (expect_cycles != 0) chk(cyc == expect_cycles, $sformatf("N=%0d cycles %0d, paper %0d", n, cyc, expect_cycles));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(2, 1, 284);     // 256
    run(37, 1, 1905);   // 972
    run(37, 0, 1905);
    run(8, 1, 0);       // 24, 2x radix-2
    run(15, 0, 0);      // 120, 2x radix-2 on five banks
    run(40, 1, 0);      // 1200
    run(5, 0, 0);       // 2048
    chk(dual_seen > 0, "2x radix-2 issued");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
