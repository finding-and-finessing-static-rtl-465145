// tb_vnt_loop0_separate: the vnt_loop0 end-to-end test run with
// SHARE_OPS = 0, so the loop uses vnt_island (one operator per operation,
// weight offset 18, latency 27) instead of the shared-operator island.
// Same stimulus and checks as the default test; loop 0 must finish
// 9 * (20 - 1) + 27 cycles after its first start.
module tb_vnt_loop0_separate;
  import tb_f32_pkg::*;

  localparam int NLOOPS = 50, MAXN = 20, NTOT = NLOOPS * MAXN;

  logic        clk = 0, rst = 1, mem_ce = 1;
  logic        d_valid = 0, d_ready, d_last = 0, init_valid = 0, init_ready;
  logic        res_valid, res_ready = 0;
  logic [31:0] d_data = 0, init_data = 0, res_data;
  logic        island_ce, island_start, island_bubble, island_b_stall;

  vnt_loop0 #(.SHARE_OPS(1'b0)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  logic [31:0] dv [NTOT];
  logic        lastv [NTOT];
  logic [31:0] initv [NLOOPS], expv [NLOOPS];
  int          len [NLOOPS];
  int          ntok = 0, ntaken = 0;

  int n_bubble = 0, n_bstall = 0, n_backpr = 0, n_memstall = 0, n_starts = 0;
  int nd = 0, ni = 0, nr = 0;
  int first_start = -1, prev_start = -1, loop0_done = -1;

  initial begin
    logic [31:0] w;
    for (int l = 0; l < NLOOPS; l++) begin
      len[l]   = (l == 0) ? MAXN : 1 + int'($urandom % 10);
      initv[l] = rand_f32(120, 130);
      w = initv[l];
      for (int k = 0; k < len[l]; k++) begin
        dv[ntok]    = (l == 0) ? rand_f32(120, 126) : rand_f32(122, 128);
        lastv[ntok] = (k == len[l] - 1);
        if (f2r(dv[ntok]) < 1.0) begin
          w = vnt_ref(dv[ntok], w);
          ntaken++;
        end
        ntok++;
      end
      expv[l] = w;
    end

    repeat (3) @(negedge clk);
    rst = 0;

    while (nr < NLOOPS && cyc < 30000) begin
      @(negedge clk);
      if (nr == 0) begin
        d_valid = (nd < ntok); init_valid = (ni < NLOOPS); res_ready = 1; mem_ce = 1;
      end else begin
        d_valid    = (nd < ntok) && ($urandom % 5 != 0);
        init_valid = (ni < NLOOPS) && ($urandom % 3 != 0);
        res_ready  = ($urandom % 3 != 0);
        mem_ce     = ($urandom % 10 != 0);
      end
      d_data    = dv[nd % NTOT];
      d_last    = lastv[nd % NTOT];
      init_data = initv[ni % NLOOPS];
      #1;
      if (island_bubble)                     n_bubble++;
      if (island_b_stall && mem_ce)          n_bstall++;
      if (res_valid && !res_ready && mem_ce) n_backpr++;
      if (!mem_ce)                           n_memstall++;
      if (island_start) begin
        n_starts++;
        if (nr == 0 && n_starts <= MAXN) begin
          if (prev_start >= 0) check(cyc - prev_start == 9, "loop 0 island starts every 9 cycles");
          if (first_start < 0) first_start = cyc;
          prev_start = cyc;
        end
      end
      if (d_valid && d_ready) nd++;
      if (init_valid && init_ready) ni++;
      if (res_valid && res_ready) begin
        check(res_data === expv[nr], $sformatf("result of loop %0d (%0d values)", nr, len[nr]));
        if (nr == 0) loop0_done = cyc;
        nr++;
      end
    end

    check(nr == NLOOPS, "every loop returned a result");
    check(loop0_done - first_start == 9 * (MAXN - 1) + 27, "loop 0 cycle count");
    $display("loop 0: %0d island iterations in %0d cycles from first start to result",
             MAXN, loop0_done - first_start);
    $display("bubbles %0d, weight stalls %0d, backpressure %0d, mem_ce stalls %0d",
             n_bubble, n_bstall, n_backpr, n_memstall);
    $display("values %0d, island iterations %0d, skipped %0d", ntok, n_starts, ntok - n_starts);
    check(n_starts == ntaken, "one island iteration per d below 1.0");
    check(ntok - n_starts > 0, "iterations skipped the island");
    check(n_bubble > 0,   "bubble happened");
    check(n_bstall > 0,   "stall waiting for weight happened");
    check(n_backpr > 0,   "backpressure stall happened");
    check(n_memstall > 0, "memory-enable stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (35000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
