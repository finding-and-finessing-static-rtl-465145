// tb_fig5_loop: end-to-end testbench for fig5_loop at its
// default parameters.
//
// Runs a series of loops of x_k = ((0.9 + a_k) * 0.7 + 0.3) * x_{k-1},
// x_{-1} = init, and checks every loop result against a binary64
// reference of the same rounded operations.
//  * Loop 0 (40 iterations) runs with every input valid, the result
//    accepted and the memory enable high: iterations must start exactly
//    every 5 cycles (the wrapper's II), and the loop must finish in
//    5 * (40 - 1) + 18 cycles from its first start to its result.
//  * The remaining loops have random lengths (1 to 12) and random gaps on
//    a, init, res_ready and mem_ce, so that every mechanism occurs: start
//    slots that pass without a (bubbles), stalls waiting for b,
//    backpressure from the result port, memory-enable stalls, the mux
//    taking initial values and fed-back values, and the branch sending
//    values out of the loop. Each is counted from the ports and must
//    happen at least once; every result being right shows that the
//    fed-back values went the right way.
module tb_fig5_loop;
  import tb_f32_pkg::*;

  localparam int NLOOPS = 60, MAXN = 40, NTOT = NLOOPS * MAXN;

  logic        clk = 0, rst = 1, mem_ce = 1;
  logic        a_valid = 0, a_ready, a_last = 0, init_valid = 0, init_ready;
  logic        res_valid, res_ready = 0;
  logic [31:0] a_data = 0, init_data = 0, res_data;
  logic        island_ce, island_start, island_bubble, island_b_stall;

  fig5_loop dut (.*);

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

  // Stimulus: a flat stream of (a, last) and one init value per loop.
  logic [31:0] av [NTOT];
  logic        lastv [NTOT];
  logic [31:0] initv [NLOOPS], expv [NLOOPS];
  int          len [NLOOPS];
  int          ntok = 0;

  // Mechanism counters.
  int n_bubble = 0, n_bstall = 0, n_backpr = 0, n_memstall = 0;
  int n_mux_init = 0, n_starts = 0, n_br_exit = 0;

  int na = 0, ni = 0, nr = 0;
  int first_start = -1, prev_start = -1, loop0_done = -1;

  initial begin
    logic [31:0] x;
    for (int l = 0; l < NLOOPS; l++) begin
      len[l]   = (l == 0) ? MAXN : 1 + int'($urandom % 12);
      initv[l] = rand_f32(124, 127);
      x = initv[l];
      for (int k = 0; k < len[l]; k++) begin
        av[ntok]    = rand_f32(122, 125);
        lastv[ntok] = (k == len[l] - 1);
        x = island_ref(av[ntok], x);
        ntok++;
      end
      expv[l] = x;
    end

    repeat (3) @(negedge clk);
    rst = 0;

    while (nr < NLOOPS && cyc < 20000) begin
      @(negedge clk);
      if (nr == 0) begin
        a_valid = (na < ntok); init_valid = (ni < NLOOPS); res_ready = 1; mem_ce = 1;
      end else begin
        a_valid    = (na < ntok) && ($urandom % 5 != 0);
        init_valid = (ni < NLOOPS) && ($urandom % 3 != 0);
        res_ready  = ($urandom % 3 != 0);
        mem_ce     = ($urandom % 10 != 0);
      end
      a_data    = av[na % NTOT];
      a_last    = lastv[na % NTOT];
      init_data = initv[ni % NLOOPS];
      #1;
      // count mechanisms
      if (island_bubble)                          n_bubble++;
      if (island_b_stall && mem_ce)               n_bstall++;
      if (res_valid && !res_ready && mem_ce)      n_backpr++;
      if (!mem_ce)                                n_memstall++;
      if (init_valid && init_ready)               n_mux_init++;
      if (island_start)                           n_starts++;
      if (res_valid && res_ready)                 n_br_exit++;
      // loop 0 timing
      if (island_start && nr == 0) begin
        if (prev_start >= 0) check(cyc - prev_start == 5, "loop 0 starts every 5 cycles");
        if (first_start < 0) first_start = cyc;
        prev_start = cyc;
      end
      // transfers at the next rising edge
      if (a_valid && a_ready) na++;
      if (init_valid && init_ready) ni++;
      if (res_valid && res_ready) begin
        check(res_data === expv[nr], $sformatf("result of loop %0d (%0d iterations)", nr, len[nr]));
        if (nr == 0) loop0_done = cyc;
        nr++;
      end
    end

    check(nr == NLOOPS, "every loop returned a result");
    check(loop0_done - first_start == 5 * (MAXN - 1) + 18, "loop 0 cycle count");
    $display("loop 0: %0d iterations in %0d cycles from first start to result",
             MAXN, loop0_done - first_start);
    $display("bubbles %0d, b stalls %0d, backpressure %0d, mem_ce stalls %0d",
             n_bubble, n_bstall, n_backpr, n_memstall);
    $display("iterations %0d, initial values taken %0d, results out %0d",
             n_starts, n_mux_init, n_br_exit);
    check(n_bubble > 0,   "bubble happened");
    check(n_bstall > 0,   "stall waiting for b happened");
    check(n_backpr > 0,   "backpressure stall happened");
    check(n_memstall > 0, "memory-enable stall happened");
    check(n_mux_init == NLOOPS, "mux took every initial value");
    check(n_starts == ntok, "one island iteration per a token");
    check(n_starts - n_mux_init > 0, "values fed back round the loop");
    check(n_br_exit == NLOOPS, "branch sent every final value out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (25000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
