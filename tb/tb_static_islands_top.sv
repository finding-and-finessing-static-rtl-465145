// tb_static_islands_top: end-to-end testbench for static_islands_top at
// its default parameters.
//
// Drives the example loop and the first vecNormTrans loop at once and checks every loop result against a
// binary64 reference of the same rounded binary32 operations.
//  * First loop of each (40 values for the example loop, 20 values all
//    below 1.0 for the vecNormTrans loop) runs with every input valid,
//    every result accepted and mem_ce high. The island iterations must
//    start exactly every 5 and every 9 cycles, and each loop must end
//    II * (n - 1) + latency cycles after its first start.
//  * Later loops have random lengths and random gaps on every input,
//    result ready and the shared mem_ce.
// Each mechanism is counted from the ports and fails if it never
// happens: bubbles, stalls waiting for the later input, backpressure,
// memory-enable stalls, the loop-head mux taking initial and fed-back
// values, the exit branch returning results, and, in the vecNormTrans
// loop, iterations that go round the island and iterations that use it.
// The second vecNormTrans loop runs alongside with its arrays in memory
// models: NL1 loops, each with fresh arrays and w. Every r[] word is
// compared with the reference after each loop. Its first loop must
// finish (N - 5) * 2 + 18 cycles after w is taken, and there must be one
// write per iteration, memory-enable stalls while it runs, and a done
// that waits for its ready.
module tb_static_islands_top;
  import tb_f32_pkg::*;

  localparam int NL = 40;                        // loops per side
  localparam int F5N = 40, VN = 20;              // first-loop lengths
  localparam int F5T = NL * F5N, VT = NL * VN;

  logic clk = 0, rst = 1, mem_ce = 1;

  logic        f5_a_valid = 0, f5_a_ready, f5_a_last = 0, f5_init_valid = 0, f5_init_ready;
  logic        f5_res_valid, f5_res_ready = 0;
  logic [31:0] f5_a_data = 0, f5_init_data = 0, f5_res_data;
  logic        f5_island_ce, f5_island_start, f5_island_bubble, f5_island_b_stall;

  logic        vnt_d_valid = 0, vnt_d_ready, vnt_d_last = 0, vnt_init_valid = 0, vnt_init_ready;
  logic        vnt_res_valid, vnt_res_ready = 0;
  logic [31:0] vnt_d_data = 0, vnt_init_data = 0, vnt_res_data;
  logic        vnt_island_ce, vnt_island_start, vnt_island_bubble, vnt_island_b_stall;

  localparam int N = 16, NL1 = 12;
  logic        vnt1_w_valid = 0, vnt1_w_ready, vnt1_done_valid, vnt1_done_ready = 0;
  logic [31:0] vnt1_w_data = 0;
  logic        vnt1_a_en, vnt1_r_en, vnt1_r_we;
  logic [3:0]  vnt1_a_addr, vnt1_r_raddr, vnt1_r_waddr;
  logic [31:0] vnt1_a_rdata = 0, vnt1_r_rdata = 0, vnt1_r_wdata;

  static_islands_top dut (.*);

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

  // stimulus and expected results
  logic [31:0] fa [F5T], finit [NL], fexp [NL];
  logic        flast [F5T];
  logic [31:0] vd [VT], vinit [NL], vexp [NL];
  logic        vlast [VT];
  int          f_ntok = 0, v_ntok = 0, v_ntaken = 0;

  // mechanism counters
  int f_bubble = 0, f_bstall = 0, f_backpr = 0, f_init = 0, f_starts = 0, f_exit = 0;
  int v_bubble = 0, v_bstall = 0, v_backpr = 0, v_init = 0, v_starts = 0, v_exit = 0;
  int n_memstall = 0;
  int l1_done = 0, l1_writes = 0, l1_memstall = 0, l1_wait = 0, l1_t0 = -1;

  // second loop: memory models and its own driver
  logic [31:0] a_mem [N], r_mem [N];
  always @(posedge clk) begin
    if (vnt1_a_en) vnt1_a_rdata <= a_mem[vnt1_a_addr];
    if (vnt1_r_en) vnt1_r_rdata <= r_mem[vnt1_r_raddr];
    if (vnt1_r_we) r_mem[vnt1_r_waddr] <= vnt1_r_wdata;
  end

  initial begin
    logic [31:0] exp_r [N];
    logic [31:0] w, q;
    int t_w, t_done;
    repeat (4) @(negedge clk);
    for (int l = 0; l < NL1; l++) begin
      w = rand_f32(125, 129);
      for (int i = 0; i < N; i++) begin
        a_mem[i] = rand_f32(120, 128);
        r_mem[i] = rand_f32(120, 128);
        exp_r[i] = r_mem[i];
      end
      for (int i = 0; i < N - 4; i++) begin
        q = r2f(f2r(a_mem[i]) / f2r(w));
        exp_r[i+4] = r2f(f2r(exp_r[i]) + f2r(q));
      end
      @(negedge clk);
      vnt1_w_valid = 1; vnt1_w_data = w;
      #2;
      while (!vnt1_w_ready) begin @(negedge clk); #2; end
      t_w = cyc;
      @(negedge clk);
      vnt1_w_valid = 0;
      t_done = -1;
      forever begin
        vnt1_done_ready = (l == 0) ? 1'b1 : ($urandom % 3 != 0);
        #2;
        if (!mem_ce) l1_memstall++;
        if (vnt1_r_we) l1_writes++;
        if (vnt1_done_valid && t_done < 0) t_done = cyc;
        if (vnt1_done_valid && !vnt1_done_ready) l1_wait++;
        if (vnt1_done_valid && vnt1_done_ready) break;
        @(negedge clk);
      end
      if (l == 0) l1_t0 = t_done - t_w;
      @(negedge clk);
      vnt1_done_ready = 0;
      for (int i = 0; i < N; i++) check(r_mem[i] === exp_r[i], $sformatf("second loop %0d r[%0d]", l, i));
      l1_done++;
    end
  end

  int fa_n = 0, fi_n = 0, fr_n = 0, vd_n = 0, vi_n = 0, vr_n = 0;
  int f_first = -1, f_prev = -1, f_done0 = -1, v_first = -1, v_prev = -1, v_done0 = -1;

  initial begin
    logic [31:0] x;
    int n;
    for (int l = 0; l < NL; l++) begin
      n = (l == 0) ? F5N : 1 + int'($urandom % 12);
      finit[l] = rand_f32(124, 127);
      x = finit[l];
      for (int k = 0; k < n; k++) begin
        fa[f_ntok] = rand_f32(122, 125);
        flast[f_ntok] = (k == n - 1);
        x = island_ref(fa[f_ntok], x);
        f_ntok++;
      end
      fexp[l] = x;

      n = (l == 0) ? VN : 1 + int'($urandom % 10);
      vinit[l] = rand_f32(120, 130);
      x = vinit[l];
      for (int k = 0; k < n; k++) begin
        vd[v_ntok] = (l == 0) ? rand_f32(120, 126) : rand_f32(122, 128);
        vlast[v_ntok] = (k == n - 1);
        if (f2r(vd[v_ntok]) < 1.0) begin
          x = vnt_ref(vd[v_ntok], x);
          v_ntaken++;
        end
        v_ntok++;
      end
      vexp[l] = x;
    end

    repeat (3) @(negedge clk);
    rst = 0;

    while ((fr_n < NL || vr_n < NL || l1_done < NL1) && cyc < 30000) begin
      @(negedge clk);
      if (fr_n == 0 || vr_n == 0) begin
        mem_ce = 1;
        f5_a_valid = (fa_n < f_ntok); f5_init_valid = (fi_n < NL); f5_res_ready = 1;
        vnt_d_valid = (vd_n < v_ntok); vnt_init_valid = (vi_n < NL); vnt_res_ready = 1;
      end else begin
        mem_ce         = ($urandom % 10 != 0);
        f5_a_valid     = (fa_n < f_ntok) && ($urandom % 5 != 0);
        f5_init_valid  = (fi_n < NL) && ($urandom % 3 != 0);
        f5_res_ready   = ($urandom % 3 != 0);
        vnt_d_valid    = (vd_n < v_ntok) && ($urandom % 5 != 0);
        vnt_init_valid = (vi_n < NL) && ($urandom % 3 != 0);
        vnt_res_ready  = ($urandom % 3 != 0);
      end
      f5_a_data     = fa[fa_n % F5T];
      f5_a_last     = flast[fa_n % F5T];
      f5_init_data  = finit[fi_n % NL];
      vnt_d_data    = vd[vd_n % VT];
      vnt_d_last    = vlast[vd_n % VT];
      vnt_init_data = vinit[vi_n % NL];
      #1;
      if (!mem_ce) n_memstall++;

      // example loop
      if (f5_island_bubble)                             f_bubble++;
      if (f5_island_b_stall && mem_ce)                  f_bstall++;
      if (f5_res_valid && !f5_res_ready && mem_ce)      f_backpr++;
      if (f5_init_valid && f5_init_ready)               f_init++;
      if (f5_island_start) begin
        f_starts++;
        if (fr_n == 0) begin
          if (f_prev >= 0) check(cyc - f_prev == 5, "example loop starts every 5 cycles");
          if (f_first < 0) f_first = cyc;
          f_prev = cyc;
        end
      end
      if (f5_a_valid && f5_a_ready) fa_n++;
      if (f5_init_valid && f5_init_ready) fi_n++;
      if (f5_res_valid && f5_res_ready) begin
        check(f5_res_data === fexp[fr_n], $sformatf("example loop result %0d", fr_n));
        if (fr_n == 0) f_done0 = cyc;
        f_exit++;
        fr_n++;
      end

      // vecNormTrans loop
      if (vnt_island_bubble)                            v_bubble++;
      if (vnt_island_b_stall && mem_ce)                 v_bstall++;
      if (vnt_res_valid && !vnt_res_ready && mem_ce)    v_backpr++;
      if (vnt_init_valid && vnt_init_ready)             v_init++;
      if (vnt_island_start) begin
        v_starts++;
        if (vr_n == 0 && v_starts <= VN) begin
          if (v_prev >= 0) check(cyc - v_prev == 9, "vecNormTrans island starts every 9 cycles");
          if (v_first < 0) v_first = cyc;
          v_prev = cyc;
        end
      end
      if (vnt_d_valid && vnt_d_ready) vd_n++;
      if (vnt_init_valid && vnt_init_ready) vi_n++;
      if (vnt_res_valid && vnt_res_ready) begin
        check(vnt_res_data === vexp[vr_n], $sformatf("vecNormTrans loop result %0d", vr_n));
        if (vr_n == 0) v_done0 = cyc;
        v_exit++;
        vr_n++;
      end
    end

    check(fr_n == NL && vr_n == NL && l1_done == NL1, "every loop returned a result");
    check(l1_t0 == (N - 5) * 2 + 18, "second loop 0 cycle count");
    $display("second loop 0: %0d iterations in %0d cycles; writes %0d, mem_ce stalls %0d, done waits %0d",
             N - 4, l1_t0, l1_writes, l1_memstall, l1_wait);
    check(l1_writes == NL1 * (N - 4), "second loop: one write per iteration");
    check(l1_memstall > 0, "second loop: memory-enable stall happened");
    check(l1_wait > 0,     "second loop: done backpressure happened");
    check(f_done0 - f_first == 5 * (F5N - 1) + 18, "example loop 0 cycle count");
    check(v_done0 - v_first == 9 * (VN - 1) + 30, "vecNormTrans loop 0 cycle count");
    $display("example loop 0: %0d iterations in %0d cycles; vecNormTrans loop 0: %0d in %0d cycles",
             F5N, f_done0 - f_first, VN, v_done0 - v_first);
    $display("example: bubbles %0d, b stalls %0d, backpressure %0d, inits %0d, starts %0d, exits %0d",
             f_bubble, f_bstall, f_backpr, f_init, f_starts, f_exit);
    $display("vecNormTrans: bubbles %0d, weight stalls %0d, backpressure %0d, inits %0d, starts %0d, skipped %0d, exits %0d",
             v_bubble, v_bstall, v_backpr, v_init, v_starts, v_ntok - v_starts, v_exit);
    $display("mem_ce stalls %0d", n_memstall);
    check(n_memstall > 0, "memory-enable stall happened");
    check(f_bubble > 0,   "example loop: bubble happened");
    check(f_bstall > 0,   "example loop: stall waiting for b happened");
    check(f_backpr > 0,   "example loop: backpressure happened");
    check(f_init == NL,   "example loop: mux took every initial value");
    check(f_starts == f_ntok, "example loop: one island iteration per value");
    check(f_starts - f_init > 0, "example loop: values fed back");
    check(f_exit == NL,   "example loop: branch sent every result out");
    check(v_bubble > 0,   "vecNormTrans: bubble happened");
    check(v_bstall > 0,   "vecNormTrans: stall waiting for weight happened");
    check(v_backpr > 0,   "vecNormTrans: backpressure happened");
    check(v_init == NL,   "vecNormTrans: mux took every initial value");
    check(v_starts == v_ntaken, "vecNormTrans: one island iteration per d below 1.0");
    check(v_ntok - v_starts > 0, "vecNormTrans: iterations went round the island");
    check(v_starts - v_init > 0, "vecNormTrans: weights fed back");
    check(v_exit == NL,   "vecNormTrans: branch sent every result out");
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
