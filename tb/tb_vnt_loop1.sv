// tb_vnt_loop1: self-checking testbench for vnt_loop1 at its default
// parameters (N = 16, II = 2).
//
// Holds a[] and r[] in memory models with the island's port timing (read
// data one enabled edge after the address, held while the enable is
// low; writes at the edge). Runs 30 loops, each with fresh random arrays
// and weight, and after each done compares every r[] word with a
// binary64 reference of the same rounded operations, including the
// words the loop must not touch (r[0..3]). Loop 0 runs with mem_ce
// high and done accepted at once: done must appear exactly
// (N - 5) * II + DIV_LAT + ADD_LAT + 4 cycles after w is taken. Later
// loops toggle mem_ce and done_ready at random; memory-enable stalls and
// done backpressure are counted and must occur.
module tb_vnt_loop1;
  import tb_f32_pkg::*;

  localparam int N = 16, II = 2, DIV_LAT = 10, ADD_LAT = 4, NLOOPS = 30;

  logic        clk = 0, rst = 1, mem_ce = 1;
  logic        w_valid = 0, w_ready, done_valid, done_ready = 0;
  logic [31:0] w_data = 0;
  logic        a_en, r_en, r_we;
  logic [3:0]  a_addr, r_raddr, r_waddr;
  logic [31:0] a_rdata = 0, r_rdata = 0, r_wdata;

  vnt_loop1 dut (.*);

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

  // memory models
  logic [31:0] a_mem [N], r_mem [N];
  always @(posedge clk) begin
    if (a_en) a_rdata <= a_mem[a_addr];
    if (r_en) r_rdata <= r_mem[r_raddr];
    if (r_we) r_mem[r_waddr] <= r_wdata;
  end

  int n_memstall = 0, n_donewait = 0, n_writes = 0;

  initial begin
    logic [31:0] exp_r [N];
    logic [31:0] w, q;
    int t_w, t_done;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int l = 0; l < NLOOPS; l++) begin
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
      // hand over w
      @(negedge clk);
      w_valid = 1; w_data = w;
      while (!w_ready) @(negedge clk);
      t_w = cyc;
      @(negedge clk);
      w_valid = 0;
      // run until done is taken
      t_done = -1;
      forever begin
        mem_ce     = (l == 0) ? 1'b1 : ($urandom % 4 != 0);
        done_ready = (l == 0) ? 1'b1 : ($urandom % 3 != 0);
        #1;
        if (!mem_ce) n_memstall++;
        if (r_we) n_writes++;
        if (done_valid && t_done < 0) t_done = cyc;
        if (done_valid && !done_ready) n_donewait++;
        if (done_valid && done_ready) break;
        @(negedge clk);
      end
      if (l == 0) check(t_done - t_w == (N - 5) * II + DIV_LAT + ADD_LAT + 4, "loop 0 cycle count");
      if (l == 0) $display("loop 0: done %0d cycles after w", t_done - t_w);
      @(negedge clk);
      mem_ce = 1; done_ready = 0;
      for (int i = 0; i < N; i++) check(r_mem[i] === exp_r[i], $sformatf("loop %0d r[%0d]", l, i));
    end
    $display("writes %0d, mem_ce stalls %0d, done waits %0d", n_writes, n_memstall, n_donewait);
    check(n_writes == NLOOPS * (N - 4), "one write per iteration");
    check(n_memstall > 0, "memory-enable stall happened");
    check(n_donewait > 0, "done backpressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
