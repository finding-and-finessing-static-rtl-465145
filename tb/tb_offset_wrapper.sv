// tb_offset_wrapper: self-checking testbench for offset_wrapper.
//
// Each wrapper drives its own copy of the example island fig5_island.
// Three wrappers are exercised.
//  * u_open (II = 1), open loop. Phase 1 keeps every input valid and the
//    output ready: one iteration must start per cycle and each result
//    must leave exactly 18 cycles after its a. Phase 2 drives a_valid,
//    b_valid, x_ready and mem_ce at random; every result must match the
//    reference for its (a, b) pair, in order.
//  * u_loop5 (II = 5) with x fed back into b one iteration later, through
//    a one-entry holding register that passes a value on in the cycle it
//    arrives. This meets the deadlock rule II >= LATENCY - B_OFFSET = 5:
//    every result must be right and iterations must start exactly every
//    5 cycles.
//  * u_loop4 (II = 4), the same loop one cycle short of the rule: the
//    island must lock up with its clock enable held low.
//  * u_two (II = 2) has two late inputs, b[1] with offset 5 and b[0]
//    with offset 13, and random traffic on every port. The testbench
//    ages each started iteration by the enabled cycles it sees and checks
//    that b[1] is taken at age 5, b[0] at age 13 and the result offered
//    at age 18, in start order, and that the island never moves on while
//    a required late input is missing.
module tb_offset_wrapper;
  import tb_f32_pkg::*;

  localparam int LAT = 18, NLOOP = 20, NOPEN = 600;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // ------------------------------------------------------------ open loop
  logic        o_mem_ce = 1, o_a_valid = 0, o_b_valid = 0, o_x_ready = 0;
  logic [31:0] o_a_data = 0, o_b_data = 0, o_x_data;
  logic        o_a_ready, o_b_ready, o_x_valid, o_ce, o_start, o_bubble, o_b_stall;
  logic [31:0] o_island_x;

  offset_wrapper #(.II(1)) u_open (
    .clk, .rst, .mem_ce(o_mem_ce),
    .a_valid(o_a_valid), .a_ready(o_a_ready),
    .b_valid(o_b_valid), .b_ready(o_b_ready),
    .x_valid(o_x_valid), .x_ready(o_x_ready), .x_data(o_x_data),
    .ce(o_ce), .island_x(o_island_x),
    .start(o_start), .bubble(o_bubble), .b_stall(o_b_stall)
  );
  fig5_island u_open_island (.clk, .ce(o_ce), .a(o_a_data), .b(o_b_data), .x(o_island_x));

  logic [31:0] oa [NOPEN], ob [NOPEN];
  int a_sent [NOPEN];
  int na = 0, nb = 0, nx = 0;

  // ------------------------------------------------------------ loops
  logic [31:0] la [NLOOP];
  localparam logic [31:0] INIT = 32'h3F80_0000;   // 1.0

  logic        l5_a_valid, l5_a_ready, l5_b_valid, l5_b_ready, l5_x_valid, l5_ce, l5_start;
  logic        l5_bubble, l5_b_stall, l5_hold_v;
  logic [31:0] l5_b_data, l5_x_data, l5_hold_d;
  int          l5_na = 0, l5_nx = 0, l5_last_start = -1;

  logic        l4_a_valid, l4_a_ready, l4_b_valid, l4_b_ready, l4_x_valid, l4_ce, l4_start;
  logic        l4_bubble, l4_b_stall, l4_hold_v;
  logic [31:0] l4_b_data, l4_x_data, l4_hold_d;
  int          l4_na = 0, l4_nx = 0, l4_ce_low = 0;

  assign l5_a_valid = (l5_na < NLOOP);
  assign l5_b_valid = l5_hold_v || l5_x_valid;
  assign l5_b_data  = l5_hold_v ? l5_hold_d : l5_x_data;
  assign l4_a_valid = (l4_na < NLOOP);
  assign l4_b_valid = l4_hold_v || l4_x_valid;
  assign l4_b_data  = l4_hold_v ? l4_hold_d : l4_x_data;

  logic [31:0] l5_island_x;
  offset_wrapper #(.II(5)) u_loop5 (
    .clk, .rst, .mem_ce(1'b1),
    .a_valid(l5_a_valid), .a_ready(l5_a_ready),
    .b_valid(l5_b_valid), .b_ready(l5_b_ready),
    .x_valid(l5_x_valid), .x_ready(1'b1), .x_data(l5_x_data),
    .ce(l5_ce), .island_x(l5_island_x),
    .start(l5_start), .bubble(l5_bubble), .b_stall(l5_b_stall)
  );
  fig5_island u_loop5_island (.clk, .ce(l5_ce), .a(la[l5_na % NLOOP]), .b(l5_b_data), .x(l5_island_x));

  logic [31:0] l4_island_x;
  offset_wrapper #(.II(4)) u_loop4 (
    .clk, .rst, .mem_ce(1'b1),
    .a_valid(l4_a_valid), .a_ready(l4_a_ready),
    .b_valid(l4_b_valid), .b_ready(l4_b_ready),
    .x_valid(l4_x_valid), .x_ready(1'b1), .x_data(l4_x_data),
    .ce(l4_ce), .island_x(l4_island_x),
    .start(l4_start), .bubble(l4_bubble), .b_stall(l4_b_stall)
  );
  fig5_island u_loop4_island (.clk, .ce(l4_ce), .a(la[l4_na % NLOOP]), .b(l4_b_data), .x(l4_island_x));

  // Loop-back holding registers: keep x until b takes it.
  always @(posedge clk) begin
    if (rst) begin
      l5_hold_v <= 1; l5_hold_d <= INIT;
      l4_hold_v <= 1; l4_hold_d <= INIT;
    end else begin
      if (l5_x_valid && !(l5_b_ready && !l5_hold_v)) begin l5_hold_v <= 1; l5_hold_d <= l5_x_data; end
      else if (l5_b_ready && l5_hold_v) l5_hold_v <= 0;
      if (l4_x_valid && !(l4_b_ready && !l4_hold_v)) begin l4_hold_v <= 1; l4_hold_d <= l4_x_data; end
      else if (l4_b_ready && l4_hold_v) l4_hold_v <= 0;
    end
  end

  // ------------------------------------------------------------ two late inputs
  logic       t_mem_ce = 1, t_a_valid = 0, t_x_ready = 0;
  logic [1:0] t_b_valid = 0, t_b_ready;
  logic       t_a_ready, t_x_valid, t_ce, t_start, t_bubble, t_b_stall;
  logic [31:0] t_x_data;
  int         t_age [$];
  int         t_nb1 = 0, t_nb0 = 0, t_nx = 0, t_stall0 = 0, t_stall1 = 0;

  offset_wrapper #(.NB(2), .B_OFFSET({16'd5, 16'd13}), .II(2)) u_two (
    .clk, .rst, .mem_ce(t_mem_ce),
    .a_valid(t_a_valid), .a_ready(t_a_ready),
    .b_valid(t_b_valid), .b_ready(t_b_ready),
    .x_valid(t_x_valid), .x_ready(t_x_ready), .x_data(t_x_data),
    .ce(t_ce), .island_x(32'd0),
    .start(t_start), .bubble(t_bubble), .b_stall(t_b_stall)
  );

  // Expected loop results.
  logic [31:0] lx [NLOOP];

  // ------------------------------------------------------------ stimulus and checking
  initial begin
    for (int i = 0; i < NOPEN; i++) begin
      oa[i] = rand_f32(118, 130);
      ob[i] = rand_f32(118, 130);
    end
    for (int i = 0; i < NLOOP; i++) la[i] = rand_f32(122, 126);
    for (int i = 0; i < NLOOP; i++) lx[i] = island_ref(la[i], (i == 0) ? INIT : lx[i-1]);

    repeat (3) @(negedge clk);
    rst = 0;

    // Every cycle: drive at the negative edge, let the logic settle, then
    // record the transfers the next rising edge will make.
    while (cyc < 4000 && (nx < NOPEN || l5_nx < NLOOP)) begin
      @(negedge clk);
      if (cyc < 60) begin
        o_a_valid = (na < NOPEN); o_b_valid = (nb < na); o_x_ready = 1; o_mem_ce = 1;
      end else begin
        o_a_valid = (na < NOPEN) && ($urandom % 3 != 0);
        o_b_valid = (nb < na) && ($urandom % 4 != 0);
        o_x_ready = ($urandom % 4 != 0);
        o_mem_ce  = ($urandom % 8 != 0);
      end
      t_a_valid = ($urandom % 3 != 0);
      t_b_valid = {1'($urandom % 4 != 0), 1'($urandom % 4 != 0)};
      t_x_ready = ($urandom % 4 != 0);
      t_mem_ce  = ($urandom % 8 != 0);
      o_a_data = oa[na % NOPEN];
      o_b_data = ob[nb % NOPEN];
      #1;
      if (o_a_valid && o_a_ready) begin
        a_sent[na] = cyc;
        if (cyc < 60 && na > 0) check(a_sent[na] == a_sent[na-1] + 1, "II=1 start every cycle");
        na++;
      end
      if (o_b_valid && o_b_ready) nb++;
      if (o_x_valid && o_x_ready) begin
        check(o_x_data === island_ref(oa[nx], ob[nx]), $sformatf("open-loop result %0d", nx));
        if (cyc < 60) check(cyc - a_sent[nx] == LAT, "latency 18");
        nx++;
      end
      // loop with II = 5
      if (l5_a_valid && l5_a_ready) begin
        if (l5_last_start >= 0) check(cyc - l5_last_start == 5, "loop II=5 start interval");
        l5_last_start = cyc;
        l5_na++;
      end
      if (l5_x_valid) begin
        check(l5_x_data === lx[l5_nx], $sformatf("loop result %0d", l5_nx));
        l5_nx++;
      end
      check(!(l5_b_stall && !rst && l5_na > 0), "loop II=5 never waits for b");
      // loop with II = 4
      if (l4_a_valid && l4_a_ready) l4_na++;
      if (l4_x_valid) l4_nx++;
      l4_ce_low = l4_ce ? 0 : l4_ce_low + 1;
      // two late inputs
      if (!rst) begin
        if (t_start) t_age.push_back(0);
        if (t_nb1 < t_age.size() && t_age[t_nb1] == 5 && !t_b_valid[1]) begin
          t_stall1++;
          check(!t_ce, "island held while b[1] is missing");
        end
        if (t_nb0 < t_age.size() && t_age[t_nb0] == 13 && !t_b_valid[0]) begin
          t_stall0++;
          check(!t_ce, "island held while b[0] is missing");
        end
        check(t_x_valid == (t_nx < t_age.size() && t_age[t_nx] == 18), "result offered at age 18");
        if (t_b_valid[1] && t_b_ready[1]) begin
          check(t_nb1 < t_age.size() && t_age[t_nb1] == 5, "b[1] taken at age 5");
          t_nb1++;
        end
        if (t_b_valid[0] && t_b_ready[0]) begin
          check(t_nb0 < t_age.size() && t_age[t_nb0] == 13, "b[0] taken at age 13");
          t_nb0++;
        end
        if (t_x_valid && t_x_ready) t_nx++;
        if (t_ce) for (int i = t_nx; i < t_age.size(); i++) t_age[i]++;
      end
    end

    check(nx == NOPEN, "all open-loop results");
    check(l5_nx == NLOOP, "all loop results at II=5");
    check(t_nx > 50 && t_stall0 > 0 && t_stall1 > 0, "two late inputs: results and stalls on both");
    $display("two late inputs: %0d results, stalls on b[0] %0d, on b[1] %0d", t_nx, t_stall0, t_stall1);
    check(l4_nx < 2 && l4_ce_low > 100, "II=4 violates the rule and deadlocks");
    $display("loop II=4: %0d results, enable low for %0d cycles", l4_nx, l4_ce_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
