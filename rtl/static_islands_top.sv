// static_islands_top: two dynamically scheduled loops, each built round a
// static island in an offset wrapper, side by side.
//
//  * f5_*  : fig5_loop. The example island x = ((0.9 + a) * 0.7 + 0.3) * b
//            in a loop that feeds x back into b. a has offset 0, b offset
//            13, latency 18; iterations start every 5 cycles.
//  * vnt_* : vnt_loop0. The first loop of the vecNormTrans kernel:
//            if (d < 1.0) weight = ((d*d + 19.5)*d + 3.7)*d + 0.73*weight.
//            d has offset 0, weight offset 18, latency 27; island
//            iterations start every 9 cycles and iterations with d >= 1.0
//            go round the island.
//  * vnt1_*: vnt_loop1. The second loop of the kernel,
//            r[i+4] = r[i] + a[i] / w, one static island with read ports
//            on a[] and r[] and a write port on r[]; it starts an
//            iteration every 2 cycles. The arrays live outside the top,
//            behind these ports (one-cycle read, write at the edge).
//
// Every stream port is a valid/ready channel of binary32 values with a
// `last` flag that closes a loop; each loop takes one initial value and
// returns one result. The three loops share the clock, reset and mem_ce,
// the enable from a memory arbiter: when it is low both islands hold
// still. The island_* outputs of each loop show its clock enable, its
// start of an iteration, a start slot lost for want of the zero-offset
// input (bubble), and a stall waiting for the later input.
//
// Parameters are the adder, multiplier and divider latencies (4, 5 and
// 10), the length N of the second loop's arrays and the start intervals; the defaults are the smallest intervals that cannot
// deadlock. Putting the loops in one top with a shared mem_ce is this
// design's choice; the islands, the wrapper and the intervals follow the
// worked example and the vecNormTrans kernel.
module static_islands_top
  import si_pkg::*;
#(
  parameter int unsigned ADD_LAT = 4,
  parameter int unsigned MUL_LAT = 5,
  parameter int unsigned F5_II   = MUL_LAT,
  parameter int unsigned VNT_II  = ADD_LAT + MUL_LAT,
  parameter int unsigned DIV_LAT = 10,
  parameter int unsigned N       = 16,
  parameter int unsigned VNT1_II = 2,
  localparam int unsigned AW     = $clog2(N)
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     mem_ce,
  // Fig. 5 example loop
  input  logic     f5_a_valid,
  output logic     f5_a_ready,
  input  float32_t f5_a_data,
  input  logic     f5_a_last,
  input  logic     f5_init_valid,
  output logic     f5_init_ready,
  input  float32_t f5_init_data,
  output logic     f5_res_valid,
  input  logic     f5_res_ready,
  output float32_t f5_res_data,
  output logic     f5_island_ce,
  output logic     f5_island_start,
  output logic     f5_island_bubble,
  output logic     f5_island_b_stall,
  // vecNormTrans loop_0
  input  logic     vnt_d_valid,
  output logic     vnt_d_ready,
  input  float32_t vnt_d_data,
  input  logic     vnt_d_last,
  input  logic     vnt_init_valid,
  output logic     vnt_init_ready,
  input  float32_t vnt_init_data,
  output logic     vnt_res_valid,
  input  logic     vnt_res_ready,
  output float32_t vnt_res_data,
  output logic     vnt_island_ce,
  output logic     vnt_island_start,
  output logic     vnt_island_bubble,
  output logic     vnt_island_b_stall,
  // vecNormTrans loop_1 and its memory ports
  input  logic     vnt1_w_valid,
  output logic     vnt1_w_ready,
  input  float32_t vnt1_w_data,
  output logic     vnt1_done_valid,
  input  logic     vnt1_done_ready,
  output logic     vnt1_a_en,
  output logic [AW-1:0] vnt1_a_addr,
  input  float32_t vnt1_a_rdata,
  output logic     vnt1_r_en,
  output logic [AW-1:0] vnt1_r_raddr,
  input  float32_t vnt1_r_rdata,
  output logic     vnt1_r_we,
  output logic [AW-1:0] vnt1_r_waddr,
  output float32_t vnt1_r_wdata
);

  fig5_loop #(.ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT), .II(F5_II)) u_fig5 (
    .clk, .rst, .mem_ce,
    .a_valid(f5_a_valid), .a_ready(f5_a_ready), .a_data(f5_a_data), .a_last(f5_a_last),
    .init_valid(f5_init_valid), .init_ready(f5_init_ready), .init_data(f5_init_data),
    .res_valid(f5_res_valid), .res_ready(f5_res_ready), .res_data(f5_res_data),
    .island_ce(f5_island_ce), .island_start(f5_island_start),
    .island_bubble(f5_island_bubble), .island_b_stall(f5_island_b_stall)
  );

  vnt_loop0 #(.ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT), .II(VNT_II)) u_vnt (
    .clk, .rst, .mem_ce,
    .d_valid(vnt_d_valid), .d_ready(vnt_d_ready), .d_data(vnt_d_data), .d_last(vnt_d_last),
    .init_valid(vnt_init_valid), .init_ready(vnt_init_ready), .init_data(vnt_init_data),
    .res_valid(vnt_res_valid), .res_ready(vnt_res_ready), .res_data(vnt_res_data),
    .island_ce(vnt_island_ce), .island_start(vnt_island_start),
    .island_bubble(vnt_island_bubble), .island_b_stall(vnt_island_b_stall)
  );

  vnt_loop1 #(.N(N), .ADD_LAT(ADD_LAT), .DIV_LAT(DIV_LAT), .II(VNT1_II)) u_vnt1 (
    .clk, .rst, .mem_ce,
    .w_valid(vnt1_w_valid), .w_ready(vnt1_w_ready), .w_data(vnt1_w_data),
    .done_valid(vnt1_done_valid), .done_ready(vnt1_done_ready),
    .a_en(vnt1_a_en), .a_addr(vnt1_a_addr), .a_rdata(vnt1_a_rdata),
    .r_en(vnt1_r_en), .r_raddr(vnt1_r_raddr), .r_rdata(vnt1_r_rdata),
    .r_we(vnt1_r_we), .r_waddr(vnt1_r_waddr), .r_wdata(vnt1_r_wdata)
  );

endmodule
