// vnt_loop0: the first loop of the vecNormTrans kernel, dynamically
// scheduled around one static island.
//
//   weight = init;
//   for each d of the stream:  if (d < 1.0) weight = ((d*d + 19.5)*d + 3.7)*d + 0.73*weight;
//   return weight;
//
// The data-dependent if stays dynamically scheduled: iterations with
// d >= 1.0 pass weight round the loop without entering the island, so
// they cost no island time. The polynomial is a static island in an
// offset_wrapper. With SHARE_OPS = 1 (default) it is vnt_island_shared,
// one multiplier and one adder shared under a modulo schedule: d is
// needed at once, weight 21 cycles later, and each iteration takes 30.
// With SHARE_OPS = 0 it is vnt_island, one operator per operation:
// weight at 18, result at 27. Either way the island's next iteration can
// start 9 cycles after the previous one.
//
// Dataflow (every edge a valid/ready channel):
//   d stream -> fork -> branch(d < 1): taken -> wrapper input d, else sink
//                    -> condition FIFO for the weight branch (d < 1)
//                    -> select FIFO for the loop-head mux (0 on a loop's first d)
//                    -> exit FIFO (1 unless d is the loop's last)
//   mux(select; init, back-edge) -> weight
//   weight -> branch(d < 1): taken -> wrapper input weight
//                            else  -> opaque buffer (the if's empty arm)
//   merge(wrapper result, empty arm) -> branch(exit): back-edge buffer, or res
// A new initial weight is admitted only after the previous loop's result
// has left, so only one weight token is ever in the loop and the merge
// cannot see two tokens at once; d values of the next loop may still
// enter the island early. The opaque buffer puts a register on the valid path of
// the cycle through the empty arm; the back-edge buffer is transparent.
// The d branch's not-taken output goes to a sink that is always ready, so
// its valid and data, and the branch's condition ready (which equals its
// data ready here, as both come from the same fork output), are left
// unused on purpose.
//
// II is the wrapper's start interval. Because the island's result can
// feed its own weight input in the next taken iteration, II must be at
// least LATENCY - W_OFFSET = 9 or the island deadlocks; the default is 9
// and smaller values are rejected at elaboration. The shared island's
// slot counter runs with the wrapper's start slots, so with SHARE_OPS = 1
// II must be exactly ADD_LAT + MUL_LAT, which is also checked.
//
// The loop, the if, the island expression and the use of merge, mux and
// branch follow the kernel and its dataflow graph; the stream interface
// (the d values arrive as a stream rather than from a memory), the FIFO
// depths and the buffer placement are this design's choices.
module vnt_loop0
  import si_pkg::*;
#(
  parameter int unsigned ADD_LAT   = 4,
  parameter int unsigned MUL_LAT   = 5,
  parameter int unsigned II        = ADD_LAT + MUL_LAT,
  parameter int unsigned TOK_DEPTH = 8,
  parameter int unsigned FB_DEPTH  = 2,
  parameter bit          SHARE_OPS = 1'b1
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     mem_ce,
  input  logic     d_valid,
  output logic     d_ready,
  input  float32_t d_data,
  input  logic     d_last,
  input  logic     init_valid,
  output logic     init_ready,
  input  float32_t init_data,
  output logic     res_valid,
  input  logic     res_ready,
  output float32_t res_data,
  output logic     island_ce,
  output logic     island_start,
  output logic     island_bubble,
  output logic     island_b_stall
);

  // Offsets of the island in use (see vnt_island and vnt_island_shared).
  localparam int unsigned W_OFFSET = 2 * (ADD_LAT + MUL_LAT) + (SHARE_OPS ? 3 : 0);
  localparam int unsigned LATENCY  = 3 * (ADD_LAT + MUL_LAT) + (SHARE_OPS ? 3 : 0);

  if (II < LATENCY - W_OFFSET) begin : g_ii_check
    $error("vnt_loop0: II below LATENCY - W_OFFSET deadlocks the loop");
  end
  if (SHARE_OPS && II != ADD_LAT + MUL_LAT) begin : g_share_check
    $error("vnt_loop0: the shared island needs II = ADD_LAT + MUL_LAT");
  end

  localparam float32_t F32_ONE = 32'h3F80_0000;   // bound of the guard d < 1.0

  logic d_lt1;
  assign d_lt1 = f32_lt(d_data, F32_ONE);

  // ---- fork the d stream four ways
  logic       in_loop;
  logic [3:0] f_valid, f_ready;

  elastic_fork #(.N(4)) u_fork (
    .clk, .rst, .in_valid(d_valid), .in_ready(d_ready),
    .out_valid(f_valid), .out_ready(f_ready)
  );

  always_ff @(posedge clk) begin
    if (rst)                     in_loop <= 1'b0;
    else if (d_valid && d_ready) in_loop <= !d_last;
  end

  // ---- d: into the island only when d < 1
  logic     dbr_in_ready, dbr_cond_ready, di_valid, di_ready, dsink_valid;
  float32_t di_data, dsink_data;

  elastic_branch #(.W(32)) u_dbranch (
    .in_valid(f_valid[0]), .in_ready(dbr_in_ready), .in_data(d_data),
    .cond_valid(f_valid[0]), .cond_ready(dbr_cond_ready), .cond_data(d_lt1),
    .out_t_valid(di_valid), .out_t_ready(di_ready), .out_t_data(di_data),
    .out_f_valid(dsink_valid), .out_f_ready(1'b1), .out_f_data(dsink_data)
  );
  assign f_ready[0] = dbr_in_ready;

  // ---- token FIFOs
  logic wc_valid, wc_ready, wc_data;
  logic sel_valid, sel_ready, sel_data;
  logic ex_valid, ex_ready, ex_data;

  elastic_buffer #(.W(1), .DEPTH(TOK_DEPTH)) u_wcond_fifo (
    .clk, .rst, .in_valid(f_valid[1]), .in_ready(f_ready[1]), .in_data(d_lt1),
    .out_valid(wc_valid), .out_ready(wc_ready), .out_data(wc_data)
  );
  elastic_buffer #(.W(1), .DEPTH(TOK_DEPTH)) u_sel_fifo (
    .clk, .rst, .in_valid(f_valid[2]), .in_ready(f_ready[2]), .in_data(in_loop),
    .out_valid(sel_valid), .out_ready(sel_ready), .out_data(sel_data)
  );
  elastic_buffer #(.W(1), .DEPTH(TOK_DEPTH)) u_exit_fifo (
    .clk, .rst, .in_valid(f_valid[3]), .in_ready(f_ready[3]), .in_data(!d_last),
    .out_valid(ex_valid), .out_ready(ex_ready), .out_data(ex_data)
  );

  // ---- loop head: initial weight or the one from the back-edge
  logic     fb_in_valid, fb_in_ready, fb_out_valid, fb_out_ready;
  float32_t fb_in_data, fb_out_data;
  logic     wt_valid, wt_ready;
  float32_t wt_data;

  // One loop at a time: a new initial weight enters only after the
  // previous loop's result has left, so one weight token is in the loop.
  logic busy, mux_init_valid, mux_init_ready;

  assign mux_init_valid = init_valid && !busy;
  assign init_ready     = mux_init_ready && !busy;

  always_ff @(posedge clk) begin
    if (rst)                         busy <= 1'b0;
    else if (init_valid && init_ready) busy <= 1'b1;
    else if (res_valid && res_ready)   busy <= 1'b0;
  end

  elastic_mux #(.W(32)) u_mux (
    .sel_valid, .sel_ready, .sel_data,
    .in0_valid(mux_init_valid), .in0_ready(mux_init_ready), .in0_data(init_data),
    .in1_valid(fb_out_valid), .in1_ready(fb_out_ready), .in1_data(fb_out_data),
    .out_valid(wt_valid), .out_ready(wt_ready), .out_data(wt_data)
  );

  // ---- weight: into the island, or round the empty arm of the if
  logic     wi_valid, wi_ready, skip_valid, skip_ready;
  float32_t wi_data, skip_data;

  elastic_branch #(.W(32)) u_wbranch (
    .in_valid(wt_valid), .in_ready(wt_ready), .in_data(wt_data),
    .cond_valid(wc_valid), .cond_ready(wc_ready), .cond_data(wc_data),
    .out_t_valid(wi_valid),   .out_t_ready(wi_ready),   .out_t_data(wi_data),
    .out_f_valid(skip_valid), .out_f_ready(skip_ready), .out_f_data(skip_data)
  );

  logic     sk_valid, sk_ready;
  float32_t sk_data;

  elastic_buffer #(.W(32), .DEPTH(FB_DEPTH), .TRANSPARENT(1'b0)) u_skip_buf (
    .clk, .rst, .in_valid(skip_valid), .in_ready(skip_ready), .in_data(skip_data),
    .out_valid(sk_valid), .out_ready(sk_ready), .out_data(sk_data)
  );

  // ---- the static island in its wrapper
  logic     x_valid, x_ready;
  float32_t x_data, island_y;

  offset_wrapper #(.LATENCY(LATENCY), .B_OFFSET(16'(W_OFFSET)), .II(II)) u_wrap (
    .clk, .rst, .mem_ce,
    .a_valid(di_valid), .a_ready(di_ready),
    .b_valid(wi_valid), .b_ready(wi_ready),
    .x_valid, .x_ready, .x_data,
    .ce(island_ce), .island_x(island_y),
    .start(island_start), .bubble(island_bubble), .b_stall(island_b_stall)
  );

  if (SHARE_OPS) begin : g_shared
    vnt_island_shared #(.ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_island (
      .clk, .rst, .ce(island_ce), .d(di_data), .w(wi_data), .y(island_y)
    );
  end else begin : g_separate
    vnt_island #(.ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_island (
      .clk, .ce(island_ce), .d(di_data), .w(wi_data), .y(island_y)
    );
  end

  // ---- join the two arms of the if
  logic     m_valid, m_ready;
  float32_t m_data;
  logic [1:0] mg_ready;

  elastic_merge #(.W(32), .N(2)) u_merge (
    .in_valid({sk_valid, x_valid}), .in_ready(mg_ready), .in_data({sk_data, x_data}),
    .out_valid(m_valid), .out_ready(m_ready), .out_data(m_data)
  );
  assign x_ready  = mg_ready[0];
  assign sk_ready = mg_ready[1];

  // ---- loop exit or back-edge
  elastic_branch #(.W(32)) u_exit (
    .in_valid(m_valid), .in_ready(m_ready), .in_data(m_data),
    .cond_valid(ex_valid), .cond_ready(ex_ready), .cond_data(ex_data),
    .out_t_valid(fb_in_valid), .out_t_ready(fb_in_ready), .out_t_data(fb_in_data),
    .out_f_valid(res_valid),   .out_f_ready(res_ready),   .out_f_data(res_data)
  );

  elastic_buffer #(.W(32), .DEPTH(FB_DEPTH)) u_fb_buf (
    .clk, .rst, .in_valid(fb_in_valid), .in_ready(fb_in_ready), .in_data(fb_in_data),
    .out_valid(fb_out_valid), .out_ready(fb_out_ready), .out_data(fb_out_data)
  );

  // The empty arm and the island never hold a weight at the same time.
  a_one_weight: assert property (@(posedge clk) disable iff (rst) !(x_valid && sk_valid))
    else $error("vnt_loop0: two weight tokens reached the merge");

endmodule
