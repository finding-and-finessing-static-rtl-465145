// fig5_loop: the example static island inside a dynamically
// scheduled loop with a carried dependence.
//
// The loop computes, for a stream of values a_0 .. a_{n-1},
//   b_0 = init,   x_k = ((0.9 + a_k) * 0.7 + 0.3) * b_k,   b_{k+1} = x_k
// and returns x_{n-1}. The island needs a at the start of an iteration
// but b only 13 cycles later, so a new iteration can start before the
// previous one has finished. The offset wrapper exploits that: with the
// island's latency of 18, the loop runs at one iteration every
// LATENCY - B_OFFSET = 5 cycles instead of every 18.
//
// Dataflow around the wrapper:
//   a stream -> fork -> wrapper input a
//                    -> select FIFO  (0 for the first iteration of a loop)
//                    -> condition FIFO (1 unless the token is the last)
//   mux(select; in0 = init, in1 = feedback buffer) -> wrapper input b
//   wrapper output x -> branch(condition): 1 -> feedback buffer, 0 -> res
// The feedback buffer is the loop's back-edge buffer; it is transparent,
// so a result reaches b in the cycle it leaves the island.
//
// II is the wrapper's start interval. With x feeding b one iteration
// later, the island deadlocks unless II >= LATENCY - B_OFFSET; the
// default is that bound, the smallest interval that is safe, and a
// smaller value is rejected at elaboration.
//
// Ports are plain valid/ready channels. a_last marks the last element of
// a loop's stream; each loop needs one init token. Loops may follow each
// other back to back. mem_ce stands for the memory arbiter's enable.
// Status outputs expose the wrapper's clock enable and stall causes.
// The loop, its recurrence and the FIFO depths are this design's own
// arrangement around the island, wrapper and rule taken from the example.
module fig5_loop
  import si_pkg::*;
#(
  parameter int unsigned ADD_LAT   = 4,
  parameter int unsigned MUL_LAT   = 5,
  parameter int unsigned II        = 2 * ADD_LAT + 2 * MUL_LAT - (2 * ADD_LAT + MUL_LAT),
  parameter int unsigned TOK_DEPTH = 8,
  parameter int unsigned FB_DEPTH  = 2
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     mem_ce,
  input  logic     a_valid,
  output logic     a_ready,
  input  float32_t a_data,
  input  logic     a_last,
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

  localparam int unsigned B_OFFSET = 2 * ADD_LAT + MUL_LAT;
  localparam int unsigned LATENCY  = B_OFFSET + MUL_LAT;

  if (II < LATENCY - B_OFFSET) begin : g_ii_check
    $error("fig5_loop: II below LATENCY - B_OFFSET deadlocks the loop");
  end

  // ---- a stream: fork to the island, the select FIFO and the condition FIFO
  logic       in_loop;        // a token of the current loop has been taken
  logic [2:0] f_valid, f_ready;

  elastic_fork #(.N(3)) u_fork (
    .clk, .rst, .in_valid(a_valid), .in_ready(a_ready),
    .out_valid(f_valid), .out_ready(f_ready)
  );

  always_ff @(posedge clk) begin
    if (rst)                    in_loop <= 1'b0;
    else if (a_valid && a_ready) in_loop <= !a_last;
  end

  logic sel_valid, sel_ready, sel_data;
  logic cond_valid, cond_ready, cond_data;

  elastic_buffer #(.W(1), .DEPTH(TOK_DEPTH)) u_sel_fifo (
    .clk, .rst,
    .in_valid(f_valid[1]), .in_ready(f_ready[1]), .in_data(in_loop),
    .out_valid(sel_valid), .out_ready(sel_ready), .out_data(sel_data)
  );

  elastic_buffer #(.W(1), .DEPTH(TOK_DEPTH)) u_cond_fifo (
    .clk, .rst,
    .in_valid(f_valid[2]), .in_ready(f_ready[2]), .in_data(!a_last),
    .out_valid(cond_valid), .out_ready(cond_ready), .out_data(cond_data)
  );

  // ---- b: initial value or the previous iteration's result
  logic     fb_in_valid, fb_in_ready, fb_out_valid, fb_out_ready;
  float32_t fb_in_data, fb_out_data;
  logic     b_valid, b_ready;
  float32_t b_data;

  elastic_mux #(.W(32)) u_mux (
    .sel_valid, .sel_ready, .sel_data,
    .in0_valid(init_valid),   .in0_ready(init_ready),   .in0_data(init_data),
    .in1_valid(fb_out_valid), .in1_ready(fb_out_ready), .in1_data(fb_out_data),
    .out_valid(b_valid), .out_ready(b_ready), .out_data(b_data)
  );

  // ---- the static island in its wrapper
  logic     x_valid, x_ready;
  float32_t x_data;

  float32_t island_x;

  offset_wrapper #(.LATENCY(LATENCY), .B_OFFSET(16'(B_OFFSET)), .II(II)) u_wrap (
    .clk, .rst, .mem_ce,
    .a_valid(f_valid[0]), .a_ready(f_ready[0]),
    .b_valid, .b_ready,
    .x_valid, .x_ready, .x_data,
    .ce(island_ce), .island_x,
    .start(island_start), .bubble(island_bubble), .b_stall(island_b_stall)
  );

  fig5_island #(.ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_island (
    .clk, .ce(island_ce), .a(a_data), .b(b_data), .x(island_x)
  );

  // ---- loop exit or back-edge
  elastic_branch #(.W(32)) u_branch (
    .in_valid(x_valid), .in_ready(x_ready), .in_data(x_data),
    .cond_valid, .cond_ready, .cond_data,
    .out_t_valid(fb_in_valid), .out_t_ready(fb_in_ready), .out_t_data(fb_in_data),
    .out_f_valid(res_valid),   .out_f_ready(res_ready),   .out_f_data(res_data)
  );

  elastic_buffer #(.W(32), .DEPTH(FB_DEPTH)) u_fb_buf (
    .clk, .rst,
    .in_valid(fb_in_valid), .in_ready(fb_in_ready), .in_data(fb_in_data),
    .out_valid(fb_out_valid), .out_ready(fb_out_ready), .out_data(fb_out_data)
  );

endmodule
