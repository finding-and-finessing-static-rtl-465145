// offset_wrapper: handshake wrapper for a static island whose inputs have
// different offsets.
//
// A statically scheduled island has a fixed schedule once it starts, but
// it sits in a dynamically scheduled circuit where every value arrives as
// a valid/ready token at an unknown time. The wrapper connects the two.
// Unlike a wrapper that joins all inputs before it starts the island, this
// one starts an iteration as soon as the inputs with offset 0 are there
// and asks for a later input only in the cycle the island uses it.
//
// The wrapper has three parts.
//  1. Zero-offset input a. Once every II enabled cycles (a start slot) the
//     wrapper looks at a_valid. If a is there it is consumed and an
//     iteration starts; if not, the slot is lost and a bubble enters the
//     island while the rest of the pipeline keeps moving.
//  2. Positive-offset inputs b[0..NB-1]. An offset_shift_register, moved
//     by the same clock enable as the island, records every started
//     iteration. When bit B_OFFSET[i] (13 for the example island's single
//     late input) is set, b[i] is required. If it is not valid then, the
//     clock enable drops and the whole island stalls until it arrives.
//     B_OFFSET packs one 16-bit offset per late input, b[0] lowest.
//  3. Backpressure. The bit at LATENCY marks a result at the island's
//     output. While that result is not accepted the clock enable drops.
//     The enable also drops when mem_ce, the memory arbiter's enable, is
//     low.
//
// The wrapper holds no data. Its parent wires the data of a and b straight
// to the island's inputs, drives the island's clock enable from `ce` and
// returns the island's result on `island_x`, which leaves as x_data.
// LATENCY and B_OFFSET describe the island (18 and 13 for the example).
// Because x_data is only a wire from island_x, the wrapper synthesised on
// its own has 32 outputs with no logic of their own; that is intended.
//
// Interface: a, b and x are valid/ready channels (transfer when both are
// high in a cycle). a_ready and b_ready depend combinationally on b_valid,
// x_ready and mem_ce; x_valid and x_data come from registers. A result
// that is handed over in a cycle in which the island is stalled is
// remembered in `sent`, so it is not offered twice.
//
// Deadlock rule: if x feeds back into b[i] D iterations later, the island
// stalls forever unless II >= (LATENCY - B_OFFSET[i]) / D (5 for the
// example, D = 1). The surrounding circuit must choose II that way.
//
// From the island example: the three parts, the shift register, the offset
// of 13 and the stall of the whole island; the general timing rules allow
// any number of inputs with their own offsets. This design's choices: one
// zero-offset input, the start-slot counter, the `sent` flag, the status
// outputs and the reset.
module offset_wrapper
  import si_pkg::*;
#(
  parameter int unsigned                 LATENCY  = 18,
  parameter int unsigned                 NB       = 1,
  parameter logic [NB-1:0][15:0]         B_OFFSET = 16'd13,
  parameter int unsigned                 II       = 1
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     mem_ce,     // enable from the memory arbiter
  // zero-offset input
  input  logic     a_valid,
  output logic     a_ready,
  // positive-offset inputs, one bit each
  input  logic [NB-1:0] b_valid,
  output logic [NB-1:0] b_ready,
  // result
  output logic     x_valid,
  input  logic     x_ready,
  output float32_t x_data,
  // island
  output logic     ce,         // island clock enable
  input  float32_t island_x,   // island result
  // status, for observation only
  output logic     start,      // an iteration starts this cycle
  output logic     bubble,     // a start slot passes without a
  output logic     b_stall     // some b required but not valid
);

  localparam int unsigned PW       = (II > 1) ? $clog2(II) : 1;

  logic [LATENCY:1] tok;
  logic [PW-1:0]    phase;
  logic [NB-1:0]    need_b;
  logic             slot, x_live, out_ok, sent;

  assign slot    = (phase == '0);
  for (genvar i = 0; i < NB; i++) begin : g_need
    assign need_b[i] = tok[B_OFFSET[i]];
  end
  assign x_live  = tok[LATENCY];
  assign x_valid = x_live && !sent;
  assign out_ok  = !x_valid || x_ready;

  assign ce      = mem_ce && out_ok && ((need_b & ~b_valid) == '0);
  assign start   = ce && slot && a_valid;
  assign a_ready = ce && slot;
  assign b_ready = {NB{ce}} & need_b;
  assign bubble  = ce && slot && !a_valid;
  assign b_stall = |(need_b & ~b_valid);

  // Start slots come every II enabled cycles.
  always_ff @(posedge clk) begin
    if (rst) phase <= '0;
    else if (ce) phase <= (phase == PW'(II - 1)) ? '0 : phase + 1'b1;
  end

  // A result handed over while the island is stalled must not be offered again.
  always_ff @(posedge clk) begin
    if (rst)                     sent <= 1'b0;
    else if (ce)                 sent <= 1'b0;
    else if (x_valid && x_ready) sent <= 1'b1;
  end

  offset_shift_register #(.DEPTH(LATENCY)) u_tokens (
    .clk, .rst, .en(ce), .start, .tok
  );

  assign x_data = island_x;

  // Valid/ready rule on the output: a result, once offered, stays until taken.
  property p_x_hold;
    @(posedge clk) disable iff (rst) (x_valid && !x_ready) |=> (x_valid && $stable(x_data));
  endproperty
  a_x_hold: assert property (p_x_hold) else $error("offset_wrapper: x withdrawn before it was taken");

  initial begin
    assert (II >= 1) else $error("offset_wrapper: need II >= 1");
    for (int i = 0; i < NB; i++)
      assert (B_OFFSET[i] >= 16'd1 && 32'(B_OFFSET[i]) < LATENCY)
        else $error("offset_wrapper: need 1 <= B_OFFSET[%0d] < LATENCY", i);
  end

endmodule
