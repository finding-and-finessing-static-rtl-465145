// elastic_buffer: FIFO buffer for a valid/ready dataflow edge.
//
// Dataflow circuits place such buffers on edges, and in particular on
// loop back-edges, so that tokens can wait and so that every cycle of
// the circuit has registers on its handshake paths. This one holds up to
// DEPTH tokens in order. in_ready is !full and comes from a register in
// both modes, so the buffer cuts every combinational path from
// out_ready back to in_ready.
//  * TRANSPARENT = 1: when empty, an arriving token is offered at the
//    output in the same cycle, so the buffer adds no latency, but the
//    valid and data paths pass straight through it.
//  * TRANSPARENT = 0 (opaque): out_valid and out_data come from the
//    storage only, so a token leaves at the earliest one cycle after it
//    arrived and the valid path is cut as well. A cycle of the dataflow
//    graph that has no other register on its valid path needs one.
// The depth and both organisations are this design's choices.
// Synchronous active-high reset empties it.
module elastic_buffer #(
  parameter int unsigned W           = 32,
  parameter int unsigned DEPTH       = 2,
  parameter bit          TRANSPARENT = 1'b1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd, wr;
  logic [AW:0]   count;
  logic          empty, push, pop, bypass;

  assign empty     = (count == '0);
  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = !empty || (TRANSPARENT && in_valid);
  assign out_data  = (TRANSPARENT && empty) ? in_data : mem[rd];
  assign bypass    = TRANSPARENT && empty && in_valid && out_ready;
  assign push      = in_valid && in_ready && !bypass;
  assign pop       = !empty && out_ready;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rd    <= '0;
      wr    <= '0;
      count <= '0;
    end else begin
      if (push) wr <= next_ptr(wr);
      if (pop)  rd <= next_ptr(rd);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr] <= in_data;
  end

  initial assert (DEPTH >= 1) else $error("elastic_buffer: DEPTH must be at least 1");

endmodule
