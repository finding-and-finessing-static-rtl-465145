// elastic_fork: eager dataflow fork, one input token to N successors.
//
// Every successor gets a copy of the input token. Each output is offered
// until its successor accepts it, independently of the others; a
// register per output remembers which copies are already delivered. The
// input token is consumed in the cycle the last outstanding copy is
// delivered, and the flags then clear. Synchronous active-high reset.
module elastic_fork #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  output logic         in_ready,
  output logic [N-1:0] out_valid,
  input  logic [N-1:0] out_ready
);

  logic [N-1:0] done, done_now;

  assign out_valid = {N{in_valid}} & ~done;
  assign done_now  = done | (out_valid & out_ready);
  assign in_ready  = &done_now;

  always_ff @(posedge clk) begin
    if (rst)                       done <= '0;
    else if (in_valid && in_ready) done <= '0;
    else if (in_valid)             done <= done_now;
  end

endmodule
