// offset_shift_register: tracks which iterations are inside a static island.
//
// Bit k of `tok` (1 <= k <= DEPTH) is set when the iteration that started
// k enabled cycles ago is still in the island. A start shifts a 1 into
// bit 1; every rising edge with en high moves all bits one place up; with
// en low the register holds, in step with the island pipeline that the
// same enable stalls. A wrapper reads bit OFFSET to learn that an input
// with that offset is required now, and bit DEPTH to learn that a result
// is at the island's output. Following the island example, the register
// is as deep as the island's latency. Synchronous active-high reset
// clears it; the reset is this design's choice.
module offset_shift_register #(
  parameter int unsigned DEPTH = 18
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             start,
  output logic [DEPTH:1]   tok
);

  always_ff @(posedge clk) begin
    if (rst)     tok <= '0;
    else if (en) tok <= {tok[DEPTH-1:1], start};
  end

  initial assert (DEPTH >= 2) else $error("offset_shift_register: DEPTH must be at least 2");

endmodule
