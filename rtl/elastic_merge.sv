// elastic_merge: dataflow merge of N token streams into one.
//
// Forwards a token from whichever input has one, with a fixed priority
// (the lowest-numbered valid input wins), and consumes it when the output
// accepts it. A merge does not pick by a select token, so it keeps order
// only where at most one of its inputs can hold a token at a time, as
// where the two arms of an if-statement join again for a value carried
// round a loop. Purely combinational, no state. The handshake equations
// are this design's own.
module elastic_merge #(
  parameter int unsigned W = 32,
  parameter int unsigned N = 2
) (
  input  logic [N-1:0]         in_valid,
  output logic [N-1:0]         in_ready,
  input  logic [N-1:0][W-1:0]  in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [W-1:0]         out_data
);

  logic [N-1:0] grant;

  always_comb begin
    grant    = '0;
    out_data = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (in_valid[i]) begin
        grant    = '0;
        grant[i] = 1'b1;
        out_data = in_data[i];
      end
    end
  end

  assign out_valid = |in_valid;
  assign in_ready  = grant & {N{out_ready}};

endmodule
