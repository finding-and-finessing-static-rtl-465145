// elastic_mux: dataflow multiplexer with a select token.
//
// Each output token is taken from input in0 or in1 as the next select
// token says (0: in0, 1: in1). The select token and the chosen data token
// are consumed together, when the output is accepted; the other input is
// left alone. Purely combinational, no state. This is the mux of a
// dynamically scheduled circuit, where it picks, for instance, between a
// loop variable's initial value and the value fed back from the previous
// iteration. The exact handshake equations are this design's own.
module elastic_mux #(
  parameter int unsigned W = 32
) (
  input  logic         sel_valid,
  output logic         sel_ready,
  input  logic         sel_data,
  input  logic         in0_valid,
  output logic         in0_ready,
  input  logic [W-1:0] in0_data,
  input  logic         in1_valid,
  output logic         in1_ready,
  input  logic [W-1:0] in1_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  assign out_valid = sel_valid && (sel_data ? in1_valid : in0_valid);
  assign out_data  = sel_data ? in1_data : in0_data;
  assign sel_ready = out_valid && out_ready;
  assign in0_ready = sel_valid && !sel_data && out_ready;
  assign in1_ready = sel_valid &&  sel_data && out_ready;

endmodule
