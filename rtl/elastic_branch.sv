// elastic_branch: dataflow branch steered by a condition token.
//
// Each data token goes to out_t when the matching condition token is 1
// and to out_f when it is 0. Data and condition are consumed together,
// when the chosen successor accepts. Purely combinational, no state.
// In a loop the branch sends a value back round the loop or out of it.
// Both data outputs are wires from in_data (only the valids differ), so
// the branch synthesised alone has 2*W outputs with no logic of their own.
// The branch itself follows the document; the exact handshake equations
// are this design's own.
module elastic_branch #(
  parameter int unsigned W = 32
) (
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  input  logic         cond_valid,
  output logic         cond_ready,
  input  logic         cond_data,
  output logic         out_t_valid,
  input  logic         out_t_ready,
  output logic [W-1:0] out_t_data,
  output logic         out_f_valid,
  input  logic         out_f_ready,
  output logic [W-1:0] out_f_data
);

  logic taken_ready;

  assign taken_ready = cond_data ? out_t_ready : out_f_ready;
  assign out_t_valid = in_valid && cond_valid &&  cond_data;
  assign out_f_valid = in_valid && cond_valid && !cond_data;
  assign out_t_data  = in_data;
  assign out_f_data  = in_data;
  assign in_ready    = cond_valid && taken_ready;
  assign cond_ready  = in_valid && taken_ready;

endmodule
