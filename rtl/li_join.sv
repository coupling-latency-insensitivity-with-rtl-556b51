// li_join: join controller of the latency-insensitive protocol.
//
// Combines N incoming tokens into one outgoing token. The output is valid
// only when every input is valid. An input is stopped when the output is
// stopped or when any other input is not valid, so a valid token waits in
// place for its partners. In the core the join merges the decoded
// instruction with the validity of the registers it reads and writes.
// Purely combinational; all signals are active high.
// The join rule is the one of the original pipeline; making it
// N-input, and including the destination token, are this design's choices.
module li_join #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] in_valid,
  output logic [N-1:0] in_stop,
  output logic         out_valid,
  input  logic         out_stop
);
  assign out_valid = &in_valid;
  always_comb begin
    for (int i = 0; i < N; i++)
      in_stop[i] = in_valid[i] && (out_stop || !out_valid);
  end
endmodule
