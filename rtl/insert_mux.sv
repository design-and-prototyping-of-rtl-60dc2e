// insert_mux -- output multiplexer of the Telecom Bus.
//
// Drives DTBDATAOUT with the byte leaving the 9-cycle buffer, unless one of the N channels raises
// its 'replace' strobe; the byte that channel prepared (data_to_insert) is then sent instead.
// Channels own disjoint VC-4 columns, so at most one strobe is high in a cycle (the top level
// asserts this; two channels set to the same channel number would break it); if several were high
// the highest-numbered one would win. With
// no strobe the buffered byte passes unchanged, which is the core's bypass path.
//
// Timing: purely combinational.
module insert_mux #(
  parameter int unsigned N = 63
) (
  input  logic [7:0]   bypass_data,
  input  logic [N-1:0] replace,
  input  logic [7:0]   insert_data [N],
  output logic [7:0]   dout
);

  always_comb begin
    dout = bypass_data;
    for (int i = 0; i < int'(N); i++)
      if (replace[i]) dout = insert_data[i];
  end

endmodule
