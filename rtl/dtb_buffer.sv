// dtb_buffer -- the 9-cycle Telecom Bus buffer in front of the output multiplexer.
//
// Every byte of DTBDATA is delayed by DEPTH cycles of the Telecom Bus clock before it reaches the
// output multiplexer. The delay gives each AddDrop channel time to recognise its own bytes and to
// prepare the byte that replaces them, so that the whole core has a fixed through-latency of
// DEPTH cycles (9 in the original design) whatever the number of channels. Bytes that no channel
// replaces leave the core unchanged: this is the bypass path.
//
// Timing: q is d delayed by DEPTH rising edges of clk; rst_n clears it asynchronously.
module dtb_buffer #(
  parameter int unsigned DEPTH = 9,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] fifo_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) fifo_q[i] <= '0;
    end else begin
      fifo_q[0] <= d;
      for (int i = 1; i < int'(DEPTH); i++) fifo_q[i] <= fifo_q[i-1];
    end
  end

  assign q = fifo_q[DEPTH-1];

endmodule
