// delay_line -- the Delay block: times the 'replace' strobe of one AddDrop channel.
//
// The Telecom Bus byte reaches the output multiplexer through a 9-cycle buffer, while the channel
// logic learns that a byte belongs to its VC-12 one cycle after the byte was on the bus (V5Enable
// registers dataValid). This block delays that flag by the remaining DEPTH cycles so that
// 'replace' is high exactly while the buffer presents the byte that the channel's VC12Add block
// must overwrite. It is a plain shift register; DEPTH = 8 is this design's choice, derived from
// the 9-cycle buffer of the original design and the one-cycle latency of V5Enable.
//
// Timing: q follows d by DEPTH rising edges of clk; rst_n clears it asynchronously.
module delay_line #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] stage_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) stage_q[i] <= '0;
    end else begin
      stage_q[0] <= d;
      for (int i = 1; i < int'(DEPTH); i++) stage_q[i] <= stage_q[i-1];
    end
  end

  assign q = stage_q[DEPTH-1];

endmodule
