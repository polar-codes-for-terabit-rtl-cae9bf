// pipe_delay: a W-bit wide, D-deep shift register (D = 0 is a plain wire).
//
// In the unrolled, fully pipelined decoder a node must keep its input LLRs
// until its left subtree has finished and keep the left partial sums until
// its right subtree has finished, for every frame in flight. These delay
// lines are that storage; their total size is the decoder's memory
// complexity, which grows with N^2. Data moves one place per clock, no
// enable, no reset (the frame valid flag travels in its own reset delay
// line).
// clk is unused in the combinational (D = 0) variant.
module pipe_delay #(
  parameter int unsigned W = 8,
  parameter int unsigned D = 2
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (D == 0) begin : g_wire
    assign dout = din;
  end else begin : g_shift
    logic [W-1:0] stage [D];
    always_ff @(posedge clk) begin
      stage[0] <= din;
      for (int unsigned i = 1; i < D; i++) stage[i] <= stage[i-1];
    end
    assign dout = stage[D-1];
  end

endmodule
