// pipe_reg: one rank of pipeline registers. On each rising clock edge every
// bit of d moves to q at once, so the rank separates two stages of
// combinational logic. A valid bit travels with the data so that a consumer
// knows which outputs belong to a real input; it is this design's addition,
// as is the asynchronous active-low reset that clears data and valid.
// Timing: q and valid_q show d and valid_d one clock after they were applied.
module pipe_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_d,
  input  logic [WIDTH-1:0] d,
  output logic             valid_q,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      q       <= '0;
    end else begin
      valid_q <= valid_d;
      q       <= d;
    end
  end
endmodule
