// row_pair_pipe_mult: N x N unsigned array multiplier cut into two pipeline
// stages by rows of the array.
//
// Row k of the array is the multiplicand ANDed bit by bit with multiplier
// bit b[k] and shifted left k places. Stage 1 adds the rows in pairs,
// (2m, 2m+1), and registers each pair sum y[m]. Stage 2 adds the N/2 pair
// sums and registers the product. So an operand pair sampled at clock edge
// k shows its product right after edge k+2, and a new pair can enter every
// clock.
//
// The row-pair grouping, the two register ranks and a registered output
// follow the design's description of its pipelining. N defaults to 4, the
// operand width the design evaluates; N must be even. The valid bit and
// the asynchronous active-low reset are this design's own.
module row_pair_pipe_mult #(
  parameter int unsigned N = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,          // multiplicand
  input  logic [N-1:0]   b,          // multiplier
  output logic           out_valid,
  output logic [2*N-1:0] y           // product, registered
);
  localparam int unsigned PAIRS = N / 2;

  // bit products: row k = a & b[k]
  logic [N-1:0] rows [N];

  for (genvar k = 0; k < N; k++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      bit_product u_and (.p(a[j]), .q(b[k]), .s(rows[k][j]));
    end
  end

  // stage 1: pair sums
  logic [2*N-1:0] pair_d [PAIRS];
  logic [2*N-1:0] pair_q [PAIRS];
  logic           v1;

  for (genvar m = 0; m < PAIRS; m++) begin : g_pair
    assign pair_d[m] = ((2*N)'(rows[2*m]) << (2*m))
                     + ((2*N)'(rows[2*m+1]) << (2*m+1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      for (int m = 0; m < PAIRS; m++) pair_q[m] <= '0;
    end else begin
      v1 <= in_valid;
      for (int m = 0; m < PAIRS; m++) pair_q[m] <= pair_d[m];
    end
  end

  // stage 2: sum of the pair sums
  logic [2*N-1:0] total;

  always_comb begin
    total = '0;
    for (int m = 0; m < PAIRS; m++) total = total + pair_q[m];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= v1;
      y         <= total;
    end
  end

  initial begin
    assert (N % 2 == 0 && N >= 2) else $fatal(1, "N must be even and at least 2");
  end
endmodule
