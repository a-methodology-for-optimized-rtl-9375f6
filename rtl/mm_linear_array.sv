// mm_linear_array: linear-array matrix multiplier, C = A x B for N x N
// matrices on N multiply-accumulate processing elements (N = 16 by
// default).
//
// The product needs N^3 multiply-accumulates; N PEs each doing one per
// clock finish it in N^2 cycles, and the N^2 results leave at one per
// clock. With a continuous stream of matrix pairs the array therefore
// accepts one pair and delivers one product every N^2 cycles (256 for
// N = 16) with all multipliers busy.
//
// Structure: mm_feeder -> PE 0 -> PE 1 -> ... -> PE N-1 -> mm_collector.
// PE J accumulates column J of C. The A stream (column k of A during
// pass k) and the B stream (row k of B) move one PE per clock; each PE
// keeps the B element of its own column and multiplies it with every A
// element that passes. The collector reads the finished columns out of
// the PEs' output buffers in row-major order while the next product is
// accumulated.
//
// Interface: in cycle t of a pair (t = 0 .. N^2-1) a_in = A[t%N][t/N] and
// b_in = B[t/N][t%N], with in_valid high for all N^2 cycles. Pairs may
// follow each other without a gap or after any number of idle cycles.
// out_data carries C in row-major order while out_valid is high, out_last
// marks C[N-1][N-1]. Elements are signed; the accumulator is exact.
//
// Timing: the first result of a pair appears N^2 + N + 2 cycles after its
// first input (274 for N = 16); the N^2 results follow in consecutive
// cycles.
//
// The linear array of N multipliers, N = 16, the one-result-per-cycle
// rate and the N^2-cycle product time come from the architecture this
// design implements; widths, element order, handshake and reset are this
// design's own choices.
module mm_linear_array #(
  parameter int unsigned N      = mm_pkg::MM_N,
  parameter int unsigned DATA_W = mm_pkg::MM_DATA_W,
  parameter int unsigned ACC_W  = mm_pkg::acc_width(DATA_W, N),
  localparam int unsigned IDX_W = mm_pkg::idx_width(N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] a_in,
  input  logic signed [DATA_W-1:0] b_in,
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  out_data,
  output logic                     out_last
);

  // Streams between neighbours: index s is the input of PE s, index N
  // the output of the last PE.
  logic                     a_valid [N+1];
  logic signed [DATA_W-1:0] a_data  [N+1];
  logic        [IDX_W-1:0]  a_idx   [N+1];
  logic                     a_first [N+1];
  logic                     a_last  [N+1];
  logic                     b_valid [N+1];
  logic signed [DATA_W-1:0] b_data  [N+1];
  logic        [IDX_W-1:0]  b_col   [N+1];

  logic        [IDX_W-1:0]  rd_idx;
  logic signed [ACC_W-1:0]  rd_data [N];

  mm_feeder #(
    .N      (N),
    .DATA_W (DATA_W)
  ) u_feeder (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .a_in      (a_in),
    .b_in      (b_in),
    .a_valid_o (a_valid[0]),
    .a_o       (a_data[0]),
    .a_idx_o   (a_idx[0]),
    .a_first_o (a_first[0]),
    .a_last_o  (a_last[0]),
    .b_valid_o (b_valid[0]),
    .b_o       (b_data[0]),
    .b_col_o   (b_col[0])
  );

  for (genvar j = 0; j < N; j++) begin : g_pe
    mm_pe #(
      .N      (N),
      .DATA_W (DATA_W),
      .ACC_W  (ACC_W),
      .J      (j)
    ) u_pe (
      .clk       (clk),
      .rst_n     (rst_n),
      .a_valid_i (a_valid[j]),
      .a_i       (a_data[j]),
      .a_idx_i   (a_idx[j]),
      .a_first_i (a_first[j]),
      .a_last_i  (a_last[j]),
      .b_valid_i (b_valid[j]),
      .b_i       (b_data[j]),
      .b_col_i   (b_col[j]),
      .a_valid_o (a_valid[j+1]),
      .a_o       (a_data[j+1]),
      .a_idx_o   (a_idx[j+1]),
      .a_first_o (a_first[j+1]),
      .a_last_o  (a_last[j+1]),
      .b_valid_o (b_valid[j+1]),
      .b_o       (b_data[j+1]),
      .b_col_o   (b_col[j+1]),
      .rd_idx_i  (rd_idx),
      .rd_data_o (rd_data[j])
    );
  end

  mm_collector #(
    .N     (N),
    .ACC_W (ACC_W)
  ) u_collector (
    .clk          (clk),
    .rst_n        (rst_n),
    .done_valid_i (a_valid[N]),
    .done_idx_i   (a_idx[N]),
    .done_last_i  (a_last[N]),
    .rd_idx_o     (rd_idx),
    .rd_data_i    (rd_data),
    .out_valid    (out_valid),
    .out_data     (out_data),
    .out_last     (out_last)
  );

endmodule
