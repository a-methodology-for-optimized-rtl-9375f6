// mm_pe: one processing element of the linear-array matrix multiplier.
//
// PE number J of the array owns column J of the product C = A x B. The
// elements of A (a[i][k], tagged with its row i and with first/last-pass
// flags for k = 0 and k = N-1) and the elements of B (b[k][c], tagged
// with its column c) flow through the array from left to right, one PE per
// clock. Every PE re-registers both streams for its right neighbour.
//
// How it works:
//  * B capture: when a B element tagged with column J passes, it is
//    stored in BU (the "upcoming" B register).
//  * B switch: the A element with row index 0 marks the start of a new
//    pass k. In that cycle the PE multiplies by BU directly and copies BU
//    into BM, which serves the remaining N-1 elements of the pass. BU is
//    then free for the next row of B.
//  * MAC: each valid A element a[i][k] is multiplied by b[k][J] and added
//    into entry i of the local accumulation memory CBUF (the first pass
//    writes the product instead of adding it). On the last pass the
//    finished sum c[i][J] is also written into entry i of the output
//    buffer OBUF.
//  * Output: OBUF is read asynchronously at rd_idx_i. It is a second
//    memory so that the finished column can be read out while CBUF
//    already accumulates the next product.
//
// Timing: the a_*_o and b_*_o outputs are the inputs delayed by one clock.
// CBUF/OBUF are written at the clock edge that ends the cycle in which the
// A element is at the input. The feeder guarantees that b[k][J] reaches
// this PE before a[0][k] does and that b[k+1][J] arrives no earlier than
// a[0][k] (see mm_feeder).
//
// The array of multipliers, their local memory and the doubled storage
// follow the architecture this design implements; the tag/flag scheme,
// the BU/BM hand-over rule and the single-cycle MAC are this design's own
// choices.
module mm_pe #(
  parameter int unsigned N      = mm_pkg::MM_N,
  parameter int unsigned DATA_W = mm_pkg::MM_DATA_W,
  parameter int unsigned ACC_W  = mm_pkg::acc_width(DATA_W, N),
  parameter int unsigned J      = 0,
  localparam int unsigned IDX_W = mm_pkg::idx_width(N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // A stream from the left neighbour
  input  logic                     a_valid_i,
  input  logic signed [DATA_W-1:0] a_i,
  input  logic        [IDX_W-1:0]  a_idx_i,    // row i of a[i][k]
  input  logic                     a_first_i,  // k == 0
  input  logic                     a_last_i,   // k == N-1
  // B stream from the left neighbour
  input  logic                     b_valid_i,
  input  logic signed [DATA_W-1:0] b_i,
  input  logic        [IDX_W-1:0]  b_col_i,    // column c of b[k][c]
  // A stream to the right neighbour
  output logic                     a_valid_o,
  output logic signed [DATA_W-1:0] a_o,
  output logic        [IDX_W-1:0]  a_idx_o,
  output logic                     a_first_o,
  output logic                     a_last_o,
  // B stream to the right neighbour
  output logic                     b_valid_o,
  output logic signed [DATA_W-1:0] b_o,
  output logic        [IDX_W-1:0]  b_col_o,
  // Read port of the output buffer
  input  logic        [IDX_W-1:0]  rd_idx_i,
  output logic signed [ACC_W-1:0]  rd_data_o
);

  logic signed [DATA_W-1:0]   bu, bm;
  logic signed [ACC_W-1:0]    cbuf [N];
  logic signed [ACC_W-1:0]    obuf [N];

  logic signed [DATA_W-1:0]   b_cur;
  logic signed [2*DATA_W-1:0] prod;
  logic signed [ACC_W-1:0]    sum;

  // Row 0 of a pass uses the freshly captured B value, later rows the
  // held copy.
  always_comb begin
    b_cur = (a_idx_i == '0) ? bu : bm;
    prod  = a_i * b_cur;
    sum   = a_first_i ? ACC_W'(prod) : cbuf[a_idx_i] + ACC_W'(prod);
  end

  // Stream registers towards the right neighbour.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid_o <= 1'b0;
      b_valid_o <= 1'b0;
    end else begin
      a_valid_o <= a_valid_i;
      b_valid_o <= b_valid_i;
    end
  end

  always_ff @(posedge clk) begin
    a_o       <= a_i;
    a_idx_o   <= a_idx_i;
    a_first_o <= a_first_i;
    a_last_o  <= a_last_i;
    b_o       <= b_i;
    b_col_o   <= b_col_i;
  end

  // B registers.
  always_ff @(posedge clk) begin
    if (b_valid_i && b_col_i == IDX_W'(J))
      bu <= b_i;
    if (a_valid_i && a_idx_i == '0)
      bm <= bu;
  end

  // Accumulation memory and output buffer.
  always_ff @(posedge clk) begin
    if (a_valid_i) begin
      cbuf[a_idx_i] <= sum;
      if (a_last_i)
        obuf[a_idx_i] <= sum;
    end
  end

  assign rd_data_o = obuf[rd_idx_i];

endmodule
