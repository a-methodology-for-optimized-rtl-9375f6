// mm_feeder: input sequencer of the linear-array matrix multiplier.
//
// A matrix pair (A, B) enters in N*N consecutive cycles, one element of
// each per cycle. In cycle t of the pair (pass k = t / N, position
// p = t % N) the inputs carry a[p][k] (A in column-major order) and
// b[k][p] (B in row-major order), so pass k brings column k of A together
// with row k of B.
//
// How it works: two counters (position p and pass k) follow the stream.
// The B element leaves after one register stage, tagged with its column p.
// The A element is tagged with its row p and with first/last flags
// (k == 0, k == N-1) and leaves after N+1 register stages. The extra N
// cycles of the A path let row k of B spread over the array before
// column k of A reaches it: with both streams moving one PE per clock,
// b[k][J] reaches PE J at relative time kN + 2J and a[0][k] at
// kN + N + J, which is later for every J < N, while b[k+1][J] arrives at
// (k+1)N + 2J, never before a[0][k]. A delay of exactly N is the only one
// that satisfies both.
//
// Interface rule: once a pair has started, in_valid must stay high until
// its N*N elements are in. Idle cycles are allowed only between pairs (an
// assertion checks this). There is no back-pressure; the array accepts a
// new pair every N*N cycles without a gap.
//
// The fixed-rate, control-light stream follows the architecture; the
// element order, the tags and the delay line are this design's choices.
module mm_feeder #(
  parameter int unsigned N      = mm_pkg::MM_N,
  parameter int unsigned DATA_W = mm_pkg::MM_DATA_W,
  localparam int unsigned IDX_W = mm_pkg::idx_width(N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] a_in,
  input  logic signed [DATA_W-1:0] b_in,
  // A stream into PE 0
  output logic                     a_valid_o,
  output logic signed [DATA_W-1:0] a_o,
  output logic        [IDX_W-1:0]  a_idx_o,
  output logic                     a_first_o,
  output logic                     a_last_o,
  // B stream into PE 0
  output logic                     b_valid_o,
  output logic signed [DATA_W-1:0] b_o,
  output logic        [IDX_W-1:0]  b_col_o
);

  typedef struct packed {
    logic                     valid;
    logic signed [DATA_W-1:0] data;
    logic        [IDX_W-1:0]  idx;
    logic                     first;
    logic                     last;
  } a_elem_t;

  localparam int unsigned A_DELAY = N + 1;

  logic [IDX_W-1:0] pos, pass;
  a_elem_t          a_new;
  a_elem_t          a_pipe [A_DELAY];

  // Position and pass counters. A started pair must be fed without a gap.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos  <= '0;
      pass <= '0;
    end else begin
      a_no_gap_in_pair: assert (in_valid || (pos == '0 && pass == '0))
        else $error("mm_feeder: in_valid dropped inside a matrix pair");
      if (in_valid) begin
        if (pos == IDX_W'(N - 1)) begin
          pos  <= '0;
          pass <= (pass == IDX_W'(N - 1)) ? '0 : pass + 1'b1;
        end else begin
          pos <= pos + 1'b1;
        end
      end
    end
  end

  // B path: one register stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b_valid_o <= 1'b0;
    else        b_valid_o <= in_valid;
  end

  always_ff @(posedge clk) begin
    b_o     <= b_in;
    b_col_o <= pos;
  end

  // A path: N+1 register stages.
  always_comb begin
    a_new.valid = in_valid;
    a_new.data  = a_in;
    a_new.idx   = pos;
    a_new.first = (pass == '0);
    a_new.last  = (pass == IDX_W'(N - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(A_DELAY); s++) a_pipe[s] <= '0;
    end else begin
      a_pipe[0] <= a_new;
      for (int s = 1; s < int'(A_DELAY); s++) a_pipe[s] <= a_pipe[s-1];
    end
  end

  assign a_valid_o = a_pipe[A_DELAY-1].valid;
  assign a_o       = a_pipe[A_DELAY-1].data;
  assign a_idx_o   = a_pipe[A_DELAY-1].idx;
  assign a_first_o = a_pipe[A_DELAY-1].first;
  assign a_last_o  = a_pipe[A_DELAY-1].last;

endmodule
