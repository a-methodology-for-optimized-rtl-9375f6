// mm_collector: output sequencer of the linear-array matrix multiplier.
//
// When the last pass of a product has run through the array, column J of
// C sits in the output buffer of PE J. The collector reads the N*N
// results out in row-major order, one per clock: in read step i*N + j it
// drives row index i to the read ports of all PEs and selects PE j.
//
// How it works: the A element that leaves the last PE carrying the
// last-pass flag and row index 0 starts a read-out; the read begins in
// that same cycle. Relative to the first input of a pair (cycle 0) that
// element leaves at cycle N*N + N + 1. PE j has written c[i][j] by cycle
// N*N + 1 + i + j and keeps it until cycle 2*N*N + 1 + i + j, when the
// next pair (if it follows without a gap) overwrites it. Read step i*N + j
// falls inside that window for every i, j, so a continuous stream of
// products is read out without conflict while the next one is computed.
//
// Timing: out_* are registered; the result read in cycle r appears in
// cycle r+1. out_last marks c[N-1][N-1]. A product therefore leaves in
// N*N consecutive cycles, starting N*N + N + 2 cycles after its first
// input.
//
// The one-result-per-cycle output rate follows the architecture; the
// read order, the start condition and the output register are this
// design's choices.
module mm_collector #(
  parameter int unsigned N      = mm_pkg::MM_N,
  parameter int unsigned ACC_W  = mm_pkg::acc_width(mm_pkg::MM_DATA_W, N),
  localparam int unsigned IDX_W = mm_pkg::idx_width(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // A stream leaving the last PE
  input  logic                    done_valid_i,
  input  logic [IDX_W-1:0]        done_idx_i,
  input  logic                    done_last_i,
  // Read ports of the PEs' output buffers
  output logic [IDX_W-1:0]        rd_idx_o,
  input  logic signed [ACC_W-1:0] rd_data_i [N],
  // Result stream
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] out_data,
  output logic                    out_last
);

  logic             busy;
  logic [IDX_W-1:0] row, col;
  logic             start, reading;
  logic [IDX_W-1:0] rd_row, rd_col;
  logic             rd_end;

  always_comb begin
    start   = done_valid_i && done_last_i && (done_idx_i == '0);
    reading = start || busy;
    rd_row  = start ? '0 : row;
    rd_col  = start ? '0 : col;
    rd_end  = (rd_row == IDX_W'(N - 1)) && (rd_col == IDX_W'(N - 1));
  end

  assign rd_idx_o = rd_row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      row  <= '0;
      col  <= '0;
    end else begin
      // A new product must not start while the previous one is read.
      a_no_overlap: assert (!(busy && start))
        else $error("mm_collector: read-out restarted before it finished");
      if (!reading) begin
        busy <= 1'b0;
      end else if (rd_end) begin
        busy <= 1'b0;
        row  <= '0;
        col  <= '0;
      end else begin
        busy <= 1'b1;
        if (rd_col == IDX_W'(N - 1)) begin
          col <= '0;
          row <= rd_row + 1'b1;
        end else begin
          col <= rd_col + 1'b1;
          row <= rd_row;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= reading;
      out_last  <= reading && rd_end;
    end
  end

  always_ff @(posedge clk) begin
    out_data <= rd_data_i[rd_col];
  end

endmodule
