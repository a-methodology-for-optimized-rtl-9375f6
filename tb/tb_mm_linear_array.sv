// tb_mm_linear_array: end-to-end test of the linear-array matrix
// multiplier at its default size (N = 16, 16-bit elements).
//
// A stream of matrix pairs is fed in the element order the interface defines: some
// pairs back to back, some after idle gaps, random values as well as
// full-scale extremes. Expected products are computed here with 64-bit
// integer arithmetic. Checked: every C element, the out_last marker, the
// latency of the first result (N^2 + N + 2 cycles) and that each product
// leaves in N^2 consecutive cycles. The test also counts how often each
// mechanism of the design occurred - read-out of one product overlapping
// the input of the next, a pair following the previous one without a
// gap, a pair after an idle gap, a full-scale pair - and fails if one
// never did.
module tb_mm_linear_array;
  import mm_pkg::*;

  localparam int unsigned N      = MM_N;
  localparam int unsigned DATA_W = MM_DATA_W;
  localparam int unsigned ACC_W  = acc_width(DATA_W, N);
  localparam int          PAIRS  = 8;
  localparam int          LAT    = N * N + N + 2;

  logic                     clk = 1'b0;
  logic                     rst_n;
  logic                     in_valid;
  logic signed [DATA_W-1:0] a_in, b_in;
  logic                     out_valid;
  logic signed [ACC_W-1:0]  out_data;
  logic                     out_last;

  mm_linear_array dut (
    .clk, .rst_n, .in_valid, .a_in, .b_in, .out_valid, .out_data, .out_last
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  longint mat_a [PAIRS][N][N];
  longint mat_b [PAIRS][N][N];
  longint mat_c [PAIRS][N][N];
  longint start_cycle [PAIRS];
  int     gap_before  [PAIRS];
  int     kind        [PAIRS];   // 0 random, 1 all minimum, 2 max x min

  // mechanism counters
  int n_overlap = 0, n_back_to_back = 0, n_after_gap = 0, n_full_scale = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic longint rnd_elem();
    return longint'($signed(DATA_W'($urandom)));
  endfunction

  // Build the workload and the reference products.
  initial begin
    for (int p = 0; p < PAIRS; p++) begin
      gap_before[p] = (p % 3 == 2) ? 5 + p : 0;
      kind[p]       = (p == 3) ? 1 : (p == 4) ? 2 : 0;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          case (kind[p])
            1: begin
              mat_a[p][r][c] = -(64'sd1 <<< (DATA_W - 1));
              mat_b[p][r][c] = -(64'sd1 <<< (DATA_W - 1));
            end
            2: begin
              mat_a[p][r][c] = (64'sd1 <<< (DATA_W - 1)) - 1;
              mat_b[p][r][c] = -(64'sd1 <<< (DATA_W - 1));
            end
            default: begin
              mat_a[p][r][c] = rnd_elem();
              mat_b[p][r][c] = rnd_elem();
            end
          endcase
        end
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          mat_c[p][r][c] = 0;
          for (int k = 0; k < N; k++)
            mat_c[p][r][c] += mat_a[p][r][k] * mat_b[p][k][c];
        end
    end
  end

  // Driver.
  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    a_in     = '0;
    b_in     = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int p = 0; p < PAIRS; p++) begin
      repeat (gap_before[p]) begin
        in_valid <= 1'b0;
        a_in     <= DATA_W'($urandom);
        b_in     <= DATA_W'($urandom);
        @(posedge clk);
      end
      if (p > 0 && gap_before[p] == 0) n_back_to_back++;
      if (p > 0 && gap_before[p] != 0) n_after_gap++;
      if (kind[p] != 0) n_full_scale++;
      for (int t = 0; t < int'(N * N); t++) begin
        if (t == 0) start_cycle[p] = cycle;
        in_valid <= 1'b1;
        a_in     <= DATA_W'(mat_a[p][t % N][t / N]);
        b_in     <= DATA_W'(mat_b[p][t / N][t % N]);
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
  end

  // Monitor.
  int  out_pair = 0, out_pos = 0;
  bit  done = 1'b0;
  longint first_out_cycle;

  always @(posedge clk) begin
    if (rst_n && in_valid && out_valid) n_overlap++;
    if (rst_n && out_valid && !done) begin
      automatic int r = out_pos / N;
      automatic int c = out_pos % N;
      if (out_pos == 0) begin
        first_out_cycle = cycle;
        // start_cycle is the cycle whose edge samples the first input
        check(cycle - start_cycle[out_pair] == longint'(LAT) + 1,
              $sformatf("pair %0d latency %0d, expected %0d", out_pair,
                        cycle - start_cycle[out_pair] - 1, LAT));
      end else begin
        check(cycle - first_out_cycle == longint'(out_pos),
              $sformatf("pair %0d result %0d not contiguous", out_pair, out_pos));
      end
      check(longint'(out_data) == mat_c[out_pair][r][c],
            $sformatf("pair %0d C[%0d][%0d] = %0d, expected %0d",
                      out_pair, r, c, out_data, mat_c[out_pair][r][c]));
      check(out_last == (out_pos == int'(N * N) - 1),
            $sformatf("pair %0d out_last wrong at %0d", out_pair, out_pos));
      if (out_pos == int'(N * N) - 1) begin
        out_pos = 0;
        out_pair++;
        if (out_pair == PAIRS) done = 1'b1;
      end else begin
        out_pos++;
      end
    end
  end

  // End of test.
  initial begin
    wait (done);
    repeat (4 * N) @(posedge clk);
    check(!out_valid, "extra output after the last product");
    check(n_overlap > 0,      "read-out never overlapped the next input");
    check(n_back_to_back > 0, "no back-to-back pair");
    check(n_after_gap > 0,    "no pair after an idle gap");
    check(n_full_scale > 0,   "no full-scale pair");
    $display("mechanisms: overlap_cycles=%0d back_to_back=%0d after_gap=%0d full_scale=%0d",
             n_overlap, n_back_to_back, n_after_gap, n_full_scale);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat ((PAIRS + 2) * (N * N + 64) + 200) @(posedge clk);
    failures++;
    $display("watchdog: results of %0d pairs seen", out_pair);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
