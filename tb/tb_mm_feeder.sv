// tb_mm_feeder: unit test of the input sequencer (N = 4).
//
// Matrix pairs are fed back to back and after idle gaps. For every input
// cycle the test records the elements and the index they must carry
// (position p = t % N, pass k = t / N within the pair). Checked: the B
// stream leaves one cycle later tagged with column p; the A stream leaves
// N + 1 cycles later tagged with row p and with first (k == 0) and last
// (k == N-1) flags; valid outputs appear exactly in those cycles.
module tb_mm_feeder;
  localparam int unsigned N      = 4;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned IDX_W  = mm_pkg::idx_width(N);
  localparam int          CYCLES = 200;

  logic clk = 1'b0;
  logic rst_n;
  logic                     in_valid;
  logic signed [DATA_W-1:0] a_in, b_in;
  logic                     a_valid_o, a_first_o, a_last_o, b_valid_o;
  logic signed [DATA_W-1:0] a_o, b_o;
  logic [IDX_W-1:0]         a_idx_o, b_col_o;

  mm_feeder #(.N(N), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  bit                       h_v   [CYCLES];
  logic signed [DATA_W-1:0] h_a   [CYCLES], h_b [CYCLES];
  int                       h_t   [CYCLES];
  int n_pairs = 0;

  initial begin
    automatic int t = 0;       // element index inside the current pair
    automatic int gap = 0;
    rst_n = 1'b0;
    in_valid = 1'b0; a_in = '0; b_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cy = 0; cy < CYCLES; cy++) begin
      @(negedge clk);
      // check the outputs produced by earlier cycles
      if (cy >= 1) begin
        check(b_valid_o == h_v[cy-1], $sformatf("b_valid at %0d", cy));
        if (h_v[cy-1])
          check(b_o == h_b[cy-1] && b_col_o == IDX_W'(h_t[cy-1] % N),
                $sformatf("B element at %0d", cy));
      end
      if (cy >= int'(N) + 1) begin
        automatic int c0 = cy - int'(N) - 1;
        check(a_valid_o == h_v[c0], $sformatf("a_valid at %0d", cy));
        if (h_v[c0])
          check(a_o == h_a[c0] && a_idx_o == IDX_W'(h_t[c0] % N) &&
                a_first_o == (h_t[c0] / N == 0) &&
                a_last_o == (h_t[c0] / N == int'(N) - 1),
                $sformatf("A element at %0d", cy));
      end
      // drive: a pair once started runs to its end; gaps only between pairs
      if (t == 0 && gap > 0) begin
        in_valid = 1'b0;
        gap--;
      end else begin
        in_valid = 1'b1;
      end
      a_in = DATA_W'($urandom);
      b_in = DATA_W'($urandom);
      h_v[cy] = in_valid;
      h_a[cy] = a_in;
      h_b[cy] = b_in;
      h_t[cy] = t;
      if (in_valid) begin
        if (t == int'(N * N) - 1) begin
          t = 0;
          n_pairs++;
          gap = (n_pairs % 2 == 1) ? 3 : 0;
        end else begin
          t++;
        end
      end
    end
    check(n_pairs >= 4, "too few pairs driven");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
