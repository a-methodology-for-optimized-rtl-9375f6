// tb_mm_pe: unit test of one processing element (N = 4, PE index J = 2).
//
// The element is driven with exactly the streams it sees inside the
// array: b[k][c] of every column passes at relative cycle kN + c + J and
// a[i][k] at kN + N + i + J. Two random matrix pairs follow each other
// without a gap, so the capture of the next B row overlaps the use of the
// current one. Checked: column J of each product, read from the output
// buffer before the next product overwrites it, and the one-cycle
// pass-through of both streams to the right neighbour.
module tb_mm_pe;
  localparam int unsigned N      = 4;
  localparam int unsigned J      = 2;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned ACC_W  = mm_pkg::acc_width(DATA_W, N);
  localparam int unsigned IDX_W  = mm_pkg::idx_width(N);
  localparam int          PAIRS  = 3;
  localparam int          S0     = 2;          // start of pair 0

  logic clk = 1'b0;
  logic rst_n;
  logic                     a_valid_i, a_first_i, a_last_i, b_valid_i;
  logic signed [DATA_W-1:0] a_i, b_i;
  logic [IDX_W-1:0]         a_idx_i, b_col_i, rd_idx_i;
  logic                     a_valid_o, a_first_o, a_last_o, b_valid_o;
  logic signed [DATA_W-1:0] a_o, b_o;
  logic [IDX_W-1:0]         a_idx_o, b_col_o;
  logic signed [ACC_W-1:0]  rd_data_o;

  mm_pe #(.N(N), .DATA_W(DATA_W), .ACC_W(ACC_W), .J(J)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint ma [PAIRS][N][N], mb [PAIRS][N][N], mc [PAIRS][N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // previous-cycle inputs, for the pass-through check
  logic                     pv_av, pv_bv, pv_af, pv_al;
  logic signed [DATA_W-1:0] pv_a, pv_b;
  logic [IDX_W-1:0]         pv_ai, pv_bc;

  initial begin
    for (int p = 0; p < PAIRS; p++) begin
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          ma[p][r][c] = longint'($signed(DATA_W'($urandom)));
          mb[p][r][c] = longint'($signed(DATA_W'($urandom)));
        end
      for (int i = 0; i < N; i++) begin
        mc[p][i] = 0;
        for (int k = 0; k < N; k++) mc[p][i] += ma[p][i][k] * mb[p][k][J];
      end
    end

    {a_valid_i, a_first_i, a_last_i, b_valid_i} = '0;
    {a_i, b_i, a_idx_i, b_col_i, rd_idx_i} = '0;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int cy = 0; cy < S0 + (PAIRS + 1) * int'(N * N) + 4 * int'(N); cy++) begin
      @(negedge clk);
      // pass-through of what was driven in the previous cycle
      if (cy > 0) begin
        check(a_valid_o == pv_av && b_valid_o == pv_bv, "valid pass-through");
        if (pv_av)
          check(a_o == pv_a && a_idx_o == pv_ai && a_first_o == pv_af &&
                a_last_o == pv_al, "A stream pass-through");
        if (pv_bv) check(b_o == pv_b && b_col_o == pv_bc, "B stream pass-through");
      end
      a_valid_i = 1'b0;
      b_valid_i = 1'b0;
      a_i = DATA_W'($urandom);
      b_i = DATA_W'($urandom);
      for (int p = 0; p < PAIRS; p++) begin
        automatic int s  = S0 + p * int'(N * N);
        automatic int tb = cy - s - int'(J);
        automatic int ta = cy - s - int'(J) - int'(N);
        if (tb >= 0 && tb < int'(N * N)) begin
          b_valid_i = 1'b1;
          b_i       = DATA_W'(mb[p][tb / N][tb % N]);
          b_col_i   = IDX_W'(tb % N);
        end
        if (ta >= 0 && ta < int'(N * N)) begin
          a_valid_i = 1'b1;
          a_i       = DATA_W'(ma[p][ta % N][ta / N]);
          a_idx_i   = IDX_W'(ta % N);
          a_first_i = (ta / N == 0);
          a_last_i  = (ta / N == int'(N) - 1);
        end
        // read window: after the last write of pair p, before pair p+1
        // overwrites entry 0
        begin
          automatic int rd = cy - (s + int'(J) + int'(N * N) + int'(N));
          if (rd >= 0 && rd < int'(N)) begin
            rd_idx_i = IDX_W'(rd);
            #1;
            check(longint'(rd_data_o) == mc[p][rd],
                  $sformatf("pair %0d c[%0d][J] = %0d, expected %0d", p, rd,
                            rd_data_o, mc[p][rd]));
          end
        end
      end
      {pv_av, pv_bv, pv_af, pv_al} = {a_valid_i, b_valid_i, a_first_i, a_last_i};
      {pv_a, pv_b, pv_ai, pv_bc}   = {a_i, b_i, a_idx_i, b_col_i};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
