// tb_mm_n12: a 12 x 12 matrix product on the linear-array multiplier,
// run two ways side by side.
//  * On the default 16-PE array: A and B are zero-padded to 16 x 16; the
//    top-left 12 x 12 of the result is the product, the rest must be 0.
//    The product takes the full 256-cycle slot.
//  * On an array built with N = 12: the product takes 144 cycles, and
//    the odd size exercises index counters that do not wrap at a power
//    of two.
// Three products are streamed back to back into each array. Checked:
// every result against a product computed here, out_last, and the
// number of cycles between the first results of consecutive products
// (N^2).
module tb_mm_n12;
  localparam int unsigned M      = 12;   // matrix size of the workload
  localparam int unsigned NB     = 16;   // default array
  localparam int unsigned DATA_W = 16;
  localparam int          PAIRS  = 3;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  longint ma [PAIRS][M][M], mb [PAIRS][M][M], mc [PAIRS][M][M];

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---- the two arrays ----
  logic                     v16, v12;
  logic signed [DATA_W-1:0] a16, b16, a12, b12;
  logic                     ov16, ol16, ov12, ol12;
  logic signed [mm_pkg::acc_width(DATA_W, NB)-1:0] od16;
  logic signed [mm_pkg::acc_width(DATA_W, M)-1:0]  od12;

  mm_linear_array u16 (
    .clk, .rst_n, .in_valid(v16), .a_in(a16), .b_in(b16),
    .out_valid(ov16), .out_data(od16), .out_last(ol16));

  mm_linear_array #(.N(M)) u12 (
    .clk, .rst_n, .in_valid(v12), .a_in(a12), .b_in(b12),
    .out_valid(ov12), .out_data(od12), .out_last(ol12));

  function automatic longint elem(input int p, input bit is_b, input int r,
                                  input int c);
    if (r >= int'(M) || c >= int'(M)) return 0;
    return is_b ? mb[p][r][c] : ma[p][r][c];
  endfunction

  initial begin
    for (int p = 0; p < PAIRS; p++) begin
      for (int r = 0; r < int'(M); r++)
        for (int c = 0; c < int'(M); c++) begin
          ma[p][r][c] = longint'($signed(DATA_W'($urandom)));
          mb[p][r][c] = longint'($signed(DATA_W'($urandom)));
        end
      for (int r = 0; r < int'(M); r++)
        for (int c = 0; c < int'(M); c++) begin
          mc[p][r][c] = 0;
          for (int k = 0; k < int'(M); k++) mc[p][r][c] += ma[p][r][k] * mb[p][k][c];
        end
    end
  end

  // drivers: one per array, each streams its products back to back
  initial begin
    rst_n = 1'b0; v16 = 1'b0; a16 = '0; b16 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int p = 0; p < PAIRS; p++)
      for (int t = 0; t < int'(NB * NB); t++) begin
        v16 <= 1'b1;
        a16 <= DATA_W'(elem(p, 1'b0, t % NB, t / NB));
        b16 <= DATA_W'(elem(p, 1'b1, t / NB, t % NB));
        @(posedge clk);
      end
    v16 <= 1'b0;
  end

  initial begin
    v12 = 1'b0; a12 = '0; b12 = '0;
    repeat (4) @(posedge clk);
    for (int p = 0; p < PAIRS; p++)
      for (int t = 0; t < int'(M * M); t++) begin
        v12 <= 1'b1;
        a12 <= DATA_W'(elem(p, 1'b0, t % M, t / M));
        b12 <= DATA_W'(elem(p, 1'b1, t / M, t % M));
        @(posedge clk);
      end
    v12 <= 1'b0;
  end

  // monitors
  int p16 = 0, pos16 = 0, p12 = 0, pos12 = 0;
  longint first16 [PAIRS], first12 [PAIRS];

  always @(posedge clk) begin
    if (rst_n && ov16 && p16 < PAIRS) begin
      automatic int r = pos16 / NB, c = pos16 % NB;
      automatic longint exp = (r < int'(M) && c < int'(M)) ? mc[p16][r][c] : 0;
      if (pos16 == 0) begin
        first16[p16] = cycle;
        if (p16 > 0) check(cycle - first16[p16-1] == longint'(NB * NB), "16-PE product spacing");
      end
      check(longint'(od16) == exp, $sformatf("16-PE pair %0d C[%0d][%0d]=%0d exp %0d", p16, r, c, od16, exp));
      check(ol16 == (pos16 == int'(NB * NB) - 1), "16-PE out_last");
      if (pos16 == int'(NB * NB) - 1) begin pos16 = 0; p16++; end else pos16++;
    end
    if (rst_n && ov12 && p12 < PAIRS) begin
      automatic int r = pos12 / M, c = pos12 % M;
      if (pos12 == 0) begin
        first12[p12] = cycle;
        if (p12 > 0) check(cycle - first12[p12-1] == longint'(M * M), "12-PE product spacing");
      end
      check(longint'(od12) == mc[p12][r][c], $sformatf("12-PE pair %0d C[%0d][%0d]=%0d exp %0d", p12, r, c, od12, mc[p12][r][c]));
      check(ol12 == (pos12 == int'(M * M) - 1), "12-PE out_last");
      if (pos12 == int'(M * M) - 1) begin pos12 = 0; p12++; end else pos12++;
    end
  end

  initial begin
    wait (p16 == PAIRS && p12 == PAIRS);
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((PAIRS + 3) * int'(NB * NB) + 100) @(posedge clk);
    failures++;
    $display("watchdog: %0d / %0d products seen", p16, p12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
