// tb_mm_collector: unit test of the output sequencer (N = 4).
//
// The PEs' read ports are modelled by a function of the row index, the
// PE number and the current cycle, so every value identifies where and
// when it was read. Read-outs are started back to back,
// after a gap, and the start marker is imitated by elements that must not
// start one (not last pass, or row index not 0). Checked: N*N results in
// row-major order, starting one cycle after the start marker and in
// consecutive cycles, out_last on the last one, and no output otherwise.
module tb_mm_collector;
  localparam int unsigned N     = 4;
  localparam int unsigned ACC_W = 32;
  localparam int unsigned IDX_W = mm_pkg::idx_width(N);

  logic clk = 1'b0;
  logic rst_n;
  logic                    done_valid_i, done_last_i;
  logic [IDX_W-1:0]        done_idx_i, rd_idx_o;
  logic signed [ACC_W-1:0] rd_data_i [N];
  logic                    out_valid, out_last;
  logic signed [ACC_W-1:0] out_data;

  mm_collector #(.N(N), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  int epoch = 0;   // cycle number, set by the stimulus
  always_comb
    for (int j = 0; j < int'(N); j++)
      rd_data_i[j] = ACC_W'(epoch * 1000 + int'(rd_idx_o) * 10 + j);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // starts[] : cycles at which a real start marker is presented
  localparam int NS = 3;
  int starts [NS] = '{3, 3 + N * N, 3 + 2 * N * N + 5};

  initial begin
    automatic int active = -1;
    automatic int pos = 0;
    done_valid_i = 1'b0; done_last_i = 1'b0; done_idx_i = '0;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cy = 0; cy < starts[NS-1] + int'(N * N) + 10; cy++) begin
      @(negedge clk);
      // outputs of the read performed in the previous cycle
      if (active >= 0) begin
        check(out_valid, $sformatf("out_valid missing at %0d", cy));
        check(out_data == ACC_W'((cy - 1) * 1000 + (pos / N) * 10 + pos % N),
              $sformatf("read-out %0d result %0d = %0d", active, pos, out_data));
        check(out_last == (pos == int'(N * N) - 1), "out_last");
        if (pos == int'(N * N) - 1) active = -1;
        else pos++;
      end else begin
        check(!out_valid, $sformatf("unexpected output at %0d", cy));
      end
      // stimulus for this cycle
      done_valid_i = 1'b0; done_last_i = 1'b0; done_idx_i = '0;
      epoch = cy;
      for (int s = 0; s < NS; s++)
        if (cy == starts[s]) begin
          done_valid_i = 1'b1; done_last_i = 1'b1; done_idx_i = '0;
          active = s; pos = 0;
        end
      if (cy == starts[NS-1] - 3) begin   // last pass but not row 0
        done_valid_i = 1'b1; done_last_i = 1'b1; done_idx_i = IDX_W'(1);
      end
      if (cy == starts[NS-1] - 2) begin   // row 0 but not last pass
        done_valid_i = 1'b1; done_last_i = 1'b0; done_idx_i = '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
