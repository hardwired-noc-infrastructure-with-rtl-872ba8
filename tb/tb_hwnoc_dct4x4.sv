// Self-checking test of hwnoc_dct4x4 against Y = C X C^T computed by
// explicit matrix products, for hand-made blocks (all zero, DC only, extreme
// residuals) and random 9-bit residual blocks. Also checks the one-cycle
// latency, that the core ignores inputs while its clock is disabled or it is
// held in reset, and that a result is held under output backpressure.
`timescale 1ns/1ps
module tb_hwnoc_dct4x4;
  logic clk = 1'b0, clk_en = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  logic [255:0] in_data = '0, out_data;

  hwnoc_dct4x4 dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cm(input int i, input int j);
    int c [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
    return c[i][j];
  endfunction

  function automatic logic [255:0] ref_dct(input logic [255:0] x);
    int xi [4][4], t [4][4];
    logic [255:0] r;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) xi[i][j] = int'($signed(x[16*(4*i+j) +: 16]));
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += xi[i][k] * cm(j, k);
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int y = 0;
        for (int k = 0; k < 4; k++) y += cm(i, k) * t[k][j];
        r[16*(4*i+j) +: 16] = 16'(y);
      end
    return r;
  endfunction

  function automatic logic [255:0] blk(input int kind);
    logic [255:0] b;
    for (int k = 0; k < 16; k++)
      case (kind)
        0: b[16*k +: 16] = 16'd0;
        1: b[16*k +: 16] = 16'd10;
        2: b[16*k +: 16] = 16'($signed(9'sd255));
        3: b[16*k +: 16] = (k % 2) ? 16'($signed(-9'sd255)) : 16'($signed(9'sd255));
        default: b[16*k +: 16] = 16'($signed(9'($urandom)));
      endcase
    return b;
  endfunction

  logic [255:0] exp_q [$];
  int n_out = 0, n_held = 0;
  bit in_taken = 0;
  int in_cyc [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    #1;
    if (rst_n && clk_en) begin
      in_taken = in_valid && in_ready;
      if (out_valid && out_ready) begin
        if (exp_q.size() == 0) check(1'b0, "unexpected result");
        else check(out_data == exp_q.pop_front(), $sformatf("transform result %0d", n_out));
        n_out++;
      end
      if (out_valid && !out_ready) n_held++;
      if (in_taken) exp_q.push_back(ref_dct(in_data));
    end else in_taken = 0;
  end

  int n = 0;
  initial begin
    repeat (3) @(posedge clk);
    // clock disabled and reset held: nothing is taken
    @(negedge clk);
    in_valid = 1'b1;
    in_data  = blk(1);
    #1 check(!in_ready, "not ready while in reset with the clock off");
    @(negedge clk) clk_en = 1'b1;
    #1 check(!in_ready, "not ready while in reset");
    @(negedge clk) rst_n = 1'b1;
    #1 check(in_ready, "ready once running");
    // one-cycle latency
    @(negedge clk);
    #0.5 check(out_valid && out_data == ref_dct(blk(1)), "result one cycle after the input");
    @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      in_data = blk(k);
      @(negedge clk);
    end
    for (int c = 0; c < 4000; c++) begin
      if (!in_valid || in_taken) begin
        in_valid = ($urandom % 4) != 0;
        in_data  = blk(4);
      end
      out_ready = ($urandom % 4) != 0;
      if (c == 2000) clk_en = 1'b0;   // pause the region clock for a while
      if (c == 2100) clk_en = 1'b1;
      @(negedge clk);
    end
    in_valid  = 1'b0;
    out_ready = 1'b1;
    repeat (5) @(negedge clk);
    check(exp_q.size() == 0, "all results delivered");
    check(n_out > 2000 && n_held > 100, "throughput and backpressure exercised");
    $display("results %0d, held %0d", n_out, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
