// Self-checking test of hwnoc_ni_shell (8 words in, 8 words out). Random
// word streams with random gaps are collected into 256-bit input vectors
// under random IP backpressure, and random 256-bit result vectors are split
// into words under random NOC backpressure; both sides are checked against
// scoreboards, and a full input vector must be presented the cycle after
// its last word.
`timescale 1ns/1ps
module tb_hwnoc_ni_shell;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         rx_valid = 1'b0, rx_ready, tx_valid, tx_ready = 1'b0;
  logic [31:0]  rx_data = '0, tx_data;
  logic         ip_in_valid, ip_in_ready = 1'b0, ip_out_valid = 1'b0, ip_out_ready;
  logic [255:0] ip_in_data, ip_out_data = '0;

  hwnoc_ni_shell #(.IN_WORDS(8), .OUT_WORDS(8)) dut (.*);

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

  logic [255:0] in_acc, in_exp [$];
  logic [31:0]  out_exp [$];
  int           in_cnt = 0, n_in = 0, n_out = 0;
  bit           rx_taken = 0, out_taken = 0, last_word = 0;

  always @(negedge clk) begin
    #1;
    if (rst_n) begin
      if (last_word) check(ip_in_valid, "input vector valid right after its last word");
      last_word = 0;
      rx_taken  = rx_valid && rx_ready;
      out_taken = ip_out_valid && ip_out_ready;
      if (rx_taken) begin
        in_acc[32*in_cnt +: 32] = rx_data;
        if (in_cnt == 7) begin
          in_exp.push_back(in_acc);
          in_cnt    = 0;
          last_word = 1;
        end else in_cnt++;
      end
      if (ip_in_valid && ip_in_ready) begin
        if (in_exp.size() == 0) check(1'b0, "unexpected input vector");
        else check(ip_in_data == in_exp.pop_front(), "input vector");
        n_in++;
      end
      if (out_taken) for (int w = 0; w < 8; w++) out_exp.push_back(ip_out_data[32*w +: 32]);
      if (tx_valid && tx_ready) begin
        if (out_exp.size() == 0) check(1'b0, "unexpected output word");
        else check(tx_data == out_exp.pop_front(), "output word");
        n_out++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      ip_in_ready = ($urandom % 3) == 0;
      tx_ready    = ($urandom % 3) != 0;
      if (!rx_valid || rx_taken) begin
        rx_valid = ($urandom % 2) != 0;
        rx_data  = $urandom;
      end
      if (!ip_out_valid || out_taken) begin
        ip_out_valid = ($urandom % 8) == 0;
        for (int w = 0; w < 8; w++) ip_out_data[32*w +: 32] = $urandom;
      end
    end
    @(negedge clk);
    rx_valid = 1'b0; ip_out_valid = 1'b0; ip_in_ready = 1'b1; tx_ready = 1'b1;
    repeat (20) @(posedge clk);
    #2;
    check(in_exp.size() == 0 && out_exp.size() == 0, "nothing left behind");
    check(n_in > 100 && n_out > 1000, "both directions exercised");
    $display("input vectors %0d, output words %0d", n_in, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
