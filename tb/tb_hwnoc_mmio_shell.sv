// Self-checking test of hwnoc_mmio_shell. A register-file model answers
// reads one cycle after the request, like the NI kernel. Random writes and
// reads arrive with random gaps while the response side applies random
// backpressure; every write must reach the register port unchanged, and
// every read must come back as {0, address, data} in request order, with the
// shell holding off new requests until the response is taken.
`timescale 1ns/1ps
module tb_hwnoc_mmio_shell;
  import hwnoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        req_valid = 1'b0, req_ready, rsp_valid, rsp_ready = 1'b0;
  logic [31:0] req_data = '0, rsp_data;
  logic        mmio_valid, mmio_we, mmio_rvalid = 1'b0;
  logic [6:0]  mmio_addr;
  logic [23:0] mmio_wdata, mmio_rdata = '0;

  hwnoc_mmio_shell dut (.*);

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

  // register file model
  logic [23:0] regs [128];
  always @(posedge clk) begin
    mmio_rvalid <= mmio_valid && !mmio_we;
    if (mmio_valid && !mmio_we) mmio_rdata <= regs[mmio_addr];
    if (mmio_valid && mmio_we) regs[mmio_addr] <= mmio_wdata;
  end

  logic [31:0] exp_rsp [$];
  logic [23:0] shadow [128];
  int n_wr = 0, n_rd = 0, n_rsp = 0, n_held = 0;
  logic        taken = 1'b0;

  always @(negedge clk) begin
    #1;
    if (rst_n) begin
      taken = req_valid && req_ready;
      if (req_valid && !req_ready) n_held++;
      if (taken) begin
        check(mmio_valid && mmio_we == req_data[31] && mmio_addr == req_data[30:24] &&
              (!req_data[31] || mmio_wdata == req_data[23:0]), "request passed to the register port");
        if (req_data[31]) begin
          shadow[req_data[30:24]] = req_data[23:0];
          n_wr++;
        end else begin
          exp_rsp.push_back({1'b0, req_data[30:24], shadow[req_data[30:24]]});
          n_rd++;
        end
      end else check(!mmio_valid, "no register access without a request");
      if (rsp_valid && rsp_ready) begin
        if (exp_rsp.size() == 0) check(1'b0, "unexpected response");
        else check(rsp_data == exp_rsp.pop_front(), "read response");
        n_rsp++;
      end
    end
  end

  initial begin
    for (int i = 0; i < 128; i++) begin regs[i] = 24'(i * 3); shadow[i] = 24'(i * 3); end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      rsp_ready = ($urandom % 3) != 0;
      if (!req_valid || taken) begin
        req_valid = ($urandom % 3) != 0;
        req_data  = {1'($urandom % 2), 7'($urandom % 16), 24'($urandom)};
      end
    end
    @(negedge clk) req_valid = 1'b0;
    rsp_ready = 1'b1;
    repeat (10) @(posedge clk);
    #2;
    check(exp_rsp.size() == 0, "every read answered");
    check(n_wr > 500 && n_rd > 500, "writes and reads exercised");
    check(n_held > 0, "requests held during a read");
    $display("writes %0d reads %0d responses %0d held %0d", n_wr, n_rd, n_rsp, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
