// Self-checking test of hwnoc_boot_pro. A random command stream (local MMIO
// accesses, remote requests, bitstream words and waits) is fed in; the two
// channel queues apply random backpressure and a response generator returns
// one response per remote read after a random delay. Checks: each command
// reaches the right port unchanged and exactly once, local read data comes
// back, a wait completes only once enough responses have arrived, and the
// bitstream word counter.
`timescale 1ns/1ps
module tb_hwnoc_boot_pro;
  import hwnoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cio_valid = 1'b0, cio_ready;
  bop_e        cio_op = BOP_LOCAL;
  logic [31:0] cio_word = '0;
  logic        mmio_valid, mmio_we, mmio_rvalid = 1'b0;
  logic [6:0]  mmio_addr;
  logic [23:0] mmio_wdata, mmio_rdata = '0;
  logic        req_valid, req_ready = 1'b0, rsp_valid = 1'b0, rsp_ready;
  logic [31:0] req_data, rsp_data = '0;
  logic        bit_valid, bit_ready = 1'b0;
  logic [31:0] bit_data;
  logic        rsp_out_valid, local_rvalid;
  logic [31:0] rsp_out_data, bits_sent;
  logic [23:0] local_rdata;

  hwnoc_boot_pro dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // local register model, one-cycle read
  always @(posedge clk) begin
    mmio_rvalid <= mmio_valid && !mmio_we;
    mmio_rdata  <= {17'd0, mmio_addr} ^ 24'h5A5A5A;
  end

  int rsp_pending = 0, rsp_arrived = 0, rsp_waited = 0, delay = 0;
  int n_local = 0, n_remote = 0, n_bits = 0, n_wait = 0, n_wait_stall = 0, n_lrd = 0;
  bit taken = 0;
  logic exp_lrd = 1'b0;
  logic [23:0] exp_lrdata;

  always @(negedge clk) begin
    #1;
    if (rst_n) begin
      taken = cio_valid && cio_ready;
      // local read data from the request one cycle earlier
      check(local_rvalid == exp_lrd, "local read valid");
      if (exp_lrd) begin
        check(local_rdata == exp_lrdata, "local read data");
        n_lrd++;
      end
      exp_lrd = 1'b0;
      check(rsp_out_valid == rsp_valid && (!rsp_valid || rsp_out_data == rsp_data),
            "responses observed");
      if (rsp_valid) rsp_arrived++;
      check(mmio_valid == (taken && cio_op == BOP_LOCAL), "local access only for a local command");
      check(req_valid == (cio_valid && cio_op == BOP_REMOTE), "request valid");
      check(bit_valid == (cio_valid && cio_op == BOP_BITS), "bitstream valid");
      if (cio_valid && cio_op == BOP_WAIT) begin
        check(cio_ready == (rsp_arrived - rsp_waited - int'(rsp_valid) >= int'(cio_word[15:0])),
              "wait completes exactly when enough responses have arrived");
        if (!cio_ready) n_wait_stall++;
      end
      if (taken) begin
        case (cio_op)
          BOP_LOCAL: begin
            check(mmio_we == cio_word[31] && mmio_addr == cio_word[30:24] && mmio_wdata == cio_word[23:0],
                  "local MMIO access");
            if (!cio_word[31]) begin
              exp_lrd    = 1'b1;
              exp_lrdata = {17'd0, cio_word[30:24]} ^ 24'h5A5A5A;
            end
            n_local++;
          end
          BOP_REMOTE: begin
            check(req_ready && req_data == cio_word, "remote request word");
            if (!cio_word[31]) rsp_pending++;
            n_remote++;
          end
          BOP_BITS: begin
            check(bit_ready && bit_data == cio_word, "bitstream word");
            n_bits++;
          end
          BOP_WAIT: begin
            rsp_waited += int'(cio_word[15:0]);
            n_wait++;
          end
          default: ;
        endcase
      end
    end
  end

  // response generator and queue backpressure
  int outstanding = 0;
  always @(negedge clk) begin
    req_ready = ($urandom % 3) != 0;
    bit_ready = ($urandom % 4) != 0;
    rsp_valid = 1'b0;
    if (rsp_pending > 0 && ($urandom % 5) == 0) begin
      rsp_valid = 1'b1;
      rsp_data  = $urandom;
      rsp_pending--;
    end
  end

  int reads_sent = 0, waited_for = 0;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      #0.5;
      if (!cio_valid || taken) begin
        int k, n;
        k = $urandom % 10;
        cio_valid = ($urandom % 4) != 0;
        if (k < 2)      begin cio_op = BOP_LOCAL;  cio_word = $urandom; end
        else if (k < 5) begin cio_op = BOP_REMOTE; cio_word = $urandom; end
        else if (k < 9) begin cio_op = BOP_BITS;   cio_word = $urandom; end
        else begin
          // wait for at most the reads sent so far
          n = (reads_sent - waited_for > 0) ? 1 + $urandom % (reads_sent - waited_for) : 0;
          cio_op   = BOP_WAIT;
          cio_word = 32'(n);
        end
        if (cio_valid && cio_op == BOP_REMOTE && !cio_word[31]) reads_sent++;
        if (cio_valid && cio_op == BOP_WAIT) waited_for += int'(cio_word[15:0]);
        if (!cio_valid) begin cio_op = BOP_LOCAL; cio_word = '0; end
      end
    end
    @(negedge clk) cio_valid = 1'b0;
    repeat (5) @(negedge clk);
    check(bits_sent == 32'(n_bits), "bitstream word counter");
    check(n_local > 100 && n_remote > 100 && n_bits > 200 && n_wait > 20 && n_lrd > 20,
          "every command type executed");
    check(n_wait_stall > 0, "a wait had to wait");
    $display("local %0d (reads %0d) remote %0d bits %0d waits %0d wait stalls %0d",
             n_local, n_lrd, n_remote, n_bits, n_wait, n_wait_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
