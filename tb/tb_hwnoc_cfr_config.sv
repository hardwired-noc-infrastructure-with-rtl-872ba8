// Self-checking test of hwnoc_cfr_config with a region of 8 frames of 41
// words. Loads 3 frames at frame address 2 at one word per cycle, reads the
// configuration memory back, checks the frame count, that START turns the
// clock on first and releases reset RST_HOLD cycles later, that a frame
// beyond the region and an unknown command set the error flag and write
// nothing, and that SHUT stops the region again.
`timescale 1ns/1ps
module tb_hwnoc_cfr_config;
  import hwnoc_pkg::*;
  localparam int FR = 8, FW = 41, HOLD = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cfg_valid = 1'b0, cfg_ready, ip_clk_en, ip_rst_n, cfg_error, word_written;
  logic [31:0] cfg_data = '0, rb_data;
  logic [15:0] frames_loaded;
  logic [$clog2(FR*FW)-1:0] rb_addr = '0;

  hwnoc_cfr_config #(.FRAMES(FR), .FRAME_WORDS(FW), .RST_HOLD(HOLD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_written = 0;
  always @(negedge clk) begin
    #1;
    if (rst_n && word_written) n_written++;
  end

  task automatic send(input logic [31:0] w);
    @(negedge clk);
    cfg_valid = 1'b1;
    cfg_data  = w;
    #1 check(cfg_ready, "configuration port always ready");
  endtask

  task automatic idle();
    @(negedge clk) cfg_valid = 1'b0;
  endtask

  function automatic logic [31:0] dw(input int i);
    return 32'(i) * 32'h01000193 + 32'h5bd1e995;
  endfunction

  int t0;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(!ip_clk_en && !ip_rst_n && !cfg_error, "region held after reset");
    send({CFG_FAR, 12'd0, 16'd2});
    send({CFG_FDRI, 12'd0, 16'd3});
    t0 = n_written;
    for (int i = 0; i < 3 * FW; i++) send(dw(i));
    idle();
    check(n_written - t0 == 3 * FW, "one word stored per cycle");
    check(frames_loaded == 16'd3, "three frames loaded");
    check(!ip_clk_en, "clock still off before START");
    for (int i = 0; i < 3 * FW; i++) begin
      @(negedge clk) rb_addr = ($clog2(FR*FW))'(2 * FW + i);
      @(negedge clk) check(rb_data == dw(i), $sformatf("readback word %0d", i));
    end
    send({CFG_START, 28'd0});
    idle();
    #1 check(ip_clk_en && !ip_rst_n, "START: clock on, reset still held");
    repeat (HOLD - 1) @(negedge clk);
    #1 check(ip_clk_en && !ip_rst_n, "reset held for RST_HOLD cycles");
    @(negedge clk);
    #1 check(ip_clk_en && ip_rst_n, "reset released after RST_HOLD cycles");
    check(!cfg_error, "no error so far");
    // frames 7 (inside) and 8 (outside)
    send({CFG_FAR, 12'd0, 16'd7});
    send({CFG_FDRI, 12'd0, 16'd2});
    t0 = n_written;
    for (int i = 0; i < 2 * FW; i++) send(~dw(i));
    idle();
    check(n_written - t0 == FW, "frame outside the region dropped");
    check(frames_loaded == 16'd4, "frame count after the partial load");
    check(cfg_error, "error flag for a frame outside the region");
    @(negedge clk) rb_addr = ($clog2(FR*FW))'(7 * FW + FW - 1);
    @(negedge clk) check(rb_data == ~dw(FW - 1), "last word of frame 7");
    send({CFG_SHUT, 28'd0});
    idle();
    #1 check(!ip_clk_en && !ip_rst_n, "SHUT stops the region");
    // unknown command after a fresh reset
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    #1 check(!cfg_error && frames_loaded == 16'd0, "reset clears status");
    send({4'h3, 28'd0});
    idle();
    #1 check(cfg_error, "error flag for an unknown command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
