// End-to-end test of the HWNOC FPGA at its default sizes.
//
// The configuration IO is driven with a complete boot sequence:
//   1. the boot NI's own channel 0 is pointed at each CFR NI in turn, and
//      that NI is programmed over the NOC (its response channel first), then
//      read back; the response is awaited and compared;
//   2. configuration only: the bitstream of one DCT instance (176 frames of
//      41 words) is sent to CFR2 on a GT connection owning all 8 slots,
//      followed by START; the transfer time is measured;
//   3. pipelined configuration and execution: the same bitstream is sent to
//      CFR1 on 3 of 8 slots while the data processor (played by this
//      testbench) streams 4x4 blocks to the running IP1 over GT connections
//      and to the not yet configured IP2 over a BE connection, which stalls
//      on credits until CFR1 is started; all transform results are compared
//      with a reference model;
//   4. IP1 and IP2 are reprogrammed into a chain DPro -> IP1 -> IP2 -> DPro
//      and blocks are passed through both transforms;
//   5. CFR0 is configured with a few frames and started, CFR1 is shut down.
// Checks: register readback, frame count and readback of the configuration
// memory, every transform result, the configuration times (one word per
// cycle when all slots are owned, and a ratio of 8/3 when 3 of 8 are), and
// that every mechanism occurred at least once.
`timescale 1ns/1ps
module tb_hwnoc_top;
  import hwnoc_pkg::*;

  localparam int unsigned FRAMES_DCT = 176;
  localparam int unsigned FW         = 41;
  localparam int unsigned NWORDS     = FRAMES_DCT * FW;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;   // 250 MHz

  logic              cio_valid = 1'b0, cio_ready;
  bop_e              cio_op = BOP_LOCAL;
  logic [31:0]       cio_word = '0;
  logic              bpro_rsp_valid, bpro_local_rvalid;
  logic [31:0]       bpro_rsp_data, bpro_bits_sent;
  logic [23:0]       bpro_local_rdata;
  logic [1:0]        dpro_tx_valid = '0, dpro_tx_ready, dpro_rx_valid, dpro_rx_ready;
  logic [1:0][31:0]  dpro_tx_data = '0, dpro_rx_data;
  logic [2:0]        cfr_clk_en, cfr_rst_n, cfr_error, cfr_word_written;
  logic [2:0][15:0]  cfr_frames;
  logic [13:0]       cfr_rb_addr = '0;
  logic [2:1]        cfr_ip_fwd = '0;
  logic [2:0][31:0]  cfr_rb_data;
  logic [3:0]        ni_sent_gt, ni_sent_be;
  logic [3:0][3:0]   ni_credit_stall;
  logic [3:0][2:0]   router_be_blocked;
  logic [3:0][2:0]   ni_slot;

  assign dpro_rx_ready = 2'b11;

  hwnoc_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- event counters ----------------
  longint cyc = 0;
  int n_gt = 0, n_be = 0, n_cstall = 0, n_blocked = 0, n_words = 0;
  int n_rsp = 0, n_local_rd = 0, n_start = 0, n_shut = 0;
  logic [2:0] clk_en_q = '0;
  logic [31:0] last_rsp = '0;
  always @(posedge clk) cyc <= cyc + 1;

  // Monitors sample 1 ns after the falling edge: inputs driven by this
  // testbench change only at the falling edge, so what is seen here is what
  // the next rising edge acts on.
  always @(negedge clk) begin
    #1;
    n_gt      = n_gt + $countones(ni_sent_gt);
    n_be      = n_be + $countones(ni_sent_be);
    n_cstall  = n_cstall + $countones(ni_credit_stall);
    n_blocked = n_blocked + $countones(router_be_blocked);
    n_words   = n_words + $countones(cfr_word_written);
    n_rsp     = n_rsp + int'(bpro_rsp_valid);
    if (bpro_rsp_valid) last_rsp = bpro_rsp_data;
    n_local_rd = n_local_rd + int'(bpro_local_rvalid);
    n_start   = n_start + $countones(cfr_clk_en & ~clk_en_q);
    n_shut    = n_shut + $countones(~cfr_clk_en & clk_en_q);
    clk_en_q  = cfr_clk_en;
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- helpers ----------------
  // Inputs change at the falling edge; the transfer happens at the next
  // rising edge at which ready is high.
  task automatic cmd(input bop_e op, input logic [31:0] w);
    @(negedge clk);
    cio_valid = 1'b1;
    cio_op    = op;
    cio_word  = w;
    #1;
    while (!cio_ready) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #0.5 cio_valid = 1'b0;
  endtask

  task automatic local_wr(input logic [6:0] a, input logic [23:0] d);
    cmd(BOP_LOCAL, mmio_word(1'b1, a, d));
  endtask

  task automatic remote_wr(input logic [6:0] a, input logic [23:0] d);
    cmd(BOP_REMOTE, mmio_word(1'b1, a, d));
  endtask

  // read a local register of the boot NI
  task automatic local_rd(input logic [6:0] a, output logic [23:0] d);
    cmd(BOP_LOCAL, mmio_word(1'b0, a, '0));
    @(negedge clk);
    d = bpro_local_rdata;
  endtask

  function automatic logic [31:0] bit_word(input int i, input int seed);
    logic [31:0] h;
    h = 32'(i) * 32'h9E3779B1 ^ 32'(seed) * 32'h85EBCA6B;
    return h ^ (h >> 13);
  endfunction

  // wait until the boot NI has all 16 credits of a channel back
  task automatic wait_credits(input int ch);
    logic [23:0] d;
    do begin
      local_rd(7'(ch), d);
    end while (d[17:12] != 6'd16);
  endtask

  // send one DCT bitstream and START, return cycles from first data word
  // accepted to last word stored
  task automatic load_bitstream(input int cfr, input int seed, output longint cycles);
    longint t0;
    int w0;
    cmd(BOP_BITS, {CFG_FAR, 28'd0});
    cmd(BOP_BITS, {CFG_FDRI, 12'd0, 16'(FRAMES_DCT)});
    w0 = n_words;
    for (int i = 0; i < NWORDS; i++) begin
      cmd(BOP_BITS, bit_word(i, seed));
      if (i == 0) t0 = cyc;
    end
    cmd(BOP_BITS, {CFG_START, 28'd0});
    while (n_words - w0 < NWORDS) @(posedge clk);
    cycles = cyc - t0;
  endtask

  // ---------------- reference transform ----------------
  function automatic logic [255:0] ref_dct(input logic [255:0] x);
    int xi [4][4], t [4][4], y [4][4];
    logic [255:0] r;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        xi[i][j] = int'($signed(x[16*(4*i+j) +: 16]));
    // Y = C X C^T, written out as matrix products
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += xi[i][k] * cm(j, k);
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        y[i][j] = 0;
        for (int k = 0; k < 4; k++) y[i][j] += cm(i, k) * t[k][j];
        r[16*(4*i+j) +: 16] = 16'(y[i][j]);
      end
    return r;
  endfunction

  function automatic int cm(input int i, input int j);
    int c [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
    return c[i][j];
  endfunction

  function automatic logic [255:0] rand_block();
    logic [255:0] b;
    for (int k = 0; k < 16; k++) b[16*k +: 16] = 16'($signed(9'($urandom)));
    return b;
  endfunction

  // ---------------- data processor model ----------------
  logic [255:0] exp_q [2][$];
  int           sent_blocks [2] = '{0, 0};
  int           got_blocks [2]  = '{0, 0};
  logic [255:0] rx_acc [2];
  int           rx_cnt [2] = '{0, 0};
  bit           dpro_run [2] = '{0, 0};

  // chain = 1: the block passes IP1 and then IP2, the result returns on
  // channel 3
  task automatic dpro_send_block(input int j, input bit chain = 1'b0);
    logic [255:0] b;
    b = rand_block();
    if (chain) exp_q[1].push_back(ref_dct(ref_dct(b)));
    else       exp_q[j].push_back(ref_dct(b));
    for (int w = 0; w < 8; w++) begin
      @(negedge clk);
      dpro_tx_valid[j] = 1'b1;
      dpro_tx_data[j]  = b[32*w +: 32];
      #1;
      while (!dpro_tx_ready[j]) begin
        @(negedge clk);
        #1;
      end
      @(posedge clk);
      #0.5 dpro_tx_valid[j] = 1'b0;
    end
    sent_blocks[j]++;
  endtask

  always @(negedge clk) begin
    #1;
    for (int j = 0; j < 2; j++)
      if (dpro_rx_valid[j]) begin
        rx_acc[j][32*rx_cnt[j] +: 32] = dpro_rx_data[j];
        if (rx_cnt[j] == 7) begin
          logic [255:0] e;
          rx_cnt[j] = 0;
          got_blocks[j]++;
          if (exp_q[j].size() == 0) check(1'b0, $sformatf("unexpected block on DPro channel %0d", 2 + j));
          else begin
            e = exp_q[j].pop_front();
            check(rx_acc[j] == e, $sformatf("DCT result, DPro channel %0d block %0d", 2 + j, got_blocks[j]));
          end
        end else rx_cnt[j]++;
      end
  end

  // ---------------- boot sequence ----------------
  // node 0 = R3 (boot), 1 = R4 (CFR0/DPro), 2 = R6 (CFR1/IP2), 3 = R5 (CFR2/IP1)
  // path fields, low first: 1 = horizontal, 2 = vertical, 0 = local
  localparam logic [7:0] P_TO   [1:3] = '{8'h01, 8'h06, 8'h02};
  localparam logic [7:0] P_BACK [1:3] = '{8'h01, 8'h09, 8'h02};

  // point the boot NI's request channel at node k and wait until the
  // requests queued by body() have been applied
  task automatic remote_done();
    cmd(BOP_REMOTE, mmio_word(1'b0, REG_CHAN_BASE + 0, '0));
    cmd(BOP_WAIT, 32'd1);
    wait_credits(0);
  endtask

  longint t_cfg_only, t_pipe;
  int chain_before;
  int blk_before;

  initial begin
    repeat (5) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // program every CFR NI over the NOC
    for (int k = 1; k <= 3; k++) begin
      local_wr(REG_CHAN_BASE + 0, chan_word(1'b1, 1'b0, 2'd0, P_TO[k], 6'd16));
      remote_wr(REG_CHAN_BASE + 0, chan_word(1'b1, 1'b0, 2'd0, P_BACK[k], 6'd16));
      remote_wr(REG_CHAN_BASE + 1, chan_word(1'b1, 1'b0, 2'd1, P_BACK[k], 6'd0));
      case (k)
        1: begin  // DPro: ch2 -> IP1 (GT), ch3 -> IP2 (BE)
          remote_wr(REG_CHAN_BASE + 2, chan_word(1'b1, 1'b1, 2'd2, 8'h09, 6'd16));
          remote_wr(REG_CHAN_BASE + 3, chan_word(1'b1, 1'b0, 2'd2, 8'h02, 6'd16));
          for (int s = 0; s < 8; s++)
            remote_wr(REG_SLOT_BASE + 7'(s), slot_word(s inside {0, 1, 3, 4, 6}, 2'd2));
        end
        2: remote_wr(REG_CHAN_BASE + 2, chan_word(1'b1, 1'b0, 2'd3, 8'h02, 6'd16));  // IP2 -> DPro ch3, BE
        3: begin  // IP1 -> DPro ch2, GT in every slot
          remote_wr(REG_CHAN_BASE + 2, chan_word(1'b1, 1'b1, 2'd2, 8'h06, 6'd16));
          for (int s = 0; s < 8; s++) remote_wr(REG_SLOT_BASE + 7'(s), slot_word(1'b1, 2'd2));
        end
        default: ;
      endcase
      cmd(BOP_REMOTE, mmio_word(1'b0, REG_CHAN_BASE + 0, '0));
      cmd(BOP_WAIT, 32'd1);
      @(negedge clk);
      check(last_rsp == {1'b0, REG_CHAN_BASE + 7'd0, 6'd0, 6'd16, 1'b1, 1'b0, 2'd0, P_BACK[k]},
            $sformatf("readback of NI %0d channel 0: %h", k, last_rsp));
      $display("NI %0d programmed at cycle %0d", k, cyc);
      wait_credits(0);
    end

    // ---- configuration only: CFR2 (IP1), all slots ----
    local_wr(REG_CHAN_BASE + 1, chan_word(1'b1, 1'b1, 2'd1, P_TO[3], 6'd16));
    for (int s = 0; s < 8; s++) local_wr(REG_SLOT_BASE + 7'(s), slot_word(1'b1, 2'd1));
    load_bitstream(2, 1, t_cfg_only);
    $display("configuration only: %0d words in %0d cycles (%0d ns at 250 MHz)",
             NWORDS, t_cfg_only, t_cfg_only * 4);
    check(t_cfg_only <= NWORDS + 8, $sformatf("config-only throughput: %0d cycles", t_cfg_only));
    repeat (10) @(posedge clk);
    check(cfr_frames[2] == 16'(FRAMES_DCT), "CFR2 frame count");
    check(cfr_clk_en[2] && cfr_rst_n[2], "CFR2 started");
    check(!cfr_clk_en[1] && !cfr_rst_n[1], "CFR1 still held");
    for (int i = 0; i < NWORDS; i += 997) begin
      cfr_rb_addr = 14'(i);
      @(posedge clk); @(posedge clk);
      check(cfr_rb_data[2] == bit_word(i, 1), $sformatf("CFR2 config memory word %0d", i));
    end
    wait_credits(1);

    // ---- pipelined configuration (CFR1, slots 0,3,6) and execution ----
    local_wr(REG_CHAN_BASE + 1, chan_word(1'b1, 1'b1, 2'd1, P_TO[2], 6'd16));
    for (int s = 0; s < 8; s++) local_wr(REG_SLOT_BASE + 7'(s), slot_word(s inside {0, 3, 6}, 2'd1));
    dpro_run[0] = 1;
    dpro_run[1] = 1;
    fork
      while (dpro_run[0]) dpro_send_block(0);
      begin
        repeat (6) dpro_send_block(1);   // more than IP2 can hold before it runs
      end
      begin
        load_bitstream(1, 2, t_pipe);
        dpro_run[0] = 0;
      end
    join
    $display("pipelined configuration and execution: %0d words in %0d cycles (%0d ns), ratio %0.3f",
             NWORDS, t_pipe, t_pipe * 4, real'(t_pipe) / real'(t_cfg_only));
    check(real'(t_pipe) / real'(t_cfg_only) > 2.55 && real'(t_pipe) / real'(t_cfg_only) < 2.75,
          "pipelined/config-only time ratio near 8/3");
    blk_before = got_blocks[0];
    repeat (300) @(posedge clk);
    check(got_blocks[0] == sent_blocks[0] && exp_q[0].size() == 0, "all IP1 blocks returned");
    check(got_blocks[1] == sent_blocks[1] && exp_q[1].size() == 0, "all IP2 blocks returned");
    check(sent_blocks[0] >= 100, $sformatf("IP1 executed %0d blocks during configuration", sent_blocks[0]));
    check(cfr_frames[1] == 16'(FRAMES_DCT), "CFR1 frame count");
    cfr_rb_addr = 14'(NWORDS - 1);
    @(posedge clk); @(posedge clk);
    check(cfr_rb_data[1] == bit_word(NWORDS - 1, 2), "CFR1 last config word");

    // ---- processing chain: DPro -> IP1 -> IP2 -> DPro ----
    // IP1 (node 3): channel 3 to IP2 channel 2
    local_wr(REG_CHAN_BASE + 0, chan_word(1'b1, 1'b0, 2'd0, P_TO[3], 6'd16));
    remote_wr(REG_CHAN_BASE + 3, chan_word(1'b1, 1'b0, 2'd2, 8'h01, 6'd16));
    remote_done();
    // IP2 (node 2): channel 2 returns credits to IP1 channel 3, channel 3 to DPro channel 3
    local_wr(REG_CHAN_BASE + 0, chan_word(1'b1, 1'b0, 2'd0, P_TO[2], 6'd16));
    remote_wr(REG_CHAN_BASE + 2, chan_word(1'b1, 1'b0, 2'd3, 8'h01, 6'd0));
    remote_wr(REG_CHAN_BASE + 3, chan_word(1'b1, 1'b0, 2'd3, 8'h02, 6'd16));
    remote_done();
    // DPro (node 1): channel 3 returns credits to IP2 channel 3
    local_wr(REG_CHAN_BASE + 0, chan_word(1'b1, 1'b0, 2'd0, P_TO[1], 6'd16));
    remote_wr(REG_CHAN_BASE + 3, chan_word(1'b1, 1'b0, 2'd3, 8'h02, 6'd0));
    remote_done();
    cfr_ip_fwd = 2'b11;
    chain_before = got_blocks[1];
    repeat (40) dpro_send_block(0, 1'b1);
    repeat (300) @(posedge clk);
    check(got_blocks[1] - chain_before == 40 && exp_q[1].size() == 0,
          $sformatf("40 blocks through the IP1 -> IP2 chain (%0d)", got_blocks[1] - chain_before));
    cfr_ip_fwd = 2'b00;

    // ---- configure CFR0 (the DPro region) with 4 frames ----
    wait_credits(1);
    local_wr(REG_CHAN_BASE + 1, chan_word(1'b1, 1'b1, 2'd1, P_TO[1], 6'd16));
    cmd(BOP_BITS, {CFG_FAR, 28'd0});
    cmd(BOP_BITS, {CFG_FDRI, 12'd0, 16'd4});
    for (int i = 0; i < 4 * FW; i++) cmd(BOP_BITS, bit_word(i, 3));
    cmd(BOP_BITS, {CFG_START, 28'd0});
    repeat (40) @(posedge clk);
    check(cfr_frames[0] == 16'd4 && cfr_clk_en[0] && cfr_rst_n[0], "CFR0 configured and started");
    wait_credits(1);
    local_wr(REG_CHAN_BASE + 1, chan_word(1'b1, 1'b1, 2'd1, P_TO[2], 6'd16));

    // ---- shut CFR1 down ----
    cmd(BOP_BITS, {CFG_SHUT, 28'd0});
    repeat (20) @(posedge clk);
    check(!cfr_clk_en[1] && !cfr_rst_n[1], "CFR1 shut down");
    check(cfr_error == 3'b000, "no configuration errors");
    check(bpro_bits_sent == 32'(2 * (NWORDS + 3) + (4 * FW + 3) + 1), "bitstream word count");

    // ---- every mechanism happened ----
    $display("events: GT flits %0d, BE flits %0d, credit stalls %0d, BE blocked by GT %0d, frame words %0d, responses %0d, local reads %0d, starts %0d, shutdowns %0d, IP1 blocks %0d, IP2 blocks %0d",
             n_gt, n_be, n_cstall, n_blocked, n_words, n_rsp, n_local_rd, n_start, n_shut, got_blocks[0], got_blocks[1]);
    check(n_gt > 0, "GT traffic occurred");
    check(n_be > 0, "BE traffic occurred");
    check(n_cstall > 0, "credit stall occurred");
    check(n_blocked > 0, "BE flit held back by GT flit occurred");
    check(n_words == 2 * NWORDS + 4 * FW, "all frame words stored");
    check(n_rsp == 6, "remote read responses");
    check(n_local_rd > 0, "local register reads");
    check(n_start == 3, "three regions started");
    check(n_shut == 1, "one region shut down");
    check(got_blocks[0] > 0 && got_blocks[1] > 0, "both IPs executed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
