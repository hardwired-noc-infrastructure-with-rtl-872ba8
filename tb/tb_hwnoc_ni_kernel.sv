// Self-checking test of hwnoc_ni_kernel: two kernels A and B joined by
// one-cycle link registers (standing in for the routers), both programmed
// through their MMIO ports.
//   A ch1 -> B ch1: GT connection in slots 2 and 5 of 8; B ch1 only returns
//                   credits (BE).
//   A ch2 <-> B ch2: BE connection in both directions.
// Checks: register readback, in-order delivery of every word, GT flits
// leaving only in the reserved slots, the GT rate of 2 words per 8 cycles
// with an always-ready consumer, credit stalls while B's consumer is stopped
// (and no RX overflow), and BE flits held while the link is not ready.
`timescale 1ns/1ps
module tb_hwnoc_ni_kernel;
  import hwnoc_pkg::*;
  localparam int NCH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  link_t a_out, b_out, a_in = '0, b_in = '0;
  logic  a_out_rdy = 1'b1, b_out_rdy = 1'b1, a_in_rdy, b_in_rdy;
  logic  [1:0] m_valid = '0, m_we = '0, m_rvalid;
  logic  [1:0][6:0]  m_addr = '0;
  logic  [1:0][23:0] m_wdata = '0, m_rdata;
  logic  [1:0][NCH-1:0] tx_valid = '0, tx_ready, rx_valid, rx_ready = '0;
  logic  [1:0][NCH-1:0][31:0] tx_data = '0, rx_data;
  logic  [1:0][2:0] slot;
  logic  [1:0] sent_gt, sent_be;
  logic  [1:0][NCH-1:0] cstall;

  hwnoc_ni_kernel u_a (
    .clk, .rst_n, .net_out(a_out), .net_out_be_ready(a_out_rdy), .net_in(a_in), .net_in_be_ready(a_in_rdy),
    .mmio_valid(m_valid[0]), .mmio_we(m_we[0]), .mmio_addr(m_addr[0]), .mmio_wdata(m_wdata[0]),
    .mmio_rvalid(m_rvalid[0]), .mmio_rdata(m_rdata[0]),
    .tx_valid(tx_valid[0]), .tx_data(tx_data[0]), .tx_ready(tx_ready[0]),
    .rx_valid(rx_valid[0]), .rx_data(rx_data[0]), .rx_ready(rx_ready[0]),
    .slot(slot[0]), .sent_gt(sent_gt[0]), .sent_be(sent_be[0]), .credit_stall(cstall[0]));
  hwnoc_ni_kernel u_b (
    .clk, .rst_n, .net_out(b_out), .net_out_be_ready(b_out_rdy), .net_in(b_in), .net_in_be_ready(b_in_rdy),
    .mmio_valid(m_valid[1]), .mmio_we(m_we[1]), .mmio_addr(m_addr[1]), .mmio_wdata(m_wdata[1]),
    .mmio_rvalid(m_rvalid[1]), .mmio_rdata(m_rdata[1]),
    .tx_valid(tx_valid[1]), .tx_data(tx_data[1]), .tx_ready(tx_ready[1]),
    .rx_valid(rx_valid[1]), .rx_data(rx_data[1]), .rx_ready(rx_ready[1]),
    .slot(slot[1]), .sent_gt(sent_gt[1]), .sent_be(sent_be[1]), .credit_stall(cstall[1]));

  // link registers
  always @(posedge clk) begin
    b_in <= a_out;
    a_in <= b_out;
  end

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

  task automatic wr(input int n, input logic [6:0] a, input logic [23:0] d);
    @(negedge clk);
    m_valid[n] = 1'b1; m_we[n] = 1'b1; m_addr[n] = a; m_wdata[n] = d;
    @(negedge clk);
    m_valid[n] = 1'b0; m_we[n] = 1'b0;
  endtask

  task automatic rd(input int n, input logic [6:0] a, output logic [23:0] d);
    @(negedge clk);
    m_valid[n] = 1'b1; m_we[n] = 1'b0; m_addr[n] = a;
    @(negedge clk);
    m_valid[n] = 1'b0;
    check(m_rvalid[n], "read data valid one cycle after request");
    d = m_rdata[n];
  endtask

  // ---------------- traffic ----------------
  logic [31:0] exp_q [2][NCH][$];   // [receiver][channel]
  int          n_rx [2][NCH];
  int          n_cstall = 0, n_gt = 0, n_be_hold = 0, bad_slot = 0;
  bit          src_on [2][NCH];
  bit          rx_rand = 1'b1;
  bit          b1_stop = 1'b0;

  // monitor at falling edge + 1: sees what the next rising edge acts on
  always @(negedge clk) begin
    #1;
    if (rst_n) begin
      for (int n = 0; n < 2; n++)
        for (int c = 0; c < NCH; c++) begin
          if (tx_valid[n][c] && tx_ready[n][c]) exp_q[1 - n][c].push_back(tx_data[n][c]);
          if (rx_valid[n][c] && rx_ready[n][c]) begin
            if (exp_q[n][c].size() == 0) check(1'b0, "unexpected word");
            else check(rx_data[n][c] == exp_q[n][c].pop_front(),
                       $sformatf("word order/content at %s ch%0d", n ? "B" : "A", c));
            n_rx[n][c]++;
          end
        end
      if (sent_gt[0]) begin
        n_gt++;
        if (!(slot[0] inside {3'd2, 3'd5})) bad_slot++;
      end
      n_cstall += int'(cstall[0][1]);
      if (a_out_rdy == 1'b0 && !a_out.valid && u_a.can_send[2]) n_be_hold++;
      check(u_b.g_ch[1].rcnt <= 16, "B ch1 RX never above its depth");
    end
  end

  // sources and sinks, driven at the falling edge
  always @(negedge clk) begin
    for (int n = 0; n < 2; n++)
      for (int c = 1; c < 3; c++) begin
        if (!(tx_valid[n][c] && !tx_ready_q[n][c]))   // keep a word not yet taken
          begin
            tx_valid[n][c] = src_on[n][c] && ($urandom % 4 != 0);
            tx_data[n][c]  = $urandom;
          end
        rx_ready[n][c] = rx_rand ? ($urandom % 3 != 0) : 1'b1;
      end
    if (b1_stop) rx_ready[1][1] = 1'b0;
    a_out_rdy = ($urandom % 4) != 0;
  end
  // tx_ready as acted on at the last rising edge
  logic [1:0][NCH-1:0] tx_ready_q = '0;
  always @(negedge clk) begin #1; tx_ready_q = tx_ready; end

  logic [23:0] d;
  int t0, w0;

  initial begin
    for (int n = 0; n < 2; n++) for (int c = 0; c < NCH; c++) begin src_on[n][c] = 0; n_rx[n][c] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    wr(0, REG_CHAN_BASE + 1, chan_word(1'b1, 1'b1, 2'd1, 8'h00, 6'd16));
    wr(0, REG_CHAN_BASE + 2, chan_word(1'b1, 1'b0, 2'd2, 8'h00, 6'd16));
    wr(0, REG_SLOT_BASE + 2, slot_word(1'b1, 2'd1));
    wr(0, REG_SLOT_BASE + 5, slot_word(1'b1, 2'd1));
    wr(1, REG_CHAN_BASE + 1, chan_word(1'b1, 1'b0, 2'd1, 8'h00, 6'd0));
    wr(1, REG_CHAN_BASE + 2, chan_word(1'b1, 1'b0, 2'd2, 8'h00, 6'd16));

    rd(0, REG_CHAN_BASE + 1, d);
    check(d == chan_word(1'b1, 1'b1, 2'd1, 8'h00, 6'd16), "A ch1 readback");
    rd(0, REG_SLOT_BASE + 5, d);
    check(d == slot_word(1'b1, 2'd1), "A slot 5 readback");
    rd(0, REG_SLOT_BASE + 4, d);
    check(d == slot_word(1'b0, 2'd0), "A slot 4 readback");
    rd(1, REG_STATUS, d);
    check(d[2:0] == slot[1] - 3'd1, "status register holds the slot counter");

    // random traffic on all connections
    src_on[0][1] = 1; src_on[0][2] = 1; src_on[1][2] = 1;
    repeat (2000) @(posedge clk);
    // stop B's ch1 consumer: A must stall on credits
    b1_stop = 1'b1;
    repeat (300) @(posedge clk);
    check(n_cstall > 100, $sformatf("credit stall while the consumer is stopped (%0d)", n_cstall));
    b1_stop = 1'b0;
    // rate: consumer always ready, source always valid on the GT channel
    rx_rand = 1'b0;
    src_on[0][2] = 0; src_on[1][2] = 0;
    repeat (100) @(posedge clk);
    t0 = 0; w0 = n_rx[1][1];
    repeat (800) @(posedge clk);
    check(n_rx[1][1] - w0 >= 190 && n_rx[1][1] - w0 <= 210,
          $sformatf("GT rate 2/8: %0d words in 800 cycles", n_rx[1][1] - w0));
    src_on[0][1] = 0;
    repeat (100) @(posedge clk);
    for (int n = 0; n < 2; n++)
      for (int c = 0; c < NCH; c++)
        check(exp_q[n][c].size() == 0, $sformatf("all words delivered to %0d ch%0d", n, c));
    rd(0, REG_CHAN_BASE + 1, d);
    check(d[17:12] == 6'd16, "all A ch1 credits returned");
    check(bad_slot == 0, "GT flits only in reserved slots");
    check(n_gt > 500, "GT flits sent");
    check(n_be_hold > 0, "BE flit held while the link was not ready");
    check(n_rx[0][2] > 100 && n_rx[1][2] > 100, "BE traffic both ways");
    $display("GT %0d, credit stall cycles %0d, BE holds %0d, words B1 %0d A2 %0d B2 %0d",
             n_gt, n_cstall, n_be_hold, n_rx[1][1], n_rx[0][2], n_rx[1][2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
