// Hard NI kernel: connects local channels to one router port of the HWNOC.
//
// Each of NCH channels has a TX queue (words from the local side towards the
// NOC) and an RX queue (words from the NOC towards the local side). A channel
// is one end of a connection; its registers hold the source route (path) to
// the remote NI, the remote channel id, the traffic type (GT or BE) and an
// enable. They are written through the MMIO port, which the boot processor
// drives either locally or, for a remote NI, over the NOC.
//
// Scheduling: a slot counter runs through SLOTS TDMA slots, one per cycle.
// All NI kernels leave reset together, so their counters agree. If the
// current slot is reserved in the slot table for a GT channel that has
// something to send, that channel sends a GT flit. Otherwise the enabled BE
// channels take turns (round-robin), subject to the router's be_ready.
//
// End-to-end credit flow control: a channel may send a data word only while
// its remote credit counter (free space in the remote RX queue) is non-zero.
// When the local side takes a word from an RX queue, one credit is owed to
// the remote sender; owed credits travel in the credit field of the next
// flit of the reverse channel, or in a credit-only flit. Because of this the
// RX queues can never overflow and the kernel always accepts what the
// router delivers (an assertion checks it).
//
// Timing: the outgoing flit (net_out) is combinational from registers; the
// router registers it. MMIO writes take effect at the next clock edge; MMIO
// read data is valid one cycle after the request (mmio_rvalid).
//
// From the design description: MMIO-programmed path, slot allocation and
// GT/BE type per connection, TDMA slot table, credit-based end-to-end flow
// control. Queue depths, the register map and the credit transport are this
// design's choices.
module hwnoc_ni_kernel
  import hwnoc_pkg::*;
#(
  parameter int unsigned NCH      = 4,
  parameter int unsigned SLOTS    = 8,
  parameter int unsigned TX_DEPTH = 4,
  parameter int unsigned RX_DEPTH = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // router side
  output link_t                         net_out,
  input  logic                          net_out_be_ready,
  input  link_t                         net_in,
  output logic                          net_in_be_ready,
  // MMIO register port
  input  logic                          mmio_valid,
  input  logic                          mmio_we,
  input  logic [MMIO_AW-1:0]            mmio_addr,
  input  logic [MMIO_DW-1:0]            mmio_wdata,
  output logic                          mmio_rvalid,
  output logic [MMIO_DW-1:0]            mmio_rdata,
  // local channel side
  input  logic [NCH-1:0]                tx_valid,
  input  logic [NCH-1:0][DATA_W-1:0]    tx_data,
  output logic [NCH-1:0]                tx_ready,
  output logic [NCH-1:0]                rx_valid,
  output logic [NCH-1:0][DATA_W-1:0]    rx_data,
  input  logic [NCH-1:0]                rx_ready,
  // observation
  output logic [$clog2(SLOTS)-1:0]      slot,
  output logic                          sent_gt,       // a GT flit leaves this cycle
  output logic                          sent_be,       // a BE flit leaves this cycle
  output logic [NCH-1:0]                credit_stall   // data waiting, no credits
);
  localparam int unsigned SW = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  localparam int unsigned CW = (NCH > 1) ? $clog2(NCH) : 1;

  typedef struct packed {
    logic [QID_W-1:0] ch;    // channel owning the slot
    logic             rsv;   // slot reserved
  } slot_t;

  chan_cfg_t [NCH-1:0]             cfg;
  slot_t     [SLOTS-1:0]           stab;
  logic      [NCH-1:0][CCNT_W-1:0] rcred;   // remote buffer space
  logic      [NCH-1:0][CCNT_W-1:0] owed;    // credits to return
  logic      [CW-1:0]              be_rr;

  // ---------------- queues ----------------
  logic [NCH-1:0]             txq_empty, txq_full, txq_pop;
  logic [NCH-1:0][DATA_W-1:0] txq_head;
  logic [NCH-1:0]             rxq_empty, rxq_full, rxq_push;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic [$clog2(TX_DEPTH+1)-1:0] tcnt;
    logic [$clog2(RX_DEPTH+1)-1:0] rcnt;
    hwnoc_fifo #(.WIDTH(DATA_W), .DEPTH(TX_DEPTH)) u_txq (
      .clk, .rst_n,
      .push(tx_valid[c] && tx_ready[c]), .wr_data(tx_data[c]),
      .pop(txq_pop[c]), .rd_data(txq_head[c]),
      .full(txq_full[c]), .empty(txq_empty[c]), .count(tcnt));
    assign tx_ready[c] = !txq_full[c];

    hwnoc_fifo #(.WIDTH(DATA_W), .DEPTH(RX_DEPTH)) u_rxq (
      .clk, .rst_n,
      .push(rxq_push[c]), .wr_data(net_in.flit.data),
      .pop(rx_valid[c] && rx_ready[c]), .rd_data(rx_data[c]),
      .full(rxq_full[c]), .empty(rxq_empty[c]), .count(rcnt));
    assign rx_valid[c] = !rxq_empty[c];
  end

  // ---------------- send decision ----------------
  logic [NCH-1:0] has_word, can_send;
  slot_t          cur;
  logic           gt_go, be_go;
  logic [CW-1:0]  be_ch, snd_ch;

  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      has_word[c]     = !txq_empty[c] && (rcred[c] != '0);
      can_send[c]     = cfg[c].en && (has_word[c] || owed[c] != '0);
      credit_stall[c] = cfg[c].en && !txq_empty[c] && (rcred[c] == '0);
    end
    cur   = stab[slot];
    gt_go = cur.rsv && (int'(cur.ch) < NCH) && cfg[CW'(cur.ch)].gt && can_send[CW'(cur.ch)];

    be_go = 1'b0;
    be_ch = '0;
    for (int k = 0; k < NCH; k++) begin
      int unsigned idx;
      idx = (int'(be_rr) + k) % NCH;
      if (!be_go && can_send[idx] && !cfg[idx].gt) begin
        be_go = 1'b1;
        be_ch = CW'(idx);
      end
    end
    be_go = be_go && !gt_go && net_out_be_ready;

    snd_ch = gt_go ? CW'(cur.ch) : be_ch;
    net_out                = '0;
    net_out.valid          = gt_go || be_go;
    net_out.flit.gt        = gt_go;
    net_out.flit.path      = cfg[snd_ch].path;
    net_out.flit.qid       = cfg[snd_ch].rqid;
    net_out.flit.has_data  = has_word[snd_ch];
    net_out.flit.data      = has_word[snd_ch] ? txq_head[snd_ch] : '0;
    net_out.flit.credit    = (owed[snd_ch] > CCNT_W'((1 << CRED_W) - 1))
                             ? CRED_W'((1 << CRED_W) - 1) : CRED_W'(owed[snd_ch]);
    sent_gt = gt_go;
    sent_be = be_go;

    txq_pop = '0;
    if (net_out.valid && has_word[snd_ch]) txq_pop[snd_ch] = 1'b1;

    rxq_push = '0;
    if (net_in.valid && net_in.flit.has_data && int'(net_in.flit.qid) < NCH)
      rxq_push[CW'(net_in.flit.qid)] = 1'b1;
  end

  assign net_in_be_ready = 1'b1;   // credits guarantee RX space

  // ---------------- registers ----------------
  wire mmio_wr = mmio_valid && mmio_we;
  wire wr_chan = mmio_wr && (mmio_addr[6:4] == 3'b000) && (int'(mmio_addr[3:0]) < NCH);
  wire wr_slot = mmio_wr && (mmio_addr[6:4] == 3'b001) && (int'(mmio_addr[3:0]) < SLOTS);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot  <= '0;
      cfg   <= '0;
      stab  <= '0;
      rcred <= '0;
      owed  <= '0;
      be_rr <= '0;
    end else begin
      slot <= (slot == SW'(SLOTS - 1)) ? '0 : slot + 1'b1;
      if (be_go) be_rr <= (be_ch == CW'(NCH - 1)) ? '0 : be_ch + 1'b1;

      for (int c = 0; c < NCH; c++) begin
        logic [CCNT_W-1:0] rc, ow;
        rc = rcred[c];
        ow = owed[c];
        if (net_out.valid && snd_ch == CW'(c)) begin
          if (has_word[c]) rc = rc - 1'b1;
          ow = ow - CCNT_W'(net_out.flit.credit);
        end
        if (net_in.valid && net_in.flit.qid == QID_W'(c))
          rc = rc + CCNT_W'(net_in.flit.credit);
        if (rx_valid[c] && rx_ready[c]) ow = ow + 1'b1;
        if (wr_chan && mmio_addr[3:0] == 4'(c)) begin
          cfg[c] <= mmio_wdata[$bits(chan_cfg_t)-1:0];
          rc     = mmio_wdata[12 +: CCNT_W];
        end
        rcred[c] <= rc;
        owed[c]  <= ow;
      end
      if (wr_slot) stab[mmio_addr[SW-1:0]] <= mmio_wdata[$bits(slot_t)-1:0];
    end
  end

  // MMIO read, one cycle latency
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mmio_rvalid <= 1'b0;
      mmio_rdata  <= '0;
    end else begin
      mmio_rvalid <= mmio_valid && !mmio_we;
      mmio_rdata  <= '0;
      if (mmio_addr[6:4] == 3'b000 && int'(mmio_addr[3:0]) < NCH)
        mmio_rdata <= MMIO_DW'({rcred[mmio_addr[CW-1:0]], cfg[mmio_addr[CW-1:0]]});
      else if (mmio_addr[6:4] == 3'b001 && int'(mmio_addr[3:0]) < SLOTS)
        mmio_rdata <= MMIO_DW'(stab[mmio_addr[SW-1:0]]);
      else if (mmio_addr == REG_STATUS)
        mmio_rdata <= MMIO_DW'(slot);
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n)
      for (int c = 0; c < NCH; c++)
        assert (!(rxq_push[c] && rxq_full[c] && !(rx_valid[c] && rx_ready[c])))
          else $error("hwnoc_ni_kernel: RX queue %0d overflow (credit violation)", c);
  end
endmodule
