// FPGA with a hardwired NOC (HWNOC) that carries both configuration and
// functional data.
//
// Four hard routers form a 2x2 mesh: R3 and R4 on the bottom row, R6 and R5
// on the top row (R3-R4 and R6-R5 horizontal links, R3-R5 and R4-R6
// vertical links). Each router has one NI kernel on its local port:
//   node 0, R3: the boot processor (BPro), fed by the configuration IO,
//   node 1, R4: CFR0, holding the data processor (DPro),
//   node 2, R6: CFR1, holding DCT instance IP2,
//   node 3, R5: CFR2, holding DCT instance IP1.
// Router ports: 0 local NI, 1 horizontal neighbour, 2 vertical neighbour.
//
// Every CFR NI kernel uses channel 0 for remote MMIO programming (through
// hwnoc_mmio_shell), channel 1 as the configuration connection feeding the
// region's configuration port (hwnoc_cfr_config), and channel 2 for
// functional data. In CFR1 and CFR2, channel 2 goes through a soft NI shell
// to a DCT core that runs only once its region has been configured and
// started. Its results go back on channel 2, or, when cfr_ip_fwd is set for
// the region (a static setting of the soft shell), on channel 3 to the next
// IP of a processing chain. The DPro is a soft processor in CFR0 and is not part of this
// RTL: the functional channels 2 and 3 of its NI kernel (by convention
// connected to IP1 and IP2) are brought out as ports, as are CFR0's clock
// enable and reset. The boot NI's channel 0 carries remote MMIO requests and
// responses, channel 1 the bitstream.
//
// Nothing is programmed at reset: the boot processor first writes its own
// NI's registers, then programs every other NI over the NOC, then loads
// bitstreams, all driven by the configuration IO command stream (see
// hwnoc_boot_pro). All NI kernels leave reset in the same cycle, so their
// TDMA slot counters are aligned.
//
// The topology, the node roles and the unified configuration/functional
// interconnect come from the design description; channel assignment, ports
// and everything inside the blocks are this design's choices.
module hwnoc_top
  import hwnoc_pkg::*;
#(
  parameter int unsigned SLOTS       = 8,
  parameter int unsigned RX_DEPTH    = 16,
  parameter int unsigned TX_DEPTH    = 4,
  parameter int unsigned CFR_FRAMES  = 256,
  parameter int unsigned FRAME_WORDS = 41
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // configuration IO of the boot processor
  input  logic                               cio_valid,
  input  bop_e                               cio_op,
  input  logic [DATA_W-1:0]                  cio_word,
  output logic                               cio_ready,
  output logic                               bpro_rsp_valid,
  output logic [DATA_W-1:0]                  bpro_rsp_data,
  output logic                               bpro_local_rvalid,
  output logic [MMIO_DW-1:0]                 bpro_local_rdata,
  output logic [31:0]                        bpro_bits_sent,
  // DPro (CFR0) functional channels: [0] = NI channel 2, [1] = NI channel 3
  input  logic [1:0]                         dpro_tx_valid,
  input  logic [1:0][DATA_W-1:0]             dpro_tx_data,
  output logic [1:0]                         dpro_tx_ready,
  output logic [1:0]                         dpro_rx_valid,
  output logic [1:0][DATA_W-1:0]             dpro_rx_data,
  input  logic [1:0]                         dpro_rx_ready,
  // configuration functional regions, index = CFR number
  output logic [2:0]                         cfr_clk_en,
  output logic [2:0]                         cfr_rst_n,
  output logic [2:0][15:0]                   cfr_frames,
  output logic [2:0]                         cfr_error,
  input  logic [2:1]                         cfr_ip_fwd,   // IP result to NI channel 3 (next IP) instead of 2
  input  logic [$clog2(CFR_FRAMES*FRAME_WORDS)-1:0] cfr_rb_addr,
  output logic [2:0][DATA_W-1:0]             cfr_rb_data,
  // activity, one bit per event and cycle (node index as above)
  output logic [3:0]                         ni_sent_gt,       // GT flit injected
  output logic [3:0]                         ni_sent_be,       // BE flit injected
  output logic [3:0][3:0]                    ni_credit_stall,  // [node][channel] data but no credits
  output logic [3:0][2:0]                    router_be_blocked,// [node][output] BE waits for GT
  output logic [3:0][$clog2(SLOTS)-1:0]      ni_slot,          // current TDMA slot
  output logic [2:0]                         cfr_word_written  // frame word stored in CFR
);
  localparam int unsigned NN  = 4;   // nodes
  localparam int unsigned NP  = 3;   // router ports
  localparam int unsigned NCH = 4;   // channels per NI kernel

  // ---------------- mesh ----------------
  link_t [NN-1:0][NP-1:0] rin, rout;
  logic  [NN-1:0][NP-1:0] rin_rdy, rout_rdy;
  link_t [NN-1:0]         ni_out, ni_in;
  logic  [NN-1:0]         ni_out_rdy, ni_in_rdy;

  for (genvar n = 0; n < NN; n++) begin : g_node
    // horizontal neighbour n^1, vertical neighbour n^3
    assign rin[n][0]      = ni_out[n];
    assign ni_out_rdy[n]  = rin_rdy[n][0];
    assign ni_in[n]       = rout[n][0];
    assign rout_rdy[n][0] = ni_in_rdy[n];
    assign rin[n][1]      = rout[n ^ 1][1];
    assign rout_rdy[n][1] = rin_rdy[n ^ 1][1];
    assign rin[n][2]      = rout[n ^ 3][2];
    assign rout_rdy[n][2] = rin_rdy[n ^ 3][2];

    hwnoc_router #(.NPORTS(NP)) u_router (
      .clk, .rst_n,
      .in_link(rin[n]), .in_be_ready(rin_rdy[n]),
      .out_link(rout[n]), .out_be_ready(rout_rdy[n]),
      .be_blocked(router_be_blocked[n]));
  end

  // ---------------- NI kernels ----------------
  logic [NN-1:0]                       k_mmio_valid, k_mmio_we, k_mmio_rvalid;
  logic [NN-1:0][MMIO_AW-1:0]          k_mmio_addr;
  logic [NN-1:0][MMIO_DW-1:0]          k_mmio_wdata, k_mmio_rdata;
  logic [NN-1:0][NCH-1:0]              k_tx_valid, k_tx_ready, k_rx_valid, k_rx_ready;
  logic [NN-1:0][NCH-1:0][DATA_W-1:0]  k_tx_data, k_rx_data;

  for (genvar n = 0; n < NN; n++) begin : g_ni
    hwnoc_ni_kernel #(.NCH(NCH), .SLOTS(SLOTS), .TX_DEPTH(TX_DEPTH), .RX_DEPTH(RX_DEPTH)) u_ni (
      .clk, .rst_n,
      .net_out(ni_out[n]), .net_out_be_ready(ni_out_rdy[n]),
      .net_in(ni_in[n]),   .net_in_be_ready(ni_in_rdy[n]),
      .mmio_valid(k_mmio_valid[n]), .mmio_we(k_mmio_we[n]),
      .mmio_addr(k_mmio_addr[n]), .mmio_wdata(k_mmio_wdata[n]),
      .mmio_rvalid(k_mmio_rvalid[n]), .mmio_rdata(k_mmio_rdata[n]),
      .tx_valid(k_tx_valid[n]), .tx_data(k_tx_data[n]), .tx_ready(k_tx_ready[n]),
      .rx_valid(k_rx_valid[n]), .rx_data(k_rx_data[n]), .rx_ready(k_rx_ready[n]),
      .slot(ni_slot[n]), .sent_gt(ni_sent_gt[n]), .sent_be(ni_sent_be[n]),
      .credit_stall(ni_credit_stall[n]));
  end

  // ---------------- node 0: boot processor ----------------
  hwnoc_boot_pro u_bpro (
    .clk, .rst_n,
    .cio_valid, .cio_op, .cio_word, .cio_ready,
    .mmio_valid(k_mmio_valid[0]), .mmio_we(k_mmio_we[0]),
    .mmio_addr(k_mmio_addr[0]), .mmio_wdata(k_mmio_wdata[0]),
    .mmio_rvalid(k_mmio_rvalid[0]), .mmio_rdata(k_mmio_rdata[0]),
    .req_valid(k_tx_valid[0][0]), .req_data(k_tx_data[0][0]), .req_ready(k_tx_ready[0][0]),
    .rsp_valid(k_rx_valid[0][0]), .rsp_data(k_rx_data[0][0]), .rsp_ready(k_rx_ready[0][0]),
    .bit_valid(k_tx_valid[0][1]), .bit_data(k_tx_data[0][1]), .bit_ready(k_tx_ready[0][1]),
    .rsp_out_valid(bpro_rsp_valid), .rsp_out_data(bpro_rsp_data),
    .local_rvalid(bpro_local_rvalid), .local_rdata(bpro_local_rdata),
    .bits_sent(bpro_bits_sent));
  // channel 1 only returns credits; channels 2 and 3 are unused at the boot NI
  assign k_rx_ready[0][1]   = 1'b1;
  assign k_tx_valid[0][2]   = 1'b0;
  assign k_tx_data[0][2]    = '0;
  assign k_rx_ready[0][2]   = 1'b1;
  assign k_tx_valid[0][3]   = 1'b0;
  assign k_tx_data[0][3]    = '0;
  assign k_rx_ready[0][3]   = 1'b1;

  // ---------------- nodes 1..3: configuration functional regions ----------------
  for (genvar r = 0; r < 3; r++) begin : g_cfr
    localparam int unsigned N = r + 1;

    hwnoc_mmio_shell u_mmio (
      .clk, .rst_n,
      .req_valid(k_rx_valid[N][0]), .req_data(k_rx_data[N][0]), .req_ready(k_rx_ready[N][0]),
      .rsp_valid(k_tx_valid[N][0]), .rsp_data(k_tx_data[N][0]), .rsp_ready(k_tx_ready[N][0]),
      .mmio_valid(k_mmio_valid[N]), .mmio_we(k_mmio_we[N]),
      .mmio_addr(k_mmio_addr[N]), .mmio_wdata(k_mmio_wdata[N]),
      .mmio_rvalid(k_mmio_rvalid[N]), .mmio_rdata(k_mmio_rdata[N]));

    hwnoc_cfr_config #(.FRAMES(CFR_FRAMES), .FRAME_WORDS(FRAME_WORDS)) u_cfg (
      .clk, .rst_n,
      .cfg_valid(k_rx_valid[N][1]), .cfg_data(k_rx_data[N][1]), .cfg_ready(k_rx_ready[N][1]),
      .ip_clk_en(cfr_clk_en[r]), .ip_rst_n(cfr_rst_n[r]),
      .frames_loaded(cfr_frames[r]), .cfg_error(cfr_error[r]),
      .word_written(cfr_word_written[r]),
      .rb_addr(cfr_rb_addr), .rb_data(cfr_rb_data[r]));
    assign k_tx_valid[N][1] = 1'b0;   // configuration channel sends credits only
    assign k_tx_data[N][1]  = '0;
  end

  // CFR0: DPro channels to the ports
  for (genvar j = 0; j < 2; j++) begin : g_dpro
    assign k_tx_valid[1][2+j] = dpro_tx_valid[j];
    assign k_tx_data[1][2+j]  = dpro_tx_data[j];
    assign dpro_tx_ready[j]   = k_tx_ready[1][2+j];
    assign dpro_rx_valid[j]   = k_rx_valid[1][2+j];
    assign dpro_rx_data[j]    = k_rx_data[1][2+j];
    assign k_rx_ready[1][2+j] = dpro_rx_ready[j];
  end

  // CFR1 (IP2) and CFR2 (IP1): NI shell and DCT core on channel 2
  for (genvar r = 1; r < 3; r++) begin : g_ip
    localparam int unsigned N = r + 1;
    logic         in_v, in_r, out_v, out_r;
    logic [255:0] in_d, out_d;

    logic         sh_tx_v;
    logic [31:0]  sh_tx_d;

    hwnoc_ni_shell #(.IN_WORDS(8), .OUT_WORDS(8)) u_shell (
      .clk, .rst_n,
      .rx_valid(k_rx_valid[N][2]), .rx_data(k_rx_data[N][2]), .rx_ready(k_rx_ready[N][2]),
      .tx_valid(sh_tx_v), .tx_data(sh_tx_d),
      .tx_ready(cfr_ip_fwd[r] ? k_tx_ready[N][3] : k_tx_ready[N][2]),
      .ip_in_valid(in_v), .ip_in_data(in_d), .ip_in_ready(in_r),
      .ip_out_valid(out_v), .ip_out_data(out_d), .ip_out_ready(out_r));

    hwnoc_dct4x4 u_dct (
      .clk, .clk_en(cfr_clk_en[r]), .rst_n(cfr_rst_n[r]),
      .in_valid(in_v), .in_data(in_d), .in_ready(in_r),
      .out_valid(out_v), .out_data(out_d), .out_ready(out_r));

    // results go back on channel 2 (to the sender) or on channel 3 (to the next IP)
    assign k_tx_valid[N][2] = sh_tx_v && !cfr_ip_fwd[r];
    assign k_tx_data[N][2]  = sh_tx_d;
    assign k_tx_valid[N][3] = sh_tx_v && cfr_ip_fwd[r];
    assign k_tx_data[N][3]  = sh_tx_d;
    assign k_rx_ready[N][3] = 1'b1;   // channel 3 receives only credits
  end
endmodule
