// Boot processor (BPro): programs the NOC and streams bitstreams to the
// configuration functional regions.
//
// It executes a command stream from the configuration IO, one command per
// cycle at most. Each command is an op and a 32-bit word:
//   BOP_LOCAL   the word is an MMIO access to the boot processor's own NI
//               kernel (this is how a channel to a remote NI is opened),
//   BOP_REMOTE  the word is sent on channel 0, the request channel to the
//               MMIO port of the remote NI the channel currently points to,
//   BOP_BITS    the word is sent on channel 1, the configuration connection
//               to the configuration port of the target CFR,
//   BOP_WAIT    wait until word[15:0] responses have come back on channel 0
//               since the last wait (used after a remote read to know that
//               all earlier requests have been applied).
// Every response word is also presented on rsp_out for observation, and
// local register reads appear on local_rvalid/local_rdata.
//
// Handshake: cio_ready is high when the command can be executed this
// cycle: always for BOP_LOCAL, when the channel's TX queue has room for
// BOP_REMOTE and BOP_BITS, and when enough responses have arrived for
// BOP_WAIT.
//
// The programming procedure (open the request channel locally, then set up
// the remote NI including its response channel over that request channel,
// then send the bitstream over a GT connection) follows the design
// description. Implementing the boot processor as a command sequencer fed by
// the configuration IO, and the command format, are this design's choices.
module hwnoc_boot_pro
  import hwnoc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration IO
  input  logic                 cio_valid,
  input  bop_e                 cio_op,
  input  logic [DATA_W-1:0]    cio_word,
  output logic                 cio_ready,
  // local MMIO port of the boot NI kernel
  output logic                 mmio_valid,
  output logic                 mmio_we,
  output logic [MMIO_AW-1:0]   mmio_addr,
  output logic [MMIO_DW-1:0]   mmio_wdata,
  input  logic                 mmio_rvalid,
  input  logic [MMIO_DW-1:0]   mmio_rdata,
  // channel 0: remote MMIO requests and their responses
  output logic                 req_valid,
  output logic [DATA_W-1:0]    req_data,
  input  logic                 req_ready,
  input  logic                 rsp_valid,
  input  logic [DATA_W-1:0]    rsp_data,
  output logic                 rsp_ready,
  // channel 1: bitstream
  output logic                 bit_valid,
  output logic [DATA_W-1:0]    bit_data,
  input  logic                 bit_ready,
  // observation
  output logic                 rsp_out_valid,
  output logic [DATA_W-1:0]    rsp_out_data,
  output logic                 local_rvalid,
  output logic [MMIO_DW-1:0]   local_rdata,
  output logic [31:0]          bits_sent
);
  logic [15:0] rsp_cnt;   // responses received and not yet waited for
  wire  [15:0] wait_n = cio_word[15:0];

  always_comb begin
    unique case (cio_op)
      BOP_LOCAL:  cio_ready = 1'b1;
      BOP_REMOTE: cio_ready = req_ready;
      BOP_BITS:   cio_ready = bit_ready;
      BOP_WAIT:   cio_ready = (rsp_cnt >= wait_n);
      default:    cio_ready = 1'b0;
    endcase
  end

  wire take = cio_valid && cio_ready;

  assign mmio_valid = take && (cio_op == BOP_LOCAL);
  assign mmio_we    = cio_word[31];
  assign mmio_addr  = cio_word[30:24];
  assign mmio_wdata = cio_word[23:0];

  assign req_valid  = cio_valid && (cio_op == BOP_REMOTE);
  assign req_data   = cio_word;
  assign bit_valid  = cio_valid && (cio_op == BOP_BITS);
  assign bit_data   = cio_word;
  assign rsp_ready  = 1'b1;

  assign rsp_out_valid = rsp_valid;
  assign rsp_out_data  = rsp_data;
  assign local_rvalid  = mmio_rvalid;
  assign local_rdata   = mmio_rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rsp_cnt   <= '0;
      bits_sent <= '0;
    end else begin
      rsp_cnt <= rsp_cnt + (rsp_valid ? 16'd1 : 16'd0)
                         - ((take && cio_op == BOP_WAIT) ? wait_n : 16'd0);
      if (take && cio_op == BOP_BITS) bits_sent <= bits_sent + 1'b1;
    end
  end
endmodule
