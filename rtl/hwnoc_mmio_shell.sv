// Remote MMIO access of an NI kernel over the NOC.
//
// The words arriving on the NI's programming channel (channel 0) are MMIO
// accesses in the package's MMIO word layout. A write is applied to the
// kernel's registers and needs no answer. A read is applied, the register
// value returned one cycle later is packed into a response word
// {1'b0, address, data}, and sent back on the same channel, whose path the
// boot processor sets up with its first writes.
//
// Handshake: one request word is taken per cycle while idle; during a read
// the shell holds off further requests until the response has been accepted
// by the TX queue, so responses keep the request order.
//
// The request/response channel pair used for programming follows the design
// description; the word format and the posted writes are this design's
// choices.
module hwnoc_mmio_shell
  import hwnoc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // requests from the NOC (RX of the programming channel)
  input  logic                 req_valid,
  input  logic [DATA_W-1:0]    req_data,
  output logic                 req_ready,
  // responses to the NOC (TX of the programming channel)
  output logic                 rsp_valid,
  output logic [DATA_W-1:0]    rsp_data,
  input  logic                 rsp_ready,
  // MMIO port of the NI kernel
  output logic                 mmio_valid,
  output logic                 mmio_we,
  output logic [MMIO_AW-1:0]   mmio_addr,
  output logic [MMIO_DW-1:0]   mmio_wdata,
  input  logic                 mmio_rvalid,
  input  logic [MMIO_DW-1:0]   mmio_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_SEND} state_e;
  state_e             state;
  logic [MMIO_AW-1:0] raddr;

  assign req_ready  = (state == S_IDLE);
  assign mmio_valid = req_valid && req_ready;
  assign mmio_we    = req_data[31];
  assign mmio_addr  = req_data[30:24];
  assign mmio_wdata = req_data[23:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      raddr     <= '0;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
    end else begin
      case (state)
        S_IDLE: if (mmio_valid && !mmio_we) begin
          state <= S_READ;
          raddr <= mmio_addr;
        end
        S_READ: if (mmio_rvalid) begin
          rsp_valid <= 1'b1;
          rsp_data  <= mmio_word(1'b0, raddr, mmio_rdata);
          state     <= S_SEND;
        end
        S_SEND: if (rsp_ready) begin
          rsp_valid <= 1'b0;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
