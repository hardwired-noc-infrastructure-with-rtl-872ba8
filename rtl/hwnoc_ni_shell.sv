// Soft NI shell: adapts the word stream of an NI kernel channel to the
// parallel ports of an IP datapath.
//
// Towards the IP, the shell collects IN_WORDS consecutive 32-bit words into
// one wide input vector (first word in the lowest bits) and offers it with a
// valid/ready handshake. Towards the NOC, it takes one wide result vector
// from the IP and sends it as OUT_WORDS words, lowest first. Both directions
// run independently, so a new input can be collected while a result is
// being sent.
//
// Timing: a word is accepted per cycle while the input register is not full;
// the input vector is valid the cycle after its last word arrived. A result
// leaves at one word per cycle while the kernel's TX queue has room.
//
// The shell's role (conversion between the NOC stream and the IP's inputs
// and outputs, valid/ready link-level handshake) follows the design
// description; the packing order and the block-wide transfers are this
// design's choices.
module hwnoc_ni_shell
  import hwnoc_pkg::*;
#(
  parameter int unsigned IN_WORDS  = 8,
  parameter int unsigned OUT_WORDS = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // NOC side
  input  logic                          rx_valid,
  input  logic [DATA_W-1:0]             rx_data,
  output logic                          rx_ready,
  output logic                          tx_valid,
  output logic [DATA_W-1:0]             tx_data,
  input  logic                          tx_ready,
  // IP side
  output logic                          ip_in_valid,
  output logic [IN_WORDS*DATA_W-1:0]    ip_in_data,
  input  logic                          ip_in_ready,
  input  logic                          ip_out_valid,
  input  logic [OUT_WORDS*DATA_W-1:0]   ip_out_data,
  output logic                          ip_out_ready
);
  localparam int unsigned IW = (IN_WORDS  > 1) ? $clog2(IN_WORDS)  : 1;
  localparam int unsigned OW = (OUT_WORDS > 1) ? $clog2(OUT_WORDS) : 1;

  // ---------------- NOC -> IP ----------------
  logic [IW-1:0] in_cnt;
  assign rx_ready = !ip_in_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_cnt      <= '0;
      ip_in_valid <= 1'b0;
      ip_in_data  <= '0;
    end else begin
      if (ip_in_valid && ip_in_ready) ip_in_valid <= 1'b0;
      if (rx_valid && rx_ready) begin
        ip_in_data[in_cnt*DATA_W +: DATA_W] <= rx_data;
        if (in_cnt == IW'(IN_WORDS - 1)) begin
          in_cnt      <= '0;
          ip_in_valid <= 1'b1;
        end else begin
          in_cnt <= in_cnt + 1'b1;
        end
      end
    end
  end

  // ---------------- IP -> NOC ----------------
  logic [OUT_WORDS*DATA_W-1:0] out_buf;
  logic [OW-1:0]               out_cnt;
  logic                        out_busy;

  assign ip_out_ready = !out_busy;
  assign tx_valid     = out_busy;
  assign tx_data      = out_buf[out_cnt*DATA_W +: DATA_W];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_busy <= 1'b0;
      out_cnt  <= '0;
      out_buf  <= '0;
    end else if (!out_busy) begin
      if (ip_out_valid) begin
        out_buf  <= ip_out_data;
        out_busy <= 1'b1;
        out_cnt  <= '0;
      end
    end else if (tx_ready) begin
      if (out_cnt == OW'(OUT_WORDS - 1)) out_busy <= 1'b0;
      else                               out_cnt  <= out_cnt + 1'b1;
    end
  end
endmodule
