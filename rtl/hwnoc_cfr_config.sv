// Configuration port and internal configuration logic of one configuration
// functional region (CFR).
//
// Bitstream words arrive from the NI kernel's configuration channel, one per
// cycle at most. The logic decodes a small command set (see hwnoc_pkg):
// FAR sets the frame address, FDRI announces N frames whose FRAME_WORDS data
// words follow and are written into the region's configuration memory
// (frame address advancing after each frame), START enables the region's
// clock and, RST_HOLD cycles later, releases its reset, and SHUT stops the
// clock and resets the region again so that it can be reconfigured.
// A frame address outside the region, or an unknown command, sets the sticky
// error flag; such frames are dropped.
//
// The configuration memory is an array of FRAMES*FRAME_WORDS 32-bit words
// with a readback port (one cycle read latency). Its contents stand for the
// region's configuration frames; what the frames configure (LUTs, switch
// boxes) is the FPGA fabric and is not modelled.
//
// From the design description: the configuration port attached to the NI
// kernel that receives the frames and forwards them to their locations, the
// clock activation and reset at the end of configuration, and 41-word
// frames. The command words, the region size (FRAMES) and RST_HOLD are this
// design's choices.
module hwnoc_cfr_config
  import hwnoc_pkg::*;
#(
  parameter int unsigned FRAMES      = 256,
  parameter int unsigned FRAME_WORDS = 41,
  parameter int unsigned RST_HOLD    = 2
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  // configuration port (from the NI kernel)
  input  logic                                        cfg_valid,
  input  logic [DATA_W-1:0]                           cfg_data,
  output logic                                        cfg_ready,
  // region control
  output logic                                        ip_clk_en,
  output logic                                        ip_rst_n,
  // status
  output logic [15:0]                                 frames_loaded,
  output logic                                        cfg_error,
  output logic                                        word_written,  // a frame word is stored this cycle
  // readback of the configuration memory
  input  logic [$clog2(FRAMES*FRAME_WORDS)-1:0]       rb_addr,
  output logic [DATA_W-1:0]                           rb_data
);
  localparam int unsigned MW = FRAMES * FRAME_WORDS;
  localparam int unsigned AW = $clog2(MW);
  localparam int unsigned WW = $clog2(FRAME_WORDS);

  logic [DATA_W-1:0] mem [MW];

  logic [15:0]   far;        // current frame address
  logic [15:0]   frames_left;
  logic [WW-1:0] widx;       // word index inside the frame
  logic [AW-1:0] waddr;      // memory address of the next word
  logic          in_data;    // inside an FDRI data block
  logic [$clog2(RST_HOLD+1)-1:0] hold;

  assign cfg_ready = 1'b1;
  wire take     = cfg_valid && cfg_ready;
  wire [3:0] op = cfg_data[31:28];
  wire frame_ok = (int'(far) < FRAMES);
  assign word_written = take && in_data && frame_ok;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      far           <= '0;
      frames_left   <= '0;
      widx          <= '0;
      waddr         <= '0;
      in_data       <= 1'b0;
      frames_loaded <= '0;
      cfg_error     <= 1'b0;
      ip_clk_en     <= 1'b0;
      ip_rst_n      <= 1'b0;
      hold          <= '0;
    end else begin
      // reset release after the clock has run RST_HOLD cycles (a command
      // taken in the same cycle overrides this)
      if (ip_clk_en && !ip_rst_n && hold != '0) begin
        hold <= hold - 1'b1;
        if (hold == 1) ip_rst_n <= 1'b1;
      end
      if (take) begin
        if (in_data) begin
          if (!frame_ok) cfg_error <= 1'b1;
          if (widx == WW'(FRAME_WORDS - 1)) begin
            widx        <= '0;
            far         <= far + 1'b1;
            waddr       <= AW'((int'(far) + 1) * FRAME_WORDS);
            frames_left <= frames_left - 1'b1;
            if (frame_ok) frames_loaded <= frames_loaded + 1'b1;
            if (frames_left == 16'd1) in_data <= 1'b0;
          end else begin
            widx  <= widx + 1'b1;
            waddr <= waddr + 1'b1;
          end
        end else begin
          case (op)
            CFG_FAR: begin
              far   <= cfg_data[15:0];
              waddr <= AW'(int'(cfg_data[15:0]) * FRAME_WORDS);
              widx  <= '0;
            end
            CFG_FDRI: begin
              frames_left <= cfg_data[15:0];
              in_data     <= (cfg_data[15:0] != 16'd0);
              widx        <= '0;
            end
            CFG_START: begin
              ip_clk_en <= 1'b1;
              ip_rst_n  <= 1'b0;
              hold      <= ($clog2(RST_HOLD+1))'(RST_HOLD);
            end
            CFG_SHUT: begin
              ip_clk_en <= 1'b0;
              ip_rst_n  <= 1'b0;
              hold      <= '0;
            end
            default: cfg_error <= 1'b1;
          endcase
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (word_written) mem[waddr] <= cfg_data;
    rb_data <= mem[rb_addr];
  end
endmodule
