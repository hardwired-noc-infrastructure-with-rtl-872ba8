// 4x4 forward integer transform of the H.264 encoder ("DCT" IP core), the
// IP that is configured into and executed in a CFR.
//
// Computes Y = C * X * C^T with C = [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1]
// on a 4x4 block of residual samples, using the usual butterflies (row pass,
// then column pass), and registers the 16 coefficients.
// Samples and coefficients are signed 16-bit, element (r,c) at bit offset
// 16*(4r+c). Residuals of up to 9 bits give coefficients that fit in 16 bits.
//
// Handshake: valid/ready on both sides; one block is held in the output
// register until it is taken. Latency: one cycle. The core only advances
// while clk_en is high, and rst_n (driven by the region's configuration
// logic) clears it synchronously.
//
// The design names the DCT module of an H.264 encoder as its IP; the
// transform is the standard H.264 forward core transform, and the packing
// and handshake are this design's choices.
module hwnoc_dct4x4 (
  input  logic         clk,
  input  logic         clk_en,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [255:0] in_data,
  output logic         in_ready,
  output logic         out_valid,
  output logic [255:0] out_data,
  input  logic         out_ready
);
  typedef logic signed [19:0] wide_t;

  function automatic void bfly(input wide_t x0, input wide_t x1,
                               input wide_t x2, input wide_t x3,
                               output wide_t y0, output wide_t y1,
                               output wide_t y2, output wide_t y3);
    wide_t a, b, c, d;
    a  = x0 + x3;
    b  = x1 + x2;
    c  = x1 - x2;
    d  = x0 - x3;
    y0 = a + b;
    y1 = (d <<< 1) + c;
    y2 = a - b;
    y3 = d - (c <<< 1);
  endfunction

  wide_t x [4][4];
  wide_t t [4][4];
  wide_t y [4][4];
  logic [255:0] coef;
  logic         full_q;   // output register holds a block

  // the block is offered only while the region's clock runs
  assign out_valid = full_q && clk_en;

  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        x[r][c] = wide_t'($signed(in_data[16*(4*r+c) +: 16]));
    for (int r = 0; r < 4; r++)
      bfly(x[r][0], x[r][1], x[r][2], x[r][3], t[r][0], t[r][1], t[r][2], t[r][3]);
    for (int c = 0; c < 4; c++)
      bfly(t[0][c], t[1][c], t[2][c], t[3][c], y[0][c], y[1][c], y[2][c], y[3][c]);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        coef[16*(4*r+c) +: 16] = y[r][c][15:0];
  end

  assign in_ready = clk_en && rst_n && (!full_q || out_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full_q    <= 1'b0;
      out_data  <= '0;
    end else if (clk_en) begin
      if (full_q && out_ready) full_q <= 1'b0;
      if (in_valid && in_ready) begin
        full_q    <= 1'b1;
        out_data  <= coef;
      end
    end
  end
endmodule
