// Hard NOC router with source routing and two traffic classes.
//
// Each input port has a one-flit GT register and a small BE FIFO. The output
// port of a flit is the low PORT_W bits of its path; the router shifts the
// path right by one field when it forwards the flit, so the next router reads
// its own field. Each output gives priority to a GT flit and otherwise grants
// one BE FIFO head in round-robin order.
//
// GT flits are never stalled: the TDMA slot allocation done at design time
// guarantees that no two GT flits want the same output in the same cycle (an
// assertion checks this), so a GT flit advances one hop per cycle and its
// latency is fixed. BE flits use link-level flow control: a BE flit moves on
// only while the downstream be_ready is high; be_ready is the "not full" flag
// of this router's BE FIFO and comes straight from a register.
//
// Timing: one cycle per hop. Outputs are driven combinationally from the
// input registers and FIFO heads; the next router (or NI) registers them.
//
// The router names (R3..R6) and the 2x2 mesh come from the architecture
// figure; the single-flit packets, the path encoding and the queue
// organisation are this design's choices.
module hwnoc_router
  import hwnoc_pkg::*;
#(
  parameter int unsigned NPORTS   = 3,
  parameter int unsigned BE_DEPTH = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  link_t [NPORTS-1:0]       in_link,
  output logic  [NPORTS-1:0]       in_be_ready,
  output link_t [NPORTS-1:0]       out_link,
  input  logic  [NPORTS-1:0]       out_be_ready,
  output logic  [NPORTS-1:0]       be_blocked   // a BE head lost to a GT flit this cycle
);
  localparam int unsigned IW = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  link_t [NPORTS-1:0]        gt_q;
  flit_t [NPORTS-1:0]        be_head;
  logic  [NPORTS-1:0]        be_empty, be_full, be_pop;
  logic  [NPORTS-1:0][IW-1:0] rr;   // round-robin pointer per output

  function automatic logic [PORT_W-1:0] dest(input flit_t f);
    return f.path[PORT_W-1:0];
  endfunction

  function automatic flit_t advance(input flit_t f);
    flit_t o;
    o      = f;
    o.path = f.path >> PORT_W;
    return o;
  endfunction

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    logic [$clog2(BE_DEPTH+1)-1:0] cnt;
    hwnoc_fifo #(.WIDTH($bits(flit_t)), .DEPTH(BE_DEPTH)) u_be (
      .clk, .rst_n,
      .push   (in_link[i].valid && !in_link[i].flit.gt && in_be_ready[i]),
      .wr_data(in_link[i].flit),
      .pop    (be_pop[i]),
      .rd_data(be_head[i]),
      .full   (be_full[i]),
      .empty  (be_empty[i]),
      .count  (cnt)
    );
    assign in_be_ready[i] = !be_full[i];

    always_ff @(posedge clk) begin
      if (!rst_n) gt_q[i] <= '0;
      else begin
        gt_q[i].valid <= in_link[i].valid && in_link[i].flit.gt;
        gt_q[i].flit  <= in_link[i].flit;
      end
    end
  end

  // Output arbitration.
  logic [NPORTS-1:0][NPORTS-1:0] gt_req, be_req;   // [output][input]
  logic [NPORTS-1:0][IW-1:0]     be_sel;
  logic [NPORTS-1:0]             be_any;

  always_comb begin
    be_pop     = '0;
    out_link   = '0;
    be_blocked = '0;
    for (int o = 0; o < NPORTS; o++) begin
      be_any[o] = 1'b0;
      be_sel[o] = '0;
      for (int i = 0; i < NPORTS; i++) begin
        gt_req[o][i] = gt_q[i].valid && (dest(gt_q[i].flit) == PORT_W'(o));
        be_req[o][i] = !be_empty[i] && (dest(be_head[i]) == PORT_W'(o));
      end
      // round-robin pick among BE requests, starting at rr[o]
      for (int k = 0; k < NPORTS; k++) begin
        int unsigned idx;
        idx = (int'(rr[o]) + k) % NPORTS;
        if (!be_any[o] && be_req[o][idx]) begin
          be_any[o] = 1'b1;
          be_sel[o] = IW'(idx);
        end
      end
      if (gt_req[o] != '0) begin
        for (int i = 0; i < NPORTS; i++)
          if (gt_req[o][i]) begin
            out_link[o].valid = 1'b1;
            out_link[o].flit  = advance(gt_q[i].flit);
          end
        be_blocked[o] = be_any[o];
      end else if (be_any[o] && out_be_ready[o]) begin
        out_link[o].valid  = 1'b1;
        out_link[o].flit   = advance(be_head[be_sel[o]]);
        be_pop[be_sel[o]]  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rr <= '0;
    else
      for (int o = 0; o < NPORTS; o++)
        if (gt_req[o] == '0 && be_any[o] && out_be_ready[o])
          rr[o] <= (be_sel[o] == IW'(NPORTS - 1)) ? '0 : be_sel[o] + 1'b1;
  end

  // GT slot allocation must be contention free.
  always_ff @(posedge clk) begin
    if (rst_n)
      for (int o = 0; o < NPORTS; o++)
        assert ($countones(gt_req[o]) <= 1)
          else $error("hwnoc_router: GT contention on output %0d", o);
  end
endmodule
