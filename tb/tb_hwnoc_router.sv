// Self-checking test of hwnoc_router (3 ports).
// Phase 1 sends GT flits only, a random permutation of outputs each cycle,
// and checks that each appears on its output exactly one cycle later with
// its path advanced. Phase 2 mixes random BE traffic (random downstream
// backpressure) with GT flits on input 0 and checks that every BE flit
// arrives once, unchanged except for the path, in order per input/output
// pair, that GT flits still take exactly one cycle, and that BE flits were
// held back by GT flits at least once.
`timescale 1ns/1ps
module tb_hwnoc_router;
  import hwnoc_pkg::*;
  localparam int NP = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  link_t [NP-1:0] in_link = '0, out_link;
  logic  [NP-1:0] in_be_ready, out_be_ready = '1, be_blocked;

  hwnoc_router #(.NPORTS(NP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  flit_t be_q [NP][NP][$];        // expected BE flits per [input][output]
  logic  gt_exp_v [NP];
  flit_t gt_exp   [NP];
  logic  gt_now_v [NP];
  flit_t gt_now   [NP];
  int    n_be = 0, n_gt = 0, n_blocked = 0;
  bit    phase2 = 0;
  int    seq = 0;
  logic  [NP-1:0] taken = '0;     // input flit accepted at the last rising edge

  function automatic flit_t mk(input int i, input logic gt, input int dst);
    flit_t f;
    f          = '0;
    f.gt       = gt;
    f.path     = {6'($urandom), 2'(dst)};
    f.qid      = 2'($urandom);
    f.credit   = 5'($urandom);
    f.has_data = 1'b1;
    f.data     = {8'(i), 24'(seq)};
    seq++;
    return f;
  endfunction

  function automatic flit_t adv(input flit_t f);
    flit_t o = f;
    o.path = f.path >> 2;
    return o;
  endfunction

  // monitor, 1 time unit after the falling edge
  always @(negedge clk) begin
    #1;
    if (rst_n) begin
      for (int o = 0; o < NP; o++) begin
        if (gt_exp_v[o]) begin
          check(out_link[o].valid && out_link[o].flit == gt_exp[o],
                $sformatf("GT flit on output %0d one cycle after injection", o));
          n_gt++;
        end else if (out_link[o].valid) begin
          int src;
          check(!out_link[o].flit.gt, "no unexpected GT flit");
          if (out_be_ready[o]) begin
            src = int'(out_link[o].flit.data[31:24]);
            if (src < NP && be_q[src][o].size() > 0) begin
              check(out_link[o].flit == be_q[src][o].pop_front(),
                    $sformatf("BE flit order/content %0d->%0d", src, o));
            end else check(1'b0, "unexpected BE flit");
            n_be++;
          end
        end
        n_blocked += int'(be_blocked[o]);
      end
      // flits entering at the coming rising edge
      for (int o = 0; o < NP; o++) gt_exp_v[o] = 1'b0;
      for (int i = 0; i < NP; i++)
        taken[i] = in_link[i].valid && (in_link[i].flit.gt || in_be_ready[i]);
      for (int i = 0; i < NP; i++)
        if (in_link[i].valid) begin
          if (in_link[i].flit.gt) begin
            gt_exp_v[in_link[i].flit.path[1:0]] = 1'b1;
            gt_exp[in_link[i].flit.path[1:0]]   = adv(in_link[i].flit);
          end else if (in_be_ready[i]) begin
            be_q[i][in_link[i].flit.path[1:0]].push_back(adv(in_link[i].flit));
          end
        end
    end
  end

  // driver, at the falling edge, before the monitor
  int perm [NP];
  initial begin
    for (int o = 0; o < NP; o++) gt_exp_v[o] = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // phase 1: GT only
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      for (int o = 0; o < NP; o++) perm[o] = o;
      perm.shuffle();
      for (int i = 0; i < NP; i++) begin
        in_link[i].valid = ($urandom % 4) != 0;
        in_link[i].flit  = mk(i, 1'b1, perm[i]);
      end
    end
    @(negedge clk) in_link = '0;
    // phase 2: BE traffic on all inputs, GT on input 0, random backpressure
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int o = 0; o < NP; o++) out_be_ready[o] = ($urandom % 3) != 0;
      for (int i = 0; i < NP; i++) begin
        // a BE flit that was not taken stays on the link
        if (in_link[i].valid && !taken[i]) continue;
        if (i == 0 && ($urandom % 4) == 0) begin
          in_link[i].valid = 1'b1;
          in_link[i].flit  = mk(i, 1'b1, $urandom % NP);
        end else begin
          in_link[i].valid = ($urandom % 2) != 0;
          in_link[i].flit  = mk(i, 1'b0, $urandom % NP);
        end
      end
    end
    @(negedge clk) in_link = '0;
    out_be_ready = '1;
    repeat (20) @(posedge clk);
    #3;
    for (int i = 0; i < NP; i++)
      for (int o = 0; o < NP; o++)
        check(be_q[i][o].size() == 0, $sformatf("BE flits %0d->%0d all delivered", i, o));
    $display("GT flits %0d, BE flits %0d, BE held back by GT %0d", n_gt, n_be, n_blocked);
    check(n_gt > 500, "GT flits delivered");
    check(n_be > 1000, "BE flits delivered");
    check(n_blocked > 0, "GT priority over BE exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
