// Self-checking testbench of the RLB.
//  1. Directed wormhole cases with a hand-worked expected outcome: a unicast
//     packet from S to N (path set one cycle after the header appears, body
//     follows one flit per cycle, tail frees the output), a multicast header
//     forking to N and E (both outputs pushed together, stalled while one of
//     them is not ready), the same header in Normal mode taking only N, and a
//     header that matches no port being dropped.
//  2. Random inputs and random clock-enable against the reference model,
//     comparing every output every cycle.
//  3. Scan: the state is shifted out and compared with the model, and a
//     random state is shifted in at the same time.
module tb_rlb;
  import noc_pkg::*;
  import rlb_ref_pkg::*;

  logic clk = 0, rst_n = 0, ce, scan_en, scan_in, scan_out, multicast;
  logic [NSW_MAX-1:0] reach [NPORTS];
  logic  in_valid [NPORTS], in_pop [NPORTS], out_ready [NPORTS], out_push [NPORTS];
  flit_t in_flit [NPORTS], out_flit [NPORTS];
  int checks = 0, failures = 0;

  rlb dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle_inputs();
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] = 0; in_flit[p] = '0; out_ready[p] = 1;
    end
  endtask

  task automatic apply_pi(pi_vec_t v);
    pi_t r = unpack_pi(v);
    multicast = r.mc;
    for (int p = 0; p < NPORTS; p++) begin
      reach[p] = r.reach[p]; in_valid[p] = r.valid[p];
      in_flit[p] = flit_t'(r.flit[p]); out_ready[p] = r.ready[p];
    end
  endtask

  function automatic po_vec_t get_po();
    po_vec_t v;
    int b = RLB_PO_W - 1;
    for (int p = 0; p < NPORTS; p++) begin v[b] = in_pop[p]; b--; end
    for (int p = 0; p < NPORTS; p++) begin v[b] = out_push[p]; b--; end
    for (int p = 0; p < NPORTS; p++) begin v[b -: FLIT_W] = out_flit[p]; b -= FLIT_W; end
    return v;
  endfunction

  st_vec_t model, nmodel, newst, got;
  po_vec_t epo;
  pi_vec_t piv;

  initial begin
    ce = 1; scan_en = 0; scan_in = 0; multicast = 0;
    reach[P_N] = 16'h00F0; reach[P_E] = 16'h0002; reach[P_S] = 16'h0000; reach[P_W] = 16'h0000;
    idle_inputs();
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);

    // --- unicast S -> N, 3-flit packet ---
    in_valid[P_S] = 1; in_flit[P_S] = '{FT_HEAD, 16'h0020};
    #1 check(!in_pop[P_S] && !out_push[P_N], "no transfer before allocation");
    @(negedge clk);
    check(in_pop[P_S] && out_push[P_N] && out_flit[P_N] == flit_t'{FT_HEAD, 16'h0020},
          "header moves one cycle after arrival");
    for (int p = 0; p < NPORTS; p++) if (p != P_N) check(!out_push[p], "only N pushed");
    @(negedge clk);
    in_flit[P_S] = '{FT_BODY, 16'hBEEF};
    out_ready[P_N] = 0;
    #1 check(!in_pop[P_S] && !out_push[P_N], "stall when N not ready");
    @(negedge clk);
    out_ready[P_N] = 1;
    #1 check(in_pop[P_S] && out_push[P_N] && out_flit[P_N].data == 16'hBEEF, "body follows");
    @(negedge clk);
    in_flit[P_S] = '{FT_TAIL, 16'h1234};
    #1 check(in_pop[P_S] && out_push[P_N], "tail follows");
    @(negedge clk);
    in_valid[P_S] = 0;
    // W takes N right after release
    in_valid[P_W] = 1; in_flit[P_W] = '{FT_HEAD, 16'h0010};
    @(negedge clk);
    check(out_push[P_N] && out_flit[P_N].data == 16'h0010, "output reusable after tail");
    in_flit[P_W] = '{FT_TAIL, 16'h0};
    @(negedge clk);
    in_valid[P_W] = 0;
    @(negedge clk);

    // --- multicast fork to N and E ---
    multicast = 1;
    in_valid[P_S] = 1; in_flit[P_S] = '{FT_HEAD, 16'h0042};
    @(negedge clk);
    check(out_push[P_N] && out_push[P_E] && in_pop[P_S], "multicast header forks to N and E");
    check(out_flit[P_N].data == 16'h0040 && out_flit[P_E].data == 16'h0002, "each branch keeps its own destinations");
    in_flit[P_S] = '{FT_BODY, 16'h5555};
    out_ready[P_E] = 0;
    #1 check(!out_push[P_N] && !out_push[P_E] && !in_pop[P_S], "fork stalls on one busy branch");
    @(negedge clk);
    out_ready[P_E] = 1;
    in_flit[P_S] = '{FT_TAIL, 16'h0};
    #1 check(out_push[P_N] && out_push[P_E] && out_flit[P_E].data == 16'h0, "fork tail");
    @(negedge clk);
    // --- same header in Normal mode: first matching port only ---
    multicast = 0;
    in_flit[P_S] = '{FT_HEAD, 16'h0042};
    @(negedge clk);
    check(out_push[P_N] && !out_push[P_E], "normal mode takes one port");
    in_flit[P_S] = '{FT_TAIL, 16'h0};
    @(negedge clk);
    // --- header matching nothing is consumed and dropped ---
    in_flit[P_S] = '{FT_HEAD, 16'h0001};
    @(negedge clk);
    check(in_pop[P_S], "unroutable header consumed");
    for (int p = 0; p < NPORTS; p++) check(!out_push[p], "unroutable header goes nowhere");
    in_flit[P_S] = '{FT_TAIL, 16'h0};
    @(negedge clk);
    in_valid[P_S] = 0;
    @(negedge clk);

    // --- random against the reference model, with scan ---
    // bring state to a known value by scanning in zeros
    scan_en = 1; ce = 1;
    for (int k = 0; k < RLB_SCAN_W; k++) begin scan_in = 0; @(negedge clk); end
    scan_en = 0;
    model = '0;
    for (int n = 0; n < 3000; n++) begin
      if (n % 300 == 299) begin
        // scan out the state and scan in a random one
        newst = random_state();
        scan_en = 1; ce = 1;
        for (int k = 0; k < RLB_SCAN_W; k++) begin
          scan_in = newst[RLB_SCAN_W-1-k];
          #1 got[RLB_SCAN_W-1-k] = scan_out;
          @(negedge clk);
        end
        check(got == model, "scan-out equals model state");
        scan_en = 0;
        model = newst;
      end
      piv = random_pi();
      apply_pi(piv);
      ce = ($urandom % 8) != 0;
      step(model, piv, epo, nmodel);
      #1 check(get_po() == epo, "outputs equal model");
      @(negedge clk);
      if (ce) model = nmodel;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
