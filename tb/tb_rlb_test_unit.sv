// Self-checking testbench of rlb_test_unit driving a real RLB.
// A tester model queues packets on input port E: a header, PAT_WORDS body
// flits per pattern (expected values from the reference model) and a tail.
// Session 1: NP good patterns -> done, pass, pat_count = NP, and the session
// must last NP*(PAT_WORDS + 2*RLB_SCAN_W + 2) + 1 cycles from header to done.
// Session 2: one pattern with a flipped expected-output bit and one with a
// flipped expected scan-out bit -> pass low, fail_count = 2.
// The unit must ignore the inputs while disabled.
module tb_rlb_test_unit;
  import noc_pkg::*;
  import rlb_ref_pkg::*;
  localparam int NP = 6;

  logic clk = 0, rst_n = 0, enable = 0;
  logic  in_valid [NPORTS], in_pop [NPORTS];
  flit_t in_flit  [NPORTS];
  logic  ce, se, si, so, done, pass;
  logic [RLB_PI_W-1:0] piv;
  logic [RLB_PO_W-1:0] pov;
  logic [15:0] pat_count, fail_count;
  int checks = 0, failures = 0;

  rlb_test_unit dut (.clk, .rst_n, .enable, .in_valid, .in_flit, .in_pop,
    .rlb_ce(ce), .rlb_scan_en(se), .rlb_scan_in(si), .rlb_scan_out(so),
    .rlb_pi(piv), .rlb_po(pov), .done, .pass, .pat_count, .fail_count);

  // RLB under test, wired through the primary-input/output vectors
  logic r_mc;
  logic [NSW_MAX-1:0] r_reach [NPORTS];
  logic  r_v [NPORTS], r_pop [NPORTS], r_rdy [NPORTS], r_push [NPORTS];
  flit_t r_f [NPORTS], r_of [NPORTS];
  always_comb begin
    pi_t r;
    int b;
    r = unpack_pi(piv);
    r_mc = r.mc;
    for (int p = 0; p < NPORTS; p++) begin
      r_reach[p] = r.reach[p]; r_v[p] = r.valid[p]; r_f[p] = flit_t'(r.flit[p]); r_rdy[p] = r.ready[p];
    end
    b = RLB_PO_W - 1;
    for (int p = 0; p < NPORTS; p++) begin pov[b] = r_pop[p]; b--; end
    for (int p = 0; p < NPORTS; p++) begin pov[b] = r_push[p]; b--; end
    for (int p = 0; p < NPORTS; p++) begin pov[b -: FLIT_W] = r_of[p]; b -= FLIT_W; end
  end
  rlb u_rlb (.clk, .rst_n, .ce, .scan_en(se), .scan_in(si), .scan_out(so),
    .multicast(r_mc), .reach(r_reach), .in_valid(r_v), .in_flit(r_f), .in_pop(r_pop),
    .out_ready(r_rdy), .out_push(r_push), .out_flit(r_of));

  always #5 clk = ~clk;

  flit_t q[$];
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin in_valid[p] = 0; in_flit[p] = '0; end
    in_valid[P_E] = q.size() != 0;
    if (q.size() != 0) in_flit[P_E] = q[0];
  end
  always @(posedge clk) if (in_pop[P_E] && q.size() != 0) void'(q.pop_front());

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic queue_session(int np, int bad_po, int bad_so);
    logic [PAT_WORDS*FLIT_DATA_W-1:0] pat;
    q.push_back('{FT_HEAD, 16'h0001});
    for (int n = 0; n < np; n++) begin
      pat = make_pattern(random_state(), random_pi());
      if (n == bad_po) pat[PAT_WORDS*FLIT_DATA_W-1-RLB_SCAN_W-RLB_PI_W - 7] ^= 1'b1;
      if (n == bad_so) pat[PAT_WORDS*FLIT_DATA_W-1-RLB_SCAN_W-RLB_PI_W-RLB_PO_W - 3] ^= 1'b1;
      for (int w = PAT_WORDS-1; w >= 0; w--) q.push_back('{FT_BODY, pat[w*FLIT_DATA_W +: FLIT_DATA_W]});
    end
    q.push_back('{FT_TAIL, 16'h0});
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0, t1;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    queue_session(NP, -1, -1);
    repeat (10) @(negedge clk);
    check(q.size() == 1 + NP*PAT_WORDS + 1, "nothing taken while disabled");
    check(!done, "not done while disabled");
    enable = 1;
    t0 = $time / 10;
    wait (done);
    t1 = $time / 10;
    @(negedge clk);
    check(pass && pat_count == 16'(NP) && fail_count == 0, $sformatf("good session pass=%0d pats=%0d fails=%0d", pass, pat_count, fail_count));
    check(t1 - t0 == NP*(PAT_WORDS + 2*RLB_SCAN_W + 2) + 1,
          $sformatf("session length %0d expected %0d", t1 - t0, NP*(PAT_WORDS + 2*RLB_SCAN_W + 2) + 1));
    // second session with two corrupted expectations
    queue_session(4, 1, 2);
    @(negedge clk);
    check(!done, "done cleared by new header");
    wait (done);
    @(negedge clk);
    check(!pass && fail_count == 2 && pat_count == 4, $sformatf("bad session fails=%0d", fail_count));
    enable = 0;
    repeat (3) @(negedge clk);
    check(done && !pass, "results held after leaving test mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
