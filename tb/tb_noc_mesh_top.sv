// End-to-end testbench of the self-testing 4x4 mesh at its default size.
// A tester model drives the test plug and the mode lines and runs the whole
// test flow:
//  1. FIFO BIST of all 128 FIFOs at once: every LRA must pass, the MISR
//     signature must stay zero, and the run must take 8n + 11 + 2*DEL cycles.
//     A second run with one FIFO's read bit forced to 0 must be caught by
//     that FIFO's LRA and give a nonzero signature.
//  2. Unicast RLB test (one switch after the other, in index order, the
//     tested switches in Normal mode carrying the patterns). Every switch
//     must pass, and each session must take T0 + 3*(x + y) cycles, where T0
//     is the session time of switch 0 and 3 the per-hop latency.
//  3. Multicast RLB test in 2m - 1 steps: step s tests the switches with
//     x + y = s, the switches with x + y < s are in Multicast mode and fork
//     the single packet. Every switch must pass; step s must take T0 + 3*s.
//  4. A unicast session with one wrong expected value must fail.
// Mechanisms counted (each must happen at least once): BIST runs, BIST
// fault detections, unicast steps, multicast steps with a fork (more than
// one switch under test), test passes, test failures detected, and plug
// back-pressure cycles (the network stalling the tester while RLBs shift).
module tb_noc_mesh_top;
  import noc_pkg::*;
  import rlb_ref_pkg::*;

  localparam int MX = 4, MY = 4, NSW = MX * MY;
  localparam int DEPTH = 4, DEL = 16;
  localparam int NPAT = 146;          // scan patterns per RLB
  localparam int HOP = 3;             // link-to-link latency of a switch

  logic clk = 0, rst_n = 0;
  mode_e mode [NSW];
  logic  plug_in_valid, plug_in_ready, plug_out_valid, plug_out_ready;
  flit_t plug_in_flit, plug_out_flit;
  logic  bist_start, bist_busy, bist_done;
  logic [2*NPORTS-1:0] bist_fail [NSW];
  logic [15:0] misr_sig;
  logic  test_done [NSW], test_pass [NSW];
  logic [15:0] test_pat_count [NSW], test_fail_count [NSW];
  int checks = 0, failures = 0;

  noc_mesh_top dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // tester: one flit queue on the plug
  flit_t q[$];
  assign plug_in_valid  = q.size() != 0;
  assign plug_in_flit   = (q.size() != 0) ? q[0] : '0;
  assign plug_out_ready = 1'b1;
  int n_backpressure = 0;
  always @(posedge clk) begin
    if (plug_in_valid && plug_in_ready) void'(q.pop_front());
    if (plug_in_valid && !plug_in_ready && rst_n && !bist_busy) n_backpressure++;
  end

  int n_bist = 0, n_bist_detect = 0, n_unicast = 0, n_mc_fork = 0, n_pass = 0, n_fail_detect = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  task automatic queue_session(logic [15:0] dest, int np, bit corrupt);
    logic [PAT_WORDS*FLIT_DATA_W-1:0] pat;
    q.push_back('{FT_HEAD, dest});
    for (int n = 0; n < np; n++) begin
      pat = make_pattern(random_state(), random_pi());
      if (corrupt && n == np / 2) pat[PAT_WORDS*FLIT_DATA_W - 1 - RLB_SCAN_W - RLB_PI_W - 1] ^= 1'b1;
      for (int w = PAT_WORDS-1; w >= 0; w--) q.push_back('{FT_BODY, pat[w*FLIT_DATA_W +: FLIT_DATA_W]});
    end
    q.push_back('{FT_TAIL, 16'h0});
  endtask

  task automatic chip_reset();
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
  endtask

  task automatic all_modes(mode_e m);
    for (int s = 0; s < NSW; s++) mode[s] = m;
  endtask

  // wait until every switch in set has finished; returns cycles taken
  task automatic wait_done(logic [NSW-1:0] set, int t0, output int dt);
    bit all;
    do begin
      @(negedge clk);
      all = 1;
      for (int s = 0; s < NSW; s++) if (set[s] && !test_done[s]) all = 0;
    end while (!all);
    dt = cyc - t0;
  endtask

  initial begin
    #(64'd10_000_000);   // 1,000,000 cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0, dt, T0, total_uni, total_mc;
  logic [NSW-1:0] set;
  bit ok;
  initial begin
    all_modes(MODE_NORMAL);
    bist_start = 0;
    chip_reset();

    // ---- 1. FIFO BIST ----
    bist_start = 1; @(negedge clk); bist_start = 0;
    t0 = cyc;
    wait (bist_done); @(negedge clk);
    n_bist++;
    check(cyc - t0 == 8*DEPTH + 11 + 2*DEL, $sformatf("BIST length %0d", cyc - t0));
    ok = 1;
    for (int s = 0; s < NSW; s++) if (bist_fail[s] != '0) ok = 0;
    check(ok && misr_sig == '0, "fault-free FIFO BIST passes");
    force dut.g_sw[5].u_sw.g_fifo[6].u_fifo.rdata[3] = 1'b0;
    bist_start = 1; @(negedge clk); bist_start = 0;
    wait (bist_done); @(negedge clk);
    release dut.g_sw[5].u_sw.g_fifo[6].u_fifo.rdata[3];
    n_bist++;
    ok = bist_fail[5] == 8'b0100_0000;
    for (int s = 0; s < NSW; s++) if (s != 5 && bist_fail[s] != '0) ok = 0;
    check(ok && misr_sig != '0, $sformatf("injected FIFO fault located, sig=%h", misr_sig));
    if (ok) n_bist_detect++;

    // ---- 2. Algorithm 1: unicast ----
    chip_reset();
    total_uni = 0;
    for (int k = 0; k < NSW; k++) begin
      int x, y;
      x = k % MX; y = k / MX;
      all_modes(MODE_NORMAL);
      mode[k] = MODE_TEST;
      t0 = cyc;
      queue_session(16'(1 << k), NPAT, 0);
      wait_done(NSW'(1) << k, t0, dt);
      if (k == 0) T0 = dt;
      total_uni += dt;
      n_unicast++;
      check(test_pass[k] && test_pat_count[k] == 16'(NPAT), $sformatf("unicast switch %0d passes", k));
      if (test_pass[k]) n_pass++;
      check(dt == T0 + HOP*(x + y), $sformatf("unicast switch %0d time %0d, expected %0d", k, dt, T0 + HOP*(x+y)));
    end
    $display("unicast: T_r(session at switch 0) = %0d cycles, total %0d cycles", T0, total_uni);

    // ---- 3. Algorithm 2: multicast ----
    chip_reset();
    total_mc = 0;
    for (int st = 0; st <= MX + MY - 2; st++) begin
      set = '0;
      for (int k = 0; k < NSW; k++) begin
        int x, y;
        x = k % MX; y = k / MX;
        if (x + y == st) begin mode[k] = MODE_TEST; set[k] = 1; end
        else if (x + y < st) mode[k] = MODE_MULTICAST;
        else mode[k] = MODE_NORMAL;
      end
      t0 = cyc;
      queue_session(16'(set), NPAT, 0);
      wait_done(set, t0, dt);
      total_mc += dt;
      ok = 1;
      for (int k = 0; k < NSW; k++) if (set[k] && !(test_pass[k] && test_pat_count[k] == 16'(NPAT))) ok = 0;
      check(ok, $sformatf("multicast step %0d: all switches pass", st));
      if (ok) n_pass += $countones(set);
      if ($countones(set) > 1) n_mc_fork++;
      check(dt == T0 + HOP*st, $sformatf("multicast step %0d time %0d, expected %0d", st, dt, T0 + HOP*st));
    end
    $display("multicast: %0d steps, total %0d cycles", MX + MY - 1, total_mc);
    check(total_mc < total_uni, "multicast faster than unicast");

    // ---- 4. a wrong response must be caught ----
    chip_reset();
    all_modes(MODE_NORMAL);
    mode[6] = MODE_TEST;
    t0 = cyc;
    queue_session(16'(1 << 6), 4, 1);
    wait_done(NSW'(1) << 6, t0, dt);
    check(!test_pass[6] && test_fail_count[6] == 1, "corrupted pattern detected at switch 6");
    if (!test_pass[6]) n_fail_detect++;

    $display("mechanisms: bist=%0d bist_detect=%0d unicast=%0d mc_fork=%0d pass=%0d fail_detect=%0d backpressure=%0d",
             n_bist, n_bist_detect, n_unicast, n_mc_fork, n_pass, n_fail_detect, n_backpressure);
    check(n_bist > 0, "BIST ran");
    check(n_bist_detect > 0, "BIST detected a fault");
    check(n_unicast == NSW, "every switch tested by unicast");
    check(n_mc_fork > 0, "multicast forked");
    check(n_pass == 2*NSW, "every switch passed twice");
    check(n_fail_detect > 0, "a failing RLB response was detected");
    check(n_backpressure > 0, "tester was back-pressured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
