// Self-checking testbench of noc_switch, placed at the corner (0,0) of a
// 4x4 mesh (its N port reaches rows 1..3, its E port reaches switches 1..3).
//  - FIFO BIST through the shared controller: all eight LRAs must pass and
//    the links must be stalled meanwhile.
//  - Normal mode: packets entering at S for switch 4 leave at N, for switch
//    2 at E, flits in order; a header written into the input FIFO at one clock
//    edge leaves on the output link at the third edge after it.
//  - After a Test-mode session the switch routes normally again.
//  - Multicast mode: a header for {1, 8} is forked to E and N, each branch
//    header keeping only the destinations it reaches.
//  - Test mode: a scan test session with good patterns passes locally, a
//    session with a wrong expected value fails; nothing leaves the switch.
module tb_noc_switch;
  import noc_pkg::*;
  import rlb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  mode_e mode;
  logic  in_valid [NPORTS], in_ready [NPORTS], out_valid [NPORTS], out_ready [NPORTS];
  flit_t in_flit [NPORTS], out_flit [NPORTS];
  logic  bist_start, bist_busy, bist_done;
  bist_ctrl_t bist_ctrl;
  logic [2*NPORTS-1:0] bist_err, bist_fail;
  logic  test_done, test_pass;
  logic [15:0] test_pat_count, test_fail_count;
  int checks = 0, failures = 0;

  fifo_bist_ctrl #(.DEPTH(4), .DEL(3)) u_bist (.clk, .rst_n, .start(bist_start),
    .ctrl(bist_ctrl), .busy(bist_busy), .done(bist_done));

  noc_switch #(.X(0), .Y(0), .MESH_X(4), .MESH_Y(4), .FIFO_DEPTH(4)) dut (
    .clk, .rst_n, .mode, .in_valid, .in_flit, .in_ready, .out_valid, .out_flit, .out_ready,
    .bist_en(bist_busy), .bist_clear(bist_start), .bist_ctrl, .bist_err, .bist_fail,
    .test_done, .test_pass, .test_pat_count, .test_fail_count);

  always #5 clk = ~clk;

  flit_t src_q [NPORTS][$];
  flit_t got   [NPORTS][$];
  int    first_out_cycle [NPORTS];
  int    cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always_comb
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] = src_q[p].size() != 0;
      in_flit[p]  = (src_q[p].size() != 0) ? src_q[p][0] : '0;
      out_ready[p] = 1'b1;
    end
  always @(posedge clk)
    for (int p = 0; p < NPORTS; p++) begin
      if (in_valid[p] && in_ready[p]) void'(src_q[p].pop_front());
      if (out_valid[p] && out_ready[p]) begin
        if (got[p].size() == 0) first_out_cycle[p] = cyc;
        got[p].push_back(out_flit[p]);
      end
    end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic clear_got();
    for (int p = 0; p < NPORTS; p++) got[p].delete();
  endtask

  task automatic send(int p, logic [15:0] dest, int nbody);
    src_q[p].push_back('{FT_HEAD, dest});
    for (int i = 0; i < nbody; i++) src_q[p].push_back('{FT_BODY, 16'(16'hA000 + i)});
    src_q[p].push_back('{FT_TAIL, 16'h0FFF});
  endtask

  function automatic bit packet_ok(int p, logic [15:0] dest, int nbody);
    dest = dest & mesh_reach(0, 0, p, 4, 4);
    if (got[p].size() != nbody + 2) return 0;
    if (got[p][0] != flit_t'{FT_HEAD, dest}) return 0;
    for (int i = 0; i < nbody; i++) if (got[p][1+i] != flit_t'{FT_BODY, 16'(16'hA000 + i)}) return 0;
    return got[p][nbody+1].ftype == FT_TAIL;
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_in;
  logic [PAT_WORDS*FLIT_DATA_W-1:0] pat;
  initial begin
    mode = MODE_NORMAL; bist_start = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);

    // FIFO BIST
    bist_start = 1; @(negedge clk); bist_start = 0;
    while (!bist_done) begin
      for (int p = 0; p < NPORTS; p++) check(!in_ready[p] && !out_valid[p], "links stalled during BIST");
      @(negedge clk);
    end
    check(bist_fail == '0, $sformatf("BIST passes, fail=%b", bist_fail));

    // Normal mode unicast
    clear_got();
    t_in = cyc;
    send(P_S, 16'h0010, 3);
    repeat (20) @(negedge clk);
    check(packet_ok(P_N, 16'h0010, 3), "unicast to switch 4 leaves at N");
    check(first_out_cycle[P_N] - t_in == 3, $sformatf("header latency %0d", first_out_cycle[P_N] - t_in));
    check(got[P_E].size() == 0 && got[P_S].size() == 0 && got[P_W].size() == 0, "no other port used");
    clear_got();
    send(P_S, 16'h0004, 2);
    repeat (20) @(negedge clk);
    check(packet_ok(P_E, 16'h0004, 2), "unicast to switch 2 leaves at E");
    // a multi-destination header in Normal mode takes only the first port
    clear_got();
    send(P_S, 16'h0102, 1);
    repeat (20) @(negedge clk);
    check(packet_ok(P_N, 16'h0102, 1) && got[P_E].size() == 0, "normal mode does not fork");

    // Multicast
    mode = MODE_MULTICAST;
    clear_got();
    send(P_S, 16'h0102, 5);
    repeat (20) @(negedge clk);
    check(packet_ok(P_N, 16'h0102, 5) && packet_ok(P_E, 16'h0102, 5), "multicast forks to N and E");

    // Test mode: good session then a failing one
    mode = MODE_TEST;
    clear_got();
    src_q[P_S].push_back('{FT_HEAD, 16'h0001});
    for (int n = 0; n < 5; n++) begin
      pat = make_pattern(random_state(), random_pi());
      for (int w = PAT_WORDS-1; w >= 0; w--) src_q[P_S].push_back('{FT_BODY, pat[w*FLIT_DATA_W +: FLIT_DATA_W]});
    end
    src_q[P_S].push_back('{FT_TAIL, 16'h0});
    wait (test_done);
    @(negedge clk);
    check(test_pass && test_pat_count == 5, "local RLB test passes");
    src_q[P_S].push_back('{FT_HEAD, 16'h0001});
    pat = make_pattern(random_state(), random_pi());
    pat[PAT_WORDS*FLIT_DATA_W - 1 - 2*RLB_SCAN_W - RLB_PI_W - RLB_PO_W + 1] ^= 1'b1;
    for (int w = PAT_WORDS-1; w >= 0; w--) src_q[P_S].push_back('{FT_BODY, pat[w*FLIT_DATA_W +: FLIT_DATA_W]});
    src_q[P_S].push_back('{FT_TAIL, 16'h0});
    repeat (3) @(negedge clk);
    wait (test_done);
    @(negedge clk);
    check(!test_pass && test_fail_count == 1, "wrong expected scan-out detected");
    for (int p = 0; p < NPORTS; p++) check(got[p].size() == 0, "nothing forwarded in test mode");

    // back to Normal: the scan test leaves the RLB in its reset state
    mode = MODE_NORMAL;
    clear_got();
    send(P_S, 16'h0008, 2);
    repeat (20) @(negedge clk);
    check(packet_ok(P_E, 16'h0008, 2), "routing works again after the scan test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
