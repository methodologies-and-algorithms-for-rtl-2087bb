// Testbench for the larger FIFO sizes of the evaluation table (16 and 64
// words of 16-bit payload).
// Depth 16: the whole 4x4 mesh is built with 16-word FIFOs; it runs the FIFO
// BIST of all 128 FIFOs (all LRAs pass, zero signature, run length
// 8n + 11 + 2*Del cycles) and the full multicast RLB test with a short
// pattern set (every switch passes, step s takes T0 + 3s cycles).
// Depth 64: the BIST controller with one fault-free and one faulty 64-word
// FIFO (read bit 7 stuck at 1) and their LRAs; run length and detection are
// checked. (A whole mesh of 64-word FIFOs builds slowly in simulation.)
module tb_mesh_fifo_sizes;
  import noc_pkg::*;
  import rlb_ref_pkg::*;

  localparam int MX = 4, MY = 4, NSW = 16, DEL = 16, NPAT = 4, HOP = 3;
  localparam int NCFG = 1;
  localparam int DEPTHS [NCFG] = '{16};
  localparam int D64 = 64;

  logic clk = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks [NCFG+1];
  int failures [NCFG+1];
  bit finished [NCFG+1];

  // ---- depth 64: controller, two FIFOs and their LRAs ----
  logic rst64 = 0, st64 = 0, busy64, done64;
  bist_ctrl_t c64;
  logic [FLIT_W-1:0] rd64 [2], rdf64 [2];
  logic ff64 [2], ef64 [2], fail64 [2];
  fifo_bist_ctrl #(.DEPTH(D64), .DEL(DEL)) u_b64 (.clk, .rst_n(rst64), .start(st64),
    .ctrl(c64), .busy(busy64), .done(done64));
  for (genvar f = 0; f < 2; f++) begin : g_f64
    noc_fifo #(.WIDTH(FLIT_W), .DEPTH(D64)) u_f (.clk, .rst_n(rst64), .rs(c64.rs), .wo(c64.wo),
      .wdata(c64.wdata), .ro(c64.ro), .rdata(rd64[f]), .ff(ff64[f]), .ef(ef64[f]));
    assign rdf64[f] = (f == 1) ? (rd64[f] | 18'h80) : rd64[f];
    lra u_l (.clk, .rst_n(rst64), .clear(st64), .ctrl(c64), .rdata(rdf64[f]), .ef(ef64[f]),
      .ff(ff64[f]), .err(), .fail(fail64[f]));
  end
  initial begin
    int t0;
    repeat (2) @(negedge clk); rst64 = 1; @(negedge clk);
    st64 = 1; @(negedge clk); st64 = 0;
    t0 = cyc;
    wait (done64); @(negedge clk);
    checks[NCFG] += 3;
    if (cyc - t0 != 8*D64 + 11 + 2*DEL) begin failures[NCFG]++; $display("FAIL depth 64 BIST length %0d", cyc - t0); end
    if (fail64[0]) begin failures[NCFG]++; $display("FAIL depth 64 good FIFO flagged"); end
    if (!fail64[1]) begin failures[NCFG]++; $display("FAIL depth 64 faulty FIFO missed"); end
    finished[NCFG] = 1;
  end

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int D = DEPTHS[c];
    logic  rst_n = 0;
    mode_e mode [NSW];
    logic  piv, pir, pov, por;
    flit_t pif, pof;
    logic  bist_start = 0, bist_busy, bist_done;
    logic [2*NPORTS-1:0] bist_fail [NSW];
    logic [15:0] misr_sig;
    logic  test_done [NSW], test_pass [NSW];
    logic [15:0] test_pat_count [NSW], test_fail_count [NSW];

    noc_mesh_top #(.FIFO_DEPTH(D), .BIST_DEL(DEL)) dut (
      .clk, .rst_n, .mode,
      .plug_in_valid(piv), .plug_in_flit(pif), .plug_in_ready(pir),
      .plug_out_valid(pov), .plug_out_flit(pof), .plug_out_ready(por),
      .bist_start, .bist_busy, .bist_done, .bist_fail, .misr_sig,
      .test_done, .test_pass, .test_pat_count, .test_fail_count);

    flit_t q[$];
    assign piv = q.size() != 0;
    assign pif = (q.size() != 0) ? q[0] : '0;
    assign por = 1'b1;
    always @(posedge clk) if (piv && pir) void'(q.pop_front());

    task automatic check(bit cond, string what);
      checks[c]++;
      if (!cond) begin failures[c]++; $display("FAIL depth %0d: %s", D, what); end
    endtask

    initial begin
      int t0, T0, dt;
      logic [NSW-1:0] set;
      bit ok, all;
      logic [PAT_WORDS*FLIT_DATA_W-1:0] pat;
      for (int s = 0; s < NSW; s++) mode[s] = MODE_NORMAL;
      repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
      bist_start = 1; @(negedge clk); bist_start = 0;
      t0 = cyc;
      wait (bist_done); @(negedge clk);
      check(cyc - t0 == 8*D + 11 + 2*DEL, $sformatf("BIST length %0d", cyc - t0));
      ok = misr_sig == '0;
      for (int s = 0; s < NSW; s++) if (bist_fail[s] != '0) ok = 0;
      check(ok, "FIFO BIST passes");
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
        q.push_back('{FT_HEAD, 16'(set)});
        for (int n = 0; n < NPAT; n++) begin
          pat = make_pattern(random_state(), random_pi());
          for (int w = PAT_WORDS-1; w >= 0; w--) q.push_back('{FT_BODY, pat[w*FLIT_DATA_W +: FLIT_DATA_W]});
        end
        q.push_back('{FT_TAIL, 16'h0});
        do begin
          @(negedge clk);
          all = 1;
          for (int s = 0; s < NSW; s++) if (set[s] && !test_done[s]) all = 0;
        end while (!all);
        dt = cyc - t0;
        if (st == 0) T0 = dt;
        ok = 1;
        for (int k = 0; k < NSW; k++) if (set[k] && !(test_pass[k] && test_pat_count[k] == 16'(NPAT))) ok = 0;
        check(ok, $sformatf("multicast step %0d passes", st));
        check(dt == T0 + HOP*st, $sformatf("multicast step %0d time %0d", st, dt));
      end
      finished[c] = 1;
    end
  end

  initial begin
    int tc, tf;
    fork
      begin
        wait (finished[0] && finished[NCFG]);
      end
      begin
        repeat (100000) @(posedge clk);
        $display("watchdog expired");
        failures[0]++;
      end
    join_any
    tc = 0; tf = 0;
    for (int c = 0; c <= NCFG; c++) begin tc += checks[c]; tf += failures[c]; end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end
endmodule
