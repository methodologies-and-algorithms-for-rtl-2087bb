// Four-port wormhole switch of the mesh, with the test features that let the
// network test itself.
//
// Data path: each port has an input FIFO (written from the incoming link)
// and an output FIFO (read by the outgoing link); the RLB moves flits from
// input FIFOs to output FIFOs. Links use valid/ready: a flit crosses when
// the sender's output FIFO is not empty and the receiver's input FIFO is not
// full. A header entering an idle switch reaches the next switch's input
// FIFO three cycles after it was written into this switch's input FIFO
// (FIFO, allocation, transfer), and body flits follow one per cycle.
//
// Modes (input mode, see noc_pkg):
//  - Normal: the RLB forwards each packet through one output port.
//  - Multicast: the RLB forks a packet to every port that reaches one of
//    its destinations.
//  - Test: the RLB is cut off from the data path; the local test unit drains
//    the input FIFOs, scans patterns into the RLB, and compares the
//    responses locally (test_done, test_pass).
// FIFO BIST: while bist_en is high, every FIFO takes its operations from the
// broadcast bist_ctrl bundle and is checked by its own LRA; the links are
// stalled. FIFO index i < 4 is input port i, 4 + p is output port p.
// The reachability set of each output port follows from the switch's mesh
// coordinates (X, Y), with Y-then-X dimension-ordered routing.
// Ports are numbered N=0, E=1, S=2, W=3.
module noc_switch
  import noc_pkg::*;
#(
  parameter int unsigned X          = 0,
  parameter int unsigned Y          = 0,
  parameter int unsigned MESH_X     = 4,
  parameter int unsigned MESH_Y     = 4,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode,
  // incoming links
  input  logic        in_valid [NPORTS],
  input  flit_t       in_flit  [NPORTS],
  output logic        in_ready [NPORTS],
  // outgoing links
  output logic        out_valid[NPORTS],
  output flit_t       out_flit [NPORTS],
  input  logic        out_ready[NPORTS],
  // distributed FIFO BIST
  input  logic        bist_en,
  input  logic        bist_clear,
  input  bist_ctrl_t  bist_ctrl,
  output logic [2*NPORTS-1:0] bist_err,
  output logic [2*NPORTS-1:0] bist_fail,
  // local RLB scan test
  output logic        test_done,
  output logic        test_pass,
  output logic [15:0] test_pat_count,
  output logic [15:0] test_fail_count
);

  logic test_mode;
  assign test_mode = (mode == MODE_TEST);

  // ---------------- FIFOs ----------------
  logic  f_rs [2*NPORTS];
  logic  f_wo [2*NPORTS];
  logic  f_ro [2*NPORTS];
  flit_t f_wd [2*NPORTS];
  flit_t f_rd [2*NPORTS];
  logic  f_ff [2*NPORTS];
  logic  f_ef [2*NPORTS];

  // functional controls
  logic  in_pop   [NPORTS];
  logic  out_push [NPORTS];
  flit_t out_wd   [NPORTS];

  // The LRAs see the bundle only while the BIST drives the FIFOs.
  bist_ctrl_t lra_ctrl;
  assign lra_ctrl = bist_en ? bist_ctrl : '0;

  for (genvar i = 0; i < 2*NPORTS; i++) begin : g_fifo
    logic  fn_wo, fn_ro;
    flit_t fn_wd;
    if (i < NPORTS) begin : g_in
      assign fn_wo = in_valid[i];
      assign fn_wd = in_flit[i];
      assign fn_ro = in_pop[i];
    end else begin : g_out
      assign fn_wo = out_push[i-NPORTS];
      assign fn_wd = out_wd[i-NPORTS];
      assign fn_ro = out_ready[i-NPORTS];
    end
    assign f_rs[i] = bist_en && bist_ctrl.rs;
    assign f_wo[i] = bist_en ? bist_ctrl.wo    : fn_wo;
    assign f_wd[i] = bist_en ? flit_t'(bist_ctrl.wdata) : fn_wd;
    assign f_ro[i] = bist_en ? bist_ctrl.ro    : fn_ro;

    noc_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .rs(f_rs[i]), .wo(f_wo[i]), .wdata(f_wd[i]),
      .ro(f_ro[i]), .rdata(f_rd[i]), .ff(f_ff[i]), .ef(f_ef[i])
    );

    lra u_lra (
      .clk, .rst_n, .clear(bist_clear), .ctrl(lra_ctrl),
      .rdata(f_rd[i]), .ef(f_ef[i]), .ff(f_ff[i]),
      .err(bist_err[i]), .fail(bist_fail[i])
    );
  end


  for (genvar p = 0; p < NPORTS; p++) begin : g_link
    assign in_ready[p]  = !bist_en && !f_ff[p];
    assign out_valid[p] = !bist_en && !f_ef[NPORTS+p];
    assign out_flit[p]  = f_rd[NPORTS+p];
  end

  // ---------------- RLB and its local test unit ----------------
  logic [NSW_MAX-1:0] reach [NPORTS];
  for (genvar p = 0; p < NPORTS; p++) begin : g_reach
    assign reach[p] = mesh_reach(int'(X), int'(Y), p, int'(MESH_X), int'(MESH_Y));
  end

  logic               r_ce, r_se, r_si, r_so, r_mc;
  logic [NSW_MAX-1:0] r_reach    [NPORTS];
  logic               r_in_valid [NPORTS];
  flit_t              r_in_flit  [NPORTS];
  logic               r_in_pop   [NPORTS];
  logic               r_out_ready[NPORTS];
  logic               r_out_push [NPORTS];
  flit_t              r_out_flit [NPORTS];

  logic               tu_ce, tu_se, tu_si;
  logic [RLB_PI_W-1:0] tu_pi;
  logic [RLB_PO_W-1:0] r_po;
  logic               tu_pop [NPORTS];
  logic               in_nonempty [NPORTS];
  flit_t              in_head     [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_heads
    assign in_nonempty[p] = !bist_en && !f_ef[p];
    assign in_head[p]     = f_rd[p];
  end

  // Primary input vector {multicast, reach[0..3], in_valid[0..3],
  // in_flit[0..3], out_ready[0..3]} and output vector {in_pop[0..3],
  // out_push[0..3], out_flit[0..3]}, element 0 most significant.
  always_comb begin
    int b;
    b    = RLB_PI_W - 1;
    r_mc = test_mode ? tu_pi[b] : (mode == MODE_MULTICAST);
    b    = b - 1;
    for (int p = 0; p < NPORTS; p++) begin
      r_reach[p] = test_mode ? tu_pi[b -: NSW_MAX] : reach[p];
      b = b - NSW_MAX;
    end
    for (int p = 0; p < NPORTS; p++) begin
      r_in_valid[p] = test_mode ? tu_pi[b] : in_nonempty[p];
      b = b - 1;
    end
    for (int p = 0; p < NPORTS; p++) begin
      r_in_flit[p] = test_mode ? flit_t'(tu_pi[b -: FLIT_W]) : in_head[p];
      b = b - FLIT_W;
    end
    for (int p = 0; p < NPORTS; p++) begin
      r_out_ready[p] = test_mode ? tu_pi[b] : (!bist_en && !f_ff[NPORTS+p]);
      b = b - 1;
    end

    b = RLB_PO_W - 1;
    for (int p = 0; p < NPORTS; p++) begin
      r_po[b] = r_in_pop[p];
      b = b - 1;
    end
    for (int p = 0; p < NPORTS; p++) begin
      r_po[b] = r_out_push[p];
      b = b - 1;
    end
    for (int p = 0; p < NPORTS; p++) begin
      r_po[b -: FLIT_W] = r_out_flit[p];
      b = b - FLIT_W;
    end

    for (int p = 0; p < NPORTS; p++) begin
      in_pop[p]   = test_mode ? tu_pop[p] : r_in_pop[p];
      out_push[p] = !test_mode && r_out_push[p];
      out_wd[p]   = r_out_flit[p];
    end
  end

  assign r_ce = test_mode ? tu_ce : !bist_en;
  assign r_se = test_mode && tu_se;
  assign r_si = tu_si;

  rlb u_rlb (
    .clk, .rst_n,
    .ce(r_ce), .scan_en(r_se), .scan_in(r_si), .scan_out(r_so),
    .multicast(r_mc), .reach(r_reach),
    .in_valid(r_in_valid), .in_flit(r_in_flit), .in_pop(r_in_pop),
    .out_ready(r_out_ready), .out_push(r_out_push), .out_flit(r_out_flit)
  );

  rlb_test_unit u_tu (
    .clk, .rst_n,
    .enable(test_mode && !bist_en),
    .in_valid(in_nonempty), .in_flit(in_head), .in_pop(tu_pop),
    .rlb_ce(tu_ce), .rlb_scan_en(tu_se), .rlb_scan_in(tu_si), .rlb_scan_out(r_so),
    .rlb_pi(tu_pi), .rlb_po(r_po),
    .done(test_done), .pass(test_pass),
    .pat_count(test_pat_count), .fail_count(test_fail_count)
  );

endmodule
