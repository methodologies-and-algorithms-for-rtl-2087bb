// Self-testing MESH_X x MESH_Y mesh network-on-chip.
//
// The switches are joined by valid/ready links to their four neighbours.
// The test plug, the single port through which an external tester injects
// test data, is the south port of switch 0 (the corner x=0, y=0). Edge
// ports other than the plug are left unconnected (no traffic enters them,
// and dimension-ordered routing never sends traffic to them).
//
// Two test mechanisms are built in:
//  - Distributed FIFO BIST. One shared fifo_bist_ctrl drives every FIFO of
//    every switch at once while bist_busy is high; each FIFO has its own LRA
//    (sticky result in bist_fail[switch][fifo]) and the per-cycle LRA errors
//    of each switch are compacted into a 16-bit MISR (misr_sig, zero when no
//    error was seen). A run lasts 8*FIFO_DEPTH + 11 + 2*BIST_DEL cycles.
//  - Recursive RLB scan test. The tester sets each switch's mode (mode[i]):
//    switches already tested carry test packets in Normal (unicast) or
//    Multicast mode, and the switches under test, in Test mode, apply the
//    patterns to their own RLB and report test_done/test_pass. Sequencing the
//    modes (unicast: one switch after the other; multicast: one wave of
//    switches per step) is the tester's job.
// The 4x4 size, the corner test plug, the shared BIST with per-FIFO LRAs and
// a MISR follow the method; the Y-then-X routing, the MISR lane per switch
// and the tie-off of unused edge ports are this design's choices.
// Switch i sits at x = i % MESH_X, y = i / MESH_X; destinations in headers
// are bit-strings over these indices, so MESH_X*MESH_Y must not exceed 16.
module noc_mesh_top
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X     = 4,
  parameter int unsigned MESH_Y     = 4,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned BIST_DEL   = 16,
  localparam int unsigned NSW       = MESH_X * MESH_Y
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mode_e       mode [NSW],
  // test plug (south port of switch 0)
  input  logic        plug_in_valid,
  input  flit_t       plug_in_flit,
  output logic        plug_in_ready,
  output logic        plug_out_valid,
  output flit_t       plug_out_flit,
  input  logic        plug_out_ready,
  // FIFO BIST
  input  logic        bist_start,
  output logic        bist_busy,
  output logic        bist_done,
  output logic [2*NPORTS-1:0] bist_fail [NSW],
  output logic [15:0] misr_sig,
  // RLB test results
  output logic        test_done      [NSW],
  output logic        test_pass      [NSW],
  output logic [15:0] test_pat_count [NSW],
  output logic [15:0] test_fail_count[NSW]
);

  // link wires, indexed [switch][port]; *_i are the switch's inputs
  logic  l_in_valid [NSW][NPORTS];
  flit_t l_in_flit  [NSW][NPORTS];
  logic  l_in_ready [NSW][NPORTS];
  logic  l_out_valid[NSW][NPORTS];
  flit_t l_out_flit [NSW][NPORTS];
  logic  l_out_ready[NSW][NPORTS];

  bist_ctrl_t          bist_ctrl;
  logic [2*NPORTS-1:0] sw_err [NSW];
  logic [15:0]         misr_d;

  fifo_bist_ctrl #(.DEPTH(FIFO_DEPTH), .DEL(BIST_DEL)) u_bist (
    .clk, .rst_n, .start(bist_start), .ctrl(bist_ctrl),
    .busy(bist_busy), .done(bist_done)
  );

  always_comb begin
    misr_d = '0;
    for (int s = 0; s < NSW; s++)
      misr_d[s % 16] = misr_d[s % 16] | (|sw_err[s]);
  end

  misr #(.WIDTH(16)) u_misr (
    .clk, .rst_n, .clear(bist_start), .en(bist_busy), .d(misr_d), .sig(misr_sig)
  );

  for (genvar s = 0; s < NSW; s++) begin : g_sw
    localparam int unsigned SX = s % MESH_X;
    localparam int unsigned SY = s / MESH_X;

    noc_switch #(.X(SX), .Y(SY), .MESH_X(MESH_X), .MESH_Y(MESH_Y),
                 .FIFO_DEPTH(FIFO_DEPTH)) u_sw (
      .clk, .rst_n, .mode(mode[s]),
      .in_valid(l_in_valid[s]), .in_flit(l_in_flit[s]), .in_ready(l_in_ready[s]),
      .out_valid(l_out_valid[s]), .out_flit(l_out_flit[s]), .out_ready(l_out_ready[s]),
      .bist_en(bist_busy), .bist_clear(bist_start), .bist_ctrl(bist_ctrl),
      .bist_err(sw_err[s]), .bist_fail(bist_fail[s]),
      .test_done(test_done[s]), .test_pass(test_pass[s]),
      .test_pat_count(test_pat_count[s]), .test_fail_count(test_fail_count[s])
    );

    // Each input port p of switch s is fed by the opposite port of its
    // neighbour, or is an edge port.
    for (genvar p = 0; p < NPORTS; p++) begin : g_port
      localparam int NX = (p == P_E) ? int'(SX) + 1 : (p == P_W) ? int'(SX) - 1 : int'(SX);
      localparam int NY = (p == P_N) ? int'(SY) + 1 : (p == P_S) ? int'(SY) - 1 : int'(SY);
      localparam int unsigned OPP = (p + 2) % NPORTS;
      if (NX >= 0 && NX < int'(MESH_X) && NY >= 0 && NY < int'(MESH_Y)) begin : g_nb
        localparam int unsigned NB = NY * MESH_X + NX;
        assign l_in_valid[s][p]  = l_out_valid[NB][OPP];
        assign l_in_flit[s][p]   = l_out_flit[NB][OPP];
        assign l_out_ready[s][p] = l_in_ready[NB][OPP];
      end else if (s == 0 && p == P_S) begin : g_plug
        assign l_in_valid[s][p]  = plug_in_valid;
        assign l_in_flit[s][p]   = plug_in_flit;
        assign l_out_ready[s][p] = plug_out_ready;
      end else begin : g_edge
        assign l_in_valid[s][p]  = 1'b0;
        assign l_in_flit[s][p]   = '0;
        assign l_out_ready[s][p] = 1'b0;
      end
    end
  end

  assign plug_in_ready  = l_in_ready[0][P_S];
  assign plug_out_valid = l_out_valid[0][P_S];
  assign plug_out_flit  = l_out_flit[0][P_S];

  initial begin
    assert (NSW <= NSW_MAX) else $error("noc_mesh_top: at most %0d switches", NSW_MAX);
  end

endmodule
