// Shared types and constants of the self-testing mesh NoC.
//
// A flit is a 2-bit type plus a 16-bit payload. A header flit carries a
// bit-string destination set in its payload: bit i set means switch i is a
// destination, so a unicast header is one-hot and a multicast header has
// several bits set. The same routing hardware therefore serves both.
// Switches are numbered id = y*MESH_X + x, with switch 0 at the corner where
// the test plug is attached (south port of switch 0).
//
// The mode of a switch is Normal (forward to one output), Multicast (forward
// to every output whose reachability set meets the destination set) or Test
// (the RLB is disconnected from the data path and scan-tested locally).
// The FIFO BIST control bundle is broadcast from one shared controller to
// every FIFO and its local response analyzer.
// The bit-string destination encoding, the three modes and the shared BIST
// controller follow the test method this network implements; the flit
// format, the port numbering and the bundle layout are this design's own.
package noc_pkg;

  localparam int unsigned NPORTS      = 4;    // N, E, S, W (four-port switch)
  localparam int unsigned FLIT_DATA_W = 16;   // payload / FIFO data width B
  localparam int unsigned FLIT_W      = FLIT_DATA_W + 2;
  localparam int unsigned NSW_MAX     = FLIT_DATA_W; // one header flit holds the bit-string

  localparam int unsigned P_N = 0;
  localparam int unsigned P_E = 1;
  localparam int unsigned P_S = 2;
  localparam int unsigned P_W = 3;

  typedef enum logic [1:0] {
    FT_BODY = 2'b00,
    FT_HEAD = 2'b01,
    FT_TAIL = 2'b10
  } flit_type_e;

  typedef struct packed {
    flit_type_e             ftype;
    logic [FLIT_DATA_W-1:0] data;
  } flit_t;

  typedef enum logic [1:0] {
    MODE_NORMAL    = 2'd0,
    MODE_TEST      = 2'd1,
    MODE_MULTICAST = 2'd2
  } mode_e;

  // One word of the shared FIFO BIST control/data generator, valid for one
  // cycle. Operations and the expectations for the LRAs travel together.
  typedef struct packed {
    logic              rs;        // FIFO reset operation
    logic              wo;        // write operation
    logic              ro;        // read operation
    logic [FLIT_W-1:0] wdata;     // background pattern written
    logic              chk_data;  // compare read data this cycle
    logic [FLIT_W-1:0] exp_data;  // expected read data
    logic              chk_ef;    // compare empty flag this cycle
    logic              exp_ef;
    logic              chk_ff;    // compare full flag this cycle
    logic              exp_ff;
  } bist_ctrl_t;

  // Scan-chain length and test-vector widths of the RLB (see rlb.sv).
  localparam int unsigned RLB_SCAN_W = NPORTS      // in_active
                                     + NPORTS*NPORTS // in_route
                                     + NPORTS      // out_lock
                                     + NPORTS*2    // out_owner
                                     + 2;          // round-robin pointer
  localparam int unsigned RLB_PI_W   = 1 + NPORTS + NPORTS*FLIT_W + NPORTS + NPORTS*NSW_MAX;
  localparam int unsigned RLB_PO_W   = NPORTS + NPORTS + NPORTS*FLIT_W;
  // One scan test pattern as transported in body flits:
  // {scan-in, primary inputs, expected primary outputs, expected scan-out}.
  localparam int unsigned PAT_W      = RLB_SCAN_W + RLB_PI_W + RLB_PO_W + RLB_SCAN_W;
  localparam int unsigned PAT_WORDS  = (PAT_W + FLIT_DATA_W - 1) / FLIT_DATA_W;

  // Dimension-ordered (Y first, then X) reachability of output port p of
  // switch (x, y) in a mesh of mx by my switches, as a bit-string.
  function automatic logic [NSW_MAX-1:0] mesh_reach(int x, int y, int p, int mx, int my);
    logic [NSW_MAX-1:0] r;
    r = '0;
    for (int yy = 0; yy < my; yy++) begin
      for (int xx = 0; xx < mx; xx++) begin
        if ((p == P_N && yy > y) ||
            (p == P_S && yy < y) ||
            (p == P_E && yy == y && xx > x) ||
            (p == P_W && yy == y && xx < x))
          r[yy*mx + xx] = 1'b1;
      end
    end
    return r;
  endfunction

endpackage
