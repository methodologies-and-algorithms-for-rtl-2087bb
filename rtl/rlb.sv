// Routing logic block (RLB) of a four-port wormhole switch, with full scan.
//
// Each input holds at most one packet path. When an idle input shows a
// header flit, its destination bit-string is compared with the reachability
// bit-string of every output port: the ports whose sets meet the destination
// set are requested. In Normal mode only the first matching port (N, E, S, W
// order) is requested (unicast); in Multicast mode all matching ports are
// requested and the packet forks. An input is granted only when all its
// requested outputs are free, so a multicast worm never holds part of its
// tree while waiting for the rest; inputs are served in round-robin order.
// A header whose destinations are reachable through no port (for example a
// packet addressed only to this switch) gets an empty route: its flits are
// consumed and dropped.
// A header leaving through a port keeps only the destination bits that
// port reaches, so every branch of a forked worm carries just its own
// destinations and no switch downstream forks it back into another branch.
// Once granted, a flit moves in a cycle in which the input has data and
// every output of its route can accept it; the tail flit frees the path.
// Allocation takes one cycle, so a header leaves one cycle after it arrives
// at the head of the input FIFO and body flits then move one per cycle.
//
// All state (34 flip-flops) is on one scan chain: when ce and scan_en are
// high, the chain shifts towards scan_out (its MSB) and scan_in enters at
// the LSB; when ce is high and scan_en low the state captures its next
// value; when ce is low the state holds. In functional use ce is held high.
// Bit-string routing and the reachability sets follow the document's
// multicast scheme; the reachability sets are inputs so that every RLB is
// the same circuit and one set of scan patterns serves all of them.
module rlb
  import noc_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      ce,
  input  logic                      scan_en,
  input  logic                      scan_in,
  output logic                      scan_out,
  input  logic                      multicast,
  input  logic [NSW_MAX-1:0]        reach   [NPORTS],
  input  logic                      in_valid[NPORTS],
  input  flit_t                     in_flit [NPORTS],
  output logic                      in_pop  [NPORTS],
  input  logic                      out_ready[NPORTS],
  output logic                      out_push [NPORTS],
  output flit_t                     out_flit [NPORTS]
);

  typedef struct packed {
    logic [NPORTS-1:0]             in_active;
    logic [NPORTS-1:0][NPORTS-1:0] in_route;
    logic [NPORTS-1:0]             out_lock;
    logic [NPORTS-1:0][1:0]        out_owner;
    logic [1:0]                    rr;
  } rlb_state_t;

  rlb_state_t st_q, st_d;
  logic [RLB_SCAN_W-1:0] st_vec;

  assign st_vec   = st_q;
  assign scan_out = st_vec[RLB_SCAN_W-1];

  logic [NPORTS-1:0] req   [NPORTS];
  logic [NPORTS-1:0] go;
  logic [NPORTS-1:0] taken;

  // Route request of a header at each input.
  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      logic [NPORTS-1:0] match;
      logic              found;
      found = 1'b0;
      for (int p = 0; p < NPORTS; p++)
        match[p] = |(in_flit[i].data & reach[p]);
      req[i] = '0;
      if (multicast) begin
        req[i] = match;
      end else begin
        for (int p = 0; p < NPORTS; p++)
          if (match[p] && !found) begin
            req[i][p] = 1'b1;
            found     = 1'b1;
          end
      end
    end
  end

  // Flit transfer along established paths.
  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      logic ok;
      ok = 1'b1;
      for (int p = 0; p < NPORTS; p++)
        if (st_q.in_route[i][p] && !out_ready[p]) ok = 1'b0;
      go[i]     = st_q.in_active[i] && in_valid[i] && ok;
      in_pop[i] = go[i];
    end
    for (int p = 0; p < NPORTS; p++) begin
      out_flit[p] = st_q.out_lock[p] ? in_flit[st_q.out_owner[p]] : '0;
      // each branch of a worm carries only the destinations it reaches
      if (out_flit[p].ftype == FT_HEAD) out_flit[p].data = out_flit[p].data & reach[p];
      out_push[p] = st_q.out_lock[p] && go[st_q.out_owner[p]];
    end
  end

  // Next state: release on tail, then allocate in round-robin order.
  always_comb begin
    st_d  = st_q;
    taken = st_q.out_lock;
    for (int i = 0; i < NPORTS; i++) begin
      if (go[i] && in_flit[i].ftype == FT_TAIL) begin
        st_d.in_active[i] = 1'b0;
        st_d.in_route[i]  = '0;
        for (int p = 0; p < NPORTS; p++)
          if (st_q.in_route[i][p]) st_d.out_lock[p] = 1'b0;
      end
    end
    for (int k = 0; k < NPORTS; k++) begin
      logic [1:0] i;
      i = 2'(st_q.rr + 2'(k));
      if (!st_q.in_active[i] && in_valid[i] && in_flit[i].ftype == FT_HEAD &&
          (req[i] & taken) == '0) begin
        st_d.in_active[i] = 1'b1;
        st_d.in_route[i]  = req[i];
        for (int p = 0; p < NPORTS; p++)
          if (req[i][p]) begin
            st_d.out_lock[p]  = 1'b1;
            st_d.out_owner[p] = i;
          end
        taken = taken | req[i];
        st_d.rr = 2'(i + 2'd1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      st_q <= '0;
    else if (ce) begin
      if (scan_en) st_q <= rlb_state_t'({st_vec[RLB_SCAN_W-2:0], scan_in});
      else         st_q <= st_d;
    end
  end

endmodule
