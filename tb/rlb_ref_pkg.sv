// Reference model of the RLB for the testbenches, written from the RLB's
// specification at the level of whole vectors: state vector (scan-chain
// order), primary-input vector and primary-output vector as laid out by
// noc_switch. Used to check the RLB and, as a fault-free simulator, to
// compute the expected responses of scan test patterns.
package rlb_ref_pkg;
  import noc_pkg::*;

  localparam int S  = RLB_SCAN_W;
  localparam int PI = RLB_PI_W;
  localparam int PO = RLB_PO_W;

  typedef logic [S-1:0]  st_vec_t;
  typedef logic [PI-1:0] pi_vec_t;
  typedef logic [PO-1:0] po_vec_t;

  // state layout, MSB first: in_active[3:0], in_route[3][3:0]..in_route[0],
  // out_lock[3:0], out_owner[3][1:0]..out_owner[0], rr[1:0]
  function automatic logic st_active(st_vec_t s, int i); return s[30 + i]; endfunction
  function automatic logic st_route(st_vec_t s, int i, int p); return s[14 + 4*i + p]; endfunction
  function automatic logic st_lock(st_vec_t s, int p); return s[10 + p]; endfunction
  function automatic logic [1:0] st_owner(st_vec_t s, int p); return s[2 + 2*p +: 2]; endfunction

  typedef struct {
    logic               mc;
    logic [NSW_MAX-1:0] reach [NPORTS];
    logic               valid [NPORTS];
    logic [FLIT_W-1:0]  flit  [NPORTS];
    logic               ready [NPORTS];
  } pi_t;

  function automatic pi_t unpack_pi(pi_vec_t v);
    pi_t r;
    int b = PI - 1;
    r.mc = v[b]; b--;
    for (int p = 0; p < NPORTS; p++) begin r.reach[p] = v[b -: NSW_MAX]; b -= NSW_MAX; end
    for (int p = 0; p < NPORTS; p++) begin r.valid[p] = v[b]; b--; end
    for (int p = 0; p < NPORTS; p++) begin r.flit[p] = v[b -: FLIT_W]; b -= FLIT_W; end
    for (int p = 0; p < NPORTS; p++) begin r.ready[p] = v[b]; b--; end
    return r;
  endfunction

  function automatic pi_vec_t pack_pi(pi_t r);
    pi_vec_t v;
    int b = PI - 1;
    v[b] = r.mc; b--;
    for (int p = 0; p < NPORTS; p++) begin v[b -: NSW_MAX] = r.reach[p]; b -= NSW_MAX; end
    for (int p = 0; p < NPORTS; p++) begin v[b] = r.valid[p]; b--; end
    for (int p = 0; p < NPORTS; p++) begin v[b -: FLIT_W] = r.flit[p]; b -= FLIT_W; end
    for (int p = 0; p < NPORTS; p++) begin v[b] = r.ready[p]; b--; end
    return v;
  endfunction

  // One clock of the RLB: outputs now and the state after the edge.
  function automatic void step(input st_vec_t s, input pi_vec_t piv,
                               output po_vec_t po, output st_vec_t ns);
    pi_t  r = unpack_pi(piv);
    logic go [NPORTS];
    logic [NPORTS-1:0] req [NPORTS];
    logic [NPORTS-1:0] taken;
    int   b;
    logic [1:0] rr;
    ns = s;
    for (int i = 0; i < NPORTS; i++) begin
      go[i] = st_active(s, i) && r.valid[i];
      for (int p = 0; p < NPORTS; p++)
        if (st_route(s, i, p) && !r.ready[p]) go[i] = 1'b0;
      req[i] = '0;
      for (int p = 0; p < NPORTS; p++)
        if ((r.flit[i][NSW_MAX-1:0] & r.reach[p]) != '0) begin
          if (r.mc) req[i][p] = 1'b1;
          else if (req[i] == '0) req[i][p] = 1'b1;
        end
    end
    b = PO - 1;
    for (int i = 0; i < NPORTS; i++) begin po[b] = go[i]; b--; end
    for (int p = 0; p < NPORTS; p++) begin po[b] = st_lock(s, p) && go[st_owner(s, p)]; b--; end
    for (int p = 0; p < NPORTS; p++) begin
      po[b -: FLIT_W] = st_lock(s, p) ? r.flit[st_owner(s, p)] : '0;
      if (po[b -: 2] == 2'b01) po[b-2 -: FLIT_DATA_W] &= r.reach[p];
      b -= FLIT_W;
    end
    // releases
    for (int i = 0; i < NPORTS; i++)
      if (go[i] && r.flit[i][FLIT_W-1 -: 2] == 2'b10) begin
        ns[30 + i] = 1'b0;
        for (int p = 0; p < NPORTS; p++) begin
          if (st_route(s, i, p)) ns[10 + p] = 1'b0;
          ns[14 + 4*i + p] = 1'b0;
        end
      end
    // allocation in round-robin order; outputs freed this cycle wait
    taken = s[13:10];
    rr = s[1:0];
    for (int k = 0; k < NPORTS; k++) begin
      int i = (int'(rr) + k) % NPORTS;
      if (!st_active(s, i) && r.valid[i] && r.flit[i][FLIT_W-1 -: 2] == 2'b01 &&
          (req[i] & taken) == '0) begin
        ns[30 + i] = 1'b1;
        for (int p = 0; p < NPORTS; p++) begin
          ns[14 + 4*i + p] = req[i][p];
          if (req[i][p]) begin
            ns[10 + p] = 1'b1;
            ns[2 + 2*p +: 2] = 2'(i);
          end
        end
        taken |= req[i];
        ns[1:0] = 2'((i + 1) % NPORTS);
      end
    end
  endfunction

  // Random primary inputs; headers and tails are made frequent.
  function automatic pi_vec_t random_pi();
    pi_t r;
    r.mc = 1'($urandom);
    for (int p = 0; p < NPORTS; p++) begin
      r.reach[p] = NSW_MAX'($urandom);
      r.valid[p] = ($urandom % 4) != 0;
      r.flit[p]  = FLIT_W'($urandom);
      if ($urandom % 3 == 0) r.flit[p][FLIT_W-1 -: 2] = 2'b01;
      r.ready[p] = ($urandom % 4) != 0;
    end
    return pack_pi(r);
  endfunction

  function automatic st_vec_t random_state();
    return st_vec_t'({$urandom, $urandom});
  endfunction

  // A complete scan test pattern as carried by PAT_WORDS body flits.
  function automatic logic [PAT_WORDS*FLIT_DATA_W-1:0] make_pattern(st_vec_t si, pi_vec_t piv);
    po_vec_t po;
    st_vec_t so;
    logic [PAT_WORDS*FLIT_DATA_W-1:0] v;
    step(si, piv, po, so);
    v = {si, piv, po, so};
    return v << (PAT_WORDS*FLIT_DATA_W - PAT_W);
  endfunction
endpackage
