// Local scan test unit of one switch: applies test patterns that arrive
// through the network to the switch's own RLB and compares the responses
// on the spot, so no response has to travel back to the tester.
//
// While enable is high (the switch is in Test mode) the unit, not the RLB,
// drains the input FIFOs. It waits for a header flit on any input, takes
// that input as its source and removes the header. Each following run of
// PAT_WORDS body flits is one pattern {scan-in, primary inputs, expected
// primary outputs, expected scan-out}, the first flit holding the most
// significant bits. For each pattern it shifts the scan-in vector into the
// RLB (RLB_SCAN_W cycles), applies the primary inputs and checks the primary
// outputs in one capture cycle, shifts the captured state out (RLB_SCAN_W
// cycles) and compares it with the expected scan-out. The tail flit ends
// the session: done rises and pass is high if at least one pattern was
// applied and no comparison failed. Results stay until the next header.
// One pattern therefore costs PAT_WORDS + 2*RLB_SCAN_W + 2 cycles when
// flits arrive back to back.
// Transporting expected scan and output values with the stimuli and
// comparing them locally follows the document; the pattern layout, the
// non-overlapped shift-in/capture/shift-out order and the header handling
// are this design's choices.
module rlb_test_unit
  import noc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  input  logic                  in_valid[NPORTS],
  input  flit_t                 in_flit [NPORTS],
  output logic                  in_pop  [NPORTS],
  output logic                  rlb_ce,
  output logic                  rlb_scan_en,
  output logic                  rlb_scan_in,
  input  logic                  rlb_scan_out,
  output logic [RLB_PI_W-1:0]   rlb_pi,
  input  logic [RLB_PO_W-1:0]   rlb_po,
  output logic                  done,
  output logic                  pass,
  output logic [15:0]           pat_count,
  output logic [15:0]           fail_count
);

  localparam int unsigned BUF_W = PAT_WORDS * FLIT_DATA_W;
  localparam int unsigned S     = RLB_SCAN_W;

  typedef enum logic [2:0] {
    S_IDLE, S_RECV, S_SHIFT_IN, S_CAPTURE, S_SHIFT_OUT, S_COMPARE, S_DONE
  } state_e;

  state_e                     state_q;
  logic [1:0]                 src_q;
  logic [BUF_W-1:0]           pat_q;
  logic [$clog2(PAT_WORDS)-1:0] wcnt_q;
  logic [$clog2(S)-1:0]       k_q;
  logic [S-1:0]               so_q;
  logic                       done_q;

  logic [S-1:0]        f_si, f_so;
  logic [RLB_PI_W-1:0] f_pi;
  logic [RLB_PO_W-1:0] f_po;

  assign f_si = pat_q[BUF_W-1 -: S];
  assign f_pi = pat_q[BUF_W-1-S -: RLB_PI_W];
  assign f_po = pat_q[BUF_W-1-S-RLB_PI_W -: RLB_PO_W];
  assign f_so = pat_q[BUF_W-1-S-RLB_PI_W-RLB_PO_W -: S];

  logic       hdr_found;
  logic [1:0] hdr_port;

  always_comb begin
    hdr_found = 1'b0;
    hdr_port  = '0;
    for (int i = NPORTS-1; i >= 0; i--)
      if (in_valid[i] && in_flit[i].ftype == FT_HEAD) begin
        hdr_found = 1'b1;
        hdr_port  = 2'(i);
      end
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++) in_pop[i] = 1'b0;
    if (enable) begin
      if (state_q == S_IDLE || state_q == S_DONE) begin
        if (hdr_found) in_pop[hdr_port] = 1'b1;
      end else if (state_q == S_RECV) begin
        in_pop[src_q] = in_valid[src_q];
      end
    end
    rlb_ce      = enable && (state_q == S_SHIFT_IN || state_q == S_CAPTURE ||
                             state_q == S_SHIFT_OUT);
    rlb_scan_en = (state_q == S_SHIFT_IN || state_q == S_SHIFT_OUT);
    rlb_scan_in = (state_q == S_SHIFT_IN) ? f_si[(S-1) - 32'(k_q)] : 1'b0;
    rlb_pi      = f_pi;
  end

  assign done = done_q;
  assign pass = done_q && (fail_count == '0) && (pat_count != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      src_q      <= '0;
      pat_q      <= '0;
      wcnt_q     <= '0;
      k_q        <= '0;
      so_q       <= '0;
      done_q     <= 1'b0;
      pat_count  <= '0;
      fail_count <= '0;
    end else if (!enable) begin
      // Leaving Test mode abandons a session in progress; results stay.
      if (state_q != S_DONE) state_q <= S_IDLE;
    end else begin
      unique case (state_q)
        S_IDLE, S_DONE: if (hdr_found) begin
          state_q    <= S_RECV;
          src_q      <= hdr_port;
          wcnt_q     <= '0;
          done_q     <= 1'b0;
          pat_count  <= '0;
          fail_count <= '0;
        end
        S_RECV: if (in_valid[src_q]) begin
          if (in_flit[src_q].ftype == FT_TAIL) begin
            state_q <= S_DONE;
            done_q  <= 1'b1;
          end else begin
            pat_q  <= {pat_q[BUF_W-FLIT_DATA_W-1:0], in_flit[src_q].data};
            wcnt_q <= wcnt_q + 1'b1;
            if (wcnt_q == $bits(wcnt_q)'(PAT_WORDS-1)) begin
              wcnt_q  <= '0;
              k_q     <= '0;
              state_q <= S_SHIFT_IN;
            end
          end
        end
        S_SHIFT_IN: begin
          k_q <= k_q + 1'b1;
          if (k_q == $bits(k_q)'(S-1)) state_q <= S_CAPTURE;
        end
        S_CAPTURE: begin
          if (rlb_po != f_po) fail_count <= fail_count + 1'b1;
          k_q     <= '0;
          state_q <= S_SHIFT_OUT;
        end
        S_SHIFT_OUT: begin
          so_q <= {so_q[S-2:0], rlb_scan_out};
          k_q  <= k_q + 1'b1;
          if (k_q == $bits(k_q)'(S-1)) state_q <= S_COMPARE;
        end
        S_COMPARE: begin
          if (so_q != f_so) fail_count <= fail_count + 1'b1;
          pat_count <= pat_count + 1'b1;
          state_q   <= S_RECV;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
