// Shared BIST controller for all NoC FIFOs: control generator and data
// generator of a distributed BIST scheme. Its one output bundle is broadcast
// to every FIFO (operations and write data) and to every FIFO's local
// response analyzer (what to compare and the expected values).
//
// After start it runs two phases, one operation word per cycle:
//  1. Single-port phase (this design's own sequence): reset operation RS;
//     check EF=1, FF=0 after reset; then twice, with a checkerboard of
//     words and then its complement: n writes (FF must stay 0), check FF=1,
//     wait DEL cycles for data retention, n reads with data compare (EF must
//     stay 0), check EF=1 and FF=0. This covers stuck-at, transition and
//     retention faults of the cells, the word lines, and the flag faults
//     after reset, after n writes and after n reads.
//  2. Dual-port phase, as in the document: for each background
//     0101.., 1010.., 0000.., 1111.. run w (wr)^(n-1) r, i.e. one write,
//     n-1 cycles of simultaneous write and read, and a final read, checking
//     every read word; 4(n+1) cycles in all. A final cycle checks EF=1.
// Total length: 8n + 11 + 2*DEL cycles from start to done.
// Interface: start is a one-cycle pulse while idle; busy is high during the
// test; done pulses in the cycle after the last checked word.
module fifo_bist_ctrl
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned DEL   = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output bist_ctrl_t ctrl,
  output logic       busy,
  output logic       done
);

  localparam int unsigned CNT_W = $clog2(DEPTH + DEL + 2);
  localparam logic [FLIT_W-1:0] G1 = {(FLIT_W/2){2'b01}};

  typedef enum logic [3:0] {
    B_IDLE, B_RS, B_CHK0, B_W, B_CHKF, B_WAIT, B_R, B_CHKE,
    B_DW, B_DWR, B_DR, B_END
  } bstate_e;

  bstate_e        st_q;
  logic [CNT_W-1:0] k_q;
  logic           p_q;        // single-port pass: 0 data, 1 complement
  logic [1:0]     b_q;        // dual-port background index

  function automatic logic [FLIT_W-1:0] sp_word(logic [CNT_W-1:0] k, logic p);
    return (k[0] ^ p) ? ~G1 : G1;
  endfunction

  logic [FLIT_W-1:0] bg;
  always_comb begin
    unique case (b_q)
      2'd0: bg = G1;
      2'd1: bg = ~G1;
      2'd2: bg = '0;
      default: bg = '1;
    endcase
  end

  always_comb begin
    ctrl = '0;
    unique case (st_q)
      B_RS:   ctrl.rs = 1'b1;
      B_CHK0: begin
        ctrl.chk_ef = 1'b1; ctrl.exp_ef = 1'b1;
        ctrl.chk_ff = 1'b1; ctrl.exp_ff = 1'b0;
      end
      B_W: begin
        ctrl.wo     = 1'b1;
        ctrl.wdata  = sp_word(k_q, p_q);
        ctrl.chk_ff = 1'b1; ctrl.exp_ff = 1'b0;
        ctrl.chk_ef = 1'b1; ctrl.exp_ef = (k_q == '0);
      end
      B_CHKF: begin
        ctrl.chk_ff = 1'b1; ctrl.exp_ff = 1'b1;
      end
      B_R: begin
        ctrl.ro       = 1'b1;
        ctrl.chk_data = 1'b1; ctrl.exp_data = sp_word(k_q, p_q);
        ctrl.chk_ef   = 1'b1; ctrl.exp_ef   = 1'b0;
        ctrl.chk_ff   = 1'b1; ctrl.exp_ff   = (k_q == '0);
      end
      B_CHKE, B_END: begin
        ctrl.chk_ef = 1'b1; ctrl.exp_ef = 1'b1;
        ctrl.chk_ff = 1'b1; ctrl.exp_ff = 1'b0;
      end
      B_DW: begin
        ctrl.wo    = 1'b1;
        ctrl.wdata = bg;
      end
      B_DWR, B_DR: begin
        ctrl.wo       = (st_q == B_DWR);
        ctrl.wdata    = (st_q == B_DWR) ? bg : '0;
        ctrl.ro       = 1'b1;
        ctrl.chk_data = 1'b1; ctrl.exp_data = bg;
        ctrl.chk_ef   = 1'b1; ctrl.exp_ef   = 1'b0;
      end
      default: ;
    endcase
  end

  assign busy = (st_q != B_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= B_IDLE;
      k_q  <= '0;
      p_q  <= 1'b0;
      b_q  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        B_IDLE: if (start) st_q <= B_RS;
        B_RS:   st_q <= B_CHK0;
        B_CHK0: begin st_q <= B_W; k_q <= '0; p_q <= 1'b0; end
        B_W: begin
          k_q <= k_q + 1'b1;
          if (k_q == CNT_W'(DEPTH-1)) begin st_q <= B_CHKF; k_q <= '0; end
        end
        B_CHKF: st_q <= (DEL == 0) ? B_R : B_WAIT;
        B_WAIT: begin
          k_q <= k_q + 1'b1;
          if (k_q == CNT_W'(DEL-1)) begin st_q <= B_R; k_q <= '0; end
        end
        B_R: begin
          k_q <= k_q + 1'b1;
          if (k_q == CNT_W'(DEPTH-1)) begin st_q <= B_CHKE; k_q <= '0; end
        end
        B_CHKE: begin
          if (!p_q) begin p_q <= 1'b1; st_q <= B_W; end
          else begin st_q <= B_DW; b_q <= '0; end
        end
        B_DW: begin st_q <= B_DWR; k_q <= '0; end
        B_DWR: begin
          k_q <= k_q + 1'b1;
          if (k_q == CNT_W'(DEPTH-2)) st_q <= B_DR;
        end
        B_DR: begin
          b_q <= b_q + 1'b1;
          st_q <= (b_q == 2'd3) ? B_END : B_DW;
        end
        B_END: begin st_q <= B_IDLE; done <= 1'b1; end
        default: st_q <= B_IDLE;
      endcase
    end
  end

endmodule
