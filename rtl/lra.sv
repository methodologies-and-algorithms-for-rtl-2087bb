// Local response analyzer (LRA) of one FIFO under distributed BIST.
//
// The shared BIST controller broadcasts, with every operation, the values
// the FIFO must show: the read data when a read is checked, and the empty
// and full flags when they are checked. The LRA compares its own FIFO's
// outputs with them in the same cycle. err is the combinational mismatch of
// this cycle (fed to the MISR); fail is sticky until clear.
// One comparator per FIFO while generator and control are shared follows the
// distributed BIST scheme; comparing flags as well as data is this design's
// way of covering the flag faults.
module lra
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  bist_ctrl_t        ctrl,
  input  logic [FLIT_W-1:0] rdata,
  input  logic              ef,
  input  logic              ff,
  output logic              err,
  output logic              fail
);

  assign err = (ctrl.chk_data && rdata != ctrl.exp_data) ||
               (ctrl.chk_ef   && ef    != ctrl.exp_ef)   ||
               (ctrl.chk_ff   && ff    != ctrl.exp_ff);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     fail <= 1'b0;
    else if (clear) fail <= 1'b0;
    else if (err)   fail <= 1'b1;
  end

endmodule
