// Self-checking testbench of lra: random control words and FIFO outputs;
// err must equal an independent evaluation of the three comparisons, and
// fail must be the running OR of err until clear.
module tb_lra;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  bist_ctrl_t ctrl;
  logic [FLIT_W-1:0] rdata;
  logic ef, ff, err, fail, model_fail;
  int checks = 0, failures = 0, nerr = 0;

  lra dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    ctrl = '0; rdata = '0; ef = 0; ff = 0; model_fail = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(!fail, "fail clear after reset");
    for (int n = 0; n < 1000; n++) begin
      ctrl = '0;
      ctrl.chk_data = ($urandom % 3) == 0;
      ctrl.chk_ef   = ($urandom % 3) == 0;
      ctrl.chk_ff   = ($urandom % 3) == 0;
      ctrl.exp_data = FLIT_W'($urandom);
      ctrl.exp_ef   = 1'($urandom);
      ctrl.exp_ff   = 1'($urandom);
      rdata = ($urandom % 4 == 0) ? FLIT_W'($urandom) : ctrl.exp_data;
      ef    = ($urandom % 4 == 0) ? ~ctrl.exp_ef : ctrl.exp_ef;
      ff    = ($urandom % 4 == 0) ? ~ctrl.exp_ff : ctrl.exp_ff;
      clear = ($urandom % 40) == 0;
      #1;
      exp = 0;
      if (ctrl.chk_data && rdata != ctrl.exp_data) exp = 1;
      if (ctrl.chk_ef && ef != ctrl.exp_ef) exp = 1;
      if (ctrl.chk_ff && ff != ctrl.exp_ff) exp = 1;
      if (exp) nerr++;
      check(err == exp, "err");
      @(negedge clk);
      model_fail = clear ? 1'b0 : (model_fail | exp);
      check(fail == model_fail, "sticky fail");
    end
    check(nerr > 10, "errors exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
