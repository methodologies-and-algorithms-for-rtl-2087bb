// Self-checking testbench of misr: compares the signature with a
// bit-serial model of the same polynomial register after random inputs,
// checks that zero inputs keep a zero signature, that en low holds it,
// and that clear restarts it.
module tb_misr;
  localparam int W = 16;
  localparam logic [W-1:0] POLY = 16'h100B;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [W-1:0] d, sig, model;
  int checks = 0, failures = 0;

  misr #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s sig=%h model=%h", what, sig, model); end
  endtask

  function automatic logic [W-1:0] step(logic [W-1:0] s, logic [W-1:0] in);
    logic [W-1:0] n;
    for (int i = W-1; i > 0; i--) n[i] = s[i-1] ^ (s[W-1] & POLY[i]) ^ in[i];
    n[0] = (s[W-1] & POLY[0]) ^ in[0];
    return n;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0; model = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); en = 1;
    repeat (20) @(negedge clk);
    check(sig == '0, "zero inputs keep zero signature");
    for (int n = 0; n < 500; n++) begin
      d = W'($urandom); en = ($urandom % 4) != 0;
      @(negedge clk);
      if (en) model = step(model, d);
      check(sig == model, "signature");
    end
    // a single-bit error gives a nonzero signature
    clear = 1; @(negedge clk); clear = 0; model = '0;
    check(sig == '0, "clear");
    en = 1; d = 16'h0010; @(negedge clk); d = '0;
    repeat (30) @(negedge clk);
    check(sig != '0, "single error kept in signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
