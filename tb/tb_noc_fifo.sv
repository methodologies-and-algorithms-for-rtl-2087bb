// Self-checking testbench of noc_fifo: random writes, reads and reset
// operations against a queue model; checks read data, FF and EF every cycle,
// and that FF rises after exactly DEPTH writes and EF after DEPTH reads.
module tb_noc_fifo;
  localparam int W = 18;
  localparam int D = 4;
  logic clk = 0, rst_n = 0;
  logic rs, wo, ro, ff, ef;
  logic [W-1:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  noc_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rs = 0; wo = 0; ro = 0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ef && !ff, "flags after power-on reset");
    // fill: FF after exactly D writes
    for (int i = 0; i < D; i++) begin
      check(!ff, "FF low before D writes");
      wo = 1; wdata = W'(i * 3 + 1); q.push_back(wdata);
      @(negedge clk);
    end
    wo = 0;
    check(ff && !ef, "FF after D writes");
    // write while full is ignored
    wo = 1; wdata = '1; @(negedge clk); wo = 0;
    check(ff, "still full");
    for (int i = 0; i < D; i++) begin
      check(!ef && rdata == q[0], "data on drain");
      void'(q.pop_front());
      ro = 1; @(negedge clk);
    end
    ro = 0;
    check(ef && !ff, "EF after D reads");
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      bit dw, dr;
      wo = 1'($urandom); ro = 1'($urandom); rs = ($urandom % 50) == 0;
      wdata = W'($urandom);
      check(ef == (q.size() == 0), "EF model");
      check(ff == (q.size() == D), "FF model");
      if (q.size() != 0) check(rdata == q[0], "read data model");
      dw = wo && q.size() != D;
      dr = ro && q.size() != 0;
      @(negedge clk);
      if (rs) q.delete();
      else begin
        if (dr) void'(q.pop_front());
        if (dw) q.push_back(wdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
