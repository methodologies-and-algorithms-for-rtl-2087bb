// Self-checking testbench of fifo_bist_ctrl with the distributed BIST
// around it: one controller broadcasting to five FIFOs, each with its LRA.
// FIFO 0 is fault-free; the others get a fault injected at their outputs:
// a read-data bit stuck at 0 (1), FF never set (2), EF stuck low (3), and an
// AND bridge between read bit lines 4 and 5 (4). After one run FIFO 0 must
// pass and all others fail. The run length must be 8n + 11 + 2*DEL cycles,
// and the operation counts must be 6n writes and 6n reads.
module tb_fifo_bist_ctrl;
  import noc_pkg::*;
  localparam int unsigned N   = 4;
  localparam int unsigned DEL = 5;
  localparam int NF = 5;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  bist_ctrl_t ctrl;
  int checks = 0, failures = 0;

  fifo_bist_ctrl #(.DEPTH(N), .DEL(DEL)) dut (.*);
  always #5 clk = ~clk;

  logic [FLIT_W-1:0] rd_raw [NF], rd [NF];
  logic ff_raw [NF], ef_raw [NF], ff [NF], ef [NF], err [NF], fail [NF];

  for (genvar f = 0; f < NF; f++) begin : g_f
    noc_fifo #(.WIDTH(FLIT_W), .DEPTH(N)) u_fifo (
      .clk, .rst_n, .rs(ctrl.rs), .wo(ctrl.wo), .wdata(ctrl.wdata), .ro(ctrl.ro),
      .rdata(rd_raw[f]), .ff(ff_raw[f]), .ef(ef_raw[f]));
    lra u_lra (.clk, .rst_n, .clear(start), .ctrl(ctrl), .rdata(rd[f]),
               .ef(ef[f]), .ff(ff[f]), .err(err[f]), .fail(fail[f]));
  end

  always_comb begin
    for (int f = 0; f < NF; f++) begin
      rd[f] = rd_raw[f]; ff[f] = ff_raw[f]; ef[f] = ef_raw[f];
    end
    rd[1][3] = 1'b0;
    ff[2]    = 1'b0;
    ef[3]    = 1'b0;
    rd[4][4] = rd_raw[4][4] & rd_raw[4][5];
    rd[4][5] = rd_raw[4][4] & rd_raw[4][5];
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycles, nwo, nro;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // make FIFO contents non-trivial before the test: the RS must clear them
    @(negedge clk);
    for (int run = 0; run < 2; run++) begin
      start = 1; @(negedge clk); start = 0;
      cycles = 0; nwo = 0; nro = 0;
      while (!done) begin
        check(busy, "busy during run");
        if (ctrl.wo) nwo++;
        if (ctrl.ro) nro++;
        cycles++;
        @(negedge clk);
      end
      check(cycles == 8*N + 11 + 2*DEL, $sformatf("run length %0d", cycles));
      check(nwo == 6*N && nro == 6*N, $sformatf("op counts %0d %0d", nwo, nro));
      check(!fail[0], "fault-free FIFO passes");
      for (int f = 1; f < NF; f++) check(fail[f], $sformatf("faulty FIFO %0d detected", f));
      @(negedge clk);
      check(!busy, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
