// Two-port (write-only / read-only) FIFO buffer of a NoC switch port.
//
// The memory array has DEPTH words of WIDTH bits. The write control keeps a
// one-hot write pointer whose bits are the word lines WD_0..WD_{n-1}; the read
// control keeps a one-hot read pointer driving RD_0..RD_{n-1}. Both pointers
// advance around a ring. An occupancy counter gives the full flag FF and the
// empty flag EF. This arrangement (separate write and read control around a
// memory array, one-hot word lines, FF/EF flags) follows the structure the
// FIFO test is written for; the occupancy counter is this design's choice.
//
// Interface: wo writes wdata when FF is low; ro removes the oldest word when
// EF is low. rdata always shows the word under the read pointer
// (first-word-fall-through), so it is valid in the cycle ro is raised.
// rs is the synchronous reset operation (pointers to word 0, FIFO empty);
// rst_n is the asynchronous power-on reset. One clock serves both ports.
module noc_fifo #(
  parameter int unsigned WIDTH = 18,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rs,
  input  logic             wo,
  input  logic [WIDTH-1:0] wdata,
  input  logic             ro,
  output logic [WIDTH-1:0] rdata,
  output logic             ff,
  output logic             ef
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [DEPTH-1:0] wd_q, rd_q;      // one-hot word lines
  logic [CW-1:0]    count_q;
  logic             do_wr, do_rd;

  assign ff    = (count_q == CW'(DEPTH));
  assign ef    = (count_q == '0);
  assign do_wr = wo && !ff && !rs;
  assign do_rd = ro && !ef && !rs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wd_q    <= DEPTH'(1);
      rd_q    <= DEPTH'(1);
      count_q <= '0;
    end else if (rs) begin
      wd_q    <= DEPTH'(1);
      rd_q    <= DEPTH'(1);
      count_q <= '0;
    end else begin
      if (do_wr) wd_q <= {wd_q[DEPTH-2:0], wd_q[DEPTH-1]};
      if (do_rd) rd_q <= {rd_q[DEPTH-2:0], rd_q[DEPTH-1]};
      case ({do_wr, do_rd})
        2'b10:   count_q <= count_q + 1'b1;
        2'b01:   count_q <= count_q - 1'b1;
        default: ;
      endcase
    end
  end

  // Memory array: a word is written when its WD line is selected.
  always_ff @(posedge clk) begin
    for (int i = 0; i < DEPTH; i++)
      if (do_wr && wd_q[i]) mem[i] <= wdata;
  end

  // Read port: the RD line selects one word.
  always_comb begin
    rdata = '0;
    for (int i = 0; i < DEPTH; i++)
      if (rd_q[i]) rdata = rdata | mem[i];
  end

  initial begin
    assert (DEPTH >= 2) else $error("noc_fifo: DEPTH must be at least 2");
  end

  // A read pointer and write pointer stay one-hot.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(wd_q) && $onehot(rd_q));

endmodule
