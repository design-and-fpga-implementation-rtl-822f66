// pdw_cluster_ram: PDW cluster memory: one word per PDW cluster (averaged frequency, PW, PA,
// latest TOA, pulse count, last PRI cluster pointer).
//
// The clusters live in FPGA block RAM, as in the algorithm's hardware
// description; the port arrangement is this design's own: one write port and
// one read port with a registered (one-clock) read, the behaviour of a simple
// dual-port block RAM. Word 0 stands for the null pointer and is never
// written by the Arranger. Contents are not reset: the cluster counters held
// by the Arranger say which words are valid.
//
// Timing: a write of wdata to waddr takes effect at the clock edge with we
// high. rdata shows the word at raddr one clock after raddr was presented
// (read-before-write when both ports address the same word).
module pdw_cluster_ram
  import rcda_pkg::*;
#(
  parameter int unsigned AW = PDW_IDX_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  pdw_cluster_t  wdata,
  input  logic [AW-1:0] raddr,
  output pdw_cluster_t  rdata
);
  pdw_cluster_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
