// pdw_fifo: input buffer for pulse description words.
//
// A PDW that arrives while the Arranger is still updating clusters for the
// previous pulse waits here. The input side has no back-pressure: the receiver
// cannot be stalled, so a PDW that finds the buffer full is lost and counted
// in dropped (saturating). That a busy Arranger queues incoming PDWs and loses
// them when they come too close together follows the algorithm's hardware
// description; the buffer depth and the drop counter are this design's own.
//
// Interface: in_valid/in_pdw are taken on any clock edge with in_valid high.
// The output is first-word-fall-through: out_valid says out_pdw holds the
// oldest entry, and out_pop (only honoured when out_valid) removes it. A push
// and a pop in the same cycle are both served, even when full.
module pdw_fifo
  import rcda_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  input  pdw_t        in_pdw,
  output logic        out_valid,
  output pdw_t        out_pdw,
  input  logic        out_pop,
  output logic [15:0] dropped,
  output logic        full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  pdw_t            mem [DEPTH];
  logic [AW-1:0]   wr_ptr, rd_ptr;
  logic [AW:0]     count;
  logic            do_push, do_pop;

  assign full      = (count == (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_pdw   = mem[rd_ptr];
  assign do_pop    = out_pop && out_valid;
  assign do_push   = in_valid && (!full || do_pop);

  function automatic logic [AW-1:0] bump(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= in_pdw;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      count   <= '0;
      dropped <= '0;
    end else if (clear) begin
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      count   <= '0;
    end else begin
      if (do_push) wr_ptr <= bump(wr_ptr);
      if (do_pop)  rd_ptr <= bump(rd_ptr);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if (in_valid && !do_push && dropped != 16'hFFFF) dropped <= dropped + 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    count <= (AW+1)'(DEPTH));
endmodule
