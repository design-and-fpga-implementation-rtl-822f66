// analyzer: real-time clustering deinterleaver for radar pulse streams.
//
// The receiver delivers one pulse description word (PDW: frequency, pulse
// width, amplitude, time of arrival) per detected pulse. The Analyzer finds
// which pulses come from the same emitter and what PRI pattern (stable, dwell
// or stagger) each emitter uses, without storing the pulses themselves:
//   pdw_fifo        buffers PDWs while the Arranger is busy with the last one
//   arranger        updates PDW clusters and PRI clusters for every pulse and,
//                   at the operator's pulse-count or time limit, raises
//                   arranged and freezes the clusters
//   interpreter     walks the PRI clusters and reports every emitter found
//   pdw_cluster_ram / pri_cluster_ram   the two cluster memories (block RAM)
// The Arranger owns the memory read ports while collecting; the Interpreter
// owns them while interpreting (the Arranger is halted then). Only the
// Arranger writes. After search_ends the clusters are emptied and a new
// collection window starts with the PDWs waiting in the FIFO.
//
// The split into Arranger and Interpreter around shared block-RAM cluster
// sets follows the algorithm's hardware description; the FIFO depth, port
// widths, output format and restart behaviour are this design's own.
//
// Interface: pdw_valid/pdw is sampled every clock (no back-pressure; PDWs
// that find the FIFO full are counted in pdw_dropped). cfg must be held
// stable. Results come as radar_valid/radar beats, see rcda_pkg::radar_beat_t.
// Timing at two emitters: at most 14 clocks per pulse, and the first emitter is
// reported a few clocks after arranged.
module analyzer
  import rcda_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  rcda_cfg_t   cfg,
  // PDW stream from the receiver
  input  logic        pdw_valid,
  input  pdw_t        pdw,
  output logic [15:0] pdw_dropped,
  output logic        pdw_fifo_full,
  // status
  output logic        arranger_busy,
  output logic        arranged,
  output logic        interpreting,
  output pdw_idx_t    pdw_clusters,
  output pri_idx_t    pri_clusters,
  // results
  output logic        radar_valid,
  output radar_beat_t radar,
  output logic        sequence_found,
  output logic        search_ends,
  output pri_idx_t    radar_count,
  // event strobes for monitoring
  output logic [13:0] events
);
  // FIFO -> Arranger
  logic fifo_valid, fifo_pop;
  pdw_t fifo_pdw;

  pdw_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clear(1'b0),
    .in_valid(pdw_valid), .in_pdw(pdw),
    .out_valid(fifo_valid), .out_pdw(fifo_pdw), .out_pop(fifo_pop),
    .dropped(pdw_dropped), .full(pdw_fifo_full));

  // memories
  logic         pdw_we, pri_we;
  pdw_idx_t     pdw_waddr, pdw_raddr, arr_pdw_raddr, int_pdw_raddr;
  pri_idx_t     pri_waddr, pri_raddr, arr_pri_raddr, int_pri_raddr;
  pdw_cluster_t pdw_wdata, pdw_rdata;
  pri_cluster_t pri_wdata, pri_rdata;

  pdw_cluster_ram u_pdw_ram (.clk, .we(pdw_we), .waddr(pdw_waddr), .wdata(pdw_wdata),
                             .raddr(pdw_raddr), .rdata(pdw_rdata));
  pri_cluster_ram u_pri_ram (.clk, .we(pri_we), .waddr(pri_waddr), .wdata(pri_wdata),
                             .raddr(pri_raddr), .rdata(pri_rdata));

  logic halted, interp_busy;
  assign interpreting = interp_busy;
  assign pdw_raddr = halted ? int_pdw_raddr : arr_pdw_raddr;
  assign pri_raddr = halted ? int_pri_raddr : arr_pri_raddr;

  logic ev_pdw_new, ev_pdw_match, ev_pdw_full, ev_pri_new, ev_pri_match,
        ev_pri_full, ev_link, ev_limit_pulses, ev_limit_time;
  logic ev_waste, ev_stable, ev_dwell, ev_stagger, ev_broken;

  arranger u_arranger (
    .clk, .rst_n, .cfg,
    .in_valid(fifo_valid), .in_pdw(fifo_pdw), .in_pop(fifo_pop),
    .arranged, .halted, .interp_done(search_ends),
    .pdw_count(pdw_clusters), .pri_count(pri_clusters), .busy(arranger_busy),
    .pdw_we, .pdw_waddr, .pdw_wdata, .pdw_raddr(arr_pdw_raddr), .pdw_rdata,
    .pri_we, .pri_waddr, .pri_wdata, .pri_raddr(arr_pri_raddr), .pri_rdata,
    .ev_pdw_new, .ev_pdw_match, .ev_pdw_full, .ev_pri_new, .ev_pri_match,
    .ev_pri_full, .ev_link, .ev_limit_pulses, .ev_limit_time);

  interpreter u_interpreter (
    .clk, .rst_n, .cfg, .start(arranged), .pri_count(pri_clusters),
    .busy(interp_busy),
    .pri_raddr(int_pri_raddr), .pri_rdata, .pdw_raddr(int_pdw_raddr), .pdw_rdata,
    .beat_valid(radar_valid), .beat(radar), .sequence_found, .search_ends,
    .radar_count,
    .ev_waste, .ev_stable, .ev_dwell, .ev_stagger, .ev_broken);

  // bit map of the event strobes
  assign events = {ev_broken, ev_stagger, ev_dwell, ev_stable, ev_waste,
                   ev_limit_time, ev_limit_pulses, ev_link, ev_pri_full,
                   ev_pri_match, ev_pri_new, ev_pdw_full, ev_pdw_match, ev_pdw_new};

  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
    interp_busy |-> (!pdw_we && !pri_we));
endmodule
