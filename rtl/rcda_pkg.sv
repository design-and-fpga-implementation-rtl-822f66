// rcda_pkg: shared widths, record types and constants of the real-time
// clustering deinterleaver (Analyzer = Arranger + Interpreter).
//
// A pulse description word (PDW) carries carrier frequency, pulse width (PW),
// pulse amplitude (PA) and time of arrival (TOA); angle of arrival is left out,
// as in the algorithm this design follows. A PDW cluster holds the running
// averages of frequency, PW and PA, the TOA of its latest pulse, its pulse
// count and the "last PRI cluster pointer". A PRI cluster holds a PRI value,
// a pointer to its PDW cluster, an occurrence counter and next/previous
// pointers that chain the PRIs of one emitter. Pointer value 0 means "none",
// so clusters are numbered from 1 and memory word 0 is never used.
//
// The field sets follow the algorithm; every bit width here is this design's
// own choice (the algorithm gives none). TOA and PRI are counted in ticks of
// the receiver's time base.
package rcda_pkg;

  localparam int unsigned FREQ_W = 16;   // carrier frequency code
  localparam int unsigned PW_W   = 16;   // pulse width code
  localparam int unsigned PA_W   = 16;   // pulse amplitude code
  localparam int unsigned TOA_W  = 32;   // time of arrival, ticks
  localparam int unsigned PRI_W  = 24;   // pulse repetition interval, ticks
  localparam int unsigned OCC_W  = 16;   // PRI occurrence counter
  localparam int unsigned CNT_W  = 16;   // pulses merged into a PDW cluster
  localparam int unsigned RATIO_W = 8;   // occurrence ratio thresholds, unsigned Q0.8

  // Cluster pointer widths; 2**W - 1 clusters of each kind can be held.
  localparam int unsigned PDW_IDX_W = 6;
  localparam int unsigned PRI_IDX_W = 8;

  // Longest PRI chain (stagger level) the Interpreter follows.
  localparam int unsigned MAX_LEVEL = 8;

  typedef logic [PDW_IDX_W-1:0] pdw_idx_t;
  typedef logic [PRI_IDX_W-1:0] pri_idx_t;

  typedef struct packed {
    logic [FREQ_W-1:0] freq;
    logic [PW_W-1:0]   pw;
    logic [PA_W-1:0]   pa;
    logic [TOA_W-1:0]  toa;
  } pdw_t;

  typedef struct packed {
    logic [FREQ_W-1:0] freq;
    logic [PW_W-1:0]   pw;
    logic [PA_W-1:0]   pa;
    logic [TOA_W-1:0]  toa;       // TOA of the latest pulse in the cluster
    logic [CNT_W-1:0]  n;         // number of pulses merged so far
    pri_idx_t          last_pri;  // last PRI cluster formed or hit by this cluster
  } pdw_cluster_t;

  typedef struct packed {
    logic [PRI_W-1:0]  pri;
    pdw_idx_t          pdw_ptr;
    logic [OCC_W-1:0]  occ;
    pri_idx_t          next;
    pri_idx_t          prev;
  } pri_cluster_t;

  // Operator settings (delta values, thresholds, end-of-clustering limit).
  typedef enum logic {LIMIT_PULSES = 1'b0, LIMIT_TIME = 1'b1} limit_mode_e;

  typedef struct packed {
    logic [FREQ_W-1:0]  d_freq;
    logic [PW_W-1:0]    d_pw;
    logic [PA_W-1:0]    d_pa;
    logic [PRI_W-1:0]   d_pri;
    logic [OCC_W-1:0]   occ_thr;      // PRI clusters below this are waste data
    logic [RATIO_W-1:0] stagger_occ;  // ratio at or above: stagger
    logic [RATIO_W-1:0] gap_occ;      // ratio above this and below stagger_occ: dwell
    limit_mode_e        limit_mode;
    logic [31:0]        search_limit; // pulses, or clock cycles since the first pulse
  } rcda_cfg_t;

  typedef enum logic [1:0] {
    MODE_STABLE  = 2'd0,
    MODE_DWELL   = 2'd1,
    MODE_STAGGER = 2'd2
  } pri_mode_e;

  // One output beat: one PRI of a detected emitter with its PDW values.
  typedef struct packed {
    pri_mode_e         mode;
    logic [3:0]        level;     // number of PRIs of this emitter
    logic [3:0]        pos;       // position of this PRI in the chain
    logic              last;      // final beat of this emitter
    logic [PRI_W-1:0]  pri;
    logic [FREQ_W-1:0] freq;
    logic [PW_W-1:0]   pw;
    logic [PA_W-1:0]   pa;
  } radar_beat_t;

endpackage
