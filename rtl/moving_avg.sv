// moving_avg: moving-average update of one PDW cluster parameter.
//
// Computes avg = (n * prev + new) / (n + 1), where n is the number of pulses
// already merged into the cluster (the update rule of the algorithm for
// frequency, PW and PA). The quotient is truncated toward zero.
//
// The algorithm gives only the formula; this design computes it with one
// multiply and a restoring divider that produces BITS quotient bits per clock
// (BITS chained compare-subtract stages). Because the result never exceeds
// max(prev, new) < 2**W, the division starts from (n*prev+new) >> W, which is
// already smaller than the divisor, and needs only W quotient bits.
//
// Timing: pulse start for one cycle with the operands valid; done pulses for
// one cycle W/BITS + 1 cycles later with avg valid (avg holds until the next
// start). A start while busy restarts the computation. W must be a multiple
// of BITS.
module moving_avg #(
  parameter int unsigned W   = 16,
  parameter int unsigned N_W = 16,
  parameter int unsigned BITS = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N_W-1:0] n,
  input  logic [W-1:0]   prev,
  input  logic [W-1:0]   new_val,
  output logic           busy,
  output logic           done,
  output logic [W-1:0]   avg
);
  localparam int unsigned NUM_W = N_W + W + 1;  // n*prev + new
  localparam int unsigned DEN_W = N_W + 1;      // n + 1
  localparam int unsigned STEPS  = W / BITS;
  localparam int unsigned STEP_W = $clog2(STEPS + 1);

  logic [NUM_W-1:0] num;
  logic [DEN_W-1:0] den;
  logic [DEN_W-1:0] rem;      // partial remainder, always below den
  logic [W-1:0]     low_bits; // dividend bits still to be shifted in
  logic [STEP_W-1:0] steps;
  logic [DEN_W-1:0] rem_next;
  logic [BITS-1:0]  q_next;   // quotient bits of this clock, MSB first
  logic [DEN_W:0]   trial;

  always_comb begin
    num = NUM_W'(n) * NUM_W'(prev) + NUM_W'(new_val);
    den = DEN_W'(n) + DEN_W'(1);
    // BITS restoring steps: shift in the next dividend bit, subtract if it fits
    rem_next = rem;
    q_next   = '0;
    trial    = '0;
    for (int b = 0; b < int'(BITS); b++) begin
      trial = {rem_next, low_bits[W-1-b]} - {1'b0, den};
      if (!trial[DEN_W]) begin
        rem_next         = trial[DEN_W-1:0];
        q_next[BITS-1-b] = 1'b1;
      end else begin
        rem_next = {rem_next[DEN_W-2:0], low_bits[W-1-b]};
      end
    end
  end

  initial begin
    if (W % BITS != 0) $fatal(1, "moving_avg: W must be a multiple of BITS");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      avg      <= '0;
      rem      <= '0;
      low_bits <= '0;
      steps    <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy     <= 1'b1;
        rem      <= DEN_W'(num >> W);
        low_bits <= num[W-1:0];
        steps    <= STEP_W'(STEPS);
        avg      <= '0;
      end else if (busy) begin
        rem      <= rem_next;
        avg      <= W'({avg, q_next});
        low_bits <= low_bits << BITS;
        steps    <= steps - 1'b1;
        if (steps == STEP_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
