// age_timestamps: replacement state of one value table. Every entry has a
// 3-bit age {reference bit, 2-bit timestamp}. Touching an entry (a hit, or
// writing a new value into it) sets its reference bit, the most significant
// bit of the age, so a recently used entry always outranks one that was not
// used since the last shift. Each pulse of `tick` shifts every age right by
// one, so old references decay. The victim for the next insertion is the
// entry with the smallest age, the lowest index winning ties; an entry that
// holds no value yet (valid low) is always taken first.
//
// The 2-bit timestamp, the reference bit, the right shift and the
// least-timestamp priority choice follow the paper; that touching sets
// only the reference bit and that a new entry starts at age 3'b100 are this
// design's reading of it (a touched entry ORs in the reference bit, a
// freshly written one restarts at 3'b100). The codec pulses `tick` once
// every 16 bus transfers.
//
// Timing: victim_idx is combinational from the stored ages and `valid`;
// touch and tick take effect at the clock edge. When both come in one cycle
// the shift is applied first, then the touch.
module age_timestamps
  import fvbus_pkg::*;
#(
  parameter int ENTRIES = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ENTRIES-1:0] valid,       // entry holds a value
  input  logic               touch,       // mark entry touch_idx as used
  input  logic               fresh,       // with touch: entry gets a new value
  input  idx_t               touch_idx,
  input  logic               tick,        // age all entries by one step
  output idx_t               victim_idx   // entry to overwrite next
);
  localparam logic [2:0] REF = 3'b100;

  logic [2:0] age_q [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) age_q[e] <= '0;
    end else begin
      for (int e = 0; e < ENTRIES; e++) begin
        logic [2:0] a;
        a = tick ? (age_q[e] >> 1) : age_q[e];
        if (touch && touch_idx == idx_t'(e)) a = fresh ? REF : (a | REF);
        age_q[e] <= a;
      end
    end
  end

  // Priority selection: smallest {valid, age}, lowest index first.
  always_comb begin
    logic [3:0] best;
    best       = 4'hF;
    victim_idx = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      if ({valid[e], age_q[e]} < best) begin
        best       = {valid[e], age_q[e]};
        victim_idx = idx_t'(e);
      end
    end
    // A table whose entries are all valid with age 3'b111 falls back to
    // entry 0, which is also the lowest index among the tied entries.
  end

endmodule
