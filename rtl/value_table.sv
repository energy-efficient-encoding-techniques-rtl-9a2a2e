// value_table: one table of recently seen values (the FV table of whole
// data values, or the MSB or LSB table of value portions), modelled as a
// content-addressable memory with its replacement state.
//
// Search: `key` is compared with every valid entry at once; `hit` and
// `hit_idx` (the lowest matching index) are combinational. Read: `rd_data`
// is the entry at `rd_idx`, combinational, for the decoder. Update: with
// `upd` high at a clock edge the table absorbs `key`: on a hit the entry is
// marked as used, on a miss `key` is written over the victim chosen by
// age_timestamps and marked as used. Both codec ends make the same updates
// in the same order, so their tables stay exact replicas, as the paper
// requires. `tick` ages the entries (see age_timestamps).
//
// Because a value is written only on a miss, a table never holds the same
// value twice; an assertion checks that at most one entry matches. The
// paper builds these tables from custom CAM cells; here they are
// registers with comparators, which has the same behaviour. After reset no
// entry is valid.
module value_table
  import fvbus_pkg::*;
#(
  parameter int WIDTH   = 32,  // bits per entry
  parameter int ENTRIES = 32   // number of entries, at most 2**IDX_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] key,
  output logic             hit,
  output idx_t             hit_idx,
  input  idx_t             rd_idx,
  output logic [WIDTH-1:0] rd_data,
  input  logic             upd,
  input  logic             tick
);
  localparam int AW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [WIDTH-1:0]   mem_q [ENTRIES];
  logic [ENTRIES-1:0] valid_q;
  logic [ENTRIES-1:0] match;
  idx_t               victim_idx;

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      match[e] = valid_q[e] && (mem_q[e] == key);
      if (match[e]) begin
        hit     = 1'b1;
        hit_idx = idx_t'(e);
      end
    end
  end

  assign rd_data = (int'(rd_idx) < ENTRIES) ? mem_q[rd_idx[AW-1:0]] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int e = 0; e < ENTRIES; e++) mem_q[e] <= '0;
    end else if (upd && !hit) begin
      mem_q[victim_idx[AW-1:0]]   <= key;
      valid_q[victim_idx[AW-1:0]] <= 1'b1;
    end
  end

  age_timestamps #(.ENTRIES(ENTRIES)) u_age (
    .clk        (clk),
    .rst_n      (rst_n),
    .valid      (valid_q),
    .touch      (upd),
    .fresh      (!hit),
    .touch_idx  (hit ? hit_idx : victim_idx),
    .tick       (tick),
    .victim_idx (victim_idx)
  );

  initial assert (ENTRIES <= (1 << IDX_W) && ENTRIES > 0)
    else $error("value_table: ENTRIES out of range");

  unique_match: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(match))
    else $error("value_table: a value is stored twice");

endmodule
