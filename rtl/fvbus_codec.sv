// fvbus_codec: one end of a frequent-value encoded data bus (processor side
// or memory side). The same codec sends (encoder) and receives (decoder),
// so its tables learn from the traffic in both directions; the two ends
// see the same words in the same order and keep identical tables.
//
// Structure: an FV table of whole values, an optional MSB table of the top
// MSB_W bits and an optional LSB table of the low W - MSB_W bits (all
// value_table), the encoder selection logic (enc_select), the decoder
// selection logic (dec_select) and the XOR correlator (bus_correlator).
// The parameters select the paper's schemes:
//   FV-i         MSB_EN=0, LSB_EN=0, FV_M=i   ((W-i)*2**i FV entries)
//   FV-i-MSB-j   MSB_EN=1, LSB_EN=0, FV_M, MSB_M = log2 of the table factor
//   FV-MSB-LSB   MSB_EN=1, LSB_EN=1, MSB_W=20 (the default)
//
// Transmit: tx_data is accepted when tx_valid and tx_ready are high. The
// tables are searched, the selection logic picks a code and the correlated
// word and encode bit are registered onto bus_out/enc_out; bus_valid_out
// marks the cycle in which they are new (one cycle of encoder latency).
// Receive: while bus_valid_in is high the word on bus_in is decorrelated,
// decoded through the tables and presented on rx_data with rx_valid one
// cycle later (one cycle of decoder latency). In both cases the tables then
// absorb the data value: each table is searched with its portion of the
// value, a hit marks the entry as used and a miss writes the portion over
// that table's victim. Every 16 transfers all ages shift (age_tick).
//
// A codec cannot send and receive in one cycle: tx_ready is low while a
// word arrives. The paper gives the tables, selection rules, correlator,
// timestamps and the one-cycle delay per end; the valid/ready handshake,
// counting the 16-cycle ageing period in bus transfers and updating the
// tables of the receiving end by searching with the decoded value are this
// design's choices.
module fvbus_codec
  import fvbus_pkg::*;
#(
  parameter int W      = 32,  // data bus width
  parameter int FV_M   = 0,   // FV table internal control lines
  parameter bit MSB_EN = 1,   // MSB table present
  parameter int MSB_W  = 20,  // MSB portion width
  parameter int MSB_M  = 0,   // MSB table internal control lines
  parameter bit LSB_EN = 1,   // LSB table present
  parameter int LSB_M  = 0,   // LSB table internal control lines
  parameter int AGE_PERIOD = 16  // transfers between timestamp shifts
) (
  input  logic         clk,
  input  logic         rst_n,
  // local side, outgoing
  input  logic         tx_valid,
  output logic         tx_ready,
  input  logic [W-1:0] tx_data,
  // bus, driven by this end
  output logic [W-1:0] bus_out,
  output logic         enc_out,
  output logic         bus_valid_out,
  // bus, driven by the other end
  input  logic [W-1:0] bus_in,
  input  logic         enc_in,
  input  logic         bus_valid_in,
  // local side, incoming
  output logic         rx_valid,
  output logic [W-1:0] rx_data,
  // observation
  output code_kind_e   tx_kind,        // kind of the word on bus_out
  output logic         tx_suppressed,  // that word was a hit sent as is
  output code_kind_e   rx_kind,        // kind of the word behind rx_data
  output logic         age_tick        // timestamps shift this cycle
);
  localparam int LSB_W     = W - MSB_W;
  localparam int FV_ENT    = table_entries(W, FV_M);
  localparam int MSB_ENT   = table_entries(MSB_W, MSB_M);
  localparam int LSB_ENT   = table_entries(LSB_W, LSB_M);
  localparam int AGE_CNT_W = $clog2(AGE_PERIOD);

  logic                 tx_fire, upd;
  logic [W-1:0]         key, dec_data, tx_code, rx_code, sel_code;
  logic                 sel_enc, sel_sup;
  code_kind_e           sel_kind, dec_kind;
  logic                 fv_hit, msb_hit, lsb_hit;
  idx_t                 fv_hit_idx, msb_hit_idx, lsb_hit_idx;
  idx_t                 fv_rd_idx, msb_rd_idx, lsb_rd_idx;
  logic [W-1:0]         fv_rd;
  logic [MSB_W-1:0]     msb_rd;
  logic [LSB_W-1:0]     lsb_rd;
  logic [AGE_CNT_W-1:0] age_cnt_q;

  assign tx_ready = !bus_valid_in;
  assign tx_fire  = tx_valid && tx_ready;
  assign upd      = tx_fire || bus_valid_in;
  assign key      = bus_valid_in ? dec_data : tx_data;
  assign age_tick = upd && (age_cnt_q == AGE_CNT_W'(AGE_PERIOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   age_cnt_q <= '0;
    else if (upd) age_cnt_q <= age_tick ? '0 : age_cnt_q + 1'b1;
  end

  // ---------------------------------------------------------------- tables
  value_table #(.WIDTH(W), .ENTRIES(FV_ENT)) u_fv (
    .clk, .rst_n, .key, .hit(fv_hit), .hit_idx(fv_hit_idx),
    .rd_idx(fv_rd_idx), .rd_data(fv_rd), .upd, .tick(age_tick)
  );

  if (MSB_EN) begin : g_msb
    value_table #(.WIDTH(MSB_W), .ENTRIES(MSB_ENT)) u_msb (
      .clk, .rst_n, .key(key[W-1:LSB_W]), .hit(msb_hit), .hit_idx(msb_hit_idx),
      .rd_idx(msb_rd_idx), .rd_data(msb_rd), .upd, .tick(age_tick)
    );
  end else begin : g_no_msb
    assign msb_hit     = 1'b0;
    assign msb_hit_idx = '0;
    assign msb_rd      = '0;
  end

  if (LSB_EN) begin : g_lsb
    value_table #(.WIDTH(LSB_W), .ENTRIES(LSB_ENT)) u_lsb (
      .clk, .rst_n, .key(key[LSB_W-1:0]), .hit(lsb_hit), .hit_idx(lsb_hit_idx),
      .rd_idx(lsb_rd_idx), .rd_data(lsb_rd), .upd, .tick(age_tick)
    );
  end else begin : g_no_lsb
    assign lsb_hit     = 1'b0;
    assign lsb_hit_idx = '0;
    assign lsb_rd      = '0;
  end

  // ------------------------------------------------------- selection logic
  enc_select #(
    .W(W), .FV_M(FV_M), .MSB_EN(MSB_EN), .MSB_W(MSB_W), .MSB_M(MSB_M),
    .LSB_EN(LSB_EN), .LSB_M(LSB_M)
  ) u_enc (
    .data(tx_data), .fv_hit, .fv_idx(fv_hit_idx), .msb_hit, .msb_idx(msb_hit_idx),
    .lsb_hit, .lsb_idx(lsb_hit_idx), .code(sel_code), .enc(sel_enc),
    .kind(sel_kind), .suppressed(sel_sup)
  );

  dec_select #(
    .W(W), .FV_M(FV_M), .MSB_EN(MSB_EN), .MSB_W(MSB_W), .MSB_M(MSB_M),
    .LSB_EN(LSB_EN), .LSB_M(LSB_M)
  ) u_dec (
    .code(rx_code), .enc(enc_in), .fv_idx(fv_rd_idx), .msb_idx(msb_rd_idx),
    .lsb_idx(lsb_rd_idx), .fv_data(fv_rd), .msb_data(msb_rd), .lsb_data(lsb_rd),
    .data(dec_data), .kind(dec_kind)
  );

  // ------------------------------------------------------------ correlator
  assign tx_code = sel_code;

  bus_correlator #(.W(W)) u_corr (
    .clk, .rst_n, .tx_fire, .tx_code, .bus_out,
    .rx_valid(bus_valid_in), .bus_in, .rx_code
  );

  // ------------------------------------------------------ output registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_out       <= 1'b0;
      bus_valid_out <= 1'b0;
      tx_kind       <= CODE_RAW;
      tx_suppressed <= 1'b0;
      rx_valid      <= 1'b0;
      rx_data       <= '0;
      rx_kind       <= CODE_RAW;
    end else begin
      bus_valid_out <= tx_fire;
      rx_valid      <= bus_valid_in;
      if (tx_fire) begin
        enc_out       <= sel_enc;
        tx_kind       <= sel_kind;
        tx_suppressed <= sel_sup;
      end
      if (bus_valid_in) begin
        rx_data <= dec_data;
        rx_kind <= dec_kind;
      end
    end
  end

  // An encoded word must always decode to a known kind.
  good_code: assert property (@(posedge clk) disable iff (!rst_n)
                              bus_valid_in && enc_in |-> dec_kind != CODE_BAD)
    else $error("fvbus_codec: undecodable word on the bus");

endmodule
