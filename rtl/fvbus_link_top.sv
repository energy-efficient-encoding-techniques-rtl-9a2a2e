// fvbus_link_top: a processor-to-memory data bus with a frequent-value
// codec at each end, in the paper's main configuration (FV-MSB-LSB on a
// 32-bit bus: a 32-entry FV table, a 20-entry table of 20-bit MSB portions
// and a 12-entry table of 12-bit LSB portions, no internal control lines).
//
// The processor side writes through cpu_wr_* and receives read data on
// cpu_rd_*; the memory side receives writes on mem_wr_* and returns read
// data through mem_rd_*. Between them run the 32 data lines and the single
// external encode line (bus_data, bus_enc), which are the only signals that
// cross the chip boundary in the paper's scheme and are brought out here
// so their switching can be measured. bus_valid, bus_dir, bus_kind and
// bus_suppressed are observation signals of this model.
//
// Timing: a word accepted at one end appears on the bus in the next cycle
// and at the other end's output one cycle after that (two cycles in all,
// one per codec, as the paper assumes). One word crosses per cycle.
// When both ends want to send in the same cycle a one-bit round-robin
// arbiter picks one; an end cannot send in the cycle it is receiving, so
// a change of direction costs one turnaround cycle. The arbiter and the
// turnaround rule are this design's choices; the paper does not discuss
// bus arbitration.
module fvbus_link_top
  import fvbus_pkg::*;
#(
  parameter int W      = 32,
  parameter int FV_M   = 0,
  parameter bit MSB_EN = 1,
  parameter int MSB_W  = 20,
  parameter int MSB_M  = 0,
  parameter bit LSB_EN = 1,
  parameter int LSB_M  = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  // processor side
  input  logic         cpu_wr_valid,
  output logic         cpu_wr_ready,
  input  logic [W-1:0] cpu_wr_data,
  output logic         cpu_rd_valid,
  output logic [W-1:0] cpu_rd_data,
  // memory side
  output logic         mem_wr_valid,
  output logic [W-1:0] mem_wr_data,
  input  logic         mem_rd_valid,
  output logic         mem_rd_ready,
  input  logic [W-1:0] mem_rd_data,
  // off-chip bus lines
  output logic [W-1:0] bus_data,
  output logic         bus_enc,
  // observation
  output logic         bus_valid,       // bus_data carries a new word
  output logic         bus_dir,         // 0: processor drives, 1: memory drives
  output code_kind_e   bus_kind,
  output logic         bus_suppressed,
  output logic         age_tick
);
  logic         cpu_tx_valid, cpu_tx_ready, mem_tx_valid, mem_tx_ready;
  logic [W-1:0] cpu_bus_out, mem_bus_out;
  logic         cpu_enc_out, mem_enc_out, cpu_bus_v, mem_bus_v;
  code_kind_e   cpu_tx_kind, mem_tx_kind, cpu_rx_kind, mem_rx_kind;
  logic         cpu_sup, mem_sup, cpu_tick, mem_tick_unused;
  logic         prio_mem_q, drv_mem_q;
  logic         both_want;

  // ---------------------------------------------------------------- arbiter
  assign both_want    = cpu_wr_valid && cpu_tx_ready && mem_rd_valid && mem_tx_ready;
  assign cpu_tx_valid = cpu_wr_valid && !(both_want && prio_mem_q);
  assign mem_tx_valid = mem_rd_valid && !(both_want && !prio_mem_q);
  assign cpu_wr_ready = cpu_tx_ready && !(both_want && prio_mem_q);
  assign mem_rd_ready = mem_tx_ready && !(both_want && !prio_mem_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prio_mem_q <= 1'b0;
      drv_mem_q  <= 1'b0;
    end else begin
      if (both_want) prio_mem_q <= !prio_mem_q;
      if (cpu_tx_valid && cpu_tx_ready)      drv_mem_q <= 1'b0;
      else if (mem_tx_valid && mem_tx_ready) drv_mem_q <= 1'b1;
    end
  end

  // -------------------------------------------------------------- bus lines
  assign bus_data       = drv_mem_q ? mem_bus_out : cpu_bus_out;
  assign bus_enc        = drv_mem_q ? mem_enc_out : cpu_enc_out;
  assign bus_valid      = cpu_bus_v || mem_bus_v;
  assign bus_dir        = drv_mem_q;
  assign bus_kind       = drv_mem_q ? mem_tx_kind : cpu_tx_kind;
  assign bus_suppressed = drv_mem_q ? mem_sup : cpu_sup;
  assign age_tick       = cpu_tick;

  // ----------------------------------------------------------------- codecs
  fvbus_codec #(
    .W(W), .FV_M(FV_M), .MSB_EN(MSB_EN), .MSB_W(MSB_W), .MSB_M(MSB_M),
    .LSB_EN(LSB_EN), .LSB_M(LSB_M)
  ) u_cpu_codec (
    .clk, .rst_n,
    .tx_valid(cpu_tx_valid), .tx_ready(cpu_tx_ready), .tx_data(cpu_wr_data),
    .bus_out(cpu_bus_out), .enc_out(cpu_enc_out), .bus_valid_out(cpu_bus_v),
    .bus_in(bus_data), .enc_in(bus_enc), .bus_valid_in(mem_bus_v),
    .rx_valid(cpu_rd_valid), .rx_data(cpu_rd_data),
    .tx_kind(cpu_tx_kind), .tx_suppressed(cpu_sup), .rx_kind(cpu_rx_kind),
    .age_tick(cpu_tick)
  );

  fvbus_codec #(
    .W(W), .FV_M(FV_M), .MSB_EN(MSB_EN), .MSB_W(MSB_W), .MSB_M(MSB_M),
    .LSB_EN(LSB_EN), .LSB_M(LSB_M)
  ) u_mem_codec (
    .clk, .rst_n,
    .tx_valid(mem_tx_valid), .tx_ready(mem_tx_ready), .tx_data(mem_rd_data),
    .bus_out(mem_bus_out), .enc_out(mem_enc_out), .bus_valid_out(mem_bus_v),
    .bus_in(bus_data), .enc_in(bus_enc), .bus_valid_in(cpu_bus_v),
    .rx_valid(mem_wr_valid), .rx_data(mem_wr_data),
    .tx_kind(mem_tx_kind), .tx_suppressed(mem_sup), .rx_kind(mem_rx_kind),
    .age_tick(mem_tick_unused)
  );

  // A received word must be decoded as the kind it was sent as.
  kind_cpu_to_mem: assert property (@(posedge clk) disable iff (!rst_n)
                                    mem_wr_valid |-> mem_rx_kind == $past(cpu_tx_kind))
    else $error("fvbus_link_top: write decoded as another kind");
  kind_mem_to_cpu: assert property (@(posedge clk) disable iff (!rst_n)
                                    cpu_rd_valid |-> cpu_rx_kind == $past(mem_tx_kind))
    else $error("fvbus_link_top: read decoded as another kind");

endmodule
