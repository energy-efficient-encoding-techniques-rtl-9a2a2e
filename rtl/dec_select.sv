// dec_select: decoder selection logic. From the decorrelated bus word and
// the encode signal it names the table entries to read and rebuilds the
// data value from what the tables return. Purely combinational.
//
// With the encode signal low the word is the data itself. With it high,
// code_classifier decides the kind: a whole-value code returns the FV
// entry; an MSB code returns the MSB entry above the low portion as
// received; an LSB code returns the received high portion above the LSB
// entry; a two-portion code returns both entries. The read indices
// (fv_idx, msb_idx, lsb_idx) go to the tables' read ports and the entries
// come back on fv_data, msb_data and lsb_data in the same cycle.
module dec_select
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
  input  logic [W-1:0]       code,
  input  logic               enc,
  output idx_t               fv_idx,
  output idx_t               msb_idx,
  output idx_t               lsb_idx,
  input  logic [W-1:0]       fv_data,
  input  logic [MSB_W-1:0]   msb_data,
  input  logic [W-MSB_W-1:0] lsb_data,
  output logic [W-1:0]       data,
  output code_kind_e         kind
);
  localparam int LSB_W = W - MSB_W;

  code_kind_e ckind;

  code_classifier #(
    .W(W), .FV_M(FV_M), .MSB_EN(MSB_EN), .MSB_W(MSB_W), .MSB_M(MSB_M),
    .LSB_EN(LSB_EN), .LSB_M(LSB_M)
  ) u_class (
    .code    (code),
    .kind    (ckind),
    .fv_idx  (fv_idx),
    .msb_idx (msb_idx),
    .lsb_idx (lsb_idx)
  );

  always_comb begin
    kind = enc ? ckind : CODE_RAW;
    unique case (kind)
      CODE_FV:      data = fv_data;
      CODE_MSB:     data = {msb_data, code[LSB_W-1:0]};
      CODE_LSB:     data = {code[W-1:LSB_W], lsb_data};
      CODE_MSB_LSB: data = {msb_data, lsb_data};
      default:      data = code;
    endcase
  end

endmodule
