// enc_select: encoder selection logic. From the data value and the search
// results of the FV, MSB and LSB tables it forms the word handed to the
// correlator and the external encode signal. Purely combinational.
//
// Priority, as in the paper's algorithms (FV-i, FV-i-MSB-j, FV-MSB-LSB):
//   - FV hit: always encoded, one-hot code of the FV entry.
//   - MSB and LSB hits (FV-MSB-LSB): one-hot codes in both portions.
//   - MSB hit only: MSB code in the top MSB_W lines, the low portion as is;
//     encoded only when the low portion is nonzero (FV-i-MSB-j) or has at
//     least two ones (when an LSB table exists), so the word cannot be
//     mistaken for another code.
//   - LSB hit only: LSB code in the low lines, the MSB portion as is, only
//     when the MSB portion has at least two ones.
//   - otherwise, or when a candidate fails its test: unencoded data.
// As a further safeguard of this design, each candidate is also run
// through code_classifier and sent only if it reads back as the kind it was
// built as. With tables that use internal control lines, the paper's
// "low portion nonzero" test alone lets through words such as an MSB code
// whose only other 1 sits on an FV control line; the classifier check sends
// those unencoded. For the paper's main configuration (no control
// lines) the check never changes the outcome.
//
// `suppressed` flags a table hit that was nevertheless sent unencoded.
module enc_select
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
  input  logic [W-1:0] data,
  input  logic         fv_hit,
  input  idx_t         fv_idx,
  input  logic         msb_hit,
  input  idx_t         msb_idx,
  input  logic         lsb_hit,
  input  idx_t         lsb_idx,
  output logic [W-1:0] code,
  output logic         enc,
  output code_kind_e   kind,
  output logic         suppressed
);
  localparam int LSB_W = W - MSB_W;

  word_t      d, msb_raw, lsb_raw, msb_cw, lsb_cw, cand;
  code_kind_e want, got;
  logic       rule_ok, m_hit, l_hit;
  idx_t       unused_fv, unused_m, unused_l;
  logic [W-1:0] cand_w;

  assign cand_w = cand[W-1:0];

  code_classifier #(
    .W(W), .FV_M(FV_M), .MSB_EN(MSB_EN), .MSB_W(MSB_W), .MSB_M(MSB_M),
    .LSB_EN(LSB_EN), .LSB_M(LSB_M)
  ) u_check (
    .code    (cand_w),
    .kind    (got),
    .fv_idx  (unused_fv),
    .msb_idx (unused_m),
    .lsb_idx (unused_l)
  );

  always_comb begin
    d       = word_t'(data);
    m_hit   = MSB_EN && msb_hit;
    l_hit   = LSB_EN && lsb_hit;
    msb_raw = d >> LSB_W;
    lsb_raw = d & low_mask(LSB_W);
    msb_cw  = field_code(int'(msb_idx), MSB_W, MSB_M);
    lsb_cw  = field_code(int'(lsb_idx), LSB_W, LSB_M);
    cand    = d;
    want    = CODE_RAW;
    rule_ok = 1'b0;
    if (fv_hit) begin
      cand    = field_code(int'(fv_idx), W, FV_M);
      want    = CODE_FV;
      rule_ok = 1'b1;
    end else if (m_hit && l_hit) begin
      cand    = (msb_cw << LSB_W) | lsb_cw;
      want    = CODE_MSB_LSB;
      rule_ok = 1'b1;
    end else if (m_hit) begin
      cand    = (msb_cw << LSB_W) | lsb_raw;
      want    = CODE_MSB;
      rule_ok = LSB_EN ? (popcount(lsb_raw) >= 2) : (lsb_raw != '0);
    end else if (l_hit) begin
      cand    = (msb_raw << LSB_W) | lsb_cw;
      want    = CODE_LSB;
      rule_ok = popcount(msb_raw) >= 2;
    end
  end

  always_comb begin
    if (want != CODE_RAW && rule_ok && got == want) begin
      code = cand_w;
      enc  = 1'b1;
      kind = want;
    end else begin
      code = data;
      enc  = 1'b0;
      kind = CODE_RAW;
    end
    suppressed = (want != CODE_RAW) && !enc;
  end

endmodule
