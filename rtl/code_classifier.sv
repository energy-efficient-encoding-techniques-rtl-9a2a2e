// code_classifier: tells which kind of code an encoded bus word carries and
// which table entries it names. Purely combinational.
//
// The rules are checked in priority order, so that every word the encoder
// emits maps back to exactly one meaning:
//   1. exactly one 1 above the FV table's control lines -> whole-value code;
//   2. MSB field and LSB field each a code                -> both portions;
//   3. MSB field a code                                    -> MSB portion;
//   4. LSB field a code                                    -> LSB portion;
//   5. otherwise                                           -> CODE_BAD.
// The decoder uses this on every encoded word. The encoder also runs each
// candidate code through it and sends the data unencoded when the candidate
// would be read back as a different kind (the paper's "LSB != 0" and
// "no of ones >= 2" tests are the cases of this rule for tables without
// control lines). The MSB field is the top MSB_W lines, the LSB field the
// remaining W - MSB_W lines; each table's control lines are the lowest lines
// of its field, as in the paper's examples.
module code_classifier
  import fvbus_pkg::*;
#(
  parameter int W      = 32,  // data bus width
  parameter int FV_M   = 0,   // internal control lines of the FV table
  parameter bit MSB_EN = 1,   // an MSB table exists
  parameter int MSB_W  = 20,  // width of the MSB portion
  parameter int MSB_M  = 0,   // internal control lines of the MSB table
  parameter bit LSB_EN = 1,   // an LSB table exists
  parameter int LSB_M  = 0    // internal control lines of the LSB table
) (
  input  logic [W-1:0] code,
  output code_kind_e   kind,
  output idx_t         fv_idx,
  output idx_t         msb_idx,
  output idx_t         lsb_idx
);
  localparam int LSB_W = W - MSB_W;

  word_t c, mf, lf;
  logic  fv_code, m_code, l_code;

  always_comb begin
    c       = word_t'(code);
    mf      = c >> LSB_W;
    lf      = c & low_mask(LSB_W);
    fv_code = field_is_code(c, W, FV_M);
    m_code  = MSB_EN && field_is_code(mf, MSB_W, MSB_M);
    l_code  = LSB_EN && field_is_code(lf, LSB_W, LSB_M);
    fv_idx  = idx_t'(field_index(c, W, FV_M));
    msb_idx = idx_t'(field_index(mf, MSB_W, MSB_M));
    lsb_idx = idx_t'(field_index(lf, LSB_W, LSB_M));
    if (fv_code)              kind = CODE_FV;
    else if (m_code && l_code) kind = CODE_MSB_LSB;
    else if (m_code)          kind = CODE_MSB;
    else if (l_code)          kind = CODE_LSB;
    else                      kind = CODE_BAD;
  end

endmodule
