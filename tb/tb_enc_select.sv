// tb_enc_select: checks the encoder selection logic on worked examples.
//
// Instance A is FV-MSB-LSB (32-bit bus, 20/12 split, no control lines).
// Instance B is FV-i-MSB-j with one control line in the FV table (bit 0)
// and one in the MSB table (bit 12), 20-bit MSB portion. For every case the
// expected word and encode bit follow from the bus layout: entry e of a
// field with n lines and m control lines is sent as a 1 on line
// m + e mod (n-m) with e div (n-m) on the control lines. The cases include
// the MSB hit with an all-zero low portion and the LSB hit with a one-hot
// high portion, which must both go unencoded, and for instance B an MSB hit
// whose only low 1 falls on the FV control line, which must also go
// unencoded because it would read back as a whole-value code.
module tb_enc_select;
  import fvbus_pkg::*;

  localparam int W = 32;

  logic [W-1:0] data;
  logic         fv_hit, msb_hit, lsb_hit;
  idx_t         fv_idx, msb_idx, lsb_idx;
  logic [W-1:0] code_a, code_b;
  logic         enc_a, enc_b, sup_a, sup_b;
  code_kind_e   kind_a, kind_b;

  enc_select u_a (
    .data, .fv_hit, .fv_idx, .msb_hit, .msb_idx, .lsb_hit, .lsb_idx,
    .code(code_a), .enc(enc_a), .kind(kind_a), .suppressed(sup_a)
  );

  enc_select #(.FV_M(1), .MSB_EN(1), .MSB_W(20), .MSB_M(1), .LSB_EN(0)) u_b (
    .data, .fv_hit, .fv_idx, .msb_hit, .msb_idx, .lsb_hit(1'b0), .lsb_idx,
    .code(code_b), .enc(enc_b), .kind(kind_b), .suppressed(sup_b)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic apply(input logic [W-1:0] d, input logic fh, input int fi,
                       input logic mh, input int mi, input logic lh, input int li);
    data = d; fv_hit = fh; fv_idx = idx_t'(fi);
    msb_hit = mh; msb_idx = idx_t'(mi); lsb_hit = lh; lsb_idx = idx_t'(li);
    #1;
  endtask

  task automatic expect_a(input logic e, input logic [W-1:0] c, input code_kind_e k, input string tag);
    check(enc_a == e && code_a == c && kind_a == k,
          $sformatf("A %s: enc=%0b code=%h kind=%s", tag, enc_a, code_a, kind_a.name()));
  endtask

  task automatic expect_b(input logic e, input logic [W-1:0] c, input code_kind_e k, input string tag);
    check(enc_b == e && code_b == c && kind_b == k,
          $sformatf("B %s: enc=%0b code=%h kind=%s", tag, enc_b, code_b, kind_b.name()));
  endtask

  initial begin
    // ------------------------------------------------ FV-MSB-LSB (A)
    apply(32'hF048EFFF, 1, 30, 1, 19, 1, 11);
    expect_a(1, 32'h4000_0000, CODE_FV, "FV hit wins over portions");
    apply(32'hF048E4CE, 0, 0, 1, 19, 1, 11);
    expect_a(1, 32'h8000_0800, CODE_MSB_LSB, "both portions");
    apply(32'hF048E000, 0, 0, 1, 19, 0, 0);
    expect_a(0, 32'hF048_E000, CODE_RAW, "MSB hit, low portion zero");
    check(sup_a, "A: suppression not flagged");
    apply(32'hF048E800, 0, 0, 1, 19, 0, 0);
    expect_a(0, 32'hF048_E800, CODE_RAW, "MSB hit, low portion one-hot");
    apply(32'hF048E777, 0, 0, 1, 19, 0, 0);
    expect_a(1, 32'h8000_0777, CODE_MSB, "MSB only");
    apply(32'h8542E71F, 0, 0, 0, 0, 1, 1);
    expect_a(1, 32'h8542_E002, CODE_LSB, "LSB only");
    apply(32'h100004CE, 0, 0, 0, 0, 1, 5);
    expect_a(0, 32'h1000_04CE, CODE_RAW, "LSB hit, high portion one-hot");
    check(sup_a, "A: suppression not flagged");
    apply(32'h12345678, 0, 0, 0, 0, 0, 0);
    expect_a(0, 32'h1234_5678, CODE_RAW, "miss");
    check(!sup_a, "A: miss flagged as suppressed");

    // ----------------------------------------- FV-i-MSB-j with control lines (B)
    apply(32'hF048EFFF, 1, 29, 0, 0, 0, 0);
    expect_b(1, 32'h4000_0000, CODE_FV, "FV upper table");
    apply(32'hF048E4CE, 0, 0, 1, 18, 0, 0);
    expect_b(1, 32'h8000_04CE, CODE_MSB, "MSB upper table");
    apply(32'hF048E000, 0, 0, 1, 18, 0, 0);
    expect_b(0, 32'hF048_E000, CODE_RAW, "MSB hit, low portion zero");
    apply(32'h7FFF1472, 1, 32, 0, 0, 0, 0);
    expect_b(1, 32'h0000_0005, CODE_FV, "FV lower table");
    apply(32'h3A7FE789, 0, 0, 1, 19, 0, 0);
    expect_b(1, 32'h0000_3789, CODE_MSB, "MSB lower table");
    apply(32'hF048E001, 0, 0, 1, 18, 0, 0);
    expect_b(0, 32'hF048_E001, CODE_RAW, "MSB hit whose code would read as FV");
    check(sup_b, "B: suppression not flagged");
    apply(32'hF048E800, 0, 0, 1, 18, 0, 0);
    expect_b(1, 32'h8000_0800, CODE_MSB, "MSB hit, one-hot low portion allowed without LSB table");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
