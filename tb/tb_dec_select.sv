// tb_dec_select: checks the decoder selection logic. The testbench plays
// the tables: it holds known contents and answers the read indices the
// decoder asks for. Worked examples of every code kind are decoded for the
// FV-MSB-LSB layout (instance A) and for an FV-i-MSB-j layout with one
// control line in the FV and MSB tables (instance B); a word with the
// encode line low must come back unchanged.
module tb_dec_select;
  import fvbus_pkg::*;

  localparam int W = 32;

  logic [W-1:0]  code, data_a, data_b;
  logic          enc;
  idx_t          fi_a, mi_a, li_a, fi_b, mi_b, li_unused;
  code_kind_e    kind_a, kind_b;
  logic [W-1:0]  fv_tab  [64];
  logic [19:0]   msb_tab [64];
  logic [11:0]   lsb_tab [64];

  dec_select u_a (
    .code, .enc, .fv_idx(fi_a), .msb_idx(mi_a), .lsb_idx(li_a),
    .fv_data(fv_tab[fi_a[5:0]]), .msb_data(msb_tab[mi_a[5:0]]), .lsb_data(lsb_tab[li_a[5:0]]),
    .data(data_a), .kind(kind_a)
  );

  dec_select #(.FV_M(1), .MSB_EN(1), .MSB_W(20), .MSB_M(1), .LSB_EN(0)) u_b (
    .code, .enc, .fv_idx(fi_b), .msb_idx(mi_b), .lsb_idx(li_unused),
    .fv_data(fv_tab[fi_b[5:0]]), .msb_data(msb_tab[mi_b[5:0]]), .lsb_data(12'h000),
    .data(data_b), .kind(kind_b)
  );


  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic dec_a(input logic [W-1:0] c, input logic e, input logic [W-1:0] d, input code_kind_e k);
    code = c; enc = e;
    #1 check(data_a == d && kind_a == k,
             $sformatf("A %h: data %h kind %s, expected %h %s", c, data_a, kind_a.name(), d, k.name()));
  endtask

  task automatic dec_b(input logic [W-1:0] c, input logic e, input logic [W-1:0] d, input code_kind_e k);
    code = c; enc = e;
    #1 check(data_b == d && kind_b == k,
             $sformatf("B %h: data %h kind %s, expected %h %s", c, data_b, kind_b.name(), d, k.name()));
  endtask

  initial begin
    foreach (fv_tab[i])  fv_tab[i]  = $urandom;
    foreach (msb_tab[i]) msb_tab[i] = 20'($urandom);
    foreach (lsb_tab[i]) lsb_tab[i] = 12'($urandom);
    fv_tab[30]  = 32'hF048EFFF;
    msb_tab[19] = 20'hF048E;
    lsb_tab[11] = 12'h4CE;
    lsb_tab[1]  = 12'h71F;
    // FV-MSB-LSB
    dec_a(32'h4000_0000, 1, 32'hF048EFFF, CODE_FV);
    dec_a(32'h8000_0800, 1, 32'hF048E4CE, CODE_MSB_LSB);
    dec_a(32'hF048_E000, 0, 32'hF048E000, CODE_RAW);
    dec_a(32'h8000_0777, 1, 32'hF048E777, CODE_MSB);
    dec_a(32'h8542_E002, 1, 32'h8542E71F, CODE_LSB);
    dec_a(32'h1000_04CE, 0, 32'h100004CE, CODE_RAW);
    check(fi_a == 30 || kind_a != CODE_FV, "index");
    // FV-i-MSB-j: entry 29 (upper FV table), 32 (lower), MSB 18 and 19
    fv_tab[29]  = 32'hF048EFFF;
    fv_tab[32]  = 32'h7FFF1472;
    msb_tab[18] = 20'hF048E;
    msb_tab[19] = 20'h3A7FE;
    dec_b(32'h4000_0000, 1, 32'hF048EFFF, CODE_FV);
    check(fi_b == 29, $sformatf("B FV index %0d, expected 29", fi_b));
    dec_b(32'h8000_04CE, 1, 32'hF048E4CE, CODE_MSB);
    check(mi_b == 18, $sformatf("B MSB index %0d, expected 18", mi_b));
    dec_b(32'hF048_E000, 0, 32'hF048E000, CODE_RAW);
    dec_b(32'h0000_0005, 1, 32'h7FFF1472, CODE_FV);
    check(fi_b == 32, $sformatf("B FV index %0d, expected 32", fi_b));
    dec_b(32'h0000_3789, 1, 32'h3A7FE789, CODE_MSB);
    check(mi_b == 19, $sformatf("B MSB index %0d, expected 19", mi_b));
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
