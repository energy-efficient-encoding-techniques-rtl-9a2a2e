// tb_fvbus_codec_variants: runs fvbus_codec in the other schemes the
// codec supports, each as a sending/receiving pair on a 32-bit bus:
//   FV-0       32-entry FV table (one-hot codes only)
//   FV-1       62 FV entries, one control line
//   FV-2       120 FV entries, two control lines
//   FV-1-MSB-2 32 FV entries, 38-entry table of 20-bit MSB portions
//   FV-2-MSB-2 62 FV entries, 36-entry table of 19-bit MSB portions
//   FV-MSB-LSB with 2-, 12- and 29-bit MSB portions (the width sweep)
// Every word must arrive intact two cycles after it was offered, some words
// must go encoded, and the bus must toggle fewer lines than the raw data.
module tb_fvbus_codec_variants;
  logic clk = 1'b0;
  always #5 clk = !clk;

  localparam int NV = 8;
  int   c[NV], f[NV], k[NV];
  logic s[NV], d[NV];

  codec_pair_stream #(.FV_M(0), .MSB_EN(0), .LSB_EN(0)) u_fv0 (
    .clk, .checks(c[0]), .failures(f[0]), .coded(k[0]), .saved(s[0]), .done(d[0]));
  codec_pair_stream #(.FV_M(1), .MSB_EN(0), .LSB_EN(0)) u_fv1 (
    .clk, .checks(c[1]), .failures(f[1]), .coded(k[1]), .saved(s[1]), .done(d[1]));
  codec_pair_stream #(.FV_M(2), .MSB_EN(0), .LSB_EN(0)) u_fv2 (
    .clk, .checks(c[2]), .failures(f[2]), .coded(k[2]), .saved(s[2]), .done(d[2]));
  codec_pair_stream #(.FV_M(0), .MSB_EN(1), .MSB_W(20), .MSB_M(1), .LSB_EN(0)) u_fv1msb2 (
    .clk, .checks(c[3]), .failures(f[3]), .coded(k[3]), .saved(s[3]), .done(d[3]));
  codec_pair_stream #(.FV_M(1), .MSB_EN(1), .MSB_W(19), .MSB_M(1), .LSB_EN(0)) u_fv2msb2 (
    .clk, .checks(c[4]), .failures(f[4]), .coded(k[4]), .saved(s[4]), .done(d[4]));
  // FV-MSB-LSB at the ends and middle of the MSB width sweep (2 to 29 bits)
  codec_pair_stream #(.MSB_W(2)) u_msb2 (
    .clk, .checks(c[5]), .failures(f[5]), .coded(k[5]), .saved(s[5]), .done(d[5]));
  codec_pair_stream #(.MSB_W(12)) u_msb12 (
    .clk, .checks(c[6]), .failures(f[6]), .coded(k[6]), .saved(s[6]), .done(d[6]));
  codec_pair_stream #(.MSB_W(29)) u_msb29 (
    .clk, .checks(c[7]), .failures(f[7]), .coded(k[7]), .saved(s[7]), .done(d[7]));

  initial begin
    int checks, failures;
    #1;
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5] && d[6] && d[7]);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NV; i++) begin
      checks += c[i] + 2;
      failures += f[i];
      if (k[i] == 0) begin failures++; $display("FAIL: variant %0d never encoded", i); end
      if (!s[i])     begin failures++; $display("FAIL: variant %0d saved no toggles", i); end
      $display("variant %0d: %0d words encoded", i, k[i]);
    end
    // a larger table holds more of the 48 frequent values
    checks++;
    if (!(k[2] > k[0])) begin failures++; $display("FAIL: FV-2 did not encode more than FV-0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

endmodule
