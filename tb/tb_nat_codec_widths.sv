// tb_nat_codec_widths: runs the looped-back NAT codec at every data width
// for which the codec's cost is usually quoted (8 to 72 bits), plus the
// 3-bit and 4-bit worked examples, each at its expected code length:
//   d :  3  4  8 10 12 14 16 20 24 32 48 56 64  72
//   n :  4  6 12 15 17 20 23 29 35 46 69 81 92 104
// (n is the smallest length with Fb(n+2) >= 2^d). Each width is checked by
// nat_link_check; the 3-bit case starts its lines at 1100 and must reproduce
// the worked example (data 6 -> codeword 1001 -> lines 0101).
module tb_nat_codec_widths;
  localparam int NW = 14;
  localparam int unsigned DW [NW] = '{3, 4, 8, 10, 12, 14, 16, 20, 24, 32, 48, 56, 64, 72};
  localparam int unsigned NL [NW] = '{4, 6, 12, 15, 17, 20, 23, 29, 35, 46, 69, 81, 92, 104};

  logic clk, rst_n;
  initial begin
    clk = 1'b0;
    rst_n = 1'b0;
  end
  always #5 clk = ~clk;

  logic done [NW];
  int   chk  [NW];
  int   fail [NW];

  for (genvar i = 0; i < NW; i++) begin : g_w
    nat_link_check #(
      .D(DW[i]), .EXP_N(NL[i]), .WORDS(400),
      .INIT(DW[i] == 3 ? NL[i]'(4'b1100) : '0)
    ) u_link (.clk(clk), .rst_n(rst_n), .done(done[i]), .checks(chk[i]), .failures(fail[i]));
  end

  function automatic bit all_done();
    for (int i = 0; i < NW; i++) if (!done[i]) return 1'b0;
    return 1'b1;
  endfunction

  int checks, failures;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(negedge clk);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NW; i++) begin
      $display("d=%0d n=%0d: %0d checks, %0d failures", DW[i], NL[i], chk[i], fail[i]);
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    checks = 0;
    failures = 1;
    for (int i = 0; i < NW; i++) checks += chk[i];
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
