// tb_transition_encoder: self-checking test of the transition (XOR) encoder.
//
//  * 4 lines starting from level 1100: codeword 1001 (the data word 6 of the
//    3-bit example) must move the outer two lines only, giving 0101.
//  * 20 lines from reset level 0: random codewords with random idle cycles.
//    A reference copy of the line levels is toggled wherever the code has a
//    1; bus_out must match it one clock later, hold during idle cycles, and
//    bus_strobe must mark exactly the cycles that carry a new word.
module tb_transition_encoder;
  localparam int unsigned N = 20;

  logic clk, rst_n;
  int checks, failures;
  initial begin
    clk = 1'b0;
    rst_n = 1'b0;
    checks = 0;
    failures = 0;
  end
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic         v;
  logic [N-1:0] code, bus;
  logic         strobe;
  transition_encoder u_big (.clk(clk), .rst_n(rst_n), .in_valid(v), .code_in(code),
                            .bus_out(bus), .bus_strobe(strobe));

  logic       sv;
  logic [3:0] scode, sbus;
  logic       sstrobe;
  transition_encoder #(.N(4), .INIT_STATE(4'b1100)) u_small (.clk(clk), .rst_n(rst_n), .in_valid(sv),
                            .code_in(scode), .bus_out(sbus), .bus_strobe(sstrobe));

  logic [N-1:0] model;

  initial begin
    v = 0; code = '0; sv = 0; scode = '0;
    repeat (3) @(negedge clk);
    check(bus == '0 && sbus == 4'b1100 && !strobe && !sstrobe, "reset state");
    rst_n = 1'b1;
    model = '0;
    @(negedge clk);
    sv = 1'b1; scode = 4'b1001;
    @(negedge clk);
    check(sbus == 4'b0101 && sstrobe, $sformatf("1100 ^ 1001 gave %b", sbus));
    sv = 1'b0; scode = 4'b1111;
    @(negedge clk);
    check(sbus == 4'b0101 && !sstrobe, "idle cycle moved the 4-line bus");
    for (int i = 0; i < 2000; i++) begin
      logic vi;
      logic [N-1:0] ci;
      vi = ($urandom_range(3) != 0);
      ci = N'($urandom);
      v = vi; code = ci;
      @(negedge clk);
      if (vi) model ^= ci;
      check(bus == model, $sformatf("bus %b, want %b", bus, model));
      check(strobe == vi, "strobe does not follow the valid codeword");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
