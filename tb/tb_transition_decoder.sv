// tb_transition_decoder: self-checking test of the transition (XOR) decoder.
//
//  * 4 lines starting from level 1100: receiving 0101 must give codeword
//    1001, the inverse of the 3-bit example.
//  * 20 lines from reset level 0: the testbench keeps its own line levels,
//    toggles them with random codewords, presents the new levels on some
//    cycles (with the strobe) and random garbage with no strobe on others.
//    Each strobed word must come back as its codeword one clock later;
//    unstrobed cycles must neither produce a word nor disturb the stored
//    levels.
module tb_transition_decoder;
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

  logic         st, ov;
  logic [N-1:0] bus, code;
  transition_decoder u_big (.clk(clk), .rst_n(rst_n), .bus_in(bus), .bus_strobe(st),
                            .out_valid(ov), .code_out(code));

  logic       sst, sov;
  logic [3:0] sbus, scode;
  transition_decoder #(.N(4), .INIT_STATE(4'b1100)) u_small (.clk(clk), .rst_n(rst_n), .bus_in(sbus),
                            .bus_strobe(sst), .out_valid(sov), .code_out(scode));

  logic [N-1:0] levels;

  initial begin
    st = 0; bus = '0; sst = 0; sbus = '0;
    repeat (3) @(negedge clk);
    check(!ov && !sov, "valid during reset");
    rst_n = 1'b1;
    levels = '0;
    @(negedge clk);
    sst = 1'b1; sbus = 4'b0101;
    @(negedge clk);
    check(sov && scode == 4'b1001, $sformatf("1100 -> 0101 gave %b", scode));
    sst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      logic vi;
      logic [N-1:0] ci;
      vi = ($urandom_range(3) != 0);
      ci = N'($urandom);
      if (vi) begin
        levels ^= ci;
        bus = levels;
      end else begin
        bus = N'($urandom);
      end
      st = vi;
      @(negedge clk);
      check(ov == vi, "out_valid does not follow the strobe");
      if (vi) check(code == ci, $sformatf("code %b, want %b", code, ci));
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
