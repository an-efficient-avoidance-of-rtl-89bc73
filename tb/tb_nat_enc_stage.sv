// tb_nat_enc_stage: self-checking test of one NAT encoder block E(k, Di).
//
// Two blocks are exercised side by side: the default one (14-bit data,
// k = 20, weight Fb(21) = 10946) and the small one from the 3-bit/4-line
// example (k = 4, weight Fb(5) = 5). Each cycle both get a random residual,
// and one clock later the code bit and the new residual are compared with
// the expected compare-and-subtract result. The weights are written out as
// numbers here, not taken from the design's package. The boundary values
// (weight - 1, weight, all ones, zero) are driven explicitly.
module tb_nat_enc_stage;
  localparam int unsigned DA = 14;
  localparam logic [DA-1:0] WA = 14'd10946;  // Fb(21)
  localparam int unsigned DB = 3;
  localparam logic [DB-1:0] WB = 3'd5;       // Fb(5)

  logic clk, rst_n;
  int checks, failures;
  initial begin
    clk = 1'b0;
    rst_n = 1'b0;
    checks = 0;
    failures = 0;
  end
  always #5 clk = ~clk;

  logic          va, vb, ova, ovb, ca, cb;
  logic [DA-1:0] da, oa;
  logic [DB-1:0] db, ob;

  nat_enc_stage u_a (.clk(clk), .rst_n(rst_n), .in_valid(va), .d_in(da),
                     .out_valid(ova), .d_out(oa), .c_out(ca));
  nat_enc_stage #(.D(DB), .K(4)) u_b (.clk(clk), .rst_n(rst_n), .in_valid(vb), .d_in(db),
                     .out_valid(ovb), .d_out(ob), .c_out(cb));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Apply one input pair, then check after the clock edge.
  task automatic step(input logic [DA-1:0] xa, input logic [DB-1:0] xb, input logic vin);
    logic ea, eb;
    logic [DA-1:0] ra;
    logic [DB-1:0] rb;
    @(negedge clk);
    va = vin; vb = ~vin; da = xa; db = xb;
    ea = (xa >= WA); ra = ea ? xa - WA : xa;
    eb = (xb >= WB); rb = eb ? xb - WB : xb;
    @(negedge clk);
    check(ca == ea && oa == ra, $sformatf("K=20 in=%0d: c=%0d out=%0d, want c=%0d out=%0d", xa, ca, oa, ea, ra));
    check(cb == eb && ob == rb, $sformatf("K=4 in=%0d: c=%0d out=%0d, want c=%0d out=%0d", xb, cb, ob, eb, rb));
    check(ova == vin && ovb == ~vin, "valid not carried through one register");
  endtask

  initial begin
    va = 0; vb = 0; da = '0; db = '0;
    repeat (3) @(negedge clk);
    check(ova == 1'b0 && ovb == 1'b0, "valid set during reset");
    rst_n = 1'b1;
    step(WA - 1, WB - 1, 1'b1);
    step(WA, WB, 1'b0);
    step('1, '1, 1'b1);
    step('0, '0, 1'b1);
    for (int i = 0; i < 500; i++) step(DA'($urandom), DB'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
