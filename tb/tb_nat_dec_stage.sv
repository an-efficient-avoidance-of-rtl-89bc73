// tb_nat_dec_stage: self-checking test of one NAT decoder block D(k, Di).
//
// The default block (14-bit sum, k = 20, weight Fb(21) = 10946) and the
// k = 3 block of the 3-bit example (weight Fb(4) = 3) get random partial sums
// and code bits; one clock later the new sum must be Di + weight when the code
// bit is set and Di otherwise (modulo the data width). Weights are literal
// numbers here.
module tb_nat_dec_stage;
  localparam int unsigned DA = 14;
  localparam logic [DA-1:0] WA = 14'd10946;  // Fb(21)
  localparam int unsigned DB = 3;
  localparam logic [DB-1:0] WB = 3'd3;       // Fb(4)

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

  nat_dec_stage u_a (.clk(clk), .rst_n(rst_n), .in_valid(va), .d_in(da), .c_in(ca),
                     .out_valid(ova), .d_out(oa));
  nat_dec_stage #(.D(DB), .K(3)) u_b (.clk(clk), .rst_n(rst_n), .in_valid(vb), .d_in(db), .c_in(cb),
                     .out_valid(ovb), .d_out(ob));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic step(input logic [DA-1:0] xa, input logic xca,
                      input logic [DB-1:0] xb, input logic xcb, input logic vin);
    logic [DA-1:0] ea;
    logic [DB-1:0] eb;
    @(negedge clk);
    va = vin; vb = ~vin; da = xa; db = xb; ca = xca; cb = xcb;
    ea = xca ? xa + WA : xa;
    eb = xcb ? xb + WB : xb;
    @(negedge clk);
    check(oa == ea, $sformatf("K=20 in=%0d c=%0d: out=%0d want %0d", xa, xca, oa, ea));
    check(ob == eb, $sformatf("K=3 in=%0d c=%0d: out=%0d want %0d", xb, xcb, ob, eb));
    check(ova == vin && ovb == ~vin, "valid not carried through one register");
  endtask

  initial begin
    va = 0; vb = 0; da = '0; db = '0; ca = 0; cb = 0;
    repeat (3) @(negedge clk);
    check(ova == 1'b0 && ovb == 1'b0, "valid set during reset");
    rst_n = 1'b1;
    step(14'd0, 1'b1, 3'd2, 1'b1, 1'b1);   // 0 + 10946, 2 + 3 = 5
    step(14'd5437, 1'b1, 3'd4, 1'b0, 1'b0); // 5437 + 10946 = 16383, the largest 14-bit value
    for (int i = 0; i < 500; i++) step(DA'($urandom), 1'($urandom), DB'($urandom), 1'($urandom), 1'($urandom));
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
