// tb_nat_encoder: self-checking test of the pipelined NAT encoder.
//
// Two encoders run side by side.
//  * 3 data bits on 4 lines: the eight data words 0..7 are sent back to back
//    and each codeword must equal the published mapping (0000, 0001, 0010,
//    0100, 0101, 1000, 1001, 1010).
//  * 14 data bits on 20 lines (the default): random words with random idle
//    cycles plus the boundary words. Each codeword is checked by its defining
//    properties rather than by re-running the algorithm: no two adjacent 1s,
//    and the sum of Fb(k+1) over its set bits C(k) equals the data word.
//    Those two properties fix the codeword uniquely (Zeckendorf's theorem).
// Both instances must return each word exactly N-1 clocks after it entered,
// in order. The Fibonacci weights are built by this testbench itself.
module tb_nat_encoder;
  localparam int unsigned D = 14;
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
  int cyc;
  always @(posedge clk) cyc <= (rst_n ? cyc + 1 : 0);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // weight[k] = Fb(k+1) for code bit C(k), k = 1..N
  longint unsigned weight [N+1];
  initial begin
    longint unsigned a, b, t;
    a = 1; b = 1;                      // Fb(1), Fb(2)
    weight[0] = 0;
    weight[1] = b;                     // Fb(2)
    for (int k = 2; k <= N; k++) begin
      t = a + b; a = b; b = t;
      weight[k] = b;                   // Fb(k+1)
    end
  end

  // ---------------- 14-bit / 20-line instance ----------------
  logic         v_in, v_out;
  logic [D-1:0] d_in;
  logic [N-1:0] c_out;
  nat_encoder u_big (.clk(clk), .rst_n(rst_n), .in_valid(v_in), .data_in(d_in),
                     .out_valid(v_out), .code_out(c_out));

  typedef struct { longint unsigned data; int cyc; } item_t;
  item_t q_big[$];
  item_t q_small[$];

  // ---------------- 3-bit / 4-line instance ----------------
  logic       sv_in, sv_out;
  logic [2:0] sd_in;
  logic [3:0] sc_out;
  nat_encoder #(.D(3), .N(4)) u_small (.clk(clk), .rst_n(rst_n), .in_valid(sv_in), .data_in(sd_in),
                                       .out_valid(sv_out), .code_out(sc_out));
  localparam logic [3:0] TABLE [8] = '{4'b0000, 4'b0001, 4'b0010, 4'b0100,
                                       4'b0101, 4'b1000, 4'b1001, 4'b1010};

  // Output side: checked at every falling edge.
  int n_big, n_small;
  initial begin
    n_big = 0;
    n_small = 0;
  end
  always @(negedge clk) if (rst_n) begin
    if (v_out) begin
      item_t it;
      longint unsigned sum;
      if (q_big.size() == 0) check(1'b0, "14-bit: codeword with nothing sent");
      else begin
        it = q_big.pop_front();
        sum = 0;
        for (int k = 1; k <= N; k++) if (c_out[k-1]) sum += weight[k];
        check(((c_out >> 1) & c_out) == '0, $sformatf("14-bit: adjacent 1s in %b", c_out));
        check(sum == it.data, $sformatf("14-bit: code %b weighs %0d, data %0d", c_out, sum, it.data));
        check(cyc - it.cyc == N - 1, $sformatf("14-bit: latency %0d, want %0d", cyc - it.cyc, N - 1));
        n_big++;
      end
    end
    if (sv_out) begin
      item_t it;
      if (q_small.size() == 0) check(1'b0, "3-bit: codeword with nothing sent");
      else begin
        it = q_small.pop_front();
        check(sc_out == TABLE[3'(it.data)], $sformatf("3-bit: data %0d gave %b, want %b", it.data, sc_out, TABLE[3'(it.data)]));
        check(cyc - it.cyc == 3, $sformatf("3-bit: latency %0d, want 3", cyc - it.cyc));
        n_small++;
      end
    end
  end

  task automatic send(input logic v, input logic [D-1:0] d, input logic sv, input logic [2:0] sd);
    @(negedge clk);
    v_in = v; d_in = d; sv_in = sv; sd_in = sd;
    if (v)  q_big.push_back('{data: 64'(d), cyc: cyc});
    if (sv) q_small.push_back('{data: 64'(sd), cyc: cyc});
  endtask

  initial begin
    v_in = 0; d_in = '0; sv_in = 0; sd_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 8; i++) send(1'b1, D'(i), 1'b1, 3'(i));
    send(1'b1, 14'd10945, 1'b0, '0);   // Fb(21) - 1: top bit clear
    send(1'b1, 14'd10946, 1'b0, '0);   // Fb(21): top bit set, remainder 0
    send(1'b1, '1, 1'b0, '0);          // 16383
    for (int i = 0; i < 2000; i++) begin
      logic v;
      v = ($urandom_range(3) != 0);
      send(v, D'($urandom), v, 3'($urandom));
    end
    send(1'b0, '0, 1'b0, '0);
    repeat (N + 2) @(negedge clk);
    check(q_big.size() == 0 && q_small.size() == 0, "words still outstanding at the end");
    check(n_small >= 8 && n_big >= 11, "too few words came out");
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
