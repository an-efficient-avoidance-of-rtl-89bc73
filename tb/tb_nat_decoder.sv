// tb_nat_decoder: self-checking test of the pipelined NAT decoder.
//
//  * 3 data bits on 4 lines: the eight published codewords (0000 ... 1010)
//    are sent back to back and must decode to 0..7.
//  * 14 data bits on 20 lines: the testbench draws random bit strings with
//    no two adjacent 1s (walking from the top bit, a 1 is never placed next
//    to another), computes their value as the sum of Fb(k+1) over set bits
//    C(k), keeps those below 2^14 and sends them, with random idle cycles.
// Every word must come out exactly N-1 clocks after it went in, in order.
module tb_nat_decoder;
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

  longint unsigned weight [N+1];   // weight[k] = Fb(k+1)
  initial begin
    longint unsigned a, b, t;
    a = 1; b = 1;
    weight[0] = 0;
    weight[1] = b;
    for (int k = 2; k <= N; k++) begin
      t = a + b; a = b; b = t;
      weight[k] = b;
    end
  end

  logic         v_in, v_out;
  logic [N-1:0] c_in;
  logic [D-1:0] d_out;
  nat_decoder u_big (.clk(clk), .rst_n(rst_n), .in_valid(v_in), .code_in(c_in),
                     .out_valid(v_out), .data_out(d_out));

  logic       sv_in, sv_out;
  logic [3:0] sc_in;
  logic [2:0] sd_out;
  nat_decoder #(.D(3), .N(4)) u_small (.clk(clk), .rst_n(rst_n), .in_valid(sv_in), .code_in(sc_in),
                                       .out_valid(sv_out), .data_out(sd_out));
  localparam logic [3:0] TABLE [8] = '{4'b0000, 4'b0001, 4'b0010, 4'b0100,
                                       4'b0101, 4'b1000, 4'b1001, 4'b1010};

  typedef struct { longint unsigned data; int cyc; } item_t;
  item_t q_big[$];
  item_t q_small[$];

  always @(negedge clk) if (rst_n) begin
    if (v_out) begin
      item_t it;
      if (q_big.size() == 0) check(1'b0, "14-bit: data with nothing sent");
      else begin
        it = q_big.pop_front();
        check(64'(d_out) == it.data, $sformatf("14-bit: got %0d want %0d", d_out, it.data));
        check(cyc - it.cyc == N - 1, $sformatf("14-bit: latency %0d, want %0d", cyc - it.cyc, N - 1));
      end
    end
    if (sv_out) begin
      item_t it;
      if (q_small.size() == 0) check(1'b0, "3-bit: data with nothing sent");
      else begin
        it = q_small.pop_front();
        check(64'(sd_out) == it.data, $sformatf("3-bit: got %0d want %0d", sd_out, it.data));
        check(cyc - it.cyc == 3, $sformatf("3-bit: latency %0d, want 3", cyc - it.cyc));
      end
    end
  end

  task automatic send(input logic v, input logic [N-1:0] c, input longint unsigned val,
                      input logic sv, input int unsigned si);
    @(negedge clk);
    v_in = v; c_in = c; sv_in = sv; sc_in = TABLE[si];
    if (v)  q_big.push_back('{data: val, cyc: cyc});
    if (sv) q_small.push_back('{data: 64'(si), cyc: cyc});
  endtask

  initial begin
    logic [N-1:0] code;
    longint unsigned val;
    v_in = 0; c_in = '0; sv_in = 0; sc_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 8; i++) send(1'b0, '0, 0, 1'b1, i);
    for (int i = 0; i < 3000; i++) begin
      do begin
        code = '0;
        for (int k = N; k >= 1; k--)
          if (!(k < N && code[k]) && $urandom_range(2) == 0) code[k-1] = 1'b1;
        val = 0;
        for (int k = 1; k <= N; k++) if (code[k-1]) val += weight[k];
      end while (val >= (64'd1 << D));
      send($urandom_range(4) != 0, code, val, 1'($urandom), $urandom_range(7));
    end
    send(1'b0, '0, 0, 1'b0, 0);
    repeat (N + 2) @(negedge clk);
    check(q_big.size() == 0 && q_small.size() == 0, "words still outstanding at the end");
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
