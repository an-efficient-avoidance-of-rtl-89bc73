// tb_nat_codec_top: end-to-end test of the NAT codec at its default size,
// 14 data bits carried on 20 bus lines.
//
// The transmit side is looped straight back to the receive side (bus_out to
// bus_in, bus_out_strobe to bus_in_strobe), standing in for the wires. The
// testbench streams data words, with bursts of back-to-back words and idle
// gaps, and checks
//  * on the wires: each strobed change of the line levels has no two adjacent
//    lines switching, and the switched lines, read as code bits C(k) with
//    weights Fb(k+1), add up to the data word sent N clocks earlier; in idle
//    cycles no line moves;
//  * at the receiver: every word comes back unchanged, in order, exactly 2N
//    clocks after it was sent.
// It counts how often each behaviour of the codec was exercised and fails if
// one never was: the top code bit set (the first block subtracts Fb(N+1)),
// the all-zero codeword (data 0, no line moves), the largest data word,
// back-to-back words at one per clock, and idle cycles with the bus held.
module tb_nat_codec_top;
  localparam int unsigned D = 14;
  localparam int unsigned N = 20;

  logic clk, rst_n;
  initial begin
    clk = 1'b0;
    rst_n = 1'b0;
  end
  always #5 clk = ~clk;

  int checks, failures, cyc;
  initial begin
    checks = 0;
    failures = 0;
  end
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

  logic         tx_valid, rx_valid, strobe;
  logic [D-1:0] tx_data, rx_data;
  logic [N-1:0] bus;

  nat_codec_top dut (
    .clk(clk), .rst_n(rst_n),
    .tx_valid(tx_valid), .tx_data(tx_data),
    .bus_out(bus), .bus_out_strobe(strobe),
    .bus_in(bus), .bus_in_strobe(strobe),
    .rx_valid(rx_valid), .rx_data(rx_data)
  );

  typedef struct { longint unsigned data; int cyc; } item_t;
  item_t q_wire[$];
  item_t q_rx[$];

  int n_top_bit, n_zero_word, n_max_word, n_back_to_back, n_idle_hold, n_rx, n_sent;
  initial begin
    n_top_bit = 0; n_zero_word = 0; n_max_word = 0; n_back_to_back = 0;
    n_idle_hold = 0; n_rx = 0; n_sent = 0;
  end

  logic [N-1:0] bus_prev;
  logic         rx_prev_valid;
  always @(negedge clk) begin
    if (rst_n) begin
      logic [N-1:0] moved;
      moved = bus ^ bus_prev;
      check(((moved >> 1) & moved) == '0, $sformatf("adjacent lines switched together: %b", moved));
      if (strobe) begin
        item_t it;
        longint unsigned sum;
        sum = 0;
        for (int k = 1; k <= N; k++) if (moved[k-1]) sum += weight[k];
        if (q_wire.size() == 0) check(1'b0, "bus strobe with nothing sent");
        else begin
          it = q_wire.pop_front();
          check(sum == it.data, $sformatf("bus moved %b (value %0d), data was %0d", moved, sum, it.data));
          check(cyc - it.cyc == N, $sformatf("tx latency %0d, want %0d", cyc - it.cyc, N));
          if (moved[N-1]) n_top_bit++;
          if (moved == '0) n_zero_word++;
        end
      end else begin
        check(moved == '0, "bus moved without a strobe");
        n_idle_hold++;
      end
      if (rx_valid) begin
        item_t it;
        if (q_rx.size() == 0) check(1'b0, "word received with nothing sent");
        else begin
          it = q_rx.pop_front();
          check(64'(rx_data) == it.data, $sformatf("received %0d, sent %0d", rx_data, it.data));
          check(cyc - it.cyc == 2 * N, $sformatf("end-to-end latency %0d, want %0d", cyc - it.cyc, 2 * N));
          if (rx_prev_valid) n_back_to_back++;
          if (rx_data == '1) n_max_word++;
          n_rx++;
        end
      end
      rx_prev_valid = rx_valid;
    end else begin
      rx_prev_valid = 1'b0;
    end
    bus_prev = bus;
  end

  task automatic send(input logic v, input logic [D-1:0] d);
    @(negedge clk);
    tx_valid = v;
    tx_data  = d;
    if (v) begin
      q_wire.push_back('{data: 64'(d), cyc: cyc});
      q_rx.push_back('{data: 64'(d), cyc: cyc});
      n_sent++;
    end
  endtask

  initial begin
    tx_valid = 1'b0;
    tx_data  = '0;
    repeat (3) @(negedge clk);
    check(bus == '0 && !strobe && !rx_valid, "reset state");
    rst_n = 1'b1;
    // Directed words first: zero, the largest word, the top-bit boundary.
    send(1'b1, '0);
    send(1'b1, '1);
    send(1'b1, 14'd10945);
    send(1'b1, 14'd10946);
    send(1'b0, '0);
    send(1'b1, '0);
    // Then bursts and gaps of random words.
    for (int i = 0; i < 3000; i++) begin
      logic v;
      v = ((i / 50) % 4 == 3) ? ($urandom_range(3) == 0) : ($urandom_range(7) != 0);
      send(v, D'($urandom));
    end
    send(1'b0, '0);
    repeat (2 * N + 4) @(negedge clk);
    check(q_wire.size() == 0 && q_rx.size() == 0, "words lost");
    check(n_rx == n_sent, $sformatf("sent %0d words, received %0d", n_sent, n_rx));
    $display("exercised: top code bit %0d, all-zero codeword %0d, largest word %0d, back-to-back %0d, idle hold %0d, words %0d",
             n_top_bit, n_zero_word, n_max_word, n_back_to_back, n_idle_hold, n_rx);
    check(n_top_bit > 0, "top code bit never set");
    check(n_zero_word > 0, "all-zero codeword never sent");
    check(n_max_word > 0, "largest data word never sent");
    check(n_back_to_back > 0, "no back-to-back words");
    check(n_idle_hold > 0, "no idle cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
