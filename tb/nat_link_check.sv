// nat_link_check: testbench helper that runs one looped-back NAT codec of
// data width D and reports how many checks it made and how many failed.
//
// It verifies that the codec uses EXP_N bus lines (the expected code length
// for D data bits), then streams random D-bit words with idle gaps. Each
// strobed bus change must switch no two adjacent lines, and the switched
// lines, weighted by Fb(k+1), must add up to the word sent N clocks before.
// Each word must come back unchanged 2N clocks after it was sent. For the
// 3-bit case the first word is 6 with the lines starting at 1100, and the
// lines must then read 0101 (codeword 1001). Weights are computed here at
// 128 bits, independently of the design.
module nat_link_check #(
  parameter int unsigned D = 3,
  parameter int unsigned EXP_N = 4,
  parameter int unsigned WORDS = 300,
  parameter logic [EXP_N-1:0] INIT = '0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  typedef logic [127:0] wide_t;

  logic             tx_valid, rx_valid, strobe;
  logic [D-1:0]     tx_data, rx_data;
  logic [EXP_N-1:0] bus;

  nat_codec_top #(.D(D), .INIT_STATE(INIT)) dut (
    .clk(clk), .rst_n(rst_n),
    .tx_valid(tx_valid), .tx_data(tx_data),
    .bus_out(bus), .bus_out_strobe(strobe),
    .bus_in(bus), .bus_in_strobe(strobe),
    .rx_valid(rx_valid), .rx_data(rx_data)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL (D=%0d): %s", D, what);
    end
  endtask

  wide_t weight [EXP_N+1];   // weight[k] = Fb(k+1)
  initial begin
    wide_t a, b, t;
    a = 1; b = 1;
    weight[0] = 0;
    weight[1] = b;
    for (int k = 2; k <= EXP_N; k++) begin
      t = a + b; a = b; b = t;
      weight[k] = b;
    end
  end

  typedef struct { wide_t data; int cyc; } item_t;
  item_t q_wire[$];
  item_t q_rx[$];
  int cyc;
  int n_rx;
  logic [EXP_N-1:0] bus_prev;
  bit first_seen;

  always @(posedge clk) cyc <= (rst_n ? cyc + 1 : 0);

  always @(negedge clk) begin
    if (rst_n) begin
      logic [EXP_N-1:0] moved;
      moved = bus ^ bus_prev;
      check(((moved >> 1) & moved) == '0, $sformatf("adjacent lines switched: %b", moved));
      if (strobe) begin
        item_t it;
        wide_t sum;
        sum = 0;
        for (int k = 1; k <= EXP_N; k++) if (moved[k-1]) sum += weight[k];
        if (D == 3 && !first_seen) check(bus == EXP_N'(4'b0101), $sformatf("lines read %b after word 6", bus));
        first_seen = 1'b1;
        if (q_wire.size() == 0) check(1'b0, "bus strobe with nothing sent");
        else begin
          it = q_wire.pop_front();
          check(sum == it.data, $sformatf("bus value %0d, data %0d", sum, it.data));
          check(cyc - it.cyc == EXP_N, "transmit latency");
        end
      end else begin
        check(moved == '0, "bus moved without a strobe");
      end
      if (rx_valid) begin
        item_t it;
        if (q_rx.size() == 0) check(1'b0, "word received with nothing sent");
        else begin
          it = q_rx.pop_front();
          check(wide_t'(rx_data) == it.data, $sformatf("received %0d, sent %0d", rx_data, it.data));
          check(cyc - it.cyc == 2 * EXP_N, "end-to-end latency");
          n_rx++;
        end
      end
    end
    bus_prev = bus;
  end

  task automatic send(input logic v, input logic [D-1:0] d);
    @(negedge clk);
    tx_valid = v;
    tx_data  = d;
    if (v) begin
      q_wire.push_back('{data: wide_t'(d), cyc: cyc});
      q_rx.push_back('{data: wide_t'(d), cyc: cyc});
    end
  endtask

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    n_rx = 0;
    first_seen = 1'b0;
    tx_valid = 1'b0;
    tx_data = '0;
    check($bits(bus) == EXP_N, $sformatf("codec uses %0d lines, want %0d", $bits(bus), EXP_N));
    @(posedge rst_n);
    send(1'b1, D'(6));
    send(1'b1, '1);
    send(1'b1, '0);
    for (int i = 0; i < WORDS; i++) begin
      wide_t r;
      r = {$urandom, $urandom, $urandom, $urandom};
      send($urandom_range(3) != 0, D'(r));
    end
    send(1'b0, '0);
    repeat (2 * EXP_N + 4) @(negedge clk);
    check(q_wire.size() == 0 && q_rx.size() == 0, "words lost");
    check(n_rx > 3, "too few words received");
    done = 1'b1;
  end
endmodule
