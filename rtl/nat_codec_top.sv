// nat_codec_top: crosstalk-avoiding (n,d)-NAT bus codec, transmit and
// receive sides.
//
// Transmit: a D-bit data word enters nat_encoder, which splits it into a sum
// of distinct, non-adjacent Fibonacci numbers and yields an N-bit codeword
// with no two adjacent 1s; transition_encoder then toggles exactly the bus
// lines whose code bit is 1. Neighbouring lines therefore never switch in the
// same cycle. Receive: transition_decoder XORs the received levels with the
// previous ones to get the codeword back and nat_decoder adds up the weights
// of the set bits. Every function block is one pipeline stage; no codebook is
// stored anywhere.
//
// The default is the scheme's main configuration, 14 data bits on 20 bus
// lines; N defaults to the smallest length that can carry D bits.
//
// Interface: the wires themselves are outside this module. bus_out (with
// bus_out_strobe, high for one clock whenever bus_out takes a new word) goes
// to the wires, and bus_in/bus_in_strobe come back from them; tying them
// together gives a loop-back link. The strobe is this design's addition: an
// all-zero codeword (data 0) moves no line, so the receiver needs it to see
// that a word was sent.
//
// Timing: tx_data to bus_out takes N clocks (N-1 encoder stages plus the
// bus-state register); bus_in to rx_data takes N clocks (the codeword
// register plus N-1 decoder stages). One word per clock in both directions,
// no stall.
module nat_codec_top
  import nat_pkg::*;
#(
  parameter int unsigned D = 14,
  parameter int unsigned N = nat_code_bits(D),
  // Bus level after reset, on both sides of the link.
  parameter logic [N-1:0] INIT_STATE = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  // transmit side
  input  logic         tx_valid,
  input  logic [D-1:0] tx_data,
  output logic [N-1:0] bus_out,
  output logic         bus_out_strobe,
  // receive side
  input  logic [N-1:0] bus_in,
  input  logic         bus_in_strobe,
  output logic         rx_valid,
  output logic [D-1:0] rx_data
);

  logic         enc_valid;
  logic [N-1:0] enc_code;
  logic         dec_valid;
  logic [N-1:0] dec_code;

  nat_encoder #(.D(D), .N(N)) u_encoder (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (tx_valid),
    .data_in  (tx_data),
    .out_valid(enc_valid),
    .code_out (enc_code)
  );

  transition_encoder #(.N(N), .INIT_STATE(INIT_STATE)) u_tx (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (enc_valid),
    .code_in   (enc_code),
    .bus_out   (bus_out),
    .bus_strobe(bus_out_strobe)
  );

  transition_decoder #(.N(N), .INIT_STATE(INIT_STATE)) u_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .bus_in    (bus_in),
    .bus_strobe(bus_in_strobe),
    .out_valid (dec_valid),
    .code_out  (dec_code)
  );

  nat_decoder #(.D(D), .N(N)) u_decoder (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (dec_valid),
    .code_in  (dec_code),
    .out_valid(rx_valid),
    .data_out (rx_data)
  );

  // The encoder never emits adjacent 1s, so no two neighbouring lines may
  // switch together when a new word is driven.
  logic [N-1:0] bus_prev;
  always_ff @(posedge clk) bus_prev <= bus_out;
  a_no_adjacent_toggles : assert property (
    @(posedge clk) disable iff (!rst_n)
    ((((bus_out ^ bus_prev) >> 1) & (bus_out ^ bus_prev)) == '0))
    else $error("nat_codec_top: adjacent bus lines switched together");

endmodule
