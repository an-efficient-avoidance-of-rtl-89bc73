// nat_decoder: pipelined (n,d)-NAT decoder built from N-1 function blocks.
//
// The data word is the sum of Fb(i+1) over every set code bit C(i). Bit C(1)
// has weight Fb(2) = 1, so it starts the sum directly; blocks D(2), D(3), ...,
// D(N) then each add their own weight when their bit is set. The order of the
// additions does not matter; this design adds from the least significant
// bit up, as the published decoder does.
//
// Pipelining: each D(k) block ends in a register; the code bits not yet used
// travel alongside the running sum (code_q below) so that each block sees the
// bits of its own word. Latency is N-1 clocks from code_in to data_out, one
// word per clock, no stall. The delay registers are this design's choice.
//
// Interface: code_in bit k-1 carries C(k). Codewords the encoder never emits
// (beyond the first 2^D of the ordered set) produce a sum that wraps at D bits.
module nat_decoder
  import nat_pkg::*;
#(
  parameter int unsigned D = 14,
  parameter int unsigned N = nat_code_bits(D)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] code_in,
  output logic         out_valid,
  output logic [D-1:0] data_out
);

  localparam int unsigned S = N - 1;  // number of function blocks, D(2)..D(N)

  // Stage j (0..S-1) is block D(j+2).
  logic         v    [S+1];
  logic [D-1:0] sum  [S+1];
  logic [N-1:0] code [S];     // codeword as seen by stage j

  assign v[0]    = in_valid;
  assign sum[0]  = D'(code_in[0]);   // C(1) * Fb(2)
  assign code[0] = code_in;

  for (genvar j = 0; j < S; j++) begin : g_stage
    nat_dec_stage #(.D(D), .K(j + 2)) u_d (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (v[j]),
      .d_in     (sum[j]),
      .c_in     (code[j][j+1]),
      .out_valid(v[j+1]),
      .d_out    (sum[j+1])
    );

    if (j + 1 < S) begin : g_delay
      logic [N-1:0] code_q;
      always_ff @(posedge clk) begin
        if (!rst_n) code_q <= '0;
        else        code_q <= code[j];
      end
      assign code[j+1] = code_q;
    end
  end

  assign out_valid = v[S];
  assign data_out  = sum[S];

  initial assert (N >= 2)
    else $error("nat_decoder: at least two code bits are needed, N=%0d", N);

endmodule
