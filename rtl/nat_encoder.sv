// nat_encoder: pipelined (n,d)-NAT encoder built from N-1 function blocks.
//
// The encoder walks the codeword correlation graph from the last level up:
// block E(N) decides the most significant code bit by comparing the data with
// Fb(N+1) and subtracting it when the bit is set, E(N-1) does the same with
// the remainder, and so on down to E(2). What is left after E(2) is 0 or 1
// and is C(1) itself, so no E(1) block is needed. The net effect is that the
// data word is broken into a sum of distinct Fibonacci numbers Fb(k+1), no
// two of them adjacent, and C(k) = 1 marks the terms used.
//
// Pipelining: each E(k) block ends in a register. Code bits decided early
// travel down the pipeline next to the residual (code_acc below), so all N
// bits of one word leave together. Latency is N-1 clocks from data_in to
// code_out, with one new word accepted every clock and no stall. The
// alignment registers are this design's choice; the published scheme only states
// that every block ends in a register and one codeword leaves per cycle.
//
// Interface: data_in must be below Fb(N+2) (always true for a D-bit word
// when N is at least nat_code_bits(D)). code_out bit k-1 carries C(k).
module nat_encoder
  import nat_pkg::*;
#(
  parameter int unsigned D = 14,
  parameter int unsigned N = nat_code_bits(D)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [D-1:0] data_in,
  output logic         out_valid,
  output logic [N-1:0] code_out
);

  localparam int unsigned S = N - 1;  // number of function blocks, E(N)..E(2)

  // Stage j (0..S-1) is block E(N-j).
  logic         v   [S+1];   // v[j], dat[j]: input of stage j; index S is the chain output
  logic [D-1:0] dat [S+1];
  logic         cb  [S];     // code bit decided by stage j
  logic [N-1:0] acc [S+1];   // bits decided before stage j, aligned with dat[j]

  assign v[0]   = in_valid;
  assign dat[0] = data_in;
  assign acc[0] = '0;

  for (genvar j = 0; j < S; j++) begin : g_stage
    nat_enc_stage #(.D(D), .K(N - j)) u_e (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (v[j]),
      .d_in     (dat[j]),
      .out_valid(v[j+1]),
      .d_out    (dat[j+1]),
      .c_out    (cb[j])
    );

    // Carry the bits already decided alongside the stage register, and merge
    // in this stage's bit at its own position N-j-1 once it is out.
    logic [N-1:0] acc_q;
    always_ff @(posedge clk) begin
      if (!rst_n) acc_q <= '0;
      else        acc_q <= acc[j];
    end
    always_comb begin
      acc[j+1]          = acc_q;
      acc[j+1][N-j-1]   = cb[j];
    end
  end

  always_comb begin
    code_out    = acc[S];
    code_out[0] = dat[S][0];   // C(1): the residual after E(2)
  end
  assign out_valid = v[S];

  // A D-bit word must fit in the code space of an N-bit codeword.
  initial assert (N >= 2 && fib(N + 2) >= (fib_t'(1) << D))
    else $error("nat_encoder: N=%0d lines cannot carry D=%0d data bits", N, D);

endmodule
