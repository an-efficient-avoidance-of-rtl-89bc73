// nat_dec_stage: one function block D(k, Di) of the NAT decoder.
//
// The decoder rebuilds the data word as the sum of Fb(i+1) over all set code
// bits C(i). This block contributes the term for bit k: Do = Di + Fb(k+1)
// when C(k) is set, Do = Di otherwise. The sum is kept to D bits; codewords
// the encoder never produces (the unmapped tail of class (1,n)) wrap
// silently; the published scheme defines no error indication for them.
//
// Timing: one register at the output, so d_out/out_valid follow the inputs
// by one clock; no stall. Synchronous active-low reset clears the outputs
// (this design's choice).
//
// Parameters: D is the data width, K the code-bit index (2..n) of this block.
module nat_dec_stage
  import nat_pkg::*;
#(
  parameter int unsigned D = 14,
  parameter int unsigned K = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [D-1:0] d_in,
  input  logic         c_in,
  output logic         out_valid,
  output logic [D-1:0] d_out
);

  localparam fib_t        WEIGHT  = fib(K + 1);
  localparam logic [D-1:0] WEIGHT_D = WEIGHT[D-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      d_out     <= '0;
    end else begin
      out_valid <= in_valid;
      d_out     <= c_in ? d_in + WEIGHT_D : d_in;
    end
  end

endmodule
