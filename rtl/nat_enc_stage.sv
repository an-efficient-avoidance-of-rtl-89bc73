// nat_enc_stage: one function block E(k, Di) of the NAT encoder.
//
// The block decides code bit C(k). Codewords whose bit k is 0 form the class
// (0,k), which holds Fb(k+1) words and starts at offset 0; codewords with
// bit k set form (1,k), which starts at offset Fb(k+1). So the block compares
// the residual data Di with Fb(k+1): if Di >= Fb(k+1) it sets C(k) and passes
// on Do = Di - Fb(k+1) (rebasing the residual to the parent class, which
// starts at offset 0); otherwise C(k) = 0 and Do = Di. The comparison and the
// subtraction follow the published scheme; the constant Fb(k+1) is computed at
// elaboration.
//
// Timing: the block ends in a register, as every function block of the codec
// does, so d_out/c_out/out_valid follow d_in/in_valid by one clock. It never
// stalls. Reset (synchronous, active low) clears the valid bit and the
// outputs; the reset style is this design's choice.
//
// Parameters: D is the data width, K the code-bit index (2..n) of this block.
module nat_enc_stage
  import nat_pkg::*;
#(
  parameter int unsigned D = 14,
  parameter int unsigned K = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [D-1:0] d_in,
  output logic         out_valid,
  output logic [D-1:0] d_out,
  output logic         c_out
);

  // Weight of code bit C(K). Compared at full width so that a weight that
  // does not fit in D bits simply never matches.
  localparam fib_t WEIGHT = fib(K + 1);

  logic         take;
  logic [D-1:0] rest;

  always_comb begin
    take = (fib_t'(d_in) >= WEIGHT);
    rest = take ? d_in - WEIGHT[D-1:0] : d_in;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      d_out     <= '0;
      c_out     <= 1'b0;
    end else begin
      out_valid <= in_valid;
      d_out     <= rest;
      c_out     <= take;
    end
  end

endmodule
