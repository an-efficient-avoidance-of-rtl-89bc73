// transition_encoder: drives the NAT codeword onto the bus as transitions.
//
// The NAT code is a transition code: a 1 in code bit k means bus line k
// toggles, a 0 means it keeps its level. The block holds the present level
// of every line in a register, starting from INIT_STATE after reset, and for
// each valid codeword XORs the code into it. Because a NAT codeword never has
// two adjacent 1s, no two neighbouring lines ever switch in the same cycle,
// so the worst-case (opposite-direction) coupling delay cannot occur.
//
// Timing: bus_out takes the new levels one clock after in_valid/code_in;
// bus_strobe is high for that one clock. Without a valid codeword the lines
// hold their levels. The XOR array and state register follow the published scheme;
// the strobe that tells the receiver a word was sent (data 0 causes no
// transition at all) and the reset value are this design's choices.
module transition_encoder #(
  parameter int unsigned N = 20,
  parameter logic [N-1:0] INIT_STATE = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] code_in,
  output logic [N-1:0] bus_out,
  output logic         bus_strobe
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bus_out    <= INIT_STATE;
      bus_strobe <= 1'b0;
    end else begin
      bus_strobe <= in_valid;
      if (in_valid) bus_out <= bus_out ^ code_in;
    end
  end

endmodule
