// transition_decoder: recovers the NAT codeword from the bus line levels.
//
// The block remembers the last level seen on every line (INIT_STATE after
// reset, which must equal the transmitter's) and, for each new word on the
// bus, XORs the new levels with the remembered ones: a 1 marks a line that
// toggled, which is the code bit. The remembered levels then move on to the
// new ones. The XOR array and the initial-state register follow the published scheme;
// the strobe that marks a new word and the output register are this
// design's choices.
//
// Timing: code_out/out_valid follow bus_in/bus_strobe by one clock.
module transition_decoder #(
  parameter int unsigned N = 20,
  parameter logic [N-1:0] INIT_STATE = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] bus_in,
  input  logic         bus_strobe,
  output logic         out_valid,
  output logic [N-1:0] code_out
);

  logic [N-1:0] last_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_q    <= INIT_STATE;
      out_valid <= 1'b0;
      code_out  <= '0;
    end else begin
      out_valid <= bus_strobe;
      if (bus_strobe) begin
        code_out <= bus_in ^ last_q;
        last_q   <= bus_in;
      end
    end
  end

endmodule
