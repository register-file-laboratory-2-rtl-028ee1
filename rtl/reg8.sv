// reg8: byte-wide storage register of the register file (one of R0..R3).
//
// Q takes the value on D at the falling edge of CLK when the active-low load
// strobe LD is low, and keeps its value otherwise. An active-low RST clears Q
// to zero. Loading on the falling clock edge, the active-low LD and RST pins
// and the 8-bit width follow the source circuit. That RST acts asynchronously
// (it clears Q at once, without waiting for a clock edge) is this design's own
// choice; the circuit does not say.
//
// Timing: one negedge flip-flop per bit with a load enable. Q changes only at
// a falling CLK edge or when RST falls.
module reg8 #(
  parameter int unsigned WIDTH = regfile_pkg::DATA_W
) (
  input  logic             clk,    // CLK
  input  logic             rst_n,  // RST, active low, asynchronous
  input  logic             ld_n,   // LD, active low
  input  logic [WIDTH-1:0] d,      // D
  output logic [WIDTH-1:0] q       // Q
);

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (!ld_n) q <= d;
  end

endmodule
