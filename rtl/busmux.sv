// busmux: read-port bus multiplexer of the register file.
//
// Passes the register output selected by S to Y: Y = D[S]. The register file
// has one of these per read port, its S input tied to that port's read
// address, so a read is purely combinational and the port follows its address
// and the registers without waiting for a clock. The inputs are an unpacked
// array d[0..2**SEL_W-1] standing for the circuit's D0..D3 pins.
module busmux #(
  parameter int unsigned WIDTH = regfile_pkg::DATA_W,
  parameter int unsigned SEL_W = regfile_pkg::ADDR_W
) (
  input  logic [WIDTH-1:0] d [2**SEL_W],  // D0 .. D3
  input  logic [SEL_W-1:0] s,             // S
  output logic [WIDTH-1:0] y              // Y
);

  always_comb y = d[s];

endmodule
