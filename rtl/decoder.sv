// decoder: write-address decoder of the register file.
//
// Turns the write address into one active-low load strobe per register.
// While the active-low enable EN (driven by the register file's WR input) is
// low, exactly the strobe LD[addr] is low; while EN is high every strobe is
// high, so no register loads. The active-low enable and outputs follow the
// source circuit. The decoder is purely combinational.
module decoder #(
  parameter int unsigned ADDR_W = regfile_pkg::ADDR_W
) (
  input  logic                 en_n,  // EN, active low (WR)
  input  logic [ADDR_W-1:0]    addr,  // ADDR (WRADDR)
  output logic [2**ADDR_W-1:0] ld_n   // LDi = ld_n[i], active low
);

  always_comb begin
    ld_n = '1;
    if (!en_n) ld_n[addr] = 1'b0;
  end

endmodule
