// regfile: 2-read/1-write register file of four byte-wide registers.
//
// A processor reads two operands and writes one result in the same clock
// period. The first half of the period (CLK high) is for reading and
// computing; the result is stored at the falling edge of CLK. This file gives
// that with:
//   - four reg8 registers R0..R3 sharing CLK, RST and WRDATA;
//   - a decoder that, while WR is low, pulls the load strobe LD[WRADDR] low,
//     so the addressed register takes WRDATA at the next falling CLK edge;
//   - two busmux read multiplexers, A = R[RDADDR_A] and B = R[RDADDR_B],
//     combinational from address and register outputs.
// The structure, the active-low WR, RST and LD signals and the falling-edge
// write follow the source circuit; the internal nets ld_n (LD0..LD3) and q
// (Q0..Q3) are its eight internal signals. Asynchronous reset is this
// design's own choice.
//
// Interface and timing: a write is set up while CLK is high (WR low, WRADDR,
// WRDATA stable) and takes effect at the falling edge; reading the register
// just written shows the new value right after that edge. Reading and writing
// the same register in one period returns the old value until the edge (no
// bypass). RST low clears all registers to zero at once.
module regfile #(
  parameter int unsigned WIDTH  = regfile_pkg::DATA_W,
  parameter int unsigned ADDR_W = regfile_pkg::ADDR_W
) (
  input  logic              clk,       // CLK
  input  logic              rst_n,     // RST, active low
  input  logic              wr_n,      // WR, active low write control
  input  logic [ADDR_W-1:0] rdaddr_a,  // RDADDR_A
  input  logic [ADDR_W-1:0] rdaddr_b,  // RDADDR_B
  input  logic [ADDR_W-1:0] wraddr,    // WRADDR
  input  logic [WIDTH-1:0]  wrdata,    // WRDATA
  output logic [WIDTH-1:0]  a,         // A
  output logic [WIDTH-1:0]  b          // B
);

  localparam int unsigned NREG = 2 ** ADDR_W;

  logic [NREG-1:0]  ld_n;      // LD0 .. LD3, active low
  logic [WIDTH-1:0] q [NREG];  // Q0 .. Q3

  decoder #(.ADDR_W(ADDR_W)) u_decoder (
    .en_n (wr_n),
    .addr (wraddr),
    .ld_n (ld_n)
  );

  for (genvar i = 0; i < NREG; i++) begin : g_reg
    reg8 #(.WIDTH(WIDTH)) u_reg (
      .clk   (clk),
      .rst_n (rst_n),
      .ld_n  (ld_n[i]),
      .d     (wrdata),
      .q     (q[i])
    );
  end

  busmux #(.WIDTH(WIDTH), .SEL_W(ADDR_W)) u_mux_a (
    .d (q),
    .s (rdaddr_a),
    .y (a)
  );

  busmux #(.WIDTH(WIDTH), .SEL_W(ADDR_W)) u_mux_b (
    .d (q),
    .s (rdaddr_b),
    .y (b)
  );

endmodule
