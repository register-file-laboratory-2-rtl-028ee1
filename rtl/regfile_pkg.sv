// regfile_pkg: sizes shared by the register file and its parts.
//
// The register file holds 2**ADDR_W registers of DATA_W bits each, selected
// by ADDR_W-bit addresses. The defaults, four byte-wide registers with 2-bit
// addresses, are the sizes of the circuit this RTL follows. Nothing here has
// timing; it only fixes widths.
package regfile_pkg;
  localparam int unsigned DATA_W = 8;  // width of each register and of A, B, WRDATA
  localparam int unsigned ADDR_W = 2;  // width of RDADDR_A, RDADDR_B, WRADDR
endpackage
