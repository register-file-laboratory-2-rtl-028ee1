// tb_decoder: exhaustive self-checking test of decoder.
//
// Applies every combination of the active-low enable and the 2-bit address
// and compares the four active-low load strobes with the truth table: with
// EN low only LD[addr] is low, with EN high all strobes are high.
module tb_decoder;
  localparam int unsigned AW = 2;

  logic              en_n;
  logic [AW-1:0]     addr;
  logic [2**AW-1:0]  ld_n;
  logic [2**AW-1:0]  expected;
  int checks = 0, failures = 0;

  decoder #(.ADDR_W(AW)) dut (.en_n(en_n), .addr(addr), .ld_n(ld_n));

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      for (int e = 0; e < 2; e++) begin
        for (int a = 0; a < 2**AW; a++) begin
          en_n = e[0];
          addr = AW'(a);
          #1;
          expected = '1;
          if (e == 0) expected = ~(4'b0001 << a);
          checks++;
          if (ld_n !== expected) begin
            failures++;
            $display("FAIL en_n=%0b addr=%0d ld_n=%b expected=%b", en_n, addr, ld_n, expected);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
