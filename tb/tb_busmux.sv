// tb_busmux: self-checking test of busmux.
//
// Loads the four inputs with random bytes and, for every select value, checks
// that Y equals the selected input; repeated over many random input sets.
module tb_busmux;
  localparam int unsigned W  = 8;
  localparam int unsigned SW = 2;

  logic [W-1:0]  d [2**SW];
  logic [SW-1:0] s;
  logic [W-1:0]  y;
  int checks = 0, failures = 0;

  busmux #(.WIDTH(W), .SEL_W(SW)) dut (.d(d), .s(s), .y(y));

  initial begin
    for (int rep = 0; rep < 100; rep++) begin
      for (int i = 0; i < 2**SW; i++) d[i] = W'($urandom);
      for (int k = 0; k < 2**SW; k++) begin
        s = SW'(k);
        #1;
        checks++;
        if (y !== d[k]) begin
          failures++;
          $display("FAIL s=%0d y=%0h expected=%0h", s, y, d[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
