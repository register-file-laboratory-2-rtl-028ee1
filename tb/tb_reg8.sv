// tb_reg8: self-checking test of reg8.
//
// Drives random data and random active-low load strobes, changing inputs only
// while CLK is high, and compares Q against a reference value kept by the
// testbench: Q must follow D at a falling edge with LD low, hold with LD high,
// never change at a rising edge, and clear to zero as soon as RST goes low,
// without a clock edge. A watchdog ends the run if it hangs.
module tb_reg8;
  localparam int unsigned W = 8;

  logic         clk = 1'b1;
  logic         rst_n = 1'b1;
  logic         ld_n = 1'b1;
  logic [W-1:0] d = '0;
  logic [W-1:0] q;
  logic [W-1:0] expected;
  int checks = 0, failures = 0;
  int loads = 0, holds = 0;

  reg8 #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .ld_n(ld_n), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (q !== expected) begin
      failures++;
      $display("FAIL %s: q=%0h expected=%0h at %0t", what, q, expected, $time);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #1;
    expected = '0;
    check("reset held");
    @(posedge clk); #1 rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      // set up while CLK is high
      d    = W'($urandom);
      ld_n = ($urandom_range(0, 2) == 0);
      @(posedge clk); #1;             // rising edge must not load
      check("no load on rising edge");
      @(negedge clk); #1;
      if (!ld_n) begin expected = d; loads++; end
      else holds++;
      check(ld_n ? "hold" : "load");
      if (i % 97 == 50) begin
        #1 rst_n = 1'b0;              // asynchronous clear while CLK is low
        #1 expected = '0;
        check("asynchronous reset");
        #1 rst_n = 1'b1;
      end
    end
    checks++;
    if (loads == 0 || holds == 0) begin
      failures++;
      $display("FAIL coverage: loads=%0d holds=%0d", loads, holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
