// tb_regfile: end-to-end self-checking test of the register file at its
// default size (four 8-bit registers, no parameter overrides).
//
// Phase 1 runs the standard bring-up sequence: reset, read all registers as
// zero, write 9 to R1, 13 to R0 and 6 to R2 with WR low, read them back in
// pairs through both ports, reset again and read zeros.
// Phase 2 runs random cycles against a reference array kept by the
// testbench. Inputs change only while CLK is high. Each cycle both ports are
// checked twice: while CLK is still high (a register being written must still
// show its old value) and right after the falling edge (the written value must
// be there already: a write takes effect at the falling edge of the same
// clock period). Occasional asynchronous resets are mixed in.
// Coverage counters make sure every mechanism happened: a write to each
// register, a write suppressed by WR high, both ports reading the same
// register, reading a register in the period it is written, and a reset
// while registers hold data. A watchdog ends the run if it hangs.
module tb_regfile;
  localparam int unsigned W  = 8;
  localparam int unsigned AW = 2;
  localparam int unsigned NR = 2 ** AW;

  logic          clk = 1'b1;
  logic          rst_n = 1'b1;
  logic          wr_n = 1'b1;
  logic [AW-1:0] rdaddr_a = '0, rdaddr_b = '0, wraddr = '0;
  logic [W-1:0]  wrdata = '0;
  logic [W-1:0]  a, b;

  logic [W-1:0]  model [NR];
  int checks = 0, failures = 0;
  int writes [NR];
  int suppressed = 0, same_reg = 0, read_during_write = 0, resets_with_data = 0;

  regfile dut (
    .clk(clk), .rst_n(rst_n), .wr_n(wr_n),
    .rdaddr_a(rdaddr_a), .rdaddr_b(rdaddr_b),
    .wraddr(wraddr), .wrdata(wrdata),
    .a(a), .b(b)
  );

  always #5 clk = ~clk;

  task automatic check_ab(logic [W-1:0] ea, logic [W-1:0] eb, string what);
    checks++;
    if (a !== ea || b !== eb) begin
      failures++;
      $display("FAIL %s: ra=%0d rb=%0d a=%0d b=%0d expected %0d %0d at %0t",
               what, rdaddr_a, rdaddr_b, a, b, ea, eb, $time);
    end
  endtask

  // Phase 1 helpers: each takes one clock period, starting just after a
  // rising edge.
  task automatic do_read(int ra, int rb, int ea, int eb);
    wr_n = 1'b1; rdaddr_a = AW'(ra); rdaddr_b = AW'(rb);
    #1 check_ab(W'(ea), W'(eb), "sequence read");
    @(posedge clk); #1;
  endtask

  task automatic do_write(int wa, int wd);
    wr_n = 1'b0; wraddr = AW'(wa); wrdata = W'(wd);
    @(posedge clk); #1;
    wr_n = 1'b1;
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
  endtask

  function automatic bit any_data();
    for (int i = 0; i < NR; i++) if (model[i] != '0) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    foreach (writes[i]) writes[i] = 0;
    foreach (model[i])  model[i]  = '0;

    // ---- Phase 1: bring-up sequence ----
    #1 rst_n = 1'b0;
    @(posedge clk); #1 rst_n = 1'b1;
    do_read(0, 1, 0, 0);
    do_read(2, 3, 0, 0);
    do_write(1, 9);
    do_read(0, 1, 0, 9);
    do_read(1, 2, 9, 0);
    do_write(0, 13);
    do_read(0, 3, 13, 0);
    do_write(2, 6);
    do_read(2, 1, 6, 9);
    do_reset();
    do_read(0, 1, 0, 0);
    do_read(2, 3, 0, 0);

    // ---- Phase 2: random cycles against the reference array ----
    for (int cyc = 0; cyc < 2000; cyc++) begin
      // just after the rising edge: set up this period's operation
      rdaddr_a = AW'($urandom);
      rdaddr_b = ($urandom_range(0, 5) == 0) ? rdaddr_a : AW'($urandom);
      wraddr   = ($urandom_range(0, 3) == 0) ? rdaddr_a : AW'($urandom);
      wrdata   = W'($urandom);
      wr_n     = ($urandom_range(0, 3) == 0);
      #1;
      check_ab(model[rdaddr_a], model[rdaddr_b], "read before falling edge");

      if (rdaddr_a == rdaddr_b) same_reg++;
      if (!wr_n) begin
        writes[wraddr]++;
        if (wraddr == rdaddr_a || wraddr == rdaddr_b) read_during_write++;
      end else begin
        suppressed++;
      end

      @(negedge clk); #1;
      if (!wr_n) model[wraddr] = wrdata;
      check_ab(model[rdaddr_a], model[rdaddr_b], "read after falling edge");

      if (cyc % 331 == 200) begin
        if (any_data()) resets_with_data++;
        rst_n = 1'b0;             // asynchronous: no clock edge needed
        #1;
        foreach (model[i]) model[i] = '0;
        check_ab('0, '0, "asynchronous reset");
        rst_n = 1'b1;
      end
      @(posedge clk); #1;
      // nothing may change at the rising edge
      check_ab(model[rdaddr_a], model[rdaddr_b], "hold over rising edge");
    end

    // ---- final reset and read-back, as at the end of the sequence ----
    if (any_data()) resets_with_data++;
    do_reset();
    foreach (model[i]) model[i] = '0;
    do_read(0, 1, 0, 0);
    do_read(2, 3, 0, 0);

    // ---- coverage of each mechanism ----
    for (int i = 0; i < NR; i++) begin
      checks++;
      if (writes[i] == 0) begin failures++; $display("FAIL no write to R%0d", i); end
    end
    checks++; if (suppressed == 0)        begin failures++; $display("FAIL no suppressed write"); end
    checks++; if (same_reg == 0)          begin failures++; $display("FAIL no same-register read"); end
    checks++; if (read_during_write == 0) begin failures++; $display("FAIL no read during write"); end
    checks++; if (resets_with_data == 0)  begin failures++; $display("FAIL no reset with data"); end
    $display("coverage: writes R0..R3 = %0d %0d %0d %0d, suppressed=%0d, same-register reads=%0d, read-during-write=%0d, resets with data=%0d",
             writes[0], writes[1], writes[2], writes[3], suppressed, same_reg, read_during_write, resets_with_data);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
