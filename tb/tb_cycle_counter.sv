// tb_cycle_counter: checks the 48-bit marker-passage counter.
//
// Counts random increments against a testbench count, checks a write and that
// a write wins over an increment in the same clock, and checks the carry out
// of the low 32 bits and the wrap from all ones to zero at the full width.
module tb_cycle_counter;
  logic clk = 0, rst_n = 0;
  logic inc = 0, wr = 0;
  logic [47:0] wdata = '0, q;
  longint unsigned ref_q;
  int checks = 0, failures = 0;

  cycle_counter #(.WIDTH(48)) dut (.clk, .rst_n, .inc, .wr, .wdata, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(q == 0, "reset clears");
    rst_n = 1;
    ref_q = 0;
    for (int i = 0; i < 1000; i++) begin
      inc = ($urandom_range(0, 1) == 1);
      @(posedge clk); #1;
      if (inc) ref_q++;
      check(q == 48'(ref_q), $sformatf("count %0d expected %0d", q, ref_q));
    end
    inc = 1; wr = 1; wdata = 48'h0000_FFFF_FFFE;
    @(posedge clk); #1; wr = 0;
    check(q == 48'h0000_FFFF_FFFE, "write wins over increment");
    repeat (3) @(posedge clk); #1;
    check(q == 48'h0001_0000_0001, "carry out of bit 31");
    wr = 1; wdata = 48'hFFFF_FFFF_FFFF; @(posedge clk); #1; wr = 0;
    @(posedge clk); #1;
    check(q == 48'h0, "wraps at 48 bits");
    inc = 0;
    @(posedge clk); #1;
    check(q == 48'h0, "holds without increments");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
