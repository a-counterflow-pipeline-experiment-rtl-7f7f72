// tb_fe_box: checks the FULL/EMPTY box of one stage.
//
// The testbench plays the two control latches of a stage and walks it through
// the five stage states: empty, one item, two items with equal addresses (one
// increment clock with both May Leave low, then "complete" with both high and
// no second increment), one item leaving, a new item arriving (a second
// increment), two items with different addresses (no increment, May Leave
// high at once), and an external load that clears the completed state.
module tb_fe_box;
  logic clk = 0, rst_n = 0;
  logic n_full = 0, s_full = 0, n_full_nx, s_full_nx, clr = 0;
  logic [1:0] n_addr = 0, s_addr = 0;
  logic increment, n_ml, s_ml, meet;
  int checks = 0, failures = 0;

  fe_box dut (.clk, .rst_n, .n_full, .s_full, .n_addr, .s_addr, .n_full_nx, .s_full_nx,
              .clr, .increment, .n_may_leave(n_ml), .s_may_leave(s_ml), .meet);

  always #5 clk = ~clk;

  // next-state inputs: the testbench decides the next latch values ahead
  logic nn = 0, sn = 0;
  assign n_full_nx = nn;
  assign s_full_nx = sn;

  initial begin
    repeat (1000) @(posedge clk);
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

  // hold the present latch values, announce the next ones, take one clock
  task automatic cyc(input bit nf, input bit sf, input bit nfn, input bit sfn);
    n_full = nf; s_full = sf; nn = nfn; sn = sfn;
    #1;
  endtask

  task automatic expect_out(input bit inc, input bit ml, input string what);
    check(increment == inc && n_ml == ml && s_ml == ml && meet == (n_full && s_full),
          $sformatf("%s: inc=%0b nml=%0b sml=%0b", what, increment, n_ml, s_ml));
  endtask

  int incs = 0;
  always @(posedge clk) if (rst_n && increment) incs++;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cyc(0, 0, 0, 0); expect_out(0, 1, "empty");
    @(negedge clk); cyc(1, 0, 1, 1); expect_out(0, 1, "north only");
    n_addr = 2; s_addr = 2;
    @(negedge clk); cyc(1, 1, 1, 1); expect_out(1, 0, "matching pair, first clock");
    @(negedge clk); cyc(1, 1, 1, 1); expect_out(0, 1, "matching pair, complete");
    @(negedge clk); cyc(1, 1, 1, 1); expect_out(0, 1, "matching pair, still complete");
    @(negedge clk); cyc(1, 1, 0, 1); expect_out(0, 1, "north leaves");
    @(negedge clk); cyc(0, 1, 1, 1); expect_out(0, 1, "south only");
    @(negedge clk); cyc(1, 1, 1, 1); expect_out(1, 0, "new north arrives, matches");
    @(negedge clk); cyc(1, 1, 0, 0); expect_out(0, 1, "complete, both leave");
    @(negedge clk); cyc(0, 0, 1, 1); expect_out(0, 1, "empty again");
    n_addr = 1; s_addr = 3;
    @(negedge clk); cyc(1, 1, 1, 1); expect_out(0, 1, "non-matching pair");
    @(negedge clk); cyc(1, 1, 1, 1); expect_out(0, 1, "non-matching pair, later");
    // equal addresses now: treated as a meeting still to be done
    @(negedge clk); s_addr = 1; cyc(1, 1, 1, 1); expect_out(1, 0, "pair reloaded to match");
    @(negedge clk); clr = 1; cyc(1, 1, 1, 1); expect_out(0, 1, "complete, being reloaded");
    @(negedge clk); clr = 0; cyc(1, 1, 1, 1); expect_out(1, 0, "after reload the pair interacts again");
    @(negedge clk); cyc(1, 1, 1, 1); expect_out(0, 1, "done");
    @(negedge clk);
    check(incs == 4, $sformatf("increment pulses: %0d, expected 4", incs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
