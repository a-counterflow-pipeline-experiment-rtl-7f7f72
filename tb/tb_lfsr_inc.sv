// tb_lfsr_inc: checks the count-value incrementer.
//
// From every non-zero start the incrementer must return to the start after
// exactly 31 steps and visit 31 distinct non-zero values on the way (a counter
// modulo 31); each single step must equal the LFSR written out by hand in
// cf_tb_pkg; zero must stay zero. Combinational, so no clock is needed except
// for the watchdog.
module tb_lfsr_inc;
  import cf_tb_pkg::*;

  logic [4:0] cin, cout;
  int checks = 0, failures = 0;

  lfsr_inc dut (.cnt_i(cin), .cnt_o(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    bit seen [32];
    logic [4:0] v;
    // single steps against the hand-written LFSR and a few hand-worked values
    for (int i = 0; i < 32; i++) begin
      cin = 5'(i); #1;
      check(cout == lfsr_ref(5'(i)), $sformatf("step from %0d gave %0d", i, cout));
    end
    cin = 5'b00001; #1; check(cout == 5'b00010, "00001 -> 00010");
    cin = 5'b00100; #1; check(cout == 5'b01001, "00100 -> 01001");
    cin = 5'b10000; #1; check(cout == 5'b00001, "10000 -> 00001");
    cin = 5'b10100; #1; check(cout == 5'b01000, "10100 -> 01000");
    cin = 5'b00000; #1; check(cout == 5'b00000, "zero stays zero");
    // period 31 from every non-zero start, all states distinct
    for (int s = 1; s < 32; s++) begin
      for (int i = 0; i < 32; i++) seen[i] = 1'b0;
      v = 5'(s);
      for (int n = 0; n < 31; n++) begin
        check(!seen[v] && v != 0, $sformatf("start %0d: state %0d repeated early", s, v));
        seen[v] = 1'b1;
        cin = v; #1; v = cout;
      end
      check(v == 5'(s), $sformatf("start %0d: not back after 31 steps", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
