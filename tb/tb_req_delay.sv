// tb_req_delay: checks the adjustable request delay.
//
// For each setting d from 0 to 15 a request is raised and held; the output
// must rise exactly d clocks later (in the same clock for d = 0) and fall in
// the same clock as the request. A request dropped before the delay has run
// out must not get through, and a new request starts the delay afresh.
module tb_req_delay;
  logic clk = 0, rst_n = 0;
  logic [3:0] dly = 0;
  logic req_i = 0, req_o;
  int checks = 0, failures = 0;

  req_delay #(.DLY_W(4)) dut (.clk, .rst_n, .dly, .req_i, .req_o);

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
    int lat;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < 16; d++) begin
      @(negedge clk); dly = 4'(d); req_i = 1;
      lat = 0;
      #1;
      while (!req_o && lat < 40) begin
        @(negedge clk); #1;
        lat++;
      end
      check(lat == d, $sformatf("delay %0d gave %0d clocks", d, lat));
      repeat (3) begin @(negedge clk); check(req_o, "stays up while requested"); end
      req_i = 0; #1;
      check(!req_o, "falls with the request");
      @(negedge clk);
    end
    // a short request does not get through a long delay
    dly = 4'd6; req_i = 1;
    repeat (4) begin @(negedge clk); check(!req_o, "short request held back"); end
    req_i = 0; @(negedge clk); @(negedge clk);
    req_i = 1;
    for (int i = 0; i < 6; i++) begin #1; check(!req_o, "delay restarts"); @(negedge clk); end
    #1; check(req_o, "restarted delay runs out after 6 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
