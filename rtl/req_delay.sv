// req_delay: adjustable delay on one request input of a COP.
//
// The arbiter stress ring places an adjustable delay in front of every COP
// request input so that two requests can be made to reach the MUTEX at nearly
// the same time. In the document the delay is analog and set by an external
// current; here it is a whole number of clocks, set by the dly input at run
// time (this design's choice, with no picosecond resolution).
//
// req_o follows a rising req_i after dly clocks (dly = 0: no delay, same
// clock) and falls with req_i in the same clock. A request is a level that
// stays up until its move, so the delay only shifts its start.
module req_delay #(
  parameter int unsigned DLY_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DLY_W-1:0] dly,
  input  logic             req_i,
  output logic             req_o
);

  logic [DLY_W-1:0] age;   // clocks req_i has been up, saturating at dly

  always_comb req_o = req_i && (age >= dly);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  age <= '0;
    else if (!req_i)             age <= '0;
    else if (age < dly)          age <= age + 1'b1;
  end

endmodule
