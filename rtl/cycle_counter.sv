// cycle_counter: 48-bit count of marker-item passages at one stage boundary.
//
// Each ring has one. It counts up by one in every clock in which inc is high
// (an item with its marker bit set crosses the counter's boundary), so with a
// single marked item it counts laps of the ring. Forty-eight bits is the
// document's width. The external bus can write it (wr, wdata) and read it (q);
// a write wins over an increment in the same clock. Reset clears it.
module cycle_counter #(
  parameter int unsigned WIDTH = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inc,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (wr)  q <= wdata;
    else if (inc) q <= q + 1'b1;
  end

endmodule
