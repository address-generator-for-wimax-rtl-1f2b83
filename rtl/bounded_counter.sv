// bounded_counter: up-counter whose reset comes from a comparator.
//
// This is the row-counter / column-counter pair of the address generator
// schematics: a counter and a comparator that watches it against a limit.
// When the counter is enabled while it stands at (or, after a limit change,
// beyond) the limit, it returns to zero on the next clock instead of
// counting on; `wrap` is the comparator output (CRST / RRST in the
// simulation traces) qualified by the enable. A synchronous clear, `clr`,
// returns the count to zero as well.
//
// Timing: count changes on the rising clock edge after `en`; `at_limit` and
// `wrap` are combinational from the current count. Reset is synchronous and
// active low, as are all resets in this design (own choice).
module bounded_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,        // advance by one
  input  logic         clr,       // synchronous clear (wins over en)
  input  logic [W-1:0] limit,     // last value before wrapping
  output logic [W-1:0] count,
  output logic         at_limit,  // comparator output: count >= limit
  output logic         wrap       // en && at_limit: count returns to 0
);

  assign at_limit = (count >= limit);
  assign wrap     = en && at_limit;

  always_ff @(posedge clk) begin
    if (!rst_n || clr) count <= '0;
    else if (wrap)     count <= '0;
    else if (en)       count <= count + W'(1);
  end

endmodule
