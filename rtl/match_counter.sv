// match_counter: correlation counter.
//
// Counts the cycles on which both `enable` and `match` are high; `match` is
// the XNOR of the incoming data bit and the local code chip, so after one
// code period the count is the number of agreeing chips.  With the default
// 10-bit width a full 1023-chip period fits exactly; the counter holds at
// its maximum instead of wrapping.
//
// Interface: `clear` (synchronous, priority over counting) restarts the
// count at 0.  `count` is registered and updates one cycle after the chip
// it counts.
module match_counter #(
  parameter int unsigned CNT_W = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             enable,
  input  logic             match,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  count <= '0;
    else if (clear)                              count <= '0;
    else if (enable && match && (count != '1))   count <= count + 1'b1;
  end

endmodule
