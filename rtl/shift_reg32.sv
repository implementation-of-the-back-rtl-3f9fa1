// shift_reg32: parallel-in, serial-out shift register of the detector.
//
// A word taken from FSL0 is loaded in parallel and then shifted out one bit
// per cycle on which `shift` is high, most significant bit first, so the
// detector sees the data stream in the order the words were written.
//
// Interface: `load` (priority over `shift`) copies `din` in; `sout` is the
// current bit (register bit WIDTH-1), valid from the cycle after the load.
module shift_reg32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] din,
  input  logic             shift,
  output logic             sout
);

  logic [WIDTH-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr <= '0;
    else if (load)  sr <= din;
    else if (shift) sr <= {sr[WIDTH-2:0], 1'b0};
  end

  assign sout = sr[WIDTH-1];

endmodule
