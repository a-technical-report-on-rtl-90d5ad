// dased_sync: two-flip-flop synchronizer for a bus whose value changes by at
// most one bit at a time (a Gray-coded pointer), used on every crossing
// between the processor clock and the detector clock.
//
// Interface: d is sampled on clk; q follows d two clk edges later.
// Reset (asynchronous, active low) clears both stages.
module dased_sync #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
