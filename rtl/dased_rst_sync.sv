// dased_rst_sync: reset synchronizer. The reset asserts asynchronously and
// releases two clk edges after rst_n_in rises, so that each clock domain of
// the detector leaves reset cleanly on its own clock.
module dased_rst_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      meta      <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      meta      <= 1'b1;
      rst_n_out <= meta;
    end
  end
endmodule
