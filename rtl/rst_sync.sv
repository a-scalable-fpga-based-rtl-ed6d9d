// rst_sync: reset synchroniser. The reset output is asserted at once
// (asynchronously) when arst is high and released two clock edges after arst
// falls, so that every flop of the clock domain leaves reset on the same edge.
// One instance per clock domain (SCLK and FCLK) derives that domain's
// synchronous reset from the single FPGA reset. This is a standard circuit
// chosen here; the original design does not describe its reset scheme.
module rst_sync (
  input  logic clk,
  input  logic arst,
  output logic rst
);
  logic stage;
  always_ff @(posedge clk or posedge arst) begin
    if (arst) begin
      stage <= 1'b1;
      rst   <= 1'b1;
    end else begin
      stage <= 1'b0;
      rst   <= stage;
    end
  end
endmodule
