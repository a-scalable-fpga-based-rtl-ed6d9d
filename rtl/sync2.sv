// sync2: two-flop synchroniser for a single-bit level crossing into the clock
// domain of `clk`. The output follows the input after two to three edges of
// `clk`; `rst` (synchronous to `clk`, active high) clears both stages to
// RESET_VAL. Used for the 1-bit FIFO pointers and the slow control
// levels (acquisition enable, ADC power-up enable). Two flops per pointer
// follow the original CDC structure; the reset value is this design's.
module sync2 #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
