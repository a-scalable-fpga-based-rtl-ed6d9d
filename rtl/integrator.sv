// integrator: sum of all channel values of one Sample.
//
// The sum is proportional to the total ion current of the detector, i.e. the
// total proton fluence seen in that Sample. The block accepts one ADC word
// (CH_PER_ADC channel values) per Ready/Valid transfer, latches it and adds
// one channel value to the running sum per clock cycle. After the word that
// carries last = 1 has been accumulated, the SUM_W-bit sum is offered on the
// output handshake; the next Sample starts from zero once it is taken.
//
// Timing: CH_PER_ADC cycles per ADC word (in_ready is low meanwhile), then
// the sum is valid on the cycle after the last addition.
//
// The channel values are the ADC's 18-bit two's-complement codes and are
// sign-extended before the addition, so a negative input current lowers the
// sum. The document gives the function (one channel added per cycle, result
// sent on when all channels are in); the number format and the 32-bit width
// (one metadata word) are this design's choices.
module integrator
  import daq_pkg::adc_word_t, daq_pkg::ADC_WORD_W, daq_pkg::CH_W, daq_pkg::CH_PER_ADC, daq_pkg::META_WORD_W, daq_pkg::adc_channel;
#(
  parameter int unsigned SUM_W = META_WORD_W
) (
  input  logic             clk,
  input  logic             rst,

  input  adc_word_t        in_data,
  input  logic             in_valid,
  output logic             in_ready,

  output logic [SUM_W-1:0] sum_data,
  output logic             sum_valid,
  input  logic             sum_ready
);
  localparam int unsigned CH_IDX_W = $clog2(CH_PER_ADC);

  logic [ADC_WORD_W-1:0] word_q;
  logic                  last_q;
  logic                  busy;
  logic [CH_IDX_W-1:0]   ch;
  logic [SUM_W-1:0]      acc;
  logic [CH_W-1:0]       cur;

  assign in_ready = !busy && !sum_valid;
  assign cur      = adc_channel(word_q, 32'(ch));
  assign sum_data = acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      ch        <= '0;
      acc       <= '0;
      last_q    <= 1'b0;
      word_q    <= '0;
      sum_valid <= 1'b0;
    end else begin
      if (sum_valid && sum_ready) begin
        sum_valid <= 1'b0;
        acc       <= '0;
      end
      if (in_valid && in_ready) begin
        word_q <= in_data.data;
        last_q <= in_data.last;
        ch     <= '0;
        busy   <= 1'b1;
      end else if (busy) begin
        acc <= acc + SUM_W'(signed'(cur));
        if (ch == CH_IDX_W'(CH_PER_ADC - 1)) begin
          busy <= 1'b0;
          if (last_q) sum_valid <= 1'b1;
        end else begin
          ch <= ch + 1'b1;
        end
      end
    end
  end
endmodule
