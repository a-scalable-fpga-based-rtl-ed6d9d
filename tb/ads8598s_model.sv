// ads8598s_model: behavioural model of one 8-channel, 18-bit SAR ADC seen
// through its serial readout interface. Not synthesizable; testbench only.
//
// A rising edge of convst (while reset is low) raises busy after T_BUSY_NS
// and keeps it high for T_CONV_NS. While csn is low the 144-bit readout word
// is shifted out on sdata, one bit per falling edge of sclk, channel 0 first
// and each channel MSB first, so the receiver samples on the rising edge.
// The r-th readout returns tb_data_pkg::chan_value(r, ADC_ID, c). The model
// counts protocol errors: csn low while not busy, busy ending before all 144
// bits were read, and convst while held in reset.
module ads8598s_model #(
  parameter int unsigned ADC_ID    = 0,
  parameter int unsigned T_BUSY_NS = 40,
  parameter int unsigned T_CONV_NS = 20000
) (
  input  logic sclk,
  input  logic convst,
  input  logic csn,
  input  logic reset,
  output logic busy,
  output logic sdata
);
  int unsigned readouts = 0;
  int unsigned conversions = 0;
  int unsigned errors = 0;
  int unsigned bits_out = 0;
  bit          reading = 0;
  logic [143:0] shreg;

  initial begin
    busy  = 1'b0;
    sdata = 1'b0;
  end

  always @(posedge convst) begin
    if (reset) begin
      errors++;
    end else begin
      #(T_BUSY_NS * 1ns);
      busy = 1'b1;
      #(T_CONV_NS * 1ns);
      if (reading || (bits_out != 0 && bits_out < 144)) errors++;
      busy = 1'b0;
      conversions++;
    end
  end

  always @(negedge sclk) begin
    if (!csn) begin
      if (!busy) errors++;
      if (!reading) begin
        reading  = 1;
        bits_out = 0;
        for (int c = 0; c < 8; c++)
          shreg[143 - 18*c -: 18] = tb_data_pkg::chan_value(readouts, ADC_ID, c);
      end else begin
        shreg = shreg << 1;
      end
      sdata = shreg[143];
      bits_out++;
    end else if (reading) begin
      reading = 0;
      readouts++;
    end
  end
endmodule
