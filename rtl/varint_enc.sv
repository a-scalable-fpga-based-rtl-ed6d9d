// varint_enc: combinational LEB128 (Protocol Buffers Varint) encoder.
//
// The value is cut into 7-bit groups, least significant group first. A group
// is "populated" when any of its bits is set (pop[i] = OR of the group). The
// continuation flag of byte i is set when any more significant group is
// populated, so the encoded bytes are {flag[i], group[i]} concatenated with
// byte 0 in the least significant byte of `varint`. The length is a priority
// selection on pop[]: the index of the highest populated group plus one, and
// one byte for the value zero. Bytes at and above `len` are driven to zero so
// that the packer can OR the Varint into its concatenation register.
//
// Interface: value (DATA_W bits) in, varint (8*MAX_BYTES bits) and len
// (1..MAX_BYTES) out, no clock. The slicing, flag and priority structure is
// the document's; zeroing of unused bytes is this design's choice.
module varint_enc #(
  parameter int unsigned DATA_W    = daq_pkg::CH_W,
  parameter int unsigned MAX_BYTES = (DATA_W + 6) / 7,
  parameter int unsigned LEN_W     = $clog2(MAX_BYTES + 1)
) (
  input  logic [DATA_W-1:0]      value,
  output logic [8*MAX_BYTES-1:0] varint,
  output logic [LEN_W-1:0]       len
);
  localparam int unsigned PAD_W = 7 * MAX_BYTES;

  logic [PAD_W-1:0]     padded;
  logic [MAX_BYTES-1:0] pop;
  logic [MAX_BYTES-1:0] flag;

  assign padded = PAD_W'(value);

  always_comb begin
    // byte population
    for (int i = 0; i < MAX_BYTES; i++) begin
      pop[i] = |padded[7*i +: 7];
    end
    // continuation flags: some more significant group is populated
    flag[MAX_BYTES-1] = 1'b0;
    for (int i = MAX_BYTES - 2; i >= 0; i--) begin
      flag[i] = flag[i+1] | pop[i+1];
    end
    // concatenate flag and data of every byte that is part of the Varint
    for (int i = 0; i < MAX_BYTES; i++) begin
      if (i == 0 || pop[i] || flag[i]) varint[8*i +: 8] = {flag[i], padded[7*i +: 7]};
      else                             varint[8*i +: 8] = 8'h00;
    end
    // priority multiplexer on the population nets
    len = LEN_W'(1);
    for (int i = 1; i < MAX_BYTES; i++) begin
      if (pop[i]) len = LEN_W'(i + 1);
    end
  end
endmodule
