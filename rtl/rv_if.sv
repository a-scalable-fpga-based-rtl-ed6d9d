// rv_if: the Ready/Valid handshake that links the blocks of the pipeline.
//
// A transfer happens on a clock edge where both valid and ready are high
// (the four states are idle, waiting for the receiver, waiting for the
// transmitter, and transfer). The bundle carries W data bits. Its assertions
// state the transmitter's obligations used throughout this design: once
// valid is raised it stays high, with data held stable, until the transfer.
interface rv_if #(parameter int unsigned W = 8) (input logic clk, input logic rst);
  logic [W-1:0] data;
  logic         valid;
  logic         ready;

  modport tx (output data, output valid, input ready);
  modport rx (input data, input valid, output ready);

  // Valid may not be withdrawn before the transfer, and data must not change.
  a_valid_held: assert property (@(posedge clk) disable iff (rst)
    (valid && !ready) |=> valid);
  a_data_stable: assert property (@(posedge clk) disable iff (rst)
    (valid && !ready) |=> $stable(data));
endinterface
