// cdc_fifo: one-deep, two-register asynchronous FIFO that carries Ready/Valid
// transfers from a write clock domain to an unrelated read clock domain.
//
// The register file has two entries, so each pointer is a single bit that is
// advanced by toggling it (XOR with 1). A transfer writes entry wptr and
// toggles wptr; the toggled pointer is synchronised into the read domain by
// two flops, where "not empty" is rptr != synchronised wptr. A read toggles
// rptr, which is synchronised back into the write domain, where "ready" is
// wptr == synchronised rptr. At most one word is therefore in flight, and the
// entry being read is never the one being written, so the data itself needs no
// synchroniser: it is stable for the whole time the read side can see it.
//
// Timing: a word written at a wclk edge becomes visible at the read side two
// to three rclk edges later; the writer may send the next word two to three
// wclk edges after the read. This throughput is enough because the pipeline
// rate is fixed and known (one Sample per 40 us).
//
// Interface: w_data/w_valid/w_ready on wclk, r_data/r_valid/r_ready on rclk,
// synchronous active-high resets per domain. Structure follows the document;
// the reset scheme is this design's choice.
module cdc_fifo #(
  parameter int unsigned W = 8
) (
  input  logic         wclk,
  input  logic         wrst,
  input  logic [W-1:0] w_data,
  input  logic         w_valid,
  output logic         w_ready,

  input  logic         rclk,
  input  logic         rrst,
  output logic [W-1:0] r_data,
  output logic         r_valid,
  input  logic         r_ready
);
  logic [W-1:0] mem [2];
  logic wptr, rptr;          // 1-bit pointers, toggled on each transfer
  logic wptr_rq, rptr_wq;    // pointers synchronised into the other domain

  // write domain
  assign w_ready = (wptr == rptr_wq);

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wptr <= 1'b0;
    end else if (w_valid && w_ready) begin
      wptr <= wptr ^ 1'b1;
    end
  end

  always_ff @(posedge wclk) begin
    if (w_valid && w_ready) mem[wptr] <= w_data;
  end

  sync2 u_sync_rptr (.clk(wclk), .rst(wrst), .d(rptr), .q(rptr_wq));

  // read domain
  assign r_valid = (rptr != wptr_rq);
  assign r_data  = mem[rptr];

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rptr <= 1'b0;
    end else if (r_valid && r_ready) begin
      rptr <= rptr ^ 1'b1;
    end
  end

  sync2 u_sync_wptr (.clk(rclk), .rst(rrst), .d(wptr), .q(wptr_rq));
endmodule
