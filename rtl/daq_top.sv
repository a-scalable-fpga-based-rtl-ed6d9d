// daq_top: FPGA fabric of the ionization-chamber data acquisition system.
//
// The design is one straight pipeline, sized by ADC_N (number of 8-channel,
// 18-bit ADCs), whose stages are linked by Ready/Valid handshakes:
//
//   ADC array --serial--> adc_interface (SCLK, 10 MHz)
//     --> cdc_fifo (SCLK -> FCLK, 50 MHz)
//     --> fork --> integrator      --sum------------------\
//             \--> varint_encoder  --payload, entries----> sample_writer
//                                                            --> Avalon-MM
//                                                                FPGA2SDRAM
//
// Every 400 SCLK cycles (25 kSps) all ADCs convert and are read out together
// (144 SCLK cycles); each ADC's 144-bit word then crosses into FCLK, where
// the same word goes to both the Integrator (sum of all channels) and the
// Varint Encoder (LEB128 encoding and packing into 256-bit entries). The
// Sample Writer stores the packed entries and a metadata entry per Sample
// in a circular Sample Buffer in processor RAM and raises read_ram_block with
// the block number after every Sample Block of 64 Samples. A whole Sample
// takes far less than the 40 us sample period.
//
// External parts that are not in this fabric connect through ports: the
// processor's PIOs (adc_powerup_en, data_aq_en in; read_ram_block,
// ram_block_num out), its FPGA2SDRAM Avalon slave (avm_*), the PLL that makes
// SCLK, and the ADCs (shared convst/csn/reset, one busy and one serial data
// line per ADC; the busy lines are OR-reduced here). fpga_reset is
// asynchronous and synchronised into each clock domain. The fork passes a word
// on only when both consumers can take it. The block structure, clocks and
// external signals follow the original design; the fork, the reset
// synchronisers and the OR of the busy lines at this level are this design's.
module daq_top
  import daq_pkg::adc_word_t, daq_pkg::META_WORD_W, daq_pkg::MEM_W, daq_pkg::MEM_BYTES;
#(
  parameter int unsigned ADC_N             = daq_pkg::ADC_N,
  parameter int unsigned SAMPLES_PER_BLOCK = daq_pkg::SAMPLES_PER_BLOCK,
  parameter int unsigned N_BLOCKS          = daq_pkg::N_BLOCKS,
  parameter int unsigned SAMPLE_PERIOD     = daq_pkg::SAMPLE_PERIOD,
  parameter int unsigned POWERUP_WAIT      = 10000,
  parameter int unsigned AMM_ADDR_W        = 25,
  parameter logic [AMM_ADDR_W-1:0] RAM_BASE = AMM_ADDR_W'(1) << (AMM_ADDR_W - 1),
  parameter int unsigned BLK_W             = (N_BLOCKS > 1) ? $clog2(N_BLOCKS) : 1
) (
  input  logic                   fclk,            // 50 MHz fabric clock
  input  logic                   sclk,            // 10 MHz ADC serial clock (PLL)
  input  logic                   fpga_reset,      // asynchronous, active high

  // HPS2FPGA PIO
  input  logic                   adc_powerup_en,
  input  logic                   data_aq_en,
  // FPGA2HPS PIO
  output logic                   read_ram_block,
  output logic [BLK_W-1:0]       ram_block_num,

  // ADC array serial interface
  output logic                   adc_convst,
  output logic                   adc_csn,
  output logic                   adc_reset,
  input  logic [ADC_N-1:0]       adc_busy,
  input  logic [ADC_N-1:0]       adc_sdata,

  // Avalon-MM master to the FPGA2SDRAM port
  output logic [AMM_ADDR_W-1:0]  avm_address,
  output logic                   avm_write,
  output logic [MEM_W-1:0]       avm_writedata,
  output logic [MEM_BYTES-1:0]   avm_byteenable,
  input  logic                   avm_waitrequest,

  // status
  output logic                   offloading
);
  localparam int unsigned AW_W = $bits(adc_word_t);

  logic srst, frst;
  rst_sync u_rst_s (.clk(sclk), .arst(fpga_reset), .rst(srst));
  rst_sync u_rst_f (.clk(fclk), .arst(fpga_reset), .rst(frst));

  rv_if #(.W(AW_W))        adc_s (.clk(sclk), .rst(srst));  // ADC interface -> CDC
  rv_if #(.W(AW_W))        adc_f (.clk(fclk), .rst(frst));  // CDC -> fork
  rv_if #(.W(META_WORD_W)) sum_l (.clk(fclk), .rst(frst));  // Integrator -> writer
  rv_if #(.W(META_WORD_W)) pay_l (.clk(fclk), .rst(frst));  // encoder payload
  rv_if #(.W(MEM_W))       ent_l (.clk(fclk), .rst(frst));  // encoder entries

  // --------------------------------------------------------- SCLK domain
  adc_word_t adc_out;
  assign adc_s.data = adc_out;

  adc_interface #(
    .ADC_N        (ADC_N),
    .SAMPLE_PERIOD(SAMPLE_PERIOD),
    .POWERUP_WAIT (POWERUP_WAIT)
  ) u_adc (
    .sclk          (sclk),
    .rst           (srst),
    .adc_powerup_en(adc_powerup_en),
    .data_aq_en    (data_aq_en),
    .adc_convst    (adc_convst),
    .adc_csn       (adc_csn),
    .adc_reset     (adc_reset),
    .adc_busy      (|adc_busy),
    .adc_sdata     (adc_sdata),
    .out_data      (adc_out),
    .out_valid     (adc_s.valid),
    .out_ready     (adc_s.ready)
  );

  cdc_fifo #(.W(AW_W)) u_cdc (
    .wclk   (sclk),
    .wrst   (srst),
    .w_data (adc_s.data),
    .w_valid(adc_s.valid),
    .w_ready(adc_s.ready),
    .rclk   (fclk),
    .rrst   (frst),
    .r_data (adc_f.data),
    .r_valid(adc_f.valid),
    .r_ready(adc_f.ready)
  );

  // --------------------------------------------------------- FCLK domain
  adc_word_t word_f;
  logic      int_ready, enc_ready;
  assign word_f      = adc_word_t'(adc_f.data);
  assign adc_f.ready = int_ready && enc_ready;   // fork: both must take it

  integrator u_int (
    .clk      (fclk),
    .rst      (frst),
    .in_data  (word_f),
    .in_valid (adc_f.valid && enc_ready),
    .in_ready (int_ready),
    .sum_data (sum_l.data),
    .sum_valid(sum_l.valid),
    .sum_ready(sum_l.ready)
  );

  varint_encoder #(.ADC_N(ADC_N)) u_enc (
    .clk          (fclk),
    .rst          (frst),
    .in_data      (word_f),
    .in_valid     (adc_f.valid && int_ready),
    .in_ready     (enc_ready),
    .payload_data (pay_l.data),
    .payload_valid(pay_l.valid),
    .payload_ready(pay_l.ready),
    .out_data     (ent_l.data),
    .out_valid    (ent_l.valid),
    .out_ready    (ent_l.ready),
    .offloading   (offloading)
  );

  sample_writer #(
    .ADC_N            (ADC_N),
    .SAMPLES_PER_BLOCK(SAMPLES_PER_BLOCK),
    .N_BLOCKS         (N_BLOCKS),
    .AMM_ADDR_W       (AMM_ADDR_W),
    .RAM_BASE         (RAM_BASE),
    .BLK_W            (BLK_W)
  ) u_wr (
    .clk            (fclk),
    .rst            (frst),
    .data_aq_en     (data_aq_en),
    .sum_data       (sum_l.data),
    .sum_valid      (sum_l.valid),
    .sum_ready      (sum_l.ready),
    .payload_data   (pay_l.data),
    .payload_valid  (pay_l.valid),
    .payload_ready  (pay_l.ready),
    .in_data        (ent_l.data),
    .in_valid       (ent_l.valid),
    .in_ready       (ent_l.ready),
    .avm_address    (avm_address),
    .avm_write      (avm_write),
    .avm_writedata  (avm_writedata),
    .avm_byteenable (avm_byteenable),
    .avm_waitrequest(avm_waitrequest),
    .read_ram_block (read_ram_block),
    .ram_block_num  (ram_block_num)
  );
endmodule
