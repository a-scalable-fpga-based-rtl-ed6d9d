// sample_writer: writes Samples into the Sample Buffer in processor RAM over
// the Avalon Memory-Mapped FPGA2SDRAM port and tells the processor when a
// Sample Block is ready to be read.
//
// Memory layout (units of 256-bit words). A Sample occupies STRIDE = ADC_N+1
// consecutive entries: entry 0 holds the metadata, entries 1..ADC_N the
// packed Varints (only ceil(payload/32) of them are written). The metadata
// entry is four 32-bit words, lowest first: the Integrator's sum, the payload
// in bytes, the sample number since acquisition was enabled, and the checksum
// (in bits [7:0] of the fourth word); bits 255:128 are zero. A Sample Block is
// SAMPLES_PER_BLOCK adjacent Samples, and the Sample Buffer is N_BLOCKS
// adjacent Sample Blocks used as a circular buffer starting at RAM_BASE.
//
// Procedure per Sample: take the sum and the payload (in either order), then
// for every data entry taken from the Varint Encoder issue one Avalon write to
// RAM_BASE + coarse + fine, where coarse is the first entry of the Sample and
// fine the entry within it. While the entries pass through, the checksum is
// accumulated as the XOR of all their bytes (a parity byte). The metadata
// entry is written last. After the last Sample of a Sample Block the block
// number is placed on ram_block_num and read_ram_block pulses for one cycle;
// this is the processor's interrupt to read that block.
//
// Avalon: the write, address, writedata and byteenable outputs are held while
// avm_waitrequest is high; one 256-bit word per write, all bytes enabled.
// While data_aq_en is low and no Sample is in progress the sample number and
// the buffer position are returned to zero.
//
// Following the document: layout, metadata content, order of transfers,
// checksum during transfer, coarse/fine pointers, 64x64 buffer, interrupt and
// block number. This design's choices: word addressing, the default RAM_BASE
// and address width, XOR as the parity function, placement of the words in
// the metadata entry, and the one-cycle interrupt pulse.
module sample_writer
  import daq_pkg::META_WORD_W, daq_pkg::MEM_W, daq_pkg::MEM_BYTES;
#(
  parameter int unsigned ADC_N             = daq_pkg::ADC_N,
  parameter int unsigned SAMPLES_PER_BLOCK = daq_pkg::SAMPLES_PER_BLOCK,
  parameter int unsigned N_BLOCKS          = daq_pkg::N_BLOCKS,
  parameter int unsigned AMM_ADDR_W        = 25,            // 1 GiB of 32-byte words
  parameter logic [AMM_ADDR_W-1:0] RAM_BASE = AMM_ADDR_W'(1) << (AMM_ADDR_W - 1),
  parameter int unsigned BLK_W             = (N_BLOCKS > 1) ? $clog2(N_BLOCKS) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    data_aq_en,

  input  logic [META_WORD_W-1:0]  sum_data,
  input  logic                    sum_valid,
  output logic                    sum_ready,

  input  logic [META_WORD_W-1:0]  payload_data,
  input  logic                    payload_valid,
  output logic                    payload_ready,

  input  logic [MEM_W-1:0]        in_data,
  input  logic                    in_valid,
  output logic                    in_ready,

  output logic [AMM_ADDR_W-1:0]   avm_address,
  output logic                    avm_write,
  output logic [MEM_W-1:0]        avm_writedata,
  output logic [MEM_BYTES-1:0]    avm_byteenable,
  input  logic                    avm_waitrequest,

  output logic                    read_ram_block,
  output logic [BLK_W-1:0]        ram_block_num
);
  localparam int unsigned STRIDE      = ADC_N + 1;
  localparam int unsigned BUF_ENTRIES = STRIDE * SAMPLES_PER_BLOCK * N_BLOCKS;
  localparam int unsigned FINE_W      = $clog2(STRIDE + 1);
  localparam int unsigned SIB_W       = (SAMPLES_PER_BLOCK > 1) ? $clog2(SAMPLES_PER_BLOCK) : 1;

  typedef enum logic [1:0] {S_META_IN, S_DATA, S_META_OUT, S_NEXT} state_t;
  state_t state;

  logic [META_WORD_W-1:0] sum_q, payload_q, sample_num;
  logic                   have_sum, have_payload;
  logic [FINE_W-1:0]      fine;        // entry within the Sample
  logic [FINE_W-1:0]      n_data;      // data entries of this Sample
  logic [AMM_ADDR_W-1:0]  coarse;      // first entry of this Sample
  logic [SIB_W-1:0]       sample_in_blk;
  logic [BLK_W-1:0]       blk;
  logic [7:0]             checksum;
  logic                   write_done;

  // XOR of all bytes of an entry
  function automatic logic [7:0] parity_byte(input logic [MEM_W-1:0] d);
    logic [7:0] p = '0;
    for (int i = 0; i < MEM_BYTES; i++) p ^= d[8*i +: 8];
    return p;
  endfunction

  assign avm_byteenable = '1;
  assign write_done     = avm_write && !avm_waitrequest;
  assign sum_ready      = (state == S_META_IN) && !have_sum;
  assign payload_ready  = (state == S_META_IN) && !have_payload;
  assign in_ready       = (state == S_DATA) && !avm_write && (fine <= n_data);

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= S_META_IN;
      sum_q          <= '0;
      payload_q      <= '0;
      have_sum       <= 1'b0;
      have_payload   <= 1'b0;
      fine           <= '0;
      n_data         <= '0;
      coarse         <= '0;
      sample_in_blk  <= '0;
      blk            <= '0;
      sample_num     <= '0;
      checksum       <= '0;
      avm_write      <= 1'b0;
      avm_address    <= '0;
      avm_writedata  <= '0;
      read_ram_block <= 1'b0;
      ram_block_num  <= '0;
    end else begin
      read_ram_block <= 1'b0;
      if (write_done) avm_write <= 1'b0;

      unique case (state)
        S_META_IN: begin
          if (sum_valid && sum_ready) begin
            sum_q    <= sum_data;
            have_sum <= 1'b1;
          end
          if (payload_valid && payload_ready) begin
            payload_q    <= payload_data;
            have_payload <= 1'b1;
            n_data       <= FINE_W'((payload_data + MEM_BYTES - 1) / MEM_BYTES);
          end
          if (have_sum && have_payload) begin
            fine     <= FINE_W'(1);
            checksum <= '0;
            state    <= S_DATA;
          end else if (!have_sum && !have_payload && !data_aq_en) begin
            // acquisition stopped and nothing in flight: restart the buffer
            sample_num    <= '0;
            coarse        <= '0;
            sample_in_blk <= '0;
            blk           <= '0;
          end
        end
        S_DATA: begin
          if (in_valid && in_ready) begin
            avm_write     <= 1'b1;
            avm_address   <= RAM_BASE + coarse + AMM_ADDR_W'(fine);
            avm_writedata <= in_data;
            checksum      <= checksum ^ parity_byte(in_data);
            fine          <= fine + 1'b1;
          end else if (!avm_write && fine > n_data) begin
            state <= S_META_OUT;
          end
        end
        S_META_OUT: begin
          if (!avm_write) begin
            avm_write     <= 1'b1;
            avm_address   <= RAM_BASE + coarse;
            avm_writedata <= {128'b0, 24'b0, checksum, sample_num, payload_q, sum_q};
            state         <= S_NEXT;
          end
        end
        S_NEXT: begin
          if (write_done) begin
            have_sum     <= 1'b0;
            have_payload <= 1'b0;
            sample_num   <= sample_num + 1'b1;
            state        <= S_META_IN;
            if (sample_in_blk == SIB_W'(SAMPLES_PER_BLOCK - 1)) begin
              sample_in_blk  <= '0;
              read_ram_block <= 1'b1;
              ram_block_num  <= blk;
              blk            <= (blk == BLK_W'(N_BLOCKS - 1)) ? '0 : blk + 1'b1;
            end else begin
              sample_in_blk <= sample_in_blk + 1'b1;
            end
            coarse <= (32'(coarse) + STRIDE >= BUF_ENTRIES) ? '0 : coarse + AMM_ADDR_W'(STRIDE);
          end
        end
        default: state <= S_META_IN;
      endcase
    end
  end

  // Avalon-MM master rule: hold the command while the slave stalls
  a_amm_hold: assert property (@(posedge clk) disable iff (rst)
    (avm_write && avm_waitrequest) |=> (avm_write && $stable(avm_address) && $stable(avm_writedata)));
endmodule
