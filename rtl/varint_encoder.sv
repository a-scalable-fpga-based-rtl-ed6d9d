// varint_encoder: Varint (LEB128) encoding and packing of one Sample.
//
// The channel values of a Sample are stored as a packed repeated Varint
// field: the Varints are laid end to end, byte after byte, with no padding,
// in 256-bit entries of an on-chip block RAM that acts as a FIFO.
//
// Push phase (in_ready high). The block accepts one ADC word (8 channels) per
// Ready/Valid transfer and then encodes one channel per clock cycle with the
// combinational encoder varint_enc. Packing uses a PK_W = 272-bit register
// `pk` holding the bytes not yet written, and its occupancy `occ` in bytes:
//     p_occ = occ + len                   (adder)
//     p_pk  = pk | (varint << 8*occ)      (left shifter and OR concatenation)
//     if p_occ >= 32: write p_pk[255:0] to the BRAM, pk = p_pk >> 256,
//                     occ = p_occ - 32
//     else:           pk = p_pk, occ = p_occ
// 272 bits is the largest the register can hold: at most 31 bytes stay
// behind after a write, plus one Varint of at most 3 bytes. After the last
// channel of the word marked last, a partly filled `pk` is written as the
// final entry (its unused bytes are zero).
//
// Pop phase. The payload (number of valid Varint bytes in the Sample) is
// offered on the payload handshake; once it is taken, `offloading` is high,
// pushing is disabled, and the written entries are read out over the data
// handshake, entry 0 first, one per cycle. The BRAM has one cycle of read
// latency; its read address is the next entry as soon as the current one is
// accepted, so the output stays back to back. When the last entry has been
// taken the BRAM is empty and pushing resumes.
//
// Timing per Sample: 1 + 8 cycles per ADC word when the input keeps up,
// 1 flush cycle, then the payload transfer and one cycle per entry.
//
// DEPTH (entries) defaults to ADC_N: one entry per ADC, as in the memory
// layout of a Sample; 8 Varints of at most 3 bytes always fit in 32 bytes.
// The document gives the encoder structure, the packing algorithm, the
// 256-bit BRAM with 1-cycle read latency, the 272-bit register and the
// payload/offloading behaviour; the handshake details are this design's.
module varint_encoder
  import daq_pkg::adc_word_t, daq_pkg::ADC_WORD_W, daq_pkg::CH_W, daq_pkg::CH_PER_ADC, daq_pkg::META_WORD_W, daq_pkg::MEM_W, daq_pkg::MEM_BYTES, daq_pkg::VARINT_MAX_BYTES, daq_pkg::VARINT_W, daq_pkg::adc_channel;
#(
  parameter int unsigned ADC_N   = daq_pkg::ADC_N,
  parameter int unsigned DEPTH   = ADC_N,
  parameter int unsigned PAY_W   = META_WORD_W
) (
  input  logic             clk,
  input  logic             rst,

  input  adc_word_t        in_data,
  input  logic             in_valid,
  output logic             in_ready,

  output logic [PAY_W-1:0] payload_data,   // bytes of packed Varints
  output logic             payload_valid,
  input  logic             payload_ready,

  output logic [MEM_W-1:0] out_data,       // one BRAM entry
  output logic             out_valid,
  input  logic             out_ready,

  output logic             offloading
);
  localparam int unsigned PK_W     = MEM_W + 8 * (VARINT_MAX_BYTES - 1);
  localparam int unsigned OCC_W    = $clog2(PK_W / 8 + 1);
  localparam int unsigned LEN_W    = $clog2(VARINT_MAX_BYTES + 1);
  localparam int unsigned CH_IDX_W = $clog2(CH_PER_ADC);
  localparam int unsigned ADDR_W   = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W    = $clog2(DEPTH + 1);

  typedef enum logic [2:0] {S_PUSH, S_ENC, S_FLUSH, S_PAYLOAD, S_POP} state_t;
  state_t state;

  // ------------------------------------------------------------ storage
  logic [MEM_W-1:0] bram [DEPTH];
  logic             bram_we;
  logic [ADDR_W-1:0] bram_waddr;
  logic [MEM_W-1:0] bram_wdata;
  logic [ADDR_W-1:0] bram_raddr;
  logic [MEM_W-1:0] bram_rdata;

  always_ff @(posedge clk) begin
    if (bram_we) bram[bram_waddr] <= bram_wdata;
  end
  always_ff @(posedge clk) begin
    bram_rdata <= bram[bram_raddr];
  end

  // ------------------------------------------------------- encode/pack
  logic [ADC_WORD_W-1:0] word_q;
  logic                  last_q;
  logic [CH_IDX_W-1:0]   ch;
  logic [CH_W-1:0]       cur;
  logic [VARINT_W-1:0]   varint;
  logic [LEN_W-1:0]      len;

  logic [PK_W-1:0]  pk, p_pk;
  logic [OCC_W-1:0] occ, p_occ;
  logic             wr_entry;
  logic [CNT_W-1:0] n_entries;   // entries written in this Sample
  logic [PAY_W-1:0] payload;

  assign cur = adc_channel(word_q, 32'(ch));

  varint_enc #(.DATA_W(CH_W), .MAX_BYTES(VARINT_MAX_BYTES)) u_enc (
    .value (cur),
    .varint(varint),
    .len   (len)
  );

  always_comb begin
    p_occ    = occ + OCC_W'(len);
    wr_entry = (p_occ >= OCC_W'(MEM_BYTES));
    p_pk     = pk | (PK_W'(varint) << (8 * occ));
  end

  // ------------------------------------------------------------- offload
  logic [CNT_W-1:0] rd_ptr;
  logic             out_fire;

  assign out_fire      = out_valid && out_ready;
  assign out_valid     = (state == S_POP);
  assign out_data      = bram_rdata;
  assign offloading    = (state == S_POP);
  assign in_ready      = (state == S_PUSH);
  assign payload_valid = (state == S_PAYLOAD);
  assign payload_data  = payload;
  assign bram_raddr    = ADDR_W'(out_fire ? rd_ptr + 1'b1 : rd_ptr);

  always_comb begin
    bram_we    = 1'b0;
    bram_waddr = ADDR_W'(n_entries);
    bram_wdata = p_pk[MEM_W-1:0];
    if (state == S_ENC && wr_entry) begin
      bram_we = 1'b1;
    end else if (state == S_FLUSH && occ != '0) begin
      bram_we    = 1'b1;
      bram_wdata = pk[MEM_W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_PUSH;
      word_q    <= '0;
      last_q    <= 1'b0;
      ch        <= '0;
      pk        <= '0;
      occ       <= '0;
      n_entries <= '0;
      payload   <= '0;
      rd_ptr    <= '0;
    end else begin
      unique case (state)
        S_PUSH: begin
          if (in_valid) begin
            word_q <= in_data.data;
            last_q <= in_data.last;
            ch     <= '0;
            state  <= S_ENC;
          end
        end
        S_ENC: begin
          payload <= payload + PAY_W'(len);
          if (wr_entry) begin
            pk        <= p_pk >> MEM_W;
            occ       <= p_occ - OCC_W'(MEM_BYTES);
            n_entries <= n_entries + 1'b1;
          end else begin
            pk  <= p_pk;
            occ <= p_occ;
          end
          if (ch == CH_IDX_W'(CH_PER_ADC - 1)) state <= last_q ? S_FLUSH : S_PUSH;
          else                                 ch    <= ch + 1'b1;
        end
        S_FLUSH: begin
          if (occ != '0) n_entries <= n_entries + 1'b1;
          pk     <= '0;
          occ    <= '0;
          rd_ptr <= '0;
          state  <= S_PAYLOAD;
        end
        S_PAYLOAD: begin
          if (payload_ready) state <= S_POP;
        end
        S_POP: begin
          if (out_fire) begin
            if (rd_ptr == n_entries - 1'b1) begin
              n_entries <= '0;
              payload   <= '0;
              rd_ptr    <= '0;
              state     <= S_PUSH;
            end else begin
              rd_ptr <= rd_ptr + 1'b1;
            end
          end
        end
        default: state <= S_PUSH;
      endcase
    end
  end

  // the packed data of a Sample never exceeds the BRAM
  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    bram_we |-> (32'(n_entries) < DEPTH));
endmodule
