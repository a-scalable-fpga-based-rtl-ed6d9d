// adc_interface: serial readout of the whole ADC array, clocked by SCLK.
//
// The control outputs (convst, csn, reset) are shared by every ADC, so all
// ADCs convert and are read out together; only the serial data lines are one
// per ADC. The busy lines of the ADCs arrive OR-reduced as one input.
//
// Sequence of one Sample (one conversion of every channel):
//   1. A period timer, running while data acquisition is enabled, requests a
//      conversion every SAMPLE_PERIOD SCLK cycles (400 = 10 MHz / 25 kSps).
//   2. convst is driven high for CONVST_CYC cycles; its rising edge starts
//      the conversion in every ADC.
//   3. When the (synchronised) busy input is high, csn is driven low and 144
//      bits are shifted into one 144-bit serial-in parallel-out register per
//      ADC, one bit per SCLK rising edge, while the ADCs are still busy.
//      Channel 0 arrives first and each channel MSB first, so channel 0 ends
//      in bits [143:126].
//   4. csn returns high and the ADC words are sent out one per Ready/Valid
//      transfer, ADC 0 first, through a registered ADC_N:1 multiplexer; the
//      last word of the Sample carries last = 1.
// A request that arrives before the previous Sample has been sent out is held
// and served as soon as the block is idle, so no Sample is lost.
//
// ADC power: while adc_powerup_en is low the ADCs are held in reset
// (adc_reset high) and no conversion starts; after it rises, POWERUP_WAIT
// cycles pass before the first conversion. data_aq_en and adc_powerup_en are
// levels from the processor side and are synchronised here.
//
// Following the document: the shared control lines, the ordering, 144 SCLK
// cycles of readout during busy, SIPO registers and the registered output mux.
// This design's choices: the convst pulse width, the power-up sequence, and
// holding (not dropping) a late conversion request.
module adc_interface
  import daq_pkg::adc_word_t, daq_pkg::ADC_WORD_W;
#(
  parameter int unsigned ADC_N         = daq_pkg::ADC_N,
  parameter int unsigned SAMPLE_PERIOD = daq_pkg::SAMPLE_PERIOD,
  parameter int unsigned CONVST_CYC    = 2,
  parameter int unsigned POWERUP_WAIT  = 10000
) (
  input  logic             sclk,
  input  logic             rst,             // synchronous to sclk, active high

  input  logic             adc_powerup_en,  // from HPS2FPGA PIO (async level)
  input  logic             data_aq_en,      // from HPS2FPGA PIO (async level)

  output logic             adc_convst,
  output logic             adc_csn,
  output logic             adc_reset,
  input  logic             adc_busy,        // OR of all ADC busy lines
  input  logic [ADC_N-1:0] adc_sdata,

  output adc_word_t        out_data,
  output logic             out_valid,
  input  logic             out_ready
);
  localparam int unsigned SEL_W   = (ADC_N > 1) ? $clog2(ADC_N) : 1;
  localparam int unsigned BIT_W   = $clog2(ADC_WORD_W);
  localparam int unsigned PER_W   = $clog2(SAMPLE_PERIOD);
  localparam int unsigned PWR_W   = $clog2(POWERUP_WAIT + 1);
  localparam int unsigned CONV_W  = $clog2(CONVST_CYC + 1);

  typedef enum logic [2:0] {S_IDLE, S_CONV, S_WAIT_BUSY, S_READ, S_XFER} state_t;

  state_t state;

  logic powerup_s, aq_en_s, busy_s;
  sync2 u_sync_pwr  (.clk(sclk), .rst(rst), .d(adc_powerup_en), .q(powerup_s));
  sync2 u_sync_aq   (.clk(sclk), .rst(rst), .d(data_aq_en),     .q(aq_en_s));
  sync2 u_sync_busy (.clk(sclk), .rst(rst), .d(adc_busy),       .q(busy_s));

  // ---------------------------------------------------------------- power-up
  logic [PWR_W-1:0] pwr_cnt;
  logic             adc_ready;   // ADCs out of reset and settled

  always_ff @(posedge sclk) begin
    if (rst || !powerup_s) begin
      adc_reset <= 1'b1;
      pwr_cnt   <= '0;
      adc_ready <= 1'b0;
    end else begin
      adc_reset <= 1'b0;
      if (pwr_cnt == PWR_W'(POWERUP_WAIT)) adc_ready <= 1'b1;
      else                                 pwr_cnt   <= pwr_cnt + 1'b1;
    end
  end

  // ---------------------------------------------------------- period timer
  logic [PER_W-1:0] per_cnt;
  logic             start_pending;
  logic             acquiring;
  logic             start_conv;

  assign acquiring  = aq_en_s && adc_ready;
  assign start_conv = (state == S_IDLE) && start_pending;

  always_ff @(posedge sclk) begin
    if (rst || !acquiring) begin
      per_cnt       <= '0;
      start_pending <= 1'b0;
    end else begin
      per_cnt <= (per_cnt == PER_W'(SAMPLE_PERIOD - 1)) ? '0 : per_cnt + 1'b1;
      if (per_cnt == '0)   start_pending <= 1'b1;
      else if (start_conv) start_pending <= 1'b0;
    end
  end

  // --------------------------------------------------------- control FSM
  logic [CONV_W-1:0]     conv_cnt;
  logic [BIT_W-1:0]      bit_cnt;
  logic [SEL_W-1:0]      sel;
  logic [ADC_WORD_W-1:0] sipo [ADC_N];
  logic                  shift_en;
  logic                  out_fire;

  assign shift_en = (state == S_READ) && !adc_csn;
  assign out_fire = out_valid && out_ready;

  always_ff @(posedge sclk) begin
    if (rst) begin
      state      <= S_IDLE;
      adc_convst <= 1'b0;
      adc_csn    <= 1'b1;
      conv_cnt   <= '0;
      bit_cnt    <= '0;
      sel        <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start_conv) begin
            adc_convst <= 1'b1;
            conv_cnt   <= CONV_W'(1);
            state      <= S_CONV;
          end
        end
        S_CONV: begin
          if (conv_cnt == CONV_W'(CONVST_CYC)) begin
            adc_convst <= 1'b0;
            state      <= S_WAIT_BUSY;
          end else begin
            conv_cnt <= conv_cnt + 1'b1;
          end
        end
        S_WAIT_BUSY: begin
          if (busy_s) begin
            adc_csn <= 1'b0;
            bit_cnt <= '0;
            state   <= S_READ;
          end else if (!aq_en_s) begin
            state   <= S_IDLE;
          end
        end
        S_READ: begin
          // csn went low on the previous edge: one bit per edge from now on
          if (!adc_csn) begin
            if (bit_cnt == BIT_W'(ADC_WORD_W - 1)) begin
              adc_csn        <= 1'b1;
              sel            <= '0;
              state          <= S_XFER;
              out_valid      <= 1'b0;
            end else begin
              bit_cnt <= bit_cnt + 1'b1;
            end
          end
        end
        S_XFER: begin
          // registered output mux: load word `sel`, hold it until accepted
          if (!out_valid) begin
            out_data.data <= sipo[sel];
            out_data.last <= (sel == SEL_W'(ADC_N - 1));
            out_valid     <= 1'b1;
          end else if (out_fire) begin
            if (sel == SEL_W'(ADC_N - 1)) begin
              out_valid <= 1'b0;
              state     <= S_IDLE;
            end else begin
              out_data.data <= sipo[sel + 1'b1];
              out_data.last <= (sel + 1'b1 == SEL_W'(ADC_N - 1));
              sel           <= sel + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------- SIPO shift registers
  always_ff @(posedge sclk) begin
    if (shift_en) begin
      for (int a = 0; a < ADC_N; a++) begin
        sipo[a] <= {sipo[a][ADC_WORD_W-2:0], adc_sdata[a]};
      end
    end
  end
endmodule
