// tb_daq_top: end-to-end test of the whole pipeline, from ADC models to the
// Sample Buffer in a model of processor RAM.
//
// Each interrupt (read_ram_block) makes the testbench read back the Sample
// Block it names, as the processor software would: for every Sample it
// parses the metadata entry, decodes the packed Varints of the data entries,
// and compares every channel with the data the ADC models sent, the sum with
// a reference sum, the sample number, the payload and the parity byte. The
// RAM model stalls the Avalon port at random. Each mechanism of the design
// is counted and must occur: Avalon stalls, CDC backpressure, Varints of 1, 2
// and 3 bytes, Samples spanning several entries, offloading, interrupts and
// the wrap of the circular buffer. It also checks the 25 kSps conversion
// period and that every Sample is in RAM before the next conversion.
module tb_daq_top;
  import daq_pkg::*;
  import tb_data_pkg::*;
  int checks = 0, failures = 0;

  localparam int unsigned NADC = 3, SPB = 4, NBLK = 3, PWAIT = 50;
  localparam int unsigned AW = 25;
  localparam logic [AW-1:0] BASE = AW'(1) << (AW - 1);
  localparam int unsigned STRIDE = NADC + 1;
  localparam int unsigned N_IRQ = NBLK + 2;     // blocks to read back: one wrap
  localparam int unsigned BW = (NBLK > 1) ? $clog2(NBLK) : 1;

  logic fclk = 0, sclk = 0, fpga_reset = 0;
  always #10.1ns fclk = ~fclk;     // ~50 MHz, not locked to SCLK
  always #50ns   sclk = ~sclk;     // 10 MHz

  logic adc_powerup_en = 0, data_aq_en = 0;
  logic read_ram_block;
  logic [BW-1:0] ram_block_num;
  logic adc_convst, adc_csn, adc_reset;
  logic [NADC-1:0] adc_busy, adc_sdata;
  logic [AW-1:0] avm_address;
  logic avm_write;
  logic [255:0] avm_writedata;
  logic [31:0] avm_byteenable;
  logic avm_waitrequest;
  logic offloading;

  daq_top #(.ADC_N(NADC), .SAMPLES_PER_BLOCK(SPB), .N_BLOCKS(NBLK), .POWERUP_WAIT(PWAIT)) dut (.*);

  for (genvar a = 0; a < NADC; a++) begin : g_adc
    ads8598s_model #(.ADC_ID(a)) u_adc (
      .sclk, .convst(adc_convst), .csn(adc_csn), .reset(adc_reset),
      .busy(adc_busy[a]), .sdata(adc_sdata[a]));
  end

  // rate: conversions every 40 us (25 kSps), and each Sample completely in RAM
  // (its metadata word written) before the next conversion starts
  realtime t_conv = 0;
  int unsigned n_rate = 0;
  always @(posedge adc_convst) if (!fpga_reset) begin
    if (t_conv > 0) begin
      checks++;
      if ($realtime - t_conv != 40us) begin
        failures++;
        $display("FAIL: conversion period %0t", $realtime - t_conv);
      end
    end
    t_conv = $realtime;
  end
  always @(posedge fclk)
    if (avm_write && !avm_waitrequest && ((avm_address - BASE) % STRIDE) == 0) begin
      checks++;
      n_rate++;
      if ($realtime - t_conv >= 40us) begin
        failures++;
        $display("FAIL: Sample written %0t after its conversion", $realtime - t_conv);
      end
    end

  // ------------------------------------------------------------ RAM model
  logic [255:0] ram [logic [AW-1:0]];
  int unsigned n_stall = 0, n_cdc_bp = 0, n_off = 0, n_wrap = 0;
  int unsigned n_len[4] = '{0, 0, 0, 0};
  int unsigned n_multi = 0, n_irq = 0, n_samples = 0;

  always @(posedge fclk) begin
    avm_waitrequest <= ($urandom % 4 == 0);
    if (avm_write && !avm_waitrequest) begin
      ram[avm_address] = avm_writedata;
      checks++;
      if (avm_byteenable !== '1) begin failures++; $display("FAIL: byteenable"); end
    end
    if (avm_write && avm_waitrequest) n_stall++;
    if (offloading) n_off++;
  end
  always @(posedge sclk) if (dut.adc_s.valid && !dut.adc_s.ready) n_cdc_bp++;

  // ----------------------------------------------- read back a Sample Block
  function automatic byte unsigned ram_byte(input logic [AW-1:0] entry, input int unsigned k);
    return ram.exists(entry) ? ram[entry][8*k +: 8] : 8'h00;
  endfunction

  task automatic read_block(input int unsigned blk);
    for (int i = 0; i < int'(SPB); i++) begin
      automatic logic [AW-1:0] sbase = BASE + AW'((blk * SPB + i) * STRIDE);
      automatic logic [255:0] meta = ram.exists(sbase) ? ram[sbase] : '0;
      automatic int unsigned sum_hw = meta[31:0], pay = meta[63:32], snum = meta[95:64];
      automatic logic [7:0] par_hw = meta[103:96];
      automatic logic [7:0] par = 0;
      automatic int unsigned k = 0, nent;
      automatic int sum_ref = 0;
      nent = (pay + 31) / 32;
      if (nent > 1) n_multi++;
      checks++;
      if (snum != n_samples || meta[255:104] != '0 || pay == 0 || nent > NADC) begin
        failures++;
        $display("FAIL block %0d sample %0d: number %0d exp %0d, payload %0d", blk, i, snum, n_samples, pay);
        return;
      end
      for (int e = 0; e < int'(nent); e++)
        for (int b = 0; b < 32; b++) par ^= ram_byte(sbase + AW'(e + 1), b);
      for (int a = 0; a < int'(NADC); a++)
        for (int c = 0; c < 8; c++) begin
          automatic longint unsigned v = 0;
          automatic int unsigned sh = 0, nb = 0;
          automatic byte unsigned by;
          do begin
            by = ram_byte(sbase + AW'(k / 32 + 1), k % 32);
            v |= longint'(by & 8'h7f) << sh;
            sh += 7; k++; nb++;
          end while ((by & 8'h80) && nb < 5);
          n_len[nb > 3 ? 0 : nb]++;
          checks++;
          if (v != longint'(chan_value(snum, a, c))) begin
            failures++;
            $display("FAIL sample %0d adc %0d ch %0d: %0d exp %0d", snum, a, c, v, chan_value(snum, a, c));
          end
          sum_ref += sext18(chan_value(snum, a, c));
        end
      checks += 3;
      if (k != pay) begin failures++; $display("FAIL sample %0d: payload %0d, decoded %0d bytes", snum, pay, k); end
      if (int'(sum_hw) != sum_ref) begin failures++; $display("FAIL sample %0d: sum %0d exp %0d", snum, int'(sum_hw), sum_ref); end
      if (par != par_hw) begin failures++; $display("FAIL sample %0d: parity %h exp %h", snum, par_hw, par); end
      n_samples++;
    end
  endtask

  int unsigned exp_blk = 0;
  always @(posedge fclk) begin
    if (read_ram_block && !fpga_reset) begin
      checks++;
      if (32'(ram_block_num) != exp_blk) begin
        failures++; $display("FAIL: interrupt for block %0d, expected %0d", ram_block_num, exp_blk);
      end
      if (n_irq > 0 && ram_block_num == 0) n_wrap++;
      read_block(32'(ram_block_num));
      n_irq++;
      exp_blk = (exp_blk + 1) % NBLK;
    end
  end

  // ------------------------------------------------------------- sequence
  initial begin
    #(400ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(input string what, input int unsigned n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
    else $display("%s: %0d", what, n);
  endtask

  initial begin
    #(1ns);
    fpga_reset = 1;           // asynchronous assertion, before the first clock edge
    #(1us);
    fpga_reset = 0;
    #(1us);
    adc_powerup_en = 1;
    data_aq_en = 1;
    wait (n_irq == N_IRQ);
    #(1us);
    need("Avalon stalls", n_stall);
    need("CDC backpressure cycles", n_cdc_bp);
    need("1-byte Varints", n_len[1]);
    need("2-byte Varints", n_len[2]);
    need("3-byte Varints", n_len[3]);
    need("Samples over several entries", n_multi);
    need("offloading cycles", n_off);
    need("interrupts", n_irq);
    need("buffer wraps", n_wrap);
    need("Samples written within their period", n_rate);
    checks++;
    if (n_len[0] != 0) begin failures++; $display("FAIL: overlong Varints"); end
    checks++;
    if (g_adc[0].u_adc.errors != 0 || g_adc[NADC-1].u_adc.errors != 0) begin
      failures++; $display("FAIL: ADC protocol errors");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
