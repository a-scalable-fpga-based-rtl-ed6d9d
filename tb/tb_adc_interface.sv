// tb_adc_interface: the serial readout of an array of three ADC models.
// Checks every ADC word of every Sample against the model's data and the
// last flag, that conversions start every 400 SCLK cycles (25 kSps at
// 10 MHz), that csn is low for exactly 144 SCLK cycles per readout, that the
// readout ends while the ADCs are busy, that the ADCs are held in reset and
// idle until powered up, and that disabling acquisition stops conversions.
module tb_adc_interface;
  import daq_pkg::*;
  import tb_data_pkg::*;
  int checks = 0, failures = 0;

  localparam int unsigned NADC = 3;
  localparam int unsigned PER  = 400;
  logic sclk = 0, rst = 1;
  always #50ns sclk = ~sclk;

  logic adc_powerup_en = 0, data_aq_en = 0;
  logic adc_convst, adc_csn, adc_reset;
  logic [NADC-1:0] busy_v, adc_sdata;
  adc_word_t out_data;
  logic out_valid, out_ready;

  adc_interface #(.ADC_N(NADC), .SAMPLE_PERIOD(PER), .POWERUP_WAIT(20)) dut (
    .sclk, .rst, .adc_powerup_en, .data_aq_en, .adc_convst, .adc_csn, .adc_reset,
    .adc_busy(|busy_v), .adc_sdata, .out_data, .out_valid, .out_ready);

  for (genvar a = 0; a < NADC; a++) begin : g_adc
    ads8598s_model #(.ADC_ID(a)) u_adc (
      .sclk, .convst(adc_convst), .csn(adc_csn), .reset(adc_reset),
      .busy(busy_v[a]), .sdata(adc_sdata[a]));
  end

  // cycle counters
  longint unsigned cyc = 0, last_rise = 0;
  int unsigned n_rise = 0, csn_low = 0, n_read = 0;
  logic convst_q = 0, csn_q = 1;
  bit period_ok = 0;
  always @(posedge sclk) if (!rst) begin
    cyc <= cyc + 1;
    convst_q <= adc_convst;
    csn_q    <= adc_csn;
    if (adc_convst && !convst_q) begin
      if (period_ok) begin
        checks++;
        if (cyc - last_rise != PER) begin
          failures++;
          $display("FAIL: convst period %0d", cyc - last_rise);
        end
      end
      if (!adc_powerup_en || !data_aq_en || adc_reset) begin
        failures++;
        $display("FAIL: conversion while disabled");
      end
      last_rise <= cyc;
      period_ok <= 1;
      n_rise <= n_rise + 1;
    end
    if (!adc_csn) csn_low <= csn_low + 1;
    if (adc_csn && !csn_q) begin
      checks++;
      if (csn_low != 144) begin
        failures++;
        $display("FAIL: csn low for %0d cycles", csn_low);
      end
      csn_low <= 0;
      n_read <= n_read + 1;
    end
    if (!adc_powerup_en && !rst) begin
      if (!adc_reset) begin failures++; $display("FAIL: ADC not in reset while powered down"); end
    end
  end

  // output checker
  int unsigned s_out = 0, a_out = 0;
  always @(posedge sclk) begin
    if (rst) out_ready <= 0;
    else begin
      out_ready <= ($urandom % 4 != 0);
      if (out_valid && out_ready) begin
        checks++;
        for (int c = 0; c < 8; c++)
          if (out_data.data[143 - 18*c -: 18] !== chan_value(s_out, a_out, c)) begin
            failures++;
            $display("FAIL sample %0d adc %0d ch %0d: %h exp %h", s_out, a_out, c,
                     out_data.data[143 - 18*c -: 18], chan_value(s_out, a_out, c));
          end
        if (out_data.last != (a_out == NADC - 1)) begin
          failures++;
          $display("FAIL last flag at adc %0d", a_out);
        end
        if (a_out == NADC - 1) begin
          a_out <= 0;
          s_out <= s_out + 1;
        end else a_out <= a_out + 1;
      end
    end
  end

  initial begin
    #(10ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge sclk);
    rst <= 0;
    data_aq_en <= 1;             // enabled but not powered: nothing may happen
    repeat (1000) @(posedge sclk);
    checks++;
    if (n_rise != 0) begin failures++; $display("FAIL: convst before power-up"); end
    adc_powerup_en <= 1;
    wait (s_out == 10);
    // stop acquisition, then restart
    data_aq_en <= 0;
    repeat (1200) @(posedge sclk);
    checks++;
    if (s_out != n_read || s_out > 12) begin failures++; $display("FAIL: stop %0d/%0d", s_out, n_read); end
    begin
      automatic int unsigned r = n_rise;
      repeat (1000) @(posedge sclk);
      checks++;
      if (n_rise != r) begin failures++; $display("FAIL: conversions while disabled"); end
    end
    period_ok = 0;
    data_aq_en <= 1;
    wait (s_out == 20);
    repeat (500) @(posedge sclk);
    for (int a = 0; a < NADC; a++) begin
      checks++;
      if (a == 0 && g_adc[0].u_adc.errors != 0) begin failures++; $display("FAIL: ADC0 protocol errors"); end
      if (a == 1 && g_adc[1].u_adc.errors != 0) begin failures++; $display("FAIL: ADC1 protocol errors"); end
      if (a == 2 && g_adc[2].u_adc.errors != 0) begin failures++; $display("FAIL: ADC2 protocol errors"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
