// tb_varint_encoder: Varint encoding and packing of whole Samples of 12 ADC
// words. The expected BRAM entries are built by encoding every channel with
// the reference LEB128 loop, laying the bytes end to end and cutting them
// into 32-byte entries (last one zero-padded). Samples include all-zero and
// all-maximum ones (payloads that fill entries exactly) and random detector
// data; readies are random in one phase and always high in another, where the
// cycle count of a Sample must be 9 per ADC word + 1 + number of entries.
module tb_varint_encoder;
  import daq_pkg::*;
  import tb_data_pkg::*;
  int checks = 0, failures = 0;

  localparam int unsigned NADC = 12;
  logic clk = 0, rst = 1;
  always #10ns clk = ~clk;

  adc_word_t    in_data;
  logic         in_valid, in_ready;
  logic [31:0]  payload_data;
  logic         payload_valid, payload_ready;
  logic [255:0] out_data;
  logic         out_valid, out_ready;
  logic         offloading;

  varint_encoder #(.ADC_N(NADC)) dut (.*);

  // expected data per Sample
  int unsigned  exp_pay[$];
  logic [255:0] exp_ent[$];
  int unsigned  exp_nent[$];

  localparam int unsigned NS = 200;
  bit           fast = 0;        // all readies high, input never idle
  int unsigned  s_gen = 0, w_gen = 0;
  logic [17:0]  vals [NADC][8];

  function automatic void make_sample(input int unsigned s);
    byte unsigned bytes[$];
    byte unsigned b[10];
    int unsigned n;
    logic [255:0] e;
    for (int a = 0; a < NADC; a++)
      for (int c = 0; c < 8; c++) begin
        if (s == 0)      vals[a][c] = '0;
        else if (s == 1) vals[a][c] = '1;
        else if (s == 2) vals[a][c] = 18'(1 << ((a * 8 + c) % 18));
        else             vals[a][c] = chan_value(s, a, c);
        n = leb128(longint'(vals[a][c]), b);
        for (int i = 0; i < int'(n); i++) bytes.push_back(b[i]);
      end
    exp_pay.push_back(bytes.size());
    n = 0;
    for (int i = 0; i < bytes.size(); i += 32) begin
      e = '0;
      for (int j = 0; j < 32 && i + j < bytes.size(); j++) e[8*j +: 8] = bytes[i + j];
      exp_ent.push_back(e);
      n++;
    end
    exp_nent.push_back(n);
  endfunction

  // driver
  always @(posedge clk) begin
    if (rst) begin
      in_valid <= 0;
      in_data  <= '0;
    end else if (!in_valid || in_ready) begin
      in_valid <= 0;
      if (s_gen < NS && (fast || $urandom % 3 != 0)) begin
        automatic adc_word_t w;
        if (w_gen == 0) make_sample(s_gen);
        for (int c = 0; c < 8; c++) w.data[143 - 18*c -: 18] = vals[w_gen][c];
        w.last = (w_gen == NADC - 1);
        in_data  <= w;
        in_valid <= 1;
        if (w_gen == NADC - 1) begin
          w_gen = 0;
          s_gen <= s_gen + 1;
        end else w_gen = w_gen + 1;
      end
    end
  end

  // monitor
  int unsigned s_chk = 0, ent_in_s = 0;
  longint unsigned cyc = 0, t_first = 0;
  bit in_sample = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst) begin
      payload_ready <= 0;
      out_ready     <= 0;
    end else begin
      payload_ready <= fast || ($urandom % 3 != 0);
      out_ready     <= fast || ($urandom % 3 != 0);
      if (in_valid && in_ready && !in_sample) begin
        in_sample = 1;
        t_first = cyc;
      end
      // push is disabled while offloading
      if (offloading && in_ready) begin
        failures++;
        $display("FAIL: in_ready while offloading");
      end
      if (payload_valid && payload_ready) begin
        checks++;
        if (payload_data != exp_pay[0]) begin
          failures++;
          $display("FAIL sample %0d payload %0d exp %0d", s_chk, payload_data, exp_pay[0]);
        end
        void'(exp_pay.pop_front());
        ent_in_s = 0;
      end
      if (out_valid && out_ready) begin
        checks++;
        if (!offloading) begin failures++; $display("FAIL: offloading low during pop"); end
        if (exp_ent.size() == 0 || out_data !== exp_ent[0]) begin
          failures++;
          $display("FAIL sample %0d entry %0d\n got %h\n exp %h", s_chk, ent_in_s, out_data,
                   exp_ent.size() ? exp_ent[0] : '0);
        end
        if (exp_ent.size()) void'(exp_ent.pop_front());
        ent_in_s++;
        if (ent_in_s == exp_nent[0]) begin
          if (fast) begin
            checks++;
            if (cyc - t_first != 64'(9 * NADC + 1 + exp_nent[0])) begin
              failures++;
              $display("FAIL sample %0d took %0d cycles", s_chk, cyc - t_first);
            end
          end
          void'(exp_nent.pop_front());
          in_sample = 0;
          s_chk <= s_chk + 1;
        end
      end
    end
  end

  initial begin
    #(2ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (s_chk == NS / 2);
    @(posedge clk);
    fast = 1;
    wait (s_chk == NS);
    repeat (10) @(posedge clk);
    checks++;
    if (exp_ent.size() != 0 || out_valid) begin failures++; $display("FAIL: leftover data"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
