// tb_integrator: sums of Samples of 1 to 6 ADC words with random values
// (including negative codes), random input gaps and random output
// backpressure. Each sum is compared with a sign-extended reference sum, and
// the block must take exactly 8 cycles (one channel per cycle) per ADC word.
module tb_integrator;
  import daq_pkg::*;
  import tb_data_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1;
  always #10ns clk = ~clk;

  adc_word_t   in_data;
  logic        in_valid, in_ready;
  logic [31:0] sum_data;
  logic        sum_valid, sum_ready;

  integrator dut (.*);

  int exp_q[$];
  int unsigned words_left = 0, sample_idx = 0, n_samples = 0;
  int          acc = 0;
  int unsigned busy_cycles = 0, accepted = 0;
  localparam int unsigned NS = 300;

  // driver
  always @(posedge clk) begin
    if (rst) begin
      in_valid <= 0;
      in_data  <= '0;
    end else begin
      automatic bit free = !in_valid || in_ready;
      if (in_valid && in_ready) accepted <= accepted + 1;
      if (free) begin
        in_valid <= 0;
        if (sample_idx < NS && ($urandom % 3 != 0)) begin
          automatic adc_word_t w;
          automatic int unsigned wl = words_left;
          if (wl == 0) wl = 1 + $urandom % 6;
          for (int c = 0; c < 8; c++) begin
            automatic logic [17:0] v = chan_value(sample_idx * 16 + wl, $urandom % 64, c);
            w.data[143 - 18*c -: 18] = v;
            acc += sext18(v);
          end
          w.last = (wl == 1);
          if (wl == 1) begin
            exp_q.push_back(acc);
            acc = 0;
            sample_idx <= sample_idx + 1;
          end
          words_left <= wl - 1;
          in_data  <= w;
          in_valid <= 1;
        end
      end
    end
  end

  // monitor: results and per-word processing time
  always @(posedge clk) begin
    if (!rst) begin
      sum_ready <= ($urandom % 4 != 0);
      if (sum_valid && sum_ready) begin
        checks++;
        if (exp_q.size() == 0 || int'(sum_data) != exp_q[0]) begin
          failures++;
          $display("FAIL sample %0d: got %0d exp %0d", n_samples, int'(sum_data),
                   exp_q.size() ? exp_q[0] : 0);
        end
        if (exp_q.size()) void'(exp_q.pop_front());
        n_samples <= n_samples + 1;
      end
      if (!in_ready && !sum_valid) busy_cycles <= busy_cycles + 1;
    end else sum_ready <= 0;
  end

  initial begin
    #(1ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (n_samples == NS);
    repeat (20) @(posedge clk);
    // one channel per cycle: 8 busy cycles per accepted word
    checks++;
    if (busy_cycles != 8 * accepted) begin
      failures++;
      $display("FAIL: %0d busy cycles for %0d words", busy_cycles, accepted);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
