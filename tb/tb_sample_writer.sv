// tb_sample_writer: Sample writing into a circular Sample Buffer of 3 Sample
// Blocks of 2 Samples, with 3 ADCs (4 entries per Sample). Sums, payloads
// (1 to 72 bytes) and entries are random; sum and payload arrive in random
// order; the Avalon slave stalls at random. Every write is checked against
// the expected sequence: the data entries at RAM_BASE + coarse + 1.., then
// the metadata entry {sum, payload, sample number, XOR parity byte} at
// RAM_BASE + coarse. Also checks the interrupt pulse and block number after
// every Sample Block, the wrap of the buffer, and the restart of numbering
// after acquisition is disabled.
module tb_sample_writer;
  import daq_pkg::*;
  int checks = 0, failures = 0;

  localparam int unsigned NADC = 3, SPB = 2, NBLK = 3, AW = 16;
  localparam logic [AW-1:0] BASE = 16'h1000;
  localparam int unsigned STRIDE = NADC + 1;

  logic clk = 0, rst = 1;
  always #10ns clk = ~clk;

  logic         data_aq_en = 1;
  logic [31:0]  sum_data, payload_data;
  logic         sum_valid, sum_ready, payload_valid, payload_ready;
  logic [255:0] in_data;
  logic         in_valid, in_ready;
  logic [AW-1:0] avm_address;
  logic         avm_write;
  logic [255:0] avm_writedata;
  logic [31:0]  avm_byteenable;
  logic         avm_waitrequest;
  logic         read_ram_block;
  logic [1:0]   ram_block_num;

  sample_writer #(.ADC_N(NADC), .SAMPLES_PER_BLOCK(SPB), .N_BLOCKS(NBLK),
                  .AMM_ADDR_W(AW), .RAM_BASE(BASE)) dut (.*);

  // expected Avalon writes
  logic [AW-1:0]  exp_addr[$];
  logic [255:0]   exp_data[$];

  // stimulus state of the Sample being sent
  int unsigned s_gen = 0, s_num = 0, pos = 0;   // pos: Sample slot in the buffer
  int unsigned n_ent = 0, e_sent = 0;
  bit sum_sent = 0, pay_sent = 0, active = 0, hold = 0;
  logic [31:0]  cur_sum, cur_pay;
  logic [255:0] ents[$];
  localparam int unsigned NS = 40;

  task automatic new_sample();
    logic [7:0] par = 0;
    cur_sum = $urandom;
    cur_pay = 1 + $urandom % (NADC * 24);
    n_ent = (cur_pay + 31) / 32;
    ents.delete();
    for (int e = 0; e < int'(n_ent); e++) begin
      logic [255:0] d;
      for (int k = 0; k < 8; k++) d[32*k +: 32] = $urandom;
      ents.push_back(d);
      exp_addr.push_back(BASE + AW'(pos * STRIDE + e + 1));
      exp_data.push_back(d);
      for (int k = 0; k < 32; k++) par ^= d[8*k +: 8];
    end
    exp_addr.push_back(BASE + AW'(pos * STRIDE));
    exp_data.push_back({128'b0, 24'b0, par, s_num, cur_pay, cur_sum});
    pos = (pos + 1) % (SPB * NBLK);
    s_num++;
  endtask

  always @(posedge clk) begin
    if (rst) begin
      sum_valid <= 0; payload_valid <= 0; in_valid <= 0;
      sum_data <= 0; payload_data <= 0; in_data <= 0;
    end else begin
      if (sum_valid && sum_ready) begin sum_valid <= 0; sum_sent = 1; end
      if (payload_valid && payload_ready) begin payload_valid <= 0; pay_sent = 1; end
      if (in_valid && in_ready) begin in_valid <= 0; e_sent++; end
      if (!active && !hold && s_gen < NS && exp_addr.size() == 0 && $urandom % 2) begin
        new_sample();
        active = 1; sum_sent = 0; pay_sent = 0; e_sent = 0;
        s_gen <= s_gen + 1;
      end
      if (active) begin
        if (!sum_sent && !sum_valid && $urandom % 3 == 0) begin
          sum_valid <= 1; sum_data <= cur_sum;
        end
        if (!pay_sent && !payload_valid && $urandom % 3 == 0) begin
          payload_valid <= 1; payload_data <= cur_pay;
        end
        if (sum_sent && pay_sent && e_sent < n_ent && (!in_valid || in_ready) && $urandom % 2) begin
          // the entry after the one just accepted (e_sent already counts it)
          in_valid <= 1; in_data <= ents[e_sent];
        end
        if (sum_sent && pay_sent && e_sent == n_ent && !in_valid) active = 0;
      end
    end
  end

  // Avalon slave with random stalls, and write checker
  int unsigned n_wr = 0, n_stall = 0, n_irq = 0, exp_blk = 0, meta_seen = 0;
  always @(posedge clk) begin
    avm_waitrequest <= ($urandom % 3 == 0);
    if (!rst) begin
      if (avm_write && avm_waitrequest) n_stall++;
      if (avm_write && !avm_waitrequest) begin
        checks++;
        n_wr++;
        if (exp_addr.size() == 0) begin
          failures++; $display("FAIL: unexpected write to %h", avm_address);
        end else begin
          if (avm_address !== exp_addr[0] || avm_writedata !== exp_data[0] || avm_byteenable !== '1) begin
            failures++;
            $display("FAIL write %0d: addr %h exp %h\n data %h\n exp  %h", n_wr, avm_address,
                     exp_addr[0], avm_writedata, exp_data[0]);
          end
          if (avm_address == BASE + AW'(((exp_addr[0] - BASE) / STRIDE) * STRIDE)) meta_seen++;
          void'(exp_addr.pop_front());
          void'(exp_data.pop_front());
        end
      end
      if (read_ram_block) begin
        checks++;
        n_irq++;
        if (32'(ram_block_num) != exp_blk || meta_seen != SPB * n_irq) begin
          failures++;
          $display("FAIL irq %0d: block %0d exp %0d after %0d Samples", n_irq, ram_block_num, exp_blk, meta_seen);
        end
        exp_blk = (exp_blk + 1) % NBLK;
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
    wait (s_gen == 15);
    hold = 1;
    wait (s_gen == 15 && exp_addr.size() == 0 && !active);
    // stop acquisition between Samples: numbering and buffer restart at 0
    repeat (5) @(posedge clk);
    data_aq_en <= 0;
    repeat (5) @(posedge clk);
    s_num = 0; pos = 0; exp_blk = 0; meta_seen = 0; n_irq = 0;
    data_aq_en <= 1;
    hold = 0;
    wait (s_gen == NS && exp_addr.size() == 0 && !active);
    repeat (10) @(posedge clk);
    checks++;
    if (n_irq != (NS - 15) / SPB || n_stall == 0) begin
      failures++; $display("FAIL: %0d interrupts, %0d stalls", n_irq, n_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
