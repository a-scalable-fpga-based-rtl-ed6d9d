// tb_cdc_fifo: the 2-register asynchronous FIFO between a 10 MHz write clock
// and a 50 MHz read clock, then with the ratio reversed. Random valid and
// ready patterns; every word must arrive once, in order and unchanged. Also
// checks that at most one word is ever in flight (the one-deep property) and
// that the FIFO is empty at the end.
module tb_cdc_fifo;
  int checks = 0, failures = 0;

  localparam int W = 16;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  logic [W-1:0] w_data, r_data;
  logic w_valid, w_ready, r_valid, r_ready;
  realtime whp = 50ns, rhp = 9.7ns;   // half periods

  always #(whp) wclk = ~wclk;
  always #(rhp) rclk = ~rclk;

  cdc_fifo #(.W(W)) dut (.*);

  int unsigned sent = 0, rcvd = 0;
  int unsigned N = 400;

  // writer: all reads before the clock edge's updates (nonblocking style)
  always @(posedge wclk) begin
    if (wrst) begin
      w_valid <= 0;
      w_data  <= 0;
    end else begin
      automatic int unsigned s = sent;
      if (w_valid && w_ready) begin
        s = sent + 1;
        sent <= s;
        w_valid <= 0;
      end
      if ((!w_valid || w_ready) && s < N && ($urandom % 4 != 0)) begin
        w_valid <= 1;
        w_data  <= W'(s * 7 + 3);
      end
    end
  end

  // reader
  always @(posedge rclk) begin
    if (rrst) begin
      r_ready <= 0;
    end else begin
      if (r_valid && r_ready) begin
        checks++;
        if (r_data !== W'(rcvd * 7 + 3)) begin
          failures++;
          $display("FAIL word %0d got %h", rcvd, r_data);
        end
        rcvd <= rcvd + 1;
      end
      r_ready <= ($urandom % 3 != 0);
    end
  end

  // never more than one word between a write and its read
  always @(sent or rcvd) begin
    checks++;
    if (sent > rcvd + 1) begin
      failures++;
      $display("FAIL: %0d words in flight", sent - rcvd);
    end
  end

  initial begin
    #(2ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(200ns); wrst = 0; rrst = 0;
    wait (rcvd == N);
    // reverse the clock ratio: fast writer, slow reader
    whp = 9.3ns; rhp = 50ns;
    N = 800;
    wait (rcvd == N);
    #1us;
    checks++;
    if (r_valid || sent != N) begin failures++; $display("FAIL: spurious or lost word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
