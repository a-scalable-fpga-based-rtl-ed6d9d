// tb_varint_enc: exhaustive check of the 18-bit combinational Varint encoder
// against a loop-based LEB128 reference, plus a 32-bit instance checked on
// random values and on the worked example 365069 -> 0x8D 0xA4 0x16.
module tb_varint_enc;
  import tb_data_pkg::*;
  int checks = 0, failures = 0;

  logic [17:0] v18;
  logic [23:0] enc18;
  logic [1:0]  len18;
  varint_enc #(.DATA_W(18)) dut18 (.value(v18), .varint(enc18), .len(len18));

  logic [31:0] v32;
  logic [39:0] enc32;
  logic [2:0]  len32;
  varint_enc #(.DATA_W(32)) dut32 (.value(v32), .varint(enc32), .len(len32));

  task automatic check18(input logic [17:0] v);
    byte unsigned b[10];
    int unsigned n;
    logic [23:0] exp_w;
    v18 = v;
    #1;
    n = leb128(longint'(v), b);
    exp_w = '0;
    for (int i = 0; i < int'(n); i++) exp_w[8*i +: 8] = b[i];
    checks++;
    if (enc18 !== exp_w || 32'(len18) != n) begin
      failures++;
      if (failures < 10) $display("FAIL v=%0d got %h/%0d exp %h/%0d", v, enc18, len18, exp_w, n);
    end
  endtask

  task automatic check32(input logic [31:0] v);
    byte unsigned b[10];
    int unsigned n;
    logic [39:0] exp_w;
    v32 = v;
    #1;
    n = leb128(longint'(v), b);
    exp_w = '0;
    for (int i = 0; i < int'(n); i++) exp_w[8*i +: 8] = b[i];
    checks++;
    if (enc32 !== exp_w || 32'(len32) != n) begin
      failures++;
      if (failures < 10) $display("FAIL32 v=%0d got %h/%0d exp %h/%0d", v, enc32, len32, exp_w, n);
    end
  endtask

  initial begin
    #1000000000;   // watchdog
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 18); v++) check18(18'(v));
    for (int i = 0; i < 20000; i++) check32($urandom >> ($urandom % 32));
    check32(32'hffff_ffff);
    // worked example: 365069 encodes to three bytes 8D A4 16 (LSB byte first)
    v32 = 32'd365069;
    #1;
    checks++;
    if (enc32 !== 40'h00_0016_A48D || len32 != 3) begin
      failures++;
      $display("FAIL example %h %0d", enc32, len32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
