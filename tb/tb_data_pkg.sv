// tb_data_pkg: test stimulus and reference models shared by the testbenches.
//
// chan_value(r, a, c) is the 18-bit code that the ADC model returns for
// readout r, ADC a, channel c. It is a hash of its arguments shaped like
// detector data: mostly small values (no beam on that strip), some medium and
// large ones, and a few negative codes (two's complement). The LEB128
// reference here is written as the textbook loop, independently of the
// combinational encoder under test.
package tb_data_pkg;

  function automatic int unsigned mix(input int unsigned x);
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  function automatic logic [17:0] chan_value(input int unsigned r, input int unsigned a,
                                             input int unsigned c);
    int unsigned h;
    h = mix(r * 32'h9e3779b1 + a * 32'h85ebca6b + c * 32'hc2b2ae35 + 32'd7);
    unique case (h % 8)
      0, 1, 2, 3: return 18'(h >> 8) % 18'd120;            // 1 byte
      4, 5:       return 18'((h >> 8) % 16000);            // 1-2 bytes
      6:          return 18'((h >> 8) % 131072);           // 1-3 bytes
      default:    return 18'(262144 - 1 - ((h >> 8) % 500)); // negative, 3 bytes
    endcase
  endfunction

  // reference LEB128: returns bytes in b[0..n-1]
  function automatic int unsigned leb128(input longint unsigned v, output byte unsigned b[10]);
    int unsigned n = 0;
    do begin
      b[n] = byte'(v & 8'h7f);
      v = v >> 7;
      if (v != 0) b[n] = b[n] | 8'h80;
      n++;
    end while (v != 0);
    return n;
  endfunction

  // sign-extended 18-bit code
  function automatic int sext18(input logic [17:0] v);
    return int'({{14{v[17]}}, v});
  endfunction

endpackage
