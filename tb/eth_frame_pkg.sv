// eth_frame_pkg: testbench helpers that build Ethernet/IPv4 frames and pack
// them into 32-bit words, first byte in bits [31:24].
// Frame layout: destination MAC, source MAC, EtherType 0x0800, a 20-byte IPv4
// header (source IP 10.0.0.src at bytes 26..29, destination IP 10.0.0.dst at
// bytes 30..33) and a payload whose bytes are seed + index.
package eth_frame_pkg;
  typedef byte unsigned bytes_t[$];
  typedef logic [31:0]  words_t[$];

  function automatic bytes_t make_frame(int len, byte unsigned seed,
                                        byte unsigned src, byte unsigned dst);
    bytes_t f;
    for (int i = 0; i < len; i++) f.push_back(8'(32'(seed) + i));
    for (int i = 0; i < 6; i++) begin f[i] = 8'hFF; f[6+i] = 8'(2 + i); end
    f[12] = 8'h08; f[13] = 8'h00;
    f[14] = 8'h45; f[15] = 8'h00;
    f[26] = 8'd10; f[27] = 8'd0; f[28] = 8'd0; f[29] = src;
    f[30] = 8'd10; f[31] = 8'd0; f[32] = 8'd0; f[33] = dst;
    return f;
  endfunction

  function automatic words_t to_words(bytes_t f);
    words_t w;
    for (int i = 0; i < f.size(); i += 4) begin
      logic [31:0] x = '0;
      for (int b = 0; b < 4; b++)
        if (i + b < f.size()) x[31-8*b -: 8] = f[i+b];
      w.push_back(x);
    end
    return w;
  endfunction
endpackage
