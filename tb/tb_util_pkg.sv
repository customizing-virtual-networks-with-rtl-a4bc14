// tb_util_pkg: helpers shared by the testbenches: building Ethernet/IPv4
// packets as byte queues, an independent IPv4 header checksum, and cutting a
// packet into 64-bit beats (byte 0 in data[63:56]).
package tb_util_pkg;
  import netvirt_pkg::*;

  typedef logic [7:0] bytes_t[$];

  // one's-complement checksum of the 20-byte IPv4 header at offset 14,
  // computed with the checksum field taken as zero
  function automatic logic [15:0] ip_cksum(bytes_t b);
    int unsigned s = 0;
    for (int i = 14; i < 34; i += 2) begin
      if (i != 24) s += {b[i], b[i+1]};
    end
    while (s > 32'hFFFF) s = (s & 32'hFFFF) + (s >> 16);
    return ~s[15:0];
  endfunction

  function automatic bytes_t mk_pkt(logic [47:0] dmac, logic [47:0] smac,
                                    logic [31:0] sip, logic [31:0] dip,
                                    logic [7:0] ttl, int len, int seed,
                                    logic [15:0] etype = 16'h0800, bit bad_ck = 0);
    bytes_t b;
    logic [15:0] ck;
    for (int i = 0; i < len; i++) b.push_back(8'((i * 7 + seed * 13) & 8'hFF));
    for (int i = 0; i < 6; i++) begin
      b[i]   = dmac[47-8*i -: 8];
      b[6+i] = smac[47-8*i -: 8];
    end
    b[12] = etype[15:8]; b[13] = etype[7:0];
    b[14] = 8'h45; b[15] = 8'h00;
    b[16] = 8'((len - 14) >> 8); b[17] = 8'((len - 14) & 8'hFF);
    b[18] = 8'(seed); b[19] = 8'(seed >> 8);
    b[20] = 8'h40; b[21] = 8'h00;
    b[22] = ttl; b[23] = 8'd17;
    for (int i = 0; i < 4; i++) begin
      b[26+i] = sip[31-8*i -: 8];
      b[30+i] = dip[31-8*i -: 8];
    end
    ck = ip_cksum(b);
    if (bad_ck) ck = ck ^ 16'h0101;
    b[24] = ck[15:8]; b[25] = ck[7:0];
    return b;
  endfunction

  function automatic int nbeats(bytes_t b);
    return (b.size() + 7) / 8;
  endfunction

  function automatic pkt_beat_t beat_of(bytes_t b, int i, pkt_meta_t meta = '0);
    pkt_beat_t x;
    x = '0;
    x.meta = meta;
    for (int k = 0; k < 8; k++) begin
      if (8 * i + k < b.size()) begin
        x.data[63-8*k -: 8] = b[8*i+k];
        x.keep[7-k] = 1'b1;
      end
    end
    x.eop = (i == nbeats(b) - 1);
    return x;
  endfunction

  // appends the valid bytes of a beat to a byte queue
  function automatic void take_beat(ref bytes_t q, input pkt_beat_t x);
    for (int k = 0; k < 8; k++)
      if (x.keep[7-k]) q.push_back(x.data[63-8*k -: 8]);
  endfunction

  function automatic bit same(bytes_t a, bytes_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] !== b[i]) return 0;
    return 1;
  endfunction

endpackage
