// eth_tb_util.svh: testbench helpers for Ethernet / IPv4 / UDP frames: a CRC-32
// written from the generator polynomial (MSB-first shift register on
// bit-reversed data), a frame builder and a frame checker that returns the
// UDP payload. Included inside a testbench module.
  typedef logic [7:0] bytes_t [$];

  function automatic logic [7:0] rev8(logic [7:0] b);
    for (int i = 0; i < 8; i++) rev8[i] = b[7-i];
  endfunction
  function automatic logic [31:0] rev32(logic [31:0] w);
    for (int i = 0; i < 32; i++) rev32[i] = w[31-i];
  endfunction

  // CRC-32 of IEEE 802.3, returned as the value whose low byte is sent first
  function automatic logic [31:0] fcs(const ref bytes_t d, input int from, input int to);
    logic [31:0] r;
    logic [7:0]  b;
    r = '1;
    for (int i = from; i < to; i++) begin
      b = rev8(d[i]);
      for (int j = 7; j >= 0; j--) begin
        if (r[31] ^ b[j]) r = (r << 1) ^ 32'h04C1_1DB7;
        else              r = r << 1;
      end
    end
    return rev32(~r);
  endfunction

  function automatic int unsigned ones_sum(const ref bytes_t d, input int from, input int n);
    int unsigned s = 0;
    for (int i = 0; i < n; i += 2) s += {d[from+i], d[from+i+1]};
    while (s > 32'hFFFF) s = (s & 32'hFFFF) + (s >> 16);
    return s;
  endfunction

  // complete frame on the wire: preamble, SFD, header, payload, pad, FCS
  function automatic bytes_t build(logic [47:0] dmac, logic [47:0] smac, logic [31:0] sip,
                                   logic [31:0] dip, logic [15:0] sport, logic [15:0] dport,
                                   const ref bytes_t pay, input bit bad_crc = 0);
    bytes_t f;
    int     L;
    logic [31:0] c;
    logic [15:0] ipl, cs;
    L = pay.size();
    ipl = 16'(L + 28);
    for (int i = 0; i < 7; i++) f.push_back(8'h55);
    f.push_back(8'hD5);
    for (int i = 5; i >= 0; i--) f.push_back(dmac[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(smac[8*i +: 8]);
    f.push_back(8'h08); f.push_back(8'h00);
    f.push_back(8'h45); f.push_back(8'h00); f.push_back(ipl[15:8]); f.push_back(ipl[7:0]);
    f.push_back(8'h00); f.push_back(8'h00); f.push_back(8'h40); f.push_back(8'h00);
    f.push_back(8'h40); f.push_back(8'h11); f.push_back(8'h00); f.push_back(8'h00);
    for (int i = 3; i >= 0; i--) f.push_back(sip[8*i +: 8]);
    for (int i = 3; i >= 0; i--) f.push_back(dip[8*i +: 8]);
    cs = ~16'(ones_sum(f, 22, 20));
    f[32] = cs[15:8]; f[33] = cs[7:0];
    f.push_back(sport[15:8]); f.push_back(sport[7:0]);
    f.push_back(dport[15:8]); f.push_back(dport[7:0]);
    f.push_back(8'(16'(L + 8) >> 8)); f.push_back(8'(L + 8));
    f.push_back(8'h00); f.push_back(8'h00);
    for (int i = 0; i < L; i++) f.push_back(pay[i]);
    while (f.size() < 8 + 60) f.push_back(8'h00);
    c = fcs(f, 8, f.size());
    if (bad_crc) c ^= 32'h0000_0100;
    for (int i = 0; i < 4; i++) f.push_back(c[8*i +: 8]);
    return f;
  endfunction

  // checks a frame as sent; returns 0 and an error text on failure
  function automatic bit check_frame(const ref bytes_t f, input logic [47:0] dmac,
                                     input logic [47:0] smac, input logic [31:0] sip,
                                     input logic [31:0] dip, input logic [15:0] sport,
                                     input logic [15:0] dport, output bytes_t pay,
                                     output string err);
    int L, n;
    logic [31:0] c;
    pay = {};
    err = "";
    n = f.size();
    if (n < 72) begin err = $sformatf("frame too short (%0d)", n); return 0; end
    for (int i = 0; i < 7; i++) if (f[i] != 8'h55) begin err = "preamble"; return 0; end
    if (f[7] != 8'hD5) begin err = "SFD"; return 0; end
    for (int i = 0; i < 6; i++) begin
      if (f[8+i]  != dmac[8*(5-i) +: 8]) begin err = "destination MAC"; return 0; end
      if (f[14+i] != smac[8*(5-i) +: 8]) begin err = "source MAC"; return 0; end
    end
    if ({f[20], f[21]} != 16'h0800) begin err = "EtherType"; return 0; end
    if (f[22] != 8'h45 || f[31] != 8'h11) begin err = "IP version/protocol"; return 0; end
    if (ones_sum(f, 22, 20) != 32'hFFFF) begin err = "IP header checksum"; return 0; end
    if ({f[34], f[35], f[36], f[37]} != sip || {f[38], f[39], f[40], f[41]} != dip)
      begin err = "IP addresses"; return 0; end
    if ({f[42], f[43]} != sport || {f[44], f[45]} != dport) begin err = "UDP ports"; return 0; end
    L = int'({f[46], f[47]}) - 8;
    if (int'({f[24], f[25]}) != L + 28) begin err = "IP length"; return 0; end
    if (n != 8 + ((L + 42 < 60) ? 60 : L + 42) + 4) begin err = $sformatf("frame length %0d for payload %0d", n, L); return 0; end
    c = fcs(f, 8, n - 4);
    if ({f[n-1], f[n-2], f[n-3], f[n-4]} != c) begin err = "FCS"; return 0; end
    for (int i = 0; i < L; i++) pay.push_back(f[50+i]);
    return 1;
  endfunction
