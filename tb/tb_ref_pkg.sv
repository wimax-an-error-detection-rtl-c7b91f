// tb_ref_pkg: reference models for the testbenches, written independently of
// the RTL: a bit-serial, MSB-first CRC-32 (generator 0x04C11DB7) fed with
// bit-reversed bytes and bit-reversed at the end, which equals the LSB-first
// register of the RTL with preset all ones and no final inversion; a CRC-8
// header check; and byte-level builders for the downlink and ARQ PDUs.
package tb_ref_pkg;

  function automatic logic [7:0] rev8(input logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = b[7-i];
    return r;
  endfunction

  function automatic logic [31:0] rev32(input logic [31:0] b);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) r[i] = b[31-i];
    return r;
  endfunction

  function automatic logic [31:0] ref_crc32(input logic [7:0] bytes[], input int n);
    logic [31:0] c;
    logic [7:0]  b;
    c = 32'hFFFF_FFFF;
    for (int i = 0; i < n; i++) begin
      b = rev8(bytes[i]);
      for (int j = 7; j >= 0; j--) begin
        if (c[31] ^ b[j]) c = (c << 1) ^ 32'h04C1_1DB7;
        else              c = (c << 1);
      end
    end
    return rev32(c);
  endfunction

  function automatic logic [7:0] ref_hcs(input logic [7:0] h[5]);
    logic [7:0] c;
    c = 8'h00;
    for (int i = 0; i < 5; i++)
      for (int j = 7; j >= 0; j--) begin
        if (c[7] ^ h[i][j]) c = (c << 1) ^ 8'h07;
        else                c = (c << 1);
      end
    return c;
  endfunction

  // generic MAC header: HT=0 EC=0 type 0, CI=1, EKS 0, LEN, CID, HCS
  function automatic void ref_header(ref logic [7:0] p[], input int len, input logic [15:0] cid);
    logic [7:0] h[5];
    h[0] = 8'h00;
    h[1] = 8'h40 | 8'((len >> 8) & 7);
    h[2] = 8'(len);
    h[3] = cid[15:8];
    h[4] = cid[7:0];
    for (int i = 0; i < 5; i++) p[i] = h[i];
    p[5] = ref_hcs(h);
  endfunction

  // downlink PDU as the base station builds it
  function automatic void ref_dl_pdu(ref logic [7:0] p[], input int payload, input logic [15:0] seq,
                                     input logic [15:0] cid);
    int data_len;
    logic [31:0] c;
    data_len = 6 + payload;
    p = new[data_len + 4];
    ref_header(p, data_len + 4, cid);
    p[6] = seq[15:8];
    p[7] = seq[7:0];
    for (int j = 2; j < payload; j++) p[6+j] = 8'((int'(seq) * 37 + j * 11) & 255) ^ 8'hA5;
    c = ref_crc32(p, data_len);
    for (int k = 0; k < 4; k++) p[data_len+k] = c[31-8*k -: 8];
  endfunction

  // ARQ feedback PDU as the subscriber station builds it
  function automatic void ref_arq_pdu(ref logic [7:0] p[], input logic [15:0] cid,
                                      input logic [10:0] bsn, input bit ack);
    logic [31:0] c;
    p = new[17];
    ref_header(p, 17, cid);
    p[6]  = 8'd33;
    p[7]  = cid[15:8];
    p[8]  = cid[7:0];
    p[9]  = {3'b100, bsn[10:6]};
    p[10] = {bsn[5:0], 2'b00};
    p[11] = ack ? 8'h80 : 8'h00;
    p[12] = 8'h00;
    c = ref_crc32(p, 13);
    for (int k = 0; k < 4; k++) p[13+k] = c[31-8*k -: 8];
  endfunction

  function automatic logic [31:0] word_of(input logic [7:0] p[], input int w);
    logic [31:0] r;
    r = '0;
    for (int k = 0; k < 4; k++)
      if (4*w + k < p.size()) r[8*k +: 8] = p[4*w + k];
    return r;
  endfunction

endpackage
