// wimax_pkg: types, addresses and packet-format helpers shared by the
// error-detection / ARQ virtual-socket system.
//
// Address map (follows the memory map of the design): the shared socket memory
// sits at 0x7000_0000 in 64 KB regions (System Ctrl Flags, Socket Ctrl Flags,
// TX_Buffer, RX_Buffer, TX_RX_Buffer) and the CRC hardware module at
// 0x7006_0000. The CRC module's register offsets (CRC_enable 0x400, CRC_done
// 0x500, CRC_length 0x600, Input_Buffer 0x1000, Output_Buffer 0x2000) are the
// design's published ones. The flag word assignments, the system-state encoding
// and the bus structs are this implementation's own choices.
//
// CRC-32: generator 0x04C11DB7, register preset to all ones, bits processed
// LSB first (reflected form 0xEDB88320). With no final inversion this
// reproduces the published ARQ-feedback example (CRC 0x807533C7 over 15 bytes).
// HCS: CRC-8 with generator x^8+x^2+x+1, preset 0, taken from IEEE 802.16.
package wimax_pkg;

  // ---------------- memory map ----------------
  localparam logic [31:0] SYS_FLAGS_BASE  = 32'h7000_0000;
  localparam logic [31:0] SOCK_FLAGS_BASE = 32'h7001_0000;
  localparam logic [31:0] TX_BUF_BASE     = 32'h7002_0000;
  localparam logic [31:0] RX_BUF_BASE     = 32'h7003_0000;
  localparam logic [31:0] TXRX_BUF_BASE   = 32'h7004_0000;
  localparam logic [31:0] HW_MODULE_BASE  = 32'h7006_0000;

  // region index = address bits [18:16] inside 0x7000_0000..0x7007_FFFF
  localparam logic [2:0] REG_SYS  = 3'd0;
  localparam logic [2:0] REG_SOCK = 3'd1;
  localparam logic [2:0] REG_TX   = 3'd2;
  localparam logic [2:0] REG_RX   = 3'd3;
  localparam logic [2:0] REG_TXRX = 3'd4;

  // flag words (byte offsets inside their region)
  localparam logic [31:0] SYS_STATE_ADDR = SYS_FLAGS_BASE + 32'h0;   // system FSM state
  localparam logic [31:0] DL_READY_ADDR  = SOCK_FLAGS_BASE + 32'h0;  // BS: DL PDU length in RX_Buffer
  localparam logic [31:0] UL_READY_ADDR  = SOCK_FLAGS_BASE + 32'h4;  // MS: ARQ frame length in TX_Buffer
  localparam logic [31:0] BS_DONE_ADDR   = SOCK_FLAGS_BASE + 32'h8;  // BS: bit0 decoded, bit1 last packet acknowledged

  // ---------------- CRC module registers ----------------
  localparam logic [15:0] CRC_ENABLE_OFS = 16'h0400;
  localparam logic [15:0] CRC_DONE_OFS   = 16'h0500;
  localparam logic [15:0] CRC_LENGTH_OFS = 16'h0600;
  localparam logic [15:0] INPUT_BUF_OFS  = 16'h1000;
  localparam logic [15:0] OUTPUT_BUF_OFS = 16'h2000;

  localparam logic [31:0] CRC32_POLY_REFL = 32'hEDB8_8320;  // 0x04C11DB7 bit-reversed
  localparam logic [31:0] CRC32_INIT      = 32'hFFFF_FFFF;

  // ---------------- system FSM ----------------
  typedef enum logic [2:0] {
    SYS_IDLE  = 3'd0,
    SYS_BS_TX = 3'd1,   // BS builds and writes the downlink PDU
    SYS_MS    = 3'd2,   // MS checks the PDU and writes the ARQ frame
    SYS_BS_RX = 3'd3,   // BS decodes the ARQ frame
    SYS_DONE  = 3'd4
  } sys_state_e;

  // ---------------- MAC header / ARQ fields ----------------
  localparam int unsigned GMH_BYTES      = 6;   // generic MAC header
  localparam int unsigned CRC_BYTES      = 4;
  localparam logic [7:0]  MSG_ARQ_FEEDBACK = 8'd33;
  localparam int unsigned ARQ_DATA_BYTES = 13;  // header + type + 6-byte feedback IE
  localparam int unsigned ARQ_PDU_BYTES  = ARQ_DATA_BYTES + CRC_BYTES;

  // ---------------- shared-memory port ----------------
  typedef struct packed {
    logic        req;
    logic        we;
    logic [31:0] addr;
    logic [31:0] wdata;
  } mem_req_t;

  typedef struct packed {
    logic        gnt;
    logic        rvalid;
    logic [31:0] rdata;
  } mem_rsp_t;

  // ---------------- AHB-Lite constants ----------------
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [2:0] HSIZE_WORD    = 3'b010;

  // One byte into the reflected CRC-32 register.
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] b);
    logic [31:0] c;
    c = crc ^ {24'h0, b};
    for (int i = 0; i < 8; i++)
      c = c[0] ? ((c >> 1) ^ CRC32_POLY_REFL) : (c >> 1);
    return c;
  endfunction

  // One byte into the header check sequence (CRC-8, MSB first).
  function automatic logic [7:0] hcs_byte(input logic [7:0] crc, input logic [7:0] b);
    logic [7:0] c;
    c = crc ^ b;
    for (int i = 0; i < 8; i++)
      c = c[7] ? ((c << 1) ^ 8'h07) : (c << 1);
    return c;
  endfunction

  // Generic MAC header, HT=0 EC=0 Type=0 CI=1 EKS=0: bytes 0..4 (HCS excluded).
  function automatic logic [7:0] gmh_byte(input int unsigned i, input logic [10:0] len,
                                          input logic [15:0] cid);
    case (i)
      0: return 8'h00;
      1: return {5'b01000, len[10:8]};
      2: return len[7:0];
      3: return cid[15:8];
      default: return cid[7:0];
    endcase
  endfunction

  function automatic logic [7:0] gmh_hcs(input logic [10:0] len, input logic [15:0] cid);
    logic [7:0] h;
    h = 8'h00;
    for (int i = 0; i < 5; i++) h = hcs_byte(h, gmh_byte(i, len, cid));
    return h;
  endfunction

  // ARQ feedback PDU (uplink), ARQ_PDU_BYTES long:
  //   0..5  generic MAC header, LEN = ARQ_PDU_BYTES
  //   6     management message type 33 (ARQ-Feedback)
  //   7..12 feedback IE: CID(16) LAST=1 ACK-type=0(2) BSN(11) maps=0(2),
  //         then 0x8000 for ACK or 0x0000 for NACK
  //   13..16 CRC-32, most significant byte first
  function automatic logic [7:0] arq_byte(input int unsigned i, input logic [15:0] cid,
                                          input logic [10:0] bsn, input logic ack,
                                          input logic [31:0] crc);
    if (i < 5)       return gmh_byte(i, 11'(ARQ_PDU_BYTES), cid);
    else if (i == 5) return gmh_hcs(11'(ARQ_PDU_BYTES), cid);
    else if (i == 6) return MSG_ARQ_FEEDBACK;
    else if (i == 7) return cid[15:8];
    else if (i == 8) return cid[7:0];
    else if (i == 9) return {1'b1, 2'b00, bsn[10:6]};
    else if (i == 10) return {bsn[5:0], 2'b00};
    else if (i == 11) return ack ? 8'h80 : 8'h00;
    else if (i == 12) return 8'h00;
    else if (i < ARQ_PDU_BYTES) return crc[8*(16-i) +: 8];
    else return 8'h00;
  endfunction

  function automatic logic [31:0] arq_word(input int unsigned w, input logic [15:0] cid,
                                           input logic [10:0] bsn, input logic ack,
                                           input logic [31:0] crc);
    logic [31:0] r;
    for (int k = 0; k < 4; k++) r[8*k +: 8] = arq_byte(4*w + k, cid, bsn, ack, crc);
    return r;
  endfunction

endpackage
