// bs_station: the base station (transmitter) of the stop-and-wait ARQ link.
//
// For each packet it builds a downlink MAC PDU: generic MAC header (6 bytes,
// CI=1, LEN = whole PDU, HCS), a payload whose first two bytes carry the
// 16-bit sequence number followed by a fixed pseudo-random pattern, and a
// 4-byte CRC-32 appended most significant byte first. The CRC is produced by
// the station's CRC module over AHB: the header and payload go to
// Input_Buffer, then CRC_length and CRC_enable are written, the station waits
// for the interrupt, reads Output_Buffer and clears CRC_done. The whole PDU is
// then written to RX_Buffer and its length to the DL-ready socket flag.
// When the scheduler moves the system to BS_RX, the station reads the ARQ
// feedback PDU from TX_Buffer: an ACK whose BSN matches the current sequence
// number advances to the next packet, anything else retransmits the same one.
// After the last packet is acknowledged it sets bit1 of the BS-done flag.
//
// Follows the design: header layout, CRC appended to the payload, downlink via
// RX_Buffer and uplink via TX_Buffer, stop-and-wait with retransmission, CRC via
// a memory-mapped module with an interrupt. This implementation's choices: the
// payload contents and sequence-number position, the flag words, and that the
// station polls the system-state word through the shared memory.
module bs_station
  import wimax_pkg::*;
#(
  parameter int unsigned NUM_PACKETS   = 10,
  parameter int unsigned PAYLOAD_BYTES = 125,
  parameter logic [15:0] CID           = 16'h0123,
  parameter logic [31:0] CRC_BASE      = HW_MODULE_BASE
) (
  input  logic        clk,
  input  logic        rst_n,
  // shared socket memory
  output mem_req_t    mreq,
  input  mem_rsp_t    mrsp,
  // AHB-Lite master to the CRC module, and its interrupt
  output logic [31:0] HADDR,
  output logic [1:0]  HTRANS,
  output logic        HWRITE,
  output logic [2:0]  HSIZE,
  output logic [31:0] HWDATA,
  input  logic        HREADY,
  input  logic [31:0] HRDATA,
  input  logic        crc_irq,
  // status
  output logic [15:0] tx_count,      // downlink transmissions
  output logic [15:0] retx_count,    // retransmissions (NACK or wrong BSN)
  output logic [15:0] acked_count,   // packets acknowledged
  output logic        finished
);

  localparam int unsigned DATA_LEN = GMH_BYTES + PAYLOAD_BYTES;
  localparam int unsigned PKT_LEN  = DATA_LEN + CRC_BYTES;
  localparam int unsigned NW_DATA  = (DATA_LEN + 3) / 4;
  localparam int unsigned NW_PKT   = (PKT_LEN + 3) / 4;
  localparam int unsigned NW_ARQ   = (ARQ_PDU_BYTES + 3) / 4;
  localparam logic [7:0]  HCS      = gmh_hcs(11'(PKT_LEN), CID);

  // payload byte j (j >= 2) of packet `seq`
  function automatic logic [7:0] payload_byte(input logic [15:0] seq, input int unsigned j);
    return 8'(32'(seq) * 37 + j * 11) ^ 8'hA5;
  endfunction

  function automatic logic [7:0] dl_byte(input int unsigned i, input logic [15:0] seq,
                                         input logic [31:0] crc);
    if (i < 5)             return gmh_byte(i, 11'(PKT_LEN), CID);
    else if (i == 5)       return HCS;
    else if (i == 6)       return seq[15:8];
    else if (i == 7)       return seq[7:0];
    else if (i < DATA_LEN) return payload_byte(seq, i - GMH_BYTES);
    else if (i < PKT_LEN)  return crc[8*(DATA_LEN + 3 - i) +: 8];
    else                   return 8'h00;
  endfunction

  function automatic logic [31:0] dl_word(input int unsigned w, input logic [15:0] seq,
                                          input logic [31:0] crc);
    logic [31:0] r;
    for (int k = 0; k < 4; k++) r[8*k +: 8] = dl_byte(4*w + k, seq, crc);
    return r;
  endfunction

  typedef enum logic [3:0] {
    B_POLL_TX, B_CRC_WR, B_CRC_LEN, B_CRC_EN, B_CRC_IRQ, B_CRC_RD, B_CRC_CLR,
    B_PKT_WR, B_DL_FLAG, B_POLL_RX, B_ARQ_RD, B_DECIDE, B_BS_FLAG, B_DONE
  } bstate_e;

  bstate_e       st_q;
  logic [15:0]   seq_q;
  logic [31:0]   crc_q;
  logic [15:0]   w_q;
  logic [31:0]   arq_q [NW_ARQ];

  // command buses of the two port helpers
  logic        m_valid, m_we, m_done;
  logic [31:0] m_addr, m_wdata, m_rdata;
  logic        a_valid, a_we, a_done;
  logic [31:0] a_addr, a_wdata, a_rdata;

  mem_port_master u_mp (
    .clk(clk), .rst_n(rst_n), .cmd_valid(m_valid), .cmd_we(m_we), .cmd_addr(m_addr),
    .cmd_wdata(m_wdata), .done(m_done), .rdata(m_rdata), .mreq(mreq), .mrsp(mrsp));

  ahb_lite_master u_ahb (
    .HCLK(clk), .HRESETn(rst_n), .cmd_valid(a_valid), .cmd_we(a_we), .cmd_addr(a_addr),
    .cmd_wdata(a_wdata), .done(a_done), .rdata(a_rdata), .HADDR(HADDR), .HTRANS(HTRANS),
    .HWRITE(HWRITE), .HSIZE(HSIZE), .HWDATA(HWDATA), .HREADY(HREADY), .HRDATA(HRDATA));

  // decoded ARQ frame
  logic [7:0]  arq_b [ARQ_PDU_BYTES];
  logic [10:0] arq_bsn;
  logic        arq_ack, arq_ok;
  always_comb begin
    for (int i = 0; i < ARQ_PDU_BYTES; i++) arq_b[i] = arq_q[i/4][8*(i%4) +: 8];
    arq_bsn = {arq_b[9][4:0], arq_b[10][7:2]};
    arq_ack = arq_b[11][7];
    arq_ok  = (arq_b[6] == MSG_ARQ_FEEDBACK) && arq_ack && (arq_bsn == seq_q[10:0]);
  end

  // commands issued in each state
  always_comb begin
    m_valid = 1'b0; m_we = 1'b0; m_addr = '0; m_wdata = '0;
    a_valid = 1'b0; a_we = 1'b1; a_addr = '0; a_wdata = '0;
    case (st_q)
      B_POLL_TX, B_POLL_RX: begin
        m_valid = 1'b1; m_addr = SYS_STATE_ADDR;
      end
      B_CRC_WR: begin
        a_valid = 1'b1; a_addr = CRC_BASE + 32'(INPUT_BUF_OFS) + 32'(w_q) * 4;
        a_wdata = dl_word(32'(w_q), seq_q, 32'h0);
      end
      B_CRC_LEN: begin a_valid = 1'b1; a_addr = CRC_BASE + 32'(CRC_LENGTH_OFS); a_wdata = DATA_LEN; end
      B_CRC_EN:  begin a_valid = 1'b1; a_addr = CRC_BASE + 32'(CRC_ENABLE_OFS); a_wdata = 32'h1; end
      B_CRC_RD:  begin a_valid = 1'b1; a_we = 1'b0; a_addr = CRC_BASE + 32'(OUTPUT_BUF_OFS); end
      B_CRC_CLR: begin a_valid = 1'b1; a_addr = CRC_BASE + 32'(CRC_DONE_OFS); a_wdata = 32'h0; end
      B_PKT_WR: begin
        m_valid = 1'b1; m_we = 1'b1; m_addr = RX_BUF_BASE + 32'(w_q) * 4;
        m_wdata = dl_word(32'(w_q), seq_q, crc_q);
      end
      B_DL_FLAG: begin m_valid = 1'b1; m_we = 1'b1; m_addr = DL_READY_ADDR; m_wdata = PKT_LEN; end
      B_ARQ_RD:  begin m_valid = 1'b1; m_addr = TX_BUF_BASE + 32'(w_q) * 4; end
      B_BS_FLAG: begin
        m_valid = 1'b1; m_we = 1'b1; m_addr = BS_DONE_ADDR; m_wdata = {30'h0, finished, 1'b1};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= B_POLL_TX;
      seq_q       <= '0;
      crc_q       <= '0;
      w_q         <= '0;
      tx_count    <= '0;
      retx_count  <= '0;
      acked_count <= '0;
      finished    <= 1'b0;
      for (int i = 0; i < NW_ARQ; i++) arq_q[i] <= '0;
    end else begin
      case (st_q)
        B_POLL_TX: if (m_done && m_rdata == 32'(SYS_BS_TX)) begin
          w_q  <= '0;
          st_q <= B_CRC_WR;
        end
        B_CRC_WR: if (a_done) begin
          w_q <= w_q + 1'b1;
          if (w_q == 16'(NW_DATA - 1)) st_q <= B_CRC_LEN;
        end
        B_CRC_LEN: if (a_done) st_q <= B_CRC_EN;
        B_CRC_EN:  if (a_done) st_q <= B_CRC_IRQ;
        B_CRC_IRQ: if (crc_irq) st_q <= B_CRC_RD;
        B_CRC_RD:  if (a_done) begin crc_q <= a_rdata; st_q <= B_CRC_CLR; end
        B_CRC_CLR: if (a_done) begin w_q <= '0; st_q <= B_PKT_WR; end
        B_PKT_WR: if (m_done) begin
          w_q <= w_q + 1'b1;
          if (w_q == 16'(NW_PKT - 1)) st_q <= B_DL_FLAG;
        end
        B_DL_FLAG: if (m_done) begin
          tx_count <= tx_count + 1'b1;
          st_q     <= B_POLL_RX;
        end
        B_POLL_RX: if (m_done && m_rdata == 32'(SYS_BS_RX)) begin
          w_q  <= '0;
          st_q <= B_ARQ_RD;
        end
        B_ARQ_RD: if (m_done) begin
          arq_q[w_q[$clog2(NW_ARQ)-1:0]] <= m_rdata;
          w_q <= w_q + 1'b1;
          if (w_q == 16'(NW_ARQ - 1)) st_q <= B_DECIDE;
        end
        B_DECIDE: begin
          if (arq_ok) begin
            acked_count <= acked_count + 1'b1;
            seq_q       <= seq_q + 1'b1;
            if (seq_q == 16'(NUM_PACKETS - 1)) finished <= 1'b1;
          end else begin
            retx_count  <= retx_count + 1'b1;
          end
          st_q <= B_BS_FLAG;
        end
        B_BS_FLAG: if (m_done) st_q <= finished ? B_DONE : B_POLL_TX;
        default: ;
      endcase
    end
  end

endmodule
