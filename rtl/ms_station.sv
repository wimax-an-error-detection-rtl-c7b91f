// ms_station: the subscriber station (receiver) of the stop-and-wait ARQ link.
//
// When the scheduler moves the system to the MS phase, the station reads the
// downlink PDU from RX_Buffer word by word. Its length comes from the LEN field
// of the generic MAC header (clamped to at least 12 bytes). Each word is also
// copied into Input_Buffer of the station's CRC module; CRC_length is set to
// the PDU length minus the 4 CRC bytes, CRC_enable is written, and after the
// interrupt the computed CRC is read from Output_Buffer and compared with the
// received CRC field. A match marks the packet's bit in `rx_array` and answers
// ACK, a mismatch answers NACK. The answer is an ARQ feedback PDU (see
// wimax_pkg::arq_byte) whose own CRC is computed by the same CRC module; it is
// written to TX_Buffer and its length to the UL-ready socket flag.
//
// Follows the design: CRC recomputed and compared at the receiver, ACK/NACK
// feedback written to TX_Buffer, CRC via a memory-mapped module with an
// interrupt, the received-packet array. This implementation's choices: the
// feedback IE layout beyond the printed example (NACK encoding), the CID of
// the answer (copied from the received header), and polling of the
// system-state word.
module ms_station
  import wimax_pkg::*;
#(
  parameter int unsigned NUM_PACKETS = 10,
  parameter logic [31:0] CRC_BASE    = HW_MODULE_BASE
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output mem_req_t               mreq,
  input  mem_rsp_t               mrsp,
  output logic [31:0]            HADDR,
  output logic [1:0]             HTRANS,
  output logic                   HWRITE,
  output logic [2:0]             HSIZE,
  output logic [31:0]            HWDATA,
  input  logic                   HREADY,
  input  logic [31:0]            HRDATA,
  input  logic                   crc_irq,
  output logic [NUM_PACKETS-1:0] rx_array,     // packet k received intact
  output logic [15:0]            crc_ok_count,
  output logic [15:0]            crc_err_count
);

  localparam int unsigned NW_ARQ  = (ARQ_PDU_BYTES + 3) / 4;
  localparam int unsigned NW_ARQD = (ARQ_DATA_BYTES + 3) / 4;
  localparam int unsigned MIN_LEN = GMH_BYTES + 2 + CRC_BYTES;

  typedef enum logic [4:0] {
    M_POLL, M_RD, M_FWD, M_LEN, M_EN, M_IRQ, M_RES, M_CLR, M_CMP,
    M_A_WR, M_A_LEN, M_A_EN, M_A_IRQ, M_A_RES, M_A_CLR,
    M_UL_WR, M_UL_FLAG, M_LEAVE
  } mstate_e;

  mstate_e     st_q;
  logic [15:0] w_q;
  logic [31:0] word_q;
  logic [10:0] len_q;
  logic [15:0] cid_q, seq_q;
  logic [31:0] rx_crc_q, calc_crc_q, arq_crc_q;
  logic        ack_q;

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

  wire [15:0]  nw        = 16'((32'(len_q) + 3) / 4);
  wire [10:0]  hdr_len   = {m_rdata[10:8], m_rdata[23:16]};   // bytes 1 and 2 of word 0

  // byte positions of the four lanes of the word being forwarded
  logic [31:0] fwd_pos [4];
  always_comb
    for (int k = 0; k < 4; k++) fwd_pos[k] = 4 * 32'(w_q) + 32'(k);

  always_comb begin
    m_valid = 1'b0; m_we = 1'b0; m_addr = '0; m_wdata = '0;
    a_valid = 1'b0; a_we = 1'b1; a_addr = '0; a_wdata = '0;
    case (st_q)
      M_POLL, M_LEAVE: begin m_valid = 1'b1; m_addr = SYS_STATE_ADDR; end
      M_RD:  begin m_valid = 1'b1; m_addr = RX_BUF_BASE + 32'(w_q) * 4; end
      M_FWD: begin
        a_valid = 1'b1; a_addr = CRC_BASE + 32'(INPUT_BUF_OFS) + 32'(w_q) * 4; a_wdata = word_q;
      end
      M_LEN, M_A_LEN: begin
        a_valid = 1'b1; a_addr = CRC_BASE + 32'(CRC_LENGTH_OFS);
        a_wdata = (st_q == M_LEN) ? 32'(len_q) - CRC_BYTES : ARQ_DATA_BYTES;
      end
      M_EN, M_A_EN:   begin a_valid = 1'b1; a_addr = CRC_BASE + 32'(CRC_ENABLE_OFS); a_wdata = 32'h1; end
      M_RES, M_A_RES: begin a_valid = 1'b1; a_we = 1'b0; a_addr = CRC_BASE + 32'(OUTPUT_BUF_OFS); end
      M_CLR, M_A_CLR: begin a_valid = 1'b1; a_addr = CRC_BASE + 32'(CRC_DONE_OFS); a_wdata = 32'h0; end
      M_A_WR: begin
        a_valid = 1'b1; a_addr = CRC_BASE + 32'(INPUT_BUF_OFS) + 32'(w_q) * 4;
        a_wdata = arq_word(32'(w_q), cid_q, seq_q[10:0], ack_q, 32'h0);
      end
      M_UL_WR: begin
        m_valid = 1'b1; m_we = 1'b1; m_addr = TX_BUF_BASE + 32'(w_q) * 4;
        m_wdata = arq_word(32'(w_q), cid_q, seq_q[10:0], ack_q, arq_crc_q);
      end
      M_UL_FLAG: begin m_valid = 1'b1; m_we = 1'b1; m_addr = UL_READY_ADDR; m_wdata = ARQ_PDU_BYTES; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q          <= M_POLL;
      w_q           <= '0;
      word_q        <= '0;
      len_q         <= 11'(MIN_LEN);
      cid_q         <= '0;
      seq_q         <= '0;
      rx_crc_q      <= '0;
      calc_crc_q    <= '0;
      arq_crc_q     <= '0;
      ack_q         <= 1'b0;
      rx_array      <= '0;
      crc_ok_count  <= '0;
      crc_err_count <= '0;
    end else begin
      case (st_q)
        M_POLL: if (m_done && m_rdata == 32'(SYS_MS)) begin
          w_q  <= '0;
          st_q <= M_RD;
        end
        M_RD: if (m_done) begin
          word_q <= m_rdata;
          if (w_q == 16'd0) begin
            len_q        <= (hdr_len < 11'(MIN_LEN)) ? 11'(MIN_LEN) : hdr_len;
            cid_q[15:8]  <= m_rdata[31:24];
          end
          if (w_q == 16'd1) begin
            cid_q[7:0]   <= m_rdata[7:0];
            seq_q        <= {m_rdata[23:16], m_rdata[31:24]};
          end
          st_q <= M_FWD;
        end
        M_FWD: if (a_done) begin
          // pick the received CRC bytes (most significant first) out of this word
          for (int k = 0; k < 4; k++)
            if (fwd_pos[k] + 32'(CRC_BYTES) >= 32'(len_q) && fwd_pos[k] < 32'(len_q))
              rx_crc_q[8*(32'(len_q) - 1 - fwd_pos[k]) +: 8] <= word_q[8*k +: 8];
          w_q <= w_q + 1'b1;
          st_q <= (w_q == nw - 1'b1) ? M_LEN : M_RD;
        end
        M_LEN: if (a_done) st_q <= M_EN;
        M_EN:  if (a_done) st_q <= M_IRQ;
        M_IRQ: if (crc_irq) st_q <= M_RES;
        M_RES: if (a_done) begin calc_crc_q <= a_rdata; st_q <= M_CLR; end
        M_CLR: if (a_done) st_q <= M_CMP;
        M_CMP: begin
          ack_q <= (calc_crc_q == rx_crc_q);
          if (calc_crc_q == rx_crc_q) begin
            crc_ok_count <= crc_ok_count + 1'b1;
            if (32'(seq_q) < NUM_PACKETS) rx_array[$clog2(NUM_PACKETS)'(seq_q)] <= 1'b1;
          end else begin
            crc_err_count <= crc_err_count + 1'b1;
          end
          w_q  <= '0;
          st_q <= M_A_WR;
        end
        M_A_WR: if (a_done) begin
          w_q <= w_q + 1'b1;
          if (w_q == 16'(NW_ARQD - 1)) st_q <= M_A_LEN;
        end
        M_A_LEN: if (a_done) st_q <= M_A_EN;
        M_A_EN:  if (a_done) st_q <= M_A_IRQ;
        M_A_IRQ: if (crc_irq) st_q <= M_A_RES;
        M_A_RES: if (a_done) begin arq_crc_q <= a_rdata; st_q <= M_A_CLR; end
        M_A_CLR: if (a_done) begin w_q <= '0; st_q <= M_UL_WR; end
        M_UL_WR: if (m_done) begin
          w_q <= w_q + 1'b1;
          if (w_q == 16'(NW_ARQ - 1)) st_q <= M_UL_FLAG;
        end
        M_UL_FLAG: if (m_done) st_q <= M_LEAVE;
        M_LEAVE:   if (m_done && m_rdata != 32'(SYS_MS)) st_q <= M_POLL;
        default: st_q <= M_POLL;
      endcase
    end
  end

endmodule
