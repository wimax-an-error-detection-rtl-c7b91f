// crc_accel: the memory-mapped CRC hardware module of a station.
//
// Software (here: the station controllers) moves the unprocessed bytes into
// Input_Buffer, writes their count to CRC_length and writes 1 to CRC_enable.
// The module then streams the buffer through crc32_engine, one 32-bit word per
// clock, puts the result in Output_Buffer, clears CRC_enable and sets CRC_done.
// CRC_done drives the interrupt output INTRP, so the processor is told the
// result is ready. Writing 0 to CRC_done (or a new 1 to CRC_enable) clears it.
//
// Bus: AHB-Lite slave, word transfers, zero wait states, HRESP always OKAY.
// Register map (byte offsets from the module base, only HADDR[15:0] decoded):
//   0x0400 CRC_enable  RW  bit0: write 1 to start, reads 1 while busy
//   0x0500 CRC_done    RW  bit0: set when the result is ready, write 0 to clear
//   0x0600 CRC_length  RW  number of bytes in Input_Buffer to process
//   0x1000 Input_Buffer RW INBUF_WORDS words, byte k of the data in lane k%4
//   0x2000 Output_Buffer RO CRC result (register ^ FINAL_XOR)
// The offsets, the 32-bit registers, the AHB slave port and the interrupt
// follow the design; the 4 KB Input_Buffer fills the gap between its offset
// and Output_Buffer. Clearing rules, the word-per-clock engine and the
// FINAL_XOR parameter (0 reproduces the design's published CRC value) are this
// implementation's choices.
// Timing: a CRC of L bytes takes ceil(L/4)+2 clocks from the CRC_enable write
// data phase to CRC_done.
module crc_accel
  import wimax_pkg::*;
#(
  parameter int unsigned INBUF_WORDS = 1024,
  parameter logic [31:0] FINAL_XOR   = 32'h0000_0000
) (
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic        HSEL,
  input  logic [31:0] HADDR,
  input  logic [1:0]  HTRANS,
  input  logic        HWRITE,
  input  logic [2:0]  HSIZE,
  input  logic [31:0] HWDATA,
  input  logic        HREADY,
  output logic        HREADYOUT,
  output logic        HRESP,
  output logic [31:0] HRDATA,
  output logic        INTRP
);

  localparam int unsigned AW = $clog2(INBUF_WORDS);
  localparam int unsigned LW = AW + 3;   // byte count width

  // registers
  logic          enable_q, done_q;
  logic [31:0]   length_q;
  logic [31:0]   result_q;
  logic [31:0]   inbuf [INBUF_WORDS];

  // ---------------- AHB address phase capture ----------------
  logic          dp_valid_q, dp_write_q;
  logic [15:0]   dp_addr_q;
  logic [31:0]   buf_rdata_q;

  wire           ap_valid = HSEL && HREADY && HTRANS[1];
  wire  [15:0]   ap_ofs   = HADDR[15:0];
  wire           ap_inbuf = (ap_ofs >= INPUT_BUF_OFS) && (ap_ofs < OUTPUT_BUF_OFS);
  wire  [AW-1:0] ap_idx   = ap_ofs[AW+1:2];

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      dp_valid_q <= 1'b0;
      dp_write_q <= 1'b0;
      dp_addr_q  <= '0;
    end else if (HREADY) begin
      dp_valid_q <= ap_valid;
      dp_write_q <= HWRITE;
      dp_addr_q  <= ap_ofs;
    end
  end

  // buffer read for the bus: synchronous, issued in the address phase
  always_ff @(posedge HCLK)
    if (ap_valid && !HWRITE && ap_inbuf) buf_rdata_q <= inbuf[ap_idx];

  wire           dp_wr    = dp_valid_q && dp_write_q;
  wire           dp_inbuf = (dp_addr_q >= INPUT_BUF_OFS) && (dp_addr_q < OUTPUT_BUF_OFS);
  wire  [AW-1:0] dp_idx   = dp_addr_q[AW+1:2];

  // ---------------- CRC sequencer ----------------
  typedef enum logic [1:0] {C_IDLE, C_RUN, C_FINISH} cstate_e;
  cstate_e       cst_q;
  logic [LW-1:0] remain_q;       // bytes not yet requested from the buffer
  logic [AW-1:0] rd_idx_q;
  logic          feed_q;         // buffer word available this cycle
  logic [2:0]    feed_n_q;
  logic [31:0]   eng_word_q;
  logic          eng_init;
  logic [31:0]   eng_crc;

  wire start = dp_wr && (dp_addr_q == CRC_ENABLE_OFS) && HWDATA[0] && (cst_q == C_IDLE);

  always_ff @(posedge HCLK) begin
    if (dp_wr && dp_inbuf) inbuf[dp_idx] <= HWDATA;
    eng_word_q <= inbuf[rd_idx_q];
  end

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      cst_q    <= C_IDLE;
      remain_q <= '0;
      rd_idx_q <= '0;
      feed_q   <= 1'b0;
      feed_n_q <= '0;
      enable_q <= 1'b0;
      done_q   <= 1'b0;
      length_q <= '0;
      result_q <= '0;
    end else begin
      // bus register writes
      if (dp_wr && dp_addr_q == CRC_LENGTH_OFS) length_q <= HWDATA;
      if (dp_wr && dp_addr_q == CRC_DONE_OFS)   done_q   <= HWDATA[0];

      feed_q <= 1'b0;
      case (cst_q)
        C_IDLE: if (start) begin
          enable_q <= 1'b1;
          done_q   <= 1'b0;
          rd_idx_q <= '0;
          // lengths beyond the buffer are clipped to it
          remain_q <= (length_q > 32'(4*INBUF_WORDS)) ? LW'(4*INBUF_WORDS) : LW'(length_q);
          cst_q    <= C_RUN;
        end
        C_RUN: begin
          if (remain_q == '0) begin
            cst_q <= C_FINISH;               // last word folds in this cycle
          end else begin
            feed_q   <= 1'b1;
            feed_n_q <= (remain_q >= LW'(4)) ? 3'd4 : 3'(remain_q);
            remain_q <= (remain_q >= LW'(4)) ? remain_q - LW'(4) : '0;
            rd_idx_q <= rd_idx_q + 1'b1;
          end
        end
        C_FINISH: begin
          result_q <= eng_crc ^ FINAL_XOR;
          enable_q <= 1'b0;
          done_q   <= 1'b1;
          cst_q    <= C_IDLE;
        end
        default: cst_q <= C_IDLE;
      endcase
    end
  end

  // eng_word_q holds inbuf[rd_idx] of the previous cycle, which is the word
  // requested together with feed_q.
  assign eng_init = start;

  crc32_engine u_engine (
    .clk    (HCLK),
    .rst_n  (HRESETn),
    .init   (eng_init),
    .en     (feed_q),
    .data   (eng_word_q),
    .nbytes (feed_n_q),
    .crc    (eng_crc)
  );

  // ---------------- read data ----------------
  always_comb begin
    HRDATA = 32'h0;
    if (dp_valid_q && !dp_write_q) begin
      if (dp_inbuf)                          HRDATA = buf_rdata_q;
      else if (dp_addr_q == CRC_ENABLE_OFS)  HRDATA = {31'h0, enable_q};
      else if (dp_addr_q == CRC_DONE_OFS)    HRDATA = {31'h0, done_q};
      else if (dp_addr_q == CRC_LENGTH_OFS)  HRDATA = length_q;
      else if (dp_addr_q == OUTPUT_BUF_OFS)  HRDATA = result_q;
    end
  end

  assign HREADYOUT = 1'b1;
  assign HRESP     = 1'b0;
  assign INTRP     = done_q;

  // only word transfers are supported
  a_word_only: assert property (@(posedge HCLK) disable iff (!HRESETn)
                                ap_valid |-> HSIZE == HSIZE_WORD);

endmodule
