// channel_model: the air between the stations, and the scheduler of the
// virtual socket.
//
// Scheduler: after `start` it drives the system-state word through
// BS_TX -> MS -> BS_RX -> BS_TX ... by watching the socket flags that the
// stations set when they finish a phase (DL-ready, UL-ready, BS-done). Each
// flag is cleared once seen. When the BS-done flag reports the last packet
// acknowledged, the state becomes DONE and `done` rises.
// Error model: for every downlink PDU it draws a random number 0..99 from a
// 32-bit xorshift generator; below ERR_PERCENT the PDU is corrupted by
// flipping one randomly chosen bit inside its LEN bytes in RX_Buffer
// (read-modify-write through the shared memory). The uplink is error free.
//
// Follows the design: the channel corrupts RX_Buffer by a random draw against
// an error probability and schedules TX/RX by changing the control flags and
// the system state. This implementation's choices: the generator, the single
// bit flip, the flag protocol and the default error rate.
module channel_model
  import wimax_pkg::*;
#(
  parameter int unsigned ERR_PERCENT = 40,
  parameter logic [31:0] SEED        = 32'h2545_F491
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output mem_req_t    mreq,
  input  mem_rsp_t    mrsp,
  output logic [15:0] dl_count,     // downlink PDUs that passed the channel
  output logic [15:0] err_count,    // of those, corrupted
  output logic        done
);

  typedef enum logic [3:0] {
    C_IDLE, C_SET, C_POLL_DL, C_CLR_DL, C_DRAW, C_POS, C_ERR_RD, C_ERR_WR,
    C_POLL_UL, C_CLR_UL, C_POLL_BS, C_CLR_BS, C_DONE
  } cstate_e;

  cstate_e     st_q, ret_q;
  sys_state_e  set_val_q;
  logic [31:0] rnd_q;
  logic [31:0] len_q, flag_q, word_q;
  logic [31:0] bitpos_q;

  function automatic logic [31:0] xorshift32(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  logic        m_valid, m_we, m_done;
  logic [31:0] m_addr, m_wdata, m_rdata;

  mem_port_master u_mp (
    .clk(clk), .rst_n(rst_n), .cmd_valid(m_valid), .cmd_we(m_we), .cmd_addr(m_addr),
    .cmd_wdata(m_wdata), .done(m_done), .rdata(m_rdata), .mreq(mreq), .mrsp(mrsp));

  wire [31:0] rnd_next = xorshift32(rnd_q);
  wire [31:0] err_addr = RX_BUF_BASE + {3'b000, bitpos_q[31:5], 2'b00};

  always_comb begin
    m_valid = 1'b0; m_we = 1'b0; m_addr = '0; m_wdata = '0;
    case (st_q)
      C_SET:     begin m_valid = 1'b1; m_we = 1'b1; m_addr = SYS_STATE_ADDR; m_wdata = 32'(set_val_q); end
      C_POLL_DL: begin m_valid = 1'b1; m_addr = DL_READY_ADDR; end
      C_CLR_DL:  begin m_valid = 1'b1; m_we = 1'b1; m_addr = DL_READY_ADDR; end
      C_ERR_RD:  begin m_valid = 1'b1; m_addr = err_addr; end
      C_ERR_WR:  begin
        m_valid = 1'b1; m_we = 1'b1; m_addr = err_addr;
        m_wdata = word_q ^ (32'h1 << bitpos_q[4:0]);
      end
      C_POLL_UL: begin m_valid = 1'b1; m_addr = UL_READY_ADDR; end
      C_CLR_UL:  begin m_valid = 1'b1; m_we = 1'b1; m_addr = UL_READY_ADDR; end
      C_POLL_BS: begin m_valid = 1'b1; m_addr = BS_DONE_ADDR; end
      C_CLR_BS:  begin m_valid = 1'b1; m_we = 1'b1; m_addr = BS_DONE_ADDR; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= C_IDLE;
      ret_q     <= C_IDLE;
      set_val_q <= SYS_IDLE;
      rnd_q     <= (SEED == 32'h0) ? 32'h1 : SEED;
      len_q     <= '0;
      flag_q    <= '0;
      word_q    <= '0;
      bitpos_q  <= '0;
      dl_count  <= '0;
      err_count <= '0;
      done      <= 1'b0;
    end else begin
      case (st_q)
        C_IDLE: if (start) begin
          set_val_q <= SYS_BS_TX;
          ret_q     <= C_POLL_DL;
          st_q      <= C_SET;
        end
        C_SET: if (m_done) st_q <= ret_q;
        C_POLL_DL: if (m_done && m_rdata != 32'h0) begin
          len_q <= m_rdata;
          st_q  <= C_CLR_DL;
        end
        C_CLR_DL: if (m_done) st_q <= C_DRAW;
        C_DRAW: begin
          rnd_q    <= rnd_next;
          dl_count <= dl_count + 1'b1;
          if (rnd_next % 100 < 32'(ERR_PERCENT)) begin
            st_q <= C_POS;
          end else begin
            set_val_q <= SYS_MS;
            ret_q     <= C_POLL_UL;
            st_q      <= C_SET;
          end
        end
        C_POS: begin
          rnd_q    <= rnd_next;
          bitpos_q <= rnd_next % {len_q[28:0], 3'b000};
          st_q     <= C_ERR_RD;
        end
        C_ERR_RD: if (m_done) begin word_q <= m_rdata; st_q <= C_ERR_WR; end
        C_ERR_WR: if (m_done) begin
          err_count <= err_count + 1'b1;
          set_val_q <= SYS_MS;
          ret_q     <= C_POLL_UL;
          st_q      <= C_SET;
        end
        C_POLL_UL: if (m_done && m_rdata != 32'h0) st_q <= C_CLR_UL;
        C_CLR_UL: if (m_done) begin
          set_val_q <= SYS_BS_RX;
          ret_q     <= C_POLL_BS;
          st_q      <= C_SET;
        end
        C_POLL_BS: if (m_done && m_rdata != 32'h0) begin
          flag_q <= m_rdata;
          st_q   <= C_CLR_BS;
        end
        C_CLR_BS: if (m_done) begin
          set_val_q <= flag_q[1] ? SYS_DONE : SYS_BS_TX;
          ret_q     <= flag_q[1] ? C_DONE : C_POLL_DL;
          st_q      <= C_SET;
        end
        C_DONE: done <= 1'b1;
        default: st_q <= C_IDLE;
      endcase
    end
  end

endmodule
