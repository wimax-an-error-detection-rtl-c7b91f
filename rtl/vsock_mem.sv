// vsock_mem: the shared memory that replaces a network socket between the base
// station, the channel and the subscriber station.
//
// Five 64 KB regions from 0x7000_0000 (address bits [18:16] select one):
// System Ctrl Flags, Socket Ctrl Flags, TX_Buffer (uplink), RX_Buffer
// (downlink) and TX_RX_Buffer. The flag regions hold FLAG_WORDS registers
// each; the buffers are BUF_WORDS-word arrays. Unmapped words read as 0 and
// ignore writes. NPORTS request ports share one memory port through a
// round-robin arbiter: a granted write lands at the clock edge, a granted read
// returns `rdata` with `rvalid` one clock later. The word holding the system
// state is also brought out as `sys_state` for observation.
// The region layout and sizes follow the design's memory map; port count,
// arbitration and latency are this implementation's choices. `contention`
// pulses when more than one port requests in a cycle.
module vsock_mem
  import wimax_pkg::*;
#(
  parameter int unsigned NPORTS     = 3,
  parameter int unsigned BUF_WORDS  = 16384,
  parameter int unsigned FLAG_WORDS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mem_req_t    req [NPORTS],
  output mem_rsp_t    rsp [NPORTS],
  output logic [31:0] sys_state,
  output logic        contention
);

  localparam int unsigned BW = $clog2(BUF_WORDS);
  localparam int unsigned FW = $clog2(FLAG_WORDS);
  localparam int unsigned PW = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  logic [31:0] sys_flags  [FLAG_WORDS];
  logic [31:0] sock_flags [FLAG_WORDS];
  logic [31:0] tx_buf     [BUF_WORDS];
  logic [31:0] rx_buf     [BUF_WORDS];
  logic [31:0] txrx_buf   [BUF_WORDS];

  logic [NPORTS-1:0] reqv, gnt;
  mem_req_t          sel;
  logic [PW-1:0]     sel_idx;

  always_comb begin
    for (int k = 0; k < NPORTS; k++) reqv[k] = req[k].req;
  end

  rr_arbiter #(.N(NPORTS)) u_arb (.clk(clk), .rst_n(rst_n), .req(reqv), .gnt(gnt));

  always_comb begin
    sel     = '0;
    sel_idx = '0;
    for (int k = 0; k < NPORTS; k++)
      if (gnt[k]) begin
        sel     = req[k];
        sel_idx = PW'(k);
      end
  end

  wire          hit    = sel.req && (sel.addr[31:19] == SYS_FLAGS_BASE[31:19]);
  wire [2:0]    region = sel.addr[18:16];
  wire [BW-1:0] bidx   = sel.addr[BW+1:2];
  wire [FW-1:0] fidx   = sel.addr[FW+1:2];
  wire          fvalid = (sel.addr[15:2] < 14'(FLAG_WORDS));
  wire          bvalid = (32'(sel.addr[15:2]) < 32'(BUF_WORDS));
  wire          wr     = hit && sel.we;
  wire          rd     = hit && !sel.we;

  // flag registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < FLAG_WORDS; i++) begin
        sys_flags[i]  <= '0;
        sock_flags[i] <= '0;
      end
    end else if (wr && fvalid) begin
      if (region == REG_SYS)  sys_flags[fidx]  <= sel.wdata;
      if (region == REG_SOCK) sock_flags[fidx] <= sel.wdata;
    end
  end

  // buffers: one write or one read per clock
  logic [31:0] buf_rd_q;
  always_ff @(posedge clk) begin
    if (wr && bvalid) begin
      if (region == REG_TX)   tx_buf[bidx]   <= sel.wdata;
      if (region == REG_RX)   rx_buf[bidx]   <= sel.wdata;
      if (region == REG_TXRX) txrx_buf[bidx] <= sel.wdata;
    end
    if (rd && bvalid) begin
      case (region)
        REG_TX:   buf_rd_q <= tx_buf[bidx];
        REG_RX:   buf_rd_q <= rx_buf[bidx];
        default:  buf_rd_q <= txrx_buf[bidx];
      endcase
    end
  end

  // read response
  logic          rvalid_q;
  logic [PW-1:0] rport_q;
  logic [31:0]   flag_rd_q;
  logic          from_buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid_q   <= 1'b0;
      rport_q    <= '0;
      flag_rd_q  <= '0;
      from_buf_q <= 1'b0;
    end else begin
      rvalid_q   <= sel.req && !sel.we;
      rport_q    <= sel_idx;
      from_buf_q <= rd && bvalid && (region == REG_TX || region == REG_RX || region == REG_TXRX);
      flag_rd_q  <= '0;
      if (rd && fvalid && region == REG_SYS)  flag_rd_q <= sys_flags[fidx];
      if (rd && fvalid && region == REG_SOCK) flag_rd_q <= sock_flags[fidx];
    end
  end

  always_comb begin
    for (int k = 0; k < NPORTS; k++) begin
      rsp[k].gnt    = gnt[k];
      rsp[k].rvalid = rvalid_q && (rport_q == PW'(k));
      rsp[k].rdata  = from_buf_q ? buf_rd_q : flag_rd_q;
    end
  end

  assign sys_state  = sys_flags[0];
  assign contention = (reqv & (reqv - 1'b1)) != '0;

endmodule
