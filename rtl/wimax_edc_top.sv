// wimax_edc_top: error detection (CRC-32) and error correction (stop-and-wait
// ARQ) between a WiMAX base station and a subscriber station that talk through
// a shared memory instead of a socket.
//
// Three agents share vsock_mem through its round-robin arbiter: bs_station
// (port 0), channel_model (port 1) and ms_station (port 2). The base station
// writes each downlink PDU into RX_Buffer; the channel may flip a bit in it and
// then hands over to the subscriber station, which checks the CRC and answers
// with an ARQ feedback PDU in TX_Buffer; the base station then sends the next
// packet or retransmits. Each station has its own crc_accel, reached over a
// point-to-point AHB-Lite link at 0x7006_0000 and signalling completion by
// interrupt, as the processor-attached CRC module of the design.
// `start` (one clock) begins a run of NUM_PACKETS packets; `done` rises when
// the last one is acknowledged. The counters report what happened on the way.
// The CRC modules always answer OKAY, so their HRESP outputs are left
// unconnected; the base station's `finished` is not brought out because the
// channel's `done` follows it through the BS-done flag.
module wimax_edc_top
  import wimax_pkg::*;
#(
  parameter int unsigned NUM_PACKETS   = 10,
  parameter int unsigned PAYLOAD_BYTES = 125,
  parameter int unsigned ERR_PERCENT   = 40,
  parameter logic [31:0] SEED          = 32'h2545_F491,
  parameter int unsigned BUF_WORDS     = 16384,
  parameter int unsigned INBUF_WORDS   = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  output logic                   done,
  output logic [31:0]            sys_state,
  output logic [NUM_PACKETS-1:0] rx_array,
  output logic [15:0]            tx_count,
  output logic [15:0]            retx_count,
  output logic [15:0]            acked_count,
  output logic [15:0]            dl_count,
  output logic [15:0]            err_count,
  output logic [15:0]            crc_ok_count,
  output logic [15:0]            crc_err_count,
  output logic                   bus_contention,
  output logic                   bs_crc_irq,
  output logic                   ms_crc_irq
);

  mem_req_t mreq [3];
  mem_rsp_t mrsp [3];

  vsock_mem #(.NPORTS(3), .BUF_WORDS(BUF_WORDS)) u_mem (
    .clk(clk), .rst_n(rst_n), .req(mreq), .rsp(mrsp),
    .sys_state(sys_state), .contention(bus_contention));

  // ---------------- base station and its CRC module ----------------
  logic [31:0] bs_haddr, bs_hwdata, bs_hrdata;
  logic [1:0]  bs_htrans;
  logic        bs_hwrite, bs_hready, bs_hresp;
  logic [2:0]  bs_hsize;
  logic        bs_finished;

  bs_station #(.NUM_PACKETS(NUM_PACKETS), .PAYLOAD_BYTES(PAYLOAD_BYTES)) u_bs (
    .clk(clk), .rst_n(rst_n), .mreq(mreq[0]), .mrsp(mrsp[0]),
    .HADDR(bs_haddr), .HTRANS(bs_htrans), .HWRITE(bs_hwrite), .HSIZE(bs_hsize),
    .HWDATA(bs_hwdata), .HREADY(bs_hready), .HRDATA(bs_hrdata), .crc_irq(bs_crc_irq),
    .tx_count(tx_count), .retx_count(retx_count), .acked_count(acked_count),
    .finished(bs_finished));

  crc_accel #(.INBUF_WORDS(INBUF_WORDS)) u_bs_crc (
    .HCLK(clk), .HRESETn(rst_n),
    .HSEL(bs_haddr[31:16] == HW_MODULE_BASE[31:16]),
    .HADDR(bs_haddr), .HTRANS(bs_htrans), .HWRITE(bs_hwrite), .HSIZE(bs_hsize),
    .HWDATA(bs_hwdata), .HREADY(bs_hready), .HREADYOUT(bs_hready), .HRESP(bs_hresp),
    .HRDATA(bs_hrdata), .INTRP(bs_crc_irq));

  // ---------------- channel ----------------
  channel_model #(.ERR_PERCENT(ERR_PERCENT), .SEED(SEED)) u_ch (
    .clk(clk), .rst_n(rst_n), .start(start), .mreq(mreq[1]), .mrsp(mrsp[1]),
    .dl_count(dl_count), .err_count(err_count), .done(done));

  // ---------------- subscriber station and its CRC module ----------------
  logic [31:0] ms_haddr, ms_hwdata, ms_hrdata;
  logic [1:0]  ms_htrans;
  logic        ms_hwrite, ms_hready, ms_hresp;
  logic [2:0]  ms_hsize;

  ms_station #(.NUM_PACKETS(NUM_PACKETS)) u_ms (
    .clk(clk), .rst_n(rst_n), .mreq(mreq[2]), .mrsp(mrsp[2]),
    .HADDR(ms_haddr), .HTRANS(ms_htrans), .HWRITE(ms_hwrite), .HSIZE(ms_hsize),
    .HWDATA(ms_hwdata), .HREADY(ms_hready), .HRDATA(ms_hrdata), .crc_irq(ms_crc_irq),
    .rx_array(rx_array), .crc_ok_count(crc_ok_count), .crc_err_count(crc_err_count));

  crc_accel #(.INBUF_WORDS(INBUF_WORDS)) u_ms_crc (
    .HCLK(clk), .HRESETn(rst_n),
    .HSEL(ms_haddr[31:16] == HW_MODULE_BASE[31:16]),
    .HADDR(ms_haddr), .HTRANS(ms_htrans), .HWRITE(ms_hwrite), .HSIZE(ms_hsize),
    .HWDATA(ms_hwdata), .HREADY(ms_hready), .HREADYOUT(ms_hready), .HRESP(ms_hresp),
    .HRDATA(ms_hrdata), .INTRP(ms_crc_irq));

endmodule
