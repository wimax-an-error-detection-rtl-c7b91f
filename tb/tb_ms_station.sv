// tb_ms_station: the subscriber station with its own CRC module and the shared
// memory; the testbench plays base station and channel on the second memory
// port. It writes downlink PDUs into RX_Buffer (built by the reference model),
// some intact and some with a flipped bit in the payload, in the CRC field or
// in the LEN field, sets the state to MS and compares the ARQ feedback PDU
// found in TX_Buffer byte for byte with the expected ACK or NACK (BSN, CID,
// CRC). It also checks rx_array, the CRC counters, and that the station
// answers once per MS phase.
module tb_ms_station;
  import wimax_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned NPKT = 6;
  localparam logic [15:0] CIDV = 16'hBEEF;

  logic clk = 0, rst_n = 0;
  mem_req_t req [2];
  mem_rsp_t rsp [2];
  logic [31:0] sys_state;
  logic contention;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, hready, hresp, irq;
  logic [2:0]  hsize;
  logic [NPKT-1:0] rx_array;
  logic [15:0] ok_cnt, err_cnt;
  int checks = 0, failures = 0;

  vsock_mem #(.NPORTS(2), .BUF_WORDS(256)) u_mem (
    .clk, .rst_n, .req, .rsp, .sys_state, .contention);

  ms_station #(.NUM_PACKETS(NPKT)) dut (
    .clk, .rst_n, .mreq(req[0]), .mrsp(rsp[0]),
    .HADDR(haddr), .HTRANS(htrans), .HWRITE(hwrite), .HSIZE(hsize), .HWDATA(hwdata),
    .HREADY(hready), .HRDATA(hrdata), .crc_irq(irq),
    .rx_array, .crc_ok_count(ok_cnt), .crc_err_count(err_cnt));

  crc_accel #(.INBUF_WORDS(256)) u_crc (
    .HCLK(clk), .HRESETn(rst_n), .HSEL(1'b1), .HADDR(haddr), .HTRANS(htrans),
    .HWRITE(hwrite), .HSIZE(hsize), .HWDATA(hwdata), .HREADY(hready),
    .HREADYOUT(hready), .HRESP(hresp), .HRDATA(hrdata), .INTRP(irq));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  task automatic xfer(input logic we, input logic [31:0] addr, input logic [31:0] wd,
                      output logic [31:0] rd);
    @(negedge clk);
    req[1].req = 1; req[1].we = we; req[1].addr = addr; req[1].wdata = wd;
    #1;
    while (!rsp[1].gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    req[1].req = 0;
    rd = rsp[1].rdata;
  endtask

  // one MS phase: kind 0 intact, 1 payload bit, 2 CRC bit, 3 LEN bit
  task automatic phase(input int seq, input int payload, input int kind,
                       inout logic [NPKT-1:0] exp_rx, inout int exp_ok, inout int exp_err);
    logic [7:0]  pdu[], arq[];
    logic [31:0] rd, v;
    int pos;
    ref_dl_pdu(pdu, payload, 16'(seq), CIDV);
    case (kind)
      1: begin pos = 8 + $urandom_range(0, payload - 3); pdu[pos] ^= 8'(1 << $urandom_range(0, 7)); end
      2: begin pos = 6 + payload + $urandom_range(0, 3); pdu[pos] ^= 8'(1 << $urandom_range(0, 7)); end
      3: pdu[2] ^= 8'h01;
      default: ;
    endcase
    for (int w = 0; w < (pdu.size() + 3) / 4 + 1; w++)
      xfer(1'b1, RX_BUF_BASE + 32'(4*w), word_of(pdu, w), rd);
    xfer(1'b1, SYS_STATE_ADDR, 32'(SYS_MS), rd);
    v = 0;
    while (v == 0) xfer(1'b0, UL_READY_ADDR, 0, v);
    check(v, 32'd17, "UL-ready flag holds the ARQ PDU length");
    xfer(1'b1, UL_READY_ADDR, 0, rd);
    if (kind == 0) begin
      exp_ok++;
      if (seq < NPKT) exp_rx[seq] = 1'b1;
    end else begin
      exp_err++;
    end
    ref_arq_pdu(arq, CIDV, 11'(seq), kind == 0);
    for (int w = 0; w < 5; w++) begin
      xfer(1'b0, TX_BUF_BASE + 32'(4*w), 0, rd);
      check(rd, word_of(arq, w), $sformatf("ARQ word %0d (seq %0d kind %0d)", w, seq, kind));
    end
    check(32'(rx_array), 32'(exp_rx), "rx_array");
    check(32'(ok_cnt), 32'(exp_ok), "crc_ok_count");
    check(32'(err_cnt), 32'(exp_err), "crc_err_count");
    // staying in the MS state must not produce a second answer
    repeat (100) @(negedge clk);
    xfer(1'b0, UL_READY_ADDR, 0, rd);
    check(rd, 0, "one answer per MS phase");
    xfer(1'b1, SYS_STATE_ADDR, 32'(SYS_BS_RX), rd);
    repeat (10) @(negedge clk);
  endtask

  logic [NPKT-1:0] exp_rx;
  int exp_ok, exp_err;
  initial begin
    req[1] = '0;
    exp_rx = '0; exp_ok = 0; exp_err = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    phase(0, 13, 0, exp_rx, exp_ok, exp_err);
    phase(1, 13, 1, exp_rx, exp_ok, exp_err);
    phase(1, 13, 2, exp_rx, exp_ok, exp_err);
    phase(1, 13, 3, exp_rx, exp_ok, exp_err);
    phase(1, 13, 0, exp_rx, exp_ok, exp_err);
    phase(2, 2, 0, exp_rx, exp_ok, exp_err);
    phase(3, 125, 1, exp_rx, exp_ok, exp_err);
    phase(3, 125, 0, exp_rx, exp_ok, exp_err);
    for (int t = 0; t < 12; t++)
      phase(4 + t % 2, 2 + $urandom_range(0, 200), $urandom_range(0, 2), exp_rx, exp_ok, exp_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
