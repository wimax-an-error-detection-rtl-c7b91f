// tb_bs_station: the base station with its own CRC module and the shared
// memory; the testbench plays channel and subscriber station on the second
// memory port. Each round it sets the system state to BS_TX, waits for the
// DL-ready flag, compares the PDU in RX_Buffer byte for byte with the
// reference builder (header, HCS, sequence number, payload, CRC-32), then
// answers with an ARQ feedback PDU: a NACK in round 1, an ACK carrying a wrong
// BSN in round 3 (both must cause a retransmission of the same packet), an ACK
// otherwise. It checks the BS-done flag (bit1 only after the last packet) and
// the station's counters, and that nothing is sent while the state is IDLE.
module tb_bs_station;
  import wimax_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned NPKT    = 4;
  localparam int unsigned PAYLOAD = 13;
  localparam logic [15:0] CIDV    = 16'h0123;

  logic clk = 0, rst_n = 0;
  mem_req_t req [2];
  mem_rsp_t rsp [2];
  logic [31:0] sys_state;
  logic contention;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, hready, hresp, irq, finished;
  logic [2:0]  hsize;
  logic [15:0] tx_count, retx_count, acked_count;
  int checks = 0, failures = 0;

  vsock_mem #(.NPORTS(2), .BUF_WORDS(256)) u_mem (
    .clk, .rst_n, .req, .rsp, .sys_state, .contention);

  bs_station #(.NUM_PACKETS(NPKT), .PAYLOAD_BYTES(PAYLOAD), .CID(CIDV)) dut (
    .clk, .rst_n, .mreq(req[0]), .mrsp(rsp[0]),
    .HADDR(haddr), .HTRANS(htrans), .HWRITE(hwrite), .HSIZE(hsize), .HWDATA(hwdata),
    .HREADY(hready), .HRDATA(hrdata), .crc_irq(irq),
    .tx_count, .retx_count, .acked_count, .finished);

  crc_accel #(.INBUF_WORDS(64)) u_crc (
    .HCLK(clk), .HRESETn(rst_n), .HSEL(1'b1), .HADDR(haddr), .HTRANS(htrans),
    .HWRITE(hwrite), .HSIZE(hsize), .HWDATA(hwdata), .HREADY(hready),
    .HREADYOUT(hready), .HRESP(hresp), .HRDATA(hrdata), .INTRP(irq));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic poll_nonzero(input logic [31:0] addr, output logic [31:0] v);
    v = 0;
    while (v == 0) xfer(1'b0, addr, 0, v);
  endtask

  logic [7:0]  pdu[], arq[];
  logic [31:0] rd, v;
  int          seq, round, retx_exp;
  bit          ack;
  logic [10:0] bsn;

  initial begin
    req[1] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (300) @(negedge clk);
    xfer(1'b0, DL_READY_ADDR, 0, rd);
    check(rd, 0, "no downlink while the state is IDLE");
    seq = 0; round = 0; retx_exp = 0;
    while (seq < NPKT) begin
      xfer(1'b1, SYS_STATE_ADDR, 32'(SYS_BS_TX), rd);
      poll_nonzero(DL_READY_ADDR, v);
      check(v, 32'(6 + PAYLOAD + 4), "DL-ready flag holds the PDU length");
      xfer(1'b1, DL_READY_ADDR, 0, rd);
      ref_dl_pdu(pdu, PAYLOAD, 16'(seq), CIDV);
      for (int w = 0; w < (pdu.size() + 3) / 4; w++) begin
        xfer(1'b0, RX_BUF_BASE + 32'(4*w), 0, rd);
        check(rd, word_of(pdu, w), $sformatf("PDU word %0d of packet %0d", w, seq));
      end
      check(32'(tx_count), 32'(round + 1), "tx_count");
      // answer
      ack = (round != 1);
      bsn = 11'(seq);
      if (round == 3) bsn = 11'(seq + 5);
      ref_arq_pdu(arq, 16'h0123, bsn, ack);
      for (int w = 0; w < 5; w++) xfer(1'b1, TX_BUF_BASE + 32'(4*w), word_of(arq, w), rd);
      xfer(1'b1, SYS_STATE_ADDR, 32'(SYS_BS_RX), rd);
      poll_nonzero(BS_DONE_ADDR, v);
      xfer(1'b1, BS_DONE_ADDR, 0, rd);
      if (ack && round != 3) seq++;
      else retx_exp++;
      check(v, (seq == NPKT) ? 32'h3 : 32'h1, "BS-done flag");
      check(32'(retx_count), 32'(retx_exp), "retx_count");
      check(32'(acked_count), 32'(seq), "acked_count");
      round++;
    end
    check({31'h0, finished}, 1, "finished");
    check(32'(tx_count), 32'(NPKT + 2), "total transmissions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
