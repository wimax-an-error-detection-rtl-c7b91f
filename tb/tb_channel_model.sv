// tb_channel_model: the channel with the shared memory; the testbench plays
// both stations on the second memory port. For each of NPKT rounds it waits
// for the BS_TX state, writes a random PDU of random length into RX_Buffer and
// the DL-ready flag, waits for the MS state and compares RX_Buffer with what it
// wrote: it must be unchanged or differ in exactly one bit inside the PDU. It
// then raises UL-ready, waits for BS_RX and raises BS-done (bit1 in the last
// round), and finally expects the DONE state and `done`. It checks that every
// flag was cleared by the channel, that err_count equals the number of
// corrupted PDUs, and that the error rate of 200 draws at 40 % lies within
// 25 %..55 %.
module tb_channel_model;
  import wimax_pkg::*;

  localparam int unsigned NPKT = 200;

  logic clk = 0, rst_n = 0, start = 0, done;
  mem_req_t req [2];
  mem_rsp_t rsp [2];
  logic [31:0] sys_state;
  logic contention;
  logic [15:0] dl_count, err_count;
  int checks = 0, failures = 0;

  vsock_mem #(.NPORTS(2), .BUF_WORDS(256)) u_mem (
    .clk, .rst_n, .req, .rsp, .sys_state, .contention);

  channel_model #(.ERR_PERCENT(40)) dut (
    .clk, .rst_n, .start, .mreq(req[0]), .mrsp(rsp[0]), .dl_count, .err_count, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  task automatic wait_state(input sys_state_e s);
    logic [31:0] rd;
    rd = 32'hFFFF_FFFF;
    while (rd != 32'(s)) xfer(1'b0, SYS_STATE_ADDR, 0, rd);
  endtask

  logic [31:0] pkt [64];
  logic [31:0] rd, diff;
  int len, nw, flips, corrupted;

  initial begin
    req[1] = '0;
    corrupted = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);
    xfer(1'b0, SYS_STATE_ADDR, 0, rd);
    check(rd, 32'(SYS_IDLE), "idle before start");
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int r = 0; r < NPKT; r++) begin
      wait_state(SYS_BS_TX);
      len = 12 + $urandom_range(0, 200);
      nw = (len + 3) / 4;
      for (int w = 0; w < nw; w++) begin
        pkt[w] = $urandom;
        if (4*w + 4 > len) pkt[w] &= (32'hFFFF_FFFF >> (8 * (4*w + 4 - len)));
        xfer(1'b1, RX_BUF_BASE + 32'(4*w), pkt[w], rd);
      end
      xfer(1'b1, DL_READY_ADDR, 32'(len), rd);
      wait_state(SYS_MS);
      xfer(1'b0, DL_READY_ADDR, 0, rd);
      check(rd, 0, "DL-ready cleared");
      flips = 0;
      for (int w = 0; w < nw + 1; w++) begin
        xfer(1'b0, RX_BUF_BASE + 32'(4*w), 0, rd);
        diff = rd ^ ((w < nw) ? pkt[w] : rd);
        flips += $countones(diff);
        if (w == nw - 1 && len % 4 != 0)
          check(diff & ~(32'hFFFF_FFFF >> (8 * (4*w + 4 - len))), 0, "flip inside the PDU");
      end
      checks++;
      if (flips > 1) begin failures++; $display("FAIL %0d bits flipped", flips); end
      if (flips == 1) corrupted++;
      check(32'(err_count), 32'(corrupted), "err_count");
      check(32'(dl_count), 32'(r + 1), "dl_count");
      xfer(1'b1, UL_READY_ADDR, 32'd17, rd);
      wait_state(SYS_BS_RX);
      xfer(1'b0, UL_READY_ADDR, 0, rd);
      check(rd, 0, "UL-ready cleared");
      xfer(1'b1, BS_DONE_ADDR, (r == NPKT - 1) ? 32'h3 : 32'h1, rd);
    end
    wait_state(SYS_DONE);
    repeat (3) @(negedge clk);
    check({31'h0, done}, 1, "done");
    xfer(1'b0, BS_DONE_ADDR, 0, rd);
    check(rd, 0, "BS-done cleared");
    $display("corrupted %0d of %0d", corrupted, NPKT);
    check(32'(corrupted >= NPKT / 4 && corrupted <= NPKT * 55 / 100), 1, "error rate near 40 %");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
