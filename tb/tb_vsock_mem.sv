// tb_vsock_mem: three ports hammer the shared memory at once with random
// reads and writes. Each port owns every third word of each region and one
// flag word per flag region, so each keeps its own reference copy. Checks:
// read data against the reference, read data one clock after the grant, no
// port waiting more than NPORTS-1 clocks for a grant while all request,
// unmapped words reading 0, sys_state following flag word 0, and at least
// one cycle of contention.
module tb_vsock_mem;
  import wimax_pkg::*;

  localparam int unsigned NP = 3;
  localparam int unsigned BW = 64;

  logic clk = 0, rst_n = 0;
  mem_req_t req [NP];
  mem_rsp_t rsp [NP];
  logic [31:0] sys_state;
  logic contention;
  int checks = 0, failures = 0, contention_cycles = 0, done_ports = 0;

  vsock_mem #(.NPORTS(NP), .BUF_WORDS(BW), .FLAG_WORDS(4)) dut (
    .clk, .rst_n, .req, .rsp, .sys_state, .contention);

  always #5 clk = ~clk;
  always @(posedge clk) if (contention) contention_cycles++;

  initial begin
    repeat (100000) @(posedge clk);
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

  // one transfer on port k, returns read data
  task automatic xfer(input int k, input logic we, input logic [31:0] addr,
                      input logic [31:0] wd, output logic [31:0] rd);
    int wait_cyc;
    @(negedge clk);
    req[k].req = 1; req[k].we = we; req[k].addr = addr; req[k].wdata = wd;
    wait_cyc = 0;
    #1;
    while (!rsp[k].gnt) begin
      @(negedge clk);
      #1;
      wait_cyc++;
    end
    if (wait_cyc > NP - 1) $display("port %0d waited %0d at %0t", k, wait_cyc, $time);
    check(32'(wait_cyc <= NP - 1), 32'h1, "grant within NPORTS-1 clocks");
    @(negedge clk);
    req[k].req = 0;
    if (!we) begin
      check({31'h0, rsp[k].rvalid}, 32'h1, "rvalid one clock after grant");
      rd = rsp[k].rdata;
    end else begin
      rd = '0;
    end
  endtask

  for (genvar g = 0; g < NP; g++) begin : port
    initial begin
      logic [31:0] model [logic [31:0]];
      logic [31:0] addr, d, rd;
      logic [2:0]  region;
      req[g] = '0;
      wait (rst_n);
      for (int t = 0; t < 600; t++) begin
        case ($urandom_range(0, 4))
          0: region = REG_SYS;
          1: region = REG_SOCK;
          2: region = REG_TX;
          3: region = REG_RX;
          default: region = REG_TXRX;
        endcase
        if (region == REG_SYS || region == REG_SOCK)
          addr = SYS_FLAGS_BASE + {13'h0, region, 16'h0} + 32'(4 * (g + 1));
        else
          addr = SYS_FLAGS_BASE + {13'h0, region, 16'h0} + 32'(4 * (NP * $urandom_range(0, BW/NP - 1) + g));
        if ($urandom_range(0, 1) == 0 || !model.exists(addr)) begin
          d = $urandom;
          xfer(g, 1'b1, addr, d, rd);
          model[addr] = d;
        end else begin
          xfer(g, 1'b0, addr, 32'h0, rd);
          check(rd, model[addr], "read data");
        end
      end
      done_ports++;
    end
  end

  initial begin
    logic [31:0] rd;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done_ports == NP);
    // unmapped: region 6, and a word beyond the flag registers
    xfer(0, 1'b1, SYS_FLAGS_BASE + 32'h0006_0000, 32'hDEAD_BEEF, rd);
    xfer(0, 1'b0, SYS_FLAGS_BASE + 32'h0006_0000, 32'h0, rd);
    check(rd, 32'h0, "unmapped region reads 0");
    xfer(1, 1'b0, SYS_FLAGS_BASE + 32'h0000_0100, 32'h0, rd);
    check(rd, 32'h0, "word beyond flags reads 0");
    xfer(2, 1'b1, SYS_STATE_ADDR, 32'h0000_0003, rd);
    @(negedge clk);
    check(sys_state, 32'h3, "sys_state output");
    checks++;
    if (contention_cycles == 0) begin
      failures++;
      $display("FAIL no contention seen");
    end
    $display("contention cycles: %0d", contention_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
