// tb_workloads: the three packet sizes of the published cycle-count comparison
// (10, 100 and 1000 payload bits, carried as 2, 13 and 125 payload bytes) run
// side by side, each as a full 10-packet stop-and-wait session with the
// hardware CRC modules. For each size it checks delivery of all packets and
// one retransmission per corrupted PDU, and prints the clocks the session
// took and the CRC-module busy time per PDU.
module tb_workloads;
  import wimax_pkg::*;

  localparam int unsigned NPKT = 10;
  localparam int unsigned NW = 3;
  localparam int unsigned PAYLOAD [NW] = '{2, 13, 125};

  logic clk = 0, rst_n = 0, start = 0;
  logic [NW-1:0] done;
  int checks = 0, failures = 0;
  longint cycles = 0;
  longint finish_at [NW];

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic [NPKT-1:0] rx_array [NW];
  logic [15:0] tx_count [NW], retx_count [NW], err_count [NW], crc_err_count [NW];

  for (genvar g = 0; g < NW; g++) begin : wl
    logic [31:0] sys_state;
    logic [15:0] acked, dl, ok;
    logic cont, birq, mirq;
    wimax_edc_top #(.PAYLOAD_BYTES(PAYLOAD[g]), .SEED(32'h2545_F491 + 32'(g))) u_top (
      .clk, .rst_n, .start, .done(done[g]), .sys_state, .rx_array(rx_array[g]),
      .tx_count(tx_count[g]), .retx_count(retx_count[g]), .acked_count(acked),
      .dl_count(dl), .err_count(err_count[g]), .crc_ok_count(ok),
      .crc_err_count(crc_err_count[g]), .bus_contention(cont),
      .bs_crc_irq(birq), .ms_crc_irq(mirq));
    initial begin
      wait (rst_n);
      wait (done[g]);
      finish_at[g] = cycles;
    end
  end

  longint t0;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    t0 = cycles;
    wait (&done);
    repeat (3) @(negedge clk);
    for (int g = 0; g < NW; g++) begin
      $display("payload %0d bits (%0d bytes): %0d clocks for %0d packets, %0d transmissions",
               PAYLOAD[g] == 2 ? 10 : PAYLOAD[g] == 13 ? 100 : 1000, PAYLOAD[g],
               finish_at[g] - t0, NPKT, tx_count[g]);
      check(32'(rx_array[g]), 32'((1 << NPKT) - 1), "all packets delivered");
      check(32'(tx_count[g]), 32'(NPKT) + 32'(retx_count[g]), "transmissions");
      check(32'(retx_count[g]), 32'(crc_err_count[g]), "retransmission per CRC error");
      check(32'(crc_err_count[g]), 32'(err_count[g]), "every corruption detected");
    end
    checks++;
    if (!(finish_at[0] < finish_at[2])) begin
      failures++;
      $display("FAIL larger packets should take longer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
