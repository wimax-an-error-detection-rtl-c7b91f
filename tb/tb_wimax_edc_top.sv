// tb_wimax_edc_top: end-to-end run of the whole system at its default size
// (10 packets of 125 payload bytes, i.e. 1000-bit payloads, 40 % error rate).
// After `start` it waits for `done` and checks that every packet arrived
// intact (rx_array all ones), that every corrupted downlink PDU was caught by
// the CRC check and cost exactly one retransmission, and that the system state
// only ever moved IDLE -> BS_TX -> MS -> BS_RX -> BS_TX/DONE. It also counts
// how often each mechanism happened and fails if one never did: channel
// corruption, CRC mismatch at the receiver, NACK-driven retransmission, CRC
// module interrupts at both stations, and arbitration contention on the
// shared memory.
module tb_wimax_edc_top;
  import wimax_pkg::*;

  localparam int unsigned NPKT = 10;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [31:0] sys_state;
  logic [NPKT-1:0] rx_array;
  logic [15:0] tx_count, retx_count, acked_count, dl_count, err_count, crc_ok_count, crc_err_count;
  logic bus_contention, bs_irq, ms_irq;
  int checks = 0, failures = 0;
  int n_contention = 0, n_bs_irq = 0, n_ms_irq = 0, n_transitions = 0;
  logic bs_irq_d = 0, ms_irq_d = 0;
  logic [31:0] state_d = 0;
  longint cycles = 0;

  wimax_edc_top dut (
    .clk, .rst_n, .start, .done, .sys_state, .rx_array, .tx_count, .retx_count,
    .acked_count, .dl_count, .err_count, .crc_ok_count, .crc_err_count,
    .bus_contention, .bs_crc_irq(bs_irq), .ms_crc_irq(ms_irq));

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic require(input int count, input string what);
    checks++;
    $display("mechanism %-28s happened %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (bus_contention) n_contention++;
    if (bs_irq && !bs_irq_d) n_bs_irq++;
    if (ms_irq && !ms_irq_d) n_ms_irq++;
    bs_irq_d <= bs_irq;
    ms_irq_d <= ms_irq;
    state_d  <= sys_state;
    if (sys_state != state_d) begin
      n_transitions++;
      checks++;
      if (!((state_d == 32'(SYS_IDLE)  && sys_state == 32'(SYS_BS_TX)) ||
            (state_d == 32'(SYS_BS_TX) && sys_state == 32'(SYS_MS))    ||
            (state_d == 32'(SYS_MS)    && sys_state == 32'(SYS_BS_RX)) ||
            (state_d == 32'(SYS_BS_RX) && sys_state == 32'(SYS_BS_TX)) ||
            (state_d == 32'(SYS_BS_RX) && sys_state == 32'(SYS_DONE)))) begin
        failures++;
        $display("FAIL illegal state change %0d -> %0d", state_d, sys_state);
      end
    end
  end

  longint t0;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    t0 = cycles;
    wait (done);
    repeat (5) @(negedge clk);
    $display("run of %0d packets took %0d clocks, %0d transmissions", NPKT, cycles - t0, tx_count);
    check(32'(rx_array), 32'((1 << NPKT) - 1), "rx_array all ones");
    check(32'(acked_count), NPKT, "packets acknowledged");
    check(32'(crc_ok_count), NPKT, "intact PDUs at the receiver");
    check(32'(tx_count), 32'(NPKT) + 32'(retx_count), "transmissions = packets + retransmissions");
    check(32'(dl_count), 32'(tx_count), "every transmission passed the channel");
    check(32'(crc_err_count), 32'(err_count), "every corrupted PDU detected");
    check(32'(retx_count), 32'(err_count), "one retransmission per corrupted PDU");
    check(sys_state, 32'(SYS_DONE), "final state DONE");
    check(32'(n_bs_irq), 32'(tx_count), "one BS CRC interrupt per transmission");
    check(32'(n_ms_irq), 32'(2 * dl_count), "two MS CRC interrupts per PDU (check + answer)");
    check(32'(n_transitions), 32'(3 * tx_count + 1), "state changes");
    require(int'(err_count), "channel corruption");
    require(int'(crc_err_count), "CRC mismatch at receiver");
    require(int'(retx_count), "retransmission after NACK");
    require(n_bs_irq, "BS CRC interrupt");
    require(n_ms_irq, "MS CRC interrupt");
    require(n_contention, "shared-memory contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
