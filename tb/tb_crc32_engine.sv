// tb_crc32_engine: drives crc32_engine with the published ARQ-feedback bytes
// (expected CRC register 0x807533C7) and with random messages fed in random
// 1..4-byte chunks, and compares the register with the bit-serial reference
// of tb_ref_pkg after every message. Also checks that `init` restores the
// preset and that the register holds when `en` is low.
module tb_crc32_engine;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [31:0] data = '0, crc;
  logic [2:0]  nbytes = 3'd4;
  int checks = 0, failures = 0;

  crc32_engine dut (.clk, .rst_n, .init, .en, .data, .nbytes, .crc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic run_msg(input logic [7:0] m[], input bit random_chunks);
    int i, n;
    @(negedge clk); init = 1; en = 0;
    @(negedge clk); init = 0;
    check(crc, 32'hFFFF_FFFF, "preset");
    i = 0;
    while (i < m.size()) begin
      n = random_chunks ? 1 + $urandom_range(0, 3) : 4;
      if (n > m.size() - i) n = m.size() - i;
      data = $urandom;
      for (int k = 0; k < n; k++) data[8*k +: 8] = m[i+k];
      nbytes = 3'(n);
      en = 1;
      @(negedge clk);
      i += n;
    end
    en = 0;
    data = $urandom;
    @(negedge clk);
    check(crc, ref_crc32(m, m.size()), "message");
  endtask

  logic [7:0] msg[];
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // published ARQ feedback example: CRC over the first 15 bytes
    msg = '{8'h10, 8'h00, 8'h06, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
            8'hFF, 8'hFF, 8'h9F, 8'hFC, 8'h80, 8'h00};
    run_msg(msg, 0);
    check(crc, 32'h8075_33C7, "published example");
    for (int t = 0; t < 200; t++) begin
      msg = new[1 + $urandom_range(0, 160)];
      foreach (msg[i]) msg[i] = 8'($urandom);
      run_msg(msg, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
