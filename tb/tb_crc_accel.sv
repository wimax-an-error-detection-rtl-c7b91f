// tb_crc_accel: exercises the CRC module through its AHB-Lite slave port the
// way the station software does: fill Input_Buffer, write CRC_length, write 1
// to CRC_enable, wait for INTRP, read Output_Buffer, clear CRC_done.
// Checks: the published ARQ-feedback example (0x807533C7), random lengths
// against the bit-serial reference, register and buffer read-back, the
// interrupt rising exactly ceil(L/4)+2 clocks after the enable data phase,
// CRC_enable reading 1 while busy, and INTRP falling when CRC_done is cleared.
module tb_crc_accel;
  import wimax_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned INBUF_WORDS = 64;

  logic        clk = 0, rst_n = 0;
  logic        HSEL = 1, HWRITE = 0, HREADYOUT, HRESP, INTRP;
  logic [31:0] HADDR = '0, HWDATA = '0, HRDATA;
  logic [1:0]  HTRANS = HTRANS_IDLE;
  logic [2:0]  HSIZE = HSIZE_WORD;
  int checks = 0, failures = 0;

  crc_accel #(.INBUF_WORDS(INBUF_WORDS)) dut (
    .HCLK(clk), .HRESETn(rst_n), .HSEL, .HADDR, .HTRANS, .HWRITE, .HSIZE, .HWDATA,
    .HREADY(HREADYOUT), .HREADYOUT, .HRESP, .HRDATA, .INTRP);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  // single AHB transfers, driven on the falling edge
  task automatic ahb_write(input logic [15:0] ofs, input logic [31:0] d);
    @(negedge clk);
    HADDR = HW_MODULE_BASE + 32'(ofs); HWRITE = 1; HTRANS = HTRANS_NONSEQ;
    @(negedge clk);
    HTRANS = HTRANS_IDLE; HWDATA = d;
    while (!HREADYOUT) @(negedge clk);
  endtask

  task automatic ahb_read(input logic [15:0] ofs, output logic [31:0] d);
    @(negedge clk);
    HADDR = HW_MODULE_BASE + 32'(ofs); HWRITE = 0; HTRANS = HTRANS_NONSEQ;
    @(negedge clk);
    HTRANS = HTRANS_IDLE;
    while (!HREADYOUT) @(negedge clk);
    d = HRDATA;
  endtask

  task automatic run_crc(input logic [7:0] m[], input int len, input bit check_busy);
    logic [31:0] r;
    int cyc;
    for (int w = 0; w < (len + 3) / 4; w++) ahb_write(INPUT_BUF_OFS + 16'(4*w), word_of(m, w));
    for (int w = 0; w < (len + 3) / 4; w++) begin
      ahb_read(INPUT_BUF_OFS + 16'(4*w), r);
      check(r, word_of(m, w), "Input_Buffer read-back");
    end
    ahb_write(CRC_LENGTH_OFS, 32'(len));
    ahb_read(CRC_LENGTH_OFS, r);
    check(r, 32'(len), "CRC_length read-back");
    // enable; count clocks from the data phase edge until INTRP
    @(negedge clk);
    HADDR = HW_MODULE_BASE + 32'(CRC_ENABLE_OFS); HWRITE = 1; HTRANS = HTRANS_NONSEQ;
    @(negedge clk);
    HTRANS = HTRANS_IDLE; HWDATA = 32'h1;
    cyc = 0;
    @(posedge clk);               // data phase sampled here
    #1;
    if (check_busy && len > 8) begin
      // read CRC_enable while the engine runs
      @(negedge clk);
      HADDR = HW_MODULE_BASE + 32'(CRC_ENABLE_OFS); HWRITE = 0; HTRANS = HTRANS_NONSEQ;
      @(negedge clk);
      HTRANS = HTRANS_IDLE;
      check(HRDATA, 32'h1, "CRC_enable reads 1 while busy");
      cyc = 1;
    end
    while (!INTRP) begin
      @(posedge clk); #1;
      cyc++;
    end
    check(32'(cyc), 32'((len + 3) / 4 + 2), "clocks from enable to INTRP");
    ahb_read(OUTPUT_BUF_OFS, r);
    check(r, ref_crc32(m, len), "Output_Buffer");
    ahb_read(CRC_DONE_OFS, r);
    check(r, 32'h1, "CRC_done set");
    ahb_read(CRC_ENABLE_OFS, r);
    check(r, 32'h0, "CRC_enable cleared at the end");
    ahb_write(CRC_DONE_OFS, 32'h0);
    @(negedge clk);
    check({31'h0, INTRP}, 32'h0, "INTRP cleared");
  endtask

  logic [7:0] msg[];
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check({31'h0, INTRP}, 32'h0, "INTRP low after reset");
    msg = '{8'h10, 8'h00, 8'h06, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
            8'hFF, 8'hFF, 8'h9F, 8'hFC, 8'h80, 8'h00};
    run_crc(msg, 15, 1);
    begin
      logic [31:0] r;
      ahb_read(OUTPUT_BUF_OFS, r);
      check(r, 32'h8075_33C7, "published example");
    end
    for (int t = 0; t < 40; t++) begin
      msg = new[1 + $urandom_range(0, 4*INBUF_WORDS - 1)];
      foreach (msg[i]) msg[i] = 8'($urandom);
      run_crc(msg, msg.size(), t % 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
