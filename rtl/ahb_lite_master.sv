// ahb_lite_master: single, non-pipelined AHB-Lite word transfers for a
// controller that holds its command until `done`.
//
// IDLE: with cmd_valid, drive the address phase (HTRANS=NONSEQ, HSIZE=word).
// DATA: drive HWDATA and wait for HREADY; `done` pulses with HRDATA in `rdata`.
// One transfer takes two clocks with a zero-wait-state slave. This is the bus
// side of the processor that the design attaches to its CRC module; only the
// transfers it needs (single word reads and writes) are built.
module ahb_lite_master
  import wimax_pkg::*;
(
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic        cmd_valid,
  input  logic        cmd_we,
  input  logic [31:0] cmd_addr,
  input  logic [31:0] cmd_wdata,
  output logic        done,
  output logic [31:0] rdata,
  output logic [31:0] HADDR,
  output logic [1:0]  HTRANS,
  output logic        HWRITE,
  output logic [2:0]  HSIZE,
  output logic [31:0] HWDATA,
  input  logic        HREADY,
  input  logic [31:0] HRDATA
);

  logic        data_q;
  logic [31:0] wdata_q;

  assign HTRANS = (cmd_valid && !data_q) ? HTRANS_NONSEQ : HTRANS_IDLE;
  assign HADDR  = cmd_addr;
  assign HWRITE = cmd_we;
  assign HSIZE  = HSIZE_WORD;
  assign HWDATA = wdata_q;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      data_q  <= 1'b0;
      wdata_q <= '0;
    end else if (!data_q) begin
      if (cmd_valid && HREADY) begin
        data_q  <= 1'b1;
        wdata_q <= cmd_wdata;
      end
    end else if (HREADY) begin
      data_q <= 1'b0;
    end
  end

  assign done  = data_q && HREADY;
  assign rdata = HRDATA;

  // the controller keeps its command up through the data phase
  a_cmd_held: assert property (@(posedge HCLK) disable iff (!HRESETn)
                               data_q |-> cmd_valid && $stable(cmd_addr) && $stable(cmd_we));

endmodule
