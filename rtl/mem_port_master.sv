// mem_port_master: turns a "hold the command until done" request from a
// controller into one transaction on a vsock_mem port.
//
// The controller holds cmd_valid with cmd_we/cmd_addr/cmd_wdata stable until
// `done` pulses. A write is done in the cycle it is granted; a read is done one
// clock after its grant, with `rdata` valid in that cycle. No new request is
// raised while a read is outstanding. This handshake is this implementation's
// own; the design only says the stations share the memory through an arbiter.
module mem_port_master
  import wimax_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  input  logic        cmd_we,
  input  logic [31:0] cmd_addr,
  input  logic [31:0] cmd_wdata,
  output logic        done,
  output logic [31:0] rdata,
  output mem_req_t    mreq,
  input  mem_rsp_t    mrsp
);

  logic rd_pend_q;

  always_comb begin
    mreq.req   = cmd_valid && !rd_pend_q;
    mreq.we    = cmd_we;
    mreq.addr  = cmd_addr;
    mreq.wdata = cmd_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                     rd_pend_q <= 1'b0;
    else if (mreq.req && mrsp.gnt && !cmd_we)       rd_pend_q <= 1'b1;
    else if (mrsp.rvalid)                           rd_pend_q <= 1'b0;
  end

  assign done  = (mreq.req && mrsp.gnt && cmd_we) || (rd_pend_q && mrsp.rvalid);
  assign rdata = mrsp.rdata;

  // the memory answers only reads this port has outstanding
  a_rvalid_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                      mrsp.rvalid |-> rd_pend_q);
  // the controller keeps its command up until it is done
  a_cmd_held: assert property (@(posedge clk) disable iff (!rst_n)
                               rd_pend_q |-> cmd_valid && !cmd_we);

endmodule
