// Request FIFO module: one requester's path to the rule memory.
//
// On the system-clock side a requester presents simple Local Bus style
// requests (valid/ready, write flag, word address, write data) and receives
// read data as single-cycle pulses, in request order. A dual-clock FIFO
// carries the requests into the memory clock domain, where the head request
// is translated into the memory controller's separate read and write command
// channels (only the channel matching the request type is offered). Read
// data returned by the QDR-II Manager in the memory clock domain travels
// back through a second dual-clock FIFO and is delivered without
// back-pressure: the requester must not have more reads outstanding than
// RSP_DEPTH.
//
// Clock-domain exchange, translation to the controller's protocol and the
// 32-bit request width follow the document; the FIFO depths and the exact
// hand-shakes are this design's choices.
module request_fifo #(
  parameter int unsigned REQ_DEPTH = 16,
  parameter int unsigned RSP_DEPTH = 64
) (
  // system clock domain: requester side
  input  logic                        sys_clk,
  input  logic                        sys_rst_n,
  input  logic                        req_valid,
  output logic                        req_ready,
  input  urlf_pkg::mem_req_t          req,
  output logic                        resp_valid,
  output logic [urlf_pkg::MEM_DW-1:0] resp_data,
  // memory clock domain: manager side
  input  logic                        mem_clk,
  input  logic                        mem_rst_n,
  output logic                        wr_cmd_valid,
  output logic [urlf_pkg::MEM_AW-1:0] wr_cmd_addr,
  output logic [urlf_pkg::MEM_DW-1:0] wr_cmd_data,
  input  logic                        wr_cmd_ready,
  output logic                        rd_cmd_valid,
  output logic [urlf_pkg::MEM_AW-1:0] rd_cmd_addr,
  input  logic                        rd_cmd_ready,
  input  logic                        rd_data_valid,
  input  logic [urlf_pkg::MEM_DW-1:0] rd_data
);

  import urlf_pkg::*;

  mem_req_t head;
  logic     head_valid, head_take;

  async_fifo #(.WIDTH($bits(mem_req_t)), .DEPTH(REQ_DEPTH)) u_req (
    .wr_clk (sys_clk), .wr_rst_n (sys_rst_n),
    .wr_valid (req_valid), .wr_ready (req_ready), .wr_data (req),
    .rd_clk (mem_clk), .rd_rst_n (mem_rst_n),
    .rd_valid (head_valid), .rd_ready (head_take), .rd_data (head)
  );

  // Translation to separate write / read command channels.
  assign wr_cmd_valid = head_valid &&  head.we;
  assign rd_cmd_valid = head_valid && !head.we;
  assign wr_cmd_addr  = head.addr;
  assign wr_cmd_data  = head.wdata;
  assign rd_cmd_addr  = head.addr;
  assign head_take    = (wr_cmd_valid && wr_cmd_ready) || (rd_cmd_valid && rd_cmd_ready);

  logic rsp_wready;

  async_fifo #(.WIDTH(MEM_DW), .DEPTH(RSP_DEPTH)) u_rsp (
    .wr_clk (mem_clk), .wr_rst_n (mem_rst_n),
    .wr_valid (rd_data_valid), .wr_ready (rsp_wready), .wr_data (rd_data),
    .rd_clk (sys_clk), .rd_rst_n (sys_rst_n),
    .rd_valid (resp_valid), .rd_ready (1'b1), .rd_data (resp_data)
  );

  // The requester's credit limit guarantees room for every answer.
  assert property (@(posedge mem_clk) disable iff (!mem_rst_n) rd_data_valid |-> rsp_wready);

endmodule
