// QDR-II Access Module: lets filtering and rule updating use the rule
// memory at the same time, so rule updates never interrupt traffic.
//
// It holds one Request FIFO module per requester (requester 0 = Packet
// Matching Module, requester 1 = Rule Updating Module), each crossing from
// the system clock to the faster memory clock, and the QDR-II Manager that
// shares the memory controller between them. Requesters see a Local Bus
// style request port and an in-order read-data pulse in the system clock
// domain; the memory controller's user side is in the memory clock domain.
// Structure as in the document; depths are this design's choices.
module qdr_access #(
  parameter int unsigned REQ_DEPTH = 16,
  parameter int unsigned RSP_DEPTH = 64,
  parameter int unsigned RD_INFLT  = 64,
  localparam int unsigned NREQ     = 2
) (
  input  logic                        sys_clk,
  input  logic                        sys_rst_n,
  input  logic                        mem_clk,
  input  logic                        mem_rst_n,
  // requesters (system clock)
  input  logic                        req_valid  [NREQ],
  output logic                        req_ready  [NREQ],
  input  urlf_pkg::mem_req_t          req        [NREQ],
  output logic                        resp_valid [NREQ],
  output logic [urlf_pkg::MEM_DW-1:0] resp_data  [NREQ],
  // memory controller user side (memory clock)
  output logic                        app_wr_cmd,
  output logic [urlf_pkg::MEM_AW-1:0] app_wr_addr,
  output logic [urlf_pkg::MEM_DW-1:0] app_wr_data,
  input  logic                        app_wr_full,
  output logic                        app_rd_cmd,
  output logic [urlf_pkg::MEM_AW-1:0] app_rd_addr,
  input  logic                        app_rd_full,
  input  logic                        app_rd_valid,
  input  logic [urlf_pkg::MEM_DW-1:0] app_rd_data,
  output logic [31:0]                 grants [NREQ]
);

  import urlf_pkg::*;

  logic              wr_cmd_valid [NREQ];
  logic [MEM_AW-1:0] wr_cmd_addr  [NREQ];
  logic [MEM_DW-1:0] wr_cmd_data  [NREQ];
  logic              wr_cmd_ready [NREQ];
  logic              rd_cmd_valid [NREQ];
  logic [MEM_AW-1:0] rd_cmd_addr  [NREQ];
  logic              rd_cmd_ready [NREQ];
  logic              rd_data_valid[NREQ];
  logic [MEM_DW-1:0] rd_data;

  for (genvar r = 0; r < NREQ; r++) begin : g_rf
    request_fifo #(.REQ_DEPTH(REQ_DEPTH), .RSP_DEPTH(RSP_DEPTH)) u_reqf (
      .sys_clk, .sys_rst_n,
      .req_valid (req_valid[r]), .req_ready (req_ready[r]), .req (req[r]),
      .resp_valid (resp_valid[r]), .resp_data (resp_data[r]),
      .mem_clk, .mem_rst_n,
      .wr_cmd_valid (wr_cmd_valid[r]), .wr_cmd_addr (wr_cmd_addr[r]),
      .wr_cmd_data (wr_cmd_data[r]), .wr_cmd_ready (wr_cmd_ready[r]),
      .rd_cmd_valid (rd_cmd_valid[r]), .rd_cmd_addr (rd_cmd_addr[r]),
      .rd_cmd_ready (rd_cmd_ready[r]),
      .rd_data_valid (rd_data_valid[r]), .rd_data (rd_data)
    );
  end

  qdr_manager #(.NREQ(NREQ), .RD_INFLT(RD_INFLT)) u_mgr (
    .clk (mem_clk), .rst_n (mem_rst_n),
    .wr_cmd_valid, .wr_cmd_addr, .wr_cmd_data, .wr_cmd_ready,
    .rd_cmd_valid, .rd_cmd_addr, .rd_cmd_ready,
    .rd_data_valid, .rd_data,
    .app_wr_cmd, .app_wr_addr, .app_wr_data, .app_wr_full,
    .app_rd_cmd, .app_rd_addr, .app_rd_full, .app_rd_valid, .app_rd_data,
    .grants
  );

endmodule
