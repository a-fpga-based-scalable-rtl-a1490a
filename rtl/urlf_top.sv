// URL pre-filter for two network directions: the hardware first level.
//
// Every frame received on either port is checked against a blacklist of
// destination IPv4 addresses held as one bit per hash value in an external
// QDR-II SRAM. Frames whose address may be forbidden ("suspicious") are
// sent by DMA to the host, which inspects the requested URL and decides;
// all other frames go straight out of the opposite port. The host also
// rewrites the blacklist through the Local Bus while traffic flows.
//
// Per port p (0, 1) the design has five frame FIFOs:
//   * the packet FIFO inside the Packet Filtering Module (frames waiting for
//     their lookup result);
//   * dma_tx FIFO: suspicious frames waiting for the slower DMA to the host;
//   * fwd FIFO: allowed frames heading for the opposite port;
//   * dma_rx FIFO: frames the host sends out of port p;
//   * tx FIFO: output of the aggregator of port p, towards the MAC.
// The aggregator of port p merges fwd FIFO of port 1-p with dma_rx FIFO of
// port p. Lookups of both ports share one Packet Matching Module (equal
// time slots) and, with the Rule Updating Module, one QDR-II Access Module
// that crosses into the memory clock.
//
// Clocks: clk is the system clock of the frame path (125 MHz with a 128-bit
// bus in the 10 Gbps implementation), mem_clk the memory clock (250 MHz).
// The memory controller itself is not part of this design: its user side
// (separate read and write commands with full flags, in-order read data) is
// brought out as the app_* ports. The MACs, DMA engine and PCIe/Local Bus
// bridge are outside as well; their streams are ports. Streams use
// valid/ready except rx_*, which has no back-pressure (frames that do not
// fit are dropped whole and counted).
//
// The block structure, FIFO count, sizes (128-bit words, 512-word FIFOs,
// 26-bit hash, 32-bit requests) follow the document; port-to-port routing,
// host re-injection and the detailed hand-shakes are this design's choices.
module urlf_top #(
  parameter int unsigned DATA_W          = 128,
  parameter int unsigned PKT_FIFO_DEPTH  = 512,
  parameter int unsigned MAX_FRAME_BYTES = 1518,
  localparam int unsigned EMPTY_W        = $clog2(DATA_W/8),
  localparam int unsigned NIF            = urlf_pkg::NUM_IFACES
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        mem_clk,
  input  logic                        mem_rst_n,
  // network receive (from the MACs)
  input  logic                        rx_valid [NIF],
  input  logic [DATA_W-1:0]           rx_data  [NIF],
  input  logic                        rx_sop   [NIF],
  input  logic                        rx_eop   [NIF],
  input  logic [EMPTY_W-1:0]          rx_empty [NIF],
  // network transmit (to the MACs)
  output logic                        tx_valid [NIF],
  input  logic                        tx_ready [NIF],
  output logic [DATA_W-1:0]           tx_data  [NIF],
  output logic                        tx_sop   [NIF],
  output logic                        tx_eop   [NIF],
  output logic [EMPTY_W-1:0]          tx_empty [NIF],
  // suspicious frames to the host (DMA), per receiving port
  output logic                        dma_tx_valid [NIF],
  input  logic                        dma_tx_ready [NIF],
  output logic [DATA_W-1:0]           dma_tx_data  [NIF],
  output logic                        dma_tx_sop   [NIF],
  output logic                        dma_tx_eop   [NIF],
  output logic [EMPTY_W-1:0]          dma_tx_empty [NIF],
  // frames from the host (DMA), per transmitting port
  input  logic                        dma_rx_valid [NIF],
  output logic                        dma_rx_ready [NIF],
  input  logic [DATA_W-1:0]           dma_rx_data  [NIF],
  input  logic                        dma_rx_sop   [NIF],
  input  logic                        dma_rx_eop   [NIF],
  input  logic [EMPTY_W-1:0]          dma_rx_empty [NIF],
  // Local Bus: rule memory access from the host
  input  logic                        lb_valid,
  output logic                        lb_ready,
  input  logic                        lb_we,
  input  logic [urlf_pkg::MEM_AW-1:0] lb_addr,
  input  logic [urlf_pkg::MEM_DW-1:0] lb_wdata,
  output logic                        lb_rdata_valid,
  output logic [urlf_pkg::MEM_DW-1:0] lb_rdata,
  // QDR-II memory controller user side (mem_clk)
  output logic                        app_wr_cmd,
  output logic [urlf_pkg::MEM_AW-1:0] app_wr_addr,
  output logic [urlf_pkg::MEM_DW-1:0] app_wr_data,
  input  logic                        app_wr_full,
  output logic                        app_rd_cmd,
  output logic [urlf_pkg::MEM_AW-1:0] app_rd_addr,
  input  logic                        app_rd_full,
  input  logic                        app_rd_valid,
  input  logic [urlf_pkg::MEM_DW-1:0] app_rd_data,
  // statistics
  output logic [31:0]                 frames_in      [NIF],
  output logic [31:0]                 frames_dropped [NIF],
  output logic [31:0]                 frames_net     [NIF],
  output logic [31:0]                 frames_dma     [NIF],
  output logic [31:0]                 lookups,
  output logic [31:0]                 hits,
  output logic [31:0]                 rule_writes,
  output logic [31:0]                 rule_reads,
  output logic [31:0]                 mem_grants [2]
);

  import urlf_pkg::*;

  localparam int unsigned QDEPTH = 8;
  localparam int unsigned QCNT_W = $clog2(QDEPTH+1);

  // ---------------- Packet Filtering Modules ----------------
  logic              q_valid [NIF];
  logic [31:0]       q_ip    [NIF];
  logic              q_ipv4  [NIF];
  logic [QCNT_W-1:0] q_free  [NIF];
  logic              r_valid [NIF];
  logic              r_susp  [NIF];
  logic              r_ready [NIF];

  // filter -> fwd FIFO
  logic               pf_net_valid [NIF], pf_net_ready [NIF];
  logic [DATA_W-1:0]  pf_net_data  [NIF];
  logic               pf_net_sop   [NIF], pf_net_eop [NIF];
  logic [EMPTY_W-1:0] pf_net_empty [NIF];
  // filter -> dma_tx FIFO
  logic               pf_dma_valid [NIF], pf_dma_ready [NIF];
  logic [DATA_W-1:0]  pf_dma_data  [NIF];
  logic               pf_dma_sop   [NIF], pf_dma_eop [NIF];
  logic [EMPTY_W-1:0] pf_dma_empty [NIF];
  // fwd FIFO -> aggregator
  logic               fw_valid [NIF], fw_ready [NIF];
  logic [DATA_W-1:0]  fw_data  [NIF];
  logic               fw_sop   [NIF], fw_eop [NIF];
  logic [EMPTY_W-1:0] fw_empty [NIF];
  // dma_rx FIFO -> aggregator
  logic               hr_valid [NIF], hr_ready [NIF];
  logic [DATA_W-1:0]  hr_data  [NIF];
  logic               hr_sop   [NIF], hr_eop [NIF];
  logic [EMPTY_W-1:0] hr_empty [NIF];
  // aggregator -> tx FIFO
  logic               ag_valid [NIF], ag_ready [NIF];
  logic [DATA_W-1:0]  ag_data  [NIF];
  logic               ag_sop   [NIF], ag_eop [NIF];
  logic [EMPTY_W-1:0] ag_empty [NIF];

  for (genvar p = 0; p < NIF; p++) begin : g_port
    packet_filter #(
      .DATA_W (DATA_W), .FIFO_DEPTH (PKT_FIFO_DEPTH),
      .MAX_FRAME_BYTES (MAX_FRAME_BYTES), .QCNT_W (QCNT_W)
    ) u_filter (
      .clk, .rst_n,
      .rx_valid (rx_valid[p]), .rx_data (rx_data[p]), .rx_sop (rx_sop[p]),
      .rx_eop (rx_eop[p]), .rx_empty (rx_empty[p]),
      .q_valid (q_valid[p]), .q_ip (q_ip[p]), .q_ipv4 (q_ipv4[p]), .q_free (q_free[p]),
      .r_valid (r_valid[p]), .r_suspicious (r_susp[p]), .r_ready (r_ready[p]),
      .net_valid (pf_net_valid[p]), .net_ready (pf_net_ready[p]), .net_data (pf_net_data[p]),
      .net_sop (pf_net_sop[p]), .net_eop (pf_net_eop[p]), .net_empty (pf_net_empty[p]),
      .dma_valid (pf_dma_valid[p]), .dma_ready (pf_dma_ready[p]), .dma_data (pf_dma_data[p]),
      .dma_sop (pf_dma_sop[p]), .dma_eop (pf_dma_eop[p]), .dma_empty (pf_dma_empty[p]),
      .frames_in (frames_in[p]), .frames_dropped (frames_dropped[p]),
      .frames_net (frames_net[p]), .frames_dma (frames_dma[p])
    );

    // Suspicious frames wait here for the DMA towards the host.
    packet_fifo #(.DATA_W(DATA_W), .DEPTH(PKT_FIFO_DEPTH)) u_dma_tx_fifo (
      .clk, .rst_n,
      .wr_valid (pf_dma_valid[p]), .wr_ready (pf_dma_ready[p]), .wr_data (pf_dma_data[p]),
      .wr_sop (pf_dma_sop[p]), .wr_eop (pf_dma_eop[p]), .wr_empty (pf_dma_empty[p]),
      .rd_valid (dma_tx_valid[p]), .rd_ready (dma_tx_ready[p]), .rd_data (dma_tx_data[p]),
      .rd_sop (dma_tx_sop[p]), .rd_eop (dma_tx_eop[p]), .rd_empty (dma_tx_empty[p]),
      .free_words ()
    );

    // Allowed frames wait here for the aggregator of the opposite port.
    packet_fifo #(.DATA_W(DATA_W), .DEPTH(PKT_FIFO_DEPTH)) u_fwd_fifo (
      .clk, .rst_n,
      .wr_valid (pf_net_valid[p]), .wr_ready (pf_net_ready[p]), .wr_data (pf_net_data[p]),
      .wr_sop (pf_net_sop[p]), .wr_eop (pf_net_eop[p]), .wr_empty (pf_net_empty[p]),
      .rd_valid (fw_valid[p]), .rd_ready (fw_ready[p]), .rd_data (fw_data[p]),
      .rd_sop (fw_sop[p]), .rd_eop (fw_eop[p]), .rd_empty (fw_empty[p]),
      .free_words ()
    );

    // Frames from the host for port p.
    packet_fifo #(.DATA_W(DATA_W), .DEPTH(PKT_FIFO_DEPTH)) u_dma_rx_fifo (
      .clk, .rst_n,
      .wr_valid (dma_rx_valid[p]), .wr_ready (dma_rx_ready[p]), .wr_data (dma_rx_data[p]),
      .wr_sop (dma_rx_sop[p]), .wr_eop (dma_rx_eop[p]), .wr_empty (dma_rx_empty[p]),
      .rd_valid (hr_valid[p]), .rd_ready (hr_ready[p]), .rd_data (hr_data[p]),
      .rd_sop (hr_sop[p]), .rd_eop (hr_eop[p]), .rd_empty (hr_empty[p]),
      .free_words ()
    );

    // Port p transmits frames allowed on port 1-p and frames from the host.
    tx_aggregator #(.DATA_W(DATA_W)) u_aggr (
      .clk, .rst_n,
      .a_valid (fw_valid[1-p]), .a_ready (fw_ready[1-p]), .a_data (fw_data[1-p]),
      .a_sop (fw_sop[1-p]), .a_eop (fw_eop[1-p]), .a_empty (fw_empty[1-p]),
      .b_valid (hr_valid[p]), .b_ready (hr_ready[p]), .b_data (hr_data[p]),
      .b_sop (hr_sop[p]), .b_eop (hr_eop[p]), .b_empty (hr_empty[p]),
      .o_valid (ag_valid[p]), .o_ready (ag_ready[p]), .o_data (ag_data[p]),
      .o_sop (ag_sop[p]), .o_eop (ag_eop[p]), .o_empty (ag_empty[p]),
      .frames_a (), .frames_b ()
    );

    packet_fifo #(.DATA_W(DATA_W), .DEPTH(PKT_FIFO_DEPTH)) u_tx_fifo (
      .clk, .rst_n,
      .wr_valid (ag_valid[p]), .wr_ready (ag_ready[p]), .wr_data (ag_data[p]),
      .wr_sop (ag_sop[p]), .wr_eop (ag_eop[p]), .wr_empty (ag_empty[p]),
      .rd_valid (tx_valid[p]), .rd_ready (tx_ready[p]), .rd_data (tx_data[p]),
      .rd_sop (tx_sop[p]), .rd_eop (tx_eop[p]), .rd_empty (tx_empty[p]),
      .free_words ()
    );
  end

  // ---------------- Packet Matching Module ----------------
  logic              mreq_valid, mreq_ready;
  logic [MEM_AW-1:0] mreq_addr;
  logic              req_valid  [2];
  logic              req_ready  [2];
  mem_req_t          req        [2];
  logic              resp_valid [2];
  logic [MEM_DW-1:0] resp_data  [2];

  packet_matching #(.QDEPTH(QDEPTH)) u_match (
    .clk, .rst_n,
    .q_valid, .q_ip, .q_ipv4, .q_free,
    .r_valid, .r_suspicious (r_susp), .r_ready,
    .mreq_valid, .mreq_addr, .mreq_ready,
    .mresp_valid (resp_valid[REQ_FILTER]), .mresp_data (resp_data[REQ_FILTER]),
    .lookups, .hits
  );

  assign req_valid[REQ_FILTER] = mreq_valid;
  assign req[REQ_FILTER]       = '{we: 1'b0, addr: mreq_addr, wdata: '0};
  assign mreq_ready            = req_ready[REQ_FILTER];

  // ---------------- Rule Updating Module ----------------
  rule_updater u_updater (
    .clk, .rst_n,
    .lb_valid, .lb_ready, .lb_we, .lb_addr, .lb_wdata, .lb_rdata_valid, .lb_rdata,
    .req_valid (req_valid[REQ_UPDATER]), .req_ready (req_ready[REQ_UPDATER]),
    .req (req[REQ_UPDATER]),
    .resp_valid (resp_valid[REQ_UPDATER]), .resp_data (resp_data[REQ_UPDATER]),
    .writes_done (rule_writes), .reads_done (rule_reads)
  );

  // ---------------- QDR-II Access Module ----------------
  qdr_access u_qdr (
    .sys_clk (clk), .sys_rst_n (rst_n), .mem_clk, .mem_rst_n,
    .req_valid, .req_ready, .req, .resp_valid, .resp_data,
    .app_wr_cmd, .app_wr_addr, .app_wr_data, .app_wr_full,
    .app_rd_cmd, .app_rd_addr, .app_rd_full, .app_rd_valid, .app_rd_data,
    .grants (mem_grants)
  );

endmodule
