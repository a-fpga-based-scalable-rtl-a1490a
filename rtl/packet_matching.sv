// Packet Matching Module: shared rule lookup for both network interfaces.
//
// Each interface's IP parser pushes one query per frame into that interface's
// query FIFO. Lookups are issued in fixed, equal time slots: even cycles
// belong to interface 0, odd cycles to interface 1, and a slot whose owner has
// no query stays unused. An issued query is hashed (CRC-32, low 26 bits); the
// upper hash bits form the rule-memory word address sent to the Request FIFO
// and the interface number, the lower bits (bit index) and the IPv4 flag go
// into an in-order tag FIFO. Memory answers come back in issue order, so each
// answer pops one tag, its bit is selected, and the result ("suspicious" =
// bit set and frame is IPv4) is pushed into that interface's result FIFO,
// which the interface reads in frame order.
//
// Non-IPv4 frames are looked up like the others (a spare memory slot) and
// their result is forced to "not suspicious"; this keeps results in frame
// order without a second path. A lookup is issued only when the interface
// has a free place reserved in its result FIFO (credit), so an answer can
// always be stored and the memory side needs no back-pressure.
//
// Time slots between the two interfaces and the stages (hash + request, wait,
// result) follow the document; FIFO depths, the credit scheme and the
// non-IPv4 rule are this design's choices.
//
// Timing: a query issued in cycle t reaches the request port in cycle t
// (combinational hash); the result is in the result FIFO the cycle after the
// memory answer returns.
module packet_matching #(
  parameter int unsigned QDEPTH   = 8,    // query FIFO depth per interface
  parameter int unsigned RDEPTH   = 32,   // result FIFO depth per interface
  parameter int unsigned TAGDEPTH = 32,   // lookups in flight, both interfaces
  localparam int unsigned NIF     = urlf_pkg::NUM_IFACES,
  localparam int unsigned QCNT_W  = $clog2(QDEPTH+1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // queries from the IP parsers
  input  logic                      q_valid [NIF],
  input  logic [31:0]               q_ip    [NIF],
  input  logic                      q_ipv4  [NIF],
  output logic [QCNT_W-1:0]         q_free  [NIF],   // free query FIFO places
  // results to the interfaces, in frame order
  output logic                      r_valid      [NIF],
  output logic                      r_suspicious [NIF],
  input  logic                      r_ready      [NIF],
  // memory read requests (to the filter's Request FIFO)
  output logic                      mreq_valid,
  output logic [urlf_pkg::MEM_AW-1:0] mreq_addr,
  input  logic                      mreq_ready,
  // memory answers, in request order, always accepted
  input  logic                      mresp_valid,
  input  logic [urlf_pkg::MEM_DW-1:0] mresp_data,
  // statistics
  output logic [31:0]               lookups,
  output logic [31:0]               hits
);

  import urlf_pkg::*;

  localparam int unsigned TAG_W  = 1 + 1 + BIT_W;          // iface, ipv4, bit index
  localparam int unsigned RCNT_W = $clog2(RDEPTH+1);
  localparam int unsigned TCNT_W = $clog2(TAGDEPTH+1);

  // ---------------- query FIFOs ----------------
  logic              qf_valid [NIF];
  logic              qf_ready [NIF];
  logic [32:0]       qf_data  [NIF];
  logic [QCNT_W-1:0] qf_count [NIF];
  logic              qf_wready[NIF];

  for (genvar i = 0; i < NIF; i++) begin : g_qf
    sync_fifo #(.WIDTH(33), .DEPTH(QDEPTH)) u_qfifo (
      .clk, .rst_n,
      .wr_valid (q_valid[i]), .wr_ready (qf_wready[i]), .wr_data ({q_ipv4[i], q_ip[i]}),
      .rd_valid (qf_valid[i]), .rd_ready (qf_ready[i]), .rd_data (qf_data[i]),
      .count    (qf_count[i])
    );
    assign q_free[i] = QCNT_W'(QDEPTH) - qf_count[i];
  end

  // ---------------- slot selection, hash, issue ----------------
  logic              slot;           // interface owning this cycle
  logic [RCNT_W:0]   credit [NIF];   // result places not yet promised
  logic              t_wready, t_valid;
  logic [TAG_W-1:0]  t_rdata;
  logic [TCNT_W-1:0] t_count;
  logic [HASH_W-1:0] hash;
  logic              issue;
  logic [31:0]       sel_ip;
  logic              sel_ipv4;

  assign {sel_ipv4, sel_ip} = qf_data[slot];

  crc32_hash #(.HASH_W(HASH_W)) u_hash (.ip(sel_ip), .hash(hash));

  assign mreq_valid = qf_valid[slot] && (credit[slot] != '0) && t_wready;
  assign mreq_addr  = hash[HASH_W-1:BIT_W];
  assign issue      = mreq_valid && mreq_ready;

  always_comb begin
    for (int i = 0; i < NIF; i++) qf_ready[i] = issue && (slot == 1'(i));
  end

  sync_fifo #(.WIDTH(TAG_W), .DEPTH(TAGDEPTH)) u_tags (
    .clk, .rst_n,
    .wr_valid (issue), .wr_ready (t_wready),
    .wr_data  ({slot, sel_ipv4, hash[BIT_W-1:0]}),
    .rd_valid (t_valid), .rd_ready (mresp_valid), .rd_data (t_rdata),
    .count    (t_count)
  );

  // ---------------- answer -> result ----------------
  logic             a_iface, a_ipv4;
  logic [BIT_W-1:0] a_bit;
  logic             a_hit;
  logic             rf_wr   [NIF];
  logic             rf_wrdy [NIF];
  logic             rf_rd   [NIF];
  logic [RCNT_W-1:0] rf_count [NIF];

  assign {a_iface, a_ipv4, a_bit} = t_rdata;
  assign a_hit = a_ipv4 && mresp_data[a_bit];

  for (genvar i = 0; i < NIF; i++) begin : g_rf
    assign rf_wr[i] = mresp_valid && (a_iface == 1'(i));
    assign rf_rd[i] = r_valid[i] && r_ready[i];
    sync_fifo #(.WIDTH(1), .DEPTH(RDEPTH)) u_rfifo (
      .clk, .rst_n,
      .wr_valid (rf_wr[i]), .wr_ready (rf_wrdy[i]), .wr_data (a_hit),
      .rd_valid (r_valid[i]), .rd_ready (r_ready[i]), .rd_data (r_suspicious[i]),
      .count    (rf_count[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot    <= 1'b0;
      lookups <= '0;
      hits    <= '0;
      for (int i = 0; i < NIF; i++) credit[i] <= (RCNT_W+1)'(RDEPTH);
    end else begin
      slot <= ~slot;
      if (issue) lookups <= lookups + 1'b1;
      if (mresp_valid && a_hit) hits <= hits + 1'b1;
      for (int i = 0; i < NIF; i++)
        credit[i] <= credit[i] - (RCNT_W+1)'(issue && (slot == 1'(i)))
                               + (RCNT_W+1)'(rf_rd[i]);
    end
  end

  // Answers only arrive for issued lookups, and always find room.
  assert property (@(posedge clk) disable iff (!rst_n) mresp_valid |-> t_valid);
  for (genvar i = 0; i < NIF; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) rf_wr[i] |-> rf_wrdy[i]);
    assert property (@(posedge clk) disable iff (!rst_n) q_valid[i] |-> qf_wready[i]);
  end

endmodule
