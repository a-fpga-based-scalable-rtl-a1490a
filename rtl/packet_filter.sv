// Packet Filtering Module of one network interface (receive direction).
//
// Frames arrive from the MAC at line rate and cannot be held back. At each
// start of frame the module decides whether the frame can be taken whole:
// the packet FIFO must have room for a maximum-size frame and the lookup
// query FIFO of the Packet Matching Module room for its query. Otherwise the
// whole frame is dropped and counted; frames are never cut.
//
// A taken frame is written into the packet FIFO while the IP parser extracts
// its destination address and issues one lookup query. The FIFO holds the
// frame while the rule memory is consulted. At the FIFO head, a frame waits
// for its match result (results come back in frame order); the result
// decides the forwarding action for the whole frame: "suspicious" frames go
// to the DMA output towards the host, the others to the network output
// (towards the opposite port). Output words stream with valid/ready.
//
// Structure (parser, packet FIFO, matching, forward to network or DMA) is as
// described in the document; admission per frame, drop counting, the
// maximum frame size and cut-through at the FIFO head are this design's
// choices.
//
// Timing: with DATA_W = 128 the query leaves 3 cycles after the first word
// (the address ends in word 2); a frame can start leaving as soon as its
// result is back.
module packet_filter #(
  parameter int unsigned DATA_W          = 128,
  parameter int unsigned FIFO_DEPTH      = 512,
  parameter int unsigned MAX_FRAME_BYTES = 1518,
  parameter int unsigned QCNT_W          = 4,
  localparam int unsigned EMPTY_W        = $clog2(DATA_W/8)
) (
  input  logic               clk,
  input  logic               rst_n,
  // receive stream from the MAC (no back-pressure)
  input  logic               rx_valid,
  input  logic [DATA_W-1:0]  rx_data,
  input  logic               rx_sop,
  input  logic               rx_eop,
  input  logic [EMPTY_W-1:0] rx_empty,
  // lookup query to the Packet Matching Module
  output logic               q_valid,
  output logic [31:0]        q_ip,
  output logic               q_ipv4,
  input  logic [QCNT_W-1:0]  q_free,
  // match result, in frame order
  input  logic               r_valid,
  input  logic               r_suspicious,
  output logic               r_ready,
  // frames allowed: to the network side
  output logic               net_valid,
  input  logic               net_ready,
  output logic [DATA_W-1:0]  net_data,
  output logic               net_sop,
  output logic               net_eop,
  output logic [EMPTY_W-1:0] net_empty,
  // suspicious frames: to the DMA towards the host
  output logic               dma_valid,
  input  logic               dma_ready,
  output logic [DATA_W-1:0]  dma_data,
  output logic               dma_sop,
  output logic               dma_eop,
  output logic [EMPTY_W-1:0] dma_empty,
  // statistics
  output logic [31:0]        frames_in,
  output logic [31:0]        frames_dropped,
  output logic [31:0]        frames_net,
  output logic [31:0]        frames_dma
);

  localparam int unsigned BYTES     = DATA_W / 8;
  localparam int unsigned MAX_WORDS = (MAX_FRAME_BYTES + BYTES - 1) / BYTES;
  localparam int unsigned CNT_W     = $clog2(FIFO_DEPTH+1);

  // ---------------- admission ----------------
  logic             in_frame_q, keep_q;   // inside a frame, and frame is kept
  logic             keep;
  logic             wr_en;
  logic [CNT_W-1:0] free_words;
  logic             wr_ready;

  always_comb begin
    if (rx_valid && rx_sop)
      keep = (free_words >= CNT_W'(MAX_WORDS)) && (q_free >= QCNT_W'(2));
    else
      keep = keep_q && in_frame_q;
  end
  assign wr_en = rx_valid && keep;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_frame_q     <= 1'b0;
      keep_q         <= 1'b0;
      frames_in      <= '0;
      frames_dropped <= '0;
    end else if (rx_valid) begin
      if (rx_sop) begin
        keep_q    <= keep;
        frames_in <= frames_in + 1'b1;
        if (!keep) frames_dropped <= frames_dropped + 1'b1;
      end
      in_frame_q <= !rx_eop;
    end
  end

  // ---------------- parser ----------------
  ip_parser #(.DATA_W(DATA_W)) u_parser (
    .clk, .rst_n,
    .in_valid (wr_en), .in_data (rx_data), .in_sop (rx_sop), .in_eop (rx_eop),
    .q_valid, .q_ip, .q_ipv4
  );

  // ---------------- packet FIFO ----------------
  logic               rd_valid, rd_ready;
  logic [DATA_W-1:0]  rd_data;
  logic               rd_sop, rd_eop;
  logic [EMPTY_W-1:0] rd_empty;

  packet_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_valid (wr_en), .wr_ready (wr_ready), .wr_data (rx_data),
    .wr_sop (rx_sop), .wr_eop (rx_eop), .wr_empty (rx_empty),
    .rd_valid, .rd_ready, .rd_data, .rd_sop, .rd_eop, .rd_empty,
    .free_words
  );

  // ---------------- forwarding action ----------------
  logic busy_q, dest_q;     // frame in progress, and its destination (1 = DMA)
  logic dest, can_go, out_ready, fire;

  assign dest      = busy_q ? dest_q : r_suspicious;
  assign can_go    = rd_valid && (busy_q || r_valid);
  assign out_ready = dest ? dma_ready : net_ready;
  assign fire      = can_go && out_ready;
  assign rd_ready  = fire;
  assign r_ready   = fire && !busy_q;

  assign net_valid = can_go && !dest;
  assign dma_valid = can_go &&  dest;
  assign net_data  = rd_data;
  assign dma_data  = rd_data;
  assign net_sop   = rd_sop;
  assign dma_sop   = rd_sop;
  assign net_eop   = rd_eop;
  assign dma_eop   = rd_eop;
  assign net_empty = rd_empty;
  assign dma_empty = rd_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q     <= 1'b0;
      dest_q     <= 1'b0;
      frames_net <= '0;
      frames_dma <= '0;
    end else if (fire) begin
      dest_q <= dest;
      busy_q <= !rd_eop;
      if (rd_eop) begin
        if (dest) frames_dma <= frames_dma + 1'b1;
        else      frames_net <= frames_net + 1'b1;
      end
    end
  end

  // Kept frames always fit; a frame at the head starts with its first word.
  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> wr_ready);
  assert property (@(posedge clk) disable iff (!rst_n) (rd_valid && !busy_q) |-> rd_sop);

endmodule
