// Packet FIFO: single-clock first-in first-out store for frame words.
//
// Each entry is one bus word of a frame together with its framing flags
// (start, end, number of unused bytes in the last word). The default size,
// 128 bits x 512 words, is the one of the 10 Gbps implementation, where the
// memory access delay is under 15 cycles. The storage is a plain array read
// combinationally at the head (first-word fall-through), which keeps the
// hand-shake simple; a block-RAM implementation would add one output register.
//
// Interface: valid/ready on both sides. wr_ready = not full, rd_valid = not
// empty. A word written in cycle t can be read in cycle t+1. free_words
// reports the space left, used by writers that must reserve room for a whole
// frame before they start it.
module packet_fifo #(
  parameter int unsigned DATA_W = 128,
  parameter int unsigned DEPTH  = 512,
  localparam int unsigned EMPTY_W = $clog2(DATA_W/8),
  localparam int unsigned CNT_W   = $clog2(DEPTH+1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // write side
  input  logic               wr_valid,
  output logic               wr_ready,
  input  logic [DATA_W-1:0]  wr_data,
  input  logic               wr_sop,
  input  logic               wr_eop,
  input  logic [EMPTY_W-1:0] wr_empty,
  // read side
  output logic               rd_valid,
  input  logic               rd_ready,
  output logic [DATA_W-1:0]  rd_data,
  output logic               rd_sop,
  output logic               rd_eop,
  output logic [EMPTY_W-1:0] rd_empty,
  // status
  output logic [CNT_W-1:0]   free_words
);

  localparam int unsigned PTR_W = $clog2(DEPTH);
  localparam int unsigned ENT_W = DATA_W + 2 + EMPTY_W;

  logic [ENT_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wptr, rptr;
  logic [CNT_W-1:0] count;
  logic             do_wr, do_rd;

  assign wr_ready   = (count != CNT_W'(DEPTH));
  assign rd_valid   = (count != '0);
  assign do_wr      = wr_valid && wr_ready;
  assign do_rd      = rd_valid && rd_ready;
  assign free_words = CNT_W'(DEPTH) - count;

  assign {rd_sop, rd_eop, rd_empty, rd_data} = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= {wr_sop, wr_eop, wr_empty, wr_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == PTR_W'(DEPTH-1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == PTR_W'(DEPTH-1)) ? '0 : rptr + 1'b1;
      count <= count + CNT_W'(do_wr) - CNT_W'(do_rd);
    end
  end

  // A reader never sees an empty FIFO's stale data, a writer never overruns.
  assert property (@(posedge clk) disable iff (!rst_n) count <= CNT_W'(DEPTH));

endmodule
