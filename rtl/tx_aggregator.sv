// Output aggregation of one network port.
//
// Merges two frame streams onto one output: input A carries frames the
// filter let through from the opposite port, input B carries frames the host
// sends back by DMA (suspicious frames it decided to let pass, or its own
// traffic). Frames are never interleaved: when idle the aggregator picks an
// input whose head word is a start of frame, alternating between the inputs
// when both are waiting, and stays with it until the end-of-frame word has
// been sent. Words pass combinationally (valid/ready), no storage is added;
// the FIFOs around it (forwarding FIFO, DMA receive FIFO, output FIFO)
// absorb the waiting. The need to aggregate the two sources is in the
// document; the alternating, frame-atomic rule is this design's choice.
module tx_aggregator #(
  parameter int unsigned DATA_W = 128,
  localparam int unsigned EMPTY_W = $clog2(DATA_W/8)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               a_valid,
  output logic               a_ready,
  input  logic [DATA_W-1:0]  a_data,
  input  logic               a_sop,
  input  logic               a_eop,
  input  logic [EMPTY_W-1:0] a_empty,
  input  logic               b_valid,
  output logic               b_ready,
  input  logic [DATA_W-1:0]  b_data,
  input  logic               b_sop,
  input  logic               b_eop,
  input  logic [EMPTY_W-1:0] b_empty,
  output logic               o_valid,
  input  logic               o_ready,
  output logic [DATA_W-1:0]  o_data,
  output logic               o_sop,
  output logic               o_eop,
  output logic [EMPTY_W-1:0] o_empty,
  output logic [31:0]        frames_a,
  output logic [31:0]        frames_b
);

  logic busy_q, sel_q;      // in a frame, and from which input (1 = B)
  logic prefer_b_q;         // B goes first on the next tie
  logic sel;

  always_comb begin
    if (busy_q)                    sel = sel_q;
    else if (a_valid && b_valid)   sel = prefer_b_q;
    else                           sel = b_valid;
  end

  assign o_valid = sel ? b_valid : a_valid;
  assign o_data  = sel ? b_data  : a_data;
  assign o_sop   = sel ? b_sop   : a_sop;
  assign o_eop   = sel ? b_eop   : a_eop;
  assign o_empty = sel ? b_empty : a_empty;
  assign a_ready = o_ready && !sel;
  assign b_ready = o_ready &&  sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q     <= 1'b0;
      sel_q      <= 1'b0;
      prefer_b_q <= 1'b0;
      frames_a   <= '0;
      frames_b   <= '0;
    end else if (o_valid && o_ready) begin
      sel_q  <= sel;
      busy_q <= !o_eop;
      if (o_eop) begin
        prefer_b_q <= !sel;
        if (sel) frames_b <= frames_b + 1'b1;
        else     frames_a <= frames_a + 1'b1;
      end
    end
  end

  // Frames start only when idle, on a start-of-frame word.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (o_valid && o_ready && !busy_q) |-> o_sop);

endmodule
