// Small single-clock FIFO for lookup queries and match results.
//
// First-word fall-through: rd_data shows the head entry whenever rd_valid is
// high. Write and read hand-shakes are valid/ready; wr_ready = not full,
// rd_valid = not empty. Simultaneous write and read are allowed when full.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned CNT_W = $clog2(DEPTH+1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data,
  output logic [CNT_W-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wptr, rptr;
  logic             do_wr, do_rd;

  assign rd_valid = (count != '0);
  assign wr_ready = (count != CNT_W'(DEPTH)) || rd_ready;
  assign do_rd    = rd_valid && rd_ready;
  assign do_wr    = wr_valid && wr_ready;
  assign rd_data  = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
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

endmodule
