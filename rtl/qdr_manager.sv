// QDR-II Manager Module: shares the rule memory between its requesters.
//
// Works in the memory clock domain, in three steps:
//   1. select: among the requesters whose Request FIFO offers a command the
//      controller can take now, pick one round-robin (the last served one
//      has lowest priority);
//   2. send: the chosen command is registered and presented on the memory
//      controller's write or read channel until the controller accepts it
//      (app_*_full low); selection continues in the same cycle the register
//      empties, so one command per cycle is sustained;
//   3. return: for every read, the requester number is queued in issue
//      order; each read answer (app_rd_valid) pops that queue and is sent to
//      the requester that asked for it.
// The controller user side follows the style of a MIG QDR-II interface:
// separate write and read command strobes with full flags, in-order read
// data. The read data bus itself (rd_data) is shared by all requesters and
// is wired straight from the controller; only the per-requester valid
// strobes are steered, which adds no cycle on the return path.
// The three steps follow the document; round-robin selection and the
// depth of the owner queue (reads in flight) are this design's choices.
module qdr_manager #(
  parameter int unsigned NREQ      = 2,
  parameter int unsigned RD_INFLT  = 64,   // reads in flight in the controller
  localparam int unsigned ID_W     = (NREQ > 1) ? $clog2(NREQ) : 1
) (
  input  logic                        clk,      // memory clock
  input  logic                        rst_n,
  // requester side (from the Request FIFO modules)
  input  logic                        wr_cmd_valid [NREQ],
  input  logic [urlf_pkg::MEM_AW-1:0] wr_cmd_addr  [NREQ],
  input  logic [urlf_pkg::MEM_DW-1:0] wr_cmd_data  [NREQ],
  output logic                        wr_cmd_ready [NREQ],
  input  logic                        rd_cmd_valid [NREQ],
  input  logic [urlf_pkg::MEM_AW-1:0] rd_cmd_addr  [NREQ],
  output logic                        rd_cmd_ready [NREQ],
  output logic                        rd_data_valid[NREQ],
  output logic [urlf_pkg::MEM_DW-1:0] rd_data,
  // memory controller user side
  output logic                        app_wr_cmd,
  output logic [urlf_pkg::MEM_AW-1:0] app_wr_addr,
  output logic [urlf_pkg::MEM_DW-1:0] app_wr_data,
  input  logic                        app_wr_full,
  output logic                        app_rd_cmd,
  output logic [urlf_pkg::MEM_AW-1:0] app_rd_addr,
  input  logic                        app_rd_full,
  input  logic                        app_rd_valid,
  input  logic [urlf_pkg::MEM_DW-1:0] app_rd_data,
  // statistics: commands granted per requester
  output logic [31:0]                 grants [NREQ]
);

  import urlf_pkg::*;

  // ---------------- step 2 register ----------------
  logic              s_valid, s_we;
  logic [ID_W-1:0]   s_id;
  logic [MEM_AW-1:0] s_addr;
  logic [MEM_DW-1:0] s_data;
  logic              s_done;       // command leaves the register this cycle
  logic              s_free;       // register can load a new command

  assign app_wr_cmd  = s_valid &&  s_we;
  assign app_rd_cmd  = s_valid && !s_we;
  assign app_wr_addr = s_addr;
  assign app_rd_addr = s_addr;
  assign app_wr_data = s_data;
  assign s_done = s_valid && (s_we ? !app_wr_full : !app_rd_full);

  // ---------------- owner queue (step 3) ----------------
  logic            own_wready, own_valid;
  logic [ID_W-1:0] own_id;
  logic [$clog2(RD_INFLT+1)-1:0] own_count;

  assign s_free = (!s_valid || s_done);

  // ---------------- step 1: round-robin selection ----------------
  logic            req_any   [NREQ];
  logic [ID_W-1:0] last;
  logic            pick_valid;
  logic [ID_W-1:0] pick;

  always_comb begin
    for (int r = 0; r < NREQ; r++)
      req_any[r] = wr_cmd_valid[r] || (rd_cmd_valid[r] && own_wready);
    pick_valid = 1'b0;
    pick       = '0;
    for (int k = 1; k <= NREQ; k++) begin
      int unsigned r;
      r = (int'(last) + k) % NREQ;
      if (!pick_valid && req_any[r]) begin
        pick_valid = 1'b1;
        pick       = ID_W'(r);
      end
    end
  end

  logic load;
  assign load = s_free && pick_valid;

  always_comb begin
    for (int r = 0; r < NREQ; r++) begin
      wr_cmd_ready[r] = load && (pick == ID_W'(r)) && wr_cmd_valid[r];
      rd_cmd_ready[r] = load && (pick == ID_W'(r)) && !wr_cmd_valid[r];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      s_we    <= 1'b0;
      s_id    <= '0;
      s_addr  <= '0;
      s_data  <= '0;
      last    <= ID_W'(NREQ-1);
      for (int r = 0; r < NREQ; r++) grants[r] <= '0;
    end else begin
      if (s_done) s_valid <= 1'b0;
      if (load) begin
        s_valid <= 1'b1;
        s_we    <= wr_cmd_valid[pick];
        s_id    <= pick;
        s_addr  <= wr_cmd_valid[pick] ? wr_cmd_addr[pick] : rd_cmd_addr[pick];
        s_data  <= wr_cmd_data[pick];
        last    <= pick;
        grants[pick] <= grants[pick] + 1'b1;
      end
    end
  end

  // A read enters the owner queue when it is accepted by the controller.
  sync_fifo #(.WIDTH(ID_W), .DEPTH(RD_INFLT)) u_owner (
    .clk, .rst_n,
    .wr_valid (s_done && !s_we), .wr_ready (own_wready), .wr_data (s_id),
    .rd_valid (own_valid), .rd_ready (app_rd_valid), .rd_data (own_id),
    .count    (own_count)
  );

  assign rd_data = app_rd_data;
  always_comb begin
    for (int r = 0; r < NREQ; r++)
      rd_data_valid[r] = app_rd_valid && (own_id == ID_W'(r));
  end

  assert property (@(posedge clk) disable iff (!rst_n) app_rd_valid |-> own_valid);

endmodule
