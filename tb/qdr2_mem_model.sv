// Behavioural model of the rule memory as seen through its controller:
// QDR-II SRAM plus the user side of a MIG-style controller.
//
// Write and read commands are taken on separate strobes whenever the
// corresponding full flag is low. A read returns the word RD_LAT memory
// clocks later (app_rd_valid/app_rd_data), in order; writes take effect
// at once. When STALL_PCT > 0 the full flags are raised at random in that
// share of cycles to exercise back-pressure. The array starts cleared.
// Not synthesizable: testbench use only.
module qdr2_mem_model #(
  parameter int unsigned AW        = urlf_pkg::MEM_AW,
  parameter int unsigned DW        = urlf_pkg::MEM_DW,
  parameter int unsigned RD_LAT    = 6,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic          clk,
  input  logic          app_wr_cmd,
  input  logic [AW-1:0] app_wr_addr,
  input  logic [DW-1:0] app_wr_data,
  output logic          app_wr_full,
  input  logic          app_rd_cmd,
  input  logic [AW-1:0] app_rd_addr,
  output logic          app_rd_full,
  output logic          app_rd_valid,
  output logic [DW-1:0] app_rd_data
);

  logic [DW-1:0] mem [2**AW];
  logic          pipe_v [RD_LAT];
  logic [DW-1:0] pipe_d [RD_LAT];
  int unsigned   stalls;

  initial begin
    for (int unsigned i = 0; i < 2**AW; i++) mem[i] = '0;
    for (int i = 0; i < RD_LAT; i++) begin
      pipe_v[i] = 1'b0;
      pipe_d[i] = '0;
    end
    app_wr_full = 1'b0;
    app_rd_full = 1'b0;
    stalls      = 0;
  end

  assign app_rd_valid = pipe_v[RD_LAT-1];
  assign app_rd_data  = pipe_d[RD_LAT-1];

  always @(posedge clk) begin
    for (int i = RD_LAT-1; i > 0; i--) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
    pipe_v[0] <= app_rd_cmd && !app_rd_full;
    pipe_d[0] <= mem[app_rd_addr];
    if (app_wr_cmd && !app_wr_full) mem[app_wr_addr] <= app_wr_data;
    if (STALL_PCT > 0) begin
      app_wr_full <= ($urandom_range(99) < STALL_PCT);
      app_rd_full <= ($urandom_range(99) < STALL_PCT);
      if (app_wr_full || app_rd_full) stalls <= stalls + 1;
    end
  end

endmodule
