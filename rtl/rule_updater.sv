// Rule Updating Module: host access to the rule memory, online.
//
// The host driver keeps the complete blacklist and computes, for every
// change, the new contents of the affected rule-memory word (several
// addresses can share a hash bit, so only the host knows whether a bit may
// be cleared). It sends the word over the Local Bus as a write; it can also
// read any word back to check that hardware and software tables agree.
//
// Pipeline, in the system clock domain:
//   1. a Local Bus request (lb_valid/lb_ready) is taken into a register;
//   2. the register is handed to the updater's Request FIFO;
//   3. for reads only, the answer is returned on lb_rdata_valid/lb_rdata,
//      in request order.
// lb_ready is low while the register is occupied or while MAX_RD reads are
// outstanding, which bounds the answers the Request FIFO must hold.
// The three steps follow the document; the Local Bus signals, whole-word
// writes and the read limit are this design's choices. Counters report the
// writes and reads carried out.
module rule_updater #(
  parameter int unsigned MAX_RD = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // Local Bus (from the PCIe bridge)
  input  logic                        lb_valid,
  output logic                        lb_ready,
  input  logic                        lb_we,
  input  logic [urlf_pkg::MEM_AW-1:0] lb_addr,
  input  logic [urlf_pkg::MEM_DW-1:0] lb_wdata,
  output logic                        lb_rdata_valid,
  output logic [urlf_pkg::MEM_DW-1:0] lb_rdata,
  // to the Request FIFO
  output logic                        req_valid,
  input  logic                        req_ready,
  output urlf_pkg::mem_req_t          req,
  input  logic                        resp_valid,
  input  logic [urlf_pkg::MEM_DW-1:0] resp_data,
  // statistics
  output logic [31:0]                 writes_done,
  output logic [31:0]                 reads_done
);

  import urlf_pkg::*;

  localparam int unsigned OW = $clog2(MAX_RD+1);

  logic [OW-1:0] outstanding;     // reads sent and not yet answered
  logic          take, send;

  assign lb_ready = !req_valid && (outstanding < OW'(MAX_RD));
  assign take     = lb_valid && lb_ready;
  assign send     = req_valid && req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_valid      <= 1'b0;
      req            <= '0;
      outstanding    <= '0;
      lb_rdata_valid <= 1'b0;
      lb_rdata       <= '0;
      writes_done    <= '0;
      reads_done     <= '0;
    end else begin
      if (send) req_valid <= 1'b0;
      if (take) begin
        req_valid <= 1'b1;
        req.we    <= lb_we;
        req.addr  <= lb_addr;
        req.wdata <= lb_we ? lb_wdata : '0;
      end
      outstanding <= outstanding + OW'(send && !req.we) - OW'(resp_valid);
      if (send && req.we) writes_done <= writes_done + 1'b1;
      lb_rdata_valid <= resp_valid;
      if (resp_valid) begin
        lb_rdata   <= resp_data;
        reads_done <= reads_done + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) resp_valid |-> outstanding != '0);

endmodule
