// Self-checking test of rule_updater.
// The host side sends random Local Bus writes and reads; the Request FIFO
// side is modelled here: it accepts requests with random ready and answers
// reads after a long, fixed delay from its own copy of the rule memory.
// Checks: requests reach the Request FIFO once each, in order, with the
// right type, address and data; read answers come back on the Local Bus in
// order with the right data; never more than MAX_RD reads are outstanding
// and the limit is actually reached; the write and read counters.
module tb_rule_updater;
  import urlf_pkg::*;
  localparam int MAX_RD = 4;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;
  initial begin
    rst_n = 1;
    #1 rst_n = 0;
  end
  int checks = 0, failures = 0;

  logic lb_valid, lb_ready, lb_we, lb_rdata_valid, req_valid, req_ready, resp_valid;
  logic [MEM_AW-1:0] lb_addr;
  logic [MEM_DW-1:0] lb_wdata, lb_rdata, resp_data;
  mem_req_t req;
  logic [31:0] writes_done, reads_done;

  rule_updater #(.MAX_RD(MAX_RD)) dut (.*);

  logic [MEM_DW-1:0] mem [logic [MEM_AW-1:0]];
  mem_req_t sent [$];
  logic [MEM_DW-1:0] lb_exp [$];
  logic [MEM_DW-1:0] ans_q [$];
  int ans_t [$];
  int cyc = 0, outstanding = 0, max_out = 0, nw = 0, nr = 0;

  function automatic logic [MEM_DW-1:0] rd(logic [MEM_AW-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  // Request FIFO model
  always @(posedge clk) begin
    cyc <= cyc + 1;
    req_ready <= ($urandom_range(2) != 0);
    resp_valid <= 0;
    if (ans_t.size() != 0 && ans_t[0] <= cyc) begin
      resp_valid <= 1;
      resp_data  <= ans_q.pop_front();
      void'(ans_t.pop_front());
      outstanding--;
    end
    if (req_valid && req_ready) begin
      mem_req_t e;
      checks++;
      e = sent.pop_front();
      if (req.we != e.we || req.addr != e.addr || (e.we && req.wdata != e.wdata)) begin
        failures++; $display("FAIL request %p expected %p", req, e);
      end
      if (req.we) mem[req.addr] = req.wdata;
      else begin
        ans_q.push_back(rd(req.addr));
        ans_t.push_back(cyc + 30);
        outstanding++;
        if (outstanding > max_out) max_out = outstanding;
      end
    end
    if (lb_rdata_valid) begin
      checks++;
      if (lb_exp.size() == 0 || lb_rdata != lb_exp[0]) begin
        failures++; $display("FAIL Local Bus read data %08h", lb_rdata);
      end
      if (lb_exp.size() != 0) void'(lb_exp.pop_front());
    end
  end

  logic fire = 0;
  always @(posedge clk) fire <= lb_valid && lb_ready;

  // host-side shadow of the memory, updated in Local Bus order
  logic [MEM_DW-1:0] shadow [logic [MEM_AW-1:0]];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lb_valid = 0; lb_we = 0; lb_addr = '0; lb_wdata = '0; resp_valid = 0; resp_data = '0; req_ready = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      mem_req_t r;
      r.we    = ($urandom_range(2) == 0);
      r.addr  = MEM_AW'($urandom_range(31));
      r.wdata = r.we ? $urandom : '0;
      lb_valid = 1; lb_we = r.we; lb_addr = r.addr; lb_wdata = r.wdata;
      do begin @(posedge clk); #1; end while (!fire);
      lb_valid = 0;
      sent.push_back(r);
      if (r.we) begin shadow[r.addr] = r.wdata; nw++; end
      else begin lb_exp.push_back(shadow.exists(r.addr) ? shadow[r.addr] : '0); nr++; end
      if ($urandom_range(3) == 0) begin @(posedge clk); #1; end
    end
    wait (lb_exp.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (max_out != MAX_RD) begin failures++; $display("FAIL max outstanding reads %0d", max_out); end
    checks++;
    if (writes_done != 32'(nw) || reads_done != 32'(nr)) begin
      failures++; $display("FAIL counters %0d/%0d %0d/%0d", writes_done, nw, reads_done, nr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
