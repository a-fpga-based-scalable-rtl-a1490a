// Self-checking test of request_fifo: requests from a 125 MHz requester
// cross into the 250 MHz memory domain and read answers come back.
// The memory side here is a simple responder with random command
// acceptance and a fixed read delay, answering reads with a known function
// of the address. Checks: every write appears once, in order, on the write
// channel with its address and data; reads appear on the read channel only;
// answers return to the requester in order with the right data.
module tb_request_fifo;
  import urlf_pkg::*;
  logic sys_clk = 0, mem_clk = 0, sys_rst_n = 0, mem_rst_n = 0;
  always #4 sys_clk = ~sys_clk;
  always #2 mem_clk = ~mem_clk;
    // Give every asynchronous reset a falling edge.
  initial begin
    sys_rst_n = 1; mem_rst_n = 1;
    #1 sys_rst_n = 0; mem_rst_n = 0;
  end
  int checks = 0, failures = 0;

  logic req_valid, req_ready, resp_valid;
  mem_req_t req;
  logic [MEM_DW-1:0] resp_data;
  logic wr_cmd_valid, wr_cmd_ready, rd_cmd_valid, rd_cmd_ready, rd_data_valid;
  logic [MEM_AW-1:0] wr_cmd_addr, rd_cmd_addr;
  logic [MEM_DW-1:0] wr_cmd_data, rd_data;

  request_fifo #(.REQ_DEPTH(16), .RSP_DEPTH(64)) dut (.*);

  function automatic logic [MEM_DW-1:0] answer(logic [MEM_AW-1:0] a);
    return {a[10:0], a} ^ 32'h5A5A_0F0F;
  endfunction

  mem_req_t sent [$];                   // all requests, in order
  logic [MEM_DW-1:0] exp_rd [$];        // expected answers
  logic [MEM_DW-1:0] delay_q [$];
  int   delay_t [$];
  int   mcyc = 0, nreads = 0, nwrites = 0;
  localparam int N = 3000;

  // memory side
  always @(posedge mem_clk) begin
    mcyc <= mcyc + 1;
    wr_cmd_ready <= $urandom_range(3) != 0;
    rd_cmd_ready <= $urandom_range(3) != 0;
    rd_data_valid <= 0;
    if (delay_t.size() != 0 && delay_t[0] <= mcyc) begin
      rd_data_valid <= 1;
      rd_data <= delay_q.pop_front();
      void'(delay_t.pop_front());
    end
    if (wr_cmd_valid && rd_cmd_valid) begin failures++; $display("FAIL both channels offered"); end
    if ((wr_cmd_valid && wr_cmd_ready) || (rd_cmd_valid && rd_cmd_ready)) begin
      mem_req_t e;
      checks++;
      e = sent.pop_front();
      if (wr_cmd_valid) begin
        if (!e.we || e.addr != wr_cmd_addr || e.wdata != wr_cmd_data) begin
          failures++; $display("FAIL write %h/%h expected %p", wr_cmd_addr, wr_cmd_data, e);
        end
      end else begin
        if (e.we || e.addr != rd_cmd_addr) begin
          failures++; $display("FAIL read %h expected %p", rd_cmd_addr, e);
        end
        delay_q.push_back(answer(rd_cmd_addr));
        delay_t.push_back(mcyc + 5);
      end
    end
  end

  // requester answers
  always @(posedge sys_clk) begin
    if (resp_valid) begin
      checks++;
      if (exp_rd.size() == 0 || resp_data != exp_rd[0]) begin
        failures++; $display("FAIL answer %08h", resp_data);
      end
      if (exp_rd.size() != 0) void'(exp_rd.pop_front());
    end
  end

  logic fire = 0;
  always @(posedge sys_clk) fire <= req_valid && req_ready;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int outstanding;
  initial begin
    req_valid = 0; req = '0; wr_cmd_ready = 0; rd_cmd_ready = 0; rd_data_valid = 0; rd_data = '0;
    #20 sys_rst_n = 1; mem_rst_n = 1;
    @(posedge sys_clk); #1;
    for (int k = 0; k < N; k++) begin
      one_req: begin
        mem_req_t r;
        r.we = $urandom_range(1);
        r.addr = MEM_AW'($urandom);
        r.wdata = r.we ? $urandom : '0;
        // stay within the answer budget of the response FIFO
        while (exp_rd.size() > 48) begin @(posedge sys_clk); #1; end
        req_valid = 1; req = r;
        do begin @(posedge sys_clk); #1; end while (!fire);
        req_valid = 0;
        sent.push_back(r);
        if (r.we) nwrites++; else begin nreads++; exp_rd.push_back(answer(r.addr)); end
      end
    end
    wait (exp_rd.size() == 0 && sent.size() == 0);
    repeat (10) @(posedge sys_clk);
    checks++;
    if (nreads == 0 || nwrites == 0) begin failures++; $display("FAIL mix"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
