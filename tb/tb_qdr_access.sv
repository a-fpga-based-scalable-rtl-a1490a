// Self-checking test of qdr_access: two requesters in the 125 MHz system
// domain share the rule memory (behavioural QDR-II + controller model in
// the 250 MHz domain, with random back-pressure).
// Phase 1: requester 1 (updater) writes 256 words in region A.
// Phase 2: requester 0 (filter) reads region A while requester 1 keeps
// writing and reading region B. Checks every answer against a reference
// and that both requesters were granted memory slots during phase 2.
module tb_qdr_access;
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

  logic              req_valid [2], req_ready [2], resp_valid [2];
  mem_req_t          req [2];
  logic [MEM_DW-1:0] resp_data [2];
  logic              app_wr_cmd, app_wr_full, app_rd_cmd, app_rd_full, app_rd_valid;
  logic [MEM_AW-1:0] app_wr_addr, app_rd_addr;
  logic [MEM_DW-1:0] app_wr_data, app_rd_data;
  logic [31:0]       grants [2];

  qdr_access dut (.*);
  qdr2_mem_model #(.RD_LAT(6), .STALL_PCT(20)) u_mem (.clk(mem_clk), .*);

  logic [MEM_DW-1:0] ref_mem [logic [MEM_AW-1:0]];
  logic [MEM_DW-1:0] expq [2][$];
  logic fired [2] = '{0, 0};

  always @(posedge sys_clk) begin
    for (int r = 0; r < 2; r++) begin
      fired[r] <= req_valid[r] && req_ready[r];
      if (resp_valid[r]) begin
        checks++;
        if (expq[r].size() == 0 || resp_data[r] != expq[r][0]) begin
          failures++; $display("FAIL requester %0d answer %08h", r, resp_data[r]);
        end
        if (expq[r].size() != 0) void'(expq[r].pop_front());
      end
    end
  end

  function automatic logic [MEM_DW-1:0] rd_ref(logic [MEM_AW-1:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : '0;
  endfunction

  task automatic issue(int r, logic we, logic [MEM_AW-1:0] a, logic [MEM_DW-1:0] d);
    while (expq[r].size() > 40) begin @(posedge sys_clk); #1; end
    req_valid[r] = 1; req[r] = '{we: we, addr: a, wdata: d};
    do begin @(posedge sys_clk); #1; end while (!fired[r]);
    req_valid[r] = 0;
    if (we) ref_mem[a] = d;
    else    expq[r].push_back(rd_ref(a));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] g0, g1;
  initial begin
    for (int r = 0; r < 2; r++) begin req_valid[r] = 0; req[r] = '0; end
    #20 sys_rst_n = 1; mem_rst_n = 1;
    @(posedge sys_clk); #1;
    for (int k = 0; k < 256; k++) issue(1, 1, MEM_AW'(21'h10_0000 + k), $urandom);
    repeat (50) @(posedge sys_clk);
    #1;
    g0 = grants[0]; g1 = grants[1];
    fork
      for (int k = 0; k < 1500; k++) issue(0, 0, MEM_AW'(21'h10_0000 + $urandom_range(255)), '0);
      for (int k = 0; k < 1500; k++) issue(1, $urandom_range(1), MEM_AW'(21'h00_0400 + $urandom_range(63)), $urandom);
    join
    wait (expq[0].size() == 0 && expq[1].size() == 0);
    repeat (10) @(posedge sys_clk);
    checks++;
    if (grants[0] - g0 != 1500 || grants[1] - g1 != 1500) begin
      failures++; $display("FAIL grants %0d %0d", grants[0] - g0, grants[1] - g1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
