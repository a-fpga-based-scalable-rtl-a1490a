// Self-checking test of packet_matching.
// A rule table of 64 "forbidden" addresses is loaded into a model of the
// rule memory (hash computed here with a table-driven CRC-32). Both
// interfaces push random queries (a third of them forbidden addresses, some
// non-IPv4); the memory model takes requests with random ready and answers
// in order after 12 cycles. Checks:
//   * every result, per interface and in query order, equals "IPv4 and the
//     hash bit is set" (hash collisions included);
//   * lookups of interface 0 and 1 use opposite cycle parities (equal time
//     slots);
//   * while an interface does not take its results, it has at most RDEPTH
//     lookups in progress (credit), and the other interface keeps going;
//   * the lookup and hit counters.
module tb_packet_matching;
  import urlf_pkg::*;
  localparam int RDEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;
  initial begin
    rst_n = 1;
    #1 rst_n = 0;
  end
  int checks = 0, failures = 0;

  logic        q_valid [2], q_ipv4 [2], r_valid [2], r_suspicious [2], r_ready [2];
  logic [31:0] q_ip [2];
  logic [3:0]  q_free [2];
  logic        mreq_valid, mreq_ready, mresp_valid;
  logic [MEM_AW-1:0] mreq_addr;
  logic [MEM_DW-1:0] mresp_data;
  logic [31:0] lookups, hits;

  packet_matching #(.QDEPTH(8), .RDEPTH(RDEPTH), .TAGDEPTH(32)) dut (.*);

  logic [31:0] crc_table [256];
  function automatic logic [25:0] ref_hash(logic [31:0] a);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    for (int b = 3; b >= 0; b--) c = crc_table[(c ^ 32'(a[8*b +: 8])) & 32'hFF] ^ (c >> 8);
    c = ~c;
    return c[25:0];
  endfunction

  logic [31:0] forbidden [64];
  logic [MEM_DW-1:0] mem [logic [MEM_AW-1:0]];
  function automatic bit bit_set(logic [31:0] a);
    logic [25:0] h;
    h = ref_hash(a);
    return mem.exists(h[25:5]) ? mem[h[25:5]][h[4:0]] : 1'b0;
  endfunction

  // expected results and issue bookkeeping per interface
  bit          exp_res [2][$];
  logic [MEM_AW-1:0] exp_addr [2][$];
  int cyc = 0, parity [2] = '{-1, -1}, issued [2] = '{0, 0}, got [2] = '{0, 0};
  int exp_hits = 0, total_q = 0;
  logic [MEM_DW-1:0] ans_q [$];
  int ans_t [$];
  bit mem_always_ready = 0, hold_if0 = 0;
  int max_if0_pending = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    mreq_ready <= mem_always_ready || ($urandom_range(3) != 0);
    for (int i = 0; i < 2; i++) r_ready[i] <= !(i == 0 && hold_if0) && ($urandom_range(3) != 0);
    mresp_valid <= 0;
    if (ans_t.size() != 0 && ans_t[0] <= cyc) begin
      mresp_valid <= 1;
      mresp_data  <= ans_q.pop_front();
      void'(ans_t.pop_front());
    end
    if (mreq_valid && mreq_ready) begin
      int i;
      i = -1;
      if (issued[0] < exp_addr[0].size() && exp_addr[0][issued[0]] == mreq_addr && (parity[0] == -1 || parity[0] == cyc % 2)) i = 0;
      else if (issued[1] < exp_addr[1].size() && exp_addr[1][issued[1]] == mreq_addr) i = 1;
      checks++;
      if (i < 0) begin failures++; $display("FAIL unexpected lookup address %h", mreq_addr); end
      else begin
        if (parity[i] == -1) parity[i] = cyc % 2;
        if (parity[i] != cyc % 2) begin failures++; $display("FAIL interface %0d issued outside its slot", i); end
        issued[i]++;
      end
      ans_q.push_back(mem.exists(mreq_addr) ? mem[mreq_addr] : '0);
      ans_t.push_back(cyc + 12);
    end
    if (issued[0] - got[0] > max_if0_pending) max_if0_pending = issued[0] - got[0];
    for (int i = 0; i < 2; i++) begin
      if (r_valid[i] && r_ready[i]) begin
        checks++;
        got[i]++;
        if (exp_res[i].size() == 0 || r_suspicious[i] != exp_res[i][0]) begin
          failures++; $display("FAIL interface %0d result %0d", i, r_suspicious[i]);
        end
        if (exp_res[i].size() != 0) void'(exp_res[i].pop_front());
      end
    end
  end

  task automatic feeder(int i, int n);
    for (int k = 0; k < n; k++) begin
      logic [31:0] ip;
      bit v4;
      ip = ($urandom_range(2) == 0) ? forbidden[$urandom_range(63)] : $urandom;
      v4 = ($urandom_range(7) != 0);
      while (q_free[i] < 2) begin @(posedge clk); #1; end
      q_valid[i] = 1; q_ip[i] = ip; q_ipv4[i] = v4;
      exp_res[i].push_back(v4 && bit_set(ip));
      exp_addr[i].push_back(ref_hash(ip) >> 5);
      if (v4 && bit_set(ip)) exp_hits++;
      total_q++;
      @(posedge clk); #1;
      q_valid[i] = 0;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      logic [31:0] c;
      c = 32'(n);
      for (int k = 0; k < 8; k++) c = c[0] ? (c >> 1) ^ 32'hEDB8_8320 : c >> 1;
      crc_table[n] = c;
    end
    for (int f = 0; f < 64; f++) begin
      logic [25:0] h;
      forbidden[f] = $urandom;
      h = ref_hash(forbidden[f]);
      if (!mem.exists(h[25:5])) mem[h[25:5]] = '0;
      mem[h[25:5]][h[4:0]] = 1'b1;
    end
    for (int i = 0; i < 2; i++) begin q_valid[i] = 0; q_ip[i] = '0; q_ipv4[i] = 0; r_ready[i] = 0; end
    mreq_ready = 0; mresp_valid = 0; mresp_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Phase 1: random traffic on both interfaces.
    fork
      feeder(0, 1500);
      feeder(1, 1500);
    join
    wait (exp_res[0].size() == 0 && exp_res[1].size() == 0);
    // Phase 2: interface 0 stops taking results; interface 1 continues.
    hold_if0 = 1;
    mem_always_ready = 1;
    fork
      feeder(0, 40);
      feeder(1, 300);
    join_any
    repeat (200) @(posedge clk);
    checks++;
    if (max_if0_pending != RDEPTH) begin
      failures++; $display("FAIL interface 0 had up to %0d lookups pending", max_if0_pending);
    end
    hold_if0 = 0;
    wait fork;
    wait (exp_res[0].size() == 0 && exp_res[1].size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (lookups != 32'(total_q) || hits != 32'(exp_hits)) begin
      failures++; $display("FAIL counters %0d/%0d %0d/%0d", lookups, total_q, hits, exp_hits);
    end
    checks++;
    if (exp_hits == 0) begin failures++; $display("FAIL no forbidden address seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
