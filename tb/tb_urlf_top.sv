// End-to-end test of urlf_top at its default parameters (128-bit frame
// bus, 512-word FIFOs, 2^21 x 32-bit rule memory), with a behavioural model
// of the QDR-II memory and its controller (6 memory-clock read latency,
// random back-pressure) and a model of the host software.
//
// The host model loads a blacklist through the Local Bus (each rule write
// is confirmed by reading the word back), reads words back,
// receives suspicious frames by DMA, sends about half of them back out
// (re-injection through the DMA receive path and the port's aggregator),
// and adds a rule while traffic flows. Frames carry their origin port and
// sequence number, and a payload computed from them.
//
// Phases:
//   1. rule load and read-back;
//   2. isolated frame: lookup latency (query to result) and the time for a
//      frame to cross the filter;
//   3. both ports at 10 Gbps line rate with 64-byte frames (one frame every
//      8.4 cycles at 125 MHz): nothing may be dropped;
//   4. mixed traffic with random sizes, non-IPv4 frames, output
//      back-pressure, host re-injection, and a rule added on line;
//   5. port-0 transmit output blocked while port 1 receives minimum-size
//      frames back to back: the fwd FIFO fills and frames are dropped.
// Checks: every frame leaves exactly once through the right exit (DMA of
// its port if suspicious, the other port otherwise), complete and in
// order at its exit, or is counted as dropped; re-injected frames leave through the
// port they were sent to; rule read-back data; the counters; and that each
// mechanism (forward, DMA, re-injection, drop, non-IPv4, on-line update,
// rule read, memory shared by both requesters, memory back-pressure)
// happened at least once.
module tb_urlf_top;
  import urlf_pkg::*;
  localparam int DW = 128, BYTES = 16;

  logic clk = 0, mem_clk = 0, rst_n = 0, mem_rst_n = 0;
  always #4 clk = ~clk;          // 125 MHz
  always #2 mem_clk = ~mem_clk;  // 250 MHz
  initial begin
    rst_n = 1; mem_rst_n = 1;
    #1 rst_n = 0; mem_rst_n = 0;
  end
  int checks = 0, failures = 0;

  logic          rx_valid [2], rx_sop [2], rx_eop [2];
  logic [DW-1:0] rx_data [2];
  logic [3:0]    rx_empty [2];
  logic          tx_valid [2], tx_ready [2], tx_sop [2], tx_eop [2];
  logic [DW-1:0] tx_data [2];
  logic [3:0]    tx_empty [2];
  logic          dma_tx_valid [2], dma_tx_ready [2], dma_tx_sop [2], dma_tx_eop [2];
  logic [DW-1:0] dma_tx_data [2];
  logic [3:0]    dma_tx_empty [2];
  logic          dma_rx_valid [2], dma_rx_ready [2], dma_rx_sop [2], dma_rx_eop [2];
  logic [DW-1:0] dma_rx_data [2];
  logic [3:0]    dma_rx_empty [2];
  logic          lb_valid, lb_ready, lb_we, lb_rdata_valid;
  logic [MEM_AW-1:0] lb_addr;
  logic [MEM_DW-1:0] lb_wdata, lb_rdata;
  logic          app_wr_cmd, app_wr_full, app_rd_cmd, app_rd_full, app_rd_valid;
  logic [MEM_AW-1:0] app_wr_addr, app_rd_addr;
  logic [MEM_DW-1:0] app_wr_data, app_rd_data;
  logic [31:0]   frames_in [2], frames_dropped [2], frames_net [2], frames_dma [2];
  logic [31:0]   lookups, hits, rule_writes, rule_reads, mem_grants [2];

  urlf_top dut (.*);
  qdr2_mem_model #(.RD_LAT(6), .STALL_PCT(10)) u_mem (.clk(mem_clk), .*);

  // ---------------- reference hash and blacklist ----------------
  logic [31:0] crc_table [256];
  function automatic logic [25:0] ref_hash(logic [31:0] a);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    for (int b = 3; b >= 0; b--) c = crc_table[(c ^ 32'(a[8*b +: 8])) & 32'hFF] ^ (c >> 8);
    c = ~c;
    return c[25:0];
  endfunction

  logic [31:0]       black [$];                      // forbidden addresses
  logic [MEM_DW-1:0] shadow [logic [MEM_AW-1:0]];    // host copy of the rule memory
  function automatic bit listed(logic [31:0] a);
    logic [25:0] h;
    h = ref_hash(a);
    return shadow.exists(h[25:5]) && shadow[h[25:5]][h[4:0]];
  endfunction

  // ---------------- frames ----------------
  // key = origin * 2^20 + seq
  int          flen [int];
  logic [31:0] fip  [int];
  bit          fv4  [int];
  bit          fsusp [int];

  function automatic logic [7:0] fbyte(int key, int j, bit reinj);
    if (j < 4)   return 8'(key >> (8*(3-j)));
    if (j == 4)  return 8'(reinj);
    if (j == 12) return fv4[key] ? 8'h08 : 8'h86;
    if (j == 13) return fv4[key] ? 8'h00 : 8'hDD;
    if (j >= 30 && j < 34) return fip[key][8*(33-j) +: 8];
    return 8'(key * 5 + j * 11);
  endfunction

  int nsent [2] = '{0, 0};
  int line_gap [2] = '{0, 0};   // extra idle cycles after each frame
  int force_ip_mode = 0;        // 0 random mix, 1 always clean IPv4

  task automatic send_frame(int p, int len, logic [31:0] ip, bit v4);
    int nw, key;
    key = p * (1 << 20) + nsent[p]++;
    flen[key] = len; fip[key] = ip; fv4[key] = v4;
    fsusp[key] = v4 && listed(ip);
    nw = (len + BYTES - 1) / BYTES;
    for (int w = 0; w < nw; w++) begin
      rx_valid[p] = 1; rx_sop[p] = (w == 0); rx_eop[p] = (w == nw - 1);
      rx_empty[p] = rx_eop[p] ? 4'(nw * BYTES - len) : 4'd0;
      for (int b = 0; b < BYTES; b++)
        rx_data[p][8*b +: 8] = (w*BYTES + b < len) ? fbyte(key, w*BYTES + b, 0) : 8'h00;
      @(posedge clk); #1;
    end
    rx_valid[p] = 0; rx_sop[p] = 0; rx_eop[p] = 0;
  endtask

  function automatic logic [31:0] pick_ip(output bit v4);
    v4 = 1;
    if (force_ip_mode == 1) begin
      logic [31:0] a;
      do a = $urandom; while (listed(a));
      return a;
    end
    if ($urandom_range(9) == 0) v4 = 0;
    return ($urandom_range(3) == 0) ? black[$urandom_range(black.size()-1)] : $urandom;
  endfunction

  // ---------------- Local Bus (host driver) ----------------
  logic lb_fire = 0;
  logic [MEM_DW-1:0] lb_exp [$];
  always @(posedge clk) begin
    lb_fire <= lb_valid && lb_ready;
    if (lb_rdata_valid) begin
      checks++;
      if (lb_exp.size() == 0 || lb_rdata != lb_exp[0]) begin
        failures++; $display("FAIL rule read-back %08h", lb_rdata);
      end
      if (lb_exp.size() != 0) void'(lb_exp.pop_front());
    end
  end

  task automatic lb_access(bit we, logic [MEM_AW-1:0] a, logic [MEM_DW-1:0] d);
    lb_valid = 1; lb_we = we; lb_addr = a; lb_wdata = d;
    do begin @(posedge clk); #1; end while (!lb_fire);
    lb_valid = 0;
    if (!we) lb_exp.push_back(shadow.exists(a) ? shadow[a] : '0);
  endtask

  // Host adds an address to the blacklist: set its bit, write the word,
  // read it back, and only then treat the address as listed.
  task automatic add_rule(logic [31:0] ip);
    logic [25:0] h;
    logic [MEM_DW-1:0] w;
    h = ref_hash(ip);
    w = shadow.exists(h[25:5]) ? shadow[h[25:5]] : '0;
    w[h[4:0]] = 1'b1;
    lb_access(1, h[25:5], w);
    lb_valid = 1; lb_we = 0; lb_addr = h[25:5];
    do begin @(posedge clk); #1; end while (!lb_fire);
    lb_valid = 0;
    lb_exp.push_back(w);
    wait (lb_exp.size() == 0);
    #1;
    shadow[h[25:5]] = w;
    black.push_back(ip);
  endtask

  // ---------------- exits: tx[0..1] (o = 0,1), dma_tx[0..1] (o = 2,3) -----
  int  cur_key [4], cur_reinj [4], widx [4];
  int  last_seq [4][2];   // [exit][re-injected]
  int  n_fwd = 0, n_dma = 0, n_reinj_out = 0, n_nonip = 0;
  int  delivered [2] = '{0, 0};                      // per origin port, first exits
  int  reinj_sent = 0;
  bit  block_tx0 = 0;

  // host re-injection queue: keys to send out of port q
  int  reinj_q [2][$];

  task automatic exit_word(int o, logic sop, logic eop, logic [3:0] empty, logic [DW-1:0] d);
    int key, nw, org, rj;
    if (sop) begin
      key = int'({d[7:0], d[15:8], d[23:16], d[31:24]});
      rj  = int'(d[39:32]);
      checks++;
      if (!flen.exists(key) || rj > 1) begin
        failures++; $display("FAIL exit %0d: unknown frame %h", o, key);
        key = -1;
      end
      cur_key[o] = key; cur_reinj[o] = rj; widx[o] = 0;
      if (key >= 0) begin
        org = key >> 20;
        checks++;
        // expected exit
        if (rj == 1) begin
          if (o != 1 - org) begin failures++; $display("FAIL re-injected frame %h at exit %0d", key, o); end
        end else if (fsusp[key]) begin
          if (o != 2 + org) begin failures++; $display("FAIL suspicious frame %h at exit %0d", key, o); end
        end else begin
          if (o != 1 - org) begin failures++; $display("FAIL clean frame %h at exit %0d", key, o); end
        end
        checks++;
        if (key % (1 << 20) <= last_seq[o][rj]) begin
          failures++; $display("FAIL frame %h out of order", key);
        end
        last_seq[o][rj] = key % (1 << 20);
      end
    end
    key = cur_key[o];
    if (key < 0) return;
    nw = (flen[key] + BYTES - 1) / BYTES;
    for (int b = 0; b < BYTES; b++) begin
      int j;
      j = widx[o] * BYTES + b;
      if (j < flen[key] && d[8*b +: 8] != fbyte(key, j, cur_reinj[o][0])) begin
        failures++; $display("FAIL frame %h byte %0d at exit %0d", key, j, o);
        break;
      end
    end
    checks++;
    if (eop != (widx[o] == nw - 1) || (eop && empty != 4'(nw * BYTES - flen[key]))) begin
      failures++; $display("FAIL frame %h framing", key);
    end
    widx[o]++;
    if (eop) begin
      if (cur_reinj[o] == 1) n_reinj_out++;
      else begin
        delivered[key >> 20]++;
        if (!fv4[key]) n_nonip++;
        if (o >= 2) begin
          n_dma++;
          // the host lets about half of the suspicious frames through
          if ($urandom_range(1) == 0) reinj_q[1 - (key >> 20)].push_back(key);
        end else n_fwd++;
      end
    end
  endtask

  always @(posedge clk) begin
    for (int q = 0; q < 2; q++) begin
      tx_ready[q]     <= !(q == 0 && block_tx0) && ($urandom_range(7) != 0);
      dma_tx_ready[q] <= ($urandom_range(3) != 0);
      if (tx_valid[q] && tx_ready[q]) exit_word(q, tx_sop[q], tx_eop[q], tx_empty[q], tx_data[q]);
      if (dma_tx_valid[q] && dma_tx_ready[q])
        exit_word(2 + q, dma_tx_sop[q], dma_tx_eop[q], dma_tx_empty[q], dma_tx_data[q]);
    end
  end

  // host DMA transmit: one process per port
  logic dma_fire [2] = '{0, 0};
  always @(posedge clk) for (int q = 0; q < 2; q++) dma_fire[q] <= dma_rx_valid[q] && dma_rx_ready[q];

  task automatic host_sender(int q);
    forever begin
      int key, nw;
      while (reinj_q[q].size() == 0) begin @(posedge clk); #1; end
      key = reinj_q[q].pop_front();
      nw = (flen[key] + BYTES - 1) / BYTES;
      for (int w = 0; w < nw; w++) begin
        dma_rx_valid[q] = 1; dma_rx_sop[q] = (w == 0); dma_rx_eop[q] = (w == nw - 1);
        dma_rx_empty[q] = dma_rx_eop[q] ? 4'(nw * BYTES - flen[key]) : 4'd0;
        for (int b = 0; b < BYTES; b++)
          dma_rx_data[q][8*b +: 8] = (w*BYTES + b < flen[key]) ? fbyte(key, w*BYTES + b, 1) : 8'h00;
        do begin @(posedge clk); #1; end while (!dma_fire[q]);
        dma_rx_valid[q] = 0;
      end
      reinj_sent++;
    end
  endtask

  // ---------------- lookup latency probe ----------------
  int t_query = -1, lookup_lat = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.q_valid[0] && t_query < 0) t_query = cyc;
    if (dut.u_match.rf_wr[0] && t_query >= 0 && lookup_lat < 0) lookup_lat = cyc - t_query;
  end

  // memory shared by both requesters while traffic flows
  int both_busy = 0;
  always @(posedge mem_clk)
    if ((dut.u_qdr.wr_cmd_valid[0] || dut.u_qdr.rd_cmd_valid[0]) &&
        (dut.u_qdr.wr_cmd_valid[1] || dut.u_qdr.rd_cmd_valid[1])) both_busy++;

  // ---------------- watchdog ----------------
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic traffic(int p, int n, int minlen, int maxlen, int gap_max);
    for (int k = 0; k < n; k++) begin
      bit v4;
      logic [31:0] ip;
      ip = pick_ip(v4);
      send_frame(p, $urandom_range(maxlen, minlen), ip, v4);
      repeat ($urandom_range(gap_max)) begin @(posedge clk); #1; end
    end
  endtask

  // 64-byte frames at 10 Gbps: 84 byte times per frame = 67.2 ns = 8.4 cycles
  task automatic line_rate(int p, int n);
    realtime t0;
    t0 = $realtime;
    for (int k = 0; k < n; k++) begin
      bit v4;
      logic [31:0] ip;
      ip = pick_ip(v4);
      send_frame(p, 64, ip, v4);
      while ($realtime < t0 + (k + 1) * 67.2) begin @(posedge clk); #1; end
    end
  endtask

  int drops_before, t_in, t_out, cross_lat;
  int unsigned sent_total;
  initial begin
    for (int n = 0; n < 256; n++) begin
      logic [31:0] c;
      c = 32'(n);
      for (int k = 0; k < 8; k++) c = c[0] ? (c >> 1) ^ 32'hEDB8_8320 : c >> 1;
      crc_table[n] = c;
    end
    for (int p = 0; p < 2; p++) begin
      rx_valid[p] = 0; rx_sop[p] = 0; rx_eop[p] = 0; rx_data[p] = '0; rx_empty[p] = '0;
      dma_rx_valid[p] = 0; dma_rx_sop[p] = 0; dma_rx_eop[p] = 0; dma_rx_data[p] = '0; dma_rx_empty[p] = '0;
      cur_key[p] = -1; cur_key[p+2] = -1;
      for (int r = 0; r < 2; r++) begin last_seq[p][r] = -1; last_seq[p+2][r] = -1; end
    end
    lb_valid = 0; lb_we = 0; lb_addr = '0; lb_wdata = '0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1; mem_rst_n = 1;
    repeat (4) @(posedge clk);
    #1;

    // ---- phase 1: load 64 rules, read back 16 words ----
    for (int k = 0; k < 64; k++) add_rule($urandom);
    for (int k = 0; k < 16; k++) begin
      logic [25:0] h;
      h = ref_hash(black[k]);
      lb_access(0, h[25:5], '0);
    end
    lb_access(0, MEM_AW'(21'h1F_FFFF), '0);
    wait (lb_exp.size() == 0);
    repeat (20) @(posedge clk);
    #1;

    // ---- phase 2: one isolated clean frame, latencies ----
    force_ip_mode = 1;
    t_in = cyc;
    traffic(0, 1, 64, 64, 0);
    wait (n_fwd == 1);
    t_out = cyc;
    cross_lat = t_out - t_in;
    $display("lookup latency %0d cycles, frame in-to-out %0d cycles", lookup_lat, cross_lat);
    checks++;
    if (lookup_lat < 0 || lookup_lat >= 15) begin
      failures++; $display("FAIL lookup latency %0d cycles, expected under 15", lookup_lat);
    end
    force_ip_mode = 0;

    // ---- phase 3: 10 Gbps line rate, minimum frames, both ports ----
    drops_before = frames_dropped[0] + frames_dropped[1];
    fork
      line_rate(0, 400);
      line_rate(1, 400);
    join
    checks++;
    if (frames_dropped[0] + frames_dropped[1] != drops_before) begin
      failures++; $display("FAIL frames dropped at 10 Gbps line rate");
    end

    // ---- phase 4: mixed traffic, host re-injection, on-line rule update ----
    fork
      host_sender(0);
      host_sender(1);
    join_none
    fork
      traffic(0, 300, 64, 600, 3);
      traffic(1, 300, 64, 600, 3);
      begin
        repeat (500) @(posedge clk);
        #1;
        for (int k = 0; k < 8; k++) begin                  // on line, during traffic
          add_rule($urandom);
          for (int r = 0; r < 4; r++) lb_access(0, MEM_AW'($urandom), '0);
        end
      end
    join

    // ---- phase 5: port 0 output blocked, port 1 receives at full rate ----
    block_tx0 = 1;
    force_ip_mode = 1;
    traffic(1, 1200, 64, 64, 0);
    force_ip_mode = 0;
    block_tx0 = 0;

    // drain
    repeat (20000) @(posedge clk);

    // ---- final accounting ----
    for (int p = 0; p < 2; p++) begin
      checks++;
      if (delivered[p] + int'(frames_dropped[p]) != nsent[p] || frames_in[p] != 32'(nsent[p])) begin
        failures++;
        $display("FAIL port %0d: sent %0d delivered %0d dropped %0d", p, nsent[p], delivered[p], frames_dropped[p]);
      end
    end
    checks++;
    if (n_reinj_out != reinj_sent) begin failures++; $display("FAIL re-injected %0d of %0d", n_reinj_out, reinj_sent); end
    checks++;
    if (32'(n_dma) != frames_dma[0] + frames_dma[1] || 32'(n_fwd) != frames_net[0] + frames_net[1]) begin
      failures++; $display("FAIL exit counters");
    end
    checks++;
    if (rule_writes != 32'(72) || rule_reads != 32'(72 + 17 + 32)) begin
      failures++; $display("FAIL rule counters %0d %0d", rule_writes, rule_reads);
    end
    sent_total = nsent[0] + nsent[1];
    $display("mechanisms: forwarded %0d, to DMA %0d, re-injected %0d, dropped %0d, non-IPv4 %0d, rule writes %0d, rule reads %0d, shared-memory cycles %0d, memory stalls %0d, lookups %0d of %0d frames",
             n_fwd, n_dma, n_reinj_out, frames_dropped[0] + frames_dropped[1], n_nonip,
             rule_writes, rule_reads, both_busy, u_mem.stalls, lookups, sent_total);
    if (n_fwd == 0)       begin failures++; $display("FAIL no frame forwarded"); end
    if (n_dma == 0)       begin failures++; $display("FAIL no frame sent to the host"); end
    if (n_reinj_out == 0) begin failures++; $display("FAIL no frame re-injected"); end
    if (frames_dropped[0] + frames_dropped[1] == 0) begin failures++; $display("FAIL no frame dropped"); end
    if (n_nonip == 0)     begin failures++; $display("FAIL no non-IPv4 frame"); end
    if (both_busy == 0)   begin failures++; $display("FAIL memory never shared"); end
    if (u_mem.stalls == 0) begin failures++; $display("FAIL no memory back-pressure"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
