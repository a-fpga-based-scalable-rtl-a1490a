// 100 Gbps workload test of urlf_top: the filter configured for a 256-bit
// frame bus, the system clock at 300 MHz and the memory clock at 333 MHz.
//
// A 64-byte frame fills two 256-bit words, so with frames back to back on
// both ports each port delivers 150 M frames per second, slightly above the
// 148.8 Mpps of 100 Gbps Ethernet with minimum frames. The equal time slots
// of the matching module then give each port exactly one lookup every two
// system cycles, and the memory receives one read every system cycle
// (300 M reads per second against 333 M memory cycles).
//
// The host loads 48 rules through the Local Bus before traffic starts.
// Then each port receives FRAMES minimum-size frames with no gap, about a
// quarter of them addressed to listed destinations. Checks: no frame is
// dropped; every frame leaves complete and in order through the right exit
// (DMA of its port if listed, the other port otherwise); the lookup count;
// and that the forwarded output keeps up (the last frame leaves within a
// bounded time of the last one received). The memory model has no
// back-pressure here, as a QDR-II device has none.
module tb_urlf_100g;
  import urlf_pkg::*;
  localparam int DW = 256, BYTES = 32, FRAMES = 20000;

  logic clk = 0, mem_clk = 0, rst_n = 0, mem_rst_n = 0;
  always #1.667 clk = ~clk;      // 300 MHz
  always #1.5 mem_clk = ~mem_clk; // 333 MHz
  initial begin
    rst_n = 1; mem_rst_n = 1;
    #1 rst_n = 0; mem_rst_n = 0;
  end
  int checks = 0, failures = 0;

  logic          rx_valid [2], rx_sop [2], rx_eop [2];
  logic [DW-1:0] rx_data [2];
  logic [4:0]    rx_empty [2];
  logic          tx_valid [2], tx_ready [2], tx_sop [2], tx_eop [2];
  logic [DW-1:0] tx_data [2];
  logic [4:0]    tx_empty [2];
  logic          dma_tx_valid [2], dma_tx_ready [2], dma_tx_sop [2], dma_tx_eop [2];
  logic [DW-1:0] dma_tx_data [2];
  logic [4:0]    dma_tx_empty [2];
  logic          dma_rx_valid [2], dma_rx_ready [2], dma_rx_sop [2], dma_rx_eop [2];
  logic [DW-1:0] dma_rx_data [2];
  logic [4:0]    dma_rx_empty [2];
  logic          lb_valid, lb_ready, lb_we, lb_rdata_valid;
  logic [MEM_AW-1:0] lb_addr;
  logic [MEM_DW-1:0] lb_wdata, lb_rdata;
  logic          app_wr_cmd, app_wr_full, app_rd_cmd, app_rd_full, app_rd_valid;
  logic [MEM_AW-1:0] app_wr_addr, app_rd_addr;
  logic [MEM_DW-1:0] app_wr_data, app_rd_data;
  logic [31:0]   frames_in [2], frames_dropped [2], frames_net [2], frames_dma [2];
  logic [31:0]   lookups, hits, rule_writes, rule_reads, mem_grants [2];

  urlf_top #(.DATA_W(DW)) dut (.*);
  qdr2_mem_model #(.RD_LAT(6), .STALL_PCT(0)) u_mem (.clk(mem_clk), .*);

  // ---------------- reference hash and rule table ----------------
  logic [31:0] crc_table [256];
  function automatic logic [25:0] ref_hash(logic [31:0] a);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    for (int b = 3; b >= 0; b--) c = crc_table[(c ^ 32'(a[8*b +: 8])) & 32'hFF] ^ (c >> 8);
    c = ~c;
    return c[25:0];
  endfunction

  logic [31:0]       black [$];
  logic [MEM_DW-1:0] shadow [logic [MEM_AW-1:0]];
  function automatic bit listed(logic [31:0] a);
    logic [25:0] h;
    h = ref_hash(a);
    return shadow.exists(h[25:5]) && shadow[h[25:5]][h[4:0]];
  endfunction

  // ---------------- frames: key = origin * 2^20 + seq ----------------
  logic [31:0] fip [int];
  bit          fsusp [int];
  function automatic logic [7:0] fbyte(int key, int j);
    if (j < 4)   return 8'(key >> (8*(3-j)));
    if (j == 12) return 8'h08;
    if (j == 13) return 8'h00;
    if (j >= 30 && j < 34) return fip[key][8*(33-j) +: 8];
    return 8'(key * 7 + j * 13);
  endfunction

  int nsent [2] = '{0, 0};
  task automatic burst(int p, int n);
    for (int k = 0; k < n; k++) begin
      int key;
      logic [31:0] ip;
      key = p * (1 << 20) + nsent[p]++;
      if ($urandom_range(3) == 0) ip = black[$urandom_range(black.size()-1)];
      else do ip = $urandom; while (listed(ip));
      fip[key] = ip; fsusp[key] = listed(ip);
      for (int w = 0; w < 2; w++) begin
        rx_valid[p] = 1; rx_sop[p] = (w == 0); rx_eop[p] = (w == 1); rx_empty[p] = '0;
        for (int b = 0; b < BYTES; b++) rx_data[p][8*b +: 8] = fbyte(key, w*BYTES + b);
        @(posedge clk); #1;
      end
    end
    rx_valid[p] = 0; rx_sop[p] = 0; rx_eop[p] = 0;
  endtask

  // ---------------- exits: tx[0..1] (o = 0,1), dma_tx[0..1] (o = 2,3) -----
  int cur_key [4], widx [4], last_seq [4];
  int n_fwd = 0, n_dma = 0, cyc = 0, t_last_in = 0, t_last_out = 0;
  task automatic exit_word(int o, logic sop, logic eop, logic [DW-1:0] d);
    int key;
    if (sop) begin
      key = int'({d[7:0], d[15:8], d[23:16], d[31:24]});
      checks++;
      if (!fip.exists(key)) begin
        failures++; $display("FAIL exit %0d: unknown frame %h", o, key); key = -1;
      end else begin
        checks += 2;
        if (o != (fsusp[key] ? 2 + (key >> 20) : 1 - (key >> 20))) begin
          failures++; $display("FAIL frame %h at exit %0d", key, o);
        end
        if (key % (1 << 20) <= last_seq[o]) begin
          failures++; $display("FAIL frame %h out of order", key);
        end
        last_seq[o] = key % (1 << 20);
      end
      cur_key[o] = key; widx[o] = 0;
    end
    key = cur_key[o];
    if (key < 0) return;
    checks++;
    for (int b = 0; b < BYTES; b++)
      if (d[8*b +: 8] != fbyte(key, widx[o]*BYTES + b)) begin
        failures++; $display("FAIL frame %h byte %0d", key, widx[o]*BYTES + b); break;
      end
    checks++;
    if (eop != (widx[o] == 1)) begin failures++; $display("FAIL frame %h framing", key); end
    widx[o]++;
    if (eop) begin
      if (o >= 2) n_dma++; else n_fwd++;
      t_last_out = cyc;
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int q = 0; q < 2; q++) begin
      if (tx_valid[q] && tx_ready[q]) exit_word(q, tx_sop[q], tx_eop[q], tx_data[q]);
      if (dma_tx_valid[q] && dma_tx_ready[q]) exit_word(2 + q, dma_tx_sop[q], dma_tx_eop[q], dma_tx_data[q]);
    end
  end

  // ---------------- Local Bus ----------------
  logic lb_fire = 0;
  always @(posedge clk) lb_fire <= lb_valid && lb_ready;
  task automatic add_rule(logic [31:0] ip);
    logic [25:0] h;
    logic [MEM_DW-1:0] w;
    h = ref_hash(ip);
    w = shadow.exists(h[25:5]) ? shadow[h[25:5]] : '0;
    w[h[4:0]] = 1'b1;
    lb_valid = 1; lb_we = 1; lb_addr = h[25:5]; lb_wdata = w;
    do begin @(posedge clk); #1; end while (!lb_fire);
    lb_valid = 0;
    shadow[h[25:5]] = w;
    black.push_back(ip);
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
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
    for (int p = 0; p < 2; p++) begin
      rx_valid[p] = 0; rx_sop[p] = 0; rx_eop[p] = 0; rx_data[p] = '0; rx_empty[p] = '0;
      dma_rx_valid[p] = 0; dma_rx_sop[p] = 0; dma_rx_eop[p] = 0; dma_rx_data[p] = '0; dma_rx_empty[p] = '0;
      tx_ready[p] = 1; dma_tx_ready[p] = 1;
    end
    for (int o = 0; o < 4; o++) begin cur_key[o] = -1; last_seq[o] = -1; end
    lb_valid = 0; lb_we = 0; lb_addr = '0; lb_wdata = '0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1; mem_rst_n = 1;
    repeat (4) @(posedge clk);
    #1;

    for (int k = 0; k < 48; k++) add_rule($urandom);
    repeat (200) @(posedge clk);   // writes reach the memory
    #1;

    fork
      burst(0, FRAMES);
      burst(1, FRAMES);
    join
    t_last_in = cyc;
    wait (n_fwd + n_dma == 2 * FRAMES || cyc > t_last_in + 2000);
    repeat (50) @(posedge clk);

    $display("100G: %0d frames per port back to back, forwarded %0d, to host %0d, dropped %0d/%0d, last frame out %0d cycles after last in",
             FRAMES, n_fwd, n_dma, frames_dropped[0], frames_dropped[1], t_last_out - t_last_in);
    checks++;
    if (frames_dropped[0] != 0 || frames_dropped[1] != 0) begin
      failures++; $display("FAIL frames dropped at 100 Gbps");
    end
    checks++;
    if (n_fwd + n_dma != 2 * FRAMES) begin failures++; $display("FAIL %0d frames delivered", n_fwd + n_dma); end
    checks++;
    if (lookups != 32'(2 * FRAMES)) begin failures++; $display("FAIL lookups %0d", lookups); end
    checks++;
    if (n_dma == 0 || n_fwd == 0) begin failures++; $display("FAIL both exits must be used"); end
    checks++;
    if (t_last_out - t_last_in > 40) begin
      failures++; $display("FAIL output lags input by %0d cycles", t_last_out - t_last_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
