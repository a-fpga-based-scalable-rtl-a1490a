// Self-checking test of packet_filter (one interface, default sizes).
// The Packet Matching Module is modelled here: it holds at most 8 queries,
// answers each 15 cycles after the query, and calls an IPv4 frame
// suspicious when its destination address is a multiple of 5.
// Frames carry their sequence number in bytes 0-3 and a payload computed
// from it, so every output frame can be checked word by word.
// Phase 1: random frames (64..1518 bytes, 1 in 8 non-IPv4) at near line
// rate, random output back-pressure. Phase 2: both outputs blocked while
// minimum-size frames arrive back to back, so frames must be dropped.
// Checks: each delivered frame is complete and exact, goes to the right
// output (DMA if suspicious, network otherwise), frames leave in arrival
// order, the frames missing are exactly those counted as dropped, drops
// happened, and the counters add up.
module tb_packet_filter;
  localparam int DW = 128, BYTES = 16;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;
  initial begin
    rst_n = 1;
    #1 rst_n = 0;
  end
  int checks = 0, failures = 0;

  logic rx_valid, rx_sop, rx_eop, q_valid, q_ipv4, r_valid, r_suspicious, r_ready;
  logic [DW-1:0] rx_data, net_data, dma_data;
  logic [3:0] rx_empty, net_empty, dma_empty, q_free;
  logic [31:0] q_ip;
  logic net_valid, net_ready, net_sop, net_eop, dma_valid, dma_ready, dma_sop, dma_eop;
  logic [31:0] frames_in, frames_dropped, frames_net, frames_dma;

  packet_filter #(.DATA_W(DW), .FIFO_DEPTH(512), .MAX_FRAME_BYTES(1518), .QCNT_W(4)) dut (.*);

  // ---- frame contents ----
  int          flen [int];
  logic [31:0] fip  [int];
  bit          fv4  [int];

  function automatic logic [7:0] fbyte(int seq, int j);
    if (j < 4)   return 8'(seq >> (8*(3-j)));
    if (j == 12) return fv4[seq] ? 8'h08 : 8'h88;
    if (j == 13) return fv4[seq] ? 8'h00 : 8'hB5;
    if (j >= 30 && j < 34) return fip[seq][8*(33-j) +: 8];
    return 8'(seq * 7 + j * 13);
  endfunction

  function automatic bit suspicious(int seq);
    return fv4[seq] && (fip[seq] % 5 == 0);
  endfunction

  // ---- matching model ----
  logic [32:0] qpend [$];     // {ipv4, ip}
  int          qtime [$];
  bit          results [$];
  int cyc = 0;
  assign q_free = 4'(8 - qpend.size());
  assign r_valid = results.size() != 0;
  assign r_suspicious = (results.size() != 0) ? results[0] : 1'b0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (r_valid && r_ready) void'(results.pop_front());
    if (qtime.size() != 0 && qtime[0] <= cyc) begin
      logic [32:0] q;
      q = qpend.pop_front();
      void'(qtime.pop_front());
      results.push_back(q[32] && (q[31:0] % 5 == 0));
    end
    if (q_valid) begin
      qpend.push_back({q_ipv4, q_ip});
      qtime.push_back(cyc + 15);
    end
  end

  // ---- output monitors ----
  int  last_seq = -1, cur_seq [2] = '{-1, -1}, widx [2] = '{0, 0};
  int  delivered = 0, missing = 0;
  bit  block_out = 0;

  task automatic check_word(int o, logic sop, logic eop, logic [3:0] empty, logic [DW-1:0] d);
    int seq, nw;
    if (sop) begin
      seq = int'({d[7:0], d[15:8], d[23:16], d[31:24]});
      checks++;
      if (seq <= last_seq || !flen.exists(seq)) begin
        failures++; $display("FAIL out %0d: frame %0d after %0d", o, seq, last_seq);
        seq = last_seq + 1;
      end
      missing += seq - last_seq - 1;
      last_seq = seq;
      cur_seq[o] = seq;
      widx[o] = 0;
      checks++;
      if (suspicious(seq) != (o == 1)) begin
        failures++; $display("FAIL frame %0d sent to the wrong output %0d", seq, o);
      end
    end
    seq = cur_seq[o];
    nw = (flen[seq] + BYTES - 1) / BYTES;
    for (int b = 0; b < BYTES; b++) begin
      int j;
      j = widx[o] * BYTES + b;
      if (j < flen[seq] && d[8*b +: 8] != fbyte(seq, j)) begin
        failures++; $display("FAIL frame %0d byte %0d", seq, j);
        break;
      end
    end
    checks++;
    if (eop != (widx[o] == nw - 1) || (eop && empty != 4'(nw * BYTES - flen[seq]))) begin
      failures++; $display("FAIL frame %0d framing at word %0d", seq, widx[o]);
    end
    widx[o]++;
    if (eop) delivered++;
  endtask

  always @(posedge clk) begin
    net_ready <= !block_out && ($urandom_range(4) != 0);
    dma_ready <= !block_out && ($urandom_range(4) != 0);
    if (net_valid && net_ready) check_word(0, net_sop, net_eop, net_empty, net_data);
    if (dma_valid && dma_ready) check_word(1, dma_sop, dma_eop, dma_empty, dma_data);
  end

  // ---- input driver ----
  int nsent = 0;
  task automatic send_frame(int len);
    int nw, seq;
    seq = nsent++;
    flen[seq] = len;
    fv4[seq]  = ($urandom_range(7) != 0);
    fip[seq]  = $urandom;
    nw = (len + BYTES - 1) / BYTES;
    for (int w = 0; w < nw; w++) begin
      rx_valid = 1;
      rx_sop = (w == 0);
      rx_eop = (w == nw - 1);
      rx_empty = rx_eop ? 4'(nw * BYTES - len) : 4'd0;
      for (int b = 0; b < BYTES; b++)
        rx_data[8*b +: 8] = (w*BYTES + b < len) ? fbyte(seq, w*BYTES + b) : 8'h00;
      @(posedge clk); #1;
    end
    rx_valid = 0; rx_sop = 0; rx_eop = 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx_valid = 0; rx_sop = 0; rx_eop = 0; rx_data = '0; rx_empty = '0; net_ready = 0; dma_ready = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Phase 1
    for (int n = 0; n < 300; n++) begin
      send_frame(($urandom_range(3) == 0) ? $urandom_range(1518, 64) : $urandom_range(200, 64));
      repeat ($urandom_range(2)) begin @(posedge clk); #1; end
    end
    // Phase 2
    block_out = 1;
    for (int n = 0; n < 200; n++) send_frame(64);
    repeat (20) begin @(posedge clk); #1; end
    block_out = 0;
    for (int n = 0; n < 50; n++) send_frame($urandom_range(300, 64));
    repeat (3000) @(posedge clk);
    missing += (nsent - 1) - last_seq;
    checks++;
    if (frames_in != 32'(nsent)) begin failures++; $display("FAIL frames_in %0d", frames_in); end
    checks++;
    if (frames_dropped == 0) begin failures++; $display("FAIL no frame was dropped"); end
    checks++;
    if (32'(missing) != frames_dropped || 32'(delivered) != frames_net + frames_dma ||
        frames_net + frames_dma + frames_dropped != frames_in) begin
      failures++;
      $display("FAIL counts: missing %0d dropped %0d delivered %0d net %0d dma %0d",
               missing, frames_dropped, delivered, frames_net, frames_dma);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
