// Self-checking test of qdr_manager with the behavioural memory model.
// Two requesters issue random reads and writes (each in its own half of a
// small address range, so the expected contents are known per requester).
// The controller raises its full flags at random. Checks: read data is the
// last value that requester wrote there (or 0), answers go to the right
// requester in its order, both requesters are served alternately while
// both wait, and one command per cycle is sustained without back-pressure.
module tb_qdr_manager;
  import urlf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
    // Give every asynchronous reset a falling edge.
  initial begin
    rst_n = 1;
    #1 rst_n = 0;
  end
  int checks = 0, failures = 0;

  logic              wr_cmd_valid [2], wr_cmd_ready [2], rd_cmd_valid [2], rd_cmd_ready [2];
  logic [MEM_AW-1:0] wr_cmd_addr [2], rd_cmd_addr [2];
  logic [MEM_DW-1:0] wr_cmd_data [2];
  logic              rd_data_valid [2];
  logic [MEM_DW-1:0] rd_data;
  logic              app_wr_cmd, app_wr_full, app_rd_cmd, app_rd_full, app_rd_valid;
  logic [MEM_AW-1:0] app_wr_addr, app_rd_addr;
  logic [MEM_DW-1:0] app_wr_data, app_rd_data;
  logic [31:0]       grants [2];

  int stall_pct = 0;

  qdr_manager #(.NREQ(2), .RD_INFLT(64)) dut (.*);

  // Memory: small array, fixed read latency, random full flags.
  logic [MEM_DW-1:0] mem [64];
  logic              pv [5];
  logic [MEM_DW-1:0] pd [5];
  assign app_rd_valid = pv[4];
  assign app_rd_data  = pd[4];
  always @(posedge clk) begin
    for (int i = 4; i > 0; i--) begin pv[i] <= pv[i-1]; pd[i] <= pd[i-1]; end
    pv[0] <= app_rd_cmd && !app_rd_full;
    pd[0] <= mem[app_rd_addr[5:0]];
    if (app_wr_cmd && !app_wr_full) mem[app_wr_addr[5:0]] <= app_wr_data;
    app_wr_full <= ($urandom_range(99) < stall_pct);
    app_rd_full <= ($urandom_range(99) < stall_pct);
  end

  // Reference contents and expected answers per requester.
  logic [MEM_DW-1:0] ref_mem [64];
  logic [MEM_DW-1:0] expq [2][$];
  int answers [2] = '{0, 0};
  int switches = 0, last_grant = -1, busy_cycles = 0, cmd_cycles = 0;

  // Requester r: region r*32 .. r*32+31.
  task automatic requester(int r, int n);
    for (int k = 0; k < n; k++) begin
      logic we;
      logic [MEM_AW-1:0] a;
      logic [MEM_DW-1:0] d;
      we = $urandom_range(1);
      a  = MEM_AW'(r*32 + $urandom_range(31));
      d  = $urandom;
      if (we) begin
        wr_cmd_valid[r] = 1; wr_cmd_addr[r] = a; wr_cmd_data[r] = d;
      end else begin
        rd_cmd_valid[r] = 1; rd_cmd_addr[r] = a;
      end
      do begin @(posedge clk); #0.5; end while (!fired[r]);
      if (we) ref_mem[a[5:0]] = d;
      else    expq[r].push_back(ref_mem[a[5:0]]);
      wr_cmd_valid[r] = 0; rd_cmd_valid[r] = 0;
    end
  endtask

  logic fired [2] = '{0, 0};
  always @(posedge clk) begin
    for (int r = 0; r < 2; r++) begin
      fired[r] <= (wr_cmd_valid[r] && wr_cmd_ready[r]) || (rd_cmd_valid[r] && rd_cmd_ready[r]);
      if (rd_data_valid[r]) begin
        checks++;
        answers[r]++;
        if (expq[r].size() == 0) begin failures++; $display("FAIL unexpected answer to %0d", r); end
        else begin
          if (rd_data != expq[r][0]) begin
            failures++; $display("FAIL req%0d read %08h expected %08h", r, rd_data, expq[r][0]);
          end
          void'(expq[r].pop_front());
        end
      end
    end
    if (wr_cmd_ready[0] || rd_cmd_ready[0] || wr_cmd_ready[1] || rd_cmd_ready[1]) begin
      int g;
      g = (wr_cmd_ready[0] || rd_cmd_ready[0]) ? 0 : 1;
      if (last_grant != -1 && g != last_grant) switches++;
      last_grant = g;
      cmd_cycles++;
    end
    if ((wr_cmd_valid[0] || rd_cmd_valid[0]) && (wr_cmd_valid[1] || rd_cmd_valid[1])) busy_cycles++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin mem[i] = '0; ref_mem[i] = '0; end
    for (int i = 0; i < 5; i++) begin pv[i] = 0; pd[i] = '0; end
    app_wr_full = 0; app_rd_full = 0;
    for (int r = 0; r < 2; r++) begin
      wr_cmd_valid[r] = 0; rd_cmd_valid[r] = 0; wr_cmd_addr[r] = '0; rd_cmd_addr[r] = '0; wr_cmd_data[r] = '0;
    end
    repeat (3) @(posedge clk);
    #0.5 rst_n = 1;
    // Phase 1: a single requester without back-pressure: throughput.
    begin
      int t0, t1;
      @(posedge clk); #0.5;
      t0 = $time;
      requester(0, 100);
      t1 = $time;
      checks++;
      // the driver needs one extra cycle per command to see the grant
      if ((t1 - t0) / 4 > 2 * 100 + 2) begin
        failures++; $display("FAIL 100 commands took %0d cycles", (t1 - t0) / 4);
      end
    end
    // Phase 2: both requesters, random back-pressure.
    stall_pct = 25;
    fork
      requester(0, 1500);
      requester(1, 1500);
    join
    stall_pct = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (expq[0].size() != 0 || expq[1].size() != 0) begin failures++; $display("FAIL answers missing"); end
    checks++;
    if (answers[1] == 0 || switches < 1000) begin
      failures++; $display("FAIL poor sharing: %0d switches", switches);
    end
    checks++;
    if (grants[0] != 1600 || grants[1] != 1500) begin
      failures++; $display("FAIL grant counters %0d %0d", grants[0], grants[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
