// Self-checking test of ip_parser on a 128-bit and a 256-bit bus.
// Random frames (IPv4 or other EtherType, 34..300 bytes, random gaps
// between words) plus runt frames shorter than 34 bytes. Checks one query
// per frame, its address and IPv4 flag, and its timing: the query appears
// one cycle after the word holding byte 33 (word 2 at 128 bits, word 1 at
// 256 bits) or, for a runt, one cycle after its last word.
module tb_ip_parser;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;
    // Give every asynchronous reset a falling edge.
  initial begin
    rst_n = 1;
    #1 rst_n = 0;
  end
  int checks = 0, failures = 0;

  logic         v128, sop128, eop128, qv128, q4_128;
  logic [127:0] d128;
  logic [31:0]  qip128;
  logic         v256, sop256, eop256, qv256, q4_256;
  logic [255:0] d256;
  logic [31:0]  qip256;

  ip_parser #(.DATA_W(128)) dut128 (.clk, .rst_n, .in_valid(v128), .in_data(d128),
    .in_sop(sop128), .in_eop(eop128), .q_valid(qv128), .q_ip(qip128), .q_ipv4(q4_128));
  ip_parser #(.DATA_W(256)) dut256 (.clk, .rst_n, .in_valid(v256), .in_data(d256),
    .in_sop(sop256), .in_eop(eop256), .q_valid(qv256), .q_ip(qip256), .q_ipv4(q4_256));

  byte unsigned frame [];
  logic [31:0] exp_ip;
  bit          exp_v4;
  int          exp_cycle;          // cycle at which q_valid must be seen
  int          cyc = 0, queries128 = 0, queries256 = 0;
  int          runts = 0, non_ip = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  task automatic make_frame();
    int len;
    bit runt;
    runt = ($urandom_range(9) == 0);
    len  = runt ? $urandom_range(33, 14) : $urandom_range(300, 34);
    frame = new[len];
    foreach (frame[i]) frame[i] = 8'($urandom);
    exp_v4 = !runt && ($urandom_range(3) != 0);
    if (len > 13) begin
      frame[12] = exp_v4 ? 8'h08 : 8'h86;
      frame[13] = exp_v4 ? 8'h00 : 8'hDD;
    end
    exp_ip = runt ? 32'h0 : {frame[30], frame[31], frame[32], frame[33]};
    if (runt) runts++;
    else if (!exp_v4) non_ip++;
  endtask

  // Sends the frame on bus width W (16 or 32 bytes), checking the query.
  task automatic send(int bytes_per_word);
    int nwords, trigger_word, seen;
    nwords = (frame.size() + bytes_per_word - 1) / bytes_per_word;
    trigger_word = (frame.size() > 33) ? 33 / bytes_per_word : nwords - 1;
    seen = 0;
    for (int w = 0; w < nwords; w++) begin
      while ($urandom_range(3) == 0) begin
        @(posedge clk);
        #1;
      end
      for (int b = 0; b < bytes_per_word; b++) begin
        logic [7:0] by;
        by = (w*bytes_per_word + b < frame.size()) ? frame[w*bytes_per_word + b] : 8'h00;
        if (bytes_per_word == 16) d128[8*b +: 8] = by; else d256[8*b +: 8] = by;
      end
      if (bytes_per_word == 16) begin v128 = 1; sop128 = (w == 0); eop128 = (w == nwords-1); end
      else                      begin v256 = 1; sop256 = (w == 0); eop256 = (w == nwords-1); end
      @(posedge clk);
      #1;
      v128 = 0; v256 = 0;
      // the query must rise exactly now (one cycle after the trigger word)
      if (w == trigger_word) begin
        logic qv, q4;
        logic [31:0] qip;
        qv  = (bytes_per_word == 16) ? qv128  : qv256;
        q4  = (bytes_per_word == 16) ? q4_128 : q4_256;
        qip = (bytes_per_word == 16) ? qip128 : qip256;
        checks++;
        if (!qv) fail($sformatf("W%0d: no query after word %0d", bytes_per_word, w));
        else begin
          checks++;
          if (q4 != exp_v4) fail($sformatf("W%0d: ipv4 flag %0d exp %0d", bytes_per_word, q4, exp_v4));
          if (exp_v4) begin
            checks++;
            if (qip != exp_ip) fail($sformatf("W%0d: ip %08h exp %08h", bytes_per_word, qip, exp_ip));
          end
        end
      end
    end
  endtask

  // count queries per parser
  always @(posedge clk) begin
    if (qv128) queries128++;
    if (qv256) queries256++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v128 = 0; v256 = 0; sop128 = 0; eop128 = 0; sop256 = 0; eop256 = 0; d128 = '0; d256 = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      make_frame();
      send(16);
      send(32);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (queries128 != 400 || queries256 != 400)
      fail($sformatf("query counts %0d %0d, expected 400", queries128, queries256));
    checks++;
    if (runts == 0 || non_ip == 0) fail("runt or non-IPv4 case not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
