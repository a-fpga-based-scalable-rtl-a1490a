// Self-checking test of tx_aggregator.
// Two sources send numbered frames of random length with random gaps; the
// sink applies random back-pressure. Checks that output frames are never
// interleaved (each frame's words arrive contiguously, sop..eop), that each
// source's frames arrive complete and in order, that both sources are
// served when both wait (alternation), and the frame counters.
module tb_tx_aggregator;
  localparam int DW = 128;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;
    // Give every asynchronous reset a falling edge.
  initial begin
    rst_n = 1;
    #1 rst_n = 0;
  end
  int checks = 0, failures = 0;

  logic a_valid, a_ready, a_sop, a_eop, b_valid, b_ready, b_sop, b_eop;
  logic o_valid, o_ready, o_sop, o_eop;
  logic [DW-1:0] a_data, b_data, o_data;
  logic [3:0] a_empty, b_empty, o_empty;
  logic [31:0] frames_a, frames_b;

  tx_aggregator #(.DATA_W(DW)) dut (.*);

  localparam int NFR = 200;
  // word payload: {src, frame number, word index, last flag}
  task automatic src_drive(input bit src);
    for (int f = 0; f < NFR; f++) begin
      int len;
      len = $urandom_range(6, 1);
      for (int w = 0; w < len; w++) begin
        while ($urandom_range(4) == 0) begin @(posedge clk); #1; end
        if (!src) begin
          a_valid = 1; a_data = DW'({src, 16'(f), 8'(w)}); a_sop = (w == 0); a_eop = (w == len-1);
          a_empty = 4'(w);
          do begin @(posedge clk); #1; end while (!a_fire);
          a_valid = 0;
        end else begin
          b_valid = 1; b_data = DW'({src, 16'(f), 8'(w)}); b_sop = (w == 0); b_eop = (w == len-1);
          b_empty = 4'(w);
          do begin @(posedge clk); #1; end while (!b_fire);
          b_valid = 0;
        end
      end
    end
  endtask

  logic a_fire = 0, b_fire = 0;
  always @(posedge clk) begin
    a_fire <= a_valid && a_ready;
    b_fire <= b_valid && b_ready;
  end

  int next_frame [2] = '{0, 0};
  int next_word = 0, cur_src = -1, switches = 0, last_src = -1;
  int done_frames = 0;

  always @(posedge clk) if (rst_n) begin
    o_ready <= ($urandom_range(3) != 0);
    if (o_valid && o_ready) begin
      int s, fr, w;
      s  = int'(o_data[24]);
      fr = int'(o_data[23:8]);
      w  = int'(o_data[7:0]);
      checks++;
      if (cur_src == -1) begin
        if (!o_sop || w != 0) begin failures++; $display("FAIL frame does not start with sop"); end
        cur_src = s;
        if (last_src != -1 && last_src != s) switches++;
      end
      if (s != cur_src || fr != next_frame[s] || w != next_word || o_empty != 4'(w)) begin
        failures++;
        $display("FAIL got src%0d frame %0d word %0d, expected src%0d frame %0d word %0d",
                 s, fr, w, cur_src, next_frame[cur_src], next_word);
      end
      next_word++;
      if (o_eop) begin
        next_frame[s]++;
        next_word = 0;
        last_src = s;
        cur_src = -1;
        done_frames++;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_valid = 0; b_valid = 0; a_sop = 0; a_eop = 0; b_sop = 0; b_eop = 0;
    a_data = '0; b_data = '0; a_empty = '0; b_empty = '0; o_ready = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    fork
      src_drive(0);
      src_drive(1);
    join
    wait (done_frames == 2*NFR);
    @(posedge clk);
    checks++;
    if (frames_a != NFR || frames_b != NFR) begin
      failures++; $display("FAIL counters %0d %0d", frames_a, frames_b);
    end
    checks++;
    if (switches < NFR/2) begin failures++; $display("FAIL only %0d source switches", switches); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
