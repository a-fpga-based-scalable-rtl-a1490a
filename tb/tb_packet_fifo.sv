// Self-checking test of packet_fifo at its default size (128 x 512).
// Random writes and reads against a reference queue; checks data, framing
// flags, free_words, that a full FIFO refuses words and accepts exactly
// DEPTH, and that a word written in one cycle is readable in the next.
module tb_packet_fifo;
  localparam int DW = 128, DEPTH = 512;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic wr_valid, wr_ready, wr_sop, wr_eop, rd_valid, rd_ready, rd_sop, rd_eop;
  logic [DW-1:0] wr_data, rd_data;
  logic [3:0] wr_empty, rd_empty;
  logic [9:0] free_words;
    // Give every asynchronous reset a falling edge.
  initial begin
    rst_n = 1;
    #1 rst_n = 0;
  end
  int checks = 0, failures = 0;
  logic [DW+5:0] model [$];

  packet_fifo #(.DATA_W(DW), .DEPTH(DEPTH)) dut (.*);

  task automatic fail(string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned wr_pct, rd_pct;
  int writes_refused;

  initial begin
    wr_valid = 0; rd_ready = 0; wr_data = '0; wr_sop = 0; wr_eop = 0; wr_empty = '0;
    writes_refused = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // Phase 1: fill until full, then drain; phases 2-3: random mixes.
    for (int phase = 0; phase < 4; phase++) begin
      case (phase)
        0: begin wr_pct = 100; rd_pct = 0;   end
        1: begin wr_pct = 0;   rd_pct = 100; end
        2: begin wr_pct = 70;  rd_pct = 50;  end
        default: begin wr_pct = 40; rd_pct = 80; end
      endcase
      for (int c = 0; c < 3000; c++) begin
        #1;
        wr_valid = ($urandom_range(99) < wr_pct);
        rd_ready = ($urandom_range(99) < rd_pct);
        wr_data  = {$urandom, $urandom, $urandom, $urandom};
        wr_sop   = $urandom_range(1);
        wr_eop   = $urandom_range(1);
        wr_empty = 4'($urandom);
        #1;
        checks++;
        if (free_words != 10'(DEPTH - model.size())) fail($sformatf("free_words %0d vs %0d", free_words, DEPTH - model.size()));
        if (wr_ready != (model.size() < DEPTH)) fail("wr_ready");
        if (rd_valid != (model.size() > 0)) fail("rd_valid");
        if (rd_valid) begin
          checks++;
          if ({rd_sop, rd_eop, rd_empty, rd_data} != model[0]) fail("head data");
        end
        @(posedge clk);
        if (rd_valid && rd_ready) void'(model.pop_front());
        if (wr_valid && wr_ready) model.push_back({wr_sop, wr_eop, wr_empty, wr_data});
        if (wr_valid && !wr_ready) writes_refused++;
      end
      if (phase == 0) begin
        checks++;
        if (model.size() != DEPTH) fail("did not fill to DEPTH");
      end
    end
    checks++;
    if (writes_refused == 0) fail("full FIFO never refused a write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
