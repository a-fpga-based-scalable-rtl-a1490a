// Self-checking test of async_fifo: 125 MHz writer, 250 MHz reader, as in
// the Request FIFO modules. Random
// valid/ready on both sides; every word must arrive once, in order. Also
// checks that a stalled reader makes the FIFO report full after exactly
// DEPTH words, and that the FIFO drains to empty.
module tb_async_fifo;
  localparam int W = 32, DEPTH = 16;
  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  always #4 wr_clk = ~wr_clk;
  always #2 rd_clk = ~rd_clk;

  logic wr_valid, wr_ready, rd_valid, rd_ready;
  logic [W-1:0] wr_data, rd_data;
    // Give every asynchronous reset a falling edge.
  initial begin
    wr_rst_n = 1; rd_rst_n = 1;
    #1 wr_rst_n = 0; rd_rst_n = 0;
  end
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int accepted = 0, received = 0;
  bit reader_on = 0;

  async_fifo #(.WIDTH(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    wr_valid = 0; wr_data = '0;
    #20 wr_rst_n = 1; rd_rst_n = 1;
    // phase 1: reader stopped, fill until full
    repeat (2) @(posedge wr_clk);
    for (int c = 0; c < 40; c++) begin
      #1 wr_valid = 1; wr_data = $urandom;
      @(posedge wr_clk);
      if (wr_ready) begin model.push_back(wr_data); accepted++; end
    end
    #1 wr_valid = 0;
    checks++;
    if (accepted != DEPTH) begin failures++; $display("FAIL accepted %0d before full", accepted); end
    reader_on = 1;
    // phase 2: random traffic
    for (int c = 0; c < 4000; c++) begin
      #1 wr_valid = $urandom_range(1); wr_data = $urandom;
      @(posedge wr_clk);
      if (wr_valid && wr_ready) begin model.push_back(wr_data); accepted++; end
    end
    #1 wr_valid = 0;
  end

  // reader
  initial begin
    rd_ready = 0;
    wait (reader_on);
    forever begin
      #0.5 rd_ready = $urandom_range(3) != 0;
      @(posedge rd_clk);
      if (rd_valid && rd_ready) begin
        checks++;
        if (model.size() == 0 || rd_data != model[0]) begin
          failures++;
          $display("FAIL read %08h", rd_data);
        end
        if (model.size() != 0) void'(model.pop_front());
        received++;
      end
    end
  end

  initial begin
    wait (reader_on);
    #40000;
    checks++;
    if (received != accepted || rd_valid) begin
      failures++;
      $display("FAIL received %0d of %0d", received, accepted);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
