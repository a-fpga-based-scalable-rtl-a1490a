// Self-checking test of crc32_hash.
// Known Ethernet CRC-32 values of eight 4-byte addresses, then 2000 random
// addresses against a byte-wise table-driven CRC computed here.
module tb_crc32_hash;
  logic [31:0] ip;
  logic [25:0] hash;
  int checks = 0, failures = 0;

  crc32_hash #(.HASH_W(26)) dut (.ip, .hash);

  logic [31:0] table_q [256];

  function automatic logic [31:0] ref_crc(logic [31:0] a);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    for (int b = 3; b >= 0; b--) c = table_q[(c ^ 32'(a[8*b +: 8])) & 32'hFF] ^ (c >> 8);
    return ~c;
  endfunction

  task automatic check(logic [31:0] a, logic [31:0] crc);
    ip = a;
    #1;
    checks++;
    if (hash !== crc[25:0]) begin
      failures++;
      $display("FAIL ip=%08h hash=%07h expected=%07h", a, hash, crc[25:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      logic [31:0] c;
      c = 32'(n);
      for (int k = 0; k < 8; k++) c = c[0] ? (c >> 1) ^ 32'hEDB8_8320 : c >> 1;
      table_q[n] = c;
    end
    check(32'h0000_0000, 32'h2144_df1c);
    check(32'hffff_ffff, 32'hffff_ffff);
    check(32'hc0a8_0001, 32'hf765_0d54);
    check(32'h0808_0808, 32'h2ce1_a471);
    check(32'h7f00_0001, 32'h651f_5f40);
    check(32'h0a00_0001, 32'h39fe_0fee);
    check(32'hd83a_d3ae, 32'h7023_361f);
    check(32'h1234_5678, 32'h4a09_0e98);
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] a;
      a = $urandom;
      check(a, ref_crc(a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
