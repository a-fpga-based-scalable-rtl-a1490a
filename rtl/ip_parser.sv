// IP Parsing Module: pulls the destination IPv4 address out of a frame.
//
// The parser watches the frame words as they are written into the packet
// FIFO; it never stalls them. It keeps a word counter from the start of the
// frame and captures the two EtherType bytes (offsets 12-13) and the four
// destination address bytes (offsets 30-33) from whichever words hold them,
// so it works for any bus width. One lookup query per frame is produced:
//   * when the word holding byte 33 is taken (word 2 on a 128-bit bus, word 1
//     on a 256-bit bus), q_valid rises one cycle later with the address and
//     q_ipv4 = (EtherType == 0x0800);
//   * a frame that ends before byte 33 gives a query with q_ipv4 = 0.
// Frames whose query has q_ipv4 = 0 are later forwarded without a lookup.
// Extracting the destination address during the first bus words follows the
// document; the EtherType check and the treatment of non-IPv4 frames are
// this design's choices (no VLAN tags, no IP options influence offset 30).
module ip_parser #(
  parameter int unsigned DATA_W = 128
) (
  input  logic               clk,
  input  logic               rst_n,
  // observed frame stream (in_valid marks a word accepted this cycle)
  input  logic               in_valid,
  input  logic [DATA_W-1:0]  in_data,
  input  logic               in_sop,
  input  logic               in_eop,
  // lookup query, one per frame, single-cycle pulse
  output logic               q_valid,
  output logic [31:0]        q_ip,
  output logic               q_ipv4
);

  import urlf_pkg::*;

  localparam int unsigned BYTES     = DATA_W / 8;
  localparam int unsigned NHDR      = 6;                     // 2 EtherType + 4 address
  localparam int unsigned LAST_BYTE = DST_IP_OFS + 3;
  localparam int unsigned LAST_WORD = LAST_BYTE / BYTES;
  localparam int unsigned WCNT_W    = $clog2(LAST_WORD + 2);

  // Frame offset of each captured header byte.
  function automatic int unsigned hdr_ofs(int unsigned i);
    return (i < 2) ? ETYPE_OFS + i : DST_IP_OFS + (i - 2);
  endfunction

  logic [7:0]        hdr_q [NHDR];
  logic [7:0]        hdr_d [NHDR];
  logic [WCNT_W-1:0] wcnt_q;      // index of the next word in the frame
  logic [WCNT_W-1:0] widx;        // index of the current word
  logic              done_q;      // query already issued for this frame

  assign widx = in_sop ? '0 : wcnt_q;

  always_comb begin
    for (int unsigned i = 0; i < NHDR; i++) begin
      hdr_d[i] = hdr_q[i];
      if (in_valid && (widx == WCNT_W'(hdr_ofs(i) / BYTES)))
        hdr_d[i] = in_data[8*(hdr_ofs(i) % BYTES) +: 8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt_q  <= '0;
      done_q  <= 1'b0;
      q_valid <= 1'b0;
      q_ip    <= '0;
      q_ipv4  <= 1'b0;
      for (int unsigned i = 0; i < NHDR; i++) hdr_q[i] <= '0;
    end else begin
      q_valid <= 1'b0;
      if (in_valid) begin
        for (int unsigned i = 0; i < NHDR; i++) hdr_q[i] <= hdr_d[i];
        if (widx <= WCNT_W'(LAST_WORD)) wcnt_q <= widx + 1'b1;
        if (in_sop) done_q <= 1'b0;
        if ((!done_q || in_sop) &&
            ((widx == WCNT_W'(LAST_WORD)) || in_eop)) begin
          q_valid <= 1'b1;
          q_ip    <= {hdr_d[2], hdr_d[3], hdr_d[4], hdr_d[5]};
          q_ipv4  <= (widx == WCNT_W'(LAST_WORD)) &&
                     ({hdr_d[0], hdr_d[1]} == ETYPE_IPV4);
          done_q  <= 1'b1;
        end
        if (in_eop) done_q <= 1'b0;
      end
    end
  end

endmodule
