// pkt_sender - builds the frames the core sends to the PC and drives them
// onto the XGMII transmit bus.
//
// Two frame kinds, with fields MSB first:
//   data / last data   target MAC, source MAC, 0xfade, 0x0100, 0xa5a5 (0xa5a6
//                      for the last packet), 12-byte embedded command
//                      response, repetition number (2 bytes), packet number
//                      (4 bytes), PKT_WORDS data words, FCS;
//   command response   target MAC, source MAC, 0xfade, 0x0100, 0xa55a,
//                      0x0000, 12-byte response, zero padding to 60 bytes, FCS.
// Data words are sent least significant byte first. The data header is 36
// bytes, so each XGMII word after the header carries the top half of one
// buffer word and the bottom half of the next, and the 4-byte FCS fills the
// top half of the last word; with PKT_WORDS = 1024 the frame is exactly 1029
// words. The response frame is the 64-byte Ethernet minimum, 8 words.
//
// Each transfer is: a start/preamble word, the frame words and a terminate
// word; the cycle in which the sender is idle and picks its next job puts out
// one idle word, so frames are separated by 16 bytes (terminate plus idle). A data packet therefore
// occupies PKT_WORDS + 8 cycles and back-to-back packets keep the link
// 1024/1032 busy. When idle, the sender takes the packet offered by the
// descriptor manager (tx_take) if there is one, and puts a waiting command
// response into its header (resp_take); with no packet to send it sends a
// waiting response in a frame of its own. An embedded response field with
// no response is all zeros.
//
// Buffer words are read one cycle ahead through the packet buffer read port
// (one-cycle latency). The FCS is the Ethernet CRC-32, sent low byte first.
// Frame layouts are the protocol's; the byte order of data words, the
// padding length and the frame scheduling are design choices.
module pkt_sender
  import fade_pkg::*;
#(
  parameter int NBUF      = 32,
  parameter int PKT_WORDS = 1024,
  localparam int BW       = $clog2(NBUF),
  localparam int WW       = $clog2(PKT_WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [47:0]      my_mac,
  input  logic [47:0]      peer_mac,
  // from the descriptor manager
  input  logic             tx_valid,
  input  logic [BW-1:0]    tx_buf,
  input  logic [31:0]      tx_pkt,
  input  logic [15:0]      tx_rep,
  input  logic             tx_last,
  output logic             tx_take,
  output logic             snd_busy,
  output logic [BW-1:0]    snd_buf,
  input  logic             resp_valid,
  input  cmd_resp_t        resp,
  output logic             resp_take,
  // packet buffer read port
  output logic [BW+WW-1:0] mem_raddr,
  input  logic [63:0]      mem_rdata,
  // XGMII transmit
  output logic [63:0]      xgmii_txd,
  output logic [7:0]       xgmii_txc
);
  // Data frame words excluding the FCS-carrying one: 36 header bytes plus
  // PKT_WORDS*8 data bytes plus 4 FCS bytes, in 8-byte words.
  localparam int DFW = (36 + 8 * PKT_WORDS + 4) / 8;
  localparam int RFW = 8;
  localparam int IW  = $clog2(DFW + 3);

  logic          active, is_data;
  logic [IW-1:0] idx;      // 0 start, 1..FW frame words, FW+1 terminate
  logic [IW-1:0] fw;       // frame words of the current frame
  logic [319:0]  hdr;      // header bytes 0..39, byte b in bits [8b+7:8b]
  logic [31:0]   crc;
  logic [31:0]   prev_hi;

  logic start_data, start_resp;
  assign start_data = !active && tx_valid;
  assign start_resp = !active && !tx_valid && resp_valid;
  assign tx_take    = start_data;
  assign resp_take  = start_data ? resp_valid : start_resp;
  assign snd_busy   = active && is_data;

  // Read address: buffer word m is needed at idx 5+m, so it is addressed at 4+m.
  assign mem_raddr = {snd_buf, WW'(idx - IW'(4))};

  // Frame word f = idx-1 for the current idx.
  logic [IW-1:0] f;
  logic [63:0]   hword;
  logic [63:0]   fword;
  logic          last_fw;
  assign f       = idx - 1'b1;
  assign last_fw = (idx == fw);
  logic [31:0]   lo;
  assign hword = (f < IW'(5)) ? hdr[64*f[2:0] +: 64] : 64'h0;
  assign lo    = is_data ? prev_hi : hword[31:0];
  always_comb begin
    if (!is_data)                  fword = hword;
    else if (f < IW'(4))           fword = hword;
    else if (f == IW'(4))          fword = {mem_rdata[31:0], hword[31:0]};
    else                           fword = {mem_rdata[31:0], prev_hi};
    if (last_fw) fword = {~crc32_upd(crc, {32'h0, lo}, 4'd4), lo};
  end

  // Place a big-endian field of n bytes at byte p of a header vector.
  function automatic logic [319:0] put(input logic [319:0] h, input int p,
                                       input logic [95:0] v, input int n);
    logic [319:0] r;
    r = h;
    for (int b = 0; b < 12; b++)
      if (b < n) r[8*(p+b) +: 8] = v[8*(n-1-b) +: 8];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active    <= 1'b0;
      is_data   <= 1'b0;
      idx       <= '0;
      fw        <= '0;
      snd_buf   <= '0;
      crc       <= '1;
      prev_hi   <= '0;
      xgmii_txd <= XG_IDLE_D;
      xgmii_txc <= 8'hFF;
      hdr       <= '0;
    end else begin
      prev_hi <= mem_rdata[63:32];
      if (!active) begin
        xgmii_txd <= XG_IDLE_D;
        xgmii_txc <= 8'hFF;
        if (start_data || start_resp) begin
          logic [319:0] h;
          cmd_resp_t    r;
          r = resp_valid ? resp : '0;
          h = '0;
          h = put(h, 0,  96'(peer_mac), 6);
          h = put(h, 6,  96'(my_mac), 6);
          h = put(h, 12, 96'(ETH_TYPE), 2);
          h = put(h, 14, 96'(PROTO_VER), 2);
          if (start_data) begin
            h = put(h, 16, 96'(tx_last ? LAST_ID : DATA_ID), 2);
            h = put(h, 18, r, 12);
            h = put(h, 30, 96'(tx_rep), 2);
            h = put(h, 32, 96'(tx_pkt), 4);
          end else begin
            h = put(h, 16, 96'(RESP_ID), 2);
            h = put(h, 20, r, 12);
          end
          hdr <= h;
          active  <= 1'b1;
          is_data <= start_data;
          snd_buf <= start_data ? tx_buf : snd_buf;
          fw      <= start_data ? IW'(DFW) : IW'(RFW);
          idx     <= '0;
        end
      end else begin
        idx <= idx + 1'b1;
        if (idx == '0) begin
          xgmii_txd <= XG_PREAMBLE_D;
          xgmii_txc <= XG_PREAMBLE_C;
          crc       <= '1;
        end else if (idx <= fw) begin
          xgmii_txd <= fword;
          xgmii_txc <= 8'h00;
          crc       <= crc32_upd(crc, fword, 4'd8);
        end else begin
          xgmii_txd <= {{7{XG_IDLE}}, XG_TERM};
          xgmii_txc <= 8'hFF;
          active    <= 1'b0;
        end
      end
    end
  end

endmodule
