// pkt_receiver - receives FADE frames from the PC over XGMII and turns ACK and
// command packets into messages for the ACK and command FIFO.
//
// XGMII lets a frame start in lane 0 or lane 4. A first stage delays the
// receive bus by one word and, for a frame that started in lane 4, shifts it
// by four lanes, so the rest of the receiver always sees the start character
// in lane 0. A frame ends at the first lane holding the terminate character. The receiver keeps
// the first four frame words (32 bytes, enough for every field the PC sends),
// runs the Ethernet CRC over every frame byte including the FCS, and at the
// terminate character accepts the frame when
//   - the CRC register holds the good-frame residue,
//   - the frame, FCS included, is at least 64 bytes long,
//   - the target address is MY_MAC,
//   - the Ethertype is 0xfade and the protocol version 0x0100.
// Frames with any other control character inside are dropped.
// An accepted frame yields one msg_valid pulse, three cycles after the word
// that holds the terminate character. Code 0x0003 makes an ACK message
// (repetition number in seq, packet number in arg; the transmission delay
// field is not used by the core); any other code makes a command message
// (code, sequence number, argument). The source address of the last accepted
// frame is kept as peer_mac, the target of everything the core sends.
//
// Packet layouts and constants follow the protocol description. The
// 64-byte minimum and learning the peer address from
// received packets are design choices.
module pkt_receiver
  import fade_pkg::*;
#(
  parameter logic [47:0] MY_MAC = 48'h02_00_00_00_00_01
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [63:0] xgmii_rxd,
  input  logic [7:0]  xgmii_rxc,
  output logic        msg_valid,
  output rx_msg_t     msg,
  output logic [47:0] peer_mac
);
  // ---- lane alignment ----
  logic [63:0]  prev_d, rxd;
  logic [7:0]   prev_c, rxc;
  logic         shift4;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_d <= {8{XG_IDLE}};
      prev_c <= 8'hFF;
      shift4 <= 1'b0;
    end else begin
      prev_d <= xgmii_rxd;
      prev_c <= xgmii_rxc;
      if (xgmii_rxc[4] && xgmii_rxd[39:32] == XG_START)     shift4 <= 1'b1;
      else if (xgmii_rxc[0] && xgmii_rxd[7:0] == XG_START) shift4 <= 1'b0;
    end
  end
  assign rxd = shift4 ? {xgmii_rxd[31:0], prev_d[63:32]} : prev_d;
  assign rxc = shift4 ? {xgmii_rxc[3:0], prev_c[7:4]}   : prev_c;

  logic         in_frame;
  logic [11:0]  wcnt;        // frame words received, saturating
  logic [255:0] hdr;         // frame bytes 0..31, byte b in bits [8b+7:8b]
  logic [31:0]  crc;

  // Frame end evaluation, registered.
  logic         end_q;
  logic         end_ok_q;
  logic [31:0]  crc_q;

  // First control lane of this word, and whether it is the terminate.
  logic [3:0]   ctl_lane;
  logic         has_ctl;
  always_comb begin
    ctl_lane = 4'd8;
    has_ctl  = 1'b0;
    for (int i = 7; i >= 0; i--) begin
      if (rxc[i]) begin
        ctl_lane = 4'(i);
        has_ctl  = 1'b1;
      end
    end
  end

  logic is_start;
  assign is_start = rxc[0] && (rxd[7:0] == XG_START);

  function automatic logic [7:0] hb(input logic [255:0] h, input int b);
    return h[8*b +: 8];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_frame <= 1'b0;
      wcnt     <= '0;
      crc      <= '1;
      end_q    <= 1'b0;
      end_ok_q <= 1'b0;
      crc_q    <= '0;
      hdr      <= '0;
    end else begin
      end_q <= 1'b0;
      if (is_start) begin
        in_frame <= 1'b1;
        wcnt     <= '0;
        crc      <= '1;
      end else if (in_frame) begin
        if (!has_ctl) begin
          crc <= crc32_upd(crc, rxd, 4'd8);
          if (wcnt < 12'd4) hdr[64*wcnt[1:0] +: 64] <= rxd;
          if (wcnt != '1) wcnt <= wcnt + 1'b1;
        end else begin
          in_frame <= 1'b0;
          if (rxd[8*ctl_lane[2:0] +: 8] == XG_TERM) begin
            end_q    <= 1'b1;
            crc_q    <= crc32_upd(crc, rxd, ctl_lane);
            // 64-byte minimum: eight full words, or more.
            end_ok_q <= (wcnt >= 12'd8);
          end
        end
      end
    end
  end

  // Field decode from the stored header bytes.
  logic [47:0] f_dst, f_src;
  logic [15:0] f_type, f_ver, f_code, f_seq;
  logic [31:0] f_arg;
  assign f_dst  = {hb(hdr,0), hb(hdr,1), hb(hdr,2), hb(hdr,3), hb(hdr,4), hb(hdr,5)};
  assign f_src  = {hb(hdr,6), hb(hdr,7), hb(hdr,8), hb(hdr,9), hb(hdr,10), hb(hdr,11)};
  assign f_type = {hb(hdr,12), hb(hdr,13)};
  assign f_ver  = {hb(hdr,14), hb(hdr,15)};
  assign f_code = {hb(hdr,16), hb(hdr,17)};
  assign f_seq  = {hb(hdr,18), hb(hdr,19)};
  assign f_arg  = {hb(hdr,20), hb(hdr,21), hb(hdr,22), hb(hdr,23)};

  logic accept;
  assign accept = end_q && end_ok_q && (crc_q == CRC_RESIDUE) &&
                  (f_dst == MY_MAC) && (f_type == ETH_TYPE) && (f_ver == PROTO_VER);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      msg_valid <= 1'b0;
      msg       <= '0;
      peer_mac  <= '0;
    end else begin
      msg_valid <= accept;
      if (accept) begin
        msg.is_ack <= (f_code == ACK_CODE);
        msg.code   <= f_code;
        msg.seq    <= f_seq;
        msg.arg    <= f_arg;
        peer_mac   <= f_src;
      end
    end
  end

endmodule
