// fade_core - FPGA end of the FADE-10g transport: a reliable, low-latency
// data link from an FPGA to a PC over 10 Gb Ethernet using its own Layer 3
// protocol (Ethertype 0xfade) instead of TCP/IP.
//
// User logic writes 64-bit words (dta, dta_we, dta_ready). They are packed
// into 8 KiB packets (1024 words) held in NBUF packet buffers until the PC
// acknowledges them; the PC's ACKs arrive in order, so an ACK for a later
// packet reveals a loss at once and the lost packets are retransmitted
// (see desc_manager). The PC also sends commands; their responses ride in
// the next data packet or, if none is going out, in a frame of their own.
//
//   XGMII rx -> pkt_receiver -> ack_cmd_fifo -> desc_manager -> pkt_buffers
//                                                            -> pkt_sender -> XGMII tx
//
// The block structure follows the protocol's core diagram; the Ethernet PHY
// (10GBASE-R PCS/PMA, transceiver) is outside and connects at the XGMII
// ports, which run on the core clock (156.25 MHz for 10 Gb/s). One packet
// takes 1032 clock cycles on the wire, so a continuous stream can reach
// 1024/1032 of the line rate. Reset is synchronous and active low.
module fade_core
  import fade_pkg::*;
#(
  parameter int          NBUF       = 32,
  parameter int          PKT_WORDS  = 1024,
  parameter logic [47:0] MY_MAC     = 48'h02_00_00_00_00_01,
  parameter int          TIMEOUT    = 65536,
  parameter int          FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [63:0] dta,
  input  logic        dta_we,
  output logic        dta_ready,
  output logic [63:0] xgmii_txd,
  output logic [7:0]  xgmii_txc,
  input  logic [63:0] xgmii_rxd,
  input  logic [7:0]  xgmii_rxc,
  output logic        cmd_valid,
  output logic [15:0] cmd_code,
  output logic [31:0] cmd_arg,
  input  logic [63:0] user_resp,
  output logic        running,
  // status strobes: ACK-detected loss, retransmission timeout, message lost
  // because the ACK and command FIFO was full
  output logic        ev_retx,
  output logic        ev_timeout,
  output logic        ev_rx_drop
);
  localparam int BW = $clog2(NBUF);
  localparam int AW = BW + $clog2(PKT_WORDS);

  // receiver -> FIFO
  logic        rx_valid;
  rx_msg_t     rx_msg;
  logic [47:0] peer_mac;
  logic        fifo_full, fifo_empty, msg_pop;
  rx_msg_t     fifo_dout;

  // manager <-> memory / sender
  logic          mem_we;
  logic [AW-1:0] mem_waddr, mem_raddr;
  logic [63:0]   mem_wdata, mem_rdata;
  logic          tx_valid, tx_take, tx_last, snd_busy;
  logic [BW-1:0] tx_buf, snd_buf;
  logic [31:0]   tx_pkt;
  logic [15:0]   tx_rep;
  logic          resp_valid, resp_take;
  cmd_resp_t     resp;

  assign ev_rx_drop = rx_valid && fifo_full;

  pkt_receiver #(.MY_MAC(MY_MAC)) u_rx (
    .clk, .rst_n, .xgmii_rxd, .xgmii_rxc,
    .msg_valid(rx_valid), .msg(rx_msg), .peer_mac
  );

  ack_cmd_fifo #(.W($bits(rx_msg_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(rx_valid), .din(rx_msg), .full(fifo_full),
    .pop(msg_pop), .dout(fifo_dout), .empty(fifo_empty)
  );

  desc_manager #(.NBUF(NBUF), .PKT_WORDS(PKT_WORDS), .TIMEOUT(TIMEOUT)) u_dm (
    .clk, .rst_n, .dta, .dta_we, .dta_ready,
    .mem_we, .mem_waddr, .mem_wdata,
    .msg_valid(!fifo_empty), .msg(fifo_dout), .msg_pop,
    .tx_valid, .tx_buf, .tx_pkt, .tx_rep, .tx_last, .tx_take, .snd_busy, .snd_buf,
    .resp_valid, .resp, .resp_take,
    .cmd_valid, .cmd_code, .cmd_arg, .user_resp, .running,
    .ev_retx, .ev_timeout
  );

  pkt_buffers #(.NBUF(NBUF), .PKT_WORDS(PKT_WORDS)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(mem_raddr), .rdata(mem_rdata)
  );

  pkt_sender #(.NBUF(NBUF), .PKT_WORDS(PKT_WORDS)) u_tx (
    .clk, .rst_n, .my_mac(MY_MAC), .peer_mac,
    .tx_valid, .tx_buf, .tx_pkt, .tx_rep, .tx_last, .tx_take, .snd_busy, .snd_buf,
    .resp_valid, .resp, .resp_take,
    .mem_raddr, .mem_rdata, .xgmii_txd, .xgmii_txc
  );

endmodule
