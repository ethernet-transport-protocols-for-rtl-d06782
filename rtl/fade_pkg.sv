// fade_pkg - constants, message types and the Ethernet CRC shared by the
// FADE-10g FPGA transport core.
//
// The protocol constants (Ethertype 0xfade, version 0x0100, ACK code 0x0003,
// packet IDs 0xa5a5 / 0xa5a6 / 0xa55a) are the protocol's own. The codes of the
// START, STOP and RESET commands are this design's choice; every other command
// code is handed to user logic.
//
// All multi-byte protocol fields travel most significant byte first. A 64-bit
// XGMII word carries byte lane i in bits [8*i+7:8*i]; lane 0 goes first on the
// wire.
package fade_pkg;

  localparam logic [15:0] ETH_TYPE   = 16'hFADE;
  localparam logic [15:0] PROTO_VER  = 16'h0100;
  localparam logic [15:0] ACK_CODE   = 16'h0003;
  localparam logic [15:0] DATA_ID    = 16'hA5A5;
  localparam logic [15:0] LAST_ID    = 16'hA5A6;
  localparam logic [15:0] RESP_ID    = 16'hA55A;

  // Command codes run by the core itself (design choice).
  localparam logic [15:0] CMD_START  = 16'h0001;
  localparam logic [15:0] CMD_STOP   = 16'h0002;
  localparam logic [15:0] CMD_RESET  = 16'h0004;

  // XGMII control characters.
  localparam logic [7:0]  XG_IDLE    = 8'h07;
  localparam logic [7:0]  XG_START   = 8'hFB;
  localparam logic [7:0]  XG_TERM    = 8'hFD;
  // Start character, six preamble bytes and the start-of-frame delimiter.
  localparam logic [63:0] XG_PREAMBLE_D = 64'hD5_55_55_55_55_55_55_FB;
  localparam logic [7:0]  XG_PREAMBLE_C = 8'h01;
  localparam logic [63:0] XG_IDLE_D     = {8{XG_IDLE}};

  // Running CRC register after the FCS of a good frame has been included.
  localparam logic [31:0] CRC_RESIDUE = 32'hDEBB20E3;

  // Message from the packet receiver to the descriptor manager. For an ACK,
  // seq is the packet repetition number and arg the packet number.
  typedef struct packed {
    logic        is_ack;
    logic [15:0] code;
    logic [15:0] seq;
    logic [31:0] arg;
  } rx_msg_t;

  // 12-byte command response: code, sequence number, user-defined 8 bytes.
  typedef struct packed {
    logic [15:0] code;
    logic [15:0] seq;
    logic [63:0] user;
  } cmd_resp_t;

  typedef enum logic [1:0] {
    D_FREE     = 2'd0,  // empty, or being filled when it is the head
    D_PENDING  = 2'd1,  // full, waiting for (re)transmission
    D_INFLIGHT = 2'd2,  // sent, waiting for its ACK
    D_ACKED    = 2'd3   // acknowledged, freed once it is the oldest
  } desc_state_t;

  // Ethernet CRC-32 (reflected polynomial 0xEDB88320) over the first nbytes
  // byte lanes of d, lane 0 first. No final inversion.
  function automatic logic [31:0] crc32_upd(input logic [31:0] crc,
                                            input logic [63:0] d,
                                            input logic [3:0]  nbytes);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      if (4'(i) < nbytes) begin
        for (int b = 0; b < 8; b++) begin
          c = (c[0] ^ d[8*i+b]) ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
        end
      end
    end
    return c;
  endfunction

endpackage
