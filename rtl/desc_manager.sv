// desc_manager - the descriptor manager: owns the packet buffers, decides
// what is sent and when a buffer may be reused, and runs the commands.
//
// Each of the NBUF buffers has a descriptor: a state (free, pending, in
// flight, acknowledged), the 32-bit packet number, the repetition number it
// was last sent with and a last-packet flag. Buffers are used as a ring:
//   head  the buffer being filled with user data (state free);
//   tail  the oldest buffer not yet freed.
// User words (dta, dta_we, dta_ready) go to {head, word}. After PKT_WORDS
// words the buffer becomes pending with the next packet number and head
// moves on; dta_ready is low while the head buffer is still occupied, which
// is how a full set of unacknowledged packets stalls the data source.
//
// The oldest pending buffer, searched from tail, is offered to the packet
// sender (tx_*). When the sender takes it, the descriptor goes in flight and
// records the current repetition number gen.
//
// ACK for packet P with repetition number R (from the FIFO):
//   - the descriptor holding P becomes acknowledged;
//   - every in-flight descriptor with a packet number before P (modulo 2^32)
//     and a repetition number not after R (modulo 2^16) was lost, since ACKs
//     arrive in order. Those go back to pending, and gen is incremented once,
//     so their new copies carry a larger repetition number and a later ACK
//     for an older copy does not retransmit them a second time.
// A buffer that has been acknowledged is freed when it reaches tail, unless
// the sender is still reading it. If no ACK arrives for TIMEOUT cycles while
// packets are in flight, all of them go back to pending (and gen advances),
// so the loss of the last packets of a burst is also repaired.
//
// Commands (one per cycle, taken from the FIFO only while no response is
// waiting): START lets user data in; STOP closes the partly filled buffer as
// the last packet, whose final word holds the number of data words used
// (0..PKT_WORDS-1), and stops accepting data; RESET returns every descriptor
// and counter to its initial state. Every command, these and any other, is
// shown to user logic (cmd_valid, cmd_code, cmd_arg) and leaves a response
// {code, sequence number, user_resp} for the sender.
//
// The repetition-number rule and the last-packet word count follow the
// protocol description. The ring organisation, the timeout, packet numbers
// starting at 0 and the command codes are design choices.
module desc_manager
  import fade_pkg::*;
#(
  parameter int NBUF      = 32,
  parameter int PKT_WORDS = 1024,
  parameter int TIMEOUT   = 65536,
  localparam int BW       = $clog2(NBUF),
  localparam int WW       = $clog2(PKT_WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // user data
  input  logic [63:0]      dta,
  input  logic             dta_we,
  output logic             dta_ready,
  // packet buffer write port
  output logic             mem_we,
  output logic [BW+WW-1:0] mem_waddr,
  output logic [63:0]      mem_wdata,
  // ACK and command FIFO
  input  logic             msg_valid,
  input  rx_msg_t          msg,
  output logic             msg_pop,
  // packet sender
  output logic             tx_valid,
  output logic [BW-1:0]    tx_buf,
  output logic [31:0]      tx_pkt,
  output logic [15:0]      tx_rep,
  output logic             tx_last,
  input  logic             tx_take,
  input  logic             snd_busy,
  input  logic [BW-1:0]    snd_buf,
  output logic             resp_valid,
  output cmd_resp_t        resp,
  input  logic             resp_take,
  // user command interface
  output logic             cmd_valid,
  output logic [15:0]      cmd_code,
  output logic [31:0]      cmd_arg,
  input  logic [63:0]      user_resp,
  output logic             running,
  // event strobes, one cycle each
  output logic             ev_retx,
  output logic             ev_timeout
);
  desc_state_t dstate [NBUF];
  logic [31:0] dpkt   [NBUF];
  logic [15:0] drep   [NBUF];
  logic        dlast  [NBUF];

  logic [BW-1:0] head, tail;
  logic [WW-1:0] wcnt;
  logic [31:0]   next_pkt;
  logic [15:0]   gen;
  logic          flush_req;
  logic [$clog2(TIMEOUT+1)-1:0] timer;

  // ---- oldest pending descriptor, searched from tail ----
  always_comb begin
    tx_valid = 1'b0;
    tx_buf   = '0;
    for (int k = NBUF - 1; k >= 0; k--) begin
      if (dstate[BW'(tail + BW'(k))] == D_PENDING) begin
        tx_valid = 1'b1;
        tx_buf   = BW'(tail + BW'(k));
      end
    end
  end
  assign tx_pkt  = dpkt[tx_buf];
  assign tx_last = dlast[tx_buf];
  assign tx_rep  = gen;

  // ---- FIFO handling ----
  logic take_ack, take_cmd;
  assign take_ack = msg_valid && msg.is_ack;
  assign take_cmd = msg_valid && !msg.is_ack && !resp_valid;
  assign msg_pop  = take_ack || take_cmd;

  // ACK matching and loss detection.
  logic [NBUF-1:0] ack_hit, retx_hit, inflight;
  always_comb begin
    for (int i = 0; i < NBUF; i++) begin
      inflight[i] = (dstate[i] == D_INFLIGHT);
      ack_hit[i]  = take_ack && (dstate[i] == D_PENDING || dstate[i] == D_INFLIGHT) &&
                    (dpkt[i] == msg.arg);
      retx_hit[i] = take_ack && inflight[i] &&
                    ($signed(dpkt[i] - msg.arg) < 0) &&
                    ($signed(16'(drep[i] - msg.seq)) <= 0);
    end
  end

  logic timeout_hit;
  assign timeout_hit = (|inflight) && (timer == ($bits(timer))'(TIMEOUT - 1));
  assign ev_retx     = |retx_hit;
  assign ev_timeout  = timeout_hit;

  // ---- user data path ----
  logic head_free, flush_go, user_wr;
  assign head_free = (dstate[head] == D_FREE);
  assign flush_go  = flush_req && head_free;
  assign dta_ready = running && !flush_req && head_free;
  assign user_wr   = dta_we && dta_ready;

  always_comb begin
    mem_we    = 1'b0;
    mem_waddr = {head, wcnt};
    mem_wdata = dta;
    if (flush_go) begin
      mem_we    = 1'b1;
      mem_waddr = {head, WW'(PKT_WORDS - 1)};
      mem_wdata = 64'(wcnt);
    end else if (user_wr) begin
      mem_we    = 1'b1;
    end
  end

  logic is_reset_cmd;
  assign is_reset_cmd = take_cmd && (msg.code == CMD_RESET);

  always_ff @(posedge clk) begin
    if (!rst_n || is_reset_cmd) begin
      for (int i = 0; i < NBUF; i++) begin
        dstate[i] <= D_FREE;
        dpkt[i]   <= '0;
        drep[i]   <= '0;
        dlast[i]  <= 1'b0;
      end
      head      <= '0;
      tail      <= '0;
      wcnt      <= '0;
      next_pkt  <= '0;
      gen       <= '0;
      flush_req <= 1'b0;
      running   <= 1'b0;
      timer     <= '0;
    end else begin
      // fill / close / flush
      if (flush_go) begin
        dstate[head] <= D_PENDING;
        dpkt[head]   <= next_pkt;
        dlast[head]  <= 1'b1;
        next_pkt     <= next_pkt + 1;
        head         <= head + 1'b1;
        wcnt         <= '0;
        flush_req    <= 1'b0;
        running      <= 1'b0;
      end else if (user_wr) begin
        wcnt <= wcnt + 1'b1;
        if (wcnt == WW'(PKT_WORDS - 1)) begin
          dstate[head] <= D_PENDING;
          dpkt[head]   <= next_pkt;
          dlast[head]  <= 1'b0;
          next_pkt     <= next_pkt + 1;
          head         <= head + 1'b1;
        end
      end

      // free the oldest acknowledged buffer
      if (dstate[tail] == D_ACKED && !(snd_busy && snd_buf == tail)) begin
        dstate[tail] <= D_FREE;
        tail         <= tail + 1'b1;
      end

      // sender takes a pending buffer
      if (tx_take) begin
        dstate[tx_buf] <= D_INFLIGHT;
        drep[tx_buf]   <= gen;
      end

      // ACK processing and timeout (override the take above)
      for (int i = 0; i < NBUF; i++) begin
        if (ack_hit[i])                       dstate[i] <= D_ACKED;
        else if (retx_hit[i])                 dstate[i] <= D_PENDING;
        else if (timeout_hit && inflight[i])  dstate[i] <= D_PENDING;
      end
      if ((|retx_hit) || timeout_hit) gen <= gen + 1'b1;

      if (!(|inflight) || take_ack || timeout_hit) timer <= '0;
      else                                         timer <= timer + 1'b1;

      // commands
      if (take_cmd) begin
        if (msg.code == CMD_START) running <= 1'b1;
        if (msg.code == CMD_STOP)  flush_req <= 1'b1;
      end
    end
  end

  // Command response slot and user command strobe.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      resp_valid <= 1'b0;
      resp       <= '0;
      cmd_valid  <= 1'b0;
      cmd_code   <= '0;
      cmd_arg    <= '0;
    end else begin
      cmd_valid <= take_cmd;
      if (take_cmd) begin
        cmd_code   <= msg.code;
        cmd_arg    <= msg.arg;
        resp_valid <= 1'b1;
        resp       <= '{code: msg.code, seq: msg.seq, user: user_resp};
      end else if (resp_take) begin
        resp_valid <= 1'b0;
      end
    end
  end

  initial assert ((NBUF & (NBUF - 1)) == 0 && (PKT_WORDS & (PKT_WORDS - 1)) == 0)
    else $error("desc_manager: NBUF and PKT_WORDS must be powers of two");

  a_take_pending: assert property (@(posedge clk) disable iff (!rst_n) tx_take |-> tx_valid)
    else $error("desc_manager: sender took a buffer that was not offered");
  a_resp_take: assert property (@(posedge clk) disable iff (!rst_n) resp_take |-> resp_valid)
    else $error("desc_manager: response taken while none was waiting");

endmodule
