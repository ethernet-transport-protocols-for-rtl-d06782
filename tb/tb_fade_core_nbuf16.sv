// tb_fade_core_nbuf16 - the end-to-end test of tb_fade_core run on the
// 16-buffer configuration (the smaller of the two synthesized sizes).
// Otherwise identical: end-to-end test of the FADE core
// with 1024-word packets, against a behavioural model of the PC.
//
// The PC model parses every frame the core sends (FCS, addresses, protocol
// ID, packet type, embedded response, repetition and packet numbers, every
// data word), answers each data packet with an ACK after 469 cycles (3 us at
// 156.25 MHz, the acknowledge latency reported for the PC driver) and sends
// the START, user, STOP and RESET commands, starting every other frame in
// XGMII lane 4. A user source writes 60 full
// packets and 300 more words as fast as dta_ready allows.
// Mechanisms forced and counted:
//   - loss found by a later ACK: first copies of packets 3 and 5 are dropped;
//   - no second retransmission of an already retransmitted packet (the
//     repetition-number rule), seen inside the descriptor manager;
//   - loss of a retransmitted copy (second copy of packet 3 dropped);
//   - ACK with a bad FCS dropped by the receiver (packet 10);
//   - timeout: the ACK of the last packet is corrupted, nothing follows it;
//   - stall: the PC holds back ACKs for 50000 cycles, the buffers fill and
//     dta_ready falls;
//   - responses both embedded in data packets and in frames of their own;
//   - last packet carrying the number of words used;
//   - back-to-back data packets exactly 1032 cycles apart (9.92 Gb/s).
module tb_fade_core_nbuf16;
  import fade_pkg::*;
  import tb_fade_pkg::*;

  localparam logic [47:0] FPGA_MAC = 48'h02_00_00_00_00_01;
  localparam logic [47:0] PC_MAC   = 48'h00_1B_21_AA_BB_CC;
  localparam int PW        = 1024;
  localparam int N_FULL    = 60;
  localparam int TAIL      = 300;
  localparam int N_PKT     = N_FULL + 1;
  localparam int ACK_LAT   = 469;
  localparam int PAUSE_LEN = 50000;
  localparam logic [63:0] USER_RESP = 64'h1122_3344_5566_7788;
  localparam logic [15:0] CMD_USER  = 16'h0010;

  logic clk = 1'b0;
  always #3.2ns clk = ~clk;
  logic rst_n;

  logic [63:0] dta, xgmii_txd, xgmii_rxd;
  logic [7:0]  xgmii_txc, xgmii_rxc;
  logic        dta_we, dta_ready, cmd_valid, running;
  logic        ev_retx, ev_timeout, ev_rx_drop;
  logic [15:0] cmd_code;
  logic [31:0] cmd_arg;

  fade_core #(.NBUF(16)) dut (
    .clk, .rst_n, .dta, .dta_we, .dta_ready,
    .xgmii_txd, .xgmii_txc, .xgmii_rxd, .xgmii_rxc,
    .cmd_valid, .cmd_code, .cmd_arg, .user_resp(USER_RESP), .running,
    .ev_retx, .ev_timeout, .ev_rx_drop
  );

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic logic [63:0] word_val(input longint unsigned k);
    return {~k[31:0], k[31:0]};
  endfunction

  // ---------------- user data source ----------------
  longint unsigned k = 0;
  localparam longint unsigned TOTAL = longint'(N_FULL) * PW + TAIL;
  bit src_en = 0;
  int stall_cycles = 0;
  assign dta_we = src_en && (k < TOTAL);
  assign dta    = word_val(k);
  always @(posedge clk) begin
    if (dta_we && dta_ready) k <= k + 1;
    if (dta_we && !dta_ready) stall_cycles++;
  end

  // ---------------- PC model: frames to the core ----------------
  frame_c rxq[$];
  int unsigned last_sched = 0;
  task automatic schedule(input frame_c f);
    if (f.t < last_sched) f.t = last_sched;
    last_sched = f.t;
    rxq.push_back(f);
  endtask

  // Frames are turned into XGMII lanes ({control, byte}); every other frame
  // starts in lane 4, as a 10G NIC may do.
  logic [8:0] lanes[$];
  int frames_to_fpga = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      xgmii_rxd <= {8{XG_IDLE}};
      xgmii_rxc <= 8'hFF;
      lanes.delete();
    end else begin
      logic [63:0] d;
      logic [7:0]  c;
      if (lanes.size() == 0 && rxq.size() > 0 && rxq[0].t <= cycle) begin
        frame_c f;
        f = rxq.pop_front();
        if (frames_to_fpga % 2 == 1) repeat (4) lanes.push_back({1'b1, XG_IDLE});
        frames_to_fpga++;
        lanes.push_back({1'b1, XG_START});
        repeat (6) lanes.push_back({1'b0, 8'h55});
        lanes.push_back({1'b0, 8'hD5});
        foreach (f.b[i]) lanes.push_back({1'b0, f.b[i]});
        lanes.push_back({1'b1, XG_TERM});
        // at least 12 bytes of gap
        repeat (11) lanes.push_back({1'b1, XG_IDLE});
        while (lanes.size() % 8 != 0) lanes.push_back({1'b1, XG_IDLE});
      end
      for (int l = 0; l < 8; l++) begin
        if (lanes.size() > 0) begin
          logic [8:0] x;
          x = lanes.pop_front();
          d[8*l +: 8] = x[7:0];
          c[l]        = x[8];
        end else begin
          d[8*l +: 8] = XG_IDLE;
          c[l]        = 1'b1;
        end
      end
      xgmii_rxd <= d;
      xgmii_rxc <= c;
    end
  end

  // ---------------- PC model: frames from the core ----------------
  int copies   [N_PKT];
  bit got      [N_PKT];
  int resp_seen[5];
  int embedded_resp = 0, standalone_resp = 0, last_pkts = 0, b2b = 0, data_frames = 0;
  int dropped = 0, bad_acks = 0;
  int unsigned last_data_t = 0;
  int unsigned pause_until = 0;
  bit pause_done = 0;
  bit user_cmd_sent = 0;
  logic [15:0] exp_code [5] = '{16'h0, CMD_START, CMD_USER, CMD_STOP, CMD_RESET};

  task automatic handle_resp(input logic [15:0] code, input logic [15:0] seq,
                             input logic [63:0] user, input bit emb);
    check(seq >= 1 && seq <= 4, "response sequence number in range");
    if (seq >= 1 && seq <= 4) begin
      check(code == exp_code[seq], $sformatf("response code %h for seq %0d", code, seq));
      resp_seen[seq]++;
    end
    check(user == USER_RESP, "user-defined response bytes");
    if (emb) embedded_resp++; else standalone_resp++;
  endtask

  task automatic handle_frame(input byte unsigned b[$], input int unsigned t);
    byte unsigned body[$];
    logic [31:0] fcs;
    logic [15:0] id;
    int n;
    n = b.size();
    body = b[0:n-5];
    fcs  = {b[n-1], b[n-2], b[n-3], b[n-4]};
    check(fcs == fcs_ref(body), "frame FCS");
    check(get_be(b, 0, 6) == 64'(PC_MAC) && get_be(b, 6, 6) == 64'(FPGA_MAC), "frame addresses");
    check(get_be(b, 12, 2) == 64'hFADE && get_be(b, 14, 2) == 64'h0100, "protocol id and version");
    id = 16'(get_be(b, 16, 2));
    if (id == DATA_ID || id == LAST_ID) begin
      int unsigned pkt, rep, nw, bad;
      logic [15:0] rc;
      data_frames++;
      check(n == 36 + 8 * PW + 4, "data frame length");
      if (last_data_t != 0) begin
        check(t - last_data_t >= 1032, "data frames at least 1032 cycles apart");
        if (t - last_data_t == 1032) b2b++;
      end
      last_data_t = t;
      rc = 16'(get_be(b, 18, 2));
      if (rc != 0) handle_resp(rc, 16'(get_be(b, 20, 2)), get_be(b, 22, 8), 1);
      rep = int'(get_be(b, 30, 2));
      pkt = int'(get_be(b, 32, 4));
      check(pkt < N_PKT, "packet number in range");
      if (pkt >= N_PKT) return;
      copies[pkt]++;
      // data contents
      nw  = (id == LAST_ID) ? int'(get_be(b, 36 + 8 * (PW - 1), 1)) |
                              (int'(b[36 + 8 * (PW - 1) + 1]) << 8) : PW;
      bad = 0;
      if (id == LAST_ID) begin
        last_pkts++;
        check(pkt == N_FULL, "last packet number");
        check(nw == TAIL, $sformatf("last packet word count %0d", nw));
      end else begin
        check(pkt < N_FULL, "full packet number");
      end
      for (int j = 0; j < nw && j < PW; j++) begin
        logic [63:0] w;
        for (int q = 0; q < 8; q++) w[8*q +: 8] = b[36 + 8*j + q];
        if (w != word_val(longint'(pkt) * PW + j)) bad++;
      end
      check(bad == 0, $sformatf("data words of packet %0d (%0d wrong)", pkt, bad));
      // losses on the way to the PC
      if ((pkt == 3 && copies[pkt] <= 2) || (pkt == 5 && copies[pkt] == 1)) begin
        dropped++;
        return;
      end
      got[pkt] = 1;
      begin
        frame_c a;
        int unsigned at;
        at = cycle + ACK_LAT;
        if (pkt == 12 && !pause_done) begin
          pause_done  = 1;
          pause_until = cycle + PAUSE_LEN;
        end
        if (at < pause_until) at = pause_until;
        a = build_pc_frame(FPGA_MAC, PC_MAC, ACK_CODE, 16'(rep), pkt, 64);
        if ((pkt == 10 || pkt == N_FULL) && copies[pkt] == 1) begin
          int z;
          z = a.b.size() - 1;
          a.b[z] = a.b[z] ^ 8'h5A;        // corrupted on the way back
          bad_acks++;
        end
        a.t = at;
        schedule(a);
      end
      if (pkt == 30 && !user_cmd_sent) begin
        frame_c c;
        user_cmd_sent = 1;
        c = build_pc_frame(FPGA_MAC, PC_MAC, CMD_USER, 16'd2, 32'h0000_1234, 78);
        c.t = cycle;
        schedule(c);
      end
    end else if (id == RESP_ID) begin
      check(n == 64, "response frame length");
      check(get_be(b, 18, 2) == 0, "response filler");
      handle_resp(16'(get_be(b, 20, 2)), 16'(get_be(b, 22, 2)), get_be(b, 24, 8), 0);
    end else begin
      check(0, $sformatf("unknown packet id %h", id));
    end
  endtask

  byte unsigned txb[$];
  bit tx_in = 0;
  int unsigned tx_t0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (xgmii_txc[0] && xgmii_txd[7:0] == XG_START) begin
        check(!tx_in, "start inside a frame");
        check(xgmii_txd == XG_PREAMBLE_D && xgmii_txc == XG_PREAMBLE_C, "preamble word");
        tx_in = 1;
        tx_t0 = cycle;
        txb.delete();
      end else if (tx_in) begin
        for (int l = 0; l < 8; l++) begin
          if (!tx_in) break;
          if (xgmii_txc[l]) begin
            check(xgmii_txd[8*l +: 8] == XG_TERM, "terminate character");
            tx_in = 0;
            handle_frame(txb, tx_t0);
          end else begin
            txb.push_back(xgmii_txd[8*l +: 8]);
          end
        end
      end
    end
  end

  // ---------------- mechanism counters inside the core ----------------
  int retx_events = 0, timeouts = 0, suppressed = 0, cmd_strobes = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (ev_retx) retx_events++;
      if (ev_timeout) timeouts++;
      if (cmd_valid) cmd_strobes++;
      check(!ev_rx_drop, "no message lost to a full FIFO");
      if (dut.u_dm.take_ack) begin
        for (int i = 0; i < 16; i++)
          if (dut.u_dm.dstate[i] == D_INFLIGHT &&
              $signed(dut.u_dm.dpkt[i] - dut.u_dm.msg.arg) < 0 &&
              $signed(16'(dut.u_dm.drep[i] - dut.u_dm.msg.seq)) > 0)
            suppressed++;
      end
    end
  end

  task automatic send_cmd(input logic [15:0] code, input logic [15:0] seq);
    frame_c c;
    c = build_pc_frame(FPGA_MAC, PC_MAC, code, seq, 32'h0, 78);
    c.t = cycle;
    schedule(c);
  endtask

  // ---------------- sequence ----------------
  initial begin
    byte unsigned v[$];
    foreach (copies[i]) begin copies[i] = 0; got[i] = 0; end
    foreach (resp_seen[i]) resp_seen[i] = 0;
    // the reference FCS itself, on the standard check string
    v = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    check(fcs_ref(v) == 32'hCBF4_3926, "reference CRC-32 check value");

    rst_n = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(!dta_ready, "no data accepted before START");
    send_cmd(CMD_START, 16'd1);
    wait (resp_seen[1] > 0);
    check(running, "running after START");
    src_en = 1;
    wait (k == TOTAL);
    src_en = 0;
    send_cmd(CMD_STOP, 16'd3);
    wait (resp_seen[3] > 0);
    begin
      bit all;
      do begin
        @(posedge clk);
        all = 1;
        foreach (got[i]) if (!got[i]) all = 0;
      end while (!all);
    end
    // the ACK of the last packet was lost: wait for the timeout copy
    wait (copies[N_FULL] >= 2);
    repeat (3000) @(posedge clk);
    check(!running && !dta_ready, "stopped after STOP");
    check(dut.u_dm.head == dut.u_dm.tail, "all buffers freed");
    send_cmd(CMD_RESET, 16'd4);
    wait (resp_seen[4] > 0);
    repeat (20) @(posedge clk);
    check(dut.u_dm.next_pkt == 0 && dut.u_dm.head == 0, "RESET cleared the descriptors");

    // mechanisms
    $display("data frames %0d, dropped %0d, bad ACKs %0d, ACK-found losses %0d, suppressed %0d, timeouts %0d, stall cycles %0d, embedded %0d, standalone %0d, back-to-back %0d",
             data_frames, dropped, bad_acks, retx_events, suppressed, timeouts, stall_cycles,
             embedded_resp, standalone_resp, b2b);
    check(retx_events > 0, "loss detected from a later ACK");
    check(suppressed > 0, "already retransmitted packet not sent again");
    check(copies[3] >= 3, "lost retransmission repaired");
    check(copies[10] >= 2, "bad-FCS ACK dropped, packet resent");
    check(timeouts > 0 && copies[N_FULL] >= 2, "timeout retransmission");
    check(stall_cycles > 0, "source stalled on full buffers");
    check(embedded_resp > 0, "response embedded in a data packet");
    check(standalone_resp > 0, "response in its own frame");
    check(last_pkts > 0, "last packet seen");
    check(b2b > 0, "back-to-back packets at 1032 cycles");
    check(cmd_strobes == 4, "four commands shown to user logic");
    check(frames_to_fpga >= 2, "frames sent to the core in both start lanes");
    foreach (resp_seen[i]) if (i > 0) check(resp_seen[i] == 1, $sformatf("one response to command %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
