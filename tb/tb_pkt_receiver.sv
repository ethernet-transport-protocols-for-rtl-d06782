// tb_pkt_receiver - drives XGMII receive frames of many lengths (every
// terminate lane) and gaps: good ACK and command frames, and frames that
// must be dropped (bad FCS, other target, other Ethertype, other version,
// too short, error character inside), starting in lane 0 or lane 4, some
// with no idle word between them. Checks every message, its timing (three
// cycles after the terminate word) and the learned peer address.
module tb_pkt_receiver;
  import fade_pkg::*;
  import tb_fade_pkg::*;
  localparam logic [47:0] MY = 48'h02_00_00_00_00_01;

  logic clk = 0;
  always #5ns clk = ~clk;
  logic rst_n;
  logic [63:0] xgmii_rxd;
  logic [7:0]  xgmii_rxc;
  logic        msg_valid;
  rx_msg_t     msg;
  logic [47:0] peer_mac;

  pkt_receiver #(.MY_MAC(MY)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  typedef struct { rx_msg_t m; int unsigned t; logic [47:0] src; } exp_t;
  exp_t expq[$];
  int got = 0;

  always @(posedge clk) begin
    if (rst_n && msg_valid) begin
      got++;
      check(expq.size() > 0, "unexpected message");
      if (expq.size() > 0) begin
        exp_t e;
        e = expq.pop_front();
        check(msg == e.m, $sformatf("message %h, expected %h", msg, e.m));
        check(cycle == e.t, $sformatf("message at %0d, expected %0d", cycle, e.t));
        #1 check(peer_mac == e.src, "peer address");
      end
    end
  end

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      xgmii_rxd = {8{XG_IDLE}};
      xgmii_rxc = 8'hFF;
    end
  endtask

  // Send a frame starting in lane 0, or in lane 4 when lane4 is set;
  // err_word >= 0 puts an error character in that frame word. Returns the
  // cycle count at which the word holding the terminate is on the bus,
  // counted in aligned words.
  task automatic send(input frame_c f, input int err_word, input bit lane4,
                      output int unsigned tend);
    logic [8:0] ln[$];   // {control, byte} per lane, in wire order
    int nw, fdpos;
    if (lane4) repeat (4) ln.push_back({1'b1, XG_IDLE});
    ln.push_back({1'b1, XG_START});
    repeat (6) ln.push_back({1'b0, 8'h55});
    ln.push_back({1'b0, 8'hD5});
    foreach (f.b[i]) ln.push_back({1'b0, f.b[i]});
    fdpos = ln.size();
    ln.push_back({1'b1, XG_TERM});
    while (ln.size() % 8 != 0) ln.push_back({1'b1, XG_IDLE});
    nw = ln.size() / 8;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      for (int l = 0; l < 8; l++) begin
        xgmii_rxd[8*l +: 8] = ln[8*w + l][7:0];
        xgmii_rxc[l]        = ln[8*w + l][8];
      end
      if (w == err_word + 1) begin xgmii_rxd[15:8] = 8'hFE; xgmii_rxc[1] = 1; end
      if (w == fdpos / 8) tend = cycle;
    end
    // After re-alignment of a lane-4 frame, a terminate in lanes 0-3 ends up
    // in the word before, which the receiver sees one cycle earlier.
    if (lane4 && fdpos % 8 < 4) tend = tend - 1;
  endtask

  task automatic good(input logic [47:0] src, input logic [15:0] code, input logic [15:0] seq,
                      input logic [31:0] arg, input int len, input bit lane4);
    frame_c f;
    exp_t e;
    int unsigned te;
    f = build_pc_frame(MY, src, code, seq, arg, len);
    send(f, -1, lane4, te);
    e.m = '{is_ack: (code == 16'h0003), code: code, seq: seq, arg: arg};
    e.t = te + 3;
    e.src = src;
    expq.push_back(e);
  endtask

  initial begin
    frame_c f;
    int unsigned te;
    int sent_good = 0;
    rst_n = 0;
    xgmii_rxd = {8{XG_IDLE}};
    xgmii_rxc = 8'hFF;
    repeat (3) @(posedge clk);
    rst_n = 1;
    idle(2);
    // every length from 64 to 80 bytes, both message kinds, both start lanes
    for (int len = 64; len <= 80; len++) begin
      for (int s4 = 0; s4 < 2; s4++) begin
        good(48'h00_1B_21_00_00_00 | 48'(len), (len % 2) ? 16'h0003 : 16'h0020 + 16'(len),
             16'(len * 3 + s4), 32'hDEAD_0000 | 32'(len), len, s4[0]);
        sent_good++;
        if ((len + s4) % 4 != 0) idle(1 + (len % 3));
      end
    end
    // frames to drop
    f = build_pc_frame(MY, 48'h1, 16'h0003, 1, 1, 64);
    f.b[20] = f.b[20] ^ 8'h01;                        send(f, -1, 0, te); idle(1);
    f = build_pc_frame(48'h02_00_00_00_00_02, 48'h1, 16'h0003, 1, 1, 64);
                                                      send(f, -1, 0, te); idle(1);
    f = new(); f.b = '{};
    push_be(f.b, 64'(MY), 6); push_be(f.b, 64'h1, 6); push_be(f.b, 64'h0800, 2);
    push_be(f.b, 64'h0100, 2); while (f.b.size() < 60) f.b.push_back(0); add_fcs(f.b);
                                                      send(f, -1, 0, te); idle(1);
    f = new(); f.b = '{};
    push_be(f.b, 64'(MY), 6); push_be(f.b, 64'h1, 6); push_be(f.b, 64'hFADE, 2);
    push_be(f.b, 64'h0200, 2); while (f.b.size() < 60) f.b.push_back(0); add_fcs(f.b);
                                                      send(f, -1, 0, te); idle(1);
    f = build_pc_frame(MY, 48'h1, 16'h0003, 1, 1, 60); send(f, -1, 0, te); idle(1);
    f = build_pc_frame(MY, 48'h1, 16'h0003, 1, 1, 64); send(f, 3, 1, te);  idle(1);
    // a good one afterwards, back to back
    good(48'h00_1B_21_AB_CD_EF, 16'h0003, 16'h0102, 32'h0000_0040, 78, 1);
    sent_good++;
    idle(1);
    good(48'h00_1B_21_AB_CD_EE, 16'h0001, 16'h0001, 32'h0, 78, 0);
    sent_good++;
    idle(6);
    check(got == sent_good, $sformatf("%0d messages for %0d good frames", got, sent_good));
    check(expq.size() == 0, "all expected messages seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
