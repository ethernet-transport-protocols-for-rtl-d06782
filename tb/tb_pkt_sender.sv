// tb_pkt_sender - offers the sender a sequence of data packets (one with a
// waiting command response, one marked last) from a memory model, then a
// lone command response. Every XGMII frame is parsed and checked byte by
// byte (preamble, addresses, protocol fields, embedded response, repetition
// and packet numbers, all 1024 data words, FCS), back-to-back packets must
// start exactly 1032 cycles apart, and snd_busy/snd_buf must name the buffer
// being read.
module tb_pkt_sender;
  import fade_pkg::*;
  import tb_fade_pkg::*;
  localparam int NBUF = 32, PW = 1024;
  localparam logic [47:0] MY = 48'h02_00_00_00_00_01, PEER = 48'h00_1B_21_12_34_56;

  logic clk = 0;
  always #5ns clk = ~clk;
  logic rst_n;
  logic tx_valid, tx_last, tx_take, snd_busy, resp_valid, resp_take;
  logic [4:0]  tx_buf, snd_buf;
  logic [31:0] tx_pkt;
  logic [15:0] tx_rep;
  cmd_resp_t   resp;
  logic [14:0] mem_raddr;
  logic [63:0] mem_rdata, xgmii_txd;
  logic [7:0]  xgmii_txc;

  pkt_sender #(.NBUF(NBUF), .PKT_WORDS(PW)) dut (
    .clk, .rst_n, .my_mac(MY), .peer_mac(PEER),
    .tx_valid, .tx_buf, .tx_pkt, .tx_rep, .tx_last, .tx_take, .snd_busy, .snd_buf,
    .resp_valid, .resp, .resp_take, .mem_raddr, .mem_rdata, .xgmii_txd, .xgmii_txc
  );

  function automatic logic [63:0] memf(input logic [14:0] a);
    return {17'h1ABCD ^ 17'(a), 15'(a), ~a, 2'b10} ^ 64'h0123_4567_89AB_CDEF;
  endfunction
  always @(posedge clk) mem_rdata <= memf(mem_raddr);

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // jobs: buffer, packet number, repetition, last
  typedef struct { logic [4:0] b; logic [31:0] p; logic [15:0] r; bit last; bit with_resp; } job_t;
  job_t jobs[$];
  job_t sent[$];
  job_t cur;
  localparam cmd_resp_t R1 = '{code: 16'h0010, seq: 16'h0007, user: 64'hFEED_FACE_CAFE_BEEF};
  localparam cmd_resp_t R2 = '{code: 16'h0002, seq: 16'h0008, user: 64'h0102_0304_0506_0708};

  assign tx_valid = jobs.size() > 0;
  assign tx_buf   = tx_valid ? jobs[0].b : '0;
  assign tx_pkt   = tx_valid ? jobs[0].p : '0;
  assign tx_rep   = tx_valid ? jobs[0].r : '0;
  assign tx_last  = tx_valid ? jobs[0].last : '0;

  int resp_takes = 0;
  // The job list changes only at the falling edge, after the sender has
  // sampled it.
  bit took = 0, took_resp = 0;
  always @(negedge clk) begin
    if (took) begin
      job_t j;
      j = jobs.pop_front();
      j.with_resp = took_resp;
      sent.push_back(j);
    end
  end
  always @(posedge clk) begin
    took      <= rst_n && tx_take;
    took_resp <= resp_valid;
    if (rst_n && resp_take) begin
      resp_takes++;
      resp_valid <= 1'b0;
    end
  end

  // frame parser
  byte unsigned fb[$];
  bit in_f = 0;
  int unsigned t0, last_data_t = 0;
  int data_frames = 0, resp_frames = 0, b2b = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (snd_busy) check(in_f || (xgmii_txc[0] && xgmii_txd[7:0] == XG_START) ||
                          (xgmii_txc == 8'hFF), "busy only around a data frame");
      if (xgmii_txc[0] && xgmii_txd[7:0] == XG_START) begin
        check(xgmii_txd == XG_PREAMBLE_D && xgmii_txc == 8'h01, "preamble");
        in_f = 1; t0 = cycle; fb.delete();
      end else if (in_f) begin
        for (int l = 0; l < 8 && in_f; l++) begin
          if (xgmii_txc[l]) begin
            check(xgmii_txd[8*l +: 8] == XG_TERM, "terminate");
            in_f = 0;
            parse(fb, t0);
          end else fb.push_back(xgmii_txd[8*l +: 8]);
        end
      end
    end
  end

  task automatic parse(input byte unsigned b[$], input int unsigned t);
    int n;
    logic [31:0] fcs;
    byte unsigned body[$];
    n = b.size();
    body = b[0:n-5];
    fcs = {b[n-1], b[n-2], b[n-3], b[n-4]};
    check(fcs == fcs_ref(body), "FCS");
    check(get_be(b, 0, 6) == 64'(PEER) && get_be(b, 6, 6) == 64'(MY), "addresses");
    check(get_be(b, 12, 4) == 64'hFADE_0100, "protocol id and version");
    if (get_be(b, 16, 2) == 64'hA55A) begin
      resp_frames++;
      check(n == 64, "response frame length");
      check(get_be(b, 18, 2) == 0, "filler");
      check(get_be(b, 20, 2) == 64'(R2.code) && get_be(b, 22, 2) == 64'(R2.seq) &&
            get_be(b, 24, 8) == R2.user, "standalone response contents");
      for (int i = 32; i < 60; i++) check(b[i] == 0, "padding");
    end else begin
      job_t j;
      int bad;
      data_frames++;
      check(sent.size() > 0, "data frame for a taken job");
      j = sent.pop_front();
      check(n == 36 + 8 * PW + 4, "data frame length");
      check(get_be(b, 16, 2) == (j.last ? 64'hA5A6 : 64'hA5A5), "packet id");
      if (j.with_resp)
        check(get_be(b, 18, 2) == 64'(R1.code) && get_be(b, 20, 2) == 64'(R1.seq) &&
              get_be(b, 22, 8) == R1.user, "embedded response");
      else
        check(get_be(b, 18, 12) == 0 && get_be(b, 26, 4) == 0, "empty embedded response");
      check(get_be(b, 30, 2) == 64'(j.r), "repetition number");
      check(get_be(b, 32, 4) == 64'(j.p), "packet number");
      bad = 0;
      for (int w = 0; w < PW; w++) begin
        logic [63:0] v;
        for (int q = 0; q < 8; q++) v[8*q +: 8] = b[36 + 8*w + q];
        if (v != memf({j.b, 10'(w)})) bad++;
      end
      check(bad == 0, $sformatf("data words (%0d wrong)", bad));
      if (last_data_t != 0 && t - last_data_t == 1032) b2b++;
      last_data_t = t;
    end
  endtask

  always @(posedge clk) if (rst_n && snd_busy && in_f && sent.size() > 0)
    check(snd_buf == sent[0].b, "snd_buf names the buffer being sent");

  initial begin
    rst_n = 0; resp_valid = 0; resp = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    resp = R1; resp_valid = 1;
    jobs.push_back('{5'd5,  32'h0102_0304, 16'd7, 0, 0});
    jobs.push_back('{5'd6,  32'h0102_0305, 16'd7, 0, 0});
    jobs.push_back('{5'd31, 32'hFFFF_FFFF, 16'hFFFF, 0, 0});
    jobs.push_back('{5'd0,  32'h0000_0000, 16'd1, 1, 0});
    wait (jobs.size() == 0);
    wait (data_frames == 4);
    @(negedge clk);
    resp = R2; resp_valid = 1;
    wait (resp_frames == 1);
    repeat (10) @(posedge clk);
    check(data_frames == 4 && resp_frames == 1, "frame counts");
    check(b2b == 3, $sformatf("back-to-back at 1032 cycles: %0d", b2b));
    check(resp_takes == 2, "both responses taken");
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
