// tb_desc_manager - directed test of the descriptor manager at a small size
// (4 buffers of 8 words, timeout 200 cycles). The testbench plays the packet
// sender, the ACK/command FIFO and the user. Checked against values worked out
// by hand from the protocol rules:
//   START gate and response; buffer writes and addresses; stall when all
//   buffers are occupied; transmission order; ACK-detected loss and the new
//   repetition number; no second retransmission for an older ACK; buffer
//   freeing and reuse (held while the sender still reads it); timeout after
//   TIMEOUT cycles; STOP writing the word count into the last word; a command
//   held in the FIFO while a response waits; RESET.
module tb_desc_manager;
  import fade_pkg::*;
  localparam int NBUF = 4, PW = 8, TO = 200;

  logic clk = 0;
  always #5ns clk = ~clk;
  logic rst_n;
  logic [63:0] dta, mem_wdata, user_resp;
  logic dta_we, dta_ready, mem_we, msg_valid, msg_pop, tx_valid, tx_last, tx_take;
  logic snd_busy, resp_valid, resp_take, cmd_valid, running, ev_retx, ev_timeout;
  logic [4:0] mem_waddr;
  rx_msg_t msg;
  logic [1:0] tx_buf, snd_buf;
  logic [31:0] tx_pkt, cmd_arg;
  logic [15:0] tx_rep, cmd_code;
  cmd_resp_t resp;

  desc_manager #(.NBUF(NBUF), .PKT_WORDS(PW), .TIMEOUT(TO)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // memory model and write-address check
  logic [63:0] mem [NBUF*PW];
  always @(posedge clk) if (mem_we) mem[mem_waddr] <= mem_wdata;

  // user source
  int unsigned k = 0, want = 0;
  assign dta_we = (k < want);
  assign dta = {32'hDA7A_0000, k};
  int unsigned exp_addr = 0;
  always @(posedge clk) if (rst_n && dta_we && dta_ready) begin
    check(mem_we && mem_waddr == 5'(exp_addr) && mem_wdata == dta, "user word written to its slot");
    exp_addr++;
    k++;
  end

  // sender model: takes when allowed, stays busy for BUSY cycles
  bit take_en = 0;
  int busy_cnt = 0;
  logic [1:0] busy_buf;
  typedef struct { logic [1:0] b; logic [31:0] p; logic [15:0] r; bit last; int unsigned t; } take_t;
  take_t takes[$];
  assign tx_take  = take_en && tx_valid && busy_cnt == 0;
  assign snd_busy = busy_cnt > 0;
  assign snd_buf  = busy_buf;
  always @(posedge clk) begin
    if (!rst_n) busy_cnt <= 0;
    else if (tx_take) begin
      takes.push_back('{tx_buf, tx_pkt, tx_rep, tx_last, cycle});
      busy_cnt <= 10;
      busy_buf <= tx_buf;
    end else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
  end

  // response consumer
  bit resp_en = 1;
  assign resp_take = resp_en && resp_valid;

  int retx = 0, touts = 0;
  int unsigned tout_t = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_retx) retx++;
    if (ev_timeout) begin touts++; tout_t = cycle; end
  end

  task automatic send_msg(input bit is_ack, input logic [15:0] code, input logic [15:0] seq,
                          input logic [31:0] arg);
    @(negedge clk);
    msg_valid = 1;
    msg = '{is_ack: is_ack, code: code, seq: seq, arg: arg};
    do @(posedge clk); while (!msg_pop);
    @(negedge clk);
    msg_valid = 0;
  endtask

  task automatic ack(input int p, input int r);
    send_msg(1, ACK_CODE, 16'(r), 32'(p));
  endtask

  task automatic expect_take(input int p, input int r, input bit last, input string what);
    int n;
    n = 0;
    while (takes.size() == 0 && n < 100) begin @(posedge clk); n++; end
    check(takes.size() > 0, {what, ": packet taken"});
    if (takes.size() > 0) begin
      take_t t;
      t = takes.pop_front();
      check(t.p == 32'(p) && t.r == 16'(r) && t.last == last,
            $sformatf("%s: took pkt %0d rep %0d last %0d", what, t.p, t.r, t.last));
    end
  endtask

  initial begin
    rst_n = 0; msg_valid = 0; msg = '0; user_resp = 64'h5555_AAAA_0000_0001;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(!dta_ready && !running, "idle after reset");

    // START
    resp_en = 0;
    send_msg(0, CMD_START, 16'd1, 32'h0);
    @(posedge clk); #1;
    check(resp_valid && resp.code == CMD_START && resp.seq == 1 && resp.user == user_resp,
          "START response");
    check(running && dta_ready, "running after START");
    resp_en = 1;

    // fill all four buffers with nothing sent: the source must stall
    want = 100;
    repeat (60) @(posedge clk);
    check(k == NBUF * PW, $sformatf("accepted %0d words before stall", k));
    check(!dta_ready, "stalled with all buffers occupied");
    for (int i = 0; i < NBUF * PW; i++)
      check(mem[i] == {32'hDA7A_0000, 32'(i)}, "buffer contents");
    want = k;

    // send them: oldest first
    take_en = 1;
    for (int p = 0; p < 4; p++) expect_take(p, 0, 0, "first transmission");

    // ACK for 1 reveals that 0 was lost
    repeat (20) @(posedge clk);
    ack(1, 0);
    expect_take(0, 1, 0, "retransmission after ACK-detected loss");
    check(retx == 1, "one loss event");
    // ACK for 2 (sent before the retransmission) must not resend 0 again
    ack(2, 0);
    repeat (30) @(posedge clk);
    check(takes.size() == 0 && retx == 1, "no second retransmission");
    // buffer 1 is freed only after buffer 0; both still in use
    check(!dta_ready, "buffers not yet free");
    ack(0, 1);
    // buffer 0 ACKed while the sender may still read it: freed only afterwards
    ack(3, 0);
    repeat (15) @(posedge clk);
    check(dta_ready, "buffers freed after ACKs");

    // reuse: one more packet goes to buffer 0 with the new repetition number
    want = k + PW;
    wait (k == want);
    expect_take(4, 1, 0, "new packet after a retransmission round");
    check(mem[0] == {32'hDA7A_0000, 32'(4 * PW)}, "buffer 0 reused");

    // no ACK: timeout
    begin
      int unsigned t0;
      t0 = cycle;
      wait (touts == 1);
      check(tout_t - t0 >= TO - 2 && tout_t - t0 <= TO + 2,
            $sformatf("timeout after %0d cycles", tout_t - t0));
    end
    expect_take(4, 2, 0, "retransmission after timeout");
    ack(4, 2);

    // STOP with 3 words in the buffer: last packet holding the count
    want = k + 3;
    wait (k == want);
    resp_en = 0;
    send_msg(0, CMD_STOP, 16'd2, 32'h0);
    expect_take(5, 2, 1, "last packet");
    check(mem[{2'd1, 3'd7}] == 64'd3, "word count in the last word");
    check(mem[{2'd1, 3'd2}] == {32'hDA7A_0000, 32'(k - 1)}, "last data word");
    check(!running && !dta_ready, "stopped");
    // a command waits in the FIFO while a response is pending
    @(negedge clk);
    msg_valid = 1;
    msg = '{is_ack: 0, code: 16'h0042, seq: 16'd3, arg: 32'hABCD};
    repeat (5) begin
      @(posedge clk); #1;
      check(!msg_pop && resp.code == CMD_STOP, "command held while STOP response waits");
    end
    resp_en = 1;
    do @(posedge clk); while (!msg_pop);
    #1;
    check(resp.code == 16'h0042 && resp.seq == 3, "user command response");
    check(cmd_valid && cmd_code == 16'h0042 && cmd_arg == 32'hABCD, "user command strobe");
    @(negedge clk);
    msg_valid = 0;
    ack(5, 2);

    // RESET
    send_msg(0, CMD_RESET, 16'd4, 32'h0);
    repeat (3) @(posedge clk);
    check(dut.next_pkt == 0 && dut.head == 0 && dut.tail == 0 && !running, "RESET");
    check(touts == 1 && retx == 1, "event counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
