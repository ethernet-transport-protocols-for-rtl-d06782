// tb_pkt_buffers - writes random words to random addresses of the full-size
// packet buffer memory and reads them back, checking data and the one-cycle
// read latency against an associative-array model.
module tb_pkt_buffers;
  localparam int NBUF = 32, PKT_WORDS = 1024, AW = 15;
  logic clk = 0;
  always #5ns clk = ~clk;
  logic we;
  logic [AW-1:0] waddr, raddr;
  logic [63:0] wdata, rdata;

  pkt_buffers #(.NBUF(NBUF), .PKT_WORDS(PKT_WORDS)) dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] model [logic [AW-1:0]];

  initial begin
    logic [AW-1:0] a;
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    // write every word of buffers 0, 7 and 31 plus random words elsewhere
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (i < 3 * PKT_WORDS) a = {(i / PKT_WORDS == 0) ? 5'd0 : (i / PKT_WORDS == 1) ? 5'd7 : 5'd31, 10'(i)};
      else a = AW'($urandom);
      we = 1; waddr = a; wdata = {$urandom, $urandom};
      model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    foreach (model[adr]) begin
      raddr = adr;
      @(posedge clk);
      #1;
      checks++;
      if (rdata != model[adr]) begin
        failures++;
        $display("FAIL: addr %h got %h want %h", adr, rdata, model[adr]);
      end
      @(negedge clk);
    end
    // write and read the same address in one cycle: old data is read
    @(negedge clk);
    we = 1; waddr = 15'h1234; wdata = 64'hAAAA; raddr = 15'h1234;
    @(posedge clk); #1;
    checks++;
    if (model.exists(15'h1234) && rdata != model[15'h1234]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
