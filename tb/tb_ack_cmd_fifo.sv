// tb_ack_cmd_fifo - random push/pop traffic against a queue model; checks
// the head word, full and empty every cycle and that pushes into a full FIFO
// are dropped.
module tb_ack_cmd_fifo;
  localparam int W = 65, DEPTH = 16;
  logic clk = 0;
  always #5ns clk = ~clk;
  logic rst_n, push, pop, full, empty;
  logic [W-1:0] din, dout;

  ack_cmd_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int fulls = 0;
  bit was_full;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 0; push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() > 0) check(dout == model[0], "head word");
      // phases: fill-biased, drain-biased, balanced
      push = ($urandom_range(0, 99) < ((c / 500) % 2 == 0 ? 70 : 30));
      pop  = !empty && ($urandom_range(0, 99) < ((c / 500) % 2 == 0 ? 30 : 70));
      din  = {$urandom, $urandom, 1'($urandom)};
      was_full = (model.size() == DEPTH);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      // a push into a full FIFO is dropped, even with a pop in the same cycle
      if (push && !was_full) model.push_back(din);
      else if (push) fulls++;
    end
    check(fulls > 0, "full condition reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
