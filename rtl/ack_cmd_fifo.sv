// ack_cmd_fifo - synchronous FIFO carrying decoded ACK and command messages
// from the packet receiver to the descriptor manager.
//
// A circular buffer of DEPTH entries (DEPTH a power of two) with read and
// write pointers one bit wider than the address, so full and empty are told
// apart by the extra bit. The read side is first-word fall-through: dout shows
// the oldest entry whenever empty is low, and pop removes it at the clock
// edge. A push while full is dropped and the core reports nothing more; the
// receiver only pushes one message per received frame, so with the default
// depth this happens only if the descriptor manager is held off for 16 frames.
// The FIFO itself is only named by the protocol's block diagram; its depth
// and this structure are design choices.
module ack_cmd_fifo #(
  parameter int W     = 65,
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  output logic         full,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr, rptr;

  assign empty = (wptr == rptr);
  assign full  = (wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]);
  assign dout  = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push && !full) begin
        mem[wptr[AW-1:0]] <= din;
        wptr <= wptr + 1'b1;
      end
      if (pop && !empty) rptr <= rptr + 1'b1;
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("ack_cmd_fifo: DEPTH must be a power of two");

  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("ack_cmd_fifo: pop while empty");

endmodule
