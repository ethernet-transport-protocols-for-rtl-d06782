// tb_fade_pkg - reference helpers for the FADE core testbenches: a bit-serial
// Ethernet FCS, a frame container and builders for the frames the PC sends
// (ACK and command packets), written independently of the RTL.
package tb_fade_pkg;

  // FCS of a byte sequence: value to send, low byte first.
  function automatic logic [31:0] fcs_ref(input byte unsigned b[$]);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    foreach (b[i]) begin
      logic [7:0] v;
      v = b[i];
      for (int k = 0; k < 8; k++) begin
        logic fb;
        fb = c[0] ^ v[k];
        c  = {1'b0, c[31:1]};
        if (fb) c = c ^ 32'hEDB8_8320;
      end
    end
    return ~c;
  endfunction

  class frame_c;
    int unsigned  t;        // cycle at which it may be sent / was seen
    byte unsigned b[$];     // frame bytes without preamble, FCS included
  endclass

  function automatic void push_be(ref byte unsigned q[$], input logic [63:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(v[8*i +: 8]);
  endfunction

  function automatic void add_fcs(ref byte unsigned q[$]);
    logic [31:0] f;
    f = fcs_ref(q);
    for (int i = 0; i < 4; i++) q.push_back(f[8*i +: 8]);
  endfunction

  // PC-to-FPGA packet: header, code, 2-byte seq, 4-byte arg, optional 4-byte
  // delay, zero padding to len bytes with the FCS.
  function automatic frame_c build_pc_frame(input logic [47:0] dst, input logic [47:0] src,
                                            input logic [15:0] code, input logic [15:0] seq,
                                            input logic [31:0] arg, input int len);
    frame_c f;
    f = new();
    push_be(f.b, 64'(dst), 6);
    push_be(f.b, 64'(src), 6);
    push_be(f.b, 64'h0000_0000_0000_FADE, 2);
    push_be(f.b, 64'h0000_0000_0000_0100, 2);
    push_be(f.b, 64'(code), 2);
    push_be(f.b, 64'(seq), 2);
    push_be(f.b, 64'(arg), 4);
    push_be(f.b, 64'h0000_0000_0000_0BB8, 4);  // transmission delay field
    while (f.b.size() < len - 4) f.b.push_back(8'h00);
    add_fcs(f.b);
    return f;
  endfunction

  function automatic logic [63:0] get_be(input byte unsigned q[$], input int p, input int n);
    logic [63:0] v;
    v = '0;
    for (int i = 0; i < n; i++) v = {v[55:0], q[p+i]};
    return v;
  endfunction

endpackage
