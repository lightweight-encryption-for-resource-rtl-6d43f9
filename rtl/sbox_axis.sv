// sbox_axis: AXI4-Stream wrapper that substitutes a stream of bytes through
// one of the five AES S-Box architectures.
//
// A batch of bytes arrives on the slave stream (s_axis_*) and leaves, each
// byte replaced by its S-Box value, on the master stream (m_axis_*) in the
// same order; tlast travels with its byte. ARCH picks the S-Box (see
// aes_sbox_pkg::sbox_arch_e); the default is the 12-stage pipelined Fermat
// version.
//
// Flow control: the whole S-Box pipeline advances when the output is free,
// en = m_axis_tready | ~m_axis_tvalid, and the wrapper accepts a byte
// exactly when it advances (s_axis_tready = en). With tready held high
// downstream it takes one byte per clock and each byte appears after the
// architecture's latency (1, 2, 1, 12 or 11 clocks). When the output is
// stalled every stage holds, so no byte is lost or duplicated.
// s_axis_tready depends combinationally on m_axis_tready; m_axis_tvalid comes
// from a register. rst_n is an asynchronous reset for every flip-flop; its
// only synchronous use is as the disable condition of the handshake
// assertion below, which lint tools report as a mixed sync/async net.
//
// The document states only that the S-Boxes sat behind an AXI interface
// that receives a batch of data; the stream flavour, the stall scheme and
// the tlast handling are this design's choices.
module sbox_axis
  import aes_sbox_pkg::*;
#(
  parameter sbox_arch_e ARCH      = ARCH_FLT_V2,
  parameter bit         KARATSUBA = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  byte_t s_axis_tdata,
  input  logic  s_axis_tvalid,
  input  logic  s_axis_tlast,
  output logic  s_axis_tready,
  output byte_t m_axis_tdata,
  output logic  m_axis_tvalid,
  output logic  m_axis_tlast,
  input  logic  m_axis_tready
);

  localparam int unsigned LAT = sbox_latency(ARCH);

  logic           en;
  logic [LAT-1:0] last_q;

  assign en            = m_axis_tready || !m_axis_tvalid;
  assign s_axis_tready = en;

  if (ARCH == ARCH_LUT_V1) begin : g_lut_v1
    sbox_lut_v1 u_sbox (.clk, .rst_n, .en_i(en), .valid_i(s_axis_tvalid),
                        .data_i(s_axis_tdata), .valid_o(m_axis_tvalid), .data_o(m_axis_tdata));
  end else if (ARCH == ARCH_LUT_V2) begin : g_lut_v2
    sbox_lut_v2 u_sbox (.clk, .rst_n, .en_i(en), .valid_i(s_axis_tvalid),
                        .data_i(s_axis_tdata), .valid_o(m_axis_tvalid), .data_o(m_axis_tdata));
  end else if (ARCH == ARCH_FLT_V1) begin : g_flt_v1
    sbox_flt_v1 #(.KARATSUBA(KARATSUBA)) u_sbox (.clk, .rst_n, .en_i(en),
                        .valid_i(s_axis_tvalid), .data_i(s_axis_tdata),
                        .valid_o(m_axis_tvalid), .data_o(m_axis_tdata));
  end else if (ARCH == ARCH_FLT_V2) begin : g_flt_v2
    sbox_flt_v2 #(.KARATSUBA(KARATSUBA)) u_sbox (.clk, .rst_n, .en_i(en),
                        .valid_i(s_axis_tvalid), .data_i(s_axis_tdata),
                        .valid_o(m_axis_tvalid), .data_o(m_axis_tdata));
  end else begin : g_flt_v3
    sbox_flt_v3 #(.KARATSUBA(KARATSUBA)) u_sbox (.clk, .rst_n, .en_i(en),
                        .valid_i(s_axis_tvalid), .data_i(s_axis_tdata),
                        .valid_o(m_axis_tvalid), .data_o(m_axis_tdata));
  end

  // tlast follows its byte through a delay line of the same depth.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  last_q <= '0;
    else if (en) last_q <= LAT'({last_q, s_axis_tvalid && s_axis_tlast});
  end

  assign m_axis_tlast = last_q[LAT-1] && m_axis_tvalid;

`ifndef SYNTHESIS
  // AXI-Stream rule: once valid is raised it stays, with stable data, until
  // the transfer completes.
  property p_hold_until_ready;
    @(posedge clk) disable iff (!rst_n)
      (m_axis_tvalid && !m_axis_tready) |=> (m_axis_tvalid && $stable(m_axis_tdata)
                                             && $stable(m_axis_tlast));
  endproperty
  a_hold_until_ready: assert property (p_hold_until_ready)
    else $error("sbox_axis: output changed while stalled");
`endif

endmodule
