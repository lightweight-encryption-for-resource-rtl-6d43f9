// crypto_top: the two lightweight-encryption engines side by side.
//
// 1. A SIMON 32/64 block-cipher core (simon_core) with a five-signal
//    interface: clock, active-low reset, serial plaintext in, serial key in,
//    serial ciphertext out, plus an active-low data-ready and a debug state.
//    One block takes 128 clocks (see simon_core).
// 2. The five AES S-Box architectures that are compared with each other
//    (two lookup tables, three Fermat-inverse datapaths), each behind its own
//    AXI4-Stream byte interface (sbox_axis); index a of the stream arrays is
//    architecture aes_sbox_pkg::sbox_arch_e'(a): 0 LUT V1, 1 LUT V2,
//    2 FLT V1, 3 FLT V2, 4 FLT V3.
// The two engines share only clock and reset; they do not exchange data.
module crypto_top
  import simon_pkg::*;
  import aes_sbox_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // SIMON 32/64 core
  input  logic         simon_serial_in,
  input  logic         simon_key_in,
  output logic         simon_serial_out,
  output logic         simon_data_ready_n,
  output simon_state_e simon_dbg_state,
  // AES S-Box streams, one per architecture
  input  byte_t        sbox_s_tdata  [NUM_ARCH],
  input  logic         sbox_s_tvalid [NUM_ARCH],
  input  logic         sbox_s_tlast  [NUM_ARCH],
  output logic         sbox_s_tready [NUM_ARCH],
  output byte_t        sbox_m_tdata  [NUM_ARCH],
  output logic         sbox_m_tvalid [NUM_ARCH],
  output logic         sbox_m_tlast  [NUM_ARCH],
  input  logic         sbox_m_tready [NUM_ARCH]
);

  simon_core u_simon (
    .clk          (clk),
    .rst_n        (rst_n),
    .serial_in    (simon_serial_in),
    .key_in       (simon_key_in),
    .serial_out   (simon_serial_out),
    .data_ready_n (simon_data_ready_n),
    .dbg_state    (simon_dbg_state)
  );

  for (genvar a = 0; a < NUM_ARCH; a++) begin : g_sbox
    sbox_axis #(.ARCH(sbox_arch_e'(a))) u_sbox (
      .clk           (clk),
      .rst_n         (rst_n),
      .s_axis_tdata  (sbox_s_tdata[a]),
      .s_axis_tvalid (sbox_s_tvalid[a]),
      .s_axis_tlast  (sbox_s_tlast[a]),
      .s_axis_tready (sbox_s_tready[a]),
      .m_axis_tdata  (sbox_m_tdata[a]),
      .m_axis_tvalid (sbox_m_tvalid[a]),
      .m_axis_tlast  (sbox_m_tlast[a]),
      .m_axis_tready (sbox_m_tready[a])
    );
  end

endmodule
