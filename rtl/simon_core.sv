// simon_core: SIMON 32/64 encryption core with a round-parallel datapath and
// a one-bit serial interface.
//
// The block and the key enter serially, the 32 rounds run one per clock on
// the whole 32-bit state, and the ciphertext leaves serially, so one
// encryption takes a fixed 128 clocks:
//   clocks   0..31  plaintext bits on serial_in, key bits on key_in
//   clocks  32..63  remaining key bits on key_in (serial_in ignored)
//   clocks  64..95  32 rounds; the key schedule advances with them
//   clocks  96..127 ciphertext bits on serial_out, data_ready_n low
// Every word goes least significant bit first: the plaintext {XL, XR} from
// XR[0] to XL[15], the key from bit 0 of its lowest word (the first round
// key) to bit 63. The ciphertext bit for clock 96+j is on serial_out during
// that clock, so a host samples it at the rising edge that ends the clock.
// The schedule restarts at clock 128 = 0 without a gap; rst_n (active low,
// asynchronous) restarts it at clock 0.
//
// Structure (as in the document's top-level diagram): 32 state flip-flops
// (simon_data_reg) and 64 key flip-flops (simon_key_reg), each preceded by a
// 2-1 multiplexer that chooses between the serial neighbour and the
// round / key-expansion result; one 16-bit round function (simon_round); one
// 16-bit key expansion (simon_key_expand); and a 7-bit counter with
// decoders (simon_ctrl). dbg_state_o shows the operating region. The bit
// order, the data-ready window and the debug encoding are this design's
// choices.
module simon_core
  import simon_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         serial_in,
  input  logic         key_in,
  output logic         serial_out,
  output logic         data_ready_n,
  output simon_state_e dbg_state
);

  mux_mode_e data_mode, key_mode;
  logic      z_bit;
  word_t     xl, xr, xl_nxt, xr_nxt;
  word_t     k1, k2, k4, k_new;

  simon_ctrl u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .data_mode_o    (data_mode),
    .key_mode_o     (key_mode),
    .z_o            (z_bit),
    .data_ready_n_o (data_ready_n),
    .state_o        (dbg_state)
  );

  simon_data_reg u_data (
    .clk      (clk),
    .rst_n    (rst_n),
    .mode_i   (data_mode),
    .serial_i (serial_in),
    .xl_nxt_i (xl_nxt),
    .xr_nxt_i (xr_nxt),
    .xl_o     (xl),
    .xr_o     (xr),
    .serial_o (serial_out)
  );

  simon_key_reg u_key (
    .clk     (clk),
    .rst_n   (rst_n),
    .mode_i  (key_mode),
    .key_i   (key_in),
    .k_new_i (k_new),
    .key1_o  (k1),
    .key2_o  (k2),
    .key4_o  (k4)
  );

  simon_round u_round (
    .xl_i (xl),
    .xr_i (xr),
    .k_i  (k1),
    .xl_o (xl_nxt),
    .xr_o (xr_nxt)
  );

  simon_key_expand u_kexp (
    .k0_i (k1),
    .k1_i (k2),
    .k3_i (k4),
    .z_i  (z_bit),
    .k4_o (k_new)
  );

endmodule
