// simon_data_reg: the 32 plaintext/state flip-flops of the SIMON core with
// their interlaced 2-1 multiplexers.
//
// The bank holds the block as {XL, XR}. In FIFO mode it is one 32-bit shift
// register: serial_i enters at XL[15], every bit moves one place toward
// XR[0], and serial_o is XR[0]. A block therefore goes in and comes out least
// significant bit first (XR[0] first, XL[15] last), so after 32 shifts the
// first bit sent sits in XR[0]. In ENCRYPT mode every flip-flop takes its bit
// of the round result instead (the multiplexer in front of each flip-flop
// switches from its neighbour to the round function). In IDLE mode it holds.
//
// The shift chain XL -> XR -> serial out, the serial-in/serial-out ports and
// the per-bit multiplexer follow the document; the least-significant-first
// order is this design's choice, made to match the byte order of the
// document's captured test transfers.
//
// Timing: one action per rising clock edge; active-low asynchronous reset
// clears the bank. Interface: mode_i selects the action, xl_o/xr_o feed the
// round function, xl_nxt_i/xr_nxt_i are its result.
module simon_data_reg
  import simon_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  mux_mode_e mode_i,
  input  logic      serial_i,
  input  word_t     xl_nxt_i,
  input  word_t     xr_nxt_i,
  output word_t     xl_o,
  output word_t     xr_o,
  output logic      serial_o
);

  logic [BLOCK_W-1:0] state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
    end else begin
      unique case (mode_i)
        MODE_FIFO:    state_q <= {serial_i, state_q[BLOCK_W-1:1]};
        MODE_ENCRYPT: state_q <= {xl_nxt_i, xr_nxt_i};
        default:      state_q <= state_q;
      endcase
    end
  end

  assign xl_o     = state_q[BLOCK_W-1:WORD_W];
  assign xr_o     = state_q[WORD_W-1:0];
  assign serial_o = state_q[0];

endmodule
