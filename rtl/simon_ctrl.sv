// simon_ctrl: control unit of the SIMON core, a 7-bit counter and decoders.
//
// The counter runs freely from reset and wraps every 128 clocks; its value
// selects the multiplexer mode of the two register banks:
//   count   0..31   data FIFO, key FIFO      plaintext and key shift in
//   count  32..63   data IDLE, key FIFO      plaintext held, key completes
//   count  64..95   data ENCRYPT, key ENCRYPT one round per clock (32 rounds)
//   count  96..127  data FIFO, key FIFO      ciphertext shifts out
// After 127 the counter returns to 0 and the next block is taken in. During
// 96..127 data_ready_n is low (active low): the bit on the serial output is a
// ciphertext bit, least significant first. In ENCRYPT the low five counter
// bits are the round index i, which picks z_0[i] for the key expansion.
//
// The counter width, the mode table and the 128-cycle schedule follow the
// document. That the counter is free-running, that data_ready_n covers the
// shift-out window and the encoding of the debug state are this design's
// choices.
module simon_ctrl
  import simon_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  output mux_mode_e    data_mode_o,
  output mux_mode_e    key_mode_o,
  output logic         z_o,
  output logic         data_ready_n_o,
  output simon_state_e state_o
);

  logic [6:0] cnt_q;
  logic [4:0] round_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else        cnt_q <= cnt_q + 7'd1;
  end

  assign round_idx = cnt_q[4:0];

  always_comb begin
    state_o = simon_state_e'(cnt_q[6:5]);
    unique case (state_o)
      ST_LOAD_PT:  begin data_mode_o = MODE_FIFO;    key_mode_o = MODE_FIFO;    end
      ST_LOAD_KEY: begin data_mode_o = MODE_IDLE;    key_mode_o = MODE_FIFO;    end
      ST_ENCRYPT:  begin data_mode_o = MODE_ENCRYPT; key_mode_o = MODE_ENCRYPT; end
      default:     begin data_mode_o = MODE_FIFO;    key_mode_o = MODE_FIFO;    end
    endcase
    z_o            = SIMON_Z0[{1'b0, round_idx}];
    data_ready_n_o = (state_o != ST_SHIFT_CT);
  end

endmodule
