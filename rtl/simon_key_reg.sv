// simon_key_reg: the 64 key flip-flops of the SIMON core (Key 1..Key 4) with
// their interlaced 2-1 multiplexers.
//
// The bank holds {Key4, Key3, Key2, Key1}; Key1 is the round key of the
// current round (K_i), Key2 = K_i+1, Key3 = K_i+2, Key4 = K_i+3. In FIFO mode
// it is one 64-bit shift register: key_i enters at Key4[15] and bits move
// toward Key1[0], so a key is sent least significant bit first and after 64
// shifts Key1 holds its low word, the first round key. In ENCRYPT mode the
// words move down by one (Key1 <- Key2 <- Key3 <- Key4) and Key4 takes the
// newly expanded word k_new_i. In IDLE mode the bank holds.
//
// Key3 (K_i+2) only passes through: the expansion does not read it, so it
// has no output.
// The Key4 -> Key1 serial chain and the feedback of the expansion result
// into Key4 follow the document's top-level diagram; the bit order is this
// design's choice (see simon_data_reg).
//
// Timing: one action per rising edge; active-low asynchronous reset clears it.
module simon_key_reg
  import simon_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  mux_mode_e mode_i,
  input  logic      key_i,
  input  word_t     k_new_i,
  output word_t     key1_o,
  output word_t     key2_o,
  output word_t     key4_o
);

  logic [KEY_W-1:0] key_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q <= '0;
    end else begin
      unique case (mode_i)
        MODE_FIFO:    key_q <= {key_i, key_q[KEY_W-1:1]};
        MODE_ENCRYPT: key_q <= {k_new_i, key_q[KEY_W-1:WORD_W]};
        default:      key_q <= key_q;
      endcase
    end
  end

  assign key1_o = key_q[1*WORD_W-1:0*WORD_W];
  assign key2_o = key_q[2*WORD_W-1:1*WORD_W];
  assign key4_o = key_q[4*WORD_W-1:3*WORD_W];

endmodule
