// tb_crypto_top: end-to-end test of the whole design at its default
// parameters.
//
// SIMON side: three published SIMON 32/64 pairs and random blocks go through
// the serial pins back to back, then an asynchronous reset interrupts an
// operation and the core is used again; each block must take 128 clocks
// with data_ready_n low over the last 32.
// S-Box side: on each of the five architecture streams, a 256-byte batch
// and a 4096-byte batch at full rate (the two payload sizes of the FPGA
// comparison), then a batch with random source gaps and output
// back-pressure. Every byte is checked against a reference S-Box, tlast
// must close each batch, and a full-rate batch of B bytes must complete in
// B + latency - 1 clocks from its first accepted byte.
// Mechanisms counted, each of which must occur: the four SIMON operating
// regions, the mid-operation reset, and per architecture an output stall,
// a source gap and a tlast.
module tb_crypto_top;
  import simon_pkg::*;
  import aes_sbox_pkg::*;
  import tb_aes_ref_pkg::*;

  localparam int N = NUM_ARCH;

  logic clk = 0, rst_n = 0;
  logic simon_serial_in = 0, simon_key_in = 0, simon_serial_out, simon_data_ready_n;
  simon_state_e simon_dbg_state;
  logic [7:0] s_tdata [N], m_tdata [N];
  logic s_tvalid [N], s_tlast [N], s_tready [N], m_tvalid [N], m_tlast [N], m_tready [N];
  int checks = 0, failures = 0, done_cnt = 0;
  int region_seen [4] = '{0, 0, 0, 0};
  int resets_mid_op = 0;
  int stalls [N], gaps [N], lasts [N], clocks_256 [N], clocks_4096 [N];

  crypto_top dut (
    .clk, .rst_n, .simon_serial_in, .simon_key_in, .simon_serial_out,
    .simon_data_ready_n, .simon_dbg_state,
    .sbox_s_tdata(s_tdata), .sbox_s_tvalid(s_tvalid), .sbox_s_tlast(s_tlast),
    .sbox_s_tready(s_tready), .sbox_m_tdata(m_tdata), .sbox_m_tvalid(m_tvalid),
    .sbox_m_tlast(m_tlast), .sbox_m_tready(m_tready));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- SIMON
  function automatic logic [15:0] rl(logic [15:0] x, int s);
    return (x << s) | (x >> (16 - s));
  endfunction

  function automatic logic [31:0] simon_model(logic [31:0] pt, logic [63:0] key);
    string z = "11111010001001010110000111001101111101000100101011000011100110";
    logic [15:0] k [32];
    logic [15:0] xl, xr, t, tmp;
    for (int i = 0; i < 4; i++) k[i] = key[16*i +: 16];
    for (int i = 0; i < 28; i++) begin
      t = rl(k[i+3], 13) ^ k[i+1];
      t = t ^ rl(t, 15);
      k[i+4] = k[i] ^ t ^ 16'hFFFC ^ ((z[i] == "1") ? 16'd1 : 16'd0);
    end
    xl = pt[31:16]; xr = pt[15:0];
    for (int i = 0; i < 32; i++) begin
      tmp = xl;
      xl  = (rl(xl, 1) & rl(xl, 8)) ^ rl(xl, 2) ^ xr ^ k[i];
      xr  = tmp;
    end
    return {xl, xr};
  endfunction

  // Called at a falling edge inside clock 0 of an operation.
  task automatic simon_block(input logic [31:0] pt, input logic [63:0] key,
                             input logic [31:0] exp_ct);
    logic [31:0] ct;
    int ready_clocks = 0;
    for (int c = 0; c < 128; c++) begin
      simon_serial_in = (c < 32) ? pt[c] : 1'b0;
      simon_key_in    = (c < 64) ? key[c] : 1'b0;
      region_seen[simon_dbg_state]++;
      checks++;
      if (simon_dbg_state != simon_state_e'(c / 32)) begin
        failures++;
        $display("FAIL SIMON clock %0d in state %0d", c, simon_dbg_state);
      end
      if (!simon_data_ready_n) begin
        ready_clocks++;
        if (c < 96) begin
          failures++;
          $display("FAIL SIMON data ready at clock %0d", c);
        end
      end
      if (c >= 96) ct[c-96] = simon_serial_out;
      @(negedge clk);
    end
    checks += 2;
    if (ready_clocks != 32) begin
      failures++;
      $display("FAIL SIMON data ready for %0d clocks", ready_clocks);
    end
    if (ct !== exp_ct) begin
      failures++;
      $display("FAIL SIMON pt=%h key=%h ct=%h expected %h", pt, key, ct, exp_ct);
    end
  endtask

  initial begin
    logic [31:0] pt;
    logic [63:0] key;
    @(negedge clk); @(negedge clk);
    rst_n = 1;   // every stream and the SIMON core start here
    simon_block(32'h6565_6877, 64'h1918_1110_0908_0100, 32'hC69B_E9BB);
    simon_block(32'h524A_B37D, 64'h1918_1110_0908_0100, 32'hF514_71C9);
    simon_block(32'hAC91_BAC0, 64'h1029_3847_56AF_EDB3, 32'h57E1_5C37);
    for (int n = 0; n < 8; n++) begin
      pt = $urandom; key = {$urandom, $urandom};
      simon_block(pt, key, simon_model(pt, key));
    end
    // The S-Box streams are busy when this reset arrives only if they are
    // still running; wait for them so the reset interrupts SIMON alone.
    wait (done_cnt == N);
    @(negedge clk);
    repeat (70) @(negedge clk);   // into the encryption window of a block
    #1 rst_n = 0;
    resets_mid_op++;
    #2;
    checks++;
    if (simon_dbg_state != ST_LOAD_PT || !simon_data_ready_n) failures++;
    @(negedge clk);
    rst_n = 1;
    simon_block(32'h6565_6877, 64'h1918_1110_0908_0100, 32'hC69B_E9BB);

    // Every mechanism must have happened.
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (region_seen[r] == 0) begin failures++; $display("FAIL region %0d never seen", r); end
    end
    checks++;
    if (resets_mid_op == 0) failures++;
    for (int a = 0; a < N; a++) begin
      checks += 3;
      if (stalls[a] == 0) begin failures++; $display("FAIL arch %0d: no stall", a); end
      if (gaps[a] == 0)   begin failures++; $display("FAIL arch %0d: no gap", a); end
      if (lasts[a] < 3)   begin failures++; $display("FAIL arch %0d: tlast %0d", a, lasts[a]); end
      $display("arch %0d: 256 bytes in %0d clocks, 4096 bytes in %0d clocks, %0d stalls, %0d gaps",
               a, clocks_256[a], clocks_4096[a], stalls[a], gaps[a]);
    end
    $display("SIMON regions seen (clocks): %0d %0d %0d %0d, resets mid-operation: %0d",
             region_seen[0], region_seen[1], region_seen[2], region_seen[3], resets_mid_op);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- S-Box
  for (genvar a = 0; a < N; a++) begin : g_arch
    localparam int LAT = sbox_latency(sbox_arch_e'(a));
    logic [7:0] exp_q [$];
    logic       last_q [$];
    int edge_no = 0;
    int batch_first_in = 0, batch_last_out = 0;
    logic [7:0] prev_data;
    logic       prev_stall = 0;

    initial begin stalls[a] = 0; gaps[a] = 0; lasts[a] = 0; s_tvalid[a] = 0; s_tlast[a] = 0; s_tdata[a] = '0; m_tready[a] = 0; end

    always @(posedge clk) begin
      edge_no <= edge_no + 1;
      if (rst_n) begin
        if (s_tvalid[a] && s_tready[a]) begin
          exp_q.push_back(sbox(s_tdata[a]));
          last_q.push_back(s_tlast[a]);
        end
        if (!s_tvalid[a] && s_tready[a] && exp_q.size() != 0) gaps[a]++;
        if (prev_stall) begin
          checks++;
          if (!m_tvalid[a] || m_tdata[a] !== prev_data) begin
            failures++;
            $display("FAIL arch %0d: output changed while stalled", a);
          end
        end
        prev_stall <= m_tvalid[a] && !m_tready[a];
        prev_data  <= m_tdata[a];
        if (m_tvalid[a] && !m_tready[a]) stalls[a]++;
        if (m_tvalid[a] && m_tready[a]) begin
          checks++;
          if (exp_q.size() == 0) begin
            failures++;
            $display("FAIL arch %0d: unexpected output", a);
          end else begin
            logic [7:0] e;
            logic       l;
            e = exp_q.pop_front();
            l = last_q.pop_front();
            if (m_tdata[a] !== e || m_tlast[a] !== l) begin
              failures++;
              $display("FAIL arch %0d: got %h/%b expected %h/%b", a, m_tdata[a], m_tlast[a], e, l);
            end
            if (m_tlast[a]) begin
              lasts[a]++;
              batch_last_out <= edge_no;
            end
          end
        end
      end
    end

    // Full-rate batch of nbytes; returns clocks from first byte taken to
    // the edge on which the last result is handed over.
    task automatic full_rate_batch(input int nbytes, output int clocks);
      m_tready[a] = 1;
      batch_first_in = edge_no;   // the next edge takes byte 0
      for (int i = 0; i < nbytes; i++) begin
        s_tvalid[a] = 1; s_tdata[a] = 8'($urandom); s_tlast[a] = (i == nbytes - 1);
        @(negedge clk);
      end
      s_tvalid[a] = 0; s_tlast[a] = 0;
      repeat (LAT + 2) @(negedge clk);
      clocks = batch_last_out - batch_first_in;
      checks++;
      if (clocks != nbytes + LAT - 1 || exp_q.size() != 0) begin
        failures++;
        $display("FAIL arch %0d: %0d bytes took %0d clocks, expected %0d",
                 a, nbytes, clocks, nbytes + LAT - 1);
      end
    endtask

    initial begin
      int sent;
      @(negedge clk); @(negedge clk);
      full_rate_batch(256, clocks_256[a]);
      full_rate_batch(4096, clocks_4096[a]);
      sent = 0;
      while (sent < 1000) begin
        m_tready[a] = ($urandom_range(0, 2) != 0);
        s_tvalid[a] = ($urandom_range(0, 3) != 0);
        s_tdata[a]  = 8'($urandom);
        s_tlast[a]  = (sent == 999);
        @(posedge clk);
        if (s_tvalid[a] && s_tready[a]) sent++;
        @(negedge clk);
      end
      s_tvalid[a] = 0; s_tlast[a] = 0; m_tready[a] = 1;
      repeat (LAT + 3) @(negedge clk);
      checks++;
      if (exp_q.size() != 0) begin
        failures++;
        $display("FAIL arch %0d: %0d bytes outstanding", a, exp_q.size());
      end
      done_cnt++;
    end
  end

endmodule
