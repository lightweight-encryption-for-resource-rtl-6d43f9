// tb_sbox_axis: AXI4-Stream test of the S-Box wrapper, one instance per
// architecture, all driven at once.
//
// Each instance receives batches of random bytes (tlast on the last byte of a
// batch) with random source gaps and random back-pressure on the output. The
// testbench checks every output byte against the reference S-Box, the order,
// tlast placement, that no byte is lost, and that the output holds while
// stalled. A first batch with no gaps and tready high checks the full rate:
// 64 bytes leave in 64 consecutive clocks, the first after the
// architecture's latency.
module tb_sbox_axis;
  import aes_sbox_pkg::*;
  import tb_aes_ref_pkg::*;

  localparam int N = NUM_ARCH;
  localparam int BYTES = 600;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int done_cnt = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar a = 0; a < N; a++) begin : g_arch
    localparam int LAT = sbox_latency(sbox_arch_e'(a));
    logic [7:0] s_tdata = '0, m_tdata;
    logic s_tvalid = 0, s_tlast = 0, s_tready, m_tvalid, m_tlast, m_tready = 0;
    logic [7:0] sent [BYTES];
    logic       lastf [BYTES];
    int rx = 0, first_out_edge = -1, last_out_edge = -1, edge_no = 0;
    logic [7:0] prev_data;
    logic       prev_stall = 0;

    sbox_axis #(.ARCH(sbox_arch_e'(a))) dut (
      .clk, .rst_n, .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tlast(s_tlast),
      .s_axis_tready(s_tready), .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid),
      .m_axis_tlast(m_tlast), .m_axis_tready(m_tready));

    // Receiver: checks each completed transfer and the hold rule.
    always @(posedge clk) begin
      edge_no <= edge_no + 1;
      if (rst_n) begin
        if (prev_stall) begin
          checks++;
          if (!m_tvalid || m_tdata !== prev_data) begin
            failures++;
            $display("FAIL arch %0d: output changed while stalled", a);
          end
        end
        prev_stall <= m_tvalid && !m_tready;
        prev_data  <= m_tdata;
        if (m_tvalid && m_tready) begin
          checks++;
          if (rx >= BYTES || m_tdata !== sbox(sent[rx]) || m_tlast !== lastf[rx]) begin
            failures++;
            $display("FAIL arch %0d byte %0d: %h last %b", a, rx, m_tdata, m_tlast);
          end
          if (rx == 0)  first_out_edge <= edge_no;
          if (rx == 63) last_out_edge  <= edge_no;
          rx <= rx + 1;
        end
      end
    end

    initial begin
      for (int i = 0; i < BYTES; i++) begin
        sent[i]  = 8'($urandom);
        lastf[i] = (i == 63) || (i % 50 == 49) || (i == BYTES - 1);
      end
      @(negedge clk); @(negedge clk);
      m_tready = 1;
      // Full-rate batch of 64 bytes.
      for (int i = 0; i < 64; i++) begin
        s_tvalid = 1; s_tdata = sent[i]; s_tlast = lastf[i];
        @(negedge clk);
      end
      s_tvalid = 0;
      repeat (LAT + 3) @(negedge clk);
      checks++;
      // Byte 0 was taken at edge 2 (after reset release), so it completes
      // on edge 2 + LAT; byte 63 on edge 65 + LAT.
      if (first_out_edge != 2 + LAT || last_out_edge != 65 + LAT) begin
        failures++;
        $display("FAIL arch %0d: first/last output at edges %0d/%0d, latency %0d",
                 a, first_out_edge, last_out_edge, LAT);
      end
      // Random gaps and back-pressure.
      for (int i = 64; i < BYTES; ) begin
        m_tready = ($urandom_range(0, 2) != 0);
        s_tvalid = ($urandom_range(0, 3) != 0);
        s_tdata  = sent[i]; s_tlast = lastf[i];
        @(posedge clk);
        if (s_tvalid && s_tready) i++;
        @(negedge clk);
      end
      s_tvalid = 0; m_tready = 1;
      repeat (LAT + 3) @(negedge clk);
      checks++;
      if (rx != BYTES) begin
        failures++;
        $display("FAIL arch %0d: received %0d of %0d", a, rx, BYTES);
      end
      done_cnt++;
    end
  end

  initial begin
    @(negedge clk); rst_n = 1;
    wait (done_cnt == N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
