// tb_zynq_testbed_pl: end-to-end testbench of the testbed's programmable-logic
// side at its default sizes (64-bit data, 512-word FIFOs).
//
// The testbench plays the parts around the design: the DMA engine (an AXI4-
// Stream source for MM2S, a sink for S2MM, and its two completion interrupts),
// the processor's configuration writes over AXI4-Lite, the clock generator
// (the UUT clock period is changed between runs, as the frequency search does)
// and, through hash_core_model, the hash core under test. Every digest that comes
// back is compared with one computed here from the message.
//
// Runs:
//   1  10 kB message (1280 words), UUT clock faster than the system clock, one
//      word per UUT cycle: the MM2S stream must never be held off, i.e. the
//      Input FIFO takes one 64-bit word per system clock (6.4 Gbit/s at 100 MHz);
//      the core waits on an empty Input FIFO.
//   2  the same size at a slow UUT clock, four cycles per word: the Input FIFO
//      fills and holds off the stream; start delay 25 and random S2MM stalls.
//   3  130 two-word messages, transfer length 520 and a long start delay: the
//      Output FIFO fills (the core sees fifo_full), then one 520-word packet
//      with TLAST on its last word returns all 130 digests.
// Each mechanism is counted and a failure is counted for any that never happened.
module tb_zynq_testbed_pl;
  import testbed_pkg::*;

  logic sys_clk = 0, uut_clk = 0, aresetn = 0;
  int   uut_half = 3;
  always #5 sys_clk = ~sys_clk;
  initial begin #1; forever begin #(uut_half); uut_clk = ~uut_clk; end end

  logic [63:0] mm2s_tdata, s2mm_tdata, hc_din, hc_dout;
  logic        mm2s_tvalid, mm2s_tready, s2mm_tlast, s2mm_tvalid, s2mm_tready;
  logic        hc_src_empty, hc_src_read, hc_dst_write, hc_dst_full;
  logic [3:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic        mm2s_intr, s2mm_intr, irq;

  zynq_testbed_pl dut (
    .sys_clk(sys_clk), .sys_aresetn(aresetn), .uut_clk(uut_clk),
    .s_axis_mm2s_tdata(mm2s_tdata), .s_axis_mm2s_tvalid(mm2s_tvalid), .s_axis_mm2s_tready(mm2s_tready),
    .m_axis_s2mm_tdata(s2mm_tdata), .m_axis_s2mm_tlast(s2mm_tlast),
    .m_axis_s2mm_tvalid(s2mm_tvalid), .m_axis_s2mm_tready(s2mm_tready),
    .hc_din(hc_din), .hc_src_empty(hc_src_empty), .hc_src_read(hc_src_read),
    .hc_dout(hc_dout), .hc_dst_write(hc_dst_write), .hc_dst_full(hc_dst_full),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .mm2s_introut(mm2s_intr), .s2mm_introut(s2mm_intr), .irq_f2p(irq));

  int cycles_per_word = 1, final_cycles = 8;
  int messages_done, starve_cycles, full_cycles;

  hash_core_model #(.DIGEST_WORDS(4)) u_core (
    .clk(uut_clk), .rst_n(aresetn), .cycles_per_word(cycles_per_word), .final_cycles(final_cycles),
    .din(hc_din), .src_empty(hc_src_empty), .src_read(hc_src_read),
    .dout(hc_dout), .dst_write(hc_dst_write), .dst_full(hc_dst_full),
    .messages_done(messages_done), .starve_cycles(starve_cycles), .full_cycles(full_cycles));

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- reference digest, computed independently ----------------
  localparam logic [63:0] K = 64'h9E37_79B9_7F4A_7C15;
  logic [63:0] exp_q[$];          // expected S2MM words, in order

  function automatic logic [63:0] rotl(input logic [63:0] x, input int n);
    return (x << n) | (x >> (64 - n));
  endfunction

  task automatic expect_digest(input logic [63:0] msg[$]);
    logic [63:0] lane[4];
    for (int j = 0; j < 4; j++) lane[j] = K + 64'(j);
    foreach (msg[i]) lane[i % 4] = rotl(lane[i % 4] ^ msg[i], 13) + K;
    for (int j = 0; j < 4; j++) exp_q.push_back(lane[j] ^ 64'(j));
  endtask

  // ---------------- AXI4-Lite writes (processor) ----------------
  task automatic axil_write(input logic [3:0] a, input logic [31:0] d);
    @(posedge sys_clk);
    awaddr <= a; awvalid <= 1; wdata <= d; wstrb <= 4'hF; wvalid <= 1; bready <= 1;
    do @(posedge sys_clk); while (!(awready && wready));
    awvalid <= 0; wvalid <= 0;
    do @(posedge sys_clk); while (!bvalid);
    check(bresp == AXI_RESP_OKAY, "configuration write answered OKAY");
    bready <= 0;
  endtask

  // ---------------- mechanism counters ----------------
  int n_in_backpressure = 0, n_out_stall = 0, n_packets = 0, n_irq_mm2s = 0, n_irq_s2mm = 0;
  int n_fast_runs = 0, n_slow_runs = 0, n_delays = 0;
  int s2mm_beats = 0;
  logic s2mm_random = 0;

  always @(posedge sys_clk) if (aresetn) begin
    if (mm2s_tvalid && !mm2s_tready) n_in_backpressure++;
    if (s2mm_tvalid && !s2mm_tready) n_out_stall++;
  end

  // ---------------- DMA S2MM sink ----------------
  int pkt_len = 4, beat_in_pkt = 0;
  always @(posedge sys_clk) if (aresetn) begin
    if (s2mm_tvalid && s2mm_tready) begin
      logic [63:0] e;
      e = (exp_q.size() != 0) ? exp_q.pop_front() : 64'hDEAD;
      check(s2mm_tdata === e, $sformatf("digest word %0d: got %h exp %h", s2mm_beats, s2mm_tdata, e));
      check(s2mm_tlast === (beat_in_pkt == pkt_len - 1),
            $sformatf("tlast=%b on beat %0d of a %0d-word packet", s2mm_tlast, beat_in_pkt, pkt_len));
      s2mm_beats++;
      if (s2mm_tlast) begin
        n_packets++;
        beat_in_pkt = 0;
        fork pulse_s2mm(); join_none
      end else beat_in_pkt++;
    end
    s2mm_tready <= s2mm_random ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  task automatic pulse_s2mm();
    s2mm_intr <= 1;
    repeat (2) @(posedge sys_clk);
    check(irq === 1'b1, "processor interrupt on S2MM completion");
    n_irq_s2mm++;
    s2mm_intr <= 0;
    @(posedge sys_clk);
  endtask

  // ---------------- DMA MM2S source ----------------
  // returns the number of system cycles from the first to the last accepted beat
  task automatic send_message(input int len, output int span);
    logic [63:0] msg[$];
    int t0 = 0, t = 0;
    for (int i = 0; i < len; i++) msg.push_back({$urandom, $urandom});
    expect_digest(msg);
    for (int i = -1; i < len; i++) begin
      mm2s_tdata  <= (i < 0) ? 64'(len) : msg[i];
      mm2s_tvalid <= 1;
      do begin @(posedge sys_clk); t++; end while (!mm2s_tready);
      if (i < 0) t0 = t;
    end
    mm2s_tvalid <= 0;
    span = t - t0 + 1;
    mm2s_intr <= 1;
    repeat (2) @(posedge sys_clk);
    check(irq === 1'b1, "processor interrupt on MM2S completion");
    n_irq_mm2s++;
    mm2s_intr <= 0;
  endtask

  task automatic wait_drained(input int words, input int limit);
    int g = 0;
    while (s2mm_beats < words && g < limit) begin @(posedge sys_clk); g++; end
    check(s2mm_beats == words, $sformatf("%0d digest words returned, expected %0d", s2mm_beats, words));
    check(exp_q.size() == 0, "no digest outstanding");
  endtask

  // start delay: cycles between the core's first digest write and the first TVALID
  int first_write_cycle = -1, first_valid_cycle = -1, sys_cycle = 0;
  logic watch_delay = 0;
  always @(posedge sys_clk) begin
    sys_cycle++;
    if (watch_delay && first_valid_cycle < 0 && s2mm_tvalid) first_valid_cycle = sys_cycle;
  end
  always @(posedge uut_clk)
    if (watch_delay && first_write_cycle < 0 && hc_dst_write) first_write_cycle = sys_cycle;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int span, gap;
    mm2s_tdata = 0; mm2s_tvalid = 0; s2mm_tready = 0; mm2s_intr = 0; s2mm_intr = 0;
    awaddr = 0; awvalid = 0; wdata = 0; wstrb = 0; wvalid = 0; bready = 0;
    araddr = 0; arvalid = 0; rready = 0;
    repeat (5) @(posedge sys_clk);
    aresetn = 1;
    repeat (5) @(posedge sys_clk);
    check(irq === 1'b0, "no interrupt after reset");

    // Run 1: 10 kB, fast UUT clock (6 ns), one word per cycle, delay 0
    axil_write(REG_TRANSFER_LENGTH, 32'd4);
    axil_write(REG_START_DELAY, 32'd0);
    uut_half = 3; cycles_per_word = 1; pkt_len = 4;
    watch_delay = 1;
    send_message(1280, span);
    check(span == 1281, $sformatf("1281 beats took %0d system cycles, expected 1281", span));
    wait_drained(4, 20000);
    gap = first_valid_cycle - first_write_cycle;
    check(gap >= 1 && gap <= 6, $sformatf("delay 0: first beat %0d cycles after the digest", gap));
    watch_delay = 0;
    check(messages_done == 1, "run 1: one message hashed");
    check(starve_cycles > 0, "run 1: core waited for data");
    n_fast_runs++;

    // Run 2: 10 kB, slow UUT clock (17 ns), four cycles per word, delay 25
    repeat (20) @(posedge sys_clk);
    uut_half = 8; cycles_per_word = 4; s2mm_random = 1;
    axil_write(REG_START_DELAY, 32'd25);
    first_write_cycle = -1; first_valid_cycle = -1; watch_delay = 1;
    send_message(1280, span);
    check(span > 1281, "run 2: Input FIFO held off the stream");
    wait_drained(8, 200000);
    gap = first_valid_cycle - first_write_cycle;
    check(gap >= 26 && gap <= 31, $sformatf("delay 25: first beat %0d cycles after the digest", gap));
    if (gap >= 26) n_delays++;
    watch_delay = 0;
    check(messages_done == 2, "run 2: second message hashed");
    n_slow_runs++;

    // Run 3: fill the Output FIFO: 130 messages, one 520-word packet
    repeat (20) @(posedge sys_clk);
    uut_half = 3; cycles_per_word = 1; s2mm_random = 0;
    axil_write(REG_TRANSFER_LENGTH, 32'd520);
    axil_write(REG_START_DELAY, 32'd4000);
    pkt_len = 520;
    for (int m = 0; m < 130; m++) send_message(2, span);
    wait_drained(528, 100000);
    check(full_cycles > 0, "run 3: core waited on a full Output FIFO");
    check(messages_done == 132, $sformatf("%0d messages hashed, expected 132", messages_done));
    check(n_packets == 3, $sformatf("%0d packets, expected 3", n_packets));
    n_fast_runs++;
    repeat (10) @(posedge sys_clk);

    // every mechanism must have happened
    check(n_in_backpressure > 0, "Input FIFO backpressure happened");
    check(n_out_stall > 0,       "S2MM stalls happened");
    check(n_delays > 0,          "start delay happened");
    check(n_packets > 0,         "TLAST packets happened");
    check(n_irq_mm2s > 0 && n_irq_s2mm > 0, "both interrupts happened");
    check(n_fast_runs > 0 && n_slow_runs > 0, "UUT clock faster and slower than the system clock");
    check(full_cycles > 0,       "Output FIFO full happened");
    check(starve_cycles > 0,     "Input FIFO empty stall happened");
    $display("mechanisms: in_backpressure=%0d out_stall=%0d delays=%0d packets=%0d irq_mm2s=%0d irq_s2mm=%0d fast=%0d slow=%0d out_full=%0d starve=%0d",
             n_in_backpressure, n_out_stall, n_delays, n_packets, n_irq_mm2s, n_irq_s2mm,
             n_fast_runs, n_slow_runs, full_cycles, starve_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
