// workload_bench: runs the evaluated hash workloads of one bus width through the
// testbed top and times them, as the processor's timer would.
//
// For each algorithm of width W it sets the UUT clock to the core's measured
// maximum frequency, configures timing_core_model with the core's published cycle
// budget (block size in words, cycles per block, fixed cycles), sends a message
// of each size in sizes_kb (10, 100 and 1000 kB) through the MM2S stream and waits for the digest
// packet on S2MM. It checks the digest and TLAST, and measures the time from the
// first accepted MM2S beat to the accepted TLAST. That time is divided by the
// core's own hash time, (cycles_per_block*N + fixed)/f_uut, giving the overhead
// ratio. The expected ratio is 1 when the input stream (one W-bit word per system
// clock) is faster than the core, and core rate / stream rate when it is not;
// the measured ratio must match it within a small margin for the transfer
// latency. At 1000 kB the measured throughput must also reach 98 % of the
// core's formula throughput, or of the stream's, whichever is lower. Cycle budgets and frequencies are the published figures for the
// 256-bit Round 2 SHA-3 cores; message sizes are counted in 1024-byte kB.
module workload_bench #(
  parameter int W = 64
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  import testbed_pkg::*;

  typedef struct {
    string name;
    int    block_bits, cycles_per_block, fixed_cycles, width;
    real   f_mhz;       // measured maximum frequency of the core
    real   f_sys_mhz;   // system (DMA) clock
  } algo_t;

  // width, block, cycles/block, fixed cycles from the published cycle formulas;
  // frequency from the measured maxima
  algo_t algos[$] = '{
    '{"BLAKE",      512, 21,  14, 64, 145.4, 100.0},
    '{"CubeHash",   256, 16, 170, 64, 275.8, 100.0},
    '{"ECHO",      1536, 26,  32, 64, 101.1, 100.0},
    '{"Fugue",       32,  2,  47, 32, 200.0, 100.0},
    '{"Groestl",    512, 21,   7, 64, 258.6, 100.0},
    '{"Hamsi",       32,  3,  15, 32, 124.9, 100.0},
    '{"JH",         512, 36,  15, 64, 333.3, 100.0},
    '{"Keccak",    1088, 24,  24, 64, 123.1, 100.0},
    '{"Luffa",      256,  9,  21, 64, 247.4, 100.0},
    '{"Luffa",      256,  9,  21, 64, 247.4, 150.0},
    '{"Shabal",     512, 64, 208, 64, 122.5, 100.0},
    '{"SHAvite-3",  512, 37,  15, 64, 205.7, 100.0},
    '{"Skein",      512, 19,  14, 64, 140.3, 100.0}
  };
  int sizes_kb[3] = '{10, 100, 1000};

  localparam int          L = 256 / W;
  localparam logic [63:0] K = 64'h9E37_79B9_7F4A_7C15;

  logic sys_clk = 0, uut_clk = 0, aresetn = 0;
  real  sys_half = 5.0, uut_half = 5.0;
  always begin #(sys_half); sys_clk = ~sys_clk; end
  always begin #(uut_half); uut_clk = ~uut_clk; end

  logic [W-1:0] mm2s_tdata, s2mm_tdata, hc_din, hc_dout;
  logic         mm2s_tvalid, mm2s_tready, s2mm_tlast, s2mm_tvalid;
  logic         hc_src_empty, hc_src_read, hc_dst_write, hc_dst_full;
  logic [3:0]   awaddr;
  logic         awvalid, awready, wvalid, wready, bvalid, bready, arready, rvalid;
  logic [31:0]  wdata, rdata;
  logic [1:0]   bresp, rresp;
  logic         irq;

  zynq_testbed_pl #(.DATA_WIDTH(W)) dut (
    .sys_clk(sys_clk), .sys_aresetn(aresetn), .uut_clk(uut_clk),
    .s_axis_mm2s_tdata(mm2s_tdata), .s_axis_mm2s_tvalid(mm2s_tvalid), .s_axis_mm2s_tready(mm2s_tready),
    .m_axis_s2mm_tdata(s2mm_tdata), .m_axis_s2mm_tlast(s2mm_tlast),
    .m_axis_s2mm_tvalid(s2mm_tvalid), .m_axis_s2mm_tready(1'b1),
    .hc_din(hc_din), .hc_src_empty(hc_src_empty), .hc_src_read(hc_src_read),
    .hc_dout(hc_dout), .hc_dst_write(hc_dst_write), .hc_dst_full(hc_dst_full),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(4'hF), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(4'h0), .s_axi_arvalid(1'b0), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(1'b1),
    .mm2s_introut(1'b0), .s2mm_introut(1'b0), .irq_f2p(irq));

  int wpb = 1, cpb = 1, fixc = 0;
  timing_core_model #(.W(W)) u_core (
    .clk(uut_clk), .rst_n(aresetn), .words_per_block(wpb), .cycles_per_block(cpb),
    .fixed_cycles(fixc), .din(hc_din), .src_empty(hc_src_empty), .src_read(hc_src_read),
    .dout(hc_dout), .dst_write(hc_dst_write), .dst_full(hc_dst_full));

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [W-1:0] rotl13(input logic [W-1:0] x);
    return (x << 13) | (x >> (W - 13));
  endfunction

  // S2MM sink with timestamp of the packet end
  logic [W-1:0] exp_q[$];
  int    beat_in_pkt = 0;
  realtime t_last = 0;
  int    packets = 0;
  always @(posedge sys_clk) if (aresetn && s2mm_tvalid) begin
    logic [W-1:0] e;
    e = (exp_q.size() != 0) ? exp_q.pop_front() : '0;
    check(s2mm_tdata === e, $sformatf("W=%0d digest word: got %h exp %h", W, s2mm_tdata, e));
    check(s2mm_tlast === (beat_in_pkt == L - 1), "TLAST on the last digest word");
    if (s2mm_tlast) begin beat_in_pkt = 0; packets++; t_last = $realtime; end
    else beat_in_pkt++;
  end

  task automatic run_one(input algo_t a, input int kb);
    int      words_per_block = a.block_bits / W;
    int      n_blocks = (kb * 1024 * 8 + a.block_bits - 1) / a.block_bits;
    int      n_words  = n_blocks * words_per_block;
    logic [W-1:0] lane[L];
    realtime t_first = 0;
    real     t_uut, t_sys, calc_ns, meas_ns, ratio, expected, core_rate, bus_rate;
    int      pk;
    logic    first;

    sys_half = 500.0 / a.f_sys_mhz;
    uut_half = 500.0 / a.f_mhz;
    t_uut    = 2.0 * uut_half;
    t_sys    = 2.0 * sys_half;
    wpb = words_per_block; cpb = a.cycles_per_block; fixc = a.fixed_cycles;
    repeat (10) @(posedge sys_clk);

    for (int j = 0; j < L; j++) lane[j] = W'(K) + W'(j);
    pk = packets;
    first = 1;
    for (int i = -1; i < n_words; i++) begin
      logic [W-1:0] v;
      v = (i < 0) ? W'(n_blocks) : W'({$urandom, $urandom});
      if (i >= 0) lane[i % L] = rotl13(lane[i % L] ^ v) + W'(K);
      mm2s_tdata  <= v;
      mm2s_tvalid <= 1'b1;
      do @(posedge sys_clk); while (!mm2s_tready);
      if (first) begin t_first = $realtime; first = 0; end
    end
    mm2s_tvalid <= 1'b0;
    for (int j = 0; j < L; j++) exp_q.push_back(lane[j]);
    while (packets == pk) @(posedge sys_clk);

    meas_ns   = t_last - t_first;
    calc_ns   = real'(a.cycles_per_block * n_blocks + a.fixed_cycles) * t_uut;
    ratio     = meas_ns / calc_ns;
    core_rate = real'(words_per_block) / (real'(a.cycles_per_block) * t_uut);
    bus_rate  = 1.0 / t_sys;
    expected  = (core_rate > bus_rate) ? core_rate / bus_rate : 1.0;
    $display("%-10s W=%0d f_uut=%6.1f MHz f_sys=%5.1f MHz %4d kB: %0d blocks, hash %9.1f ns, measured %9.1f ns, ratio %5.3f (expected %5.3f), %6.3f Gbit/s",
             a.name, W, a.f_mhz, a.f_sys_mhz, kb, n_blocks, calc_ns, meas_ns, ratio, expected,
             real'(n_blocks * a.block_bits) / meas_ns);
    // throughput: the core's own formula rate, capped by the input stream's rate
    if (kb >= 1000)
      check(real'(n_blocks * a.block_bits) / meas_ns >=
            0.98 * ((core_rate > bus_rate ? bus_rate : core_rate) * real'(W)),
            $sformatf("%s %0d kB: throughput below the expected rate", a.name, kb));
    check(ratio >= expected * 0.97 && ratio <= expected * 1.03 + 0.02,
          $sformatf("%s %0d kB: ratio %f, expected %f", a.name, kb, ratio, expected));
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    mm2s_tdata = '0; mm2s_tvalid = 0;
    awaddr = 0; awvalid = 0; wdata = 0; wvalid = 0; bready = 1;
    wait (start);
    repeat (4) @(posedge sys_clk);
    aresetn = 1;
    repeat (6) @(posedge sys_clk);
    // one packet per digest
    @(posedge sys_clk);
    awaddr <= REG_TRANSFER_LENGTH; wdata <= L; awvalid <= 1; wvalid <= 1;
    do @(posedge sys_clk); while (!awready);
    awvalid <= 0; wvalid <= 0;
    repeat (4) @(posedge sys_clk);
    foreach (algos[i]) if (algos[i].width == W)
      foreach (sizes_kb[s]) run_one(algos[i], sizes_kb[s]);
    check(packets > 0, "at least one workload ran");
    done = 1;
  end
endmodule
