// tb_frequency_search: the testbed's measurement procedure, run end to end in
// simulation on the default top.
//
// Software searches for the highest UUT clock frequency at which the core still
// returns the right digest: it hashes a message, compares, and raises or lowers
// the clock in a binary search until the interval is 0.1 MHz wide. The clock is
// changed between runs without resetting the logic. Here the core is
// hash_core_model behind a fault model of a critical path: when the UUT period
// is shorter than T_CRIT_NS, every digest word it writes has one bit flipped, as
// a register that misses its setup time would. The search must end within
// 0.1 MHz below 1000/T_CRIT_NS, and every run must return exactly one 4-word
// packet, so that a wrong digest never costs the FIFOs their alignment.
module tb_frequency_search;
  import testbed_pkg::*;

  localparam real T_CRIT_NS = 4.87;           // model critical path: fmax 205.34 MHz
  localparam real F_TRUE    = 1000.0 / T_CRIT_NS;

  logic sys_clk = 0, uut_clk = 0, aresetn = 0;
  real  uut_half = 10.0;
  always #5 sys_clk = ~sys_clk;
  initial begin #1.3; forever begin #(uut_half); uut_clk = ~uut_clk; end end

  logic [63:0] mm2s_tdata, s2mm_tdata, hc_din, hc_dout, core_dout;
  logic        mm2s_tvalid, mm2s_tready, s2mm_tlast, s2mm_tvalid;
  logic        hc_src_empty, hc_src_read, hc_dst_write, hc_dst_full;
  logic        awready, wready, bvalid, arready, rvalid, irq;
  logic [31:0] rdata;
  logic [1:0]  bresp, rresp;
  logic        too_fast;

  zynq_testbed_pl dut (
    .sys_clk(sys_clk), .sys_aresetn(aresetn), .uut_clk(uut_clk),
    .s_axis_mm2s_tdata(mm2s_tdata), .s_axis_mm2s_tvalid(mm2s_tvalid), .s_axis_mm2s_tready(mm2s_tready),
    .m_axis_s2mm_tdata(s2mm_tdata), .m_axis_s2mm_tlast(s2mm_tlast),
    .m_axis_s2mm_tvalid(s2mm_tvalid), .m_axis_s2mm_tready(1'b1),
    .hc_din(hc_din), .hc_src_empty(hc_src_empty), .hc_src_read(hc_src_read),
    .hc_dout(hc_dout), .hc_dst_write(hc_dst_write), .hc_dst_full(hc_dst_full),
    .s_axi_awaddr(4'h0), .s_axi_awvalid(1'b0), .s_axi_awready(awready),
    .s_axi_wdata(32'h0), .s_axi_wstrb(4'h0), .s_axi_wvalid(1'b0), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(1'b1),
    .s_axi_araddr(4'h0), .s_axi_arvalid(1'b0), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(1'b1),
    .mm2s_introut(1'b0), .s2mm_introut(1'b0), .irq_f2p(irq));

  int messages_done, starve_cycles, full_cycles;
  hash_core_model #(.DIGEST_WORDS(4)) u_core (
    .clk(uut_clk), .rst_n(aresetn), .cycles_per_word(2), .final_cycles(20),
    .din(hc_din), .src_empty(hc_src_empty), .src_read(hc_src_read),
    .dout(core_dout), .dst_write(hc_dst_write), .dst_full(hc_dst_full),
    .messages_done(messages_done), .starve_cycles(starve_cycles), .full_cycles(full_cycles));

  // critical-path fault model
  assign too_fast = (2.0 * uut_half) < T_CRIT_NS;
  assign hc_dout  = too_fast ? (core_dout ^ 64'h0000_0001_0000_0000) : core_dout;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam logic [63:0] K = 64'h9E37_79B9_7F4A_7C15;
  function automatic logic [63:0] rotl(input logic [63:0] x, input int n);
    return (x << n) | (x >> (64 - n));
  endfunction

  // S2MM sink: collects one packet
  logic [63:0] got[$];
  int          packets = 0, beats_in_pkt = 0;
  logic        tlast_ok = 1;
  always @(posedge sys_clk) if (aresetn && s2mm_tvalid) begin
    got.push_back(s2mm_tdata);
    beats_in_pkt++;
    if (s2mm_tlast) begin
      if (beats_in_pkt != 4) tlast_ok = 0;
      beats_in_pkt = 0;
      packets++;
    end
  end

  // hash one 10 kB message at frequency f; returns 1 when the digest is right
  task automatic hash_at(input real f_mhz, output logic pass);
    logic [63:0] msg[$], lane[4];
    int pk;
    uut_half = 500.0 / f_mhz;
    repeat (5) @(posedge sys_clk);
    for (int i = 0; i < 1280; i++) msg.push_back({$urandom, $urandom});
    for (int j = 0; j < 4; j++) lane[j] = K + 64'(j);
    foreach (msg[i]) lane[i % 4] = rotl(lane[i % 4] ^ msg[i], 13) + K;
    got.delete();
    pk = packets;
    for (int i = -1; i < 1280; i++) begin
      mm2s_tdata  <= (i < 0) ? 64'd1280 : msg[i];
      mm2s_tvalid <= 1'b1;
      do @(posedge sys_clk); while (!mm2s_tready);
    end
    mm2s_tvalid <= 1'b0;
    while (packets == pk) @(posedge sys_clk);
    check(got.size() == 4 && tlast_ok, $sformatf("one 4-word packet at %.1f MHz", f_mhz));
    pass = 1;
    for (int j = 0; j < 4; j++) if (got[j] !== (lane[j] ^ 64'(j))) pass = 0;
  endtask

  initial begin : watchdog
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real  lo = 50.0, hi = 400.0, mid;
    logic pass;
    int   n_pass = 0, n_fail = 0;
    mm2s_tdata = '0; mm2s_tvalid = 0;
    repeat (5) @(posedge sys_clk);
    aresetn = 1;
    repeat (10) @(posedge sys_clk);

    hash_at(lo, pass);
    check(pass, "digest right at the lower bound");
    hash_at(hi, pass);
    check(!pass, "digest wrong at the upper bound");
    while (hi - lo > 0.1) begin
      mid = (lo + hi) / 2.0;
      hash_at(mid, pass);
      check(pass == (mid <= F_TRUE), $sformatf("at %.3f MHz the result is %s", mid, pass ? "right" : "wrong"));
      if (pass) begin lo = mid; n_pass++; end
      else      begin hi = mid; n_fail++; end
    end
    $display("maximum frequency found: %.2f MHz (model limit %.2f MHz), %0d passing and %0d failing runs",
             lo, F_TRUE, n_pass, n_fail);
    check(lo <= F_TRUE && F_TRUE - lo <= 0.1, "search ends within 0.1 MHz of the limit");
    check(n_pass > 0 && n_fail > 0, "the search both raised and lowered the clock");
    check(messages_done == packets, "every message produced one digest packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
