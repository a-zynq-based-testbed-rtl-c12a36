// tb_fwft_fifo_to_m_axis: self-checking testbench for the Output FIFO.
// The system clock (10 ns) drives the AXI4-Stream and AXI4-Lite sides; the UUT
// clock writes words into the FIFO. The testbench keeps its own queue of written
// words and checks every accepted stream beat against it, and checks TLAST against
// the packet length it programmed. It covers: register reset values, read-back,
// byte strobes and the SLVERR answer to an unmapped offset; packets of several
// lengths, including several packets queued at once and length 0 (sent as 1);
// the start delay, measured in system-clock cycles as the difference in latency
// between delay D and delay 0 with the same clock phase; random TREADY stalls; and
// the full flag with exactly DEPTH words stored.
module tb_fwft_fifo_to_m_axis;
  import testbed_pkg::*;
  localparam int W = 64;
  localparam int D = 16;

  logic s_clk = 0, u_clk = 0, aresetn = 0;
  int   u_half = 5;
  always #5 s_clk = ~s_clk;
  initial begin #2; forever begin #(u_half); u_clk = ~u_clk; end end

  logic [W-1:0] din;
  logic         wr, full;
  logic [W-1:0] tdata;
  logic         tlast, tvalid, tready;
  logic [3:0]   awaddr, araddr;
  logic         awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0]  wdata, rdata;
  logic [3:0]   wstrb;
  logic [1:0]   bresp, rresp;

  fwft_fifo_to_m_axis #(.DATA_WIDTH(W), .DEPTH(D)) dut (
    .fifo_aclk(u_clk), .fifo_din(din), .fifo_write(wr), .fifo_full(full),
    .m_axis_aclk(s_clk), .m_axis_aresetn(aresetn),
    .m_axis_tdata(tdata), .m_axis_tlast(tlast), .m_axis_tvalid(tvalid), .m_axis_tready(tready),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready));

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- AXI4-Lite master tasks ----------------
  task automatic axil_write(input logic [3:0] a, input logic [31:0] d, input logic [3:0] s,
                            output logic [1:0] resp);
    @(posedge s_clk);
    awaddr <= a; awvalid <= 1; wdata <= d; wstrb <= s; wvalid <= 1; bready <= 1;
    do @(posedge s_clk); while (!(awready && wready));
    awvalid <= 0; wvalid <= 0;
    do @(posedge s_clk); while (!bvalid);
    resp = bresp;
    bready <= 0;
  endtask

  task automatic axil_read(input logic [3:0] a, output logic [31:0] d, output logic [1:0] resp);
    @(posedge s_clk);
    araddr <= a; arvalid <= 1; rready <= 1;
    do @(posedge s_clk); while (!arready);
    arvalid <= 0;
    while (!rvalid) @(posedge s_clk);
    d = rdata; resp = rresp;
    rready <= 0;
  endtask

  // ---------------- stream scoreboard ----------------
  logic [W-1:0] model[$];
  int           pkt_len = 4;      // expected length of the packet in flight
  int           written = 0, beat_in_pkt = 0, beats = 0, packets = 0, stalls = 0;
  logic         rand_ready = 1;

  always @(posedge s_clk) if (aresetn) begin
    if (tvalid && !tready) stalls++;
    if (tvalid && tready) begin
      logic [W-1:0] exp;
      exp = (model.size() != 0) ? model.pop_front() : '0;
      check(tdata === exp, $sformatf("beat %0d data %h exp %h", beats, tdata, exp));
      check(tlast === (beat_in_pkt == pkt_len - 1),
            $sformatf("beat %0d of %0d-word packet: tlast=%b", beat_in_pkt, pkt_len, tlast));
      beats++;
      if (beat_in_pkt == pkt_len - 1) begin beat_in_pkt = 0; packets++; end
      else beat_in_pkt++;
    end
    tready <= rand_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  task automatic uut_write(input int n);
    for (int i = 0; i < n; i++) begin
      logic [W-1:0] v;
      v = {$urandom, $urandom};
      @(posedge u_clk);
      while (full) @(posedge u_clk);
      din <= v; wr <= 1;
      model.push_back(v);
      written++;
      @(posedge u_clk);
      wr <= 0;
    end
  endtask

  // wait until every word written so far has left on the stream
  task automatic wait_beats(input int n);
    int guard = 0;
    while (beats < written && guard < 5000) begin @(posedge s_clk); guard++; end
    check(beats == written, $sformatf("%0d beats arrived, expected %0d (last group %0d)",
                                      beats, written, n));
  endtask

  // latency, in system clock cycles, from a UUT write to the first TVALID
  task automatic measure_latency(output int lat);
    logic [W-1:0] v;
    v = {$urandom, $urandom};
    @(posedge u_clk);
    din <= v; wr <= 1; model.push_back(v); written++;
    @(posedge u_clk);
    wr  <= 0;
    lat = 0;
    while (!tvalid && lat < 1000) begin @(posedge s_clk); lat++; end
    wait_beats(1);
  endtask

  initial begin : watchdog
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [1:0]  r;
    int lat0, latd;
    wr = 0; din = '0; tready = 0;
    awaddr = 0; awvalid = 0; wdata = 0; wstrb = 0; wvalid = 0; bready = 0;
    araddr = 0; arvalid = 0; rready = 0;
    repeat (4) @(posedge s_clk);
    aresetn = 1;
    repeat (4) @(posedge s_clk);

    // registers
    axil_read(REG_TRANSFER_LENGTH, d, r);
    check(d == 32'd4 && r == AXI_RESP_OKAY, $sformatf("length reset value %0d", d));
    axil_read(REG_START_DELAY, d, r);
    check(d == 32'd0 && r == AXI_RESP_OKAY, $sformatf("delay reset value %0d", d));
    axil_write(REG_START_DELAY, 32'h1234_5678, 4'b1111, r);
    axil_write(REG_START_DELAY, 32'hAAAA_00BB, 4'b0001, r);
    axil_read(REG_START_DELAY, d, r);
    check(d == 32'h1234_56BB, $sformatf("byte strobe write gave %h", d));
    axil_write(4'hC, 32'd1, 4'hF, r);
    check(r == AXI_RESP_SLVERR, "unmapped write answers SLVERR");
    axil_read(4'h8, d, r);
    check(r == AXI_RESP_SLVERR && d == 0, "unmapped read answers SLVERR and 0");
    axil_write(REG_START_DELAY, 32'd0, 4'hF, r);

    // one 4-word packet (reset length), with stalls
    uut_write(4);
    wait_beats(4);
    check(packets == 1, "one packet of 4");

    // several 5-word packets queued at once
    axil_write(REG_TRANSFER_LENGTH, 32'd5, 4'hF, r);
    pkt_len = 5;
    uut_write(15);
    wait_beats(15);
    check(packets == 4, $sformatf("three 5-word packets, %0d packets total", packets));

    // UUT clock slower than system clock
    u_half = 17;
    uut_write(10);
    wait_beats(10);
    check(packets == 6, "two more packets at a slow UUT clock");

    // length 0 is sent as single-word packets
    axil_write(REG_TRANSFER_LENGTH, 32'd0, 4'hF, r);
    pkt_len = 1;
    uut_write(3);
    wait_beats(3);
    check(packets == 9, "length 0 gives one-word packets");

    // start delay: same clock period and phase, compare latency for 0 and 37
    rand_ready = 0;
    u_half = 5;
    axil_write(REG_TRANSFER_LENGTH, 32'd1, 4'hF, r);
    repeat (10) @(posedge s_clk);
    measure_latency(lat0);
    repeat (10) @(posedge s_clk);
    axil_write(REG_START_DELAY, 32'd37, 4'hF, r);
    repeat (10) @(posedge s_clk);
    measure_latency(latd);
    check(latd - lat0 == 37, $sformatf("start delay 37 added %0d cycles", latd - lat0));
    axil_write(REG_START_DELAY, 32'd0, 4'hF, r);

    // full flag: DEPTH words with the stream stalled by a long delay
    axil_write(REG_TRANSFER_LENGTH, D, 4'hF, r);
    axil_write(REG_START_DELAY, 32'd400, 4'hF, r);
    pkt_len = D;
    uut_write(D);
    @(posedge u_clk);
    @(posedge u_clk);
    check(full === 1'b1, "full after DEPTH words");
    check(tvalid === 1'b0, "nothing sent during the start delay");
    rand_ready = 1;
    wait_beats(D);
    check(full === 1'b0, "not full after draining");
    check(model.size() == 0, "every word came out");
    check(stalls > 0, "TREADY stalls happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
