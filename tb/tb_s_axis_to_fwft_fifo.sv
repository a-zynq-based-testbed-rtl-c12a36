// tb_s_axis_to_fwft_fifo: self-checking testbench for the Input FIFO.
// Two unrelated clocks (system 10 ns, UUT 7 ns, then UUT 23 ns) drive the
// AXI4-Stream write side and the FWFT read side. A queue in the testbench models
// the FIFO: every accepted beat is pushed, every pop is compared with the queue's
// head, so loss, duplication or reordering shows as a failure. Phase 1 fills the
// FIFO with the reader stopped and checks that exactly DEPTH beats are accepted
// before TREADY drops; phase 2 streams random traffic with random stalls on both
// sides; phase 3 checks that the FIFO drains to empty.
module tb_s_axis_to_fwft_fifo;
  localparam int W = 64;
  localparam int D = 16;

  logic         s_clk = 0, f_clk = 0, aresetn = 0;
  logic [W-1:0] tdata;
  logic         tvalid, tready;
  logic [W-1:0] dout;
  logic         rd, empty;
  int           checks = 0, failures = 0;
  int           f_half = 3;     // UUT half period in ns, changed by phase
  logic [W-1:0] model[$];
  int           accepted = 0, popped = 0;
  logic         rd_en_rand = 0, rd_enable = 0;

  always #5 s_clk = ~s_clk;
  always begin #(f_half); f_clk = ~f_clk; end

  s_axis_to_fwft_fifo #(.DATA_WIDTH(W), .DEPTH(D)) dut (
    .s_axis_aclk(s_clk), .s_axis_aresetn(aresetn),
    .s_axis_tdata(tdata), .s_axis_tvalid(tvalid), .s_axis_tready(tready),
    .fifo_aclk(f_clk), .fifo_dout(dout), .fifo_read(rd), .fifo_empty(empty));

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // write side bookkeeping
  always @(posedge s_clk) if (aresetn && tvalid && tready) begin
    model.push_back(tdata);
    accepted++;
  end

  // read side: compare every popped word with the model
  assign rd = rd_enable && rd_en_rand;
  always @(posedge f_clk) begin
    rd_en_rand <= ($urandom_range(0, 3) != 0);
    if (rd && !empty) begin
      if (model.size() == 0) check(0, "pop from an empty model");
      else begin
        logic [W-1:0] exp;
        exp = model.pop_front();
        check(dout === exp, $sformatf("pop %0d: got %h exp %h", popped, dout, exp));
      end
      popped++;
    end
  end

  initial begin : watchdog
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tvalid = 0; tdata = '0;
    repeat (4) @(posedge s_clk);
    aresetn = 1;
    repeat (6) @(posedge s_clk);
    check(tready === 1'b1, "tready high after reset");
    check(empty === 1'b1, "empty after reset");

    // Phase 1: fill with the reader stopped
    for (int i = 0; i < D + 4; i++) begin
      tdata  <= {$urandom, $urandom};
      tvalid <= 1'b1;
      @(posedge s_clk);
    end
    tvalid <= 1'b0;
    @(posedge s_clk);
    check(accepted == D, $sformatf("accepted %0d beats into a %0d-deep FIFO", accepted, D));
    check(tready === 1'b0, "tready low while full");
    check(empty === 1'b0, "not empty while full");

    // Phase 2: random traffic, reader running
    rd_enable = 1;
    for (int i = 0; i < 400; i++) begin
      if (i == 200) f_half = 11;   // UUT clock slower than the system clock
      tvalid <= ($urandom_range(0, 2) != 0);
      tdata  <= {$urandom, $urandom};
      @(posedge s_clk);
      while (tvalid && !tready) @(posedge s_clk);
    end
    tvalid <= 1'b0;

    // Phase 3: drain
    repeat (200) @(posedge s_clk);
    check(empty === 1'b1, "empty after draining");
    check(model.size() == 0, $sformatf("%0d words never came out", model.size()));
    check(popped == accepted, "as many words popped as accepted");
    check(accepted > D + 200, "enough traffic passed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
