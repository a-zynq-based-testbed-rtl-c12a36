// tb_workloads: runs the evaluated workloads, the twelve 256-bit hash cores on
// 10 kB, 100 kB and 1000 kB messages, through the testbed with behavioural cores that
// keep each core's published cycle budget at its measured maximum frequency.
// Ten cores use the default 64-bit testbed; the two 32-bit cores run on a second
// testbed built with DATA_WIDTH = 32. Each run checks the digest, TLAST, and the
// ratio of measured end-to-end time to the core's own hash time (see
// workload_bench). One core (Luffa) is faster than a 64-bit stream at 100 MHz and
// must show a ratio near 1.1; at a 150 MHz system clock its ratio must fall to 1.
module tb_workloads;
  logic start64 = 0, start32 = 0, done64, done32;
  int   c64, f64, c32, f32;
  int   checks, failures;

  workload_bench #(.W(64)) u_w64 (.start(start64), .done(done64), .checks(c64), .failures(f64));
  workload_bench #(.W(32)) u_w32 (.start(start32), .done(done32), .checks(c32), .failures(f32));

  initial begin : watchdog
    #100ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c64 + c32, f64 + f32 + 1);
    $finish;
  end

  initial begin
    #1;
    start64 = 1;
    wait (done64);
    start32 = 1;
    wait (done32);
    checks   = c64 + c32;
    failures = f64 + f32;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
