// tb_irq_concat: self-checking testbench for the interrupt Concat block.
// Applies every combination of the two DMA interrupts, several times in a random
// order, and checks that the output is high exactly when at least one input is.
module tb_irq_concat;
  logic in0, in1, dout;
  int   checks = 0, failures = 0;

  irq_concat dut (.in0(in0), .in1(in1), .dout(dout));

  initial begin : watchdog
    #1us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20; i++) begin
      logic [1:0] v;
      v   = (i < 4) ? 2'(i) : 2'($urandom_range(0, 3));
      in0 = v[0];
      in1 = v[1];
      #1;
      checks++;
      if (dout !== (v != 2'b00)) begin
        failures++;
        $display("FAIL: in0=%b in1=%b dout=%b", in0, in1, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
