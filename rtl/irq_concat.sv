// irq_concat: the testbed's Concat block, which merges the DMA engine's two
// completion interrupts into the one interrupt line that goes to the processor.
//
// In the testbed, in0 carries the S2MM interrupt (digest received from the Output
// FIFO) and in1 the MM2S interrupt (message sent to the Input FIFO), as the block
// diagram routes them; the order does not matter to the function. dout is high whenever
// either is high, so software is woken by the end of either transfer and reads
// the DMA status to tell which. Purely combinational, no clock; port names follow
// the In0/In1/dout pins of the testbed's block diagram. The inputs are level
// interrupts and the output is a level too.
module irq_concat (
  input  logic in0,
  input  logic in1,
  output logic dout
);
  always_comb dout = in0 | in1;
endmodule
