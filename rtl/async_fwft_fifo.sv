// async_fwft_fifo: dual-clock first-word-fall-through FIFO, the storage shared by
// the testbed's Input FIFO and Output FIFO.
//
// How it works: a DEPTH-word memory is written in the wclk domain and read in the
// rclk domain. Each side keeps a binary pointer one bit wider than the address
// and a Gray-coded copy of it; the Gray copy crosses to the other domain through a
// two-flip-flop synchroniser. The read side is empty when its Gray pointer equals
// the synchronised write pointer; the write side is full when the synchronised
// read pointer equals its own with the two top bits inverted. Both flags are
// therefore pessimistic for two cycles of the other clock, never optimistic.
//
// First word fall through: rdata always shows the word at the head of the FIFO
// while empty is low (the memory is read asynchronously at the read pointer);
// rd_en pops that word at the next rclk edge. wr_en while full and rd_en while
// empty are ignored.
//
// Timing: a word written at a wclk edge becomes visible to the reader after at
// most two rclk edges plus one; a pop frees its slot for the writer after two
// wclk edges plus one. DEPTH must be a power of two.
module async_fwft_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 512
) (
  // write side
  input  logic             wclk,
  input  logic             wrst_ni,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  // read side
  input  logic             rclk,
  input  logic             rrst_ni,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin_q, wgray_q, rbin_q, rgray_q;
  logic [AW:0] wgray_s1_q, wgray_s2_q;   // write pointer seen in rclk domain
  logic [AW:0] rgray_s1_q, rgray_s2_q;   // read pointer seen in wclk domain
  logic [AW:0] wbin_next, rbin_next, wgray_next, rgray_next;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  logic do_write;
  assign do_write   = wr_en && !full;
  assign wbin_next  = wbin_q + (AW+1)'(do_write);
  assign wgray_next = bin2gray(wbin_next);

  always_ff @(posedge wclk or negedge wrst_ni) begin
    if (!wrst_ni) begin
      wbin_q     <= '0;
      wgray_q    <= '0;
      rgray_s1_q <= '0;
      rgray_s2_q <= '0;
    end else begin
      wbin_q     <= wbin_next;
      wgray_q    <= wgray_next;
      rgray_s1_q <= rgray_q;
      rgray_s2_q <= rgray_s1_q;
    end
  end

  always_ff @(posedge wclk) begin
    if (do_write) mem[wbin_q[AW-1:0]] <= wdata;
  end

  assign full = (wgray_q == {~rgray_s2_q[AW:AW-1], rgray_s2_q[AW-2:0]});

  // ---------------- read domain ----------------
  logic do_read;
  assign do_read    = rd_en && !empty;
  assign rbin_next  = rbin_q + (AW+1)'(do_read);
  assign rgray_next = bin2gray(rbin_next);

  always_ff @(posedge rclk or negedge rrst_ni) begin
    if (!rrst_ni) begin
      rbin_q     <= '0;
      rgray_q    <= '0;
      wgray_s1_q <= '0;
      wgray_s2_q <= '0;
    end else begin
      rbin_q     <= rbin_next;
      rgray_q    <= rgray_next;
      wgray_s1_q <= wgray_q;
      wgray_s2_q <= wgray_s1_q;
    end
  end

  assign empty = (rgray_q == wgray_s2_q);
  assign rdata = mem[rbin_q[AW-1:0]];

  initial begin
    assert (DEPTH >= 4 && (1 << AW) == DEPTH)
      else $fatal(1, "async_fwft_fifo: DEPTH must be a power of two, at least 4");
  end
endmodule
