// hash_core_model: behavioural stand-in for the hash core under test, used only
// by the testbed's end-to-end testbench. It is not a real hash function.
//
// It speaks the FWFT-FIFO interface a core in the testbed uses: it pops words
// from the Input FIFO (src_empty / src_read, data on din) and pushes words into
// the Output FIFO (dst_full / dst_write, data on dout), all on the UUT clock.
// Framing, which is this model's own: the first word of a message is its length
// L in words (L > 0), then come L message words. The model takes one message word
// every cycles_per_word clock cycles (mimicking a core that needs several cycles
// per block), waits final_cycles after the last one, then writes DIGEST_WORDS
// digest words, waiting while dst_full is high. The digest mixes every word into
// one of four 64-bit lanes: h[i mod 4] = rotl13(h[i mod 4] ^ w_i) + K.
module hash_core_model #(
  parameter int DIGEST_WORDS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  int          cycles_per_word,
  input  int          final_cycles,
  input  logic [63:0] din,
  input  logic        src_empty,
  output logic        src_read,
  output logic [63:0] dout,
  output logic        dst_write,
  input  logic        dst_full,
  output int          messages_done,
  output int          starve_cycles,   // cycles spent waiting on an empty Input FIFO
  output int          full_cycles      // cycles spent waiting on a full Output FIFO
);
  localparam logic [63:0] K = 64'h9E37_79B9_7F4A_7C15;
  typedef enum logic [1:0] {HDR, MSG, FIN, OUT} st_e;

  st_e         st;
  logic [63:0] h [4];
  int          remaining, idx, wait_cnt, out_idx;

  always_comb begin
    src_read  = 1'b0;
    dst_write = 1'b0;
    dout      = h[out_idx % 4] ^ 64'(out_idx);
    if (rst_n) begin
      if (st == HDR && !src_empty) src_read = 1'b1;
      if (st == MSG && !src_empty && wait_cnt == 0) src_read = 1'b1;
      if (st == OUT && !dst_full) dst_write = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= HDR;
      remaining <= 0; idx <= 0; wait_cnt <= 0; out_idx <= 0;
      messages_done <= 0; starve_cycles <= 0; full_cycles <= 0;
      for (int j = 0; j < 4; j++) h[j] <= K + 64'(j);
    end else begin
      unique case (st)
        HDR: if (src_read) begin
          remaining <= int'(din[31:0]);
          idx <= 0;
          wait_cnt <= 0;
          for (int j = 0; j < 4; j++) h[j] <= K + 64'(j);
          st <= MSG;
        end
        MSG: begin
          if (wait_cnt != 0) wait_cnt <= wait_cnt - 1;
          else if (src_empty) starve_cycles <= starve_cycles + 1;
          else begin
            h[idx % 4] <= {h[idx % 4][50:0] ^ din[50:0], h[idx % 4][63:51] ^ din[63:51]} + K;
            idx <= idx + 1;
            wait_cnt <= cycles_per_word - 1;
            if (remaining == 1) begin st <= FIN; wait_cnt <= final_cycles; end
            remaining <= remaining - 1;
          end
        end
        FIN: if (wait_cnt != 0) wait_cnt <= wait_cnt - 1; else begin st <= OUT; out_idx <= 0; end
        OUT: if (dst_write) begin
          if (out_idx == DIGEST_WORDS - 1) begin st <= HDR; messages_done <= messages_done + 1; end
          out_idx <= out_idx + 1;
        end else full_cycles <= full_cycles + 1;
        default: st <= HDR;
      endcase
    end
  end
endmodule
