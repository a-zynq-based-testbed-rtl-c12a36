// timing_core_model: behavioural stand-in for a block-based hash core with a
// given cycle budget, used by the workload testbench. Not a real hash function.
//
// FWFT-FIFO interface on the UUT clock, as any core in the testbed. The first
// word of a message is the number of blocks N; then come N blocks of
// words_per_block words. The core loads the next block (one word per cycle while
// the Input FIFO has data) while it processes the current one; processing a
// block takes cycles_per_block cycles and starts as soon as the block is loaded
// and the previous one is finished. After the last block it waits fixed_cycles,
// then writes 256/W digest words. So when data keeps up, a message takes
// cycles_per_block*N + fixed_cycles cycles plus the load time of the first block,
// the form of the published cycle counts of such cores.
// Digest: lane[i mod L] = rotl13(lane[i mod L] ^ w_i) + K over all message words.
module timing_core_model #(
  parameter int W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  int           words_per_block,
  input  int           cycles_per_block,
  input  int           fixed_cycles,
  input  logic [W-1:0] din,
  input  logic         src_empty,
  output logic         src_read,
  output logic [W-1:0] dout,
  output logic         dst_write,
  input  logic         dst_full
);
  localparam int          L = 256 / W;
  localparam logic [63:0] K = 64'h9E37_79B9_7F4A_7C15;
  typedef enum logic [1:0] {HDR, RUN, FIN, OUT} st_e;

  st_e        st;
  logic [W-1:0] lane [L];
  int         n_blocks, loaded_words, blocks_loaded, blocks_started, proc_cnt, word_idx, fin_cnt, out_idx;
  logic       start_block;

  function automatic logic [W-1:0] rotl13(input logic [W-1:0] x);
    return (x << 13) | (x >> (W - 13));
  endfunction

  always_comb begin
    src_read  = 1'b0;
    dst_write = 1'b0;
    dout      = lane[out_idx % L];
    if (rst_n) begin
      if (st == HDR && !src_empty) src_read = 1'b1;
      if (st == RUN && !src_empty && loaded_words < words_per_block && blocks_loaded < n_blocks)
        src_read = 1'b1;
      if (st == OUT && !dst_full) dst_write = 1'b1;
    end
    start_block = (st == RUN) && (loaded_words == words_per_block) && (proc_cnt <= 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= HDR;
      n_blocks <= 0; loaded_words <= 0; blocks_loaded <= 0; blocks_started <= 0;
      proc_cnt <= 0; word_idx <= 0; fin_cnt <= 0; out_idx <= 0;
      for (int j = 0; j < L; j++) lane[j] <= W'(K) + W'(j);
    end else begin
      unique case (st)
        HDR: if (src_read) begin
          n_blocks <= int'(32'(din));
          loaded_words <= 0; blocks_loaded <= 0; blocks_started <= 0;
          proc_cnt <= 0; word_idx <= 0;
          for (int j = 0; j < L; j++) lane[j] <= W'(K) + W'(j);
          st <= RUN;
        end
        RUN: begin
          if (start_block) begin
            proc_cnt <= cycles_per_block;
            blocks_started <= blocks_started + 1;
          end else if (proc_cnt != 0) begin
            proc_cnt <= proc_cnt - 1;
          end
          if (src_read) begin
            lane[word_idx % L] <= rotl13(lane[word_idx % L] ^ din) + W'(K);
            word_idx <= word_idx + 1;
          end
          if (start_block)
            loaded_words <= src_read ? 1 : 0;
          else if (src_read)
            loaded_words <= loaded_words + 1;
          if (src_read && loaded_words == words_per_block - 1)
            blocks_loaded <= blocks_loaded + 1;
          if (!start_block && blocks_started == n_blocks && proc_cnt == 1) begin
            st <= FIN;
            fin_cnt <= fixed_cycles;
          end
        end
        FIN: if (fin_cnt != 0) fin_cnt <= fin_cnt - 1; else begin st <= OUT; out_idx <= 0; end
        OUT: if (dst_write) begin
          if (out_idx == L - 1) st <= HDR;
          out_idx <= out_idx + 1;
        end
        default: st <= HDR;
      endcase
    end
  end
endmodule
