// reset_sync: brings an active-low asynchronous reset into a clock domain.
// The reset asserts at once (asynchronously) and is released on the second rising
// edge of clk after rst_ni goes high, so that every flip-flop of the domain leaves
// reset in the same cycle. Used by the dual-clock FIFOs, whose only reset input
// (s_axis_aresetn / m_axis_aresetn) belongs to the system-clock side.
// A lint tool may note that sync_q is flopped both with an asynchronous reset and
// as synchronous data: that is what a reset synchroniser is, and it stands.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_ni,
  output logic rst_no
);
  logic [STAGES-1:0] sync_q;

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni) sync_q <= '0;
    else         sync_q <= {sync_q[STAGES-2:0], 1'b1};
  end

  assign rst_no = sync_q[STAGES-1];
endmodule
