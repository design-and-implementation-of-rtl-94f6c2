// sync_2ff: two-flip-flop synchronizer.
//
// Brings a signal that changes in another clock domain into the `clk`
// domain through two flip-flops in series, so that a metastable first stage
// has a full clock period to settle before the second stage samples it. Used
// for the Gray-coded FIFO pointers and for the configuration-update toggle.
// The output follows the input two rising edges of `clk` later. Each bit is
// synchronized on its own: multi-bit values must change one bit at a time
// (Gray code) or be held stable until they have been sampled.
// The two-stage structure follows the document; the active-low asynchronous
// reset to zero is this design's choice.
module sync_2ff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
