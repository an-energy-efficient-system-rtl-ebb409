// eds_cell: one Error Detection Sequential for an FPGA fabric.
//
// The cell watches the endpoint `d` of a monitored (speculative) path. DFF1
// samples `d` on the falling clock edge; on the following rising edge DFF2
// captures d XOR (falling-edge sample). If the path settled before the falling
// edge both values agree and `error` stays low. If the path was still moving
// after the falling edge, the rising-edge value differs from the sample and
// `error` goes high for one cycle. An error therefore flags a slack deficit on
// the monitored path, not a failure of the data register that captures the
// same path on the rising edge.
//
// Interface and timing: `d` is the combinational path endpoint that a normal
// rising-edge register also captures. `error` is registered and valid one
// cycle after the rising edge it reports on. The falling edge stands for the
// duty-cycle point beta of the clock; using the opposite clock edge instead of
// a second clock follows the design. The asynchronous active-low reset is an
// implementation choice.
module eds_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic d,       // monitored path endpoint
  output logic error    // 1: d changed after the falling edge
);

  logic d_fall;         // DFF1: sample on the falling edge

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) d_fall <= 1'b0;
    else        d_fall <= d;

  // DFF2: holds the comparison for the next clock cycle
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) error <= 1'b0;
    else        error <= d ^ d_fall;

endmodule
