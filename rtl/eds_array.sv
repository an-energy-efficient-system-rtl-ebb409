// eds_array: a bank of EDS cells and the OR tree that merges their errors.
//
// Each bit of `d` is one monitored path endpoint (an intermediate-significant
// bit of an adder output) and gets its own eds_cell. The registered per-cell
// errors are ORed into `final_error`, the single slack-deficit indication fed
// to the DVS controller. The OR tree follows the design; its being purely
// combinational after the cells' registers is this implementation's choice.
//
// Timing: `errors` and `final_error` report, one cycle late, whether any
// monitored bit moved after the falling clock edge.
module eds_array #(
  parameter int unsigned N = 8              // number of EDS cells
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] d,
  output logic [N-1:0] errors,
  output logic         final_error
);

  for (genvar i = 0; i < N; i++) begin : g_cell
    eds_cell u_cell (.clk, .rst_n, .d(d[i]), .error(errors[i]));
  end

  assign final_error = |errors;

endmodule
