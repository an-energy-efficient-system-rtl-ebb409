// image_ram: on-chip image storage with a host port and a datapath port.
//
// A single-clock memory of DEPTH words of W bits with two independent ports.
// Port A serves the host, which downloads an image block before processing
// and reads the results back afterwards; port B serves the transform
// sequencer. Both ports read synchronously (data one clock after the
// address) and write on the rising edge when their write enable is high.
// The system uses two instances: an 8-bit input store and a 12-bit output
// store, each holding one 512x32-pixel image block.
//
// Holding the image data in on-chip memory loaded from a host follows the
// design; the port arrangement is this implementation's choice. Writes to the
// same address from both ports in one clock are not allowed (port B wins).
module image_ram #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: host
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  // port B: datapath
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

endmodule
