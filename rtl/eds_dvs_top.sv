// eds_dvs_top: FPGA side of the closed-loop voltage-scaling image transform.
//
// The system runs an 8x8 2-D DCT over an image block held in on-chip memory
// and lets the FPGA core supply voltage sink until the timing slack of a few
// deliberately chosen, frequently switching, non-critical adder bits runs
// out. Those bits are watched by error-detection sequentials (EDS) that sample
// on the falling clock edge, so they flag a slack deficit while the rising-edge
// registers - including those on the true critical path - still have margin.
// The DVS circuit raises the supply level when an error is seen within a short
// window and lowers it after a longer error-free window; its level is decoded
// into the tri-state control pins of an external linear regulator, which
// feeds the core supply back.
//
// Blocks: input store (8-bit pixels) and output store (12-bit coefficients),
// each one 512x32 block, loaded and read back over a host port; the tile
// sequencer that streams the block through the DCT again and again; the DCT
// with its eight EDS cells and OR tree; the DVS circuit with its mode
// switches. The regulator, bench supply and host link are outside the chip
// and appear here only as ports.
//
// Beside the loop, and not connected to it, sit the two voltage-boosted
// synchronizer flavours (index 0: boosted in every holding phase, index 1:
// boosted only while metastable). They are transistor circuits meant to
// harden the sampling flip-flops of error-detection sequentials against
// metastability; the chip itself does not use them, so they are brought out
// on their own pins (`sync_*`) as behavioural timing models, for simulation
// only.
//
// Interface: host port writes pixels (`in_we`, `in_addr`, `in_wdata`) and
// reads coefficients (`out_addr` -> `out_rdata`, one clock later). `run`
// starts continuous processing. `sw[4]` selects automatic DVS (1) or the
// manual level `sw[3:0]` (0). `vctrl_oe`/`vctrl_val` drive the regulator
// pins (Vo2, Vo1, Vo0, MARGSEL, MARGTOL from bit 4); a pin with oe = 0 floats.
// Status: `final_error`, per-cell `eds_errors`, the controller level `vlevel`,
// `step_up`/`step_down` pulses and `pass_done` at the end of each block pass.
// Synchronizers: clock `sync_phi` (high = transparent), set `sync_s`, clear
// `sync_r`; outputs `sync_q`, `sync_meta` (undecided) and `sync_boost`
// (charge pump powering the latch), timed as described in vbs_sync.
module eds_dvs_top
  import eds_dvs_pkg::*;
#(
  parameter int unsigned IMG_W       = 512,
  parameter int unsigned IMG_H       = 32,
  parameter int unsigned PHI_UP      = 4096,
  parameter int unsigned PHI_DN      = 12288,
  parameter int unsigned VLEVEL_INIT = 0,
  parameter int          VBS_VDD_MV  = 700,
  parameter int unsigned AW          = $clog2(IMG_W * IMG_H)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                run,
  input  logic [4:0]          sw,
  // host port
  input  logic                in_we,
  input  logic [AW-1:0]       in_addr,
  input  logic [7:0]          in_wdata,
  input  logic [AW-1:0]       out_addr,
  output logic [11:0]         out_rdata,
  // regulator control pins
  output logic [VCTRL_W-1:0]  vctrl_oe,
  output logic [VCTRL_W-1:0]  vctrl_val,
  // status
  output logic                final_error,
  output logic [7:0]          eds_errors,
  output logic [VLEVEL_W-1:0] vlevel,
  output logic                step_up,
  output logic                step_down,
  output logic                pass_done,
  // voltage-boosted synchronizers: [0] continuous, [1] monitored
  input  logic                sync_phi,
  input  logic                sync_s,
  input  logic                sync_r,
  output logic [1:0]          sync_q,
  output logic [1:0]          sync_meta,
  output logic [1:0]          sync_boost
);

  localparam int unsigned DEPTH = IMG_W * IMG_H;

  // ---- sequencer and stores
  logic [AW-1:0]      seq_in_addr;
  logic [7:0]         pix;
  logic               pix_valid;
  logic signed [11:0] coef;
  logic               coef_valid;
  logic [5:0]         coef_idx;
  logic               out_we;
  logic [AW-1:0]      seq_out_addr;
  logic [7:0]         in_rdata_unused;
  logic [11:0]        out_b_rdata_unused;

  image_ram #(.W(8), .DEPTH(DEPTH)) u_in_ram (
    .clk,
    .a_we(in_we), .a_addr(in_addr), .a_wdata(in_wdata), .a_rdata(in_rdata_unused),
    .b_we(1'b0), .b_addr(seq_in_addr), .b_wdata('0), .b_rdata(pix)
  );

  dct_sequencer #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_seq (
    .clk, .rst_n, .run,
    .in_addr(seq_in_addr), .pix_valid, .coef_valid,
    .out_we, .out_addr(seq_out_addr), .pass_done
  );

  image_ram #(.W(12), .DEPTH(DEPTH)) u_out_ram (
    .clk,
    .a_we(1'b0), .a_addr(out_addr), .a_wdata('0), .a_rdata(out_rdata),
    .b_we(out_we), .b_addr(seq_out_addr), .b_wdata(coef), .b_rdata(out_b_rdata_unused)
  );

  // ---- datapath with EDS
  dct2d_eds u_dct (
    .clk, .rst_n,
    .pix, .pix_valid,
    .coef, .coef_valid, .coef_idx,
    .eds_errors, .final_error
  );

  // ---- DVS
  vctrl_t                vctrl;
  logic [VLEVEL_W-1:0]   level_sel;

  dvs #(.PHI_UP(PHI_UP), .PHI_DN(PHI_DN), .VLEVEL_INIT(VLEVEL_INIT)) u_dvs (
    .clk, .rst_n, .final_error, .sw,
    .vlevel, .level_sel, .vctrl, .step_up, .step_down
  );

  assign vctrl_oe  = vctrl.oe;
  assign vctrl_val = vctrl.val;

  // ---- voltage-boosted synchronizers (behavioural, stand-alone)
  vbs_sync #(.MONITORED(1'b0), .VDD_MV(VBS_VDD_MV)) u_cvbs (
    .phi(sync_phi), .s(sync_s), .r(sync_r),
    .q(sync_q[0]), .meta(sync_meta[0]), .boost(sync_boost[0])
  );

  vbs_sync #(.MONITORED(1'b1), .VDD_MV(VBS_VDD_MV)) u_mvbs (
    .phi(sync_phi), .s(sync_s), .r(sync_r),
    .q(sync_q[1]), .meta(sync_meta[1]), .boost(sync_boost[1])
  );

  logic unused;
  assign unused = ^{in_rdata_unused, out_b_rdata_unused, coef_idx, level_sel};

endmodule
