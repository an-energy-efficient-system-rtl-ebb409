// vbs_sync: behavioural timing model of a voltage-boosted synchronizer
// (simulation only, not synthesizable).
//
// What it stands for. A Jamb latch (two cross-coupled inverters; S together
// with the clock PHI sets it, R clears it) whose inverters are fed from a
// small switched-capacitor charge pump instead of the plain supply. While PHI
// is high the latch is transparent and the pump capacitor precharges; while
// PHI is low the latch holds and the pump lifts the inverters' supply above
// VDD, which shortens the time the latch needs to leave a metastable state.
// Two flavours exist and are selected by MONITORED:
//   MONITORED = 0  CVBS: the pump powers the latch in every holding phase.
//   MONITORED = 1  MVBS: a metastability detector fires the pump only while
//                  the latch is still undecided in the holding phase.
// The transistor circuit cannot be written as logic, so this module models
// only its timing at the pins.
//
// Timing model. The output is referred to the falling PHI edge (the sampling
// edge). The latch's decision depends on how long S and PHI overlapped before
// that edge. An overlap D further than T_W from the balance point T_BAL gives
// a clean decision (set when D > T_BAL) and Q settles t_n after the edge.
// Inside that window the latch is metastable: META is 1 for the resolution
// time t_r = tau * ln(T_W / |D - T_BAL|), then Q settles t_n later, at the
// value on the side of T_BAL where D lies. This is the resolution-time law
// behind the failure probability f_c * t_w * exp(-t_r / tau); at
// |D - T_BAL| = T_W * exp(-N_r) it gives t_r = N_r * tau, so the
// synchronizer delay is t_d = t_n + N_r * tau. A latch balanced to within
// 1 fs is taken to resolve after 2 * NR_SPEC * tau, to 0. While a decision is
// in flight the model ignores further sampling edges. R high clears Q and META at
// once and cancels a pending decision. BOOST is 1 while the pump powers the
// latch: the whole holding phase for CVBS, the undecided part of it for MVBS.
//
// Numbers. tau and t_n are the schematic-simulation results for a 35-tau
// resolution target at supplies of 0.4, 0.5, 0.6 and 0.7 V
// (tau = t_r / 35; VDD_MV picks the nearest row):
//     Vdd   CVBS t_r / t_n (ps)   MVBS t_r / t_n (ps)
//     0.7      147 /   85            477 /  126
//     0.6      218 /  151            961 /  225
//     0.5      423 /  357           2498 /  534
//     0.4     1667 / 1163           8229 / 1882
// For MVBS the averaged tau already contains the detector's delay. The window
// width T_W and the balance point T_BAL are not given by the source design
// and are this model's choice, as is referring every decision to the falling
// edge (the transparent phase is not modelled) and the exact resolution law
// above. Times are in ns (timescale 1ns/1ps); at 1 ps precision the model
// resolves overlaps to 1 ps.
module vbs_sync #(
  parameter bit      MONITORED = 1'b0,   // 0: CVBS, 1: MVBS
  parameter int      VDD_MV    = 700,    // supply, picks the table row
  parameter int      NR_SPEC   = 35,     // N_r the table's t_r was taken at
  parameter realtime T_W       = 0.010,  // metastability window, ns
  parameter realtime T_BAL     = 0.020   // S-PHI overlap that balances the latch, ns
) (
  input  logic phi,    // clock: high = transparent / precharge, low = hold / power
  input  logic s,      // set input (data to be synchronized)
  input  logic r,      // clear, active high, asynchronous
  output logic q,      // latch output
  output logic meta,   // latch undecided after the sampling edge
  output logic boost   // charge pump powering the latch
);

  // Table rows, in ps.
  function automatic realtime tr_ps(input bit mon, input int mv);
    if (mv < 450)      return mon ? 8229.0 : 1667.0;
    else if (mv < 550) return mon ? 2498.0 :  423.0;
    else if (mv < 650) return mon ?  961.0 :  218.0;
    else               return mon ?  477.0 :  147.0;
  endfunction

  function automatic realtime tn_ps(input bit mon, input int mv);
    if (mv < 450)      return mon ? 1882.0 : 1163.0;
    else if (mv < 550) return mon ?  534.0 :  357.0;
    else if (mv < 650) return mon ?  225.0 :  151.0;
    else               return mon ?  126.0 :   85.0;
  endfunction

  localparam realtime TAU = tr_ps(MONITORED, VDD_MV) / NR_SPEC * 1ps;
  localparam realtime TN  = tn_ps(MONITORED, VDD_MV) * 1ps;

  // Overlap of S and PHI during the current transparent phase. The tracker
  // keeps its own copy of the last PHI and S & PHI levels, so the decision
  // below can tell whether the final stretch of overlap has been added yet,
  // whichever of the two processes runs first at the sampling edge.
  logic    drive;
  logic    phi_seen, drive_seen;
  realtime t_on;       // when S & PHI last became true
  realtime ovl;        // overlap closed so far in this transparent phase
  always_comb drive = phi & s;

  always @(phi or drive) begin
    if (phi && !phi_seen)     ovl  = 0.0;
    if (drive && !drive_seen) t_on = $realtime;
    if (!drive && drive_seen) ovl  = ovl + ($realtime - t_on);
    phi_seen   = phi;
    drive_seen = drive;
  end

  // Clear requests are counted so that a decision still in flight can see
  // that it has been cancelled.
  int unsigned n_clr;
  always @(posedge r) n_clr = n_clr + 1;

  logic        q_r, meta_r;
  int unsigned meta_tag;
  assign q     = q_r & ~r;
  assign meta  = meta_r && (meta_tag == n_clr) && !r;
  assign boost = MONITORED ? (meta && !phi) : !phi;

  initial begin
    phi_seen   = 1'b0;
    drive_seen = 1'b0;
    t_on     = 0.0;
    ovl      = 0.0;
    n_clr    = 0;
    q_r      = 1'b0;
    meta_r   = 1'b0;
    meta_tag = 0;
  end

  always begin : decide
    realtime     d, dev, t_r;
    bit          v;
    int unsigned tag;
    @(negedge phi or posedge r);
    if (r) begin
      q_r    = 1'b0;
      meta_r = 1'b0;
    end else if (!q_r) begin
      d   = ovl + (drive_seen ? $realtime - t_on : 0.0);
      dev = d - T_BAL;
      if (dev < 1.0e-6 && dev > -1.0e-6) dev = 0.0;   // within 1 fs: balanced
      v   = dev > 0.0;
      tag = n_clr;
      if (dev >= T_W || dev <= -T_W) begin
        t_r = 0.0;
      end else if (dev == 0.0) begin
        t_r = 2.0 * NR_SPEC * TAU;
      end else begin
        t_r = TAU * $ln(T_W / (dev > 0.0 ? dev : -dev));
      end
      if (t_r > 0.0) begin
        meta_tag = tag;
        meta_r   = 1'b1;
        #(t_r);
        meta_r   = 1'b0;
      end
      #(TN);
      if (tag == n_clr && !r) q_r = v;
    end
  end

endmodule
