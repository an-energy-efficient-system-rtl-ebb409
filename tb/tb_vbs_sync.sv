// tb_vbs_sync: self-checking test of the voltage-boosted synchronizer model.
//
// Four instances share one stimulus: CVBS and MVBS, each at 0.7 V and 0.4 V.
// The clock PHI runs 20 ns high, 20 ns low. For each case the latch is
// cleared, S rises a chosen lead time before the falling PHI edge (overlap),
// and the test then checks, per instance, against values computed here from
// the synchronizer table (t_r at a 35-tau target and t_n):
//   - the final Q (set exactly when the overlap exceeds the balance point),
//   - when Q rises: t_n after the edge for a clean decision, plus
//     tau * ln(T_W / |overlap - T_BAL|) for a metastable one, within 2 ps,
//   - that META is high exactly for that resolution time,
//   - that BOOST is low while PHI is high, is high just after the falling
//     edge for CVBS, and for MVBS is high exactly as long as META.
// A clear pulse during a pending metastable decision must cancel it. The
// watchdog ends the run after 100 us.
module tb_vbs_sync;

  localparam int      NI     = 4;
  localparam bit      MON [NI] = '{1'b0, 1'b1, 1'b0, 1'b1};
  localparam int      MV  [NI] = '{700, 700, 400, 400};
  localparam realtime TR35[NI] = '{0.147, 0.477, 1.667, 8.229};   // ns
  localparam realtime TNS [NI] = '{0.085, 0.126, 1.163, 1.882};   // ns
  localparam realtime T_W   = 0.010;
  localparam realtime T_BAL = 0.020;
  localparam realtime HALF  = 20.0;
  localparam realtime TOL   = 0.002;

  logic phi = 1'b0, s = 1'b0, r = 1'b0;
  logic [NI-1:0] q, meta, boost;

  int checks = 0, failures = 0;

  realtime t_q   [NI];
  realtime t_mr  [NI], t_mf[NI];
  realtime t_br  [NI], boost_len[NI];
  int      n_meta[NI];

  for (genvar i = 0; i < NI; i++) begin : g
    vbs_sync #(.MONITORED(MON[i]), .VDD_MV(MV[i])) dut (
      .phi(phi), .s(s), .r(r), .q(q[i]), .meta(meta[i]), .boost(boost[i]));

    always @(posedge q[i])     t_q[i]  = $realtime;
    always @(posedge meta[i]) begin
      t_mr[i]   = $realtime;
      n_meta[i] = n_meta[i] + 1;
    end
    always @(negedge meta[i]) t_mf[i]  = $realtime;
    always @(posedge boost[i]) t_br[i] = $realtime;
    always @(negedge boost[i]) boost_len[i] = boost_len[i] + ($realtime - t_br[i]);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  function automatic realtime absr(input realtime x);
    return (x < 0.0) ? -x : x;
  endfunction

  // One sampling: clear, then PHI high for HALF with S rising `lead` before
  // the falling edge, then PHI low for HALF. With `clr_at` > 0 a short clear
  // pulse is given that long after the falling edge.
  task automatic sample(input realtime lead, input realtime clr_at, input string name);
    realtime tf, dev, t_r, tau;
    bit      exp_q, exp_meta;
    logic [NI-1:0] boost_hi, boost_lo;
    for (int i = 0; i < NI; i++) begin
      t_q[i] = -1.0; t_mr[i] = -1.0; t_mf[i] = -1.0; n_meta[i] = 0; boost_len[i] = 0.0;
    end
    r = 1'b1; #1.0; r = 1'b0; #1.0;
    phi = 1'b1;
    tf  = $realtime + HALF;
    #(HALF / 2.0);
    boost_hi = boost;
    if (lead > 0.0) begin
      #(HALF / 2.0 - lead); s = 1'b1; #(lead);
    end else begin
      #(HALF / 2.0);
    end
    phi = 1'b0;
    #0.001;
    boost_lo = boost;
    if (clr_at > 0.0) begin
      #(clr_at - 0.001); r = 1'b1; #0.005; r = 1'b0;
      #(HALF - clr_at - 0.005);
    end else begin
      #(HALF - 0.001);
    end
    s = 1'b0;
    phi = 1'b1;
    #0.5;
    phi = 1'b0;       // dead sampling edge with no overlap: must change nothing
    #(HALF);
    // evaluate
    dev = lead - T_BAL;
    for (int i = 0; i < NI; i++) begin
      tau      = TR35[i] / 35.0;
      exp_meta = (lead > 0.0) && (absr(dev) < T_W - 1e-6);
      if (!exp_meta)                 t_r = 0.0;
      else if (absr(dev) < 1e-6)     t_r = 70.0 * tau;
      else                           t_r = tau * $ln(T_W / absr(dev));
      exp_q = (lead > 0.0) && (dev > 1e-6) && (clr_at <= 0.0);
      check(q[i] == exp_q, $sformatf("%s inst%0d q=%0b exp %0b", name, i, q[i], exp_q));
      if (exp_q)
        check(absr(t_q[i] - (tf + t_r + TNS[i])) < TOL,
              $sformatf("%s inst%0d q time %0.4f exp %0.4f", name, i, t_q[i] - tf, t_r + TNS[i]));
      if (clr_at <= 0.0) begin
        check(n_meta[i] == (exp_meta ? 1 : 0),
              $sformatf("%s inst%0d meta pulses %0d", name, i, n_meta[i]));
        if (exp_meta)
          check(absr(t_mf[i] - t_mr[i] - t_r) < TOL && absr(t_mr[i] - tf) < TOL,
                $sformatf("%s inst%0d meta %0.4f..%0.4f exp t_r %0.4f", name, i,
                          t_mr[i] - tf, t_mf[i] - tf, t_r));
        if (MON[i])
          check(absr(boost_len[i] - t_r) < TOL,
                $sformatf("%s inst%0d MVBS boost %0.4f exp %0.4f", name, i, boost_len[i], t_r));
        check(boost_hi[i] == 1'b0 && boost_lo[i] == (MON[i] ? (exp_meta && t_r > 0.001) : 1'b1),
              $sformatf("%s inst%0d boost levels %0b/%0b", name, i, boost_hi[i], boost_lo[i]));
      end else begin
        check(meta[i] == 1'b0 && n_meta[i] <= 1,
              $sformatf("%s inst%0d meta after clear", name, i));
      end
    end
  endtask

  initial begin
    #100000.0;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1.0;
    sample(5.0,   0.0, "clean set");
    sample(0.0,   0.0, "no set");
    sample(0.005, 0.0, "short overlap");
    sample(0.031, 0.0, "just clean set");
    sample(0.023, 0.0, "meta +3ps");
    sample(0.018, 0.0, "meta -2ps");
    sample(0.021, 0.0, "meta +1ps");
    sample(0.027, 0.0, "meta +7ps");
    sample(0.020, 0.0, "balanced");
    sample(0.021, 0.05, "clear during resolution");
    // Speed ordering the model inherits from the table: at each supply the
    // continuously boosted latch resolves faster than the monitored one.
    check(TR35[0] < TR35[1] && TR35[2] < TR35[3], "CVBS faster than MVBS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
