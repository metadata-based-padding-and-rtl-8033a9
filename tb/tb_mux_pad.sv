// tb_mux_pad: self-checking test of the function multiplexer.
//
// The expected results come from a separate transcription of the pin
// function table kept in this file (one string per pin, one character per
// column PORT, MOD1..MOD6, SCAN: P = port, D = digital peripheral,
// A = analog, - = empty) and from the control templates per function kind.
// Random select codes, peripheral drives, pad controls and pad inputs are
// applied; every pad control bit and every function input is compared.
// Directed cases cover the TPM channel on PTA0, the fallback to PORT when a
// peripheral does not claim its pin, analog AD selection and the RESET and
// BKGD off values.
module tb_mux_pad;
  import padring_pkg::*;

  fcol_e     sel      [NPAD];
  fn_drive_t fn_drv   [NPAD][NFUNC];
  pctl_t     pctl     [NPAD];
  logic      pad_ind  [NPAD];
  pad_ctrl_t pad_ctrl [NPAD];
  logic      fn_ind   [NPAD][NFUNC];
  int        checks = 0, failures = 0;
  int        n_fallback = 0, n_dig = 0, n_ana = 0, n_none = 0, n_port = 0;

  //                      PORT MOD1..MOD6 SCAN
  string kinds [NPAD] = '{
    "PDDDA-DD",  // PTA0
    "PDD-A-DD",  // PTA1
    "PD--ADDD",  // PTA2
    "PD--AD-D",  // PTA3
    "P---D---",  // RESET_B
    "---DD--D",  // BKGD
    "------D-",  // ULVTST
    "PDD-A-DD",  // PTB0
    "PDD-A--D",  // PTB1
    "PD--AD-D",  // PTB2
    "PD--AD-D",  // PTB3
    "PD---D-D",  // PTB4
    "PD---D-D",  // PTB5
    "P-A----D",  // PTB6
    "P-A----D"   // PTB7
  };

  mux_pad dut (.sel, .fn_drv, .pctl, .pad_ind, .pad_ctrl, .fn_ind);

  task automatic check(string what, int p, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL pin %0d %s: got %0h expected %0h", p, what, got, exp);
    end
  endtask

  function automatic logic off_exp(int p, int c);
    if (p == 4 && c == 4) return 1'b0;  // RESET on RESET_B
    if (p == 5 && c == 3) return 1'b0;  // BKGD on BKGD
    if ((p == 0 || p == 1) && c == 2) return 1'b0;   // TPM1-CH[0], TPM2-CH[0]
    if ((p == 11 || p == 12) && c == 1) return 1'b0; // TPM2-CH[1], TPM1-CH[1]
    return 1'b1;
  endfunction

  // Compare all outputs with the reference.
  task automatic check_all();
    for (int p = 0; p < NPAD; p++) begin
      int        c;
      byte       k;
      pad_ctrl_t e;
      c = int'(sel[p]);
      k = kinds[p][c];
      e = '0;
      if (k == "D" && !fn_drv[p][c].port_en) begin
        c = 0; k = kinds[p][0]; n_fallback++;
      end
      case (k)
        "P", "D": begin
          e = '{ibe: fn_drv[p][c].ibe, ife: 1'b1, dout: fn_drv[p][c].dout,
                obe: fn_drv[p][c].obe, ode: 1'b0, dse: pctl[p].dse,
                pue: pctl[p].pue, pus: 1'b1, sre: pctl[p].sre};
          if (k == "P") n_port++; else n_dig++;
        end
        "A": begin e.pus = 1'b1; n_ana++; end
        default: n_none++;
      endcase
      check("pad_ctrl", p, 32'(pad_ctrl[p]), 32'(e));
      for (int f = 0; f < NFUNC; f++)
        check($sformatf("fn_ind[%0d]", f), p, 32'(fn_ind[p][f]),
              (f == c && (k == "P" || k == "D")) ? 32'(pad_ind[p]) : 32'(off_exp(p, f)));
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed: PTA0 as TPM1-CH[0] (MOD2), claimed by the timer.
    for (int p = 0; p < NPAD; p++) begin
      sel[p] = COL_PORT; pctl[p] = '0; pad_ind[p] = 1'b0;
      for (int f = 0; f < NFUNC; f++) fn_drv[p][f] = '0;
    end
    sel[0] = COL_MOD2;
    fn_drv[0][2] = '{dout: 1'b1, obe: 1'b1, ibe: 1'b0, port_en: 1'b1};
    fn_drv[0][0] = '{dout: 1'b0, obe: 1'b0, ibe: 1'b1, port_en: 1'b1};
    pctl[0] = '{dse: 1'b1, pue: 1'b0, sre: 1'b1};
    #1;
    check("TPM dout", 0, 32'(pad_ctrl[0].dout), 1);
    check("TPM obe", 0, 32'(pad_ctrl[0].obe), 1);
    check("TPM dse", 0, 32'(pad_ctrl[0].dse), 1);
    check("TPM pus", 0, 32'(pad_ctrl[0].pus), 1);
    // The timer releases the pin: PORT takes over.
    fn_drv[0][2].port_en = 1'b0; pad_ind[0] = 1'b1; #1;
    check("fallback obe", 0, 32'(pad_ctrl[0].obe), 0);
    check("fallback ibe", 0, 32'(pad_ctrl[0].ibe), 1);
    check("fallback port input", 0, 32'(fn_ind[0][0]), 1);
    check("fallback TPM input off", 0, 32'(fn_ind[0][2]), 0);
    // AD[0] on PTA0: buffers off.
    sel[0] = COL_MOD4; #1;
    check("AD obe", 0, 32'(pad_ctrl[0].obe), 0);
    check("AD ibe", 0, 32'(pad_ctrl[0].ibe), 0);
    // RESET and BKGD off values when their pins do something else.
    sel[4] = COL_PORT; sel[5] = COL_SCAN; #1;
    check("RESET offval", 4, 32'(fn_ind[4][4]), 0);
    check("BKGD offval", 5, 32'(fn_ind[5][3]), 0);
    pad_ind[4] = 1'b1; sel[4] = COL_MOD4; fn_drv[4][4].port_en = 1'b1; #1;
    check("RESET routed", 4, 32'(fn_ind[4][4]), 1);
    check_all();
    // Random sweep.
    for (int n = 0; n < 2000; n++) begin
      for (int p = 0; p < NPAD; p++) begin
        sel[p]     = fcol_e'($urandom_range(NFUNC - 1));
        pctl[p]    = pctl_t'($urandom);
        pad_ind[p] = 1'($urandom);
        for (int f = 0; f < NFUNC; f++) fn_drv[p][f] = fn_drive_t'($urandom);
      end
      #1;
      check_all();
    end
    if (n_fallback == 0 || n_dig == 0 || n_ana == 0 || n_none == 0 || n_port == 0) begin
      failures++;
      $display("FAIL a function kind was never exercised");
    end
    $display("exercised: port %0d digital %0d analog %0d none %0d fallback %0d",
             n_port, n_dig, n_ana, n_none, n_fallback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
