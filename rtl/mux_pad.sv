// mux_pad: function multiplexer between the peripherals, the control ports
// and the pad cells of the padring.
//
// Every pin has up to NFUNC functions (columns PORT, MOD1..MOD6, SCAN of
// padring_pkg::FMAP). For each pin the block holds three multiplexers:
//   1. pad controls: the control inputs of the pad cell (buffer enables,
//      open drain, drive strength, pull-up, slew rate, filter) are taken
//      from the template of the active function's kind;
//   2. pad output: the data the active function sends to the pin;
//   3. to peripheral: the pad's input level goes to the active function's
//      input; every other function of the pin gets its off value.
//
// The active column is the pin's select code from the control port, with one
// exception: a digital peripheral that is selected but does not claim the
// pin (its port_en low) leaves the pin to its PORT function.
//
// Templates per kind (d = drive of the active function, c = pin's pad
// control registers):
//   PORT, DIG: ibe=d.ibe ife=1 dout=d.dout obe=d.obe ode=0
//              dse=c.dse pue=c.pue pus=1 sre=c.sre
//   ANA:       every control 0 except pus=1 (both buffers off)
//   NONE:      every control 0 (pad unused)
// The PORT and DIG templates follow the function tables for the PORT and
// TPM channel functions; the ANA and NONE templates, the port_en fallback
// and the meaning of the off value are this design's choices.
//
// Interface: fn_drv[p][c] is what function c drives towards pin p (column
// PORT is the control port), fn_ind[p][c] is what function c receives from
// pin p. Purely combinational, no clock.
module mux_pad
  import padring_pkg::*;
(
  input  fcol_e     sel      [NPAD],
  input  fn_drive_t fn_drv   [NPAD][NFUNC],
  input  pctl_t     pctl     [NPAD],
  input  logic      pad_ind  [NPAD],
  output pad_ctrl_t pad_ctrl [NPAD],
  output logic      fn_ind   [NPAD][NFUNC]
);

  for (genvar p = 0; p < NPAD; p++) begin : g_pin
    fcol_e     col;
    fkind_e    kind;
    fn_drive_t d;

    // Active column: the selected one, unless a digital peripheral does not
    // claim the pin.
    always_comb begin
      col = sel[p];
      if (FMAP[p][sel[p]] == FK_DIG && !fn_drv[p][sel[p]].port_en)
        col = COL_PORT;
      kind = FMAP[p][col];
      d    = fn_drv[p][col];
    end

    // Pad control and pad output multiplexer.
    always_comb begin
      pad_ctrl[p] = '0;
      unique case (kind)
        FK_PORT, FK_DIG: begin
          pad_ctrl[p].ibe  = d.ibe;
          pad_ctrl[p].ife  = 1'b1;
          pad_ctrl[p].dout = d.dout;
          pad_ctrl[p].obe  = d.obe;
          pad_ctrl[p].ode  = 1'b0;
          pad_ctrl[p].dse  = pctl[p].dse;
          pad_ctrl[p].pue  = pctl[p].pue;
          pad_ctrl[p].pus  = 1'b1;
          pad_ctrl[p].sre  = pctl[p].sre;
        end
        FK_ANA:  pad_ctrl[p].pus = 1'b1;
        FK_NONE: ;
      endcase
    end

    // Pad input to the active function; off value to all the others.
    for (genvar c = 0; c < NFUNC; c++) begin : g_col
      assign fn_ind[p][c] = (col == fcol_e'(c) && (kind == FK_PORT || kind == FK_DIG))
                            ? pad_ind[p] : offval(p, c);
    end
  end

endmodule
