// padring_pkg: types and pin tables shared by the padring blocks.
//
// The padring connects 15 multiplexed device pins to their pad cells. Each
// pin can serve up to eight functions, kept in eight columns: PORT, MOD1 to
// MOD6 and SCAN. The table FMAP below records which function a pin offers in
// each column, and what kind of function it is. The kind decides where each
// pad cell control comes from (see mux_pad):
//   FK_PORT  general purpose IO, driven by the control port registers
//   FK_DIG   a digital peripheral or test signal, driven by that peripheral
//   FK_ANA   an analog function: both pad buffers off, the analog path used
//   FK_NONE  the column is empty for this pin: pad buffers off
// The pin list, the column names and the functions per column come from the
// pin assignment table of the reference 8-bit microcontroller. The per-kind
// control templates of PORT and of a digital peripheral (the TPM channel
// template) follow the function tables of the method; the analog template and
// the grouping of the named functions into kinds are this design's choice.
//
// offval gives the value a peripheral input sees while its function is not
// active on the pin: 1 by default, 0 for RESET, BKGD and the timer channels.
package padring_pkg;

  // Number of multiplexed pins and of function columns per pin.
  localparam int unsigned NPAD   = 15;
  localparam int unsigned NFUNC  = 8;
  localparam int unsigned FSEL_W = $clog2(NFUNC);

  // Function columns. The select code of a pin is the column index.
  typedef enum logic [FSEL_W-1:0] {
    COL_PORT = 3'd0,
    COL_MOD1 = 3'd1,
    COL_MOD2 = 3'd2,
    COL_MOD3 = 3'd3,
    COL_MOD4 = 3'd4,
    COL_MOD5 = 3'd5,
    COL_MOD6 = 3'd6,
    COL_SCAN = 3'd7
  } fcol_e;

  typedef enum logic [1:0] {
    FK_NONE = 2'd0,
    FK_PORT = 2'd1,
    FK_DIG  = 2'd2,
    FK_ANA  = 2'd3
  } fkind_e;

  // Pin indices: 0..3 PTA0..PTA3, 4 RESET_B, 5 BKGD, 6 ULVTST,
  // 7..14 PTB0..PTB7. Port A holds pins 0..6, port B pins 7..14.
  localparam int unsigned P_RESETB = 4;
  localparam int unsigned P_BKGD   = 5;

  localparam int unsigned PORTA_W  = 7;
  localparam int unsigned PORTB_W  = 8;
  localparam int unsigned PORTB_LO = PORTA_W;

  // Control inputs of the IO pad cell (p_io_3v_4m).
  typedef struct packed {
    logic ibe;  // input buffer enable
    logic ife;  // input filter enable
    logic dout; // data out
    logic obe;  // output buffer enable
    logic ode;  // open drain enable
    logic dse;  // drive strength enable
    logic pue;  // pull-up enable
    logic pus;  // pull-up polarity select
    logic sre;  // slew rate enable
  } pad_ctrl_t;

  // What a function (peripheral or port) drives towards its pin.
  typedef struct packed {
    logic dout;    // data to the pin
    logic obe;     // output buffer enable
    logic ibe;     // input buffer enable
    logic port_en; // the peripheral claims the pin (digital functions)
  } fn_drive_t;

  // Electrical pad controls held by the control port for every pin.
  typedef struct packed {
    logic dse;
    logic pue;
    logic sre;
  } pctl_t;

  // Rows: pins in index order. Columns: PORT, MOD1 .. MOD6, SCAN, so the
  // array index equals the fcol_e code.

  localparam fkind_e FMAP [NPAD][NFUNC] = '{
    //          PORT     MOD1     MOD2     MOD3     MOD4     MOD5     MOD6     SCAN
    /* PTA0   */ '{FK_PORT, FK_DIG,  FK_DIG,  FK_DIG,  FK_ANA,  FK_NONE, FK_DIG,  FK_DIG },
    /* PTA1   */ '{FK_PORT, FK_DIG,  FK_DIG,  FK_NONE, FK_ANA,  FK_NONE, FK_DIG,  FK_DIG },
    /* PTA2   */ '{FK_PORT, FK_DIG,  FK_NONE, FK_NONE, FK_ANA,  FK_DIG,  FK_DIG,  FK_DIG },
    /* PTA3   */ '{FK_PORT, FK_DIG,  FK_NONE, FK_NONE, FK_ANA,  FK_DIG,  FK_NONE, FK_DIG },
    /* RESETB */ '{FK_PORT, FK_NONE, FK_NONE, FK_NONE, FK_DIG,  FK_NONE, FK_NONE, FK_NONE},
    /* BKGD   */ '{FK_NONE, FK_NONE, FK_NONE, FK_DIG,  FK_DIG,  FK_NONE, FK_NONE, FK_DIG },
    /* ULVTST */ '{FK_NONE, FK_NONE, FK_NONE, FK_NONE, FK_NONE, FK_NONE, FK_DIG,  FK_NONE},
    /* PTB0   */ '{FK_PORT, FK_DIG,  FK_DIG,  FK_NONE, FK_ANA,  FK_NONE, FK_DIG,  FK_DIG },
    /* PTB1   */ '{FK_PORT, FK_DIG,  FK_DIG,  FK_NONE, FK_ANA,  FK_NONE, FK_NONE, FK_DIG },
    /* PTB2   */ '{FK_PORT, FK_DIG,  FK_NONE, FK_NONE, FK_ANA,  FK_DIG,  FK_NONE, FK_DIG },
    /* PTB3   */ '{FK_PORT, FK_DIG,  FK_NONE, FK_NONE, FK_ANA,  FK_DIG,  FK_NONE, FK_DIG },
    /* PTB4   */ '{FK_PORT, FK_DIG,  FK_NONE, FK_NONE, FK_NONE, FK_DIG,  FK_NONE, FK_DIG },
    /* PTB5   */ '{FK_PORT, FK_DIG,  FK_NONE, FK_NONE, FK_NONE, FK_DIG,  FK_NONE, FK_DIG },
    /* PTB6   */ '{FK_PORT, FK_NONE, FK_ANA,  FK_NONE, FK_NONE, FK_NONE, FK_NONE, FK_DIG },
    /* PTB7   */ '{FK_PORT, FK_NONE, FK_ANA,  FK_NONE, FK_NONE, FK_NONE, FK_NONE, FK_DIG }
  };
  // Functions behind the table (column: name):
  //   PTA0  SCAN sog-sdo[0], MOD6 ipg_clk, MOD4 AD[0], MOD3 TPM_CLK,
  //         MOD2 TPM1-CH[0], MOD1 KBI1[0]
  //   PTA1  SCAN sog-sdo[1], MOD6 ics_ir_clk, MOD4 AD[1], MOD2 TPM2-CH[0],
  //         MOD1 KBI1[1]
  //   PTA2  SCAN sog-sdo[2], MOD6 ics_er_clk, MOD5 bist_fail, MOD4 AD[2],
  //         MOD1 KBI1[2]
  //   PTA3  SCAN core-sdo[0], MOD5 bist_done, MOD4 AD[3], MOD1 KBI1[3]
  //   RESET_B  MOD4 RESET
  //   BKGD  SCAN tst_clk2, MOD4 MS, MOD3 BKGD (no PORT function)
  //   ULVTST   MOD6 ULVTST (no PORT function)
  //   PTB0  SCAN sog-sdi[0], MOD6 pmc_lvds, MOD4 AD[4], MOD2 SCI-RX, MOD1 KBI2[0]
  //   PTB1  SCAN sog-sdi[1], MOD4 AD[5], MOD2 SCI-TX, MOD1 KBI2[1]
  //   PTB2  SCAN sog-sdi[2], MOD5 TM[0], MOD4 AD[6], MOD1 KBI2[2]
  //   PTB3  SCAN core-sdi[0], MOD5 TM[1], MOD4 AD[7], MOD1 KBI2[3]
  //   PTB4  SCAN sog-sdo[3], MOD5 bist_invoke, MOD1 TPM2-CH[1]
  //   PTB5  SCAN sog_se, MOD5 bist_hold, MOD1 TPM1-CH[1]
  //   PTB6  SCAN sog-sdi[3], MOD2 XTAL
  //   PTB7  SCAN tst_clk1, MOD2 EXTAL

  // Value seen by a peripheral input while its function is not active:
  // 0 for RESET and BKGD (project off values), 0 for the timer channels
  // (their function template sets the off value to 0), 1 otherwise.
  function automatic logic offval(int unsigned pin, int unsigned col);
    if (pin == P_RESETB && col == int'(COL_MOD4)) return 1'b0; // RESET
    if (pin == P_BKGD   && col == int'(COL_MOD3)) return 1'b0; // BKGD
    if (pin <= 1        && col == int'(COL_MOD2)) return 1'b0; // TPM1-CH[0], TPM2-CH[0]
    if (pin >= 11 && pin <= 12 && col == int'(COL_MOD1)) return 1'b0; // TPM2-CH[1], TPM1-CH[1]
    return 1'b1;                                               // DEFAULT
  endfunction

  // Function selected on each pin by reset: RESET on RESET_B, BKGD on BKGD,
  // PORT everywhere else (ULVTST has no PORT function, so it starts off).
  function automatic fcol_e reset_sel(int unsigned pin);
    if (pin == P_RESETB) return COL_MOD4;
    if (pin == P_BKGD)   return COL_MOD3;
    return COL_PORT;
  endfunction

endpackage
