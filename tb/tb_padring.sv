// tb_padring: end-to-end test of the padring at its full size.
//
// A bus master plays the CPU, a pin driver per pin plays the board, and the
// peripheral drives are set by the test. Directed phases go through each
// mechanism of the padring:
//   gpio_out   port B as outputs, data seen on the pins and read back
//   gpio_in    port A as inputs, board levels read through the data register
//   fn_switch  PTA0 moved from PORT to the TPM channel at run time
//   fallback   the TPM releases PTA0 (port_en low) and PORT takes over
//   analog     PTA1 as AD[1]: digital buffers off, analog path live
//   periph_in  PTB0 as SCI-RX: the board level reaches the SCI input
//   offval     RESET and BKGD inputs held at their off value when moved away
//   pad_cfg    pull-up, slew and drive strength registers reach the cells
// A random phase then programs every register of both ports, sets random
// peripheral drives and board levels, and compares every pin, every
// function input and the data register read-back with a reference model
// built from an independent copy of the pin function table. Each mechanism
// is counted; one that never happened counts as a failure.
module tb_padring;
  import padring_pkg::*;

  logic             clk = 0, rst_n = 0;
  logic             bus_sel = 0, bus_we = 0;
  logic [4:0]       bus_addr = 0;
  logic [7:0]       bus_wdata = 0, bus_rdata;
  wire  [NPAD-1:0]  pad, pad_outa;
  logic [NPAD-1:0]  ext_oe, ext_val;
  fn_drive_t        fn_drv  [NPAD][NFUNC];
  logic             fn_ind  [NPAD][NFUNC];
  logic             pad_ina [NPAD];
  int               checks = 0, failures = 0;

  typedef enum int {M_GPIO_OUT, M_GPIO_IN, M_FN_SWITCH, M_FALLBACK, M_ANALOG,
                    M_PERIPH_IN, M_OFFVAL, M_PAD_CFG, M_COUNT} mech_e;
  int mech [M_COUNT];

  //                      PORT MOD1..MOD6 SCAN
  string kinds [NPAD] = '{
    "PDDDA-DD", "PDD-A-DD", "PD--ADDD", "PD--AD-D", "P---D---", "---DD--D",
    "------D-", "PDD-A-DD", "PDD-A--D", "PD--AD-D", "PD--AD-D", "PD---D-D",
    "PD---D-D", "P-A----D", "P-A----D"
  };

  for (genvar p = 0; p < NPAD; p++) begin : g_board
    assign pad[p] = ext_oe[p] ? ext_val[p] : 1'bz;
  end

  padring dut (.clk, .rst_n, .bus_sel, .bus_we, .bus_addr, .bus_wdata,
               .bus_rdata, .pad, .pad_outa, .fn_drv, .fn_ind, .pad_ina);

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic write(logic [4:0] a, logic [7:0] v);
    @(negedge clk);
    bus_sel = 1; bus_we = 1; bus_addr = a; bus_wdata = v;
    @(negedge clk);
    bus_sel = 0; bus_we = 0;
  endtask

  task automatic read(logic [4:0] a, output logic [7:0] v);
    @(negedge clk);
    bus_sel = 1; bus_we = 0; bus_addr = a;
    #1 v = bus_rdata;
    @(negedge clk);
    bus_sel = 0;
  endtask

  // Register addresses: port A at 0x00, port B at 0x10.
  function automatic logic [4:0] fsel_addr(int p);
    return (p < 7) ? 5'(8 + p) : 5'(16 + 8 + p - 7);
  endfunction

  // ---- reference model ----
  logic [7:0] m_d [2], m_dd [2], m_pe [2], m_se [2], m_ds [2];
  logic [2:0] m_fs [NPAD];

  function automatic int port_of(int p); return (p < 7) ? 0 : 1; endfunction
  function automatic int bit_of(int p);  return (p < 7) ? p : p - 7; endfunction

  function automatic logic off_exp(int p, int c);
    if (p == 4 && c == 4) return 1'b0;
    if (p == 5 && c == 3) return 1'b0;
    if ((p == 0 || p == 1) && c == 2) return 1'b0;   // TPM1-CH[0], TPM2-CH[0]
    if ((p == 11 || p == 12) && c == 1) return 1'b0; // TPM2-CH[1], TPM1-CH[1]
    return 1'b1;
  endfunction

  // Active column and kind of pin p.
  task automatic active(int p, output int c, output byte k);
    c = int'(m_fs[p]);
    k = kinds[p][c];
    if (k == "D" && !fn_drv[p][c].port_en) begin
      c = 0; k = kinds[p][0];
    end
  endtask

  // Compare every pin, function input and cell control with the model.
  task automatic check_model();
    for (int p = 0; p < NPAD; p++) begin
      int   c, pt, b;
      byte  k;
      logic obe, dout, ibe, lvl;
      active(p, c, k);
      pt = port_of(p); b = bit_of(p);
      obe = 0; dout = 0; ibe = 0;
      if (k == "P") begin
        obe = m_dd[pt][b]; dout = m_d[pt][b]; ibe = 1;
      end else if (k == "D") begin
        obe = fn_drv[p][c].obe; dout = fn_drv[p][c].dout; ibe = fn_drv[p][c].ibe;
      end
      // Pin level: the cell drives when its output buffer is on (the model
      // keeps the board off the pin in that case), else the board drives.
      lvl = obe ? dout : ext_val[p];
      if (!obe) check($sformatf("pin %0d level", p), 32'(pad[p]), 32'(lvl));
      else      check($sformatf("pin %0d driven", p), 32'(pad[p]), 32'(dout));
      check($sformatf("pin %0d analog", p), 32'(pad_ina[p]), 32'(lvl));
      for (int f = 0; f < NFUNC; f++)
        check($sformatf("pin %0d fn_ind %0d", p, f), 32'(fn_ind[p][f]),
              (f == c && (k == "P" || k == "D")) ? 32'(ibe & lvl) : 32'(off_exp(p, f)));
    end
  endtask

  // Board drives only the pins whose cell does not drive.
  task automatic board_follow();
    for (int p = 0; p < NPAD; p++) begin
      int c; byte k; logic obe;
      active(p, c, k);
      obe = (k == "P") ? m_dd[port_of(p)][bit_of(p)] :
            (k == "D") ? fn_drv[p][c].obe : 1'b0;
      ext_oe[p] = !obe;
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    ext_oe = '1; ext_val = '0;
    for (int p = 0; p < NPAD; p++)
      for (int f = 0; f < NFUNC; f++) fn_drv[p][f] = '0;
    for (int k = 0; k < 2; k++) begin
      m_d[k] = 0; m_dd[k] = 0; m_pe[k] = 0; m_se[k] = 0; m_ds[k] = 0;
    end
    for (int p = 0; p < NPAD; p++) m_fs[p] = 3'd0;
    m_fs[4] = 3'd4; m_fs[5] = 3'd3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // After reset RESET_B carries RESET and BKGD carries BKGD. Both
    // peripherals claim their pins as inputs.
    fn_drv[4][4] = '{dout: 0, obe: 0, ibe: 1, port_en: 1};
    fn_drv[5][3] = '{dout: 0, obe: 0, ibe: 1, port_en: 1};
    ext_val[4] = 1; ext_val[5] = 1; #1;
    check("RESET from pin", 32'(fn_ind[4][4]), 1);
    check("BKGD from pin", 32'(fn_ind[5][3]), 1);
    check_model();

    // gpio_out: port B all outputs.
    ext_oe[14:7] = '0;
    write(5'h11, 8'hFF); m_dd[1] = 8'hFF;
    write(5'h10, 8'h5A); m_d[1] = 8'h5A;
    check("PTB pins", 32'(pad[14:7]), 32'h5A);
    read(5'h10, v);
    check("PTB read-back", 32'(v), 32'h5A);
    check_model();
    if (pad[14:7] == 8'h5A) mech[M_GPIO_OUT]++;

    // gpio_in: port A inputs, board drives PTA0..PTA3.
    ext_val[3:0] = 4'b1001; #1;
    read(5'h00, v);
    check("PTA read", 32'(v[3:0]), 32'b1001);
    if (v[3:0] == 4'b1001) mech[M_GPIO_IN]++;
    check_model();

    // fn_switch: PTA0 to TPM1-CH[0] (MOD2), timer drives the pin.
    fn_drv[0][2] = '{dout: 1, obe: 1, ibe: 0, port_en: 1};
    write(fsel_addr(0), 8'd2); m_fs[0] = 3'd2;
    ext_oe[0] = 0; #1;
    check("PTA0 from TPM", 32'(pad[0]), 1);
    fn_drv[0][2].dout = 0; #1;
    check("PTA0 from TPM low", 32'(pad[0]), 0);
    if (pad[0] == 1'b0) mech[M_FN_SWITCH]++;
    check_model();

    // fallback: the timer releases the pin, PORT (an input) takes it back.
    fn_drv[0][2].port_en = 0; ext_oe[0] = 1; ext_val[0] = 1; #1;
    check("PTA0 port input again", 32'(fn_ind[0][0]), 1);
    check("TPM input at off value", 32'(fn_ind[0][2]), 0);
    if (fn_ind[0][0]) mech[M_FALLBACK]++;
    check_model();

    // analog: PTA1 as AD[1] (MOD4).
    write(fsel_addr(1), 8'd4); m_fs[1] = 3'd4;
    ext_val[1] = 1; #1;
    check("AD path", 32'(pad_ina[1]), 1);
    check("AD no digital input", 32'(dut.g_pad[1].u_cell.IPP_IBE), 0);
    check("AD no output", 32'(dut.g_pad[1].u_cell.IPP_OBE), 0);
    if (pad_ina[1] && !dut.g_pad[1].u_cell.IPP_IBE) mech[M_ANALOG]++;
    check_model();

    // periph_in: PTB0 as SCI-RX (MOD2); port B bit 0 back to input first.
    write(5'h11, 8'hFE); m_dd[1] = 8'hFE;
    fn_drv[7][2] = '{dout: 0, obe: 0, ibe: 1, port_en: 1};
    write(fsel_addr(7), 8'd2); m_fs[7] = 3'd2;
    ext_oe[7] = 1; ext_val[7] = 0; #1;
    check("SCI-RX low", 32'(fn_ind[7][2]), 0);
    ext_val[7] = 1; #1;
    check("SCI-RX high", 32'(fn_ind[7][2]), 1);
    ext_val[7] = 0; #1;
    check("SCI-RX low again", 32'(fn_ind[7][2]), 0);
    if (!fn_ind[7][2]) mech[M_PERIPH_IN]++;
    check_model();

    // offval: RESET_B to PORT, BKGD to SCAN (tst_clk2).
    ext_val[4] = 1; ext_val[5] = 1;
    write(fsel_addr(4), 8'd0); m_fs[4] = 3'd0;
    write(fsel_addr(5), 8'd7); m_fs[5] = 3'd7;
    check("RESET off value", 32'(fn_ind[4][4]), 0);
    check("BKGD off value", 32'(fn_ind[5][3]), 0);
    check("RESET_B as port input", 32'(fn_ind[4][0]), 1);
    if (!fn_ind[4][4] && !fn_ind[5][3]) mech[M_OFFVAL]++;
    check_model();

    // pad_cfg: pull-up, slew rate and drive strength of port A pin 3.
    write(5'h02, 8'h08); m_pe[0] = 8'h08;
    write(5'h03, 8'h08); m_se[0] = 8'h08;
    write(5'h04, 8'h08); m_ds[0] = 8'h08;
    check("PTA3 pue", 32'(dut.g_pad[3].u_cell.IPP_PUE), 1);
    check("PTA3 sre", 32'(dut.g_pad[3].u_cell.IPP_SRE), 1);
    check("PTA3 dse", 32'(dut.g_pad[3].u_cell.IPP_DSE), 1);
    check("PTA2 pue", 32'(dut.g_pad[2].u_cell.IPP_PUE), 0);
    if (dut.g_pad[3].u_cell.IPP_PUE) mech[M_PAD_CFG]++;

    // Random phase.
    for (int n = 0; n < 300; n++) begin
      int         p, a;
      logic [7:0] val;
      p = $urandom_range(NPAD - 1);
      case ($urandom_range(3))
        0: begin
          val = 8'($urandom_range(NFUNC - 1));
          write(fsel_addr(p), val); m_fs[p] = val[2:0];
          if (kinds[p][m_fs[p]] == "D") mech[M_FN_SWITCH]++;
          if (kinds[p][m_fs[p]] == "A") mech[M_ANALOG]++;
        end
        1: begin
          a = $urandom_range(4); val = 8'($urandom);
          if (port_of(p) == 0) val[7] = 0;
          write(5'(port_of(p) * 16 + a), val);
          case (a)
            0: m_d[port_of(p)]  = val;
            1: m_dd[port_of(p)] = val;
            2: m_pe[port_of(p)] = val;
            3: m_se[port_of(p)] = val;
            default: m_ds[port_of(p)] = val;
          endcase
          if (a == 1) mech[M_GPIO_OUT]++;
        end
        default: begin
          for (int q = 0; q < NPAD; q++)
            for (int f = 1; f < NFUNC; f++) fn_drv[q][f] = fn_drive_t'($urandom);
        end
      endcase
      ext_val = NPAD'($urandom);
      board_follow();
      #1;
      check_model();
      for (int q = 0; q < NPAD; q++) begin
        int c; byte k;
        active(q, c, k);
        if (kinds[q][int'(m_fs[q])] == "D" && k != "D") mech[M_FALLBACK]++;
        if (c != 4 && q == 4) mech[M_OFFVAL]++;
        if (k == "D" && fn_drv[q][c].ibe) mech[M_PERIPH_IN]++;
        if (k == "P" && !m_dd[port_of(q)][bit_of(q)]) mech[M_GPIO_IN]++;
      end
      // Data register read-back of the touched port.
      read(5'(port_of(p) * 16), val);
      begin
        logic [7:0] e;
        int base, w;
        base = port_of(p) == 0 ? 0 : 7;
        w = port_of(p) == 0 ? 7 : 8;
        e = '0;
        for (int i = 0; i < w; i++)
          e[i] = m_dd[port_of(p)][i] ? m_d[port_of(p)][i] : fn_ind[base + i][0];
        check("data read-back", 32'(val), 32'(e));
      end
      if (m_pe[port_of(p)] != 0) mech[M_PAD_CFG]++;
    end

    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %s: %0d", mech_e'(m), mech[m]);
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_e'(m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
