// tb_p_io_3v_4m: self-checking test of the IO pad cell model.
//
// An external driver on the pin stands in for the board. The test checks the
// four digital behaviours of the cell: output drive (push-pull), open drain
// (drives only 0), input buffer enable gating of IPP_IND/IPP_IND_3V, and the
// always-on analog input path. Expected values come from the cell's pin
// descriptions, worked out per case below.
module tb_p_io_3v_4m;
  wire  pad, outa, outa_mux, vbuf, vdd, vss, vdd_lv;
  logic ext_oe, ext_val;
  logic ibe, ife, dout, obe, ode, dse, pue, pus, sre;
  logic ind, ind_3v, ina, ina_mux;
  int   checks = 0, failures = 0;

  assign pad = ext_oe ? ext_val : 1'bz;

  p_io_3v_4m dut (
    .PAD(pad), .IPP_IND(ind), .IPP_IND_3V(ind_3v), .IPP_INA_3V(ina),
    .IPP_INA_MUX_3V(ina_mux), .IPP_OUTA_3V(outa), .IPP_OUTA_MUX_3V(outa_mux),
    .IPP_IBE(ibe), .IPP_IFE(ife), .IPP_DO(dout), .IPP_OBE(obe), .IPP_ODE(ode),
    .IPP_DSE(dse), .IPP_PUE(pue), .IPP_PUS(pus), .IPP_SRE(sre),
    .VBUF_3V(vbuf), .VDD_3V(vdd), .VSS_3V(vss), .VDD_LV(vdd_lv)
  );

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {ibe, ife, dout, obe, ode, dse, pue, pus, sre} = '0;
    ext_oe = 0; ext_val = 0;
    // Input path: the board drives, the cell listens.
    for (int i = 0; i < 16; i++) begin
      ext_oe = 1; ext_val = 1'(i); ibe = 1'(i >> 1);
      dse = 1'(i >> 2); sre = 1'(i >> 3); pue = 1'(i >> 1); pus = 1'(i);
      #1;
      check("IND", ind, ext_val & ibe);
      check("IND_3V", ind_3v, ext_val & ibe);
      check("INA", ina, ext_val);
      check("INA_MUX", ina_mux, ext_val);
    end
    // Push-pull output: the board releases the pin.
    ext_oe = 0; ibe = 1; obe = 1; ode = 0;
    for (int v = 0; v < 2; v++) begin
      dout = 1'(v); #1;
      check("PAD push-pull", pad, 1'(v));
      check("IND loop-back", ind, 1'(v));
    end
    // Open drain: 0 is driven, 1 releases the pin to the board.
    ode = 1; dout = 0; #1;
    check("PAD open drain low", pad, 1'b0);
    dout = 1; ext_oe = 1; ext_val = 0; #1;
    check("PAD open drain released, board low", ind, 1'b0);
    ext_val = 1; #1;
    check("PAD open drain released, board high", ind, 1'b1);
    // Output buffer off: the board owns the pin.
    obe = 0; ode = 0; dout = 1; ext_val = 0; #1;
    check("PAD obe off", ind, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
