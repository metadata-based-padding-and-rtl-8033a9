// padring: the multiplexed padding of an 8-bit microcontroller.
//
// Fifteen device pins (PTA0..PTA3, RESET_B, BKGD, ULVTST, PTB0..PTB7) each
// have an IO pad cell. The mux pad block routes, per pin, the controls and
// data of the active function to the pad cell and the pad's input level back
// to that function. Two control ports, written by the CPU, hold for their
// pins the port data, direction, pad configuration and the function select:
//   port A (bus_addr[4] = 0): pins 0..6 = PTA0..PTA3, RESET_B, BKGD, ULVTST
//   port B (bus_addr[4] = 1): pins 7..14 = PTB0..PTB7
// bus_addr[3:0] is the register address inside the port (see control_port).
//
// Interface:
//   pad[p]          device pin p
//   fn_drv[p][c]    what the peripheral of function column c drives to pin p
//                   (column PORT is ignored: the control port drives it)
//   fn_ind[p][c]    what that function receives from pin p (its off value
//                   while not active)
//   pad_ina[p]      analog input path of pin p (AD channels, oscillator)
//   pad_outa[p]     analog output path of pin p, passed through to the cell
// Timing: configuration changes take effect one clock after the CPU write;
// from fn_drv or the pins to the pads and to fn_ind the paths are
// combinational.
//
// The supply rails of the cells (vbuf_3v, vdd_3v, vss_3v, vdd_lv) form the
// pad-to-pad ring and are fed by the power pads, which carry no logic and are
// not part of this RTL; the nets are therefore left without a driver here.
// The structure (pad cells, mux pad, control ports per port) follows the
// padring method; the split of pins into ports A and B, and putting RESET_B,
// BKGD and ULVTST into port A, are this design's choices.
module padring
  import padring_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bus_sel,
  input  logic       bus_we,
  input  logic [4:0] bus_addr,
  input  logic [7:0] bus_wdata,
  output logic [7:0] bus_rdata,
  inout  wire  [NPAD-1:0] pad,
  inout  wire  [NPAD-1:0] pad_outa,
  input  fn_drive_t  fn_drv  [NPAD][NFUNC],
  output logic       fn_ind  [NPAD][NFUNC],
  output logic       pad_ina [NPAD]
);

  // Supply ring shared by all pad cells.
  wire vbuf_3v, vdd_3v, vss_3v, vdd_lv;

  fcol_e     sel      [NPAD];
  pctl_t     pctl     [NPAD];
  fn_drive_t port_drv [NPAD];
  fn_drive_t mux_drv  [NPAD][NFUNC];
  logic      port_ind [NPAD];
  logic      pad_ind  [NPAD];
  pad_ctrl_t pad_ctrl [NPAD];
  logic      mux_ind  [NPAD][NFUNC];

  // ---- control ports ----
  logic [7:0] rdata_a, rdata_b;
  logic       sel_a, sel_b;

  assign sel_a = bus_sel && !bus_addr[4];
  assign sel_b = bus_sel &&  bus_addr[4];

  control_port #(.WIDTH(PORTA_W), .FIRST_PIN(0)) u_port_a (
    .clk       (clk),
    .rst_n     (rst_n),
    .bus_sel   (sel_a),
    .bus_we    (bus_we && sel_a),
    .bus_addr  (bus_addr[3:0]),
    .bus_wdata (bus_wdata),
    .bus_rdata (rdata_a),
    .port_drv  (port_drv[0:PORTA_W-1]),
    .pctl      (pctl[0:PORTA_W-1]),
    .sel       (sel[0:PORTA_W-1]),
    .port_ind  (port_ind[0:PORTA_W-1])
  );

  control_port #(.WIDTH(PORTB_W), .FIRST_PIN(PORTB_LO)) u_port_b (
    .clk       (clk),
    .rst_n     (rst_n),
    .bus_sel   (sel_b),
    .bus_we    (bus_we && sel_b),
    .bus_addr  (bus_addr[3:0]),
    .bus_wdata (bus_wdata),
    .bus_rdata (rdata_b),
    .port_drv  (port_drv[PORTB_LO:NPAD-1]),
    .pctl      (pctl[PORTB_LO:NPAD-1]),
    .sel       (sel[PORTB_LO:NPAD-1]),
    .port_ind  (port_ind[PORTB_LO:NPAD-1])
  );

  assign bus_rdata = rdata_a | rdata_b;

  // ---- mux pad ----
  for (genvar p = 0; p < NPAD; p++) begin : g_route
    for (genvar c = 0; c < NFUNC; c++) begin : g_col
      if (c == int'(COL_PORT)) begin : g_port
        assign mux_drv[p][c] = port_drv[p];
        assign port_ind[p]   = mux_ind[p][c];
      end else begin : g_fn
        assign mux_drv[p][c] = fn_drv[p][c];
      end
      assign fn_ind[p][c] = mux_ind[p][c];
    end
  end

  mux_pad u_mux_pad (
    .sel      (sel),
    .fn_drv   (mux_drv),
    .pctl     (pctl),
    .pad_ind  (pad_ind),
    .pad_ctrl (pad_ctrl),
    .fn_ind   (mux_ind)
  );

  // ---- pad cells ----
  for (genvar p = 0; p < NPAD; p++) begin : g_pad
    wire ind_3v_nc, ina_mux_nc, outa_mux_nc;

    p_io_3v_4m u_cell (
      .PAD             (pad[p]),
      .IPP_IND         (pad_ind[p]),
      .IPP_IND_3V      (ind_3v_nc),
      .IPP_INA_3V      (pad_ina[p]),
      .IPP_INA_MUX_3V  (ina_mux_nc),
      .IPP_OUTA_3V     (pad_outa[p]),
      .IPP_OUTA_MUX_3V (outa_mux_nc),
      .IPP_IBE         (pad_ctrl[p].ibe),
      .IPP_IFE         (pad_ctrl[p].ife),
      .IPP_DO          (pad_ctrl[p].dout),
      .IPP_OBE         (pad_ctrl[p].obe),
      .IPP_ODE         (pad_ctrl[p].ode),
      .IPP_DSE         (pad_ctrl[p].dse),
      .IPP_PUE         (pad_ctrl[p].pue),
      .IPP_PUS         (pad_ctrl[p].pus),
      .IPP_SRE         (pad_ctrl[p].sre),
      .VBUF_3V         (vbuf_3v),
      .VDD_3V          (vdd_3v),
      .VSS_3V          (vss_3v),
      .VDD_LV          (vdd_lv)
    );
  end

endmodule
