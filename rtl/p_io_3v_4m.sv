// p_io_3v_4m: behavioural model of the general purpose 3 V IO pad cell.
//
// This is a simulation model of an analog, process-specific cell, not
// synthesizable logic. It has the cell's full pin list: the device pin PAD,
// the digital input path IPP_IND/IPP_IND_3V, the analog paths
// IPP_INA_3V/IPP_INA_MUX_3V/IPP_OUTA_3V/IPP_OUTA_MUX_3V, the control inputs
// and the supply rails.
//
// Modelled digital behaviour (no clock, zero delay):
//   - PAD is driven with IPP_DO while IPP_OBE is 1. With IPP_ODE (open drain)
//     also 1, only a 0 is driven and a 1 releases the pin.
//   - IPP_IND and IPP_IND_3V return the PAD level while IPP_IBE is 1, else 0.
//   - IPP_INA_3V and IPP_INA_MUX_3V return the PAD level at all times (the
//     analog input path, seen here as a logic level).
// Not modelled, because they are electrical: pull-up/pull-down (IPP_PUE,
// IPP_PUS), drive strength (IPP_DSE), slew rate (IPP_SRE), the input filter
// (IPP_IFE), the analog output path and the supplies. Their pins exist so
// that the padring connects them as the real cell requires; inside the model
// they are unused, which the lint tools report as unused signals.
// The pin names and directions follow the cell's pin table; everything about
// its behaviour beyond the pin descriptions is this model's assumption.
module p_io_3v_4m (
  inout  wire  PAD,
  output logic IPP_IND,
  output logic IPP_IND_3V,
  output logic IPP_INA_3V,
  output logic IPP_INA_MUX_3V,
  inout  wire  IPP_OUTA_3V,
  inout  wire  IPP_OUTA_MUX_3V,
  input  logic IPP_IBE,
  input  logic IPP_IFE,
  input  logic IPP_DO,
  input  logic IPP_OBE,
  input  logic IPP_ODE,
  input  logic IPP_DSE,
  input  logic IPP_PUE,
  input  logic IPP_PUS,
  input  logic IPP_SRE,
  inout  wire  VBUF_3V,
  inout  wire  VDD_3V,
  inout  wire  VSS_3V,
  inout  wire  VDD_LV
);

  logic drive_en;

  // Open drain only pulls low; push-pull drives both levels.
  assign drive_en = IPP_OBE && !(IPP_ODE && IPP_DO);
  assign PAD      = drive_en ? IPP_DO : 1'bz;

  assign IPP_IND        = IPP_IBE & PAD;
  assign IPP_IND_3V     = IPP_IBE & PAD;
  assign IPP_INA_3V     = PAD;
  assign IPP_INA_MUX_3V = PAD;

endmodule
