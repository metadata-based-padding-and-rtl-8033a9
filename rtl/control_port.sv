// control_port: CPU-programmed configuration and general purpose IO
// registers for one port of up to eight pins.
//
// The CPU writes the registers, normally once at start-up, and may rewrite
// them at any time to move a pin to another function. Per pin the block keeps
// the data to drive, the direction, the pull-up, slew rate and drive strength
// enables, and the code of the function the pin performs. From them it drives
// the PORT function towards the mux pad (data, output enable, input enable)
// and the pad controls and function select of each pin.
//
// Register map (8-bit data, bit i belongs to pin i, unused bits read 0):
//   0x0 D    data; reads the pin level for input pins and the data latch
//            for output pins
//   0x1 DD   direction, 1 = output
//   0x2 PE   pull-up enable
//   0x3 SE   slew rate enable
//   0x4 DS   drive strength enable
//   0x8+i    FSEL of pin i, bits [2:0]: function column (padring_pkg::fcol_e)
//   others   read 0, writes ignored
// Bus timing: a write (bus_sel and bus_we high) takes effect at the rising
// clock edge; a read (bus_sel high, bus_we low) returns bus_rdata in the same
// cycle, combinationally. Reset (rst_n low, asynchronous) clears all data
// and enable registers and loads each pin's reset function
// (padring_pkg::reset_sel).
// That the block holds the pin direction, the pad configuration, the port
// data and the function select, and is written by the CPU, follows the
// padring method; the register map, the bus and the reset values are this
// design's choices, modelled on the usual 8-bit microcontroller port.
module control_port
  import padring_pkg::*;
#(
  parameter int unsigned WIDTH     = 8, // pins in this port, at most 8
  parameter int unsigned FIRST_PIN = 0  // padring index of pin 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bus_sel,
  input  logic       bus_we,
  input  logic [3:0] bus_addr,
  input  logic [7:0] bus_wdata,
  output logic [7:0] bus_rdata,
  output fn_drive_t  port_drv [WIDTH],
  output pctl_t      pctl     [WIDTH],
  output fcol_e      sel      [WIDTH],
  input  logic       port_ind [WIDTH]
);

  if (WIDTH < 1 || WIDTH > 8) begin : g_bad_width
    $error("control_port: WIDTH must be 1 to 8");
  end

  logic [WIDTH-1:0] d_q, dd_q, pe_q, se_q, ds_q;
  fcol_e            fsel_q [WIDTH];
  logic             wr;

  assign wr = bus_sel && bus_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q  <= '0;
      dd_q <= '0;
      pe_q <= '0;
      se_q <= '0;
      ds_q <= '0;
      for (int i = 0; i < WIDTH; i++) fsel_q[i] <= reset_sel(FIRST_PIN + i);
    end else if (wr) begin
      unique case (bus_addr)
        4'h0: d_q  <= bus_wdata[WIDTH-1:0];
        4'h1: dd_q <= bus_wdata[WIDTH-1:0];
        4'h2: pe_q <= bus_wdata[WIDTH-1:0];
        4'h3: se_q <= bus_wdata[WIDTH-1:0];
        4'h4: ds_q <= bus_wdata[WIDTH-1:0];
        default: begin
          for (int i = 0; i < WIDTH; i++)
            if (bus_addr == 4'(8 + i)) fsel_q[i] <= fcol_e'(bus_wdata[FSEL_W-1:0]);
        end
      endcase
    end
  end

  // Read-back.
  logic [WIDTH-1:0] pin_lvl;
  always_comb begin
    for (int i = 0; i < WIDTH; i++) pin_lvl[i] = port_ind[i];
    bus_rdata = '0;
    if (bus_sel && !bus_we) begin
      unique case (bus_addr)
        4'h0: bus_rdata[WIDTH-1:0] = (dd_q & d_q) | (~dd_q & pin_lvl);
        4'h1: bus_rdata[WIDTH-1:0] = dd_q;
        4'h2: bus_rdata[WIDTH-1:0] = pe_q;
        4'h3: bus_rdata[WIDTH-1:0] = se_q;
        4'h4: bus_rdata[WIDTH-1:0] = ds_q;
        default: begin
          for (int i = 0; i < WIDTH; i++)
            if (bus_addr == 4'(8 + i)) bus_rdata[FSEL_W-1:0] = fsel_q[i];
        end
      endcase
    end
  end

  // Towards the mux pad.
  for (genvar i = 0; i < WIDTH; i++) begin : g_pin
    assign port_drv[i] = '{dout: d_q[i], obe: dd_q[i], ibe: 1'b1, port_en: 1'b1};
    assign pctl[i]     = '{dse: ds_q[i], pue: pe_q[i], sre: se_q[i]};
    assign sel[i]      = fsel_q[i];
  end

  // A write is only meaningful when the block is selected.
  a_we_needs_sel: assert property (@(posedge clk) bus_we |-> bus_sel)
    else $error("control_port: bus_we without bus_sel");

endmodule
