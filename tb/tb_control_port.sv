// tb_control_port: self-checking test of the port configuration registers.
//
// Two instances are tested, configured as port A (7 pins starting at pin 0,
// which holds RESET_B and BKGD) and port B (8 pins starting at pin 7). The
// test checks the reset values, including the reset function of RESET_B and
// BKGD, then writes random values to every register, reads them back and
// compares the outputs towards the mux pad with a model kept in the
// testbench. The data register must read the pin level on input pins and
// the latch on output pins. A write must show on the outputs one clock after
// it is presented, which is checked cycle by cycle.
module tb_control_port;
  import padring_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       bus_sel, bus_we;
  logic [3:0] bus_addr;
  logic [7:0] bus_wdata;
  logic [7:0] rdata_a, rdata_b;
  fn_drive_t  drv_a [7];
  pctl_t      pctl_a [7];
  fcol_e      sel_a [7];
  logic       ind_a [7];
  fn_drive_t  drv_b [8];
  pctl_t      pctl_b [8];
  fcol_e      sel_b [8];
  logic       ind_b [8];
  int         checks = 0, failures = 0;
  logic       sel_is_b;

  // Reference registers: [0] = port A, [1] = port B.
  logic [7:0] m_d [2], m_dd [2], m_pe [2], m_se [2], m_ds [2];
  logic [2:0] m_fs [2][8];

  always #5 clk = ~clk;

  control_port #(.WIDTH(7), .FIRST_PIN(0)) dut_a (
    .clk, .rst_n, .bus_sel(bus_sel && !sel_is_b), .bus_we(bus_we && !sel_is_b),
    .bus_addr, .bus_wdata, .bus_rdata(rdata_a),
    .port_drv(drv_a), .pctl(pctl_a), .sel(sel_a), .port_ind(ind_a));

  control_port #(.WIDTH(8), .FIRST_PIN(7)) dut_b (
    .clk, .rst_n, .bus_sel(bus_sel && sel_is_b), .bus_we(bus_we && sel_is_b),
    .bus_addr, .bus_wdata, .bus_rdata(rdata_b),
    .port_drv(drv_b), .pctl(pctl_b), .sel(sel_b), .port_ind(ind_b));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Compare every output of both ports with the reference.
  task automatic check_outputs();
    for (int i = 0; i < 7; i++) begin
      check($sformatf("A drv %0d", i), 32'(drv_a[i]),
            32'({m_d[0][i], m_dd[0][i], 1'b1, 1'b1}));
      check($sformatf("A pctl %0d", i), 32'(pctl_a[i]),
            32'({m_ds[0][i], m_pe[0][i], m_se[0][i]}));
      check($sformatf("A sel %0d", i), 32'(sel_a[i]), 32'(m_fs[0][i]));
    end
    for (int i = 0; i < 8; i++) begin
      check($sformatf("B drv %0d", i), 32'(drv_b[i]),
            32'({m_d[1][i], m_dd[1][i], 1'b1, 1'b1}));
      check($sformatf("B pctl %0d", i), 32'(pctl_b[i]),
            32'({m_ds[1][i], m_pe[1][i], m_se[1][i]}));
      check($sformatf("B sel %0d", i), 32'(sel_b[i]), 32'(m_fs[1][i]));
    end
  endtask

  task automatic write(bit b, logic [3:0] a, logic [7:0] v);
    @(negedge clk);
    sel_is_b = b; bus_sel = 1; bus_we = 1; bus_addr = a; bus_wdata = v;
    @(negedge clk);
    bus_sel = 0; bus_we = 0;
  endtask

  task automatic read(bit b, logic [3:0] a, output logic [7:0] v);
    @(negedge clk);
    sel_is_b = b; bus_sel = 1; bus_we = 0; bus_addr = a;
    #1 v = b ? rdata_b : rdata_a;
    @(negedge clk);
    bus_sel = 0;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v, pins, exp;
    int w;
    bus_sel = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0; sel_is_b = 0;
    for (int i = 0; i < 7; i++) ind_a[i] = 0;
    for (int i = 0; i < 8; i++) ind_b[i] = 0;
    for (int k = 0; k < 2; k++) begin
      m_d[k] = 0; m_dd[k] = 0; m_pe[k] = 0; m_se[k] = 0; m_ds[k] = 0;
      for (int i = 0; i < 8; i++) m_fs[k][i] = 3'd0;
    end
    m_fs[0][4] = 3'd4;  // RESET_B starts as RESET (MOD4)
    m_fs[0][5] = 3'd3;  // BKGD starts as BKGD (MOD3)
    repeat (2) @(posedge clk);
    #1 check_outputs();
    rst_n = 1;
    // Write timing: the output changes at the edge that ends the write cycle.
    @(negedge clk);
    sel_is_b = 1; bus_sel = 1; bus_we = 1; bus_addr = 4'h1; bus_wdata = 8'hA5;
    check("DD before edge", 32'(drv_b[0].obe), 0);
    @(posedge clk); #1;
    check("DD after one edge", 32'(drv_b[0].obe), 1);
    check("DD bit 2 after one edge", 32'(drv_b[2].obe), 1);
    bus_sel = 0; bus_we = 0; m_dd[1] = 8'hA5;
    for (int n = 0; n < 400; n++) begin
      bit         b;
      int         a;
      logic [7:0] val;
      b   = 1'($urandom);
      a   = $urandom_range(5);
      val = 8'($urandom);
      w   = b ? 8 : 7;
      if (a == 5) a = 8 + $urandom_range(w - 1);
      write(b, 4'(a), val);
      case (a)
        0: m_d[b]  = val & 8'((1 << w) - 1);
        1: m_dd[b] = val & 8'((1 << w) - 1);
        2: m_pe[b] = val & 8'((1 << w) - 1);
        3: m_se[b] = val & 8'((1 << w) - 1);
        4: m_ds[b] = val & 8'((1 << w) - 1);
        default: m_fs[b][a - 8] = val[2:0];
      endcase
      check_outputs();
      // Read back the written register.
      pins = 8'($urandom) & 8'((1 << w) - 1);
      for (int i = 0; i < 7; i++) ind_a[i] = pins[i];
      for (int i = 0; i < 8; i++) ind_b[i] = pins[i];
      read(b, 4'(a), v);
      case (a)
        0: exp = (m_dd[b] & m_d[b]) | (~m_dd[b] & pins);
        1: exp = m_dd[b];
        2: exp = m_pe[b];
        3: exp = m_se[b];
        4: exp = m_ds[b];
        default: exp = 8'(m_fs[b][a - 8]);
      endcase
      check($sformatf("read port %0d reg %0h", b, a), 32'(v), 32'(exp));
      // An unmapped address reads 0.
      read(b, 4'h6, v);
      check("unmapped read", 32'(v), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
