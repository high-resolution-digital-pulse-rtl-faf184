// tb_lco_workload: the limit-cycle and DC-accuracy experiments on the boost
// converter, reproduced with behavioural plant and ADC models.
//
// Limit cycles (5-bit counter DPWM, 7-bit ADC, f_sw = 1.17 MHz, 13.8 V out):
//   plain 5-bit DPWM           -> output steps of about 0.74 V exceed the
//                                 0.22 V ADC bin: a limit cycle is expected
//                                 (duty command keeps moving, samples leave
//                                 the zero-error bin);
//   5-bit DPWM + 4-bit DDPM    -> 9-bit DDPWM, steps of about 0.05 V: the
//                                 loop must settle in the zero-error bin with
//                                 a constant command.
// DC accuracy (7-bit counter DPWM):
//   plain 7-bit DPWM, 6-bit ADC (LCO-free, coarse ADC) against
//   7-bit DPWM + 4-bit DDPM, 10-bit ADC: the DDPWM command must stay within
//   one LSB and its worst DC error over the input range must be several times
//   smaller. (With this lightly damped plant model the DDPM pattern
//   frequency f_sw/16 lies close to the LC resonance at high input voltage,
//   so the 27 mV ADC bin is not always held; the share of samples in the
//   zero-error bin is printed, not checked.)
// Each configuration runs at Vin = 7, 8.5 and 10 V with a 25 Ohm load.
// The integral gain of each loop is scaled so that all have the same loop
// gain per sample (about 0.0026).
module tb_lco_workload;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  localparam real VINS[3] = '{7.0, 8.5, 10.0};
  logic done[4][3];
  int   nz[4][3], us[4][3];
  real  vm[4][3], vmin[4][3], vmax[4][3];

  for (genvar v = 0; v < 3; v++) begin : g_vin
    boost_loop #(.N_DPWM(5), .M_DDPM(4), .N_ADC(7),  .PLAIN(1), .KI(49),  .VIN(VINS[v])) plain5 (
      .clk(clk), .rst_n(rst_n), .done(done[0][v]), .n_zero(nz[0][v]), .u_spread(us[0][v]),
      .v_mean(vm[0][v]), .v_min(vmin[0][v]), .v_max(vmax[0][v]));
    boost_loop #(.N_DPWM(5), .M_DDPM(4), .N_ADC(7),  .PLAIN(0), .KI(786), .VIN(VINS[v])) ddpwm9 (
      .clk(clk), .rst_n(rst_n), .done(done[1][v]), .n_zero(nz[1][v]), .u_spread(us[1][v]),
      .v_mean(vm[1][v]), .v_min(vmin[1][v]), .v_max(vmax[1][v]));
    boost_loop #(.N_DPWM(7), .M_DDPM(4), .N_ADC(6),  .PLAIN(1), .KI(393), .VIN(VINS[v])) plain7 (
      .clk(clk), .rst_n(rst_n), .done(done[2][v]), .n_zero(nz[2][v]), .u_spread(us[2][v]),
      .v_mean(vm[2][v]), .v_min(vmin[2][v]), .v_max(vmax[2][v]));
    boost_loop #(.N_DPWM(7), .M_DDPM(4), .N_ADC(10), .PLAIN(0), .KI(393), .VIN(VINS[v])) ddpwm11 (
      .clk(clk), .rst_n(rst_n), .done(done[3][v]), .n_zero(nz[3][v]), .u_spread(us[3][v]),
      .v_mean(vm[3][v]), .v_min(vmin[3][v]), .v_max(vmax[3][v]));
  end

  function automatic bit all_done();
    foreach (done[i, j]) if (!done[i][j]) return 0;
    return 1;
  endfunction

  initial begin
    automatic string names[4] = '{"plain 5-bit DPWM, 7-bit ADC", "5+4-bit DDPWM, 7-bit ADC",
                        "plain 7-bit DPWM, 6-bit ADC", "7+4-bit DDPWM, 10-bit ADC"};
    real err_max[4];
    automatic int lco_plain5 = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    @(posedge clk);
    for (int c = 0; c < 4; c++) begin
      err_max[c] = 0.0;
      for (int v = 0; v < 3; v++) begin
        real derr;
        derr = vm[c][v] - 13.8;
        if (derr < 0.0) derr = -derr;
        if (derr > err_max[c]) err_max[c] = derr;
        $display("%-28s Vin %4.1f V: zero-error %4d/1500, duty spread %0d LSB, vo mean %.3f V, p-p %.0f mV",
                 names[c], VINS[v], nz[c][v], us[c][v], vm[c][v], (vmax[c][v] - vmin[c][v]) * 1000.0);
      end
    end
    for (int v = 0; v < 3; v++) begin
      check(nz[1][v] == 1500 && us[1][v] == 0, $sformatf("9-bit DDPWM LCO-free at Vin %.1f", VINS[v]));
      check(us[3][v] <= 1, $sformatf("11-bit DDPWM command steady within 1 LSB at Vin %.1f", VINS[v]));
      check(us[2][v] == 0, $sformatf("plain 7-bit DPWM with 6-bit ADC LCO-free at Vin %.1f", VINS[v]));
      if (nz[0][v] < 1500 && us[0][v] > 0) lco_plain5++;
    end
    check(lco_plain5 > 0, "plain 5-bit DPWM shows a limit cycle");
    $display("worst DC error: plain 7-bit/6-bit ADC %.0f mV, 11-bit DDPWM/10-bit ADC %.0f mV",
             err_max[2] * 1000.0, err_max[3] * 1000.0);
    check(err_max[3] * 3.0 < err_max[2], "DDPWM improves DC accuracy several times");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
