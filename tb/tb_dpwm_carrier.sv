// tb_dpwm_carrier: checks the DPWM carrier counter against a cycle model.
// After reset the counter must count 0,1,..,2^N_DPWM-1,0,.. and "wrap" must
// be high exactly when the count is at its maximum, i.e. once every
// 2^N_DPWM clocks (f_sw = f_clk / 2^N_DPWM). A mid-run reset must restart
// the count at 0.
module tb_dpwm_carrier;
  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] r;
  logic wrap;
  int checks = 0, failures = 0;
  int model = 0, last_wrap = -1, cyc = 0, wraps = 0;

  dpwm_carrier #(.N_DPWM(N)) dut (.clk(clk), .rst_n(rst_n), .r(r), .wrap(wrap));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    model = 0;
    for (cyc = 0; cyc < 400; cyc++) begin
      if (cyc == 200) begin
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        check(r == 0, "restart after reset");
        model = 0;
        last_wrap = -1;
      end
      check(int'(r) == model, "carrier count");
      check(wrap == (model == (1 << N) - 1), "wrap strobe");
      if (wrap) begin
        if (last_wrap >= 0) check(cyc - last_wrap == (1 << N), "switching period length");
        last_wrap = cyc;
        wraps++;
      end
      model = (model + 1) % (1 << N);
      @(negedge clk);
    end
    check(wraps >= 10, "enough periods seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
