// tb_ddpm_dac: checks the DDPM DAC stream and its sample rate.
// Modulator ticks are issued with random gaps. A tb model keeps its own step
// counter and code register; the expected output bit of a step is taken from
// the recursive DDPM definition (Theta_i = [Theta_{i-1}, b_{M-i},
// Theta_{i-1}]). Checked: dac_out after every tick, dac_out unchanged between
// ticks, code_load once every 2^M ticks (sample rate f_DDPM / 2^M), the code
// taken at each load, and exactly m ones in every pattern of code m.
module tb_ddpm_dac;
  localparam int M = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick = 1'b0;
  logic [M-1:0] code_in = '0, code_q;
  logic code_load, dac_out;
  int checks = 0, failures = 0;

  ddpm_dac #(.M_DDPM(M)) dut (
    .clk(clk), .rst_n(rst_n), .tick(tick), .code_in(code_in),
    .code_load(code_load), .code_q(code_q), .dac_out(dac_out));

  always #5 clk = ~clk;

  function automatic bit theta_bit(int i, int t, int m);
    int half = (1 << (i - 1)) - 1;
    if (t < half) return theta_bit(i - 1, t, m);
    if (t == half) return bit'((m >> (M - i)) & 1);
    return theta_bit(i - 1, t - half - 1, m);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    automatic int cnt = 0, code_m = 0, out_m = 0, ones = 0, ticks_since = 0, loads = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 10 * (1 << M); t++) begin
      code_in = M'($urandom);
      tick = 1'b1;
      #1;
      check(code_load == (cnt == (1 << M) - 1), "code_load at the last step of a pattern");
      @(negedge clk);
      tick = 1'b0;
      // model of this tick
      out_m = (cnt == 0) ? 0 : int'(theta_bit(M, cnt - 1, code_m));
      ones += out_m;
      ticks_since++;
      if (cnt == (1 << M) - 1) begin
        if (loads > 0) check(ones == code_m, $sformatf("ones per pattern for code %0d: %0d", code_m, ones));
        if (loads > 0) check(ticks_since == (1 << M), "one sample per 2^M ticks");
        code_m = int'(code_in);
        ones = 0;
        ticks_since = 0;
        loads++;
        check(int'(code_q) == code_m, "code register loaded");
      end
      cnt = (cnt + 1) % (1 << M);
      check(int'(dac_out) == out_m, $sformatf("dac_out at step %0d", cnt));
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        check(int'(dac_out) == out_m, "output holds between ticks");
      end
    end
    check(loads >= 9, "codes were loaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
