// tb_ddpm_modulator: checks the priority-mux DDPM modulator for every input
// code. The reference stream is built from the recursive definition of a DDPM
// pattern, Theta_i = [Theta_{i-1}, b_{M-i}, Theta_{i-1}], Sigma_m =
// [Theta_M, 0]; the modulator starts at counter 0, so its output at counter
// value c must equal Sigma_m[(c-1) mod 2^M]. Also checked: exactly m ones per
// 2^M steps, and the counter advances only on "step" (steps are issued with
// random gaps).
module tb_ddpm_modulator;
  localparam int M = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic step = 1'b0;
  logic [M-1:0] code = '0;
  logic o;
  int checks = 0, failures = 0;

  ddpm_modulator #(.M_DDPM(M)) dut (.clk(clk), .rst_n(rst_n), .step(step), .in_code(code), .o(o));

  always #5 clk = ~clk;

  // Bit t of Theta_i for code m (length 2^i - 1).
  function automatic bit theta_bit(int i, int t, int m);
    int half = (1 << (i - 1)) - 1;
    if (t < half) return theta_bit(i - 1, t, m);
    if (t == half) return bit'((m >> (M - i)) & 1);
    return theta_bit(i - 1, t - half - 1, m);
  endfunction

  function automatic bit sigma_bit(int t, int m);
    if (t == (1 << M) - 1) return 1'b0;
    return theta_bit(M, t, m);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int cnt, ones;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    cnt = 0;
    for (int m = 0; m < (1 << M); m++) begin
      code = M'(m);
      ones = 0;
      for (int s = 0; s < (1 << M); s++) begin
        @(negedge clk);
        check(o == ((cnt == 0) ? 1'b0 : sigma_bit((cnt - 1) % (1 << M), m)),
              $sformatf("stream bit m=%0d count=%0d", m, cnt));
        ones += int'(o);
        // idle cycles without a step must not move the pattern
        repeat ($urandom_range(0, 2)) begin
          @(negedge clk);
          check(o == ((cnt == 0) ? 1'b0 : sigma_bit((cnt - 1) % (1 << M), m)), "hold without step");
        end
        step = 1'b1;
        @(negedge clk);
        step = 1'b0;
        cnt = (cnt + 1) % (1 << M);
      end
      check(ones == m, $sformatf("ones per pattern m=%0d got %0d", m, ones));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
