// tb_cyclic_shift: checks the frequency-domain cyclic shift of chain 2, exp(j*pi*k/4) for
// random samples and all subcarrier indices, against real arithmetic (within 1 LSB),
// that chain 1 and a disabled chain 2 pass unchanged, and the one-clock latency.
module tb_cyclic_shift;
  import tx_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, enable = 1;
  cplx_t y0 = '0, y1 = '0; logic signed [7:0] k = 0; logic eos_in = 0, last_in = 0;
  logic in_valid = 0, in_ready, out_ready = 1;
  cplx_t z0, z1; logic eos, last, out_valid;
  cyclic_shift dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    for (int t = 0; t < 600; t++) begin
      int kk, ar, ai, br, bi, er, ei;
      real ph;
      kk = $urandom_range(0, 116) - 58;
      ar = $urandom_range(0, 4400) - 2200; ai = $urandom_range(0, 4400) - 2200;
      br = $urandom_range(0, 4400) - 2200; bi = $urandom_range(0, 4400) - 2200;
      enable <= (t % 7 != 0);
      in_valid <= 1; k <= 8'(kk);
      y0.re <= 13'(ar); y0.im <= 13'(ai); y1.re <= 13'(br); y1.im <= 13'(bi);
      eos_in <= (t % 5 == 0);
      @(posedge clk); in_valid <= 0; #1;
      ph = 3.14159265358979 * real'(kk) / 4.0;
      er = $rtoi($floor(real'(br) * $cos(ph) - real'(bi) * $sin(ph) + 0.5));
      ei = $rtoi($floor(real'(br) * $sin(ph) + real'(bi) * $cos(ph) + 0.5));
      if (!enable) begin er = br; ei = bi; end
      check(out_valid && z0.re == ar && z0.im == ai && eos == (t % 5 == 0), "chain 1 unchanged");
      check(int'(z1.re) - er <= 1 && er - int'(z1.re) <= 1 && int'(z1.im) - ei <= 1 &&
            ei - int'(z1.im) <= 1,
            $sformatf("k=%0d (%0d,%0d) -> (%0d,%0d) exp (%0d,%0d)", kk, br, bi, z1.re, z1.im, er, ei));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
