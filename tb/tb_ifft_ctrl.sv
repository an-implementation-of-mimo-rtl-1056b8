// tb_ifft_ctrl: checks that the IFFT controller places occupied-subcarrier samples into
// natural bin order with zeros at DC and guard bins, for 20 and 40 MHz, waits for input
// both between symbols and inside a symbol, gates chain 2, and pulses done after the
// last bin of the last symbol. With the input always available a symbol takes N clocks.
module tb_ifft_ctrl;
  import tx_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, bw40 = 0, two_chains = 1;
  cplx_t z0 = '0, z1 = '0; logic last_in = 0, in_valid = 0, in_ready;
  logic signed [12:0] ifft1_re, ifft1_im, ifft2_re, ifft2_im;
  logic ifft1_en, ifft2_en, sym_start, done;
  ifft_ctrl dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(int bw, int two, int nsym, int gaps);
    int nfft = bw ? 128 : 64, kmin = bw ? 2 : 1, kmax = bw ? 58 : 28;
    int ks[$];
    bit fin;
    int t0, t1;
    ks.delete();
    for (int k = kmin; k <= kmax; k++) ks.push_back(k);
    for (int k = -kmax; k <= -kmin; k++) ks.push_back(k);
    bw40 <= bw[0]; two_chains <= two[0];
    @(posedge clk); init <= 1; @(posedge clk); init <= 0;
    fin = 0;
    fork
      begin
        for (int n = 0; n < nsym; n++) begin
          foreach (ks[i]) begin
            in_valid <= gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
            z0.re <= 13'(n * 256 + ks[i]); z0.im <= 13'(-ks[i]);
            z1.re <= 13'(ks[i] * 3); z1.im <= 13'(n);
            last_in <= (n == nsym - 1) && (i == ks.size() - 1);
            @(posedge clk);
            while (!(in_valid && in_ready)) begin in_valid <= 1; @(posedge clk); end
          end
          if (gaps) begin
            in_valid <= 0;
            repeat ($urandom_range(0, 20)) @(posedge clk);
          end
        end
        in_valid <= 0;
      end
      begin
        int n, b;
        n = -1; b = 0; t0 = 0;
        while (!fin) begin
          @(posedge clk); #1;
          if (ifft1_en) begin
            int k, er, ei;
            bit occ;
            if (sym_start) begin n++; b = 0; if (n == 1) t0 = $time; if (n == 2) t1 = $time; end
            k = (b < nfft / 2) ? b : b - nfft;
            occ = (k >= kmin && k <= kmax) || (k <= -kmin && k >= -kmax);
            er = occ ? n * 256 + k : 0; ei = occ ? -k : 0;
            check(ifft1_re == 13'(er) && ifft1_im == 13'(ei),
                  $sformatf("bw %0d sym %0d bin %0d: %0d,%0d exp %0d,%0d", bw, n, b, ifft1_re, ifft1_im, er, ei));
            check(ifft2_en == two[0], "chain 2 enable");
            if (two) check(ifft2_re == 13'(occ ? k * 3 : 0) && ifft2_im == 13'(occ ? n : 0), "chain 2 data");
            b++;
          end
          if (done) begin
            fin = 1;
            check(n == nsym - 1 && b == nfft, $sformatf("done after sym %0d bin %0d", n, b));
          end
        end
      end
    join
    if (!gaps) check(t1 - t0 == 10 * nfft, $sformatf("symbol period %0d clocks", (t1 - t0) / 10));
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    run(0, 1, 3, 0); run(1, 1, 3, 0); run(0, 0, 2, 1); run(1, 1, 3, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
