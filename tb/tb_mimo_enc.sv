// tb_mimo_enc: checks SISO, SDM and STBC encoding with pilot insertion (together with
// pilot_gen) for both bandwidths: every output slot in IFFT bin order, its subcarrier
// index, the pilot values, the STBC pairing rules, sos/eos/last, under back-pressure.
module tb_mimo_enc;
  import tx_pkg::*;
  import tx_ref_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, bw40 = 0, nss2 = 0, stbc = 0;
  cplx_t x0 = '0, x1 = '0; logic last_in = 0, in_valid = 0, in_ready;
  logic [2:0] pidx; logic next_sym, pneg0, pneg1;
  cplx_t y0, y1; logic signed [7:0] kout; logic sos, eos, last, out_valid, out_ready = 1;
  mimo_enc dut (.*);
  pilot_gen u_pil (.clk, .rst_n, .init, .bw40, .sts2(nss2 | stbc), .next_sym, .pidx,
                   .neg0(pneg0), .neg1(pneg1));
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin #5_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(int bw, int mode, int nsym);   // mode 0 SISO, 1 SDM, 2 STBC
    int nsd = r_nsd(bw);
    int dr[][], di[][], er[][], ei[][];
    intq_t dk, pk, occ;
    bit fin;
    dk = r_data_k(bw); pk = r_pilot_k(bw);
    // bin order: positive subcarriers, then negative ones
    occ.delete();
    for (int k = 1; k <= 58; k++) foreach (dk[i]) if (dk[i] == k) occ.push_back(k);
    for (int k = 1; k <= 58; k++) foreach (pk[i]) if (pk[i] == k) occ.push_back(k);
    occ.sort();
    begin
      intq_t neg;
      foreach (occ[i]) neg.push_back(-occ[occ.size() - 1 - i]);
      foreach (neg[i]) occ.push_back(neg[i]);
    end
    dr = new[nsym]; di = new[nsym]; er = new[nsym]; ei = new[nsym];
    for (int n = 0; n < nsym; n++) begin
      dr[n] = new[nsd]; di[n] = new[nsd]; er[n] = new[nsd]; ei[n] = new[nsd];
      for (int m = 0; m < nsd; m++) begin
        dr[n][m] = $urandom_range(0, 4000) - 2000; di[n][m] = $urandom_range(0, 4000) - 2000;
        er[n][m] = $urandom_range(0, 4000) - 2000; ei[n][m] = $urandom_range(0, 4000) - 2000;
      end
    end
    bw40 <= bw[0]; nss2 <= (mode == 1); stbc <= (mode == 2);
    @(posedge clk); init <= 1; @(posedge clk); init <= 0;
    fin = 0;
    fork
      begin
        for (int n = 0; n < nsym; n++)
          for (int m = 0; m < nsd; m++) begin
            in_valid <= 1;
            x0.re <= 13'(dr[n][m]); x0.im <= 13'(di[n][m]);
            x1.re <= 13'(er[n][m]); x1.im <= 13'(ei[n][m]);
            last_in <= (n == nsym - 1) && (m == nsd - 1);
            @(posedge clk);
            while (!in_ready) @(posedge clk);
          end
        in_valid <= 0;
      end
      begin
        int n, p, m;
        n = 0; p = 0; m = 0;
        while (!fin) begin
          out_ready <= ($urandom_range(0, 3) != 0);
          @(posedge clk);
          if (out_valid && out_ready) begin
            int k, a_re, a_im, b_re, b_im;
            bit ispil;
            int j;
            k = occ[p]; ispil = 0; j = 0;
            foreach (pk[i]) if (pk[i] == k) begin ispil = 1; j = i; end
            check(kout == 8'(k), $sformatf("slot %0d k=%0d exp %0d", p, kout, k));
            if (ispil) begin
              int nsts = (mode == 0) ? 1 : 2;
              a_re = 2048 * r_psi(bw, nsts, 0, (n + j) % pk.size()) * r_polarity(n + 3); a_im = 0;
              b_re = (mode == 0) ? 0 : 2048 * r_psi(bw, nsts, 1, (n + j) % pk.size()) * r_polarity(n + 3);
              b_im = 0;
            end else begin
              if (mode == 2) begin
                int e = n - n % 2;
                a_re = dr[n][m]; a_im = di[n][m];
                if (n % 2 == 0) begin b_re = -dr[n+1][m]; b_im = di[n+1][m]; end
                else begin b_re = dr[e][m]; b_im = -di[e][m]; end
              end else begin
                a_re = dr[n][m]; a_im = di[n][m];
                b_re = (mode == 1) ? er[n][m] : 0; b_im = (mode == 1) ? ei[n][m] : 0;
              end
              m++;
            end
            check(y0.re == a_re && y0.im == a_im && y1.re == b_re && y1.im == b_im,
                  $sformatf("mode %0d bw %0d sym %0d k %0d: %0d,%0d %0d,%0d exp %0d,%0d %0d,%0d",
                            mode, bw, n, k, y0.re, y0.im, y1.re, y1.im, a_re, a_im, b_re, b_im));
            check(sos == (p == 0) && eos == (p == occ.size() - 1), "sos/eos");
            check(last == (p == occ.size() - 1 && n == nsym - 1), "last");
            p++;
            if (p == occ.size()) begin p = 0; m = 0; n++; end
            if (n == nsym) fin = 1;
          end
        end
      end
    join
    out_ready <= 1;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    run(0, 0, 3); run(1, 1, 3); run(0, 2, 4); run(1, 2, 2); run(0, 1, 2); run(1, 0, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
