// tb_pilot_gen: checks pilot signs for 20/40 MHz and one/two space-time streams over
// 140 symbols (more than one period of the polarity sequence) against the reference, and
// the reference polarity itself against the first 16 values listed in the standard.
module tb_pilot_gen;
  import tx_ref_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, bw40 = 0, sts2 = 0, next_sym = 0;
  logic [2:0] pidx = 0; logic neg0, neg1;
  pilot_gen dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin #2_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int p16[16] = '{1, 1, 1, 1, -1, -1, -1, 1, -1, -1, -1, -1, 1, 1, -1, 1};
    foreach (p16[i]) check(r_polarity(i) == p16[i], $sformatf("polarity p%0d", i));
    repeat (2) @(posedge clk); rst_n <= 1;
    for (int m = 0; m < 4; m++) begin
      int nsp, nsts;
      nsp = m[1] ? 6 : 4; nsts = m[0] ? 2 : 1;
      bw40 <= m[1]; sts2 <= m[0];
      init <= 1; @(posedge clk); init <= 0;
      for (int n = 0; n < 140; n++) begin
        for (int j = 0; j < nsp; j++) begin
          int e0, e1;
          pidx <= 3'(j); #1;
          e0 = r_psi(m[1], nsts, 0, (n + j) % nsp) * r_polarity(n + 3);
          e1 = r_psi(m[1], nsts, 1, (n + j) % nsp) * r_polarity(n + 3);
          check(neg0 == (e0 < 0), $sformatf("bw40=%0d nsts=%0d n=%0d j=%0d s0", m[1], nsts, n, j));
          if (nsts == 2) check(neg1 == (e1 < 0), $sformatf("n=%0d j=%0d s1", n, j));
        end
        next_sym <= 1; @(posedge clk); next_sym <= 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
