// tb_interleaver: checks the parser + interleaver against the standard's permutation
// formulas (reference in gather form) for every modulation, one and two streams, both
// bandwidths, with random chunk sizes of up to 16 bits, back-pressure and several symbols
// in flight (ping-pong), and the read order (upper data subcarriers first).
module tb_interleaver;
  import tx_ref_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0, out_ready = 1;
  logic [2:0] bpscs = 1; logic bw40 = 0, nss2 = 0;
  logic [15:0] cbits = 0; logic [4:0] ccnt = 0; logic eos_in = 0, last_in = 0;
  logic in_ready; logic [5:0] d0, d1; logic sos, eos, last, out_valid;
  interleaver dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_full = 0;
  always @(posedge clk) if (in_valid && !in_ready) n_full++;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin #5_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(int mcs, int bw, int nsym);
    bitq_t c;
    int ncbps = r_ncbps(mcs, bw), b = r_bpscs(mcs), nsd = r_nsd(bw);
    bit fin;
    for (int i = 0; i < ncbps * nsym; i++) c.push_back(1'($urandom));
    bpscs <= 3'(b); bw40 <= bw[0]; nss2 <= (mcs >= 8);
    init <= 1; @(posedge clk); init <= 0;
    fin = 0;
    fork
      begin
        int p, sb;
        p = 0; sb = 0;
        while (p < ncbps * nsym) begin
          int n;
          n = $urandom_range(1, 16);
          if (n > ncbps - sb) n = ncbps - sb;
          in_valid <= 1; ccnt <= 5'(n);
          for (int i = 0; i < 16; i++) cbits[i] <= (i < n) ? c[p + i] : 1'b0;
          eos_in <= (sb + n == ncbps); last_in <= (p + n == ncbps * nsym);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          p += n; sb = (sb + n == ncbps) ? 0 : sb + n;
        end
        in_valid <= 0;
      end
      begin
        int n, cnt;
        bitq_t y0, y1, sym;
        n = 0; cnt = 0;
        while (!fin) begin
          out_ready <= ($urandom_range(0, 4) != 0);
          @(posedge clk);
          if (out_valid && out_ready) begin
            int d;
            if (cnt == 0) begin
              sym.delete();
              for (int i = 0; i < ncbps; i++) sym.push_back(c[n * ncbps + i]);
              y0 = r_interleave(sym, mcs, bw, 0);
              if (mcs >= 8) y1 = r_interleave(sym, mcs, bw, 1);
            end
            d = (cnt < nsd / 2) ? cnt + nsd / 2 : cnt - nsd / 2;
            for (int i = 0; i < b; i++) begin
              check(d0[i] == y0[d * b + i], $sformatf("mcs%0d sym%0d sc%0d bit%0d s0", mcs, n, d, i));
              if (mcs >= 8) check(d1[i] == y1[d * b + i], $sformatf("mcs%0d sc%0d bit%0d s1", mcs, d, i));
            end
            check(sos == (cnt == 0) && eos == (cnt == nsd - 1), "sos/eos");
            check(last == (cnt == nsd - 1 && n == nsym - 1), "last");
            cnt++;
            if (cnt == nsd) begin cnt = 0; n++; end
            if (n == nsym) fin = 1;
          end
        end
      end
    join
    out_ready <= 1;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1;
    for (int mcs = 0; mcs < 16; mcs++) run(mcs, mcs % 2, 3);
    run(15, 0, 2); run(8, 1, 2); run(3, 0, 2);
    check(n_full > 0, "write side stalled on full buffers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
